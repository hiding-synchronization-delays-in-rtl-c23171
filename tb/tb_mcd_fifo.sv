// tb_mcd_fifo: self-checking test of the mixed-clock FIFO.
//
// Write clock 1.000 ns, read clock 1.374 ns with an arbitrary phase, later
// jittered.  Checks, against values the testbench works out itself:
//   1. Visibility: a word written into an empty queue makes EMPTY drop at
//      exactly the first rising read edge that follows the first falling
//      read edge after the write (the falling-edge synchronizer).
//   2. Early Full: writing with the reader stopped, FULL is seen on the
//      rising edge after the (DEPTH - FULL_MARGIN)-th write, not before; the
//      FULL_MARGIN writes made after that are absorbed, not lost.
//   3. Full-speed read: a filled queue drains one word per read cycle with no
//      EMPTY in between, in order.
//   4. Random traffic with clock jitter on both sides: order and data of
//      every word against a scoreboard.
module tb_mcd_fifo;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned WIDTH  = 16;
  localparam int unsigned MARGIN = 5;
  localparam int unsigned DEPTH  = 4 + MARGIN;

  logic clk_w = 0, clk_r = 0, rst_n = 0;
  logic write = 0, read = 0;
  logic [WIDTH-1:0] data_w = '0, data_r;
  logic full, empty;

  int checks = 0, failures = 0;
  realtime half_w = 0.5, half_r = 0.687;
  bit jitter = 0;

  mcd_fifo #(.WIDTH(WIDTH), .FULL_MARGIN(MARGIN), .DEPTH(DEPTH)) dut (
    .clk_w(clk_w), .rst_w_n(rst_n), .write(write), .data_w(data_w), .full(full),
    .clk_r(clk_r), .rst_r_n(rst_n), .read(read), .data_r(data_r), .empty(empty));

  // jitter up to +-55 ps per half period
  function automatic realtime jit();
    return jitter ? (real'($urandom_range(110)) - 55.0) / 1000.0 : 0.0;
  endfunction

  initial begin #0.3; forever begin #(half_w + jit()); clk_w = ~clk_w; end end
  initial begin #0.113; forever begin #(half_r + jit()); clk_r = ~clk_r; end end

  realtime last_fall_r = -1.0;
  always @(negedge clk_r) last_fall_r = $realtime;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %0t: %s", $realtime, what); end
  endtask

  // scoreboard
  logic [WIDTH-1:0] sb[$];

  initial begin : watchdog
    #200000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    realtime tw;
    int n;
    repeat (3) @(posedge clk_w);
    rst_n = 1;
    repeat (3) @(posedge clk_r);

    // ---------------- 1. visibility latency, several phases ----------------
    for (int t = 0; t < 12; t++) begin
      @(posedge clk_w);
      check(empty, "queue empty before visibility test");
      write  <= 1'b1;
      data_w <= WIDTH'(16'h100 + t);
      @(posedge clk_w);
      tw = $realtime;        // write edge
      write <= 1'b0;
      // walk the read edges until the expected one
      do begin
        @(posedge clk_r);
        #0.001;
        if (last_fall_r > tw) break;
        check(empty, "EMPTY still high before the synchronizing falling edge");
      end while (1);
      if (last_fall_r == tw) begin
        // edge coincidence: either outcome is legal
      end else begin
        check(!empty, "EMPTY low right after the synchronizing falling edge");
      end
      while (empty) @(posedge clk_r);
      check(data_r == WIDTH'(16'h100 + t), "visible data");
      @(negedge clk_r); read = 1'b1;
      @(posedge clk_r); #0.001; read = 1'b0;
      check(empty, "empty after single pop");
      // wait a few write cycles to change the phase
      repeat (t % 3 + 1) @(posedge clk_w);
    end

    // ---------------- 2. early Full and margin absorption ----------------
    repeat (4) @(posedge clk_w);
    n = 0;
    while (n < DEPTH) begin
      @(negedge clk_w); #0.001;
      check(full == (n >= DEPTH - MARGIN), $sformatf("FULL after %0d writes", n));
      write  = 1'b1;
      data_w = WIDTH'(16'h200 + n);
      sb.push_back(data_w);
      @(posedge clk_w); #0.001;
      write = 1'b0;
      n++;
    end
    @(negedge clk_w); #0.001;
    check(full, "FULL with every entry written");

    // ---------------- 3. full-speed drain ----------------
    @(negedge clk_r);
    for (int i = 0; i < DEPTH; i++) begin
      check(!empty, "no EMPTY while draining a filled queue");
      check(data_r == sb[0], $sformatf("drain data %0d", i));
      void'(sb.pop_front());
      read = 1'b1;
      @(posedge clk_r); #0.001;
      @(negedge clk_r);
    end
    read = 1'b0;
    check(empty, "EMPTY after draining");

    // ---------------- 4. random traffic with jitter ----------------
    jitter = 1;
    half_r = 0.9;   // reader slower than writer: exercises Full as well
    fork
      begin : producer
        for (int i = 0; i < 3000; i++) begin
          @(negedge clk_w);
          while (full || ($urandom_range(3) == 0)) @(negedge clk_w);
          write = 1'b1; data_w = WIDTH'($urandom);
          sb.push_back(data_w);
          @(posedge clk_w); #0.001; write = 1'b0;
          if (i == 1500) half_r = 0.35;   // reader now faster: exercises Empty
        end
      end
      begin : consumer
        int got = 0;
        while (got < 3000) begin
          @(negedge clk_r);
          read = !empty && ($urandom_range(4) != 0);
          if (read) begin
            check(sb.size() > 0 && data_r == sb[0], "random traffic data in order");
            void'(sb.pop_front());
            got++;
          end
          @(posedge clk_r); #0.001; read = 1'b0;
        end
      end
    join
    check(sb.size() == 0, "scoreboard drained");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
