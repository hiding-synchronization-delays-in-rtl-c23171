// tb_mcd_fifo_fig4: directed test of the mixed-clock FIFO in its plain
// 4-entry form (DEPTH = 4, FULL_MARGIN = 0), following the write-until-full /
// read-until-empty sequence of the queue timing diagram.
//
// Write clock 1.0 ns, read clock 1.25 ns; the sequence is repeated with a
// different phase between the clocks each time.  Every flag edge is checked
// against the clock edge the testbench predicts:
//   T1: EMPTY drops at the first rising read edge after the first falling
//       read edge that follows the first write.
//   T2: after the fourth back-to-back write, FULL is high at the next rising
//       write edge (synchronized at the falling edge of the same write cycle),
//       and low after each of the first three writes.
//   T3: after the first read, FULL drops at the first falling write edge that
//       follows the read edge and not before.
//   T4: after the fourth read, EMPTY is high at the next rising read edge.
// Data order is checked for every word.
module tb_mcd_fifo_fig4;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned WIDTH = 8;
  localparam int unsigned DEPTH = 4;

  logic clk_w = 0, clk_r = 0, rst_n = 0;
  logic write = 0, read = 0;
  logic [WIDTH-1:0] data_w = '0, data_r;
  logic full, empty;

  int checks = 0, failures = 0;
  realtime half_r = 0.625;

  mcd_fifo #(.WIDTH(WIDTH), .FULL_MARGIN(0), .DEPTH(DEPTH)) dut (
    .clk_w(clk_w), .rst_w_n(rst_n), .write(write), .data_w(data_w), .full(full),
    .clk_r(clk_r), .rst_r_n(rst_n), .read(read), .data_r(data_r), .empty(empty));

  initial begin #0.25; forever begin #0.5; clk_w = ~clk_w; end end
  initial begin #0.07; forever begin #(half_r); clk_r = ~clk_r; end end

  realtime last_fall_r = -1.0, last_fall_w = -1.0;
  always @(negedge clk_r) last_fall_r = $realtime;
  always @(negedge clk_w) last_fall_w = $realtime;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %0t: %s", $realtime, what); end
  endtask

  initial begin : watchdog
    #20000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    realtime tw, tr;
    logic [WIDTH-1:0] base;
    repeat (3) @(posedge clk_w);
    rst_n = 1;
    repeat (3) @(posedge clk_r);

    for (int run = 0; run < 10; run++) begin
      base = WIDTH'(run * 16);
      @(posedge clk_w); #0.001;
      check(empty && !full, "queue idle at start of run");

      // ---- write four entries back to back (T2), watching EMPTY (T1) ----
      fork
        begin : writer
          for (int n = 0; n < DEPTH; n++) begin
            write  = 1'b1;
            data_w = base + WIDTH'(n);
            @(posedge clk_w);
            if (n == 0) tw = $realtime;
            #0.001;
            write = 1'b0;
            @(negedge clk_w); #0.001;
            check(full == (n == DEPTH - 1), $sformatf("FULL after write %0d", n + 1));
          end
          // FULL is already valid at the next rising write edge
          @(posedge clk_w); #0.001;
          check(full, "FULL at rising edge after the fourth write");
        end
        begin : empty_watch
          // T1: EMPTY drops at the rising read edge after the first falling
          // read edge that follows the first write
          @(posedge clk_w); #0.002;
          do begin
            @(posedge clk_r); #0.001;
            if (last_fall_r > tw) break;
            check(empty, "EMPTY high before the synchronizing falling edge");
          end while (1);
          check(!empty, "EMPTY low after the synchronizing falling edge");
        end
      join

      // ---- read four entries back to back (T3, T4) ----
      for (int n = 0; n < DEPTH; n++) begin
        @(negedge clk_r);
        check(!empty, $sformatf("entry %0d available", n));
        check(data_r == base + WIDTH'(n), $sformatf("data of entry %0d", n));
        read = 1'b1;
        @(posedge clk_r);
        tr = $realtime;
        #0.001;
        read = 1'b0;
        if (n == 0) begin
          // T3: FULL holds until the first falling write edge after tr
          while (!(last_fall_w > tr)) begin
            check(full, "FULL held until the write side's falling edge");
            @(clk_w); #0.001;
          end
          check(!full, "FULL cleared after the write side's falling edge");
        end
      end
      // T4: EMPTY at once after the last read
      check(empty, "EMPTY right after the fourth read");
      @(posedge clk_r); #0.001;
      check(empty, "EMPTY at next rising read edge");

      // shift the phase between the two clocks for the next run
      repeat (run % 4 + 1) @(posedge clk_w);
      #(0.09 * real'(run));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
