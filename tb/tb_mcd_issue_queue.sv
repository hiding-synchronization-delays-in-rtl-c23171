// tb_mcd_issue_queue: self-checking test of the clock-crossing issue queue
// at its default size (20 entries, 4 write ports, 4 issue ports).
//
// Checks, against values the testbench works out itself:
//   1. Visibility: an entry written into a queue becomes visible (vis) at
//      exactly the first rising read edge after the first falling read edge
//      that follows the write, whatever else the queue holds.
//   2. Allocation: write ports take the lowest free entries; wr_ready reports
//      exactly the free entries the write side knows of, so the queue fills
//      after 20 writes and refuses more.
//   3. Out-of-order issue: only visible-and-ready entries are selected,
//      lowest index first, never more than there are.
//   4. Random traffic on jittered clocks: every payload issued exactly once.
module tb_mcd_issue_queue;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned W = 16, D = 20, WP = 4, RP = 4;
  localparam int unsigned IW = $clog2(D);

  logic clk_w = 0, clk_r = 0, rst_n = 0;
  logic [WP-1:0] wr_en = '0, wr_ready;
  logic [WP-1:0][W-1:0] wr_data = '0;
  logic [D-1:0] vis, ready = '0;
  logic [D-1:0][W-1:0] entry_data;
  logic [RP-1:0] rd_valid, rd_take = '0;
  logic [RP-1:0][W-1:0] rd_data;
  logic [RP-1:0][IW-1:0] rd_idx;

  int checks = 0, failures = 0;
  realtime half_w = 0.5, half_r = 0.613;
  bit jitter = 0;

  mcd_issue_queue #(.WIDTH(W), .DEPTH(D), .WR_PORTS(WP), .RD_PORTS(RP)) dut (
    .clk_w(clk_w), .rst_w_n(rst_n), .wr_en(wr_en), .wr_data(wr_data), .wr_ready(wr_ready),
    .clk_r(clk_r), .rst_r_n(rst_n), .vis(vis), .entry_data(entry_data), .ready(ready),
    .rd_valid(rd_valid), .rd_data(rd_data), .rd_idx(rd_idx), .rd_take(rd_take));

  function automatic realtime jit();
    return jitter ? (real'($urandom_range(110)) - 55.0) / 1000.0 : 0.0;
  endfunction
  initial begin #0.21; forever begin #(half_w + jit()); clk_w = ~clk_w; end end
  initial begin #0.07; forever begin #(half_r + jit()); clk_r = ~clk_r; end end

  realtime last_fall_r = -1.0;
  always @(negedge clk_r) last_fall_r = $realtime;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %0t: %s", $realtime, what); end
  endtask

  initial begin : watchdog
    #300000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one write of 'n' payloads on ports 0..n-1, at the next rising write edge
  task automatic write_n(input int n, input int base, output realtime tw);
    @(negedge clk_w);
    for (int p = 0; p < WP; p++) begin
      wr_en[p]   = (p < n);
      wr_data[p] = W'(base + p);
    end
    @(posedge clk_w); tw = $realtime; #0.001;
    wr_en = '0;
  endtask

  int outstanding[int];
  int issued_total = 0, ooo = 0;

  initial begin : main
    realtime tw;
    logic [D-1:0] vis_prev;
    int n;
    repeat (3) @(posedge clk_w);
    rst_n = 1;
    repeat (3) @(posedge clk_r);

    // ---------------- 1. visibility per entry ----------------
    for (int t = 0; t < 10; t++) begin
      @(posedge clk_r); #0.001;
      vis_prev = vis;
      write_n(1, 16'h300 + t, tw);
      do begin
        @(posedge clk_r); #0.001;
        if (last_fall_r > tw) break;
        check(vis == vis_prev, "entry not visible before its synchronizing falling edge");
      end while (1);
      check($countones(vis) == $countones(vis_prev) + 1, "new entry visible right after synchronization");
      check(entry_data[t] == W'(16'h300 + t), "lowest free entry allocated");
      repeat (t % 3) @(posedge clk_w);
    end

    // ---------------- 2. allocation until full ----------------
    n = 10;
    while (n < D) begin
      @(negedge clk_w); #0.001;
      for (int p = 0; p < WP; p++)
        check(wr_ready[p] == (D - n > p), $sformatf("wr_ready[%0d] with %0d entries used", p, n));
      write_n((D - n) < WP ? (D - n) : WP, 16'h400 + n, tw);
      n += (D - n) < WP ? (D - n) : WP;
    end
    @(negedge clk_w); #0.001;
    check(wr_ready == '0, "no write port ready when full");

    // ---------------- 3. out-of-order select ----------------
    repeat (2) @(posedge clk_r);
    @(negedge clk_r);
    ready = '0;
    ready[7] = 1'b1; ready[2] = 1'b1; ready[15] = 1'b1;
    #0.001;
    check(rd_valid == 4'b0111, "three ready entries -> three ports valid");
    check(rd_idx[0] == 2 && rd_idx[1] == 7 && rd_idx[2] == 15, "lowest index first");
    check(rd_data[1] == entry_data[7], "port data is the selected entry");
    rd_take = 4'b0011;        // issue entries 2 and 7
    @(posedge clk_r); #0.001;
    rd_take = '0;
    @(negedge clk_r); #0.001;
    check(!vis[2] && !vis[7] && vis[15], "issued entries leave, others stay");
    check(rd_valid == 4'b0001 && rd_idx[0] == 15, "only the remaining ready entry selected");
    // the write side sees the two freed entries after its falling edge
    @(negedge clk_w); #0.001;
    @(negedge clk_w); #0.001;
    check(wr_ready == 4'b0011, "two freed entries offered to the writer");
    ready = '1;
    // drain everything
    while (vis != '0) begin
      @(negedge clk_r); #0.001; rd_take = rd_valid;
      @(posedge clk_r); #0.001; rd_take = '0;
    end
    check(vis == '0, "queue drained");

    // ---------------- 4. random traffic with jitter ----------------
    jitter = 1;
    fork
      begin : producer
        int seq;
        seq = 0;
        while (seq < 4000) begin
          @(negedge clk_w); #0.002;
          for (int p = 0; p < WP; p++) begin
            wr_en[p] = wr_ready[p] && ($urandom_range(2) != 0) && (seq < 4000);
            wr_data[p] = W'(seq);
            if (wr_en[p]) begin outstanding[seq] = 1; seq++; end
          end
          @(posedge clk_w); #0.001; wr_en = '0;
          if (seq == 2000) half_r = 0.35;
        end
      end
      begin : consumer
        while (issued_total < 4000) begin
          @(negedge clk_r); #0.002;
          ready = D'({$urandom, $urandom});
          #0.001;
          for (int p = 0; p < RP; p++) begin
            rd_take[p] = rd_valid[p] && ($urandom_range(3) != 0);
            if (rd_take[p]) begin
              int k;
              k = int'(rd_data[p]);
              check(outstanding.exists(k), "issued payload was outstanding");
              foreach (outstanding[o]) if (o < k) begin ooo++; break; end
              outstanding.delete(k);
              issued_total++;
            end
          end
          @(posedge clk_r); #0.001; rd_take = '0;
        end
      end
    join
    check(outstanding.num() == 0, "every payload issued exactly once");
    check(ooo > 0, "out-of-order issue happened");
    $display("issued %0d, out of order %0d", issued_total, ooo);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
