// iq_agent: testbench producer + scheduler model + scoreboard for one
// domain-crossing issue-queue channel.
//
// The producer offers up to WP entries a cycle on the ports that have a free
// entry; each payload carries a sequence number in its low bits.  The
// consumer drives a random ready vector, takes selected entries at random,
// and checks that each issued payload is outstanding and leaves exactly
// once.  It counts issues that are not the oldest outstanding entry
// (out-of-order issue) and producer cycles that found no free entry.
module iq_agent #(
  parameter int unsigned W      = 16,
  parameter int unsigned D      = 8,
  parameter int unsigned WP     = 2,
  parameter int unsigned RP     = 2,
  parameter int unsigned N_XFER = 200,
  localparam int unsigned IW    = $clog2(D),
  localparam int unsigned SW    = (W < 16) ? W : 16
) (
  input  logic                 clk_w,
  input  logic                 clk_r,
  input  logic                 rst_n,
  output logic [WP-1:0]        wr_en,
  output logic [WP-1:0][W-1:0] wr_data,
  input  logic [WP-1:0]        wr_ready,
  input  logic [D-1:0]         vis,
  output logic [D-1:0]         ready,
  input  logic [RP-1:0]        rd_valid,
  input  logic [RP-1:0][W-1:0] rd_data,
  input  logic [RP-1:0][IW-1:0] rd_idx,
  output logic [RP-1:0]        rd_take,
  output logic                 done
);
  timeunit 1ns;
  timeprecision 1ps;

  int checks = 0, failures = 0;
  int n_written = 0, n_issued = 0, n_ooo = 0, n_wr_stall = 0;
  int order[$];     // outstanding sequence numbers, oldest first

  initial begin wr_en = '0; wr_data = '0; ready = '0; rd_take = '0; done = 0; end

  // producer
  initial begin
    wait (rst_n);
    while (n_written < N_XFER) begin
      @(negedge clk_w); #0.002;
      if (wr_ready == '0) n_wr_stall++;
      for (int p = 0; p < WP; p++) begin
        wr_en[p] = wr_ready[p] && (n_written < N_XFER) && ($urandom_range(3) != 0);
        wr_data[p] = W'({$urandom, $urandom, $urandom, $urandom});
        wr_data[p][SW-1:0] = SW'(n_written);
        if (wr_en[p]) begin order.push_back(n_written % (1 << SW)); n_written++; end
      end
      @(posedge clk_w); #0.001;
      wr_en = '0;
    end
  end

  // scheduler model
  initial begin
    wait (rst_n);
    while (n_issued < N_XFER) begin
      @(negedge clk_r); #0.002;
      ready = D'({$urandom, $urandom, $urandom});
      #0.001;
      for (int p = 0; p < RP; p++) begin
        rd_take[p] = rd_valid[p] && ($urandom_range(3) != 0);
        if (rd_take[p]) begin
          int k[$];
          int s;
          s = int'(rd_data[p][SW-1:0]);
          k = order.find_first_index(x) with (x == s);
          checks++;
          if (k.size() == 0 || !vis[rd_idx[p]]) begin
            failures++;
            $display("FAIL %m %0t: issued entry %0d not outstanding", $realtime, s);
          end else begin
            if (k[0] != 0) n_ooo++;
            order.delete(k[0]);
          end
          n_issued++;
        end
      end
      @(posedge clk_r); #0.001;
      rd_take = '0;
    end
    checks++;
    if (order.size() != 0) begin failures++; $display("FAIL %m: entries left behind"); end
    done = 1'b1;
  end
endmodule
