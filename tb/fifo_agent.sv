// fifo_agent: testbench producer + consumer + scoreboard for one
// domain-crossing FIFO channel.
//
// The producer writes N_XFER words.  It looks at FULL as registered one
// cycle earlier (a one-stage producer pipeline), so it sometimes writes
// after FULL has risen; the early-Full margin must absorb those writes.
// Traffic runs in two halves: first the consumer is slow (FULL happens),
// then the producer is slow (EMPTY happens).  When MARK_EVERY is non-zero,
// the top bit of every MARK_EVERY-th word is set and all others cleared
// (used to mark mis-predicted branch outcomes); the consumer counts marked
// words.  Every word is checked for order and value.
module fifo_agent #(
  parameter int unsigned W          = 8,
  parameter int unsigned N_XFER     = 200,
  parameter int unsigned MARK_EVERY = 0
) (
  input  logic         clk_w,
  input  logic         clk_r,
  input  logic         rst_n,
  output logic         write,
  output logic [W-1:0] wdata,
  input  logic         full,
  output logic         read,
  input  logic [W-1:0] rdata,
  input  logic         empty,
  output logic         done
);
  timeunit 1ns;
  timeprecision 1ps;

  int checks = 0, failures = 0;
  int n_written = 0, n_read = 0, n_full = 0, n_absorbed = 0, n_empty_stall = 0, n_marked = 0;
  logic [W-1:0] sb[$];
  logic full_q;

  initial begin write = 0; wdata = '0; read = 0; done = 0; full_q = 0; end

  always @(posedge clk_w) full_q <= full;

  function automatic logic [W-1:0] make_word(int seq);
    logic [W-1:0] v;
    v = W'({$urandom, $urandom, $urandom, $urandom});
    if (MARK_EVERY != 0) v[W-1] = (seq % MARK_EVERY == MARK_EVERY - 1);
    return v;
  endfunction

  // producer
  initial begin
    wait (rst_n);
    while (n_written < N_XFER) begin
      @(negedge clk_w); #0.002;
      if (full) n_full++;
      if (!full_q && ($urandom_range(9) < (n_written < N_XFER / 2 ? 9 : 2))) begin
        if (full) n_absorbed++;
        write = 1'b1;
        wdata = make_word(n_written);
        sb.push_back(wdata);
        n_written++;
      end
      @(posedge clk_w); #0.001;
      write = 1'b0;
    end
  end

  // consumer
  initial begin
    wait (rst_n);
    while (n_read < N_XFER) begin
      @(negedge clk_r); #0.002;
      if ($urandom_range(9) < (n_read < N_XFER / 2 ? 2 : 9)) begin
        if (empty) n_empty_stall++;
        else begin
          read = 1'b1;
          checks++;
          if (sb.size() == 0 || rdata != sb[0]) begin
            failures++;
            $display("FAIL %m %0t: word %0d out of order or corrupted", $realtime, n_read);
          end
          if (MARK_EVERY != 0 && rdata[W-1]) n_marked++;
          if (sb.size() != 0) void'(sb.pop_front());
          n_read++;
        end
      end
      @(posedge clk_r); #0.001;
      read = 1'b0;
    end
    done = 1'b1;
  end
endmodule
