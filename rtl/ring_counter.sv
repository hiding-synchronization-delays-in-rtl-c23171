// ring_counter: one-hot pointer used as the read or write pointer of a
// domain-crossing FIFO.  Bit 0 is set after reset; each rising edge with
// adv high rotates the single set bit one place up, wrapping to bit 0.
// The one-hot form lets each queue entry use its own pointer bit directly as
// a write enable or output enable, with no decoder.
module ring_counter #(
  parameter int unsigned N = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         adv,
  output logic [N-1:0] ptr
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   ptr <= N'(1);
    else if (adv) ptr <= {ptr[N-2:0], ptr[N-1]};
  end

endmodule
