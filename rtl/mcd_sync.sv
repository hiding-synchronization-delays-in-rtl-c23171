// mcd_sync: falling-edge synchronizer bank.
//
// Each bit of d_async is a flag owned by another clock domain (in this design
// the per-entry Valid flags of the domain-crossing queues).  It is sampled on
// the falling edge of clk, so a flag is seen by the rising-edge logic of this
// domain half a cycle after it is captured.  A flag that changes too close to
// the falling edge (within the synchronization window T_S) is captured one
// edge later; in silicon this stage is a glitch-free dual-rail synchronizer
// cell, and here it is written as a falling-edge flip-flop so it synthesizes
// to whatever synchronizer cell the library provides.  Sampling on the falling
// edge follows the source architecture; the asynchronous reset to zero is this
// design's choice.
//
// Interface: clk/rst_n of the receiving domain, d_async from the sending side,
// q valid from the falling edge after d_async settles.
module mcd_sync #(
  parameter int unsigned WIDTH = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] d_async,
  output logic [WIDTH-1:0] q
);

  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n) q <= '0;
    else        q <= d_async;
  end

endmodule
