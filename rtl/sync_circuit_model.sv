// sync_circuit_model: behavioural model of the glitch-free synchronizer cell
// that captures one cross-domain flag.  NOT synthesizable: it is a timing
// model of a transistor-level circuit, kept for simulation studies.
//
// The cell samples DataIn on the falling edge of its clock; its clock pin is
// the inverted clock, so the model samples on the rising edge of clock_n,
// which is the same instant.  Inside, two integrating stages form a
// dual-rail copy (R1/R0) of the sampled value that can only move
// monotonically, and an RS latch turns it back into the single-rail DataOut,
// so DataOut never glitches.  The model keeps only what is visible at the
// pins:
//   * If DataIn last changed at least TS_PS before the sampling edge, DataOut
//     takes the new value TCQ_PS after that edge.
//   * If DataIn changed inside the window, the cell resolves to the old value
//     and the new value is taken at the next sampling edge; one extra cycle
//     of synchronization delay results.
//   * DataOut changes at most once per edge and monotonically (no glitch).
// TS_PS defaults to 300 ps, 30 % of the 1.0 GHz period, the window the source
// architecture assumes.  TCQ_PS is this model's choice.
module sync_circuit_model #(
  parameter int unsigned TS_PS  = 300,
  parameter int unsigned TCQ_PS = 50
) (
  input  logic data_in,
  input  logic clock_n,
  output logic data_out
);

  timeunit 1ns;
  timeprecision 1ps;

  realtime last_change;
  logic    r1, r0;     // dual-rail internal state: r1 = captured 1, r0 = captured 0

  initial begin
    last_change = 0.0;
    r1          = 1'b0;
    r0          = 1'b1;
    data_out    = 1'b0;
  end

  always @(posedge data_in or negedge data_in) last_change = $realtime;

  always @(posedge clock_n) begin
    if (($realtime - last_change) * 1000.0 >= real'(TS_PS)) begin
      #(real'(TCQ_PS) / 1000.0);
      r1 <= data_in;
      r0 <= !data_in;
    end
  end

  // Output RS latch: set by R1, reset by R0.
  always_latch begin
    if (r1 && !r0)      data_out = 1'b1;
    else if (r0 && !r1) data_out = 1'b0;
  end

endmodule
