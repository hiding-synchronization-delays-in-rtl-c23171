// domain_clock_model: behavioural stand-in for a domain PLL and clock grid.
// Produces a clock whose period follows freq_mhz (re-read every cycle), with
// a random start phase and a random jitter of up to +-JITTER_PS on every
// edge (uniform; the source quotes 110 ps of normally distributed jitter).
module domain_clock_model #(
  parameter int unsigned JITTER_PS = 55
) (
  input  logic [10:0] freq_mhz,
  output logic        clk
);
  timeunit 1ns;
  timeprecision 1ps;

  initial begin
    clk = 1'b0;
    #(real'($urandom_range(1000)) / 1000.0);
    forever begin
      realtime half;
      half = 500.0 / real'(freq_mhz > 0 ? freq_mhz : 11'd1000);
      #(half + (real'($urandom_range(2 * JITTER_PS)) - real'(JITTER_PS)) / 1000.0);
      clk = ~clk;
    end
  end
endmodule
