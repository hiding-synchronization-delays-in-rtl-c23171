// squash_bcast: delivers a branch mis-prediction squash from the front-end
// domain to the integer, floating-point and load/store domains.
//
// The branch outcome is computed in the integer domain but reaches the front
// end through the branch-outcome FIFO.  The squash is started only there,
// after that FIFO has synchronized the outcome; each other domain then
// squashes on a rising edge of its own clock once the request has been
// synchronized into it.  This saves separate outcome FIFOs from the integer
// domain to the floating-point and load/store domains, at the price of
// keeping soon-to-be-squashed instructions a little longer.
//
// How it works.  A squash_req pulse in the front-end domain flips a toggle
// register.  Each destination domain samples the toggle on its falling edge
// (mcd_sync), and a rising-edge register there compares the sample with the
// last value it saw; a difference produces a one-cycle squash pulse.  Two
// requests must be at least a few destination cycles apart (any mis-predict
// penalty is longer), or they merge into one squash.  Starting the squash
// after synchronization in the front end follows the source architecture;
// the toggle handshake is this design's choice.
//
// Timing: squash_fe is squash_req itself (same cycle).  squash_o[d] pulses
// for one cycle of domain d, on the first rising edge after the falling edge
// that captured the toggle.
module squash_bcast #(
  parameter int unsigned N_DST = 3
) (
  input  logic             clk_fe,
  input  logic             rst_fe_n,
  input  logic             squash_req,
  output logic             squash_fe,
  input  logic [N_DST-1:0] clk_dst,
  input  logic [N_DST-1:0] rst_dst_n,
  output logic [N_DST-1:0] squash_o
);

  logic tog;

  always_ff @(posedge clk_fe or negedge rst_fe_n) begin
    if (!rst_fe_n)       tog <= 1'b0;
    else if (squash_req) tog <= !tog;
  end

  assign squash_fe = squash_req;

  for (genvar d = 0; d < N_DST; d++) begin : g_dst
    logic clk_d, rst_d_n, seen_sync, seen_q, pulse_q;
    assign clk_d   = clk_dst[d];
    assign rst_d_n = rst_dst_n[d];
    mcd_sync #(.WIDTH(1)) u_sync (.clk(clk_d), .rst_n(rst_d_n), .d_async(tog), .q(seen_sync));
    always_ff @(posedge clk_d or negedge rst_d_n) begin
      if (!rst_d_n) begin
        seen_q  <= 1'b0;
        pulse_q <= 1'b0;
      end else begin
        seen_q  <= seen_sync;
        pulse_q <= seen_sync ^ seen_q;
      end
    end
    assign squash_o[d] = pulse_q;
  end

endmodule
