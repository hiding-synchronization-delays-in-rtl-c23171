// dvfs_ctrl: voltage/frequency sequencer of one clock domain.
//
// Each domain runs between F_MIN_MHZ and F_MAX_MHZ at a supply between
// V_MIN_MV and V_MAX_MV.  Voltage moves by 1 mV every V_RATE_PS and frequency
// by 1 MHz every F_RATE_PS; the circuits keep running while they move
// (no PLL re-lock stop).  Lowering starts with the frequency at once and
// lets the voltage follow; raising moves the voltage first and lets the
// frequency follow it.  The sequencer keeps these rules as two limits:
//   * the voltage never drops below v_need(freq), the supply the current
//     frequency requires;
//   * the frequency never rises above f_allow(volt), the highest frequency
//     the current supply supports.
// v_need and f_allow are the straight line from (F_MIN, V_MIN) to
// (F_MAX, V_MAX), rounded so that f_allow(v_need(f)) >= f always holds.
//
// How it works.  Each rising edge of the reference clock adds REF_PERIOD_PS
// to a per-quantity time accumulator; when an accumulator reaches its rate,
// that quantity steps 1 unit toward its goal; the accumulator is cleared
// whenever the quantity reaches its goal, so every movement starts a fresh
// interval.  REF_PERIOD_PS must not exceed
// either rate, so at most one step is taken per reference edge.
//
// Interface: target_mhz is the requested frequency (clamped to the range);
// freq_mhz and volt_mv are the set-points for the domain PLL and regulator;
// busy is high while a transition is in progress.  Reset puts the domain at
// F_MAX / V_MAX.  Ranges, rates and ordering rules follow the source
// architecture; the linear voltage/frequency line and the accumulator
// stepping are this design's choices.
module dvfs_ctrl #(
  parameter int unsigned F_MIN_MHZ     = 250,
  parameter int unsigned F_MAX_MHZ     = 1000,
  parameter int unsigned V_MIN_MV      = 650,
  parameter int unsigned V_MAX_MV      = 1200,
  parameter int unsigned V_RATE_PS     = 66_900,   // per mV
  parameter int unsigned F_RATE_PS     = 49_100,   // per MHz
  parameter int unsigned REF_PERIOD_PS = 10_000    // 100 MHz reference
) (
  input  logic        clk_ref,
  input  logic        rst_n,
  input  logic [10:0] target_mhz,
  output logic [10:0] freq_mhz,
  output logic [10:0] volt_mv,
  output logic        busy
);

  localparam int unsigned F_SPAN = F_MAX_MHZ - F_MIN_MHZ;
  localparam int unsigned V_SPAN = V_MAX_MV - V_MIN_MV;

  function automatic int unsigned v_need(input int unsigned f);
    return V_MIN_MV + ((f - F_MIN_MHZ) * V_SPAN + F_SPAN - 1) / F_SPAN;
  endfunction

  function automatic int unsigned f_allow(input int unsigned v);
    return F_MIN_MHZ + ((v - V_MIN_MV) * F_SPAN) / V_SPAN;
  endfunction

  int unsigned tgt, v_goal, f_goal;
  logic [31:0] acc_v, acc_f;

  always_comb begin
    tgt = int'(target_mhz);
    if (tgt < F_MIN_MHZ) tgt = F_MIN_MHZ;
    if (tgt > F_MAX_MHZ) tgt = F_MAX_MHZ;
    // voltage: what the target needs, but never less than the present frequency needs
    v_goal = v_need(tgt);
    if (v_need(int'(freq_mhz)) > v_goal) v_goal = v_need(int'(freq_mhz));
    // frequency: the target, but never more than the present voltage supports
    f_goal = tgt;
    if (f_allow(int'(volt_mv)) < f_goal) f_goal = f_allow(int'(volt_mv));
  end

  logic [10:0] v_next, f_next;
  assign v_next = (int'(volt_mv) < v_goal) ? volt_mv + 11'd1 : volt_mv - 11'd1;
  assign f_next = (int'(freq_mhz) < f_goal) ? freq_mhz + 11'd1 : freq_mhz - 11'd1;

  assign busy = (int'(freq_mhz) != tgt) || (int'(volt_mv) != v_need(tgt));

  always_ff @(posedge clk_ref or negedge rst_n) begin
    if (!rst_n) begin
      volt_mv  <= 11'(V_MAX_MV);
      freq_mhz <= 11'(F_MAX_MHZ);
      acc_v    <= '0;
      acc_f    <= '0;
    end else begin
      if (int'(volt_mv) == v_goal) acc_v <= '0;
      else if (acc_v + REF_PERIOD_PS >= V_RATE_PS) begin
        volt_mv <= v_next;
        acc_v   <= (int'(v_next) == v_goal) ? '0 : acc_v + REF_PERIOD_PS - V_RATE_PS;
      end else acc_v <= acc_v + REF_PERIOD_PS;

      if (int'(freq_mhz) == f_goal) acc_f <= '0;
      else if (acc_f + REF_PERIOD_PS >= F_RATE_PS) begin
        freq_mhz <= f_next;
        acc_f    <= (int'(f_next) == f_goal) ? '0 : acc_f + REF_PERIOD_PS - F_RATE_PS;
      end else acc_f <= acc_f + REF_PERIOD_PS;
    end
  end

  initial begin
    assert (REF_PERIOD_PS <= V_RATE_PS && REF_PERIOD_PS <= F_RATE_PS)
      else $error("dvfs_ctrl: REF_PERIOD_PS must not exceed the change rates");
  end

  // The ordering rules, checked every reference edge.
  a_volt_covers_freq: assert property (@(posedge clk_ref) disable iff (!rst_n)
      f_allow(int'(volt_mv)) >= int'(freq_mhz))
    else $error("dvfs_ctrl: frequency above what the voltage supports");

endmodule
