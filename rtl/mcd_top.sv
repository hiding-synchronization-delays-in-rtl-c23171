// mcd_top: the domain-crossing fabric of a Multiple Clock Domain processor.
//
// An Alpha 21264-like out-of-order core is split into four clock domains,
// each with its own clock of 250 MHz to 1.0 GHz and no phase relation to the
// others: front end (fetch, branch predictor, rename/dispatch, reorder
// buffer), integer (issue queue, ALUs, register file), floating point (issue
// queue, FP units, register file) and load/store (load/store queue, L1 data
// cache, L2 cache).  Main memory runs on its own clock.  The cores inside the
// domains are ordinary synchronous logic and are outside this module; their
// side of every crossing is a port here.  This module holds every crossing:
//
//   ch  what                      from -> to   structure
//   1   L1 I-cache fill line      LS  -> FE    FIFO        (HAS_L2 = 1)
//   2   L2 miss request / fill    LS <-> MEM   two FIFOs
//   3   branch outcome            INT -> FE    FIFO (drives the squash)
//   4   integer load result       LS  -> INT   issue queue
//   5   FP load result            LS  -> FP    issue queue
//   6   effective address         INT -> LS    issue queue
//   7   FP-to-integer convert     FP  -> INT   FIFO
//   8   integer-to-FP convert     INT -> FP    FIFO
//   9   integer instructions      FE  -> INT   issue queue (the 20-entry IIQ)
//   10  FP instructions           FE  -> FP    issue queue (the 15-entry FIQ)
//   11  load/store operations     FE  -> LS    issue queue (the 64-entry LSQ)
//   12  integer completions       INT -> FE    issue queue (read by the ROB)
//   13  FP completions            FP  -> FE    issue queue (read by the ROB)
//   14  load/store completions    LS  -> FE    issue queue (read by the ROB)
//   15  L1 I-cache fill line      MEM -> FE    FIFO        (HAS_L2 = 0)
//
// FIFOs (mcd_fifo) serve in-order traffic and hide the synchronization
// delay whenever they are neither empty nor full.  Issue queues
// (mcd_issue_queue) serve traffic consumed out of order, where each entry's
// arrival is synchronized on its own.  A mis-predicted branch outcome popped
// from channel 3 in the front end starts a squash that squash_bcast carries
// to the other three domains.  One dvfs_ctrl per domain (index by
// mcd_pkg::domain_e) produces the frequency and voltage set-points for that
// domain's PLL and regulator from a requested frequency.
//
// Which channels exist, their direction and FIFO-or-issue-queue type, the
// IIQ/FIQ/LSQ sizes and the squash rule follow the source architecture.
// The depths of channels 4, 5, 6, 12, 13, 14, the 4-entry logical depth of
// the FIFOs, the port counts and the payload formats are this design's
// choices.  Interface timing is that of mcd_fifo and mcd_issue_queue.
module mcd_top
  import mcd_pkg::*;
#(
  parameter bit          HAS_L2     = 1'b1,
  parameter int unsigned FIFO_DEPTH = 4 + FULL_MARGIN,
  parameter int unsigned LD_Q_DEPTH = 8,    // channels 4, 5
  parameter int unsigned EA_Q_DEPTH = 8,    // channel 6
  parameter int unsigned CMP_Q_DEPTH = 16,  // channels 12, 13, 14
  parameter int unsigned IIQ_DEPTH  = IIQ_ENTRIES,
  parameter int unsigned FIQ_DEPTH  = FIQ_ENTRIES,
  parameter int unsigned LSQ_DEPTH  = LSQ_ENTRIES
) (
  // clocks and resets
  input  logic clk_fe,  input logic rst_fe_n,
  input  logic clk_int, input logic rst_int_n,
  input  logic clk_fp,  input logic rst_fp_n,
  input  logic clk_ls,  input logic rst_ls_n,
  input  logic clk_mem, input logic rst_mem_n,
  input  logic clk_ref, input logic rst_ref_n,

  // ch1: L2 -> L1 I-cache line (LS -> FE)
  input  logic ch1_write, input line_t ch1_wdata, output logic ch1_full,
  input  logic ch1_read,  output line_t ch1_rdata, output logic ch1_empty,
  // ch2: LS -> MEM request, MEM -> LS fill
  input  logic ch2q_write, input mem_req_t ch2q_wdata, output logic ch2q_full,
  input  logic ch2q_read,  output mem_req_t ch2q_rdata, output logic ch2q_empty,
  input  logic ch2f_write, input line_t ch2f_wdata, output logic ch2f_full,
  input  logic ch2f_read,  output line_t ch2f_rdata, output logic ch2f_empty,
  // ch3: branch outcome (INT -> FE)
  input  logic ch3_write, input branch_outcome_t ch3_wdata, output logic ch3_full,
  input  logic ch3_read,  output branch_outcome_t ch3_rdata, output logic ch3_empty,
  // ch7: FP -> INT conversion result
  input  logic ch7_write, input reg_value_t ch7_wdata, output logic ch7_full,
  input  logic ch7_read,  output reg_value_t ch7_rdata, output logic ch7_empty,
  // ch8: INT -> FP conversion result
  input  logic ch8_write, input reg_value_t ch8_wdata, output logic ch8_full,
  input  logic ch8_read,  output reg_value_t ch8_rdata, output logic ch8_empty,
  // ch15: memory -> L1 I-cache line (MEM -> FE), only without L2
  input  logic ch15_write, input line_t ch15_wdata, output logic ch15_full,
  input  logic ch15_read,  output line_t ch15_rdata, output logic ch15_empty,

  // ch4: integer load result (LS -> INT), 2 write / 2 issue ports
  input  logic [1:0] ch4_wr_en, input reg_value_t [1:0] ch4_wr_data, output logic [1:0] ch4_wr_ready,
  output logic [LD_Q_DEPTH-1:0] ch4_vis, output reg_value_t [LD_Q_DEPTH-1:0] ch4_entry,
  input  logic [LD_Q_DEPTH-1:0] ch4_ready,
  output logic [1:0] ch4_rd_valid, output reg_value_t [1:0] ch4_rd_data,
  output logic [1:0][$clog2(LD_Q_DEPTH)-1:0] ch4_rd_idx, input logic [1:0] ch4_rd_take,
  // ch5: FP load result (LS -> FP)
  input  logic [1:0] ch5_wr_en, input reg_value_t [1:0] ch5_wr_data, output logic [1:0] ch5_wr_ready,
  output logic [LD_Q_DEPTH-1:0] ch5_vis, output reg_value_t [LD_Q_DEPTH-1:0] ch5_entry,
  input  logic [LD_Q_DEPTH-1:0] ch5_ready,
  output logic [1:0] ch5_rd_valid, output reg_value_t [1:0] ch5_rd_data,
  output logic [1:0][$clog2(LD_Q_DEPTH)-1:0] ch5_rd_idx, input logic [1:0] ch5_rd_take,
  // ch6: effective address (INT -> LS)
  input  logic [1:0] ch6_wr_en, input eff_addr_t [1:0] ch6_wr_data, output logic [1:0] ch6_wr_ready,
  output logic [EA_Q_DEPTH-1:0] ch6_vis, output eff_addr_t [EA_Q_DEPTH-1:0] ch6_entry,
  input  logic [EA_Q_DEPTH-1:0] ch6_ready,
  output logic [1:0] ch6_rd_valid, output eff_addr_t [1:0] ch6_rd_data,
  output logic [1:0][$clog2(EA_Q_DEPTH)-1:0] ch6_rd_idx, input logic [1:0] ch6_rd_take,
  // ch9: integer instructions (FE -> INT), 4 dispatch / 4 issue ports
  input  logic [3:0] ch9_wr_en, input uop_t [3:0] ch9_wr_data, output logic [3:0] ch9_wr_ready,
  output logic [IIQ_DEPTH-1:0] ch9_vis, output uop_t [IIQ_DEPTH-1:0] ch9_entry,
  input  logic [IIQ_DEPTH-1:0] ch9_ready,
  output logic [3:0] ch9_rd_valid, output uop_t [3:0] ch9_rd_data,
  output logic [3:0][$clog2(IIQ_DEPTH)-1:0] ch9_rd_idx, input logic [3:0] ch9_rd_take,
  // ch10: FP instructions (FE -> FP), 4 dispatch / 2 issue ports
  input  logic [3:0] ch10_wr_en, input uop_t [3:0] ch10_wr_data, output logic [3:0] ch10_wr_ready,
  output logic [FIQ_DEPTH-1:0] ch10_vis, output uop_t [FIQ_DEPTH-1:0] ch10_entry,
  input  logic [FIQ_DEPTH-1:0] ch10_ready,
  output logic [1:0] ch10_rd_valid, output uop_t [1:0] ch10_rd_data,
  output logic [1:0][$clog2(FIQ_DEPTH)-1:0] ch10_rd_idx, input logic [1:0] ch10_rd_take,
  // ch11: load/store operations (FE -> LS), 4 dispatch / 2 issue ports
  input  logic [3:0] ch11_wr_en, input uop_t [3:0] ch11_wr_data, output logic [3:0] ch11_wr_ready,
  output logic [LSQ_DEPTH-1:0] ch11_vis, output uop_t [LSQ_DEPTH-1:0] ch11_entry,
  input  logic [LSQ_DEPTH-1:0] ch11_ready,
  output logic [1:0] ch11_rd_valid, output uop_t [1:0] ch11_rd_data,
  output logic [1:0][$clog2(LSQ_DEPTH)-1:0] ch11_rd_idx, input logic [1:0] ch11_rd_take,
  // ch12: integer completions (INT -> FE)
  input  logic [3:0] ch12_wr_en, input completion_t [3:0] ch12_wr_data, output logic [3:0] ch12_wr_ready,
  output logic [CMP_Q_DEPTH-1:0] ch12_vis, output completion_t [CMP_Q_DEPTH-1:0] ch12_entry,
  input  logic [CMP_Q_DEPTH-1:0] ch12_ready,
  output logic [3:0] ch12_rd_valid, output completion_t [3:0] ch12_rd_data,
  output logic [3:0][$clog2(CMP_Q_DEPTH)-1:0] ch12_rd_idx, input logic [3:0] ch12_rd_take,
  // ch13: FP completions (FP -> FE)
  input  logic [1:0] ch13_wr_en, input completion_t [1:0] ch13_wr_data, output logic [1:0] ch13_wr_ready,
  output logic [CMP_Q_DEPTH-1:0] ch13_vis, output completion_t [CMP_Q_DEPTH-1:0] ch13_entry,
  input  logic [CMP_Q_DEPTH-1:0] ch13_ready,
  output logic [1:0] ch13_rd_valid, output completion_t [1:0] ch13_rd_data,
  output logic [1:0][$clog2(CMP_Q_DEPTH)-1:0] ch13_rd_idx, input logic [1:0] ch13_rd_take,
  // ch14: load/store completions (LS -> FE)
  input  logic [1:0] ch14_wr_en, input completion_t [1:0] ch14_wr_data, output logic [1:0] ch14_wr_ready,
  output logic [CMP_Q_DEPTH-1:0] ch14_vis, output completion_t [CMP_Q_DEPTH-1:0] ch14_entry,
  input  logic [CMP_Q_DEPTH-1:0] ch14_ready,
  output logic [1:0] ch14_rd_valid, output completion_t [1:0] ch14_rd_data,
  output logic [1:0][$clog2(CMP_Q_DEPTH)-1:0] ch14_rd_idx, input logic [1:0] ch14_rd_take,

  // branch mis-prediction squash, one pulse per domain
  output logic squash_fe, output logic squash_int, output logic squash_fp, output logic squash_ls,

  // per-domain voltage/frequency control, indexed by domain_e
  input  logic [NUM_DOMAINS-1:0][10:0] dvfs_target_mhz,
  output logic [NUM_DOMAINS-1:0][10:0] dvfs_freq_mhz,
  output logic [NUM_DOMAINS-1:0][10:0] dvfs_volt_mv,
  output logic [NUM_DOMAINS-1:0]       dvfs_busy
);

  // ------------------------------------------------------------------ FIFOs
  if (HAS_L2) begin : g_l2
    mcd_fifo #(.WIDTH($bits(line_t)), .DEPTH(FIFO_DEPTH)) u_ch1 (
      .clk_w(clk_ls), .rst_w_n(rst_ls_n), .write(ch1_write), .data_w(ch1_wdata), .full(ch1_full),
      .clk_r(clk_fe), .rst_r_n(rst_fe_n), .read(ch1_read), .data_r(ch1_rdata), .empty(ch1_empty));
    assign ch15_full  = 1'b1;
    assign ch15_empty = 1'b1;
    assign ch15_rdata = '0;
  end else begin : g_no_l2
    mcd_fifo #(.WIDTH($bits(line_t)), .DEPTH(FIFO_DEPTH)) u_ch15 (
      .clk_w(clk_mem), .rst_w_n(rst_mem_n), .write(ch15_write), .data_w(ch15_wdata), .full(ch15_full),
      .clk_r(clk_fe), .rst_r_n(rst_fe_n), .read(ch15_read), .data_r(ch15_rdata), .empty(ch15_empty));
    assign ch1_full  = 1'b1;
    assign ch1_empty = 1'b1;
    assign ch1_rdata = '0;
  end

  mcd_fifo #(.WIDTH($bits(mem_req_t)), .DEPTH(FIFO_DEPTH)) u_ch2q (
    .clk_w(clk_ls), .rst_w_n(rst_ls_n), .write(ch2q_write), .data_w(ch2q_wdata), .full(ch2q_full),
    .clk_r(clk_mem), .rst_r_n(rst_mem_n), .read(ch2q_read), .data_r(ch2q_rdata), .empty(ch2q_empty));

  mcd_fifo #(.WIDTH($bits(line_t)), .DEPTH(FIFO_DEPTH)) u_ch2f (
    .clk_w(clk_mem), .rst_w_n(rst_mem_n), .write(ch2f_write), .data_w(ch2f_wdata), .full(ch2f_full),
    .clk_r(clk_ls), .rst_r_n(rst_ls_n), .read(ch2f_read), .data_r(ch2f_rdata), .empty(ch2f_empty));

  mcd_fifo #(.WIDTH($bits(branch_outcome_t)), .DEPTH(FIFO_DEPTH)) u_ch3 (
    .clk_w(clk_int), .rst_w_n(rst_int_n), .write(ch3_write), .data_w(ch3_wdata), .full(ch3_full),
    .clk_r(clk_fe), .rst_r_n(rst_fe_n), .read(ch3_read), .data_r(ch3_rdata), .empty(ch3_empty));

  mcd_fifo #(.WIDTH($bits(reg_value_t)), .DEPTH(FIFO_DEPTH)) u_ch7 (
    .clk_w(clk_fp), .rst_w_n(rst_fp_n), .write(ch7_write), .data_w(ch7_wdata), .full(ch7_full),
    .clk_r(clk_int), .rst_r_n(rst_int_n), .read(ch7_read), .data_r(ch7_rdata), .empty(ch7_empty));

  mcd_fifo #(.WIDTH($bits(reg_value_t)), .DEPTH(FIFO_DEPTH)) u_ch8 (
    .clk_w(clk_int), .rst_w_n(rst_int_n), .write(ch8_write), .data_w(ch8_wdata), .full(ch8_full),
    .clk_r(clk_fp), .rst_r_n(rst_fp_n), .read(ch8_read), .data_r(ch8_rdata), .empty(ch8_empty));

  // ----------------------------------------------------------- issue queues
  mcd_issue_queue #(.WIDTH($bits(reg_value_t)), .DEPTH(LD_Q_DEPTH), .WR_PORTS(2), .RD_PORTS(2)) u_ch4 (
    .clk_w(clk_ls), .rst_w_n(rst_ls_n), .wr_en(ch4_wr_en), .wr_data(ch4_wr_data), .wr_ready(ch4_wr_ready),
    .clk_r(clk_int), .rst_r_n(rst_int_n), .vis(ch4_vis), .entry_data(ch4_entry), .ready(ch4_ready),
    .rd_valid(ch4_rd_valid), .rd_data(ch4_rd_data), .rd_idx(ch4_rd_idx), .rd_take(ch4_rd_take));

  mcd_issue_queue #(.WIDTH($bits(reg_value_t)), .DEPTH(LD_Q_DEPTH), .WR_PORTS(2), .RD_PORTS(2)) u_ch5 (
    .clk_w(clk_ls), .rst_w_n(rst_ls_n), .wr_en(ch5_wr_en), .wr_data(ch5_wr_data), .wr_ready(ch5_wr_ready),
    .clk_r(clk_fp), .rst_r_n(rst_fp_n), .vis(ch5_vis), .entry_data(ch5_entry), .ready(ch5_ready),
    .rd_valid(ch5_rd_valid), .rd_data(ch5_rd_data), .rd_idx(ch5_rd_idx), .rd_take(ch5_rd_take));

  mcd_issue_queue #(.WIDTH($bits(eff_addr_t)), .DEPTH(EA_Q_DEPTH), .WR_PORTS(2), .RD_PORTS(2)) u_ch6 (
    .clk_w(clk_int), .rst_w_n(rst_int_n), .wr_en(ch6_wr_en), .wr_data(ch6_wr_data), .wr_ready(ch6_wr_ready),
    .clk_r(clk_ls), .rst_r_n(rst_ls_n), .vis(ch6_vis), .entry_data(ch6_entry), .ready(ch6_ready),
    .rd_valid(ch6_rd_valid), .rd_data(ch6_rd_data), .rd_idx(ch6_rd_idx), .rd_take(ch6_rd_take));

  mcd_issue_queue #(.WIDTH($bits(uop_t)), .DEPTH(IIQ_DEPTH), .WR_PORTS(4), .RD_PORTS(4)) u_ch9 (
    .clk_w(clk_fe), .rst_w_n(rst_fe_n), .wr_en(ch9_wr_en), .wr_data(ch9_wr_data), .wr_ready(ch9_wr_ready),
    .clk_r(clk_int), .rst_r_n(rst_int_n), .vis(ch9_vis), .entry_data(ch9_entry), .ready(ch9_ready),
    .rd_valid(ch9_rd_valid), .rd_data(ch9_rd_data), .rd_idx(ch9_rd_idx), .rd_take(ch9_rd_take));

  mcd_issue_queue #(.WIDTH($bits(uop_t)), .DEPTH(FIQ_DEPTH), .WR_PORTS(4), .RD_PORTS(2)) u_ch10 (
    .clk_w(clk_fe), .rst_w_n(rst_fe_n), .wr_en(ch10_wr_en), .wr_data(ch10_wr_data), .wr_ready(ch10_wr_ready),
    .clk_r(clk_fp), .rst_r_n(rst_fp_n), .vis(ch10_vis), .entry_data(ch10_entry), .ready(ch10_ready),
    .rd_valid(ch10_rd_valid), .rd_data(ch10_rd_data), .rd_idx(ch10_rd_idx), .rd_take(ch10_rd_take));

  mcd_issue_queue #(.WIDTH($bits(uop_t)), .DEPTH(LSQ_DEPTH), .WR_PORTS(4), .RD_PORTS(2)) u_ch11 (
    .clk_w(clk_fe), .rst_w_n(rst_fe_n), .wr_en(ch11_wr_en), .wr_data(ch11_wr_data), .wr_ready(ch11_wr_ready),
    .clk_r(clk_ls), .rst_r_n(rst_ls_n), .vis(ch11_vis), .entry_data(ch11_entry), .ready(ch11_ready),
    .rd_valid(ch11_rd_valid), .rd_data(ch11_rd_data), .rd_idx(ch11_rd_idx), .rd_take(ch11_rd_take));

  mcd_issue_queue #(.WIDTH($bits(completion_t)), .DEPTH(CMP_Q_DEPTH), .WR_PORTS(4), .RD_PORTS(4)) u_ch12 (
    .clk_w(clk_int), .rst_w_n(rst_int_n), .wr_en(ch12_wr_en), .wr_data(ch12_wr_data), .wr_ready(ch12_wr_ready),
    .clk_r(clk_fe), .rst_r_n(rst_fe_n), .vis(ch12_vis), .entry_data(ch12_entry), .ready(ch12_ready),
    .rd_valid(ch12_rd_valid), .rd_data(ch12_rd_data), .rd_idx(ch12_rd_idx), .rd_take(ch12_rd_take));

  mcd_issue_queue #(.WIDTH($bits(completion_t)), .DEPTH(CMP_Q_DEPTH), .WR_PORTS(2), .RD_PORTS(2)) u_ch13 (
    .clk_w(clk_fp), .rst_w_n(rst_fp_n), .wr_en(ch13_wr_en), .wr_data(ch13_wr_data), .wr_ready(ch13_wr_ready),
    .clk_r(clk_fe), .rst_r_n(rst_fe_n), .vis(ch13_vis), .entry_data(ch13_entry), .ready(ch13_ready),
    .rd_valid(ch13_rd_valid), .rd_data(ch13_rd_data), .rd_idx(ch13_rd_idx), .rd_take(ch13_rd_take));

  mcd_issue_queue #(.WIDTH($bits(completion_t)), .DEPTH(CMP_Q_DEPTH), .WR_PORTS(2), .RD_PORTS(2)) u_ch14 (
    .clk_w(clk_ls), .rst_w_n(rst_ls_n), .wr_en(ch14_wr_en), .wr_data(ch14_wr_data), .wr_ready(ch14_wr_ready),
    .clk_r(clk_fe), .rst_r_n(rst_fe_n), .vis(ch14_vis), .entry_data(ch14_entry), .ready(ch14_ready),
    .rd_valid(ch14_rd_valid), .rd_data(ch14_rd_data), .rd_idx(ch14_rd_idx), .rd_take(ch14_rd_take));

  // ------------------------------------------------------------------ squash
  // A mis-predicted outcome popped from channel 3 starts the squash.
  logic       squash_req;
  logic [2:0] squash_dst;

  assign squash_req = ch3_read && !ch3_empty && ch3_rdata.mispredict;

  squash_bcast #(.N_DST(3)) u_squash (
    .clk_fe(clk_fe), .rst_fe_n(rst_fe_n), .squash_req(squash_req), .squash_fe(squash_fe),
    .clk_dst({clk_ls, clk_fp, clk_int}), .rst_dst_n({rst_ls_n, rst_fp_n, rst_int_n}),
    .squash_o(squash_dst));

  assign squash_int = squash_dst[0];
  assign squash_fp  = squash_dst[1];
  assign squash_ls  = squash_dst[2];

  // -------------------------------------------------------------------- DVFS
  for (genvar d = 0; d < NUM_DOMAINS; d++) begin : g_dvfs
    dvfs_ctrl #(.F_MIN_MHZ(F_MIN_MHZ), .F_MAX_MHZ(F_MAX_MHZ)) u_dvfs (
      .clk_ref(clk_ref), .rst_n(rst_ref_n), .target_mhz(dvfs_target_mhz[d]),
      .freq_mhz(dvfs_freq_mhz[d]), .volt_mv(dvfs_volt_mv[d]), .busy(dvfs_busy[d]));
  end

endmodule
