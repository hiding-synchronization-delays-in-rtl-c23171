// tb_mcd_top_sa: end-to-end test of the fabric in the configuration of a
// StrongARM SA-1110-like core made into an MCD processor: no L2 cache, so
// instruction-cache fills come straight from main memory over channel 15
// (channel 1 is absent), and 16-entry integer and FP issue queues with a
// 12-entry load/store queue.  Stimulus and checks are those of tb_mcd_top:
// DVFS down and up transitions, traffic with scoreboards on every channel,
// one squash per marked branch outcome in every domain, and a failure for
// any mechanism (FULL, EMPTY, early-Full absorption, out-of-order issue,
// producer stall, squash, DVFS) that never happened.
module tb_mcd_top_sa;
  import mcd_pkg::*;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned N_FIFO = 600;
  localparam int unsigned N_IQ   = 1500;

  logic clk_fe, clk_int, clk_fp, clk_ls, clk_mem, clk_ref = 0;
  logic rst_n = 0, go = 0;
  int checks = 0, failures = 0;

  logic [NUM_DOMAINS-1:0][10:0] dvfs_target, dvfs_freq, dvfs_volt;
  logic [NUM_DOMAINS-1:0]       dvfs_busy;
  logic squash_fe, squash_int, squash_fp, squash_ls;
  logic ch1_full, ch1_empty; line_t ch1_rdata;

  logic ch15_write, ch15_full, ch15_read, ch15_empty, ch15_done;
  line_t ch15_wdata, ch15_rdata;
  logic ch2q_write, ch2q_full, ch2q_read, ch2q_empty, ch2q_done;
  mem_req_t ch2q_wdata, ch2q_rdata;
  logic ch2f_write, ch2f_full, ch2f_read, ch2f_empty, ch2f_done;
  line_t ch2f_wdata, ch2f_rdata;
  logic ch3_write, ch3_full, ch3_read, ch3_empty, ch3_done;
  branch_outcome_t ch3_wdata, ch3_rdata;
  logic ch7_write, ch7_full, ch7_read, ch7_empty, ch7_done;
  reg_value_t ch7_wdata, ch7_rdata;
  logic ch8_write, ch8_full, ch8_read, ch8_empty, ch8_done;
  reg_value_t ch8_wdata, ch8_rdata;
  logic [1:0] ch4_wr_en, ch4_wr_ready; reg_value_t [1:0] ch4_wr_data;
  logic [7:0] ch4_vis, ch4_ready; reg_value_t [7:0] ch4_entry;
  logic [1:0] ch4_rd_valid, ch4_rd_take; reg_value_t [1:0] ch4_rd_data; logic [1:0][$clog2(8)-1:0] ch4_rd_idx; logic ch4_done;
  logic [1:0] ch5_wr_en, ch5_wr_ready; reg_value_t [1:0] ch5_wr_data;
  logic [7:0] ch5_vis, ch5_ready; reg_value_t [7:0] ch5_entry;
  logic [1:0] ch5_rd_valid, ch5_rd_take; reg_value_t [1:0] ch5_rd_data; logic [1:0][$clog2(8)-1:0] ch5_rd_idx; logic ch5_done;
  logic [1:0] ch6_wr_en, ch6_wr_ready; eff_addr_t [1:0] ch6_wr_data;
  logic [7:0] ch6_vis, ch6_ready; eff_addr_t [7:0] ch6_entry;
  logic [1:0] ch6_rd_valid, ch6_rd_take; eff_addr_t [1:0] ch6_rd_data; logic [1:0][$clog2(8)-1:0] ch6_rd_idx; logic ch6_done;
  logic [3:0] ch9_wr_en, ch9_wr_ready; uop_t [3:0] ch9_wr_data;
  logic [15:0] ch9_vis, ch9_ready; uop_t [15:0] ch9_entry;
  logic [3:0] ch9_rd_valid, ch9_rd_take; uop_t [3:0] ch9_rd_data; logic [3:0][$clog2(16)-1:0] ch9_rd_idx; logic ch9_done;
  logic [3:0] ch10_wr_en, ch10_wr_ready; uop_t [3:0] ch10_wr_data;
  logic [15:0] ch10_vis, ch10_ready; uop_t [15:0] ch10_entry;
  logic [1:0] ch10_rd_valid, ch10_rd_take; uop_t [1:0] ch10_rd_data; logic [1:0][$clog2(16)-1:0] ch10_rd_idx; logic ch10_done;
  logic [3:0] ch11_wr_en, ch11_wr_ready; uop_t [3:0] ch11_wr_data;
  logic [11:0] ch11_vis, ch11_ready; uop_t [11:0] ch11_entry;
  logic [1:0] ch11_rd_valid, ch11_rd_take; uop_t [1:0] ch11_rd_data; logic [1:0][$clog2(12)-1:0] ch11_rd_idx; logic ch11_done;
  logic [3:0] ch12_wr_en, ch12_wr_ready; completion_t [3:0] ch12_wr_data;
  logic [15:0] ch12_vis, ch12_ready; completion_t [15:0] ch12_entry;
  logic [3:0] ch12_rd_valid, ch12_rd_take; completion_t [3:0] ch12_rd_data; logic [3:0][$clog2(16)-1:0] ch12_rd_idx; logic ch12_done;
  logic [1:0] ch13_wr_en, ch13_wr_ready; completion_t [1:0] ch13_wr_data;
  logic [15:0] ch13_vis, ch13_ready; completion_t [15:0] ch13_entry;
  logic [1:0] ch13_rd_valid, ch13_rd_take; completion_t [1:0] ch13_rd_data; logic [1:0][$clog2(16)-1:0] ch13_rd_idx; logic ch13_done;
  logic [1:0] ch14_wr_en, ch14_wr_ready; completion_t [1:0] ch14_wr_data;
  logic [15:0] ch14_vis, ch14_ready; completion_t [15:0] ch14_entry;
  logic [1:0] ch14_rd_valid, ch14_rd_take; completion_t [1:0] ch14_rd_data; logic [1:0][$clog2(16)-1:0] ch14_rd_idx; logic ch14_done;

  domain_clock_model u_clk_fe  (.freq_mhz(dvfs_freq[DOM_FE]),  .clk(clk_fe));
  domain_clock_model u_clk_int (.freq_mhz(dvfs_freq[DOM_INT]), .clk(clk_int));
  domain_clock_model u_clk_fp  (.freq_mhz(dvfs_freq[DOM_FP]),  .clk(clk_fp));
  domain_clock_model u_clk_ls  (.freq_mhz(dvfs_freq[DOM_LS]),  .clk(clk_ls));
  domain_clock_model u_clk_mem (.freq_mhz(11'd1000),           .clk(clk_mem));
  always #5 clk_ref = ~clk_ref;

  mcd_top #(.HAS_L2(1'b0), .IIQ_DEPTH(16), .FIQ_DEPTH(16), .LSQ_DEPTH(12)) dut (
    .clk_fe(clk_fe), .rst_fe_n(rst_n), .clk_int(clk_int), .rst_int_n(rst_n),
    .clk_fp(clk_fp), .rst_fp_n(rst_n), .clk_ls(clk_ls), .rst_ls_n(rst_n),
    .clk_mem(clk_mem), .rst_mem_n(rst_n), .clk_ref(clk_ref), .rst_ref_n(rst_n),
    .ch15_write(ch15_write), .ch15_wdata(ch15_wdata), .ch15_full(ch15_full), .ch15_read(ch15_read), .ch15_rdata(ch15_rdata), .ch15_empty(ch15_empty),
    .ch2q_write(ch2q_write), .ch2q_wdata(ch2q_wdata), .ch2q_full(ch2q_full), .ch2q_read(ch2q_read), .ch2q_rdata(ch2q_rdata), .ch2q_empty(ch2q_empty),
    .ch2f_write(ch2f_write), .ch2f_wdata(ch2f_wdata), .ch2f_full(ch2f_full), .ch2f_read(ch2f_read), .ch2f_rdata(ch2f_rdata), .ch2f_empty(ch2f_empty),
    .ch3_write(ch3_write), .ch3_wdata(ch3_wdata), .ch3_full(ch3_full), .ch3_read(ch3_read), .ch3_rdata(ch3_rdata), .ch3_empty(ch3_empty),
    .ch7_write(ch7_write), .ch7_wdata(ch7_wdata), .ch7_full(ch7_full), .ch7_read(ch7_read), .ch7_rdata(ch7_rdata), .ch7_empty(ch7_empty),
    .ch8_write(ch8_write), .ch8_wdata(ch8_wdata), .ch8_full(ch8_full), .ch8_read(ch8_read), .ch8_rdata(ch8_rdata), .ch8_empty(ch8_empty),
    .ch4_wr_en(ch4_wr_en), .ch4_wr_data(ch4_wr_data), .ch4_wr_ready(ch4_wr_ready), .ch4_vis(ch4_vis), .ch4_entry(ch4_entry), .ch4_ready(ch4_ready),
    .ch4_rd_valid(ch4_rd_valid), .ch4_rd_data(ch4_rd_data), .ch4_rd_idx(ch4_rd_idx), .ch4_rd_take(ch4_rd_take),
    .ch5_wr_en(ch5_wr_en), .ch5_wr_data(ch5_wr_data), .ch5_wr_ready(ch5_wr_ready), .ch5_vis(ch5_vis), .ch5_entry(ch5_entry), .ch5_ready(ch5_ready),
    .ch5_rd_valid(ch5_rd_valid), .ch5_rd_data(ch5_rd_data), .ch5_rd_idx(ch5_rd_idx), .ch5_rd_take(ch5_rd_take),
    .ch6_wr_en(ch6_wr_en), .ch6_wr_data(ch6_wr_data), .ch6_wr_ready(ch6_wr_ready), .ch6_vis(ch6_vis), .ch6_entry(ch6_entry), .ch6_ready(ch6_ready),
    .ch6_rd_valid(ch6_rd_valid), .ch6_rd_data(ch6_rd_data), .ch6_rd_idx(ch6_rd_idx), .ch6_rd_take(ch6_rd_take),
    .ch9_wr_en(ch9_wr_en), .ch9_wr_data(ch9_wr_data), .ch9_wr_ready(ch9_wr_ready), .ch9_vis(ch9_vis), .ch9_entry(ch9_entry), .ch9_ready(ch9_ready),
    .ch9_rd_valid(ch9_rd_valid), .ch9_rd_data(ch9_rd_data), .ch9_rd_idx(ch9_rd_idx), .ch9_rd_take(ch9_rd_take),
    .ch10_wr_en(ch10_wr_en), .ch10_wr_data(ch10_wr_data), .ch10_wr_ready(ch10_wr_ready), .ch10_vis(ch10_vis), .ch10_entry(ch10_entry), .ch10_ready(ch10_ready),
    .ch10_rd_valid(ch10_rd_valid), .ch10_rd_data(ch10_rd_data), .ch10_rd_idx(ch10_rd_idx), .ch10_rd_take(ch10_rd_take),
    .ch11_wr_en(ch11_wr_en), .ch11_wr_data(ch11_wr_data), .ch11_wr_ready(ch11_wr_ready), .ch11_vis(ch11_vis), .ch11_entry(ch11_entry), .ch11_ready(ch11_ready),
    .ch11_rd_valid(ch11_rd_valid), .ch11_rd_data(ch11_rd_data), .ch11_rd_idx(ch11_rd_idx), .ch11_rd_take(ch11_rd_take),
    .ch12_wr_en(ch12_wr_en), .ch12_wr_data(ch12_wr_data), .ch12_wr_ready(ch12_wr_ready), .ch12_vis(ch12_vis), .ch12_entry(ch12_entry), .ch12_ready(ch12_ready),
    .ch12_rd_valid(ch12_rd_valid), .ch12_rd_data(ch12_rd_data), .ch12_rd_idx(ch12_rd_idx), .ch12_rd_take(ch12_rd_take),
    .ch13_wr_en(ch13_wr_en), .ch13_wr_data(ch13_wr_data), .ch13_wr_ready(ch13_wr_ready), .ch13_vis(ch13_vis), .ch13_entry(ch13_entry), .ch13_ready(ch13_ready),
    .ch13_rd_valid(ch13_rd_valid), .ch13_rd_data(ch13_rd_data), .ch13_rd_idx(ch13_rd_idx), .ch13_rd_take(ch13_rd_take),
    .ch14_wr_en(ch14_wr_en), .ch14_wr_data(ch14_wr_data), .ch14_wr_ready(ch14_wr_ready), .ch14_vis(ch14_vis), .ch14_entry(ch14_entry), .ch14_ready(ch14_ready),
    .ch14_rd_valid(ch14_rd_valid), .ch14_rd_data(ch14_rd_data), .ch14_rd_idx(ch14_rd_idx), .ch14_rd_take(ch14_rd_take),
    .ch1_write(1'b0), .ch1_wdata('0), .ch1_full(ch1_full), .ch1_read(1'b0), .ch1_rdata(ch1_rdata), .ch1_empty(ch1_empty),
    .squash_fe(squash_fe), .squash_int(squash_int), .squash_fp(squash_fp), .squash_ls(squash_ls),
    .dvfs_target_mhz(dvfs_target), .dvfs_freq_mhz(dvfs_freq), .dvfs_volt_mv(dvfs_volt), .dvfs_busy(dvfs_busy));

  fifo_agent #(.W($bits(line_t)), .N_XFER(N_FIFO), .MARK_EVERY(0)) a_ch15 (.clk_w(clk_mem), .clk_r(clk_fe), .rst_n(go),
    .write(ch15_write), .wdata(ch15_wdata), .full(ch15_full), .read(ch15_read), .rdata(ch15_rdata), .empty(ch15_empty), .done(ch15_done));
  fifo_agent #(.W($bits(mem_req_t)), .N_XFER(N_FIFO), .MARK_EVERY(0)) a_ch2q (.clk_w(clk_ls), .clk_r(clk_mem), .rst_n(go),
    .write(ch2q_write), .wdata(ch2q_wdata), .full(ch2q_full), .read(ch2q_read), .rdata(ch2q_rdata), .empty(ch2q_empty), .done(ch2q_done));
  fifo_agent #(.W($bits(line_t)), .N_XFER(N_FIFO), .MARK_EVERY(0)) a_ch2f (.clk_w(clk_mem), .clk_r(clk_ls), .rst_n(go),
    .write(ch2f_write), .wdata(ch2f_wdata), .full(ch2f_full), .read(ch2f_read), .rdata(ch2f_rdata), .empty(ch2f_empty), .done(ch2f_done));
  fifo_agent #(.W($bits(branch_outcome_t)), .N_XFER(N_FIFO), .MARK_EVERY(8)) a_ch3 (.clk_w(clk_int), .clk_r(clk_fe), .rst_n(go),
    .write(ch3_write), .wdata(ch3_wdata), .full(ch3_full), .read(ch3_read), .rdata(ch3_rdata), .empty(ch3_empty), .done(ch3_done));
  fifo_agent #(.W($bits(reg_value_t)), .N_XFER(N_FIFO), .MARK_EVERY(0)) a_ch7 (.clk_w(clk_fp), .clk_r(clk_int), .rst_n(go),
    .write(ch7_write), .wdata(ch7_wdata), .full(ch7_full), .read(ch7_read), .rdata(ch7_rdata), .empty(ch7_empty), .done(ch7_done));
  fifo_agent #(.W($bits(reg_value_t)), .N_XFER(N_FIFO), .MARK_EVERY(0)) a_ch8 (.clk_w(clk_int), .clk_r(clk_fp), .rst_n(go),
    .write(ch8_write), .wdata(ch8_wdata), .full(ch8_full), .read(ch8_read), .rdata(ch8_rdata), .empty(ch8_empty), .done(ch8_done));
  iq_agent #(.W($bits(reg_value_t)), .D(8), .WP(2), .RP(2), .N_XFER(N_IQ)) a_ch4 (.clk_w(clk_ls), .clk_r(clk_int), .rst_n(go),
    .wr_en(ch4_wr_en), .wr_data(ch4_wr_data), .wr_ready(ch4_wr_ready), .vis(ch4_vis), .ready(ch4_ready),
    .rd_valid(ch4_rd_valid), .rd_data(ch4_rd_data), .rd_idx(ch4_rd_idx), .rd_take(ch4_rd_take), .done(ch4_done));
  iq_agent #(.W($bits(reg_value_t)), .D(8), .WP(2), .RP(2), .N_XFER(N_IQ)) a_ch5 (.clk_w(clk_ls), .clk_r(clk_fp), .rst_n(go),
    .wr_en(ch5_wr_en), .wr_data(ch5_wr_data), .wr_ready(ch5_wr_ready), .vis(ch5_vis), .ready(ch5_ready),
    .rd_valid(ch5_rd_valid), .rd_data(ch5_rd_data), .rd_idx(ch5_rd_idx), .rd_take(ch5_rd_take), .done(ch5_done));
  iq_agent #(.W($bits(eff_addr_t)), .D(8), .WP(2), .RP(2), .N_XFER(N_IQ)) a_ch6 (.clk_w(clk_int), .clk_r(clk_ls), .rst_n(go),
    .wr_en(ch6_wr_en), .wr_data(ch6_wr_data), .wr_ready(ch6_wr_ready), .vis(ch6_vis), .ready(ch6_ready),
    .rd_valid(ch6_rd_valid), .rd_data(ch6_rd_data), .rd_idx(ch6_rd_idx), .rd_take(ch6_rd_take), .done(ch6_done));
  iq_agent #(.W($bits(uop_t)), .D(16), .WP(4), .RP(4), .N_XFER(N_IQ)) a_ch9 (.clk_w(clk_fe), .clk_r(clk_int), .rst_n(go),
    .wr_en(ch9_wr_en), .wr_data(ch9_wr_data), .wr_ready(ch9_wr_ready), .vis(ch9_vis), .ready(ch9_ready),
    .rd_valid(ch9_rd_valid), .rd_data(ch9_rd_data), .rd_idx(ch9_rd_idx), .rd_take(ch9_rd_take), .done(ch9_done));
  iq_agent #(.W($bits(uop_t)), .D(16), .WP(4), .RP(2), .N_XFER(N_IQ)) a_ch10 (.clk_w(clk_fe), .clk_r(clk_fp), .rst_n(go),
    .wr_en(ch10_wr_en), .wr_data(ch10_wr_data), .wr_ready(ch10_wr_ready), .vis(ch10_vis), .ready(ch10_ready),
    .rd_valid(ch10_rd_valid), .rd_data(ch10_rd_data), .rd_idx(ch10_rd_idx), .rd_take(ch10_rd_take), .done(ch10_done));
  iq_agent #(.W($bits(uop_t)), .D(12), .WP(4), .RP(2), .N_XFER(N_IQ)) a_ch11 (.clk_w(clk_fe), .clk_r(clk_ls), .rst_n(go),
    .wr_en(ch11_wr_en), .wr_data(ch11_wr_data), .wr_ready(ch11_wr_ready), .vis(ch11_vis), .ready(ch11_ready),
    .rd_valid(ch11_rd_valid), .rd_data(ch11_rd_data), .rd_idx(ch11_rd_idx), .rd_take(ch11_rd_take), .done(ch11_done));
  iq_agent #(.W($bits(completion_t)), .D(16), .WP(4), .RP(4), .N_XFER(N_IQ)) a_ch12 (.clk_w(clk_int), .clk_r(clk_fe), .rst_n(go),
    .wr_en(ch12_wr_en), .wr_data(ch12_wr_data), .wr_ready(ch12_wr_ready), .vis(ch12_vis), .ready(ch12_ready),
    .rd_valid(ch12_rd_valid), .rd_data(ch12_rd_data), .rd_idx(ch12_rd_idx), .rd_take(ch12_rd_take), .done(ch12_done));
  iq_agent #(.W($bits(completion_t)), .D(16), .WP(2), .RP(2), .N_XFER(N_IQ)) a_ch13 (.clk_w(clk_fp), .clk_r(clk_fe), .rst_n(go),
    .wr_en(ch13_wr_en), .wr_data(ch13_wr_data), .wr_ready(ch13_wr_ready), .vis(ch13_vis), .ready(ch13_ready),
    .rd_valid(ch13_rd_valid), .rd_data(ch13_rd_data), .rd_idx(ch13_rd_idx), .rd_take(ch13_rd_take), .done(ch13_done));
  iq_agent #(.W($bits(completion_t)), .D(16), .WP(2), .RP(2), .N_XFER(N_IQ)) a_ch14 (.clk_w(clk_ls), .clk_r(clk_fe), .rst_n(go),
    .wr_en(ch14_wr_en), .wr_data(ch14_wr_data), .wr_ready(ch14_wr_ready), .vis(ch14_vis), .ready(ch14_ready),
    .rd_valid(ch14_rd_valid), .rd_data(ch14_rd_data), .rd_idx(ch14_rd_idx), .rd_take(ch14_rd_take), .done(ch14_done));

  // squash pulses per domain (one-cycle pulses, counted on each domain clock)
  int sq_fe = 0, sq_int = 0, sq_fp = 0, sq_ls = 0;
  always @(posedge clk_fe)  if (rst_n && squash_fe)  sq_fe++;
  always @(posedge clk_int) if (rst_n && squash_int) sq_int++;
  always @(posedge clk_fp)  if (rst_n && squash_fp)  sq_fp++;
  always @(posedge clk_ls)  if (rst_n && squash_ls)  sq_ls++;

  // DVFS monitor: lowest frequency seen in FP, and the voltage-first rule
  int fp_min_freq = 1000;
  bit ls_went_up = 0;
  always @(posedge clk_ref) if (rst_n) begin
    if (int'(dvfs_freq[DOM_FP]) < fp_min_freq) fp_min_freq = int'(dvfs_freq[DOM_FP]);
    for (int d = 0; d < NUM_DOMAINS; d++)
      if (250 + ((int'(dvfs_volt[d]) - 650) * 750) / 550 < int'(dvfs_freq[d])) begin
        failures++;
        $display("FAIL %0t: domain %0d frequency ahead of its voltage", $realtime, d);
      end
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %0t: %s", $realtime, what); end
  endtask

  initial begin : watchdog
    #400000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    int absorbed, wr_stalls;
    dvfs_target = {NUM_DOMAINS{11'd1000}};
    #50 rst_n = 1;
    #20;
    check(ch1_full && ch1_empty, "channel 1 absent without an L2 cache");
    // slow the FP domain to 250 MHz and the LS domain to 500 MHz
    dvfs_target[DOM_FP] = 11'd250;
    dvfs_target[DOM_LS] = 11'd500;
    #20;
    check(dvfs_busy[DOM_FP] && dvfs_busy[DOM_LS], "DVFS transitions started");
    wait (!dvfs_busy[DOM_FP] && !dvfs_busy[DOM_LS]);
    check(dvfs_freq[DOM_FP] == 250 && dvfs_volt[DOM_FP] == 650, "FP domain at 250 MHz / 0.65 V");
    check(dvfs_freq[DOM_LS] == 500, "LS domain at 500 MHz");
    $display("DVFS down done at %0t", $realtime);
    // traffic on every channel; raise LS back to 1.0 GHz while it runs
    go = 1;
    #2000 dvfs_target[DOM_LS] = 11'd1000;
    #20;
    fork
      begin wait (ch15_done && ch2q_done && ch2f_done && ch3_done && ch7_done && ch8_done && ch4_done && ch5_done && ch6_done && ch9_done && ch10_done && ch11_done && ch12_done && ch13_done && ch14_done); end
      begin wait (!dvfs_busy[DOM_LS]); ls_went_up = (dvfs_freq[DOM_LS] == 1000); end
    join
    #200;
    $display("traffic done at %0t", $realtime);
    absorbed = 0; wr_stalls = 0;
    $display("  ch15  FIFO : %0d words, FULL seen %0d, absorbed %0d, EMPTY stalls %0d", a_ch15.n_read, a_ch15.n_full, a_ch15.n_absorbed, a_ch15.n_empty_stall);
    check(a_ch15.n_read == N_FIFO, "ch15: all words delivered");
    check(a_ch15.n_full > 0, "ch15: FULL happened");
    check(a_ch15.n_empty_stall > 0, "ch15: EMPTY stall happened");
    absorbed += a_ch15.n_absorbed;
    $display("  ch2q  FIFO : %0d words, FULL seen %0d, absorbed %0d, EMPTY stalls %0d", a_ch2q.n_read, a_ch2q.n_full, a_ch2q.n_absorbed, a_ch2q.n_empty_stall);
    check(a_ch2q.n_read == N_FIFO, "ch2q: all words delivered");
    check(a_ch2q.n_full > 0, "ch2q: FULL happened");
    check(a_ch2q.n_empty_stall > 0, "ch2q: EMPTY stall happened");
    absorbed += a_ch2q.n_absorbed;
    $display("  ch2f  FIFO : %0d words, FULL seen %0d, absorbed %0d, EMPTY stalls %0d", a_ch2f.n_read, a_ch2f.n_full, a_ch2f.n_absorbed, a_ch2f.n_empty_stall);
    check(a_ch2f.n_read == N_FIFO, "ch2f: all words delivered");
    check(a_ch2f.n_full > 0, "ch2f: FULL happened");
    check(a_ch2f.n_empty_stall > 0, "ch2f: EMPTY stall happened");
    absorbed += a_ch2f.n_absorbed;
    $display("  ch3   FIFO : %0d words, FULL seen %0d, absorbed %0d, EMPTY stalls %0d", a_ch3.n_read, a_ch3.n_full, a_ch3.n_absorbed, a_ch3.n_empty_stall);
    check(a_ch3.n_read == N_FIFO, "ch3: all words delivered");
    check(a_ch3.n_full > 0, "ch3: FULL happened");
    check(a_ch3.n_empty_stall > 0, "ch3: EMPTY stall happened");
    absorbed += a_ch3.n_absorbed;
    $display("  ch7   FIFO : %0d words, FULL seen %0d, absorbed %0d, EMPTY stalls %0d", a_ch7.n_read, a_ch7.n_full, a_ch7.n_absorbed, a_ch7.n_empty_stall);
    check(a_ch7.n_read == N_FIFO, "ch7: all words delivered");
    check(a_ch7.n_full > 0, "ch7: FULL happened");
    check(a_ch7.n_empty_stall > 0, "ch7: EMPTY stall happened");
    absorbed += a_ch7.n_absorbed;
    $display("  ch8   FIFO : %0d words, FULL seen %0d, absorbed %0d, EMPTY stalls %0d", a_ch8.n_read, a_ch8.n_full, a_ch8.n_absorbed, a_ch8.n_empty_stall);
    check(a_ch8.n_read == N_FIFO, "ch8: all words delivered");
    check(a_ch8.n_full > 0, "ch8: FULL happened");
    check(a_ch8.n_empty_stall > 0, "ch8: EMPTY stall happened");
    absorbed += a_ch8.n_absorbed;
    $display("  ch4   IQ   : %0d entries, out-of-order %0d, producer stalls %0d", a_ch4.n_issued, a_ch4.n_ooo, a_ch4.n_wr_stall);
    check(a_ch4.n_issued == N_IQ, "ch4: all entries issued");
    check(a_ch4.n_ooo > 0, "ch4: out-of-order issue happened");
    wr_stalls += a_ch4.n_wr_stall;
    $display("  ch5   IQ   : %0d entries, out-of-order %0d, producer stalls %0d", a_ch5.n_issued, a_ch5.n_ooo, a_ch5.n_wr_stall);
    check(a_ch5.n_issued == N_IQ, "ch5: all entries issued");
    check(a_ch5.n_ooo > 0, "ch5: out-of-order issue happened");
    wr_stalls += a_ch5.n_wr_stall;
    $display("  ch6   IQ   : %0d entries, out-of-order %0d, producer stalls %0d", a_ch6.n_issued, a_ch6.n_ooo, a_ch6.n_wr_stall);
    check(a_ch6.n_issued == N_IQ, "ch6: all entries issued");
    check(a_ch6.n_ooo > 0, "ch6: out-of-order issue happened");
    wr_stalls += a_ch6.n_wr_stall;
    $display("  ch9   IQ   : %0d entries, out-of-order %0d, producer stalls %0d", a_ch9.n_issued, a_ch9.n_ooo, a_ch9.n_wr_stall);
    check(a_ch9.n_issued == N_IQ, "ch9: all entries issued");
    check(a_ch9.n_ooo > 0, "ch9: out-of-order issue happened");
    wr_stalls += a_ch9.n_wr_stall;
    $display("  ch10  IQ   : %0d entries, out-of-order %0d, producer stalls %0d", a_ch10.n_issued, a_ch10.n_ooo, a_ch10.n_wr_stall);
    check(a_ch10.n_issued == N_IQ, "ch10: all entries issued");
    check(a_ch10.n_ooo > 0, "ch10: out-of-order issue happened");
    wr_stalls += a_ch10.n_wr_stall;
    $display("  ch11  IQ   : %0d entries, out-of-order %0d, producer stalls %0d", a_ch11.n_issued, a_ch11.n_ooo, a_ch11.n_wr_stall);
    check(a_ch11.n_issued == N_IQ, "ch11: all entries issued");
    check(a_ch11.n_ooo > 0, "ch11: out-of-order issue happened");
    wr_stalls += a_ch11.n_wr_stall;
    $display("  ch12  IQ   : %0d entries, out-of-order %0d, producer stalls %0d", a_ch12.n_issued, a_ch12.n_ooo, a_ch12.n_wr_stall);
    check(a_ch12.n_issued == N_IQ, "ch12: all entries issued");
    check(a_ch12.n_ooo > 0, "ch12: out-of-order issue happened");
    wr_stalls += a_ch12.n_wr_stall;
    $display("  ch13  IQ   : %0d entries, out-of-order %0d, producer stalls %0d", a_ch13.n_issued, a_ch13.n_ooo, a_ch13.n_wr_stall);
    check(a_ch13.n_issued == N_IQ, "ch13: all entries issued");
    check(a_ch13.n_ooo > 0, "ch13: out-of-order issue happened");
    wr_stalls += a_ch13.n_wr_stall;
    $display("  ch14  IQ   : %0d entries, out-of-order %0d, producer stalls %0d", a_ch14.n_issued, a_ch14.n_ooo, a_ch14.n_wr_stall);
    check(a_ch14.n_issued == N_IQ, "ch14: all entries issued");
    check(a_ch14.n_ooo > 0, "ch14: out-of-order issue happened");
    wr_stalls += a_ch14.n_wr_stall;
    check(absorbed > 0, "early-Full margin absorbed a late write");
    check(wr_stalls > 0, "an issue-queue producer found no free entry");
    $display("  squash: marked outcomes %0d, pulses fe %0d int %0d fp %0d ls %0d", a_ch3.n_marked, sq_fe, sq_int, sq_fp, sq_ls);
    check(a_ch3.n_marked > 0, "mis-predicted branch outcomes delivered");
    check(sq_fe == a_ch3.n_marked, "one front-end squash per mis-prediction");
    check(sq_int == a_ch3.n_marked, "one integer squash per mis-prediction");
    check(sq_fp == a_ch3.n_marked, "one FP squash per mis-prediction");
    check(sq_ls == a_ch3.n_marked, "one load/store squash per mis-prediction");
    check(fp_min_freq == 250, "DVFS down transition");
    check(ls_went_up, "DVFS up transition");
    checks   += a_ch15.checks + a_ch2q.checks + a_ch2f.checks + a_ch3.checks + a_ch7.checks + a_ch8.checks + a_ch4.checks + a_ch5.checks + a_ch6.checks + a_ch9.checks + a_ch10.checks + a_ch11.checks + a_ch12.checks + a_ch13.checks + a_ch14.checks;
    failures += a_ch15.failures + a_ch2q.failures + a_ch2f.failures + a_ch3.failures + a_ch7.failures + a_ch8.failures + a_ch4.failures + a_ch5.failures + a_ch6.failures + a_ch9.failures + a_ch10.failures + a_ch11.failures + a_ch12.failures + a_ch13.failures + a_ch14.failures;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
