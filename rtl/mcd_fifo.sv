// mcd_fifo: mixed-clock FIFO joining two independently clocked domains.
//
// How it works.  Writing and reading are independent: each side has a
// one-hot ring counter that points at its next entry.  A write stores
// data_w in the entry under the write pointer; a read presents the entry
// under the read pointer on data_r (an AND-OR bus standing for the
// output-enabled entry registers).  Each entry has one Valid flag, set by the
// writer and cleared by the reader.  Here it is built as two toggle bits,
// one per domain, whose XOR is the flag; the two toggles never change close
// together because each side only toggles an entry after it has seen the
// other side's last toggle.  The Valid vector is synchronized into both
// domains on their falling edges (mcd_sync), and FULL and EMPTY are formed
// only from the synchronized copies:
//   * EMPTY = Valid (read-side copy) of the entry under the read pointer is 0.
//   * FULL  = write-side count of Valid entries >= DEPTH - FULL_MARGIN.
// FULL is raised FULL_MARGIN entries early so that a producer running at
// up to F_MAX/F_MIN times the consumer's clock can still place the writes it
// issues before it reacts to FULL; those extra entries hold real data.
// A write is stored whenever the entry under the write pointer is free, so
// writes made while FULL is high are absorbed by the margin.  Writing into a
// physically full queue is a protocol error and is flagged by an assertion.
//
// Timing.  Reads and writes run back-to-back at full speed on both sides
// whenever the queue is neither empty nor full.  A word written into an
// empty queue on a rising write edge is captured at the next falling read
// edge (one edge later if it lands inside the synchronizer window) and
// EMPTY drops then, so it can be popped on the following rising read edge.
// A read frees its entry to the writer at the next falling write edge.
//
// Follows the source architecture: ring counters, per-entry Valid flags
// synchronized to both clocks on falling edges, early Full with a margin of
// F_MAX/F_MIN + 1.  This design's choices: toggle-pair Valid flags, the
// count-based Full test, and the 4 + 5 entry default depth.
//
// Interface: write side clk_w, rst_w_n, write, data_w, full; read side clk_r,
// rst_r_n, read, data_r, empty.  A pop happens on a rising clk_r edge with
// read high and empty low.  Both resets must be asserted together.
module mcd_fifo #(
  parameter int unsigned WIDTH       = 32,
  parameter int unsigned FULL_MARGIN = mcd_pkg::FULL_MARGIN,
  parameter int unsigned DEPTH       = 4 + FULL_MARGIN
) (
  // write (producer) domain
  input  logic             clk_w,
  input  logic             rst_w_n,
  input  logic             write,
  input  logic [WIDTH-1:0] data_w,
  output logic             full,
  // read (consumer) domain
  input  logic             clk_r,
  input  logic             rst_r_n,
  input  logic             read,
  output logic [WIDTH-1:0] data_r,
  output logic             empty
);

  localparam int unsigned CNT_W = $clog2(DEPTH + 1);

  logic [DEPTH-1:0] wptr, rptr;          // one-hot ring counters
  logic [DEPTH-1:0] wtog, rtog;          // toggle halves of the Valid flags
  logic [DEPTH-1:0] valid;               // Valid[n], owned by neither clock
  logic [DEPTH-1:0] valid_w, valid_r;    // Valid synchronized to each side
  logic [WIDTH-1:0] mem [DEPTH];
  logic             wr_room, do_write, do_read;
  logic [CNT_W-1:0] occ_w;

  assign valid = wtog ^ rtog;

  // ---------------- write domain ----------------
  mcd_sync #(.WIDTH(DEPTH)) u_sync_w (.clk(clk_w), .rst_n(rst_w_n), .d_async(valid), .q(valid_w));

  assign wr_room  = ~|(wptr & valid_w);
  assign do_write = write && wr_room;

  ring_counter #(.N(DEPTH)) u_wptr (.clk(clk_w), .rst_n(rst_w_n), .adv(do_write), .ptr(wptr));

  always_ff @(posedge clk_w or negedge rst_w_n) begin
    if (!rst_w_n)      wtog <= '0;
    else if (do_write) wtog <= wtog ^ wptr;
  end

  always_ff @(posedge clk_w) begin
    for (int i = 0; i < DEPTH; i++)
      if (do_write && wptr[i]) mem[i] <= data_w;
  end

  always_comb begin
    occ_w = '0;
    for (int i = 0; i < DEPTH; i++) occ_w += CNT_W'(valid_w[i]);
  end
  assign full = (occ_w >= CNT_W'(DEPTH - FULL_MARGIN));

  // ---------------- read domain ----------------
  mcd_sync #(.WIDTH(DEPTH)) u_sync_r (.clk(clk_r), .rst_n(rst_r_n), .d_async(valid), .q(valid_r));

  assign empty   = ~|(rptr & valid_r);
  assign do_read = read && !empty;

  ring_counter #(.N(DEPTH)) u_rptr (.clk(clk_r), .rst_n(rst_r_n), .adv(do_read), .ptr(rptr));

  always_ff @(posedge clk_r or negedge rst_r_n) begin
    if (!rst_r_n)     rtog <= '0;
    else if (do_read) rtog <= rtog ^ rptr;
  end

  always_comb begin
    data_r = '0;
    for (int i = 0; i < DEPTH; i++)
      if (rptr[i]) data_r |= mem[i];
  end

  // ---------------- protocol checks ----------------
  initial begin
    assert (DEPTH >= 2 && DEPTH > FULL_MARGIN)
      else $error("mcd_fifo: DEPTH must be at least 2 and exceed FULL_MARGIN");
  end

  a_no_overflow: assert property (@(posedge clk_w) disable iff (!rst_w_n) write |-> wr_room)
    else $error("mcd_fifo: write into a physically full queue was dropped");

endmodule
