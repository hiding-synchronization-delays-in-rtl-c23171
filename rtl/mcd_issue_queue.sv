// mcd_issue_queue: issue queue whose producer and scheduler run on different
// clocks.
//
// How it works.  Entries are not consumed in order, so the synchronization
// cost cannot be hidden behind an occupied FIFO: every entry's own Valid flag
// crosses the boundary.  Each entry has a Valid flag built, as in mcd_fifo,
// from a write-side toggle and a read-side toggle, synchronized into both
// domains on their falling edges.
//   * Write side: the WR_PORTS write ports take the lowest-numbered entries
//     that the write side sees as free, port p the p-th free one.
//     wr_ready[p] says that port p has an entry this cycle.
//   * Read side: vis[] marks entries whose Valid flag has reached the
//     scheduler; entry_data[] shows their contents so that wakeup logic
//     outside can compute ready[].  The select picks up to RD_PORTS entries
//     that are visible and ready, lowest index first, and an entry is removed
//     on a rising edge where its port's rd_take is high.  So at most the
//     number of valid-and-ready entries is ever issued.
// The freed entry returns to the write side at its next falling edge.
//
// Timing.  An entry written on a rising write edge becomes visible at the
// next falling read edge (one later inside the synchronizer window) and can
// be issued on the rising read edge after that, whatever the queue holds.
//
// Follows the source architecture: per-entry synchronized Valid flags and
// out-of-order removal.  This design's choices: free-slot allocation and the
// lowest-index select (the source gives no select policy), and the port
// counts.
module mcd_issue_queue #(
  parameter int unsigned WIDTH    = 32,
  parameter int unsigned DEPTH    = mcd_pkg::IIQ_ENTRIES,
  parameter int unsigned WR_PORTS = mcd_pkg::DISPATCH_W,
  parameter int unsigned RD_PORTS = 4,
  localparam int unsigned IDX_W   = $clog2(DEPTH)
) (
  // write (producer) domain
  input  logic             clk_w,
  input  logic             rst_w_n,
  input  logic [WR_PORTS-1:0]            wr_en,
  input  logic [WR_PORTS-1:0][WIDTH-1:0] wr_data,
  output logic [WR_PORTS-1:0]            wr_ready,
  // read (scheduler) domain
  input  logic             clk_r,
  input  logic             rst_r_n,
  output logic [DEPTH-1:0]               vis,
  output logic [DEPTH-1:0][WIDTH-1:0]    entry_data,
  input  logic [DEPTH-1:0]               ready,
  output logic [RD_PORTS-1:0]            rd_valid,
  output logic [RD_PORTS-1:0][WIDTH-1:0] rd_data,
  output logic [RD_PORTS-1:0][IDX_W-1:0] rd_idx,
  input  logic [RD_PORTS-1:0]            rd_take
);

  logic [DEPTH-1:0] wtog, rtog, valid, valid_w, valid_r;
  logic [DEPTH-1:0][WIDTH-1:0] mem;
  logic [DEPTH-1:0] wset, rclr;   // entries toggled this cycle on each side

  assign valid = wtog ^ rtog;

  // ---------------- write domain ----------------
  mcd_sync #(.WIDTH(DEPTH)) u_sync_w (.clk(clk_w), .rst_n(rst_w_n), .d_async(valid), .q(valid_w));

  logic [WR_PORTS-1:0][IDX_W-1:0] wslot;

  always_comb begin
    logic [DEPTH-1:0] free;
    free     = ~valid_w;
    wr_ready = '0;
    wslot    = '0;
    wset     = '0;
    for (int p = 0; p < WR_PORTS; p++) begin
      for (int i = 0; i < DEPTH; i++) begin
        if (free[i] && !wr_ready[p]) begin
          wr_ready[p] = 1'b1;
          wslot[p]    = IDX_W'(i);
        end
      end
      if (wr_ready[p]) begin
        free[wslot[p]] = 1'b0;
        if (wr_en[p]) wset[wslot[p]] = 1'b1;
      end
    end
  end

  always_ff @(posedge clk_w or negedge rst_w_n) begin
    if (!rst_w_n) wtog <= '0;
    else          wtog <= wtog ^ wset;
  end

  always_ff @(posedge clk_w) begin
    for (int p = 0; p < WR_PORTS; p++)
      if (wr_en[p] && wr_ready[p]) mem[wslot[p]] <= wr_data[p];
  end

  // ---------------- read domain ----------------
  mcd_sync #(.WIDTH(DEPTH)) u_sync_r (.clk(clk_r), .rst_n(rst_r_n), .d_async(valid), .q(valid_r));

  assign vis        = valid_r;
  assign entry_data = mem;

  always_comb begin
    logic [DEPTH-1:0] cand;
    cand     = vis & ready;
    rd_valid = '0;
    rd_idx   = '0;
    rd_data  = '0;
    rclr     = '0;
    for (int p = 0; p < RD_PORTS; p++) begin
      for (int i = 0; i < DEPTH; i++) begin
        if (cand[i] && !rd_valid[p]) begin
          rd_valid[p] = 1'b1;
          rd_idx[p]   = IDX_W'(i);
        end
      end
      if (rd_valid[p]) begin
        cand[rd_idx[p]] = 1'b0;
        rd_data[p]      = mem[rd_idx[p]];
        if (rd_take[p]) rclr[rd_idx[p]] = 1'b1;
      end
    end
  end

  always_ff @(posedge clk_r or negedge rst_r_n) begin
    if (!rst_r_n) rtog <= '0;
    else          rtog <= rtog ^ rclr;
  end

  // ---------------- protocol checks ----------------
  a_write_ready: assert property (@(posedge clk_w) disable iff (!rst_w_n) (wr_en & ~wr_ready) == '0)
    else $error("mcd_issue_queue: write on a port with no free entry was dropped");
  a_take_valid: assert property (@(posedge clk_r) disable iff (!rst_r_n) (rd_take & ~rd_valid) == '0)
    else $error("mcd_issue_queue: rd_take on a port with nothing selected");

endmodule
