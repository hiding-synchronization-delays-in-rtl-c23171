// mcd_pkg: types and constants shared by the interface fabric of a
// Multiple Clock Domain (MCD) processor.
//
// The processor is split into four independently clocked domains (front end,
// integer, floating point, load/store) plus an externally clocked main memory.
// Every value that crosses a domain boundary travels through one of the
// channel payload types below.  Queue sizes follow the Alpha 21264-like
// configuration (20-entry integer issue queue, 15-entry FP issue queue,
// 64-entry load/store queue, 80-entry reorder buffer, 72+72 physical
// registers).  The early-Full margin of the FIFOs is the ratio of the highest
// to the lowest domain frequency plus one (1000 MHz / 250 MHz + 1 = 5).
// Field widths (64-bit words and addresses, 32-bit instructions, 8-word cache
// lines) are this design's choice where the source configuration is silent.
package mcd_pkg;

  // Domain frequency range (MHz) and the FIFO early-Full margin derived from it.
  localparam int unsigned F_MAX_MHZ   = 1000;
  localparam int unsigned F_MIN_MHZ   = 250;
  localparam int unsigned FULL_MARGIN = F_MAX_MHZ / F_MIN_MHZ + 1;

  // Datapath widths.
  localparam int unsigned WORD_W     = 64;
  localparam int unsigned ADDR_W     = 64;
  localparam int unsigned INSN_W     = 32;
  localparam int unsigned LINE_WORDS = 8;
  localparam int unsigned LINE_W     = WORD_W * LINE_WORDS;

  // Structure sizes of the Alpha 21264-like configuration.
  localparam int unsigned IIQ_ENTRIES = 20;
  localparam int unsigned FIQ_ENTRIES = 15;
  localparam int unsigned LSQ_ENTRIES = 64;
  localparam int unsigned ROB_ENTRIES = 80;
  localparam int unsigned PREGS       = 72;
  localparam int unsigned DISPATCH_W  = 4;   // decode width

  localparam int unsigned ROB_TAG_W = $clog2(ROB_ENTRIES);
  localparam int unsigned PREG_W    = $clog2(PREGS);
  localparam int unsigned LSQ_IDX_W = $clog2(LSQ_ENTRIES);

  // Clock domains of Figure-1 style partitioning (memory is not controllable).
  typedef enum logic [1:0] {DOM_FE = 2'd0, DOM_INT = 2'd1, DOM_FP = 2'd2, DOM_LS = 2'd3} domain_e;
  localparam int unsigned NUM_DOMAINS = 4;

  typedef logic [LINE_W-1:0] line_t;

  // Channel 2, load/store -> memory: line fill request or write-back.
  typedef struct packed {
    logic              is_write;
    logic [ADDR_W-1:0] addr;
    line_t             data;
  } mem_req_t;

  // Channel 3: committed branch outcome.
  typedef struct packed {
    logic              mispredict;
    logic              taken;
    logic [ADDR_W-1:0] pc;
    logic [ADDR_W-1:0] target;
  } branch_outcome_t;

  // Channels 4, 5, 7, 8: a value destined for a physical register.
  typedef struct packed {
    logic [PREG_W-1:0] preg;
    logic [WORD_W-1:0] value;
  } reg_value_t;

  // Channel 6: effective address for a load/store queue entry.
  typedef struct packed {
    logic [LSQ_IDX_W-1:0] lsq_idx;
    logic [ADDR_W-1:0]    addr;
  } eff_addr_t;

  // Channels 9, 10, 11: a dispatched (renamed) instruction.
  typedef struct packed {
    logic [INSN_W-1:0]    insn;
    logic [ROB_TAG_W-1:0] rob_tag;
    logic [PREG_W-1:0]    dst;
    logic [PREG_W-1:0]    src1;
    logic [PREG_W-1:0]    src2;
  } uop_t;

  // Channels 12, 13, 14: instruction completion reported to the ROB.
  typedef struct packed {
    logic [ROB_TAG_W-1:0] rob_tag;
    logic                 exception;
  } completion_t;

endpackage
