// Shared constants and types of the MoM-PDA two-dimensional data memory.
//
// The data memory is addressed by a 2-D coordinate (x, y). Rows (y) alternate
// between NMOD parallel memory modules; the rows held by one module are spread
// over the NBANKS banks of its Multibank DRAM; bursts run along x and are at
// most MAXBURST words long. Two modules, 32 banks, 32-word bursts, 32-bit
// words and two address streams per module are the figures of the design; the
// coordinate widths XW/YW, the scan-pattern format and the command encoding
// are choices of this implementation.
package mompda_pkg;

  // Memory organisation
  localparam int unsigned NMOD     = 2;   // parallel memory modules
  localparam int unsigned NBANKS   = 32;  // MDRAM banks per module
  localparam int unsigned MAXBURST = 32;  // longest MDRAM burst, in words
  localparam int unsigned DW       = 32;  // data word width

  // Coordinate widths of the 2-D data memory (1024 x 1024 words)
  localparam int unsigned XW = 10;
  localparam int unsigned YW = 10;

  localparam int unsigned BANKW = $clog2(NBANKS);
  localparam int unsigned COLW  = $clog2(MAXBURST);
  localparam int unsigned SEGW  = XW - COLW;            // 32-word segment index along x
  localparam int unsigned ROWW  = YW - $clog2(NMOD);    // row index within a module
  localparam int unsigned PAGEW = SEGW + ROWW - BANKW;  // page (MDRAM row) within a bank
  localparam int unsigned BLW   = COLW + 1;             // burst length field, 1..32
  localparam int unsigned LENW  = XW + 1;               // request length, 1..2**XW

  // Address streams: two per module, stream s belongs to module s / SPM
  localparam int unsigned SPM      = 2;
  localparam int unsigned NSTREAMS = NMOD * SPM;

  // Scan pattern: nested loop levels handled by one address stream
  localparam int unsigned LEVELS = 3;
  localparam int unsigned CNTW   = XW + 1;              // loop count, 1..2**XW
  localparam int unsigned NSEQ   = 4;                   // scan patterns per stream (concatenated or nested)

  typedef logic [XW-1:0] xcoord_t;
  typedef logic [YW-1:0] ycoord_t;
  typedef logic [DW-1:0] word_t;

  // MDRAM command bus
  typedef enum logic [2:0] {
    MD_NOP = 3'd0,
    MD_ACT = 3'd1,   // activate a page in a bank
    MD_RD  = 3'd2,   // burst read
    MD_WR  = 3'd3,   // burst write
    MD_PRE = 3'd4,   // precharge (close) a bank
    MD_REF = 3'd5    // refresh
  } mdram_op_e;

  typedef struct packed {
    mdram_op_e         op;
    logic [BANKW-1:0]  bank;
    logic [PAGEW-1:0]  page;
    logic [COLW-1:0]   col;
    logic [BLW-1:0]    blen;
  } mdram_cmd_t;

  // One access request of an address stream: len consecutive words along +x
  typedef struct packed {
    logic            we;
    xcoord_t         x;
    ycoord_t         y;
    logic [LENW-1:0] len;
  } burst_req_t;

  // Scan pattern of one address stream. Level 0 is the innermost loop.
  typedef struct packed {
    logic                                en;
    logic                                we;
    logic                                nest; // runs inside the previous pattern
    xcoord_t                             hx;   // handle
    ycoord_t                             hy;
    logic [LEVELS-1:0][XW:0]             dx;   // scan step, two's complement
    logic [LEVELS-1:0][YW:0]             dy;
    logic [LEVELS-1:0][CNTW-1:0]         n;    // loop counts, each >= 1
  } scan_cfg_t;

endpackage
