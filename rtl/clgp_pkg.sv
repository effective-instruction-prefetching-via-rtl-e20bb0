// clgp_pkg: types and constants shared by the Cache Line Guided Prestaging
// (CLGP) instruction front-end.
//
// The front-end works on 64-byte cache lines (Alpha instructions are 4
// bytes, so 16 instructions per line). Addresses are byte addresses of
// ADDR_W bits; a line address drops the 6 offset bits. The 64-byte line and
// the 4-byte instruction follow the evaluated machine; the 32-bit address
// width is this design's own choice. FB_LEN_W is used by the splitter and
// the top; a lint run of the package on its own reports it as unused.
package clgp_pkg;

  localparam int unsigned ADDR_W       = 32;
  localparam int unsigned LINE_BYTES   = 64;
  localparam int unsigned INSTR_BYTES  = 4;
  localparam int unsigned OFF_W        = $clog2(LINE_BYTES);               // 6
  localparam int unsigned LADDR_W      = ADDR_W - OFF_W;                   // 26
  localparam int unsigned LINE_W       = LINE_BYTES * 8;                   // 512
  localparam int unsigned LINE_INSTRS  = LINE_BYTES / INSTR_BYTES;         // 16
  localparam int unsigned SLOT_W       = $clog2(LINE_INSTRS);              // 4
  localparam int unsigned FB_LEN_W     = 6;   // fetch block length, 1..63 instructions

  typedef logic [LADDR_W-1:0] laddr_t;
  typedef logic [LINE_W-1:0]  line_t;

  // One fetch cache line: the part of a predicted fetch block that lies in
  // one cache line.
  typedef struct packed {
    laddr_t          laddr;     // line address
    logic [SLOT_W-1:0] first;   // first instruction slot used in the line
    logic [SLOT_W:0]   count;   // number of instructions used (1..16)
    logic            last;      // last line of its fetch block
  } fcl_t;

  // Where a fetched line came from (fetch source distribution).
  typedef enum logic [1:0] {
    SRC_PB = 2'd0,   // prestage buffer
    SRC_L0 = 2'd1,   // L0 emergency cache
    SRC_L1 = 2'd2,   // L1 I-cache hit
    SRC_L2 = 2'd3    // L1 miss, served from the L2 bus
  } fetch_src_e;

  // Requesters of the L2 bus, highest priority first.
  typedef enum logic [1:0] {
    L2R_DCACHE   = 2'd0,
    L2R_ICACHE   = 2'd1,
    L2R_PREFETCH = 2'd2,
    L2R_NONE     = 2'd3
  } l2_req_e;

endpackage
