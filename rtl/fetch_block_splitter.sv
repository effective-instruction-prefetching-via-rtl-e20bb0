// fetch_block_splitter: divides each predicted fetch block into fetch cache
// lines before they enter the cache line target queue (CLTQ).
//
// A fetch block is a start address and a length in instructions, as a
// branch predictor produces it (the run of instructions up to a predicted
// taken branch). The block is cut at every 64-byte line boundary and one
// fetch cache line (line address, first slot, instruction count, last-line
// flag) is produced per cycle. Splitting blocks into cache-line entries is
// the CLTQ organisation of the prestaging scheme; the one-line-per-cycle
// rate, the valid/ready handshakes and the block length limit of 63
// instructions are this design's own choices.
//
// Interface: fb_* takes a block (valid/ready), out_* gives fetch cache lines
// (valid/ready). A block is accepted only when the splitter is idle, so a
// block of n lines leaves over n cycles, starting the cycle after it is
// accepted. flush (branch misprediction) drops the block being split.
//
// Instructions are 4-byte aligned, so fb_addr[1:0] is not used.
module fetch_block_splitter
  import clgp_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  flush,
  input  logic                  fb_valid,
  output logic                  fb_ready,
  input  logic [ADDR_W-1:0]     fb_addr,   // start byte address (4-byte aligned)
  input  logic [FB_LEN_W-1:0]   fb_len,    // instructions in the block, 1..63
  output logic                  out_valid,
  input  logic                  out_ready,
  output fcl_t                  out_fcl
);

  localparam int unsigned IA_W = ADDR_W - 2;   // instruction index width

  logic                 busy_q;
  logic [IA_W-1:0]      ia_q;       // next instruction to emit
  logic [FB_LEN_W-1:0]  rem_q;      // instructions left in the block

  logic [SLOT_W-1:0]    slot;
  logic [SLOT_W:0]      room;       // instructions left in the current line
  logic [SLOT_W:0]      take;

  always_comb begin
    slot = ia_q[SLOT_W-1:0];
    room = (SLOT_W+1)'(LINE_INSTRS) - {1'b0, slot};
    take = (rem_q >= FB_LEN_W'(room)) ? room : (SLOT_W+1)'(rem_q);
    out_valid     = busy_q;
    out_fcl.laddr = laddr_t'(ia_q >> SLOT_W);
    out_fcl.first = slot;
    out_fcl.count = take;
    out_fcl.last  = (FB_LEN_W'(take) == rem_q);
    fb_ready      = !busy_q && !flush;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q <= 1'b0;
      ia_q   <= '0;
      rem_q  <= '0;
    end else if (flush) begin
      busy_q <= 1'b0;
    end else if (fb_valid && fb_ready) begin
      busy_q <= (fb_len != '0);
      ia_q   <= fb_addr[ADDR_W-1:2];
      rem_q  <= fb_len;
    end else if (out_valid && out_ready) begin
      ia_q   <= ia_q + IA_W'(take);
      rem_q  <= rem_q - FB_LEN_W'(take);
      busy_q <= !out_fcl.last;
    end
  end

endmodule
