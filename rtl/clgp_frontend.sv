// clgp_frontend: instruction front-end with Cache Line Guided Prestaging
// (CLGP) and an L0 emergency cache.
//
// Idea: when the L1 I-cache needs several cycles per access, fetch from a
// small, fast, fully associative prestage buffer instead, and keep each
// prestaged line there exactly as long as queued fetches still need it.
//
//   fetch blocks -> fetch_block_splitter -> cltq -> fetch_unit -> fetched lines
//                                            |          |  |  \
//                                       clgp_engine     |  l0_cache
//                                            |          |   (emergency cache)
//                                     prestage_buffer <-+
//                                            ^ fill     |
//                   prefetch requests -> l1_icache <----+ demand requests
//                                            |
//                                      l2_bus_arbiter <- data cache requests
//                                            |
//                                          L2 bus
//
// The branch predictor's fetch blocks are split into cache-line entries of
// the CLTQ. The CLGP engine walks the CLTQ in order; for each entry it either
// increments the consumers counter of the prestage buffer entry that already
// holds (or is fetching) the line, or allocates the LRU entry whose counter
// is zero and prefetches the line from the L1 I-cache. The fetch unit takes
// the CLTQ head from the prestage buffer (decrementing the counter), the L0
// cache, or the L1; L1 answers fill the L0. On a branch misprediction
// (flush) the CLTQ is emptied and all consumers counters are cleared, while
// the buffered lines stay usable until replaced. The L1 shares the L2 bus
// with the data cache: data cache first, then I-cache misses, then prefetch
// misses.
//
// Default sizes are the 45 nm configuration: 16-entry prestage buffer read
// in 3 pipelined cycles, 256-byte (4-line) L0, 4 KB 2-way L1 with a 4-cycle
// hit, 64-byte lines, a decoupling queue of up to 8 fetch blocks. The CLTQ
// entry count (32) is this design's own choice.
//
// Ports: fb_* take fetch blocks (valid/ready); flush is the misprediction
// signal; out_* give fetched lines; dc_l2_* is the data cache's request to
// the L2 bus; l2_req_* is the arbitrated L2 bus request and l2_resp_* the
// line returned for the single outstanding I-side request. Statistics count
// fetch sources and prestaging decisions.
//
// Lint notes: the prestage buffer's free_idx and f_cnt outputs are for
// observation only and are left unconnected here; dc_l2_grant equals
// dc_l2_valid because the data cache always has the highest bus priority;
// assertions in the submodules use rst_n in 'disable iff', which a linter
// reports as a synchronous use of the asynchronous reset.
module clgp_frontend
  import clgp_pkg::*;
#(
  parameter int unsigned CLTQ_DEPTH  = 32,
  parameter int unsigned CLTQ_BLOCKS = 8,
  parameter int unsigned PB_ENTRIES  = 16,
  parameter int unsigned PB_LAT      = 3,
  parameter int unsigned L0_ENTRIES  = 4,
  parameter int unsigned L1_SIZE     = 4096,
  parameter int unsigned L1_WAYS     = 2,
  parameter int unsigned L1_LAT      = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 flush,
  // fetch blocks from the branch predictor
  input  logic                 fb_valid,
  output logic                 fb_ready,
  input  logic [ADDR_W-1:0]    fb_addr,
  input  logic [FB_LEN_W-1:0]  fb_len,
  // fetched lines to the back end
  output logic                 out_valid,
  output fcl_t                 out_fcl,
  output line_t                out_data,
  output fetch_src_e           out_src,
  // data cache request to the L2 bus
  input  logic                 dc_l2_valid,
  input  laddr_t               dc_l2_laddr,
  output logic                 dc_l2_grant,
  // L2 bus
  output logic                 l2_req_valid,
  output laddr_t               l2_req_laddr,
  output l2_req_e              l2_req_src,
  input  logic                 l2_resp_valid,
  input  line_t                l2_resp_data,
  // statistics
  output logic [31:0]          n_src [4],
  output logic [31:0]          n_pb_wait,
  output logic [31:0]          n_extend,
  output logic [31:0]          n_prefetch,
  output logic [31:0]          n_full_stall,
  output logic [31:0]          n_pf_from_l2,
  output logic [$clog2(CLTQ_DEPTH+1)-1:0]  cltq_count,
  output logic [$clog2(CLTQ_BLOCKS+1)-1:0] cltq_blocks
);

  localparam int unsigned CNT_W = $clog2(CLTQ_DEPTH + 1);

  // splitter -> CLTQ
  logic sp_valid, sp_ready;
  fcl_t sp_fcl;
  // CLTQ
  logic head_valid, head_pf, pop, cand_valid, mark;
  fcl_t head_fcl, cand_fcl;
  // prestage buffer
  laddr_t e_laddr, f_laddr;
  logic   e_hit, free_avail, e_inc, e_alloc;
  logic [$clog2(PB_ENTRIES)-1:0] free_idx;
  logic   f_match, f_hit, f_read, f_dec, rd_valid;
  logic [CNT_W-1:0] f_cnt;
  line_t  rd_data;
  // prefetch / L1
  logic   pf_valid, pf_ready;
  laddr_t pf_laddr;
  logic   p_resp_valid, p_resp_from_l2;
  laddr_t p_resp_laddr;
  line_t  p_resp_data;
  logic   d_valid, d_ready, d_resp_valid, d_resp_from_l2;
  laddr_t d_laddr;
  line_t  d_resp_data;
  // L0
  laddr_t l0_laddr, l0_fill_laddr;
  logic   l0_hit, l0_use, l0_fill_valid;
  line_t  l0_data, l0_fill_data;
  // L2 bus
  logic   l2_ireq_valid, l2_preq_valid, ic_grant, pf_grant;
  laddr_t l1_l2_laddr;

  fetch_block_splitter u_split (
    .clk, .rst_n, .flush,
    .fb_valid, .fb_ready, .fb_addr, .fb_len,
    .out_valid(sp_valid), .out_ready(sp_ready), .out_fcl(sp_fcl)
  );

  cltq #(.DEPTH(CLTQ_DEPTH), .MAX_BLOCKS(CLTQ_BLOCKS)) u_cltq (
    .clk, .rst_n, .flush,
    .push_valid(sp_valid), .push_ready(sp_ready), .push_fcl(sp_fcl),
    .head_valid, .head_fcl, .head_pf, .pop,
    .cand_valid, .cand_fcl, .mark,
    .count(cltq_count), .blocks(cltq_blocks)
  );

  clgp_engine u_engine (
    .clk, .rst_n, .flush,
    .cand_valid, .cand_fcl, .mark,
    .pb_laddr(e_laddr), .pb_hit(e_hit), .pb_free_avail(free_avail),
    .pb_inc(e_inc), .pb_alloc(e_alloc),
    .pf_valid, .pf_ready, .pf_laddr,
    .n_extend, .n_prefetch, .n_full_stall
  );

  prestage_buffer #(.ENTRIES(PB_ENTRIES), .CNT_W(CNT_W), .RD_LAT(PB_LAT)) u_pb (
    .clk, .rst_n, .flush,
    .e_laddr, .e_hit, .free_avail, .free_idx, .e_inc, .e_alloc,
    .fill_valid(p_resp_valid), .fill_laddr(p_resp_laddr), .fill_data(p_resp_data),
    .f_laddr, .f_match, .f_hit, .f_cnt, .f_read, .f_dec,
    .rd_valid, .rd_data
  );

  l0_cache #(.ENTRIES(L0_ENTRIES)) u_l0 (
    .clk, .rst_n,
    .lk_laddr(l0_laddr), .lk_hit(l0_hit), .lk_data(l0_data), .lk_use(l0_use),
    .fill_valid(l0_fill_valid), .fill_laddr(l0_fill_laddr), .fill_data(l0_fill_data)
  );

  fetch_unit #(.RD_LAT(PB_LAT)) u_fetch (
    .clk, .rst_n, .flush,
    .head_valid, .head_fcl, .head_pf, .pop,
    .pb_laddr(f_laddr), .pb_match(f_match), .pb_hit(f_hit),
    .pb_read(f_read), .pb_dec(f_dec), .pb_rd_valid(rd_valid), .pb_rd_data(rd_data),
    .l0_laddr, .l0_hit, .l0_data, .l0_use,
    .l0_fill_valid, .l0_fill_laddr, .l0_fill_data,
    .l1_valid(d_valid), .l1_ready(d_ready), .l1_laddr(d_laddr),
    .l1_resp_valid(d_resp_valid), .l1_resp_data(d_resp_data),
    .l1_resp_from_l2(d_resp_from_l2),
    .out_valid, .out_fcl, .out_data, .out_src,
    .n_src, .n_pb_wait
  );

  l1_icache #(.SIZE_BYTES(L1_SIZE), .WAYS(L1_WAYS), .HIT_LAT(L1_LAT)) u_l1 (
    .clk, .rst_n,
    .d_valid, .d_ready, .d_laddr,
    .d_resp_valid, .d_resp_data, .d_resp_from_l2,
    .p_valid(pf_valid), .p_ready(pf_ready), .p_laddr(pf_laddr),
    .p_resp_valid, .p_resp_laddr, .p_resp_data, .p_resp_from_l2,
    .l2_ireq_valid, .l2_preq_valid, .l2_req_laddr(l1_l2_laddr),
    .l2_grant(ic_grant || pf_grant),
    .l2_resp_valid, .l2_resp_data
  );

  l2_bus_arbiter u_arb (
    .dc_valid(dc_l2_valid), .dc_laddr(dc_l2_laddr), .dc_grant(dc_l2_grant),
    .ic_valid(l2_ireq_valid), .ic_laddr(l1_l2_laddr), .ic_grant,
    .pf_valid(l2_preq_valid), .pf_laddr(l1_l2_laddr), .pf_grant,
    .bus_valid(l2_req_valid), .bus_laddr(l2_req_laddr), .bus_src(l2_req_src)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) n_pf_from_l2 <= '0;
    else if (p_resp_valid && p_resp_from_l2) n_pf_from_l2 <= n_pf_from_l2 + 1;
  end

endmodule
