// cltq: cache line target queue.
//
// The queue that decouples branch prediction from instruction fetch. Each
// entry holds one fetch cache line plus a 'prefetched' bit (the prestaging
// engine has already handled this entry) and an 'occupied' bit (the entry
// holds a line that has not been fetched yet), as in the prestaging scheme.
// The queue is bounded both by DEPTH entries and by MAX_BLOCKS fetch blocks
// (the decoupling queue of the evaluated machine holds up to 8 fetch blocks;
// the entry count is this design's own choice).
//
// Three ports work in the same cycle:
//   push : the splitter enters a fetch cache line at the tail (valid/ready).
//   head : the fetch unit sees the oldest entry and pops it with 'pop'.
//   cand : the prestaging engine sees the oldest entry whose prefetched bit is
//          clear and sets the bit with 'mark'. Entries are prestaged in queue
//          order, so the candidate is head + (number of prefetched entries).
//          The candidate is withheld in a cycle where the same entry is
//          popped, so an entry is never marked and popped together: the
//          fetch unit has priority over the prestaging engine for the head.
// flush (branch misprediction) empties the queue in one cycle.
//
// Lint note: the assertions use rst_n in 'disable iff', which a linter
// reports as a synchronous use of the asynchronous reset; the assertions are
// not part of the circuit.
module cltq
  import clgp_pkg::*;
#(
  parameter int unsigned DEPTH      = 32,
  parameter int unsigned MAX_BLOCKS = 8
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  flush,
  // push
  input  logic  push_valid,
  output logic  push_ready,
  input  fcl_t  push_fcl,
  // head (fetch unit)
  output logic  head_valid,
  output fcl_t  head_fcl,
  output logic  head_pf,
  input  logic  pop,
  // candidate (prestaging engine)
  output logic  cand_valid,
  output fcl_t  cand_fcl,
  input  logic  mark,
  // status
  output logic [$clog2(DEPTH+1)-1:0]      count,
  output logic [$clog2(MAX_BLOCKS+1)-1:0] blocks
);

  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH+1);
  localparam int unsigned BW = $clog2(MAX_BLOCKS+1);

  fcl_t           fcl_q [DEPTH];
  logic [DEPTH-1:0] occ_q, pf_q;
  logic [PW-1:0]  head_q, tail_q;
  logic [CW-1:0]  n_occ_q, n_pf_q;
  logic [BW-1:0]  n_blk_q;
  logic           mid_block_q;      // last pushed line was not the end of its block

  logic [PW-1:0]  cand_idx;
  logic           do_push, do_pop, do_mark, starts_block;

  function automatic logic [PW-1:0] wrap_add(logic [PW-1:0] a, logic [CW-1:0] b);
    logic [CW:0] s;
    s = (CW+1)'(a) + (CW+1)'(b);
    if (s >= (CW+1)'(DEPTH)) s = s - (CW+1)'(DEPTH);
    return PW'(s);
  endfunction

  always_comb begin
    starts_block = !mid_block_q;
    push_ready   = !flush && (n_occ_q < CW'(DEPTH)) &&
                   (!starts_block || n_blk_q < BW'(MAX_BLOCKS));
    do_push      = push_valid && push_ready;

    head_valid   = occ_q[head_q];
    head_fcl     = fcl_q[head_q];
    head_pf      = pf_q[head_q];
    do_pop       = pop && head_valid && !flush;

    cand_idx     = wrap_add(head_q, n_pf_q);
    cand_fcl     = fcl_q[cand_idx];
    cand_valid   = !flush && (n_pf_q < n_occ_q) && !(do_pop && n_pf_q == '0);
    do_mark      = mark && cand_valid;

    count        = n_occ_q;
    blocks       = n_blk_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      occ_q       <= '0;
      pf_q        <= '0;
      head_q      <= '0;
      tail_q      <= '0;
      n_occ_q     <= '0;
      n_pf_q      <= '0;
      n_blk_q     <= '0;
      mid_block_q <= 1'b0;
    end else if (flush) begin
      occ_q       <= '0;
      pf_q        <= '0;
      head_q      <= '0;
      tail_q      <= '0;
      n_occ_q     <= '0;
      n_pf_q      <= '0;
      n_blk_q     <= '0;
      mid_block_q <= 1'b0;
    end else begin
      if (do_push) begin
        fcl_q[tail_q] <= push_fcl;
        occ_q[tail_q] <= 1'b1;
        pf_q[tail_q]  <= 1'b0;
        tail_q        <= wrap_add(tail_q, CW'(1));
        mid_block_q   <= !push_fcl.last;
      end
      if (do_mark) pf_q[cand_idx] <= 1'b1;
      if (do_pop) begin
        occ_q[head_q] <= 1'b0;
        head_q        <= wrap_add(head_q, CW'(1));
      end
      n_occ_q <= n_occ_q + CW'(do_push) - CW'(do_pop);
      // Prefetched entries form a run at the head. Popping the head removes
      // one from the run only if the head was prefetched.
      n_pf_q  <= n_pf_q + CW'(do_mark) - CW'(do_pop && n_pf_q != '0);
      n_blk_q <= n_blk_q + BW'(do_push && starts_block) - BW'(do_pop && head_fcl.last);
    end
  end

  // The candidate pointer stays inside the occupied region.
  a_pf_le_occ: assert property (@(posedge clk) disable iff (!rst_n) n_pf_q <= n_occ_q);
  a_no_mark_pop: assert property (@(posedge clk) disable iff (!rst_n)
                                 !(do_pop && do_mark && n_pf_q == '0));
  a_blocks:    assert property (@(posedge clk) disable iff (!rst_n) n_blk_q <= BW'(MAX_BLOCKS));

endmodule
