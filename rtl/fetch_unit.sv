// fetch_unit: instruction fetch stage of the prestaging front-end.
//
// The fetch unit consumes the CLTQ head in order. The prestage buffer, the
// L0 cache and the L1 I-cache are searched for the head's line, and the
// first of them that has it supplies it:
//   * prestage buffer, line arrived: the read is started in the pipelined
//     prestage buffer (RD_LAT cycles, one new read per cycle), the entry
//     leaves the CLTQ and, if the CLGP engine had counted it as a consumer
//     (prefetched bit set), the line's consumers counter is decremented.
//     The line stays in the buffer; it is not copied to any cache;
//   * prestage buffer, line still being prefetched: the head waits for it;
//   * L0 hit: the line is delivered one cycle later;
//   * otherwise a demand request goes to the L1 I-cache (HIT_LAT cycles, or
//     the L2 latency on a miss) and the line is then written into the L0, the
//     emergency cache.
// Lines are delivered in CLTQ order: an L0 or L1 access starts only when no
// prestage buffer read is in flight. Searching all three structures and the
// non-transfer of prestaged lines follow the prestaging scheme; waiting for
// an in-flight prefetch, the ordering rule and the single outstanding L1
// access are this design's own choices.
//
// Interface: head_*/pop to the CLTQ, pb_* to the prestage buffer fetch port,
// l0_* to the L0 cache, l1_* to the L1 demand port. out_valid/out_fcl/
// out_data/out_src deliver one fetched line (up to 16 instructions) per
// cycle at most; there is no back-pressure from the back end. flush (branch
// misprediction) drops everything in flight; an outstanding L1 access still
// completes and fills the L0, but is not delivered. Counters give the fetch
// source distribution.
//
// Lint note: the assertions use rst_n in 'disable iff', which a linter
// reports as a synchronous use of the asynchronous reset; the assertions are
// not part of the circuit.
// Several outputs are plain copies of inputs (the three lookup addresses are
// the head's line address, the L0 fill data is the L1 answer); they are
// kept as separate ports so each structure has its own connection.
module fetch_unit
  import clgp_pkg::*;
#(
  parameter int unsigned RD_LAT = 3
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        flush,
  // CLTQ head
  input  logic        head_valid,
  input  fcl_t        head_fcl,
  input  logic        head_pf,
  output logic        pop,
  // prestage buffer
  output laddr_t      pb_laddr,
  input  logic        pb_match,
  input  logic        pb_hit,
  output logic        pb_read,
  output logic        pb_dec,
  input  logic        pb_rd_valid,
  input  line_t       pb_rd_data,
  // L0 cache
  output laddr_t      l0_laddr,
  input  logic        l0_hit,
  input  line_t       l0_data,
  output logic        l0_use,
  output logic        l0_fill_valid,
  output laddr_t      l0_fill_laddr,
  output line_t       l0_fill_data,
  // L1 demand port
  output logic        l1_valid,
  input  logic        l1_ready,
  output laddr_t      l1_laddr,
  input  logic        l1_resp_valid,
  input  line_t       l1_resp_data,
  input  logic        l1_resp_from_l2,
  // fetched lines
  output logic        out_valid,
  output fcl_t        out_fcl,
  output line_t       out_data,
  output fetch_src_e  out_src,
  // statistics
  output logic [31:0] n_src [4],      // lines per fetch_src_e
  output logic [31:0] n_pb_wait       // cycles the head waited for a prefetch
);

  typedef enum logic {F_ISSUE, F_L1WAIT} fstate_e;

  fstate_e           st_q;
  fcl_t              l1_fcl_q;
  logic              l1_drop_q;       // flushed while waiting for L1
  logic [RD_LAT-1:0] pv_q;            // prestage buffer reads in flight
  fcl_t              pf_q [RD_LAT];
  logic              l0_out_q;
  fcl_t              l0_fcl_q;
  line_t             l0_data_q;

  logic issue, take_pb, take_l0, take_l1, pipe_empty;

  always_comb begin
    issue      = (st_q == F_ISSUE) && head_valid && !flush;
    pipe_empty = (pv_q == '0);
    pb_laddr   = head_fcl.laddr;
    l0_laddr   = head_fcl.laddr;
    l1_laddr   = head_fcl.laddr;

    take_pb  = issue && pb_hit;
    take_l0  = issue && !pb_match && pipe_empty && l0_hit;
    l1_valid = issue && !pb_match && pipe_empty && !l0_hit;
    take_l1  = l1_valid && l1_ready;

    pop     = take_pb || take_l0 || take_l1;
    pb_read = take_pb;
    pb_dec  = take_pb && head_pf;
    l0_use  = take_l0;

    // L1 answers go to the L0 (emergency cache), delivered or not.
    l0_fill_valid = (st_q == F_L1WAIT) && l1_resp_valid;
    l0_fill_laddr = l1_fcl_q.laddr;
    l0_fill_data  = l1_resp_data;

    out_valid = 1'b0;
    out_fcl   = pf_q[RD_LAT-1];
    out_data  = pb_rd_data;
    out_src   = SRC_PB;
    if (pv_q[RD_LAT-1]) begin
      out_valid = 1'b1;
    end else if (l0_out_q) begin
      out_valid = 1'b1; out_fcl = l0_fcl_q; out_data = l0_data_q; out_src = SRC_L0;
    end else if (st_q == F_L1WAIT && l1_resp_valid && !l1_drop_q && !flush) begin
      out_valid = 1'b1; out_fcl = l1_fcl_q; out_data = l1_resp_data;
      out_src   = l1_resp_from_l2 ? SRC_L2 : SRC_L1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q      <= F_ISSUE;
      l1_drop_q <= 1'b0;
      pv_q      <= '0;
      l0_out_q  <= 1'b0;
      n_pb_wait <= '0;
      for (int i = 0; i < 4; i++) n_src[i] <= '0;
    end else begin
      pv_q[0] <= take_pb;
      for (int s = 1; s < RD_LAT; s++) pv_q[s] <= pv_q[s-1] && !flush;
      l0_out_q  <= take_l0;
      if (flush) begin
        pv_q     <= '0;
        l0_out_q <= 1'b0;
      end
      unique case (st_q)
        F_ISSUE: if (take_l1) begin
          st_q      <= F_L1WAIT;
          l1_drop_q <= 1'b0;
        end
        F_L1WAIT: begin
          if (flush) l1_drop_q <= 1'b1;
          if (l1_resp_valid) st_q <= F_ISSUE;
        end
        default: st_q <= F_ISSUE;
      endcase
      if (out_valid) n_src[out_src] <= n_src[out_src] + 1;
      if (issue && pb_match && !pb_hit) n_pb_wait <= n_pb_wait + 1;
    end
  end

  // Payload registers carry no reset: they are only read when the matching
  // valid bit or state says they hold a line.
  always_ff @(posedge clk) begin
    pf_q[0] <= head_fcl;
    for (int s = 1; s < RD_LAT; s++) pf_q[s] <= pf_q[s-1];
    l0_fcl_q  <= head_fcl;
    l0_data_q <= l0_data;
    if (st_q == F_ISSUE && take_l1) l1_fcl_q <= head_fcl;
  end

  // The prestage buffer read pipeline and this unit's copy stay in step.
  a_pipe_sync: assert property (@(posedge clk) disable iff (!rst_n || flush)
                                pb_rd_valid == pv_q[RD_LAT-1]);
  // A prestaged CLTQ entry always finds its line in the prestage buffer.
  a_pf_match: assert property (@(posedge clk) disable iff (!rst_n || flush)
                               (issue && head_pf) |-> pb_match);

endmodule
