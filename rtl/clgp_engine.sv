// clgp_engine: the Cache Line Guided Prestaging decision logic.
//
// Every cycle the engine takes the oldest CLTQ entry that has not been
// prestaged yet (the CLTQ candidate) and checks the prestage buffer for its
// line, as the prestaging algorithm prescribes:
//   * line already in the buffer (arrived or still being prefetched): no new
//     prefetch; the entry's consumers counter is incremented, which extends
//     the line's lifetime in the buffer;
//   * line not in the buffer and a free entry (consumers counter zero)
//     exists: the least recently used free entry is allocated with counter 1
//     and valid clear, and a prefetch request for the line goes to the L1
//     I-cache;
//   * otherwise the engine waits.
// In the first two cases the CLTQ entry's prefetched bit is set. There is no
// filtering against the caches: every line goes to the prestage buffer.
//
// Interface: the cand_* inputs come from the CLTQ, mark sets the prefetched
// bit; pb_* talks to the prestage buffer; pf_valid/pf_ready/pf_laddr is the
// prefetch request to the L1 I-cache. One decision per cycle, made in the
// same cycle (the engine itself holds only statistics counters). The prefetch
// handshake and the counters are this design's own choices.
//
// The engine uses only the line address of the candidate; the slot fields of
// cand_fcl are for the fetch unit. pb_laddr and pf_laddr are that address
// passed through.
module clgp_engine
  import clgp_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         flush,
  // CLTQ candidate
  input  logic         cand_valid,
  input  fcl_t         cand_fcl,
  output logic         mark,
  // prestage buffer
  output laddr_t       pb_laddr,
  input  logic         pb_hit,
  input  logic         pb_free_avail,
  output logic         pb_inc,
  output logic         pb_alloc,
  // prefetch request to L1
  output logic         pf_valid,
  input  logic         pf_ready,
  output laddr_t       pf_laddr,
  // statistics
  output logic [31:0]  n_extend,      // lifetimes extended (prefetch saved)
  output logic [31:0]  n_prefetch,    // prefetches started
  output logic [31:0]  n_full_stall   // cycles waiting for a free entry
);

  logic active;

  always_comb begin
    active   = cand_valid && !flush;
    pb_laddr = cand_fcl.laddr;
    pf_laddr = cand_fcl.laddr;
    pb_inc   = active && pb_hit;
    pf_valid = active && !pb_hit && pb_free_avail;
    pb_alloc = pf_valid && pf_ready;
    mark     = pb_inc || pb_alloc;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n_extend     <= '0;
      n_prefetch   <= '0;
      n_full_stall <= '0;
    end else begin
      if (pb_inc)   n_extend   <= n_extend + 1;
      if (pb_alloc) n_prefetch <= n_prefetch + 1;
      if (active && !pb_hit && !pb_free_avail) n_full_stall <= n_full_stall + 1;
    end
  end

endmodule
