// l0_cache: small fully associative one-cycle instruction cache.
//
// With prestaging, the L0 cache is the 'emergency cache': it is filled only
// by demand fetches that missed the prestage buffer (mostly after branch
// mispredictions) and never receives lines that leave the prestage buffer, so
// the two hold different lines. It has the size of the largest structure that
// can be read in one cycle: 256 bytes (4 lines of 64 bytes) in the 45 nm
// configuration. Fully associative with LRU replacement.
//
// Interface: lk_laddr is looked up combinationally (lk_hit, lk_data); the
// fetch unit registers the result, so a hit costs one cycle. lk_use marks the
// hit line most recently used. fill_valid writes a line: an existing copy is
// overwritten, otherwise the LRU entry is replaced. LRU updates on use and
// fill are this design's own choice.
module l0_cache
  import clgp_pkg::*;
#(
  parameter int unsigned ENTRIES = 4
) (
  input  logic   clk,
  input  logic   rst_n,
  input  laddr_t lk_laddr,
  output logic   lk_hit,
  output line_t  lk_data,
  input  logic   lk_use,
  input  logic   fill_valid,
  input  laddr_t fill_laddr,
  input  line_t  fill_data
);

  localparam int unsigned IW = (ENTRIES > 1) ? $clog2(ENTRIES) : 1;

  laddr_t             tag_q  [ENTRIES];
  line_t              data_q [ENTRIES];
  logic [IW-1:0]      rank_q [ENTRIES];
  logic [ENTRIES-1:0] valid_q;

  logic [IW-1:0] lk_idx, fill_idx, victim;
  logic          fill_present;
  logic [IW-1:0] rank_n [ENTRIES];

  always_comb begin
    lk_hit = 1'b0; lk_idx = '0;
    fill_present = 1'b0;
    for (int i = 0; i < ENTRIES; i++) begin
      if (valid_q[i] && tag_q[i] == lk_laddr)   lk_hit = 1'b1;
      if (valid_q[i] && tag_q[i] == lk_laddr)   lk_idx = IW'(i);
      if (valid_q[i] && tag_q[i] == fill_laddr) fill_present = 1'b1;
    end
    lk_data = data_q[lk_idx];
  end

  // LRU order: first the line used by this cycle's lookup, then the fill.
  // The victim is chosen after the use, so a line just read is kept.
  always_comb begin
    logic [IW-1:0] r;
    r = '0;
    victim = '0;
    fill_idx = '0;
    for (int i = 0; i < ENTRIES; i++) rank_n[i] = rank_q[i];
    if (lk_use && lk_hit) begin
      r = rank_n[lk_idx];
      for (int i = 0; i < ENTRIES; i++) if (rank_n[i] < r) rank_n[i] = rank_n[i] + 1'b1;
      rank_n[lk_idx] = '0;
    end
    for (int i = 0; i < ENTRIES; i++) begin
      if (rank_n[i] == IW'(ENTRIES-1)) victim = IW'(i);
      if (valid_q[i] && tag_q[i] == fill_laddr) fill_idx = IW'(i);
    end
    if (!fill_present) fill_idx = victim;
    if (fill_valid) begin
      r = rank_n[fill_idx];
      for (int i = 0; i < ENTRIES; i++) if (rank_n[i] < r) rank_n[i] = rank_n[i] + 1'b1;
      rank_n[fill_idx] = '0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q <= '0;
      for (int i = 0; i < ENTRIES; i++) rank_q[i] <= IW'(i);
    end else begin
      rank_q <= rank_n;
      if (fill_valid) begin
        tag_q[fill_idx]   <= fill_laddr;
        data_q[fill_idx]  <= fill_data;
        valid_q[fill_idx] <= 1'b1;
      end
    end
  end

endmodule
