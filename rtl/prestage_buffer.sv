// prestage_buffer: fully associative buffer of prestaged cache lines.
//
// Each of the ENTRIES entries holds a 64-byte line, its line address, a
// consumers counter, a valid bit (the line has arrived) and an LRU rank, as
// the prestaging scheme defines them. The consumers counter says how many
// CLTQ entries will still fetch from this line; an entry may be replaced only
// while its counter is zero. Lines are never moved to another cache when they
// are used or replaced.
//
// Ports, all usable in the same cycle:
//   engine side : e_laddr is looked up against every allocated entry
//                 (arrived or still in flight). e_inc adds one consumer to the
//                 hit entry; e_alloc takes the least recently used entry with
//                 a zero counter (free_idx), sets its address, counter = 1 and
//                 valid = 0.
//   fill        : a returning prefetch writes the entry still waiting for that
//                 line address and sets valid. A fill whose entry has been
//                 reallocated in the meantime is dropped.
//   fetch side  : f_laddr is looked up; f_read starts a read of the hit
//                 entry, f_dec removes one consumer from it.
//   flush       : all consumers counters are reset to zero (branch
//                 misprediction); lines and valid bits stay, so lines from the
//                 wrong path can still be used until they are replaced.
// A read is pipelined: rd_valid/rd_data appear RD_LAT cycles after f_read, and
// a new read may start every cycle (the large prestage buffer is accessed in
// several pipeline stages). LRU order is updated on allocation and on a read.
// The widths of the counter and the per-read LRU update are this design's own
// choices.
//
// Lint note: the assertions use rst_n in 'disable iff', which a linter
// reports as a synchronous use of the asynchronous reset; the assertions are
// not part of the circuit.
module prestage_buffer
  import clgp_pkg::*;
#(
  parameter int unsigned ENTRIES = 16,
  parameter int unsigned CNT_W   = 6,
  parameter int unsigned RD_LAT  = 3
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 flush,
  // engine
  input  laddr_t               e_laddr,
  output logic                 e_hit,
  output logic                 free_avail,
  output logic [$clog2(ENTRIES)-1:0] free_idx,
  input  logic                 e_inc,
  input  logic                 e_alloc,
  // prefetch fill
  input  logic                 fill_valid,
  input  laddr_t               fill_laddr,
  input  line_t                fill_data,
  // fetch
  input  laddr_t               f_laddr,
  output logic                 f_match,     // allocated entry with this line
  output logic                 f_hit,       // ... and its line has arrived
  output logic [CNT_W-1:0]     f_cnt,       // its consumers counter
  input  logic                 f_read,
  input  logic                 f_dec,
  output logic                 rd_valid,
  output line_t                rd_data
);

  localparam int unsigned IW = (ENTRIES > 1) ? $clog2(ENTRIES) : 1;

  laddr_t            tag_q  [ENTRIES];
  line_t             data_q [ENTRIES];
  logic [CNT_W-1:0]  cnt_q  [ENTRIES];
  logic [IW-1:0]     rank_q [ENTRIES];   // 0 = most recently used
  logic [ENTRIES-1:0] alloc_q, valid_q;

  logic [ENTRIES-1:0] e_hv, f_hv, free_v;
  logic [IW-1:0]      e_idx, f_idx;
  logic [IW-1:0]      rank_n [ENTRIES];
  logic [IW-1:0]      best_rank;

  always_comb begin
    e_hit = 1'b0; e_idx = '0;
    f_match = 1'b0; f_idx = '0;
    free_avail = 1'b0; free_idx = '0; best_rank = '0;
    for (int i = 0; i < ENTRIES; i++) begin
      e_hv[i]   = alloc_q[i] && tag_q[i] == e_laddr;
      f_hv[i]   = alloc_q[i] && tag_q[i] == f_laddr;
      free_v[i] = cnt_q[i] == '0;
      if (e_hv[i]) begin e_hit = 1'b1; e_idx = IW'(i); end
      if (f_hv[i]) begin f_match = 1'b1; f_idx = IW'(i); end
      if (free_v[i] && (!free_avail || rank_q[i] > best_rank)) begin
        free_avail = 1'b1; free_idx = IW'(i); best_rank = rank_q[i];
      end
    end
    f_hit = f_match && valid_q[f_idx];
    f_cnt = cnt_q[f_idx];
  end

  // LRU rank update: first the allocated entry, then the read entry.
  always_comb begin
    logic [IW-1:0] r;
    r = '0;
    for (int i = 0; i < ENTRIES; i++) rank_n[i] = rank_q[i];
    if (e_alloc && free_avail && !e_hit && !flush) begin
      r = rank_n[free_idx];
      for (int i = 0; i < ENTRIES; i++) if (rank_n[i] < r) rank_n[i] = rank_n[i] + 1'b1;
      rank_n[free_idx] = '0;
    end
    if (f_read && f_hit && !flush) begin
      r = rank_n[f_idx];
      for (int i = 0; i < ENTRIES; i++) if (rank_n[i] < r) rank_n[i] = rank_n[i] + 1'b1;
      rank_n[f_idx] = '0;
    end
  end

  logic [RD_LAT-1:0] rv_q;
  line_t             rd_q [RD_LAT];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      alloc_q <= '0;
      valid_q <= '0;
      rv_q    <= '0;
      for (int i = 0; i < ENTRIES; i++) begin
        cnt_q[i]  <= '0;
        rank_q[i] <= IW'(i);
      end
    end else begin
      rank_q <= rank_n;
      // Fill: the entry still waiting for this line.
      for (int i = 0; i < ENTRIES; i++)
        if (fill_valid && alloc_q[i] && !valid_q[i] && tag_q[i] == fill_laddr) begin
          data_q[i]  <= fill_data;
          valid_q[i] <= 1'b1;
        end
      if (flush) begin
        for (int i = 0; i < ENTRIES; i++) cnt_q[i] <= '0;
      end else begin
        for (int i = 0; i < ENTRIES; i++)
          cnt_q[i] <= cnt_q[i]
                      + CNT_W'(e_inc && e_hit && e_idx == IW'(i))
                      - CNT_W'(f_dec && f_match && f_idx == IW'(i) && cnt_q[i] != '0);
        if (e_alloc && free_avail && !e_hit) begin
          tag_q[free_idx]   <= e_laddr;
          alloc_q[free_idx] <= 1'b1;
          valid_q[free_idx] <= 1'b0;
          cnt_q[free_idx]   <= CNT_W'(1);
        end
      end
      // Pipelined read.
      rv_q[0] <= f_read && f_hit && !flush;
      rd_q[0] <= data_q[f_idx];
      for (int s = 1; s < RD_LAT; s++) begin
        rv_q[s] <= rv_q[s-1] && !flush;
        rd_q[s] <= rd_q[s-1];
      end
    end
  end

  assign rd_valid = rv_q[RD_LAT-1];
  assign rd_data  = rd_q[RD_LAT-1];

  // At most one entry holds a given line.
  a_unique: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(e_hv));
  // A counter never wraps.
  a_no_wrap: assert property (@(posedge clk) disable iff (!rst_n)
                              !(e_inc && e_hit && cnt_q[e_idx] == '1));

endmodule
