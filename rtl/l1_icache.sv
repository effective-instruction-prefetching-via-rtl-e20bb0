// l1_icache: multi-cycle L1 instruction cache with one port.
//
// 2-way set associative, 64-byte lines, SIZE_BYTES of data, one port, a hit
// latency of HIT_LAT cycles (4 cycles for 4 KB at 45 nm in the evaluated
// machine). It serves two requesters: demand fetches from the fetch unit and
// prefetches from the prestaging engine (with an L0 cache in the front-end,
// prefetches are sent to the L1 rather than to the L2). A miss requests the
// line on the L2 bus, as an I-cache request for a demand miss and as a
// prefetch request for a prefetch miss, and fills it into the LRU way.
//
// The cache handles one request at a time (blocking). When both requesters
// want the port they take turns: after a demand access a prefetch that was
// already waiting in the previous cycle goes first, after a prefetch access
// a demand goes first. Without turns, a fetch unit that keeps missing the
// prestage buffer would hold the port and the prestaging engine could never
// run ahead. Blocking access and turn-taking are this design's own choices.
// To keep the demand side independent of this cycle's prefetch request,
// the prefetch claim is taken from a register (p_wait_q).
//
// Timing: a request accepted in cycle t answers in cycle t+HIT_LAT on a hit;
// on a miss it answers in the cycle the L2 line arrives. Answers go to
// d_resp_* (demand) or p_resp_* (prefetch, which carries its line address
// for the prestage buffer fill).
module l1_icache
  import clgp_pkg::*;
#(
  parameter int unsigned SIZE_BYTES = 4096,
  parameter int unsigned WAYS       = 2,
  parameter int unsigned HIT_LAT    = 4
) (
  input  logic    clk,
  input  logic    rst_n,
  // demand port
  input  logic    d_valid,
  output logic    d_ready,
  input  laddr_t  d_laddr,
  output logic    d_resp_valid,
  output line_t   d_resp_data,
  output logic    d_resp_from_l2,
  // prefetch port
  input  logic    p_valid,
  output logic    p_ready,
  input  laddr_t  p_laddr,
  output logic    p_resp_valid,
  output laddr_t  p_resp_laddr,
  output line_t   p_resp_data,
  output logic    p_resp_from_l2,
  // L2 bus
  output logic    l2_ireq_valid,
  output logic    l2_preq_valid,
  output laddr_t  l2_req_laddr,
  input  logic    l2_grant,
  input  logic    l2_resp_valid,
  input  line_t   l2_resp_data
);

  localparam int unsigned SETS  = SIZE_BYTES / (LINE_BYTES * WAYS);
  localparam int unsigned IDX_W = (SETS > 1) ? $clog2(SETS) : 1;
  localparam int unsigned WAY_W = (WAYS > 1) ? $clog2(WAYS) : 1;
  localparam int unsigned LAT_W = $clog2(HIT_LAT + 1);

  typedef enum logic [1:0] {S_IDLE, S_LOOKUP, S_L2REQ, S_L2WAIT} state_e;

  laddr_t              tag_q   [WAYS][SETS];
  line_t               data_q  [WAYS][SETS];
  logic [WAYS-1:0]     valid_q [SETS];
  logic [WAY_W-1:0]    lru_q   [SETS];      // way to replace next

  state_e              st_q;
  laddr_t              laddr_q;
  logic                is_pf_q;
  logic [LAT_W-1:0]    cnt_q;
  logic                pf_turn_q;    // a prefetch has the next turn
  logic                p_wait_q;     // a prefetch was waiting last cycle
  logic                take_p, take_d;

  logic [IDX_W-1:0]    idx;
  logic                hit;
  logic [WAY_W-1:0]    hit_way;
  line_t               hit_data;
  logic                respond, from_l2;
  line_t               resp_data;

  always_comb begin
    idx = IDX_W'(laddr_q);
    hit = 1'b0; hit_way = '0;
    for (int w = 0; w < WAYS; w++)
      if (valid_q[idx][w] && tag_q[w][idx] == laddr_q) begin hit = 1'b1; hit_way = WAY_W'(w); end
    hit_data = data_q[hit_way][idx];

    d_ready = (st_q == S_IDLE) && !(pf_turn_q && p_wait_q);
    p_ready = (st_q == S_IDLE) && !(d_valid && d_ready);
    take_d  = d_valid && d_ready;
    take_p  = p_valid && p_ready;

    respond   = 1'b0;
    from_l2   = 1'b0;
    resp_data = hit_data;
    if (st_q == S_LOOKUP && cnt_q == '0 && hit) respond = 1'b1;
    if (st_q == S_L2WAIT && l2_resp_valid) begin
      respond = 1'b1; from_l2 = 1'b1; resp_data = l2_resp_data;
    end

    d_resp_valid   = respond && !is_pf_q;
    d_resp_data    = resp_data;
    d_resp_from_l2 = from_l2;
    p_resp_valid   = respond && is_pf_q;
    p_resp_laddr   = laddr_q;
    p_resp_data    = resp_data;
    p_resp_from_l2 = from_l2;

    l2_ireq_valid  = (st_q == S_L2REQ) && !is_pf_q;
    l2_preq_valid  = (st_q == S_L2REQ) && is_pf_q;
    l2_req_laddr   = laddr_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q    <= S_IDLE;
      laddr_q <= '0;
      is_pf_q <= 1'b0;
      cnt_q   <= '0;
      pf_turn_q <= 1'b0;
      p_wait_q  <= 1'b0;
      for (int s = 0; s < SETS; s++) begin
        valid_q[s] <= '0;
        lru_q[s]   <= '0;
      end
    end else begin
      p_wait_q <= p_valid && !take_p;
      unique case (st_q)
        S_IDLE: begin
          if (take_d) begin
            laddr_q <= d_laddr; is_pf_q <= 1'b0; pf_turn_q <= 1'b1;
            cnt_q   <= LAT_W'(HIT_LAT - 1); st_q <= S_LOOKUP;
          end else if (take_p) begin
            laddr_q <= p_laddr; is_pf_q <= 1'b1; pf_turn_q <= 1'b0;
            cnt_q   <= LAT_W'(HIT_LAT - 1); st_q <= S_LOOKUP;
          end
        end
        S_LOOKUP: begin
          if (cnt_q != '0) cnt_q <= cnt_q - 1'b1;
          else if (hit) begin
            st_q <= S_IDLE;
            if (WAYS == 2) lru_q[idx] <= WAY_W'(~hit_way);
          end else st_q <= S_L2REQ;
        end
        S_L2REQ:  if (l2_grant) st_q <= S_L2WAIT;
        S_L2WAIT: begin
          if (l2_resp_valid) begin
            tag_q[lru_q[idx]][idx]   <= laddr_q;
            data_q[lru_q[idx]][idx]  <= l2_resp_data;
            valid_q[idx][lru_q[idx]] <= 1'b1;
            lru_q[idx]               <= (WAYS == 2) ? WAY_W'(~lru_q[idx])
                                                    : WAY_W'((int'(lru_q[idx]) + 1) % WAYS);
            st_q <= S_IDLE;
          end
        end
        default: st_q <= S_IDLE;
      endcase
    end
  end

endmodule
