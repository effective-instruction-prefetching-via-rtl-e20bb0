// clgp_cfg_harness: drives and checks one clgp_frontend of a given
// configuration; used by tb_clgp_configs to run several configurations side
// by side.
//
// The stimulus is a synthetic program: loops of 2-5 fetch blocks run several
// times each, with wrong-path blocks and a misprediction flush at every loop
// exit and now and then inside a loop. An L2 model answers I-side requests
// after L2LAT cycles (plus MEMLAT on the first touch of a line); the data
// cache port stays idle.
//
// Checks: each fetched line is the next correct-path fetch cache line, with
// the right contents and the delay its source implies (PB_LAT from the
// prestage buffer, 1 from the L0, at least L1_LAT from the L1); a final
// loop with no misprediction drains the consumers counters to zero; at the
// end nothing correct is left unfetched and the
// prestage buffer, the L0 and the L1 (or L2) each supplied lines, lifetimes
// were extended and prefetches were started.
//
// Interface: clk in; done goes high when the run is over, checks and
// failures hold the counts from then on. Parameters are the front end's
// size parameters plus the L2 model latencies and the number of loops.
module clgp_cfg_harness
  import clgp_pkg::*;
#(
  parameter int unsigned PB_ENTRIES = 16,
  parameter int unsigned PB_LAT     = 3,
  parameter int unsigned L0_ENTRIES = 4,
  parameter int unsigned L1_SIZE    = 4096,
  parameter int unsigned L1_LAT     = 4,
  parameter int          L2LAT      = 24,
  parameter int          MEMLAT     = 200,
  parameter int          NLOOPS     = 30
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures
);

  logic rst_n = 0, flush = 0;
  logic fb_valid = 0, fb_ready;
  logic [ADDR_W-1:0] fb_addr = '0;
  logic [FB_LEN_W-1:0] fb_len = '0;
  logic out_valid;
  fcl_t out_fcl;
  line_t out_data;
  fetch_src_e out_src;
  logic dc_l2_valid, dc_l2_grant;
  laddr_t dc_l2_laddr;
  logic l2_req_valid;
  laddr_t l2_req_laddr;
  l2_req_e l2_req_src;
  logic l2_resp_valid = 0;
  line_t l2_resp_data = '0;
  logic [31:0] n_src [4];
  logic [31:0] n_pb_wait, n_extend, n_prefetch, n_full_stall, n_pf_from_l2;
  logic [5:0] cltq_count;
  logic [3:0] cltq_blocks;

  assign dc_l2_valid = 1'b0;
  assign dc_l2_laddr = '0;

  clgp_frontend #(
    .PB_ENTRIES(PB_ENTRIES), .PB_LAT(PB_LAT), .L0_ENTRIES(L0_ENTRIES),
    .L1_SIZE(L1_SIZE), .L1_LAT(L1_LAT)
  ) dut (.*);

  initial begin done = 0; checks = 0; failures = 0; end

  function automatic line_t content(laddr_t a);
    return line_t'({~a, 32'hC0DE_0000 ^ 32'(a), a});
  endfunction

  // L2 / memory model: one I-side request at a time.
  bit touched [laddr_t];
  initial begin
    forever begin
      @(posedge clk);
      if (rst_n && l2_req_valid && l2_req_src != L2R_DCACHE) begin
        automatic laddr_t a = l2_req_laddr;
        automatic int lat = touched.exists(a) ? L2LAT : L2LAT + MEMLAT;
        touched[a] = 1;
        repeat (lat - 1) @(posedge clk);
        #1 l2_resp_valid = 1; l2_resp_data = content(a);
        @(posedge clk);
        #1 l2_resp_valid = 0;
      end
    end
  end

  typedef struct { fcl_t f; bit correct; } exp_t;
  exp_t exp_q[$];

  function automatic bit correct_pending();
    return exp_q.size() > 0 && exp_q[0].correct;
  endfunction

  task automatic split(input logic [ADDR_W-1:0] a, input int len, input bit correct);
    int ia = int'(a >> 2), rem = len;
    while (rem > 0) begin
      fcl_t f;
      int slot = ia % 16;
      int take = (rem < 16 - slot) ? rem : 16 - slot;
      f.laddr = laddr_t'(ia / 16); f.first = SLOT_W'(slot);
      f.count = (SLOT_W+1)'(take); f.last = (take == rem);
      exp_q.push_back('{f: f, correct: correct});
      ia += take; rem -= take;
    end
  endtask

  always @(posedge clk) if (rst_n && out_valid && !flush) begin
    checks++;
    if (exp_q.size() == 0) begin failures++; $display("%m %0t: unexpected line", $time); end
    else begin
      automatic exp_t e = exp_q.pop_front();
      if (out_fcl != e.f) begin failures++; $display("%m %0t: wrong fetch cache line", $time); end
      checks++;
      if (out_data != content(out_fcl.laddr)) begin failures++; $display("%m %0t: wrong contents", $time); end
    end
  end

  // Fetch latency: cycles from the CLTQ pop to the line's delivery. A
  // prestage buffer line takes the read pipeline depth, an L0 line one
  // cycle, an L1 line at least the L1 hit latency.
  int pop_cyc [$];
  int lat_pb = 0, lat_l0 = 0;
  int lcyc = 0;
  always @(posedge clk) begin
    lcyc <= lcyc + 1;
    if (rst_n && flush) pop_cyc.delete();
    else if (rst_n) begin
      if (out_valid) begin
        checks++;
        if (pop_cyc.size() == 0) begin failures++; $display("%m %0t: line without a pop", $time); end
        else begin
          automatic int d = lcyc - pop_cyc.pop_front();
          case (out_src)
            SRC_PB: begin lat_pb++; if (d != PB_LAT) begin failures++; $display("%m %0t: PB latency %0d", $time, d); end end
            SRC_L0: begin lat_l0++; if (d != 1) begin failures++; $display("%m %0t: L0 latency %0d", $time, d); end end
            default: if (d < L1_LAT) begin failures++; $display("%m %0t: L1 latency %0d", $time, d); end
          endcase
        end
      end
      if (dut.pop) pop_cyc.push_back(lcyc);
    end
  end

  task automatic send(input logic [ADDR_W-1:0] a, input int len, input bit correct);
    fb_valid = 1; fb_addr = a; fb_len = FB_LEN_W'(len);
    @(posedge clk);
    while (!fb_ready) @(posedge clk);
    split(a, len, correct);
    #1 fb_valid = 0;
  endtask

  task automatic mispredict();
    int nwrong = 1 + int'($urandom() % 3);
    for (int w = 0; w < nwrong; w++)
      send({16'h0004, 16'($urandom() & 16'hFFFC)}, 4 + int'($urandom() % 40), 0);
    repeat (5 + ($urandom() % 30)) @(posedge clk);
    while (correct_pending()) @(posedge clk);
    #1 flush = 1;
    exp_q.delete();
    @(posedge clk);
    #1 flush = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int l = 0; l < NLOOPS; l++) begin
      automatic logic [ADDR_W-1:0] ba [5];
      automatic int bl [5];
      automatic int nb = 2 + int'($urandom() % 4);
      automatic int iters = 2 + int'($urandom() % 6);
      automatic logic [ADDR_W-1:0] base = 32'h0001_0000 + (($urandom() % 256) << 6);
      for (int b = 0; b < nb; b++) begin
        ba[b] = base + 32'(($urandom() % 24) << 2) + 32'(b * 192);
        bl[b] = 4 + int'($urandom() % 40);
      end
      for (int it = 0; it < iters; it++) begin
        for (int b = 0; b < nb; b++) send(ba[b], bl[b], 1);
        if (($urandom() % 5) == 0) mispredict();
      end
      mispredict();
    end
    // A last, well-predicted loop: no flush follows, so the consumers
    // counters must drain back to zero by themselves.
    for (int it = 0; it < 4; it++)
      for (int b = 0; b < 3; b++) send(32'h0001_8010 + 32'(b * 192), 36, 1);
    begin
      automatic int t = 0;
      while (correct_pending() && t < 5000) begin @(posedge clk); t++; end
    end
    // With the CLTQ drained and no flush since, every counted consumer has
    // fetched its line, so every consumers counter is back to zero.
    repeat (10) @(posedge clk);
    checks++;
    if (cltq_count != 0) begin failures++; $display("%m: CLTQ not empty at the end"); end
    for (int i = 0; i < $size(dut.u_pb.cnt_q); i++) begin
      checks++;
      if (dut.u_pb.cnt_q[i] != 0) begin failures++; $display("%m: consumers counter %0d left at %0d", i, dut.u_pb.cnt_q[i]); end
    end
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("%m: %0d lines never fetched", exp_q.size()); end
    $display("%m PB %0d L0 %0d L1 %0d L2 %0d | extend %0d prefetch %0d full-stall %0d",
             n_src[0], n_src[1], n_src[2], n_src[3], n_extend, n_prefetch, n_full_stall);
    begin
      automatic int ev [5] = '{int'(n_src[0]), int'(n_src[1]), int'(n_src[2] + n_src[3]),
                               int'(n_extend), int'(n_prefetch)};
      foreach (ev[i]) begin
        checks++;
        if (ev[i] == 0) begin failures++; $display("%m: mechanism %0d never happened", i); end
      end
    end
    done = 1;
  end

endmodule
