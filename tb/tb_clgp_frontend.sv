// tb_clgp_frontend: end-to-end test of the prestaging front-end at its
// default sizes (16-entry prestage buffer with 3-cycle reads, 4-line L0,
// 4 KB 2-way L1 with a 4-cycle hit, 32-entry CLTQ of at most 8 blocks).
//
// A synthetic program plays the branch predictor: loops of 2-5 fetch blocks
// placed in a 16 KB code region, each loop run several times, so lines are
// reused while they wait in the CLTQ, and now and then a straight run of 12
// long blocks. Now and then the predictor goes down a
// wrong path (random blocks) and the back end signals a misprediction with
// flush, after which the correct path continues. An L2 model answers I-side
// requests in 24 cycles, or 224 on the first touch of a line (main memory),
// and a data cache model competes for the L2 bus.
//
// Checked: every fetched line is the next correct-path fetch cache line,
// with the right contents; its delay from the CLTQ pop matches its source
// (3 cycles from the prestage buffer, 1 from the L0, at least 4 from the
// L1); after the final drain every consumers counter is back to zero; each mechanism happens at least once (fetch from
// the prestage buffer, the L0, the L1 and L2; lifetime extension; new
// prefetch; prefetch from L2; waiting for a free prestage entry; waiting for
// an in-flight prefetch; misprediction flush; the CLTQ block limit; a data
// cache request winning the L2 bus over an I-side request); the front-end
// drains at the end.
module tb_clgp_frontend;
  import clgp_pkg::*;
  localparam int L2LAT = 24, MEMLAT = 200;

  logic clk = 0, rst_n = 0, flush = 0;
  logic fb_valid = 0, fb_ready;
  logic [ADDR_W-1:0] fb_addr = '0;
  logic [FB_LEN_W-1:0] fb_len = '0;
  logic out_valid;
  fcl_t out_fcl;
  line_t out_data;
  fetch_src_e out_src;
  logic dc_l2_valid = 0, dc_l2_grant;
  laddr_t dc_l2_laddr = '0;
  logic l2_req_valid;
  laddr_t l2_req_laddr;
  l2_req_e l2_req_src;
  logic l2_resp_valid = 0;
  line_t l2_resp_data = '0;
  logic [31:0] n_src [4];
  logic [31:0] n_pb_wait, n_extend, n_prefetch, n_full_stall, n_pf_from_l2;
  logic [5:0] cltq_count;
  logic [3:0] cltq_blocks;

  clgp_frontend dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, lines_out = 0, cyc = 0;
  int n_flush = 0, n_blk_limit = 0, n_dc_win = 0;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic line_t content(laddr_t a);
    return line_t'({a, 32'h1DEA_0000 | 32'(a), ~a, a});
  endfunction

  // ---- L2 / memory model: one I-side request at a time ----
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

  // ---- data cache: occasional one-cycle requests ----
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (dc_l2_valid && dc_l2_grant) dc_l2_valid <= 1'b0;
    else if (($urandom() % 40) == 0) begin dc_l2_valid <= 1'b1; dc_l2_laddr <= laddr_t'($urandom()); end
    if (dc_l2_valid && (dut.l2_ireq_valid || dut.l2_preq_valid)) begin
      n_dc_win++;
      if (l2_req_src != L2R_DCACHE) begin failures++; $display("data cache lost the bus"); end
    end
    if (cltq_blocks == 4'd8) n_blk_limit++;
  end

  // ---- expected fetch cache lines ----
  // Lines expected in fetch order; wrong-path lines follow the correct ones
  // and may be fetched until the flush that removes them.
  typedef struct { fcl_t f; bit correct; } exp_t;
  exp_t exp_q[$];
  int n_wrong_fetched = 0;

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
    lines_out++;
    if (exp_q.size() == 0) begin failures++; $display("%0t: unexpected line", $time); end
    else begin
      automatic exp_t e = exp_q.pop_front();
      if (!e.correct) n_wrong_fetched++;
      if (out_fcl != e.f) begin failures++; $display("%0t: line %p expected %p", $time, out_fcl, e.f); end
      checks++;
      if (out_data != content(out_fcl.laddr)) begin failures++; $display("%0t: wrong line contents", $time); end
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
            SRC_PB: begin lat_pb++; if (d != 3) begin failures++; $display("%m %0t: PB latency %0d", $time, d); end end
            SRC_L0: begin lat_l0++; if (d != 1) begin failures++; $display("%m %0t: L0 latency %0d", $time, d); end end
            default: if (d < 4) begin failures++; $display("%m %0t: L1 latency %0d", $time, d); end
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

  task automatic mispredict(input bit wrong_path = 1);
    int nwrong = wrong_path ? 1 + int'($urandom() % 3) : 0;
    for (int w = 0; w < nwrong; w++)
      send({16'h0004, 16'($urandom() & 16'hFFFC)}, 4 + int'($urandom() % 40), 0);
    // the back end resolves the branch some cycles later
    repeat (5 + ($urandom() % 30)) @(posedge clk);
    // lines of the correct path still ahead of the wrong ones are fetched first
    while (correct_pending()) @(posedge clk);
    #1 flush = 1;
    exp_q.delete();
    @(posedge clk);
    #1 flush = 0;
    n_flush++;
  endtask

  initial begin
    automatic int nloops = 40;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int l = 0; l < nloops; l++) begin
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
      mispredict();      // loop exit is mispredicted
      // Now and then a long straight run: more distinct lines than prestage
      // entries wait in the CLTQ, so the engine must wait for free entries.
      if (l % 8 == 7) begin
        for (int b = 0; b < 12; b++) send(base + 32'h2000 + 32'(b * 63 * 4), 63, 1);
        mispredict();
      end
    end
    // Directed: 15 lines are made resident in the prestage buffer. After a
    // flush, a cold line W keeps the L1 busy with a demand miss, so the engine
    // prestages the next cold line X; while the fetch unit waits for X, the
    // engine extends the lifetime of the 15 resident lines, and the cold
    // line P then finds no free entry.
    for (int pass = 0; pass < 4; pass++)
      for (int b = 0; b < 5; b++) send(32'h0003_0040 + 32'(b * 192), 48, 1);
    mispredict(0);
    send(32'h0007_0000, 16, 1);
    send(32'h0005_0000, 16, 1);
    for (int b = 0; b < 5; b++) send(32'h0003_0040 + 32'(b * 192), 48, 1);
    send(32'h0006_0000, 16, 1);
    // drain
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
    if (exp_q.size() != 0) begin failures++; $display("%0d lines never fetched", exp_q.size()); end
    $display("wrong-path lines fetched before their flush: %0d", n_wrong_fetched);
    $display("cycles %0d lines %0d | PB %0d L0 %0d L1 %0d L2 %0d | extend %0d prefetch %0d pf-from-L2 %0d full-stall %0d inflight-wait %0d | flush %0d blk-limit %0d dc-win %0d",
             cyc, lines_out, n_src[0], n_src[1], n_src[2], n_src[3], n_extend, n_prefetch,
             n_pf_from_l2, n_full_stall, n_pb_wait, n_flush, n_blk_limit, n_dc_win);
    begin
      automatic int ev [13] = '{int'(n_src[0]), int'(n_src[1]), int'(n_src[2]), int'(n_src[3]),
                      int'(n_extend), int'(n_prefetch), int'(n_pf_from_l2), int'(n_full_stall),
                      int'(n_pb_wait), n_flush, n_blk_limit, n_dc_win, lines_out};
      foreach (ev[i]) begin
        checks++;
        if (ev[i] == 0) begin failures++; $display("mechanism %0d never happened", i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
