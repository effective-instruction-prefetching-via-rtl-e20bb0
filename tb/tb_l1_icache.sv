// tb_l1_icache: self-checking test of the L1 instruction cache.
// A 512-byte, 2-way cache (4 sets) with a 4-cycle hit gets random demand and
// prefetch requests over 24 line addresses, often both at once; each request
// is held until accepted. An L2 model grants bus requests after 0-2 cycles
// and returns the line 6 cycles later; line contents are a function of the
// address. A cache model (2 ways per set, LRU) predicts hit or miss.
// Checked: returned data, which port answers, the from-L2 flag, a hit answer
// exactly 4 cycles after acceptance, the L2 request class (I-cache for demand
// misses, prefetch for prefetch misses), one acceptance at a time, and the
// turn-taking between the two ports (after a demand access, a prefetch that
// was already waiting goes first; otherwise demand goes first).
module tb_l1_icache;
  import clgp_pkg::*;
  localparam int SIZE = 512, LAT = 4, SETS = SIZE / 128, L2LAT = 6;

  logic clk = 0, rst_n = 0;
  logic d_valid = 0, d_ready, d_resp_valid, d_resp_from_l2;
  logic p_valid = 0, p_ready, p_resp_valid, p_resp_from_l2;
  laddr_t d_laddr = '0, p_laddr = '0, p_resp_laddr, l2_req_laddr;
  line_t d_resp_data, p_resp_data, l2_resp_data = '0;
  logic l2_ireq_valid, l2_preq_valid, l2_grant = 0, l2_resp_valid = 0;
  int checks = 0, failures = 0, n_hit = 0, n_miss = 0, n_pturn = 0, n_dturn = 0;

  l1_icache #(.SIZE_BYTES(SIZE), .WAYS(2), .HIT_LAT(LAT)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("%0t: %s", $time, msg); end
  endtask

  function automatic line_t content(laddr_t a);
    return line_t'({a, 32'hC0DE_0000 | 32'(a), a});
  endfunction

  // cache model
  laddr_t mtag[SETS][2];
  bit mval[SETS][2];
  int mlru[SETS];              // way to replace next

  function automatic int mhit(laddr_t a);
    int s = int'(a) % SETS;
    for (int w = 0; w < 2; w++) if (mval[s][w] && mtag[s][w] == a) return w;
    return -1;
  endfunction

  // L2 model
  initial begin
    forever begin
      @(negedge clk);
      if (l2_ireq_valid || l2_preq_valid) begin
        automatic laddr_t a = l2_req_laddr;
        repeat ($urandom() % 3) @(negedge clk);
        l2_grant = 1; @(negedge clk); l2_grant = 0;
        repeat (L2LAT - 1) @(negedge clk);
        l2_resp_valid = 1; l2_resp_data = content(a);
        @(negedge clk); l2_resp_valid = 0;
      end
    end
  end

  // Acceptance monitor with the turn model, and answer checker.
  bit pf_turn = 0, p_wait = 0;
  bit busy = 0, cur_pf;
  laddr_t cur_a;
  int cur_w, cur_lat;

  always @(posedge clk) if (rst_n) begin
    automatic bit td = d_valid && d_ready, tp = p_valid && p_ready;
    // answer of the request in progress
    if (busy) begin
      cur_lat++;
      if (d_resp_valid || p_resp_valid) begin
        check(cur_pf ? (p_resp_valid && !d_resp_valid) : (d_resp_valid && !p_resp_valid), "answering port");
        if (cur_pf) begin
          check(p_resp_laddr == cur_a && p_resp_data == content(cur_a), "prefetch answer");
          check(p_resp_from_l2 == (cur_w < 0), "p from_l2");
        end else begin
          check(d_resp_data == content(cur_a), "demand answer");
          check(d_resp_from_l2 == (cur_w < 0), "d from_l2");
        end
        if (cur_w >= 0) begin
          check(cur_lat == LAT, $sformatf("hit latency %0d", cur_lat));
          n_hit++; mlru[int'(cur_a) % SETS] = 1 - cur_w;
        end else begin
          automatic int s = int'(cur_a) % SETS;
          check(cur_lat > LAT + L2LAT, "miss too fast");
          n_miss++; mtag[s][mlru[s]] = cur_a; mval[s][mlru[s]] = 1; mlru[s] = 1 - mlru[s];
        end
        busy = 0;
      end else if (cur_w < 0)
        check(!(l2_ireq_valid && cur_pf) && !(l2_preq_valid && !cur_pf), "L2 request class");
    end
    check(!(td && tp), "two acceptances in one cycle");
    if (td || tp) check(!busy, "accepted while busy");
    if (d_valid && p_valid && (td || tp)) begin
      automatic bit exp_p = pf_turn && p_wait;
      check(tp == exp_p, "turn order");
      if (exp_p) n_pturn++; else n_dturn++;
    end
    p_wait = p_valid && !tp;
    if (td) begin pf_turn = 1; busy = 1; cur_pf = 0; cur_a = d_laddr; end
    if (tp) begin pf_turn = 0; busy = 1; cur_pf = 1; cur_a = p_laddr; end
    if (td || tp) begin cur_w = mhit(cur_a); cur_lat = 0; end
  end

  initial begin
    for (int s = 0; s < SETS; s++) begin mval[s][0] = 0; mval[s][1] = 0; mlru[s] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    fork
      for (int r = 0; r < 1500; r++) begin
        @(negedge clk);
        d_valid = 1; d_laddr = laddr_t'($urandom() % 24);
        @(posedge clk); while (!d_ready) @(posedge clk);
        #1 d_valid = 0;
        repeat ($urandom() % 12) @(negedge clk);
      end
      for (int r = 0; r < 1500; r++) begin
        @(negedge clk);
        p_valid = 1; p_laddr = laddr_t'($urandom() % 24);
        @(posedge clk); while (!p_ready) @(posedge clk);
        #1 p_valid = 0;
        repeat ($urandom() % 12) @(negedge clk);
      end
    join
    while (busy) @(negedge clk);
    check(n_hit > 100 && n_miss > 100 && n_pturn > 20 && n_dturn > 20, "too few hits, misses or conflicts");
    $display("hits %0d misses %0d prefetch turns %0d demand turns %0d", n_hit, n_miss, n_pturn, n_dturn);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
