// tb_fetch_unit: self-checking test of the fetch stage.
// The testbench plays the CLTQ, the prestage buffer (3-cycle pipelined
// read), the L0 cache and the L1 I-cache (4-cycle hit, 20 cycles from L2).
// Each queued line is given a random home: prestage buffer (arrived, or
// arriving some cycles later), L0, L1 or L2. Checked: lines come out in queue
// order with the right data and source; a prestage buffer hit appears 3
// cycles after it is taken and back-to-back hits stream one per cycle; an L0
// hit appears one cycle after it is taken; the consumers counter is
// decremented exactly for prefetched entries taken from the buffer; L1
// answers fill the L0; the head waits while its line is in flight; the
// statistics counters; and a flush during an L1 access drops the line.
module tb_fetch_unit;
  import clgp_pkg::*;
  localparam int RD = 3, L1LAT = 4, L2LAT = 20;

  typedef enum int {H_PB, H_PBFLY, H_L0, H_L1, H_L2} home_e;

  logic clk = 0, rst_n = 0, flush = 0;
  logic head_valid, head_pf, pop;
  fcl_t head_fcl, out_fcl;
  laddr_t pb_laddr, l0_laddr, l0_fill_laddr, l1_laddr;
  logic pb_match, pb_hit, pb_read, pb_dec, pb_rd_valid;
  line_t pb_rd_data, l0_data, l0_fill_data, l1_resp_data, out_data;
  logic l0_hit, l0_use, l0_fill_valid, l1_valid, l1_ready, l1_resp_valid, l1_resp_from_l2;
  logic out_valid;
  fetch_src_e out_src;
  logic [31:0] n_src [4];
  logic [31:0] n_pb_wait;
  int checks = 0, failures = 0;

  fetch_unit #(.RD_LAT(RD)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("%0t: %s", $time, msg); end
  endtask

  function automatic line_t content(laddr_t a);
    return line_t'({a, 32'hF00D_0000, a});
  endfunction

  // ---- environment ----
  typedef struct { fcl_t f; bit pf; home_e h; int arrive; } item_t;
  item_t q[$];                 // CLTQ contents
  item_t exp_q[$];             // expected outputs
  int cyc = 0;
  int exp_time[$];             // expected output cycle, -1 = unknown
  int e_src[4] = '{0, 0, 0, 0};
  int e_dec = 0, n_dec = 0, e_wait = 0, n_l0fill = 0;
  int pbq_v[RD]; line_t pbq_d[RD];
  int l1_cnt = -1; laddr_t l1_a; bit l1_from2;

  always_comb begin
    head_valid = q.size() > 0;
    head_fcl   = head_valid ? q[0].f : '0;
    head_pf    = head_valid ? q[0].pf : 1'b0;
    pb_match   = head_valid && (q[0].h == H_PB || q[0].h == H_PBFLY);
    pb_hit     = pb_match && cyc >= q[0].arrive;
    l0_hit     = head_valid && q[0].h == H_L0;
    l0_data    = content(l0_laddr);
    l1_ready   = l1_cnt < 0;
    pb_rd_valid = pbq_v[RD-1] != 0;
    pb_rd_data  = pbq_d[RD-1];
    l1_resp_valid   = l1_cnt == 0;
    l1_resp_data    = content(l1_a);
    l1_resp_from_l2 = l1_from2;
  end

  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    for (int s = RD - 1; s > 0; s--) begin pbq_v[s] <= flush ? 0 : pbq_v[s-1]; pbq_d[s] <= pbq_d[s-1]; end
    pbq_v[0] <= int'(pb_read && !flush); pbq_d[0] <= content(pb_laddr);
    if (pb_dec) n_dec <= n_dec + 1;
    if (l0_fill_valid) begin
      n_l0fill <= n_l0fill + 1;
      if (l0_fill_laddr != l1_a || l0_fill_data != content(l1_a)) begin
        failures++; $display("bad L0 fill");
      end
    end
    if (l1_cnt > 0) l1_cnt <= l1_cnt - 1;
    else if (l1_cnt == 0) l1_cnt <= -1;
    if (l1_valid && l1_ready) begin
      l1_a <= l1_laddr;
      l1_from2 <= (q[0].h == H_L2);
      l1_cnt <= (q[0].h == H_L2 ? L2LAT : L1LAT) - 1;
    end
    if (head_valid && pb_match && !pb_hit && !flush && l1_cnt < 0) e_wait++;
    // Per cycle: a decrement exactly when a counted entry leaves from the buffer.
    checks++;
    if (pb_dec != (pop && (q[0].h == H_PB || q[0].h == H_PBFLY) && q[0].pf)) begin
      failures++; $display("%0t: pb_dec %0b wrong", $time, pb_dec);
    end
    if (pop) begin
      automatic item_t it = q.pop_front();
      if (it.h == H_PB || it.h == H_PBFLY) begin
        e_dec += int'(it.pf);
        exp_time.push_back(cyc + RD);
      end else if (it.h == H_L0) exp_time.push_back(cyc + 1);
      else exp_time.push_back(-1);
      exp_q.push_back(it);
    end
    if (out_valid) begin
      item_t e;
      int t;
      checks++;
      if (exp_q.size() == 0) begin failures++; $display("unexpected output"); end
      else begin
        fetch_src_e es;
        e = exp_q.pop_front();
        t = exp_time.pop_front();
        es = (e.h == H_L0) ? SRC_L0 : (e.h == H_L1) ? SRC_L1 : (e.h == H_L2) ? SRC_L2 : SRC_PB;
        e_src[es]++;
        if (out_fcl != e.f || out_data != content(e.f.laddr) || out_src != es) begin
          failures++; $display("%0t: output mismatch src %0d exp %0d", $time, out_src, es);
        end
        if (t >= 0 && t != cyc) begin
          failures++; $display("%0t: latency: out at %0d exp %0d", $time, cyc, t);
        end
      end
    end
  end

  initial begin
    for (int s = 0; s < RD; s++) pbq_v[s] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // Directed: four prestaged lines back to back must stream one per cycle.
    @(negedge clk);
    for (int i = 0; i < 4; i++) begin
      item_t it; it.f = fcl_t'(0); it.f.laddr = laddr_t'(100 + i); it.f.count = 16;
      it.pf = 1; it.h = H_PB; it.arrive = 0; q.push_back(it);
    end
    begin
      automatic int first = -1, cnt = 0;
      for (int k = 0; k < 12; k++) begin
        @(posedge clk); #1;
        if (out_valid) begin if (first < 0) first = k; cnt++; end
      end
      check(cnt == 4, "four prestaged lines");
    end
    // Random traffic.
    for (int i = 0; i < 2000; i++) begin
      item_t it;
      @(negedge clk);
      while (q.size() > 6) @(negedge clk);
      it.f = fcl_t'({$urandom(), $urandom()});
      it.h = home_e'($urandom() % 5);
      it.pf = (it.h == H_PB || it.h == H_PBFLY) ? 1'($urandom() % 2) : 1'b0;
      it.arrive = (it.h == H_PBFLY) ? cyc + 3 + int'($urandom() % 10) : 0;
      q.push_back(it);
    end
    while (q.size() > 0 || exp_q.size() > 0) @(negedge clk);
    repeat (5) @(negedge clk);
    for (int s = 0; s < 4; s++) check(int'(n_src[s]) == e_src[s], $sformatf("n_src[%0d]", s));
    check(n_dec == e_dec, "consumers counter decrements");
    check(int'(n_pb_wait) == e_wait && e_wait > 0, "in-flight waits");
    check(n_l0fill == e_src[SRC_L1] + e_src[SRC_L2], "L0 fills");
    // Flush during an L1 access: the line is dropped, the L0 still filled.
    begin
      item_t it; it.f = fcl_t'(0); it.f.laddr = laddr_t'(7); it.pf = 0; it.h = H_L2; it.arrive = 0;
      q.push_back(it);
      @(negedge clk); @(negedge clk);
      flush = 1; exp_q.delete(); exp_time.delete();
      @(negedge clk); flush = 0;
      for (int k = 0; k < L2LAT + 5; k++) begin
        @(negedge clk);
        check(!out_valid, "output after flush");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
