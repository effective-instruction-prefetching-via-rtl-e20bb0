// tb_clgp_engine: self-checking test of the prestaging decision logic.
// All input combinations (candidate, prestage buffer hit, free entry, L1
// ready, flush) are applied many times in random order. Expected behaviour:
// a hit extends the line's lifetime (increment, mark, no prefetch); a miss
// with a free entry requests a prefetch and, once the L1 accepts, allocates
// and marks; a miss without a free entry waits. The three statistics
// counters are checked against counts kept by the testbench.
module tb_clgp_engine;
  import clgp_pkg::*;

  logic clk = 0, rst_n = 0, flush = 0;
  logic cand_valid = 0, mark, pb_hit = 0, pb_free_avail = 0, pb_inc, pb_alloc;
  logic pf_valid, pf_ready = 0;
  fcl_t cand_fcl = '0;
  laddr_t pb_laddr, pf_laddr;
  logic [31:0] n_extend, n_prefetch, n_full_stall;
  int checks = 0, failures = 0;
  int e_ext = 0, e_pf = 0, e_stall = 0;

  clgp_engine dut (.*);

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

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 5000; cyc++) begin
      bit act, x_inc, x_pfv, x_alloc;
      @(negedge clk);
      {flush, cand_valid, pb_hit, pb_free_avail, pf_ready} = 5'($urandom());
      cand_fcl = fcl_t'({$urandom(), $urandom()});
      #1;
      act     = cand_valid && !flush;
      x_inc   = act && pb_hit;
      x_pfv   = act && !pb_hit && pb_free_avail;
      x_alloc = x_pfv && pf_ready;
      check(pb_laddr == cand_fcl.laddr && pf_laddr == cand_fcl.laddr, "addresses");
      check(pb_inc == x_inc, "pb_inc");
      check(pf_valid == x_pfv, "pf_valid");
      check(pb_alloc == x_alloc, "pb_alloc");
      check(mark == (x_inc || x_alloc), "mark");
      e_ext   += int'(x_inc);
      e_pf    += int'(x_alloc);
      e_stall += int'(act && !pb_hit && !pb_free_avail);
    end
    @(negedge clk);
    check(n_extend == 32'(e_ext), "n_extend");
    check(n_prefetch == 32'(e_pf), "n_prefetch");
    check(n_full_stall == 32'(e_stall), "n_full_stall");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
