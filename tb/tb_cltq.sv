// tb_cltq: self-checking test of the cache line target queue.
// Random pushes, pops, prestage marks and occasional flushes drive a small
// queue (8 entries, 3 fetch blocks, so both limits are reached). A queue model
// holds every entry with its prefetched bit; each cycle the head, the
// prestaging candidate (oldest entry not yet prefetched, withheld while it
// is popped), push_ready, the
// entry count and the block count are compared with it.
module tb_cltq;
  import clgp_pkg::*;
  localparam int DEPTH = 8, MAXB = 3;

  logic clk = 0, rst_n = 0, flush = 0;
  logic push_valid = 0, push_ready, head_valid, head_pf, pop = 0, cand_valid, mark = 0;
  fcl_t push_fcl = '0, head_fcl, cand_fcl;
  logic [$clog2(DEPTH+1)-1:0] count;
  logic [$clog2(MAXB+1)-1:0]  blocks;
  int checks = 0, failures = 0;
  int full_seen = 0, blk_limit_seen = 0;

  typedef struct { fcl_t f; bit pf; } ent_t;
  ent_t q[$];
  bit mid = 0;
  int nblk = 0;

  cltq #(.DEPTH(DEPTH), .MAX_BLOCKS(MAXB)) dut (.*);

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
    for (int cyc = 0; cyc < 20000; cyc++) begin
      int ci;
      bit exp_pr, exp_cv, do_push, do_pop, do_mark;
      @(negedge clk);
      flush      = ($urandom() % 200) == 0;
      push_valid = ($urandom() % 3) != 0;
      push_fcl   = fcl_t'({$urandom(), $urandom()});
      push_fcl.last = ($urandom() % 3) == 0;
      pop        = ($urandom() % 3) == 0;
      mark       = ($urandom() % 2) == 0;
      #1;
      // expected outputs
      ci = -1;
      foreach (q[i]) if (!q[i].pf && ci < 0) ci = i;
      exp_pr = !flush && q.size() < DEPTH && (mid || nblk < MAXB);
      do_pop = pop && q.size() > 0 && !flush;
      exp_cv = !flush && ci >= 0 && !(do_pop && ci == 0);
      check(push_ready == exp_pr, "push_ready");
      check(head_valid == (q.size() > 0), "head_valid");
      if (q.size() > 0) begin
        check(head_fcl == q[0].f, "head_fcl");
        check(head_pf == q[0].pf, "head_pf");
      end
      check(cand_valid == exp_cv, "cand_valid");
      if (exp_cv) check(cand_fcl == q[ci].f, "cand_fcl");
      check(int'(count) == q.size(), "count");
      check(int'(blocks) == nblk, "blocks");
      if (q.size() == DEPTH) full_seen++;
      if (!mid && nblk == MAXB && q.size() < DEPTH) blk_limit_seen++;
      // update model as the DUT does at the next edge
      do_push = push_valid && exp_pr;
      do_mark = mark && exp_cv;
      if (flush) begin
        q.delete(); mid = 0; nblk = 0;
      end else begin
        if (do_mark) q[ci].pf = 1;
        if (do_pop) begin
          if (q[0].f.last) nblk--;
          void'(q.pop_front());
        end
        if (do_push) begin
          ent_t e; e.f = push_fcl; e.pf = 0;
          if (!mid) nblk++;
          mid = !push_fcl.last;
          q.push_back(e);
        end
      end
    end
    check(full_seen > 0, "queue never full");
    check(blk_limit_seen > 0, "block limit never reached");
    $display("full cycles %0d, block-limited cycles %0d", full_seen, blk_limit_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
