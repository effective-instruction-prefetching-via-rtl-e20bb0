// tb_l0_cache: self-checking test of the L0 emergency cache.
// Random lookups (marked used on a hit) and fills over 8 line addresses
// drive the 4-line cache. A model keeps the lines in LRU order; each cycle
// the hit flag and the data are compared, and a fill of a new line must
// replace the least recently used one.
module tb_l0_cache;
  import clgp_pkg::*;
  localparam int N = 4;

  logic clk = 0, rst_n = 0;
  laddr_t lk_laddr = '0, fill_laddr = '0;
  logic lk_hit, lk_use = 0, fill_valid = 0;
  line_t lk_data, fill_data = '0;
  int checks = 0, failures = 0, hits = 0, evictions = 0;

  typedef struct { laddr_t a; line_t d; } ent_t;
  ent_t m[$];                 // most recently used first

  l0_cache #(.ENTRIES(N)) dut (.*);

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

  function automatic int find(laddr_t a);
    foreach (m[i]) if (m[i].a == a) return i;
    return -1;
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      int h, f;
      ent_t e;
      @(negedge clk);
      lk_laddr   = laddr_t'($urandom() % 8);
      lk_use     = 1'($urandom() % 2);
      fill_valid = 1'($urandom() % 3 == 0);
      fill_laddr = laddr_t'($urandom() % 8);
      fill_data  = line_t'({$urandom(), $urandom(), $urandom()});
      #1;
      h = find(lk_laddr);
      check(lk_hit == (h >= 0), "lk_hit");
      if (h >= 0) begin check(lk_data == m[h].d, "lk_data"); hits++; end
      if (lk_use && h >= 0) begin e = m[h]; m.delete(h); m.push_front(e); end
      if (fill_valid) begin
        f = find(fill_laddr);
        if (f >= 0) m.delete(f);
        else if (m.size() == N) begin void'(m.pop_back()); evictions++; end
        e.a = fill_laddr; e.d = fill_data;
        m.push_front(e);
      end
    end
    check(hits > 1000 && evictions > 100, "too few hits or evictions");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
