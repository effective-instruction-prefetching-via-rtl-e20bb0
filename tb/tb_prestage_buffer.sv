// tb_prestage_buffer: self-checking test of the prestage buffer.
// A 4-entry buffer with a 3-cycle read is driven with random engine lookups,
// increments and allocations, prefetch fills, fetch reads and decrements and
// rare flushes, over 6 line addresses so that entries are replaced. A model
// keeps every entry (line, consumers counter, valid bit) and the LRU order
// as a list; each cycle it predicts the lookup results, the LRU free entry,
// and the line read 3 cycles earlier. It also checks that an entry whose
// counter is not zero is never replaced.
module tb_prestage_buffer;
  import clgp_pkg::*;
  localparam int N = 4, CW = 6, LAT = 3, POOL = 6;

  logic clk = 0, rst_n = 0, flush = 0;
  laddr_t e_laddr = '0, fill_laddr = '0, f_laddr = '0;
  logic e_hit, free_avail, e_inc = 0, e_alloc = 0, fill_valid = 0;
  logic [$clog2(N)-1:0] free_idx;
  line_t fill_data = '0, rd_data;
  logic f_match, f_hit, f_read = 0, f_dec = 0, rd_valid;
  logic [CW-1:0] f_cnt;
  int checks = 0, failures = 0;
  int n_alloc = 0, n_inc = 0, n_read = 0, n_dropfill = 0;

  prestage_buffer #(.ENTRIES(N), .CNT_W(CW), .RD_LAT(LAT)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit m_alloc[N], m_valid[N];
  laddr_t m_tag[N];
  int m_cnt[N];
  line_t m_data[N];
  int lru[$];            // entry numbers, most recently used first
  bit pv[LAT];
  line_t pd[LAT];

  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("%0t: %s", $time, msg); end
  endtask

  function automatic int find(laddr_t a);
    for (int i = 0; i < N; i++) if (m_alloc[i] && m_tag[i] == a) return i;
    return -1;
  endfunction

  function automatic int lru_free();
    for (int k = N - 1; k >= 0; k--) if (m_cnt[lru[k]] == 0) return lru[k];
    return -1;
  endfunction

  task automatic touch(int e);
    foreach (lru[k]) if (lru[k] == e) begin lru.delete(k); break; end
    lru.push_front(e);
  endtask

  initial begin
    for (int i = 0; i < N; i++) begin m_alloc[i] = 0; m_valid[i] = 0; m_cnt[i] = 0; lru.push_back(i); end
    for (int s = 0; s < LAT; s++) pv[s] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      int eh, fh, fr, fi;
      bit alloc_now;
      @(negedge clk);
      flush      = ($urandom() % 150) == 0;
      e_laddr    = laddr_t'($urandom() % POOL);
      e_inc      = 1'($urandom() % 2);
      e_alloc    = 1'($urandom() % 2);
      fill_valid = ($urandom() % 3) == 0;
      fill_laddr = laddr_t'($urandom() % POOL);
      fill_data  = line_t'({$urandom(), $urandom(), fill_laddr});
      f_laddr    = laddr_t'($urandom() % POOL);
      f_read     = 1'($urandom() % 2);
      f_dec      = 1'($urandom() % 2);
      #1;
      eh = find(e_laddr); fh = find(f_laddr); fr = lru_free();
      check(e_hit == (eh >= 0), "e_hit");
      check(free_avail == (fr >= 0), "free_avail");
      if (fr >= 0) check(int'(free_idx) == fr, "free_idx not the LRU free entry");
      check(f_match == (fh >= 0), "f_match");
      check(f_hit == (fh >= 0 && m_valid[fh]), "f_hit");
      if (fh >= 0) check(int'(f_cnt) == m_cnt[fh], $sformatf("f_cnt %0d exp %0d ent %0d", f_cnt, m_cnt[fh], fh));
      check(rd_valid == pv[LAT-1], "rd_valid");
      if (pv[LAT-1]) check(rd_data == pd[LAT-1], "rd_data");
      // model update
      for (int s = LAT - 1; s > 0; s--) begin pv[s] = pv[s-1] && !flush; pd[s] = pd[s-1]; end
      pv[0] = f_read && fh >= 0 && m_valid[fh] && !flush;
      if (fh >= 0) pd[0] = m_data[fh];
      if (pv[0]) n_read++;
      alloc_now = !flush && e_alloc && eh < 0 && fr >= 0;
      if (!flush && e_alloc && eh < 0 && fr >= 0) touch(fr);
      if (pv[0]) touch(fh);
      for (int i = 0; i < N; i++)
        if (fill_valid && m_alloc[i] && !m_valid[i] && m_tag[i] == fill_laddr) begin
          m_data[i] = fill_data; m_valid[i] = 1;
        end
      if (flush) begin
        for (int i = 0; i < N; i++) m_cnt[i] = 0;
      end else begin
        // a decrement sees the counter as it was before this cycle
        automatic bit dec = f_dec && fh >= 0 && m_cnt[fh] > 0;
        if (e_inc && eh >= 0) begin m_cnt[eh]++; n_inc++; end
        if (dec) m_cnt[fh]--;
        if (alloc_now) begin
          check(m_cnt[fr] == 0, "replaced an entry with consumers");
          m_tag[fr] = e_laddr; m_alloc[fr] = 1; m_valid[fr] = 0; m_cnt[fr] = 1;
          n_alloc++;
        end
      end
    end
    check(n_alloc > 100 && n_inc > 100 && n_read > 100, "too few operations");
    $display("alloc %0d inc %0d read %0d", n_alloc, n_inc, n_read);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
