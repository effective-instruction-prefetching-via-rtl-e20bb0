// tb_fetch_block_splitter: self-checking test of the fetch block splitter.
// Random fetch blocks (random start address and length 1..63) are fed with a
// random output back-pressure. A reference model cuts each block at the
// 64-byte line boundaries and the produced fetch cache lines must match it in
// order. A block that fits in one line must appear in the cycle after it is
// accepted (one line per cycle). A flush in the middle of a block must drop
// the rest of it.
module tb_fetch_block_splitter;
  import clgp_pkg::*;

  logic clk = 0, rst_n = 0, flush = 0;
  logic fb_valid = 0, fb_ready, out_valid, out_ready = 0;
  logic [ADDR_W-1:0] fb_addr = '0;
  logic [FB_LEN_W-1:0] fb_len = '0;
  fcl_t out_fcl;
  int checks = 0, failures = 0;
  fcl_t exp_q[$];

  fetch_block_splitter dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic model(input logic [ADDR_W-1:0] a, input int len);
    int ia = int'(a >> 2);
    int rem = len;
    while (rem > 0) begin
      fcl_t f;
      int slot = ia % 16;
      int take = (rem < 16 - slot) ? rem : 16 - slot;
      f.laddr = laddr_t'(ia / 16);
      f.first = SLOT_W'(slot);
      f.count = (SLOT_W+1)'(take);
      f.last  = (take == rem);
      exp_q.push_back(f);
      ia += take; rem -= take;
    end
  endtask

  // Compare every produced line with the model.
  always @(posedge clk) if (rst_n && !flush && out_valid && out_ready) begin
    fcl_t e;
    checks++;
    if (exp_q.size() == 0) begin failures++; $display("unexpected line %p", out_fcl); end
    else begin
      e = exp_q.pop_front();
      if (out_fcl !== e) begin failures++; $display("got %p exp %p", out_fcl, e); end
    end
  end

  initial begin
    int t0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // Single-line block: out the cycle after acceptance.
    @(negedge clk);
    out_ready = 1; fb_valid = 1; fb_addr = 32'h0000_1004; fb_len = 3;
    model(fb_addr, 3);
    @(negedge clk); fb_valid = 0;
    checks++;
    if (!out_valid) begin failures++; $display("single-line block not out after 1 cycle"); end
    @(negedge clk);
    // Random blocks.
    for (int b = 0; b < 3000; b++) begin
      automatic logic [ADDR_W-1:0] a = $urandom() & 32'hFFFF_FFFC;
      automatic int len = 1 + ($urandom() % 63);
      fb_valid = 1; fb_addr = a; fb_len = FB_LEN_W'(len);
      do begin out_ready = ($urandom() % 4) != 0; @(posedge clk); end while (!fb_ready);
      model(a, len);
      @(negedge clk); fb_valid = 0;
    end
    out_ready = 1;
    while (out_valid) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("%0d lines missing", exp_q.size()); end
    // Flush in the middle of a long block.
    fb_valid = 1; fb_addr = 32'h0000_2000; fb_len = 60;
    @(negedge clk); fb_valid = 0;
    exp_q.push_back('{laddr: laddr_t'(32'h2000 >> 6), first: '0, count: 16, last: 1'b0});
    @(negedge clk);
    flush = 1; @(negedge clk); flush = 0;
    exp_q.delete();
    repeat (3) @(negedge clk);
    checks++;
    if (out_valid) begin failures++; $display("lines after flush"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
