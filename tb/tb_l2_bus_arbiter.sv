// tb_l2_bus_arbiter: self-checking test of the L2 bus arbitration.
// Every combination of the three requesters is applied with random line
// addresses. Exactly one request may be granted: the data cache's first,
// then the I-cache's, and a prefetch only when neither other requester is
// active; the bus carries the granted requester's address and source.
module tb_l2_bus_arbiter;
  import clgp_pkg::*;

  logic dc_valid, ic_valid, pf_valid, dc_grant, ic_grant, pf_grant, bus_valid;
  laddr_t dc_laddr, ic_laddr, pf_laddr, bus_laddr;
  l2_req_e bus_src;
  int checks = 0, failures = 0;

  l2_bus_arbiter dut (.*);

  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("%0t: %s", $time, msg); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 800; i++) begin
      {dc_valid, ic_valid, pf_valid} = 3'(i);
      dc_laddr = laddr_t'($urandom()); ic_laddr = laddr_t'($urandom()); pf_laddr = laddr_t'($urandom());
      #1;
      check(dc_grant == dc_valid, "dc_grant");
      check(ic_grant == (ic_valid && !dc_valid), "ic_grant");
      check(pf_grant == (pf_valid && !dc_valid && !ic_valid), "pf_grant");
      check(bus_valid == (dc_valid || ic_valid || pf_valid), "bus_valid");
      check($countones({dc_grant, ic_grant, pf_grant}) <= 1, "one grant per cycle");
      if (dc_valid)      check(bus_laddr == dc_laddr && bus_src == L2R_DCACHE, "dc on bus");
      else if (ic_valid) check(bus_laddr == ic_laddr && bus_src == L2R_ICACHE, "ic on bus");
      else if (pf_valid) check(bus_laddr == pf_laddr && bus_src == L2R_PREFETCH, "pf on bus");
      else               check(bus_src == L2R_NONE, "idle bus");
      #9;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
