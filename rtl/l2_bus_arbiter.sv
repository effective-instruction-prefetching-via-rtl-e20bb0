// l2_bus_arbiter: arbitration of the single L2 bus.
//
// The bus to the L2 cache carries one request per cycle. Data cache requests
// have the highest priority, then I-cache (demand) requests, and prefetch
// requests go out only in a cycle when neither of the others uses the bus;
// this order follows the evaluated machine. The arbiter is combinational: a
// requester holds valid and its line address until it sees its grant.
//
// Interface: *_valid/*_laddr per requester, *_grant back; bus_valid,
// bus_laddr and bus_src (which requester) go to the L2.
//
// dc_grant equals dc_valid: the data cache is never refused.
module l2_bus_arbiter
  import clgp_pkg::*;
(
  input  logic      dc_valid,
  input  laddr_t    dc_laddr,
  output logic      dc_grant,
  input  logic      ic_valid,
  input  laddr_t    ic_laddr,
  output logic      ic_grant,
  input  logic      pf_valid,
  input  laddr_t    pf_laddr,
  output logic      pf_grant,
  output logic      bus_valid,
  output laddr_t    bus_laddr,
  output l2_req_e   bus_src
);

  always_comb begin
    dc_grant  = dc_valid;
    ic_grant  = ic_valid && !dc_valid;
    pf_grant  = pf_valid && !dc_valid && !ic_valid;
    bus_valid = dc_valid || ic_valid || pf_valid;
    unique case (1'b1)
      dc_grant: begin bus_laddr = dc_laddr; bus_src = L2R_DCACHE;   end
      ic_grant: begin bus_laddr = ic_laddr; bus_src = L2R_ICACHE;   end
      pf_grant: begin bus_laddr = pf_laddr; bus_src = L2R_PREFETCH; end
      default:  begin bus_laddr = '0;       bus_src = L2R_NONE;     end
    endcase
  end

endmodule
