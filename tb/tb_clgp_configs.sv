// tb_clgp_configs: runs the prestaging front end in the other evaluated
// configurations, side by side, each driven and checked by a
// clgp_cfg_harness:
//   * 90 nm: 16-entry prestage buffer read in 2 cycles, 512-byte (8-line)
//     L0, 4 KB L1 with a 3-cycle hit, L2 at 17 cycles;
//   * 45 nm with an 8 KB L1 (4-cycle hit), 256-byte L0, 16-entry prestage
//     buffer in 3 stages, L2 at 24 cycles;
//   * 45 nm with a 4-entry (256-byte) prestage buffer, which is read in one
//     cycle, and a 1 KB L1 (3-cycle hit).
// Latencies follow the cache latency table of the evaluated machine for each
// size and process. Each harness checks fetch order and contents and that
// every fetch path was used; this testbench sums the counts.
module tb_clgp_configs;
  logic clk = 0;
  always #5 clk = ~clk;

  logic d90, d8k, d4e;
  int   c90, c8k, c4e, f90, f8k, f4e;

  clgp_cfg_harness #(.PB_ENTRIES(16), .PB_LAT(2), .L0_ENTRIES(8), .L1_SIZE(4096),
                     .L1_LAT(3), .L2LAT(17)) u_90nm
    (.clk, .done(d90), .checks(c90), .failures(f90));
  clgp_cfg_harness #(.PB_ENTRIES(16), .PB_LAT(3), .L0_ENTRIES(4), .L1_SIZE(8192),
                     .L1_LAT(4), .L2LAT(24)) u_45nm_8k
    (.clk, .done(d8k), .checks(c8k), .failures(f8k));
  clgp_cfg_harness #(.PB_ENTRIES(4), .PB_LAT(1), .L0_ENTRIES(4), .L1_SIZE(1024),
                     .L1_LAT(3), .L2LAT(24)) u_45nm_pb4
    (.clk, .done(d4e), .checks(c4e), .failures(f4e));

  initial begin
    repeat (1500000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c90 + c8k + c4e, f90 + f8k + f4e + 1);
    $finish;
  end

  initial begin
    automatic int checks = 0, failures = 0;
    wait (d90 && d8k && d4e);
    @(posedge clk);
    // Each harness must have done real work: at least its line checks.
    checks = c90 + c8k + c4e + 3;
    failures = f90 + f8k + f4e;
    if (c90 < 1000) begin failures++; $display("90 nm run too short"); end
    if (c8k < 1000) begin failures++; $display("8 KB run too short"); end
    if (c4e < 1000) begin failures++; $display("4-entry run too short"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
