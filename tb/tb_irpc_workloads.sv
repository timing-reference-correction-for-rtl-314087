// Workload testbench: the two latency measurements of the iRPC system tests,
// each run on a complete system (irpc_measure_scenario) at default
// parameters with one-way link delays chosen to give the reported counts.
//   emulator test: loopbacks of 216 and 215 counts of 2.5 ns (540.0 and
//                  537.5 ns) and 22 counts of 25 ns on both links; the
//                  faster link is link 1 and the correction is a half step;
//   FEB test:      loopbacks of 637 and 716 counts, correction
//                  (716 - 637) / 2 = 39 with a half-step remainder.
// With the loopback = 2 x one-way delay + 50.84 counts of fixed logic and
// transceiver latency of this model, the one-way delays are 206.95/205.7 ns
// and 733.2/831.95 ns (whole 25 ns frames in the link model plus the
// remainder as clock phase).
module tb_irpc_workloads;
  bit done_a, done_b;
  int checks_a, failures_a, checks_b, failures_b;

  irpc_measure_scenario #(.KD0(8), .KD1(8), .FD0(6.95), .FD1(5.7),
                          .EXP0(216), .EXP1(215), .EXPBX(22), .NAME("emulator test")) u_emu (
    .done(done_a), .checks(checks_a), .failures(failures_a));

  irpc_measure_scenario #(.KD0(29), .KD1(33), .FD0(8.2), .FD1(6.95),
                          .EXP0(637), .EXP1(716), .EXPBX(0), .NAME("FEB test")) u_feb (
    .done(done_b), .checks(checks_b), .failures(failures_b));

  initial begin
    #2ms;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks_a + checks_b, failures_a + failures_b + 1);
    $finish;
  end

  initial begin
    wait (done_a && done_b);
    $display("TB_RESULT checks=%0d failures=%0d", checks_a + checks_b, failures_a + failures_b);
    $finish;
  end
endmodule
