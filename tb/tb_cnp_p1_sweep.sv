// tb_cnp_p1_sweep: the P = 1 check node processor at the corners of the
// complexity sweep it is meant for: message widths of 5 and 7 bits and
// maximum check degrees from 4 up to 34, the largest degree of the sweep.
// Each corner runs in its own cnp_p1_sweep_harness (random nodes of all
// degrees up to the maximum, outputs against the reference model, d + 2
// latency checked); the results are summed.
module tb_cnp_p1_sweep;
  localparam int NCFG = 4;
  bit done [NCFG];
  int checks [NCFG], failures [NCFG];

  cnp_p1_sweep_harness #(.NM(5), .DCN_MAX(4)) u_5_4 (
    .done(done[0]), .checks(checks[0]), .failures(failures[0]));
  cnp_p1_sweep_harness #(.NM(5), .DCN_MAX(34)) u_5_34 (
    .done(done[1]), .checks(checks[1]), .failures(failures[1]));
  cnp_p1_sweep_harness #(.NM(7), .DCN_MAX(4)) u_7_4 (
    .done(done[2]), .checks(checks[2]), .failures(failures[2]));
  cnp_p1_sweep_harness #(.NM(7), .DCN_MAX(34)) u_7_34 (
    .done(done[3]), .checks(checks[3]), .failures(failures[3]));

  int total_checks, total_failures;

  initial begin
    wait (done[0] && done[1] && done[2] && done[3]);
    total_checks = 0;
    total_failures = 0;
    for (int i = 0; i < NCFG; i++) begin
      total_checks += checks[i];
      total_failures += failures[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", total_checks, total_failures);
    $finish;
  end

  // outer watchdog, in case a harness never signals done
  initial begin
    #10ms;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d",
             checks[0] + checks[1] + checks[2] + checks[3],
             failures[0] + failures[1] + failures[2] + failures[3] + 1);
    $finish;
  end
endmodule
