// tb_ntru_workload: the T_conv(s) workload for (N, p, q) = (251, 3, 128) with
// r in tau(36, 36), for the two shift reaches s = 4 and s = 8 and with the
// look-up-table mod-p reducer (the Mersenne reducer is covered by
// tb_ntru_engine). Expected statistics of T_conv over random r: s = 4 mean
// 96.4, range 85..106; s = 8 mean 76.85, range 72..85. The helper
// ntru_workload_run runs and checks each configuration.
module tb_ntru_workload;
  import ntru_pkg::*;

  logic done4, done8;
  int   checks4, failures4, checks8, failures8;
  int   checks = 0, failures = 0;

  ntru_workload_run #(.S(4), .MODP(MODP_LUT), .NRUNS(5000), .EXP_MEAN(96.4),  .EXP_MIN(85), .EXP_MAX(106))
    u_s4 (.done(done4), .checks(checks4), .failures(failures4));
  ntru_workload_run #(.S(8), .MODP(MODP_LUT), .NRUNS(5000), .EXP_MEAN(76.85), .EXP_MIN(72), .EXP_MAX(85))
    u_s8 (.done(done8), .checks(checks8), .failures(failures8));

  initial begin
    #1;                            // the runs clear done at time 0
    wait (done4 === 1'b1 && done8 === 1'b1);
    checks = checks4 + checks8;
    failures = failures4 + failures8;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    checks = checks4 + checks8;
    failures = failures4 + failures8 + 1;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
