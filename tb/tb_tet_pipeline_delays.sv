// tb_tet_pipeline_delays: runs the pipeline in three timing situations side
// by side, each against the ideal cycle-level pipeline:
//   * both paths shorter than the clock period (15 ns / 15 ns): no timing
//     error, FF2 never holds a stale value, FF3 never sees late data;
//   * stage-1 path 1 ns too long, stage-2 path short (21 ns / 15 ns): a
//     single-stage error that FF2 corrects in the cycle; borrowing the clock
//     for FF3 is then harmless;
//   * stage-1 path 2.5 ns too long, stage-2 path 18.5 ns (22.5 ns / 18.5 ns):
//     a successive-stage error, FF3's data arrives 1 ns after the edge and is
//     caught by the delayed clock.
// The default-delay case (21 ns / 19.5 ns) is tb_tet_pipeline_top.
module tb_tet_pipeline_delays;
  logic done_a, done_b, done_c;
  int checks_a, checks_b, checks_c, fail_a, fail_b, fail_c;
  int checks, failures;

  tet_pipeline_run #(.PATH1_PS(15000), .PATH2_PS(15000), .EXPECT_LATE1(1'b0), .EXPECT_LATE2(1'b0))
    run_a (.done(done_a), .checks(checks_a), .failures(fail_a));
  tet_pipeline_run #(.PATH1_PS(21000), .PATH2_PS(15000), .EXPECT_LATE1(1'b1), .EXPECT_LATE2(1'b0))
    run_b (.done(done_b), .checks(checks_b), .failures(fail_b));
  tet_pipeline_run #(.PATH1_PS(22500), .PATH2_PS(18500), .EXPECT_LATE1(1'b1), .EXPECT_LATE2(1'b1))
    run_c (.done(done_c), .checks(checks_c), .failures(fail_c));

  initial begin
    wait (done_a && done_b && done_c);
    checks   = checks_a + checks_b + checks_c;
    failures = fail_a + fail_b + fail_c;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10us;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks_a + checks_b + checks_c,
             fail_a + fail_b + fail_c + 1);
    $finish;
  end
endmodule
