// tet_pipeline_run: testbench helper that runs one tet_pipeline_top with the
// given path delays for NCYC cycles of a 20 ns clock and checks it against
// the ideal cycle-level pipeline
//   q1[k] = d[k-1], q2[k] = ~(q1[k-1] & b1[k-1]), q3[k] = ~(q2[k-1] | b2[k-1]).
// Inputs change 0.2 ns after each rising edge; d only after edges 4j and b1
// only after edges 4j+3, so the stage-1 logic never sees two input changes in
// one cycle and its output changes are at least two cycles apart.
// It reports how often FF2 held a stale value right after an edge (late
// stage-1 data that had to be corrected) and how often FF3's input was still
// changing at the edge (late stage-2 data that needed the delayed clock), and
// fails if either count is nonzero when EXPECT_LATE is 0, or zero when it
// is 1. Outputs: done pulses high when the run ends; checks and failures are
// valid from then on.
module tet_pipeline_run #(
  parameter int PATH1_PS    = 21000,
  parameter int PATH2_PS    = 19500,
  parameter bit EXPECT_LATE1 = 1'b1,
  parameter bit EXPECT_LATE2 = 1'b1,
  parameter int NCYC        = 200
) (
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int FLUSH = 6;
  int n_stale_q2 = 0, n_late_ff3 = 0;

  logic clk = 1'b0, rst = 1'b1;
  logic d = 1'b0, b1 = 1'b0, b2 = 1'b0;
  logic q1, q2, q3, er, cm, cm_sr, borrow, clk_tb;
  logic d_in [NCYC + 1], b1_in [NCYC + 1], b2_in [NCYC + 1];
  logic exp_q1 [NCYC + 1], exp_q2 [NCYC + 1], exp_q3 [NCYC + 1];

  tet_pipeline_top #(.PATH1_PS(PATH1_PS), .PATH2_PS(PATH2_PS)) dut (
    .clk(clk), .rst(rst), .d(d), .b1(b1), .b2(b2),
    .q1(q1), .q2(q2), .q3(q3), .er(er), .cm(cm), .cm_sr(cm_sr),
    .borrow(borrow), .clk_tb(clk_tb)
  );

  always #(tet_pkg::CLK_PERIOD_PS * 1ps / 2) clk = ~clk;

  task automatic check(input logic got, input logic exp, input string what, input int k);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 6)
        $display("FAIL [%0d/%0d ps] edge %0d %s: got %b expected %b", PATH1_PS, PATH2_PS, k, what, got, exp);
    end
  endtask

  initial begin
    done = 1'b0;
    checks = 0;
    failures = 0;
    for (int k = 0; k <= NCYC; k++) begin
      d_in[k]  = (k % 4 == 0) ? 1'($urandom) : d_in[k-1];
      b1_in[k] = (k % 4 == 3) ? 1'($urandom) : ((k == 0) ? 1'b0 : b1_in[k-1]);
      b2_in[k] = 1'($urandom);
      exp_q1[k] = (k >= 1) ? d_in[k-1] : 1'b0;
      exp_q2[k] = (k >= 2) ? ~(exp_q1[k-1] & b1_in[k-1]) : 1'b0;
      exp_q3[k] = (k >= 3) ? ~(exp_q2[k-1] | b2_in[k-1]) : 1'b0;
    end
    for (int k = 0; k < NCYC; k++) begin
      @(posedge clk);
      if (k == 2) rst = 1'b0;
      #0.1;
      if (k >= FLUSH && dut.c2_late !== exp_q3[k]) n_late_ff3++;
      #0.1 d = d_in[k]; b1 = b1_in[k]; b2 = b2_in[k];
      #0.3;
      if (k >= FLUSH && q2 !== exp_q2[k]) n_stale_q2++;
      #7.5;
      if (k >= FLUSH) begin
        check(q1, exp_q1[k], "q1", k);
        check(q2, exp_q2[k], "q2", k);
        check(q3, exp_q3[k], "q3", k);
      end
    end
    $display("[PATH1=%0d ps PATH2=%0d ps] stale_q2_after_edge=%0d late_ff3_inputs=%0d",
             PATH1_PS, PATH2_PS, n_stale_q2, n_late_ff3);
    checks += 2;
    if ((n_stale_q2 != 0) != EXPECT_LATE1) begin
      failures++;
      $display("FAIL stage-1 late count %0d", n_stale_q2);
    end
    if ((n_late_ff3 != 0) != EXPECT_LATE2) begin
      failures++;
      $display("FAIL stage-2 late count %0d", n_late_ff3);
    end
    done = 1'b1;
  end
endmodule
