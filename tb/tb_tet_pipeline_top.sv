// tb_tet_pipeline_top: end-to-end run of the three-flip-flop pipeline at its
// default delays (stage-1 path 21 ns, stage-2 path 19.5 ns) with a 20 ns,
// 50% duty-cycle clock.
//
// Every change of the stage-1 result therefore reaches FF2 1 ns after the
// rising edge it was meant for (a timing error that FF2 must correct), and a
// corrected FF2 output reaches FF3 0.5 ns after the following edge (a
// successive-stage error that only the delayed clock CLK_TB can catch).
// Stimulus is random, with d changed only after edges 4j and b1 only after
// edges 4j+3. Then only one input of the stage-1 logic changes in any cycle
// (no hazard on the late path) and stage-1 errors never fall in two
// consecutive cycles (the time-borrowing circuit can borrow at most every
// other cycle); b2 changes freely and its changes reach FF3 in time.
//
// A cycle-level reference of the ideal pipeline gives the value each flip-flop
// must hold after each edge:
//   q1[k] = d[k-1], q2[k] = ~(q1[k-1] & b1[k-1]), q3[k] = ~(q2[k-1] | b2[k-1])
// where d[k], b1[k], b2[k] are driven 0.2 ns after edge k. The testbench
// checks all three 8 ns after each edge, and counts how often each mechanism
// happened: stale FF2 output right after the edge (late stage-1 data),
// corrections, borrowed cycles, late FF3 inputs (successive-stage errors) and
// in-time FF3 changes. A mechanism that never happened is a failure.
module tb_tet_pipeline_top;
  localparam int NCYC  = 300;
  localparam int FLUSH = 6;
  int checks = 0, failures = 0;
  int n_stale_q2 = 0, n_corrected = 0, n_borrow = 0, n_late_ff3 = 0;
  int n_intime_ff3 = 0, n_cm_high_phase = 0;

  logic clk = 1'b0, rst = 1'b1;
  logic d = 1'b0, b1 = 1'b0, b2 = 1'b0;
  logic q1, q2, q3, er, cm, cm_sr, borrow, clk_tb;

  logic d_in [NCYC + 1], b1_in [NCYC + 1], b2_in [NCYC + 1];
  logic exp_q1 [NCYC + 1], exp_q2 [NCYC + 1], exp_q3 [NCYC + 1];

  tet_pipeline_top dut (
    .clk(clk), .rst(rst), .d(d), .b1(b1), .b2(b2),
    .q1(q1), .q2(q2), .q3(q3), .er(er), .cm(cm), .cm_sr(cm_sr),
    .borrow(borrow), .clk_tb(clk_tb)
  );

  always #(tet_pkg::CLK_PERIOD_PS * 1ps / 2) clk = ~clk;  // edge k at 10 + 20k ns

  always @(posedge cm) if (clk) n_cm_high_phase++;

  task automatic check(input logic got, input logic exp, input string what, input int k);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 12) $display("FAIL edge %0d %s: got %b expected %b", k, what, got, exp);
    end
  endtask

  initial begin
    // Stimulus and reference.
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
      if (k >= FLUSH) begin
        if (dut.c2_late !== exp_q3[k]) n_late_ff3++;
        else if (exp_q3[k] != exp_q3[k-1]) n_intime_ff3++;
      end
      #0.1 d = d_in[k]; b1 = b1_in[k]; b2 = b2_in[k];
      #0.3;                                   // edge + 0.5 ns
      if (k >= FLUSH) begin
        if (borrow) n_borrow++;
        if (q2 !== exp_q2[k]) n_stale_q2++;
      end
      #7.5;                                   // edge + 8 ns
      if (k >= FLUSH) begin
        check(q1, exp_q1[k], "q1", k);
        check(q2, exp_q2[k], "q2", k);
        check(q3, exp_q3[k], "q3", k);
      end
    end

    $display("stale_q2_after_edge=%0d cm_pulses_in_high_phase=%0d borrowed_cycles=%0d",
             n_stale_q2, n_cm_high_phase, n_borrow);
    $display("late_ff3_inputs=%0d in_time_ff3_changes=%0d", n_late_ff3, n_intime_ff3);
    checks++;
    if (n_stale_q2 == 0 || n_cm_high_phase == 0 || n_borrow == 0 ||
        n_late_ff3 == 0 || n_intime_ff3 == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #((NCYC + 20) * 20 * 1ns);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
