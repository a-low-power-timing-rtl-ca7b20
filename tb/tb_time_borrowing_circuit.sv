// tb_time_borrowing_circuit: drives CLK and a CM built as in the protected
// flip-flop (CM = pulse | ~CLK), injects correction pulses in chosen cycles,
// and checks cycle by cycle that CLK_TB is the delayed clock (rising
// CLKD_PS after CLK) exactly in the cycle after a correction and CLK
// otherwise, that it never glitches while CLK is low, and that a correction
// in a cycle that is itself borrowing is not recorded (borrowing at most
// every other cycle). Clock 20 ns, time unit 1 ns.
module tb_time_borrowing_circuit;
  localparam int NCYC = 120;
  int checks = 0, failures = 0, n_borrow = 0, n_dropped = 0;
  logic clk = 1'b0, rst = 1'b1, pulse = 1'b0;
  logic cm, clk_tb, cm_sr, borrow;
  logic pulse_in_cycle [NCYC];
  logic exp_borrow [NCYC + 1];
  int clk_tb_low_edges = 0;

  assign cm = pulse | ~clk;

  time_borrowing_circuit dut (
    .clk(clk), .rst(rst), .cm(cm), .clk_tb(clk_tb), .cm_sr(cm_sr), .borrow(borrow)
  );

  always #(tet_pkg::CLK_PERIOD_PS * 1ps / 2) clk = ~clk;  // rising edges at 10, 30, ... ns

  // Any CLK_TB rising edge while CLK is low is a glitch.
  always @(posedge clk_tb) if (!clk) clk_tb_low_edges++;

  task automatic check(input logic got, input logic exp, input string what, input int n);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL cycle %0d %s: got %b expected %b", n, what, got, exp);
    end
  endtask

  initial begin
    // Reference: cycle n borrows if cycle n-1 had a pulse and did not borrow.
    exp_borrow[0] = 1'b0;
    for (int n = 0; n < NCYC; n++) begin
      pulse_in_cycle[n] = ($urandom_range(0, 2) == 0) || (n == 20) || (n == 21);
      exp_borrow[n + 1] = pulse_in_cycle[n] && !exp_borrow[n];
      if (pulse_in_cycle[n] && exp_borrow[n]) n_dropped++;
    end
    // Reset, and wait out the delay buffer's start-up.
    repeat (2) @(posedge clk);
    #12 rst = 1'b0;           // released while CLK is low
    for (int n = 0; n < NCYC; n++) begin
      @(posedge clk);
      #1 check(clk_tb, !exp_borrow[n], "CLK_TB at edge+1ns", n);
      check(borrow, exp_borrow[n], "borrow", n);
      if (exp_borrow[n]) n_borrow++;
      #3 check(clk_tb, 1'b1, "CLK_TB at edge+4ns", n);
      if (pulse_in_cycle[n]) begin
        #1 pulse = 1'b1;      // correction pulse at edge + 5 ns
        #2 pulse = 1'b0;
        #1;
      end else #4;
      // edge + 9 ns: latch shows the recorded correction
      check(cm_sr, pulse_in_cycle[n] && !exp_borrow[n], "CM_SR", n);
      @(negedge clk);
      #1 check(clk_tb, 1'b0, "CLK_TB in low phase", n);
    end
    checks++;
    if (clk_tb_low_edges != 0) begin
      failures++;
      $display("FAIL %0d CLK_TB glitches", clk_tb_low_edges);
    end
    $display("borrowed_cycles=%0d dropped_corrections=%0d", n_borrow, n_dropped);
    checks++;
    if (n_borrow == 0 || n_dropped == 0) begin
      failures++;
      $display("FAIL mechanism counts");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #((NCYC + 10) * 20 * 1ns);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
