// tb_error_tolerant_ff: feeds the protected flip-flop data that arrives
// either in time (5 ns before the rising edge), late (1 ns after the rising
// edge, while the clock is high) or not at all, chosen at random per cycle.
// For every cycle it checks that the stale value is held right after the
// edge when data is late, that the intended value is on q 5 ns after the
// edge in all cases (the late value has been passed through), and that it is
// still held in the low phase. It counts corrected late arrivals and in-time
// arrivals and fails if either never happened. Clock 20 ns, time unit 1 ns.
module tb_error_tolerant_ff;
  localparam int NCYC = 200;
  int checks = 0, failures = 0;
  int n_late = 0, n_early = 0, n_cm_pulses = 0;
  logic clk = 1'b0, d = 1'b0;
  logic q, er, cm;
  logic prev_v, v;
  int mode;  // 0 no change, 1 in time, 2 late

  error_tolerant_ff dut (.clk(clk), .d(d), .q(q), .er(er), .cm(cm));

  always #(tet_pkg::CLK_PERIOD_PS * 1ps / 2) clk = ~clk;  // rising edges at 10, 30, 50, ... ns

  // Count the extra master-clock pulses inside the high phase.
  always @(posedge cm) if (clk) n_cm_pulses++;

  task automatic check(input logic exp, input string what);
    checks++;
    if (q !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: q=%b expected %b at %0t", what, q, exp, $time);
    end
  endtask

  initial begin
    // Flush: a few in-time cycles set a known state.
    d = 1'b0;
    repeat (3) @(posedge clk);
    prev_v = 1'b0;
    #15;                                   // now 5 ns before the next edge
    for (int n = 0; n < NCYC; n++) begin
      mode = $urandom_range(0, 2);
      v = (mode == 0) ? prev_v : ~prev_v;
      if (mode == 1) begin d = v; n_early++; end
      @(posedge clk);
      #0.5 check((mode == 2) ? prev_v : v, "just after edge");
      if (mode == 2) begin
        #0.5 d = v;                        // late arrival at edge + 1 ns
        n_late++;
        #0.5 checks++;
        if (!(er && cm)) begin
          failures++;
          $display("FAIL no CM pulse for late data at %0t", $time);
        end
        #3.5;
      end else begin
        #4.5;
      end
      check(v, "edge + 5 ns");
      #9 check(v, "low phase");
      #1;                                  // next edge - 5 ns
      prev_v = v;
    end
    $display("late_corrected=%0d in_time=%0d cm_pulses_in_high_phase=%0d", n_late, n_early, n_cm_pulses);
    checks++;
    if (n_late == 0 || n_early == 0 || n_cm_pulses != n_late) begin
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
