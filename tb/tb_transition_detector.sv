// tb_transition_detector: toggles the input at irregular times and compares
// the error flag every 50 ps with a reference: er must be high exactly during
// the PULSE_PS after each input edge. Time unit 1 ns.
module tb_transition_detector;
  localparam int PULSE_PS = tet_pkg::TD_PULSE_PS;
  int checks = 0, failures = 0, edges = 0;
  logic din = 1'b0;
  logic er;
  realtime last_edge = -1000.0;

  transition_detector dut (.din(din), .er(er));

  // Stimulus: edges spaced 3..12 ns apart (longer than the pulse).
  initial begin
    #20;
    repeat (40) begin
      din = ~din;
      last_edge = $realtime;
      edges++;
      #($urandom_range(3000, 12000) * 1ps);
    end
    #10;
    $display("edges=%0d", edges);
    if (edges < 40) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Checker, sampling away from the pulse boundaries.
  initial begin
    #20.025;
    forever begin
      realtime since;
      since = $realtime - last_edge;
      if (since > 0.03 && (since < 1.97 || since > 2.03)) begin
        logic exp_er;
        exp_er = (since < PULSE_PS / 1000.0);
        checks++;
        if (er !== exp_er) begin
          failures++;
          if (failures < 10)
            $display("FAIL er=%b expected %b, %0.3f ns after edge", er, exp_er, since);
        end
      end
      #0.05;
    end
  end

  initial begin
    #5000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
