// tb_master_clock_generator: exhaustive check of CM = Er | ~clk.
module tb_master_clock_generator;
  int checks = 0, failures = 0;
  logic er, clk, cm;

  master_clock_generator dut (.er(er), .clk(clk), .cm(cm));

  initial begin
    for (int i = 0; i < 4; i++) begin
      {er, clk} = 2'(i);
      #1;
      checks++;
      // Master must be open while the clock is low or an error pulse is high.
      if (cm !== ((clk == 1'b0) || (er == 1'b1))) begin
        failures++;
        $display("FAIL er=%b clk=%b cm=%b", er, clk, cm);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
