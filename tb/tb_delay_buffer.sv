// tb_delay_buffer: checks that the delay element reproduces every input edge
// exactly DELAY_PS later, including a pulse shorter than the delay.
// Time unit 1 ns.
module tb_delay_buffer;
  int checks = 0, failures = 0;
  logic a = 1'b0;
  logic y;

  delay_buffer dut (.a(a), .y(y));

  task automatic expect_y(input logic v, input string what);
    checks++;
    if (y !== v) begin
      failures++;
      $display("FAIL %s: y=%b expected %b at %0t", what, y, v, $time);
    end
  endtask

  initial begin
    #10;
    expect_y(1'b0, "idle");
    a = 1'b1;               // rise at 10 ns
    #1.9  expect_y(1'b0, "before rise delay");
    #0.2  expect_y(1'b1, "after rise delay");
    #5;   a = 1'b0;         // fall at 17.1 ns
    #1.9  expect_y(1'b1, "before fall delay");
    #0.2  expect_y(1'b0, "after fall delay");
    #5;   a = 1'b1;         // 0.5 ns pulse at 24.2 ns
    #0.5  a = 1'b0;
    #1.6  expect_y(1'b1, "short pulse high");   // 26.3: inside [26.2, 26.7)
    #0.5  expect_y(1'b0, "short pulse low");    // 26.8
    #5;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
