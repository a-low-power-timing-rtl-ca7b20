// tb_master_slave_ff: runs the two-latch flip-flop as a rising-edge flip-flop
// on random data (q must show the value d had at the last rising edge, and
// ignore d changes in between), then opens both latches at once and checks
// that q follows d. Clock period 10 ns, time unit 1 ns.
module tb_master_slave_ff;
  int checks = 0, failures = 0;
  logic clk = 1'b0, d = 1'b0, q;
  logic mclk, sclk;
  logic force_open = 1'b0;
  logic expected;

  assign mclk = ~clk | force_open;
  assign sclk = clk;

  master_slave_ff dut (.d(d), .master_clk(mclk), .slave_clk(sclk), .q(q));

  always #5 clk = ~clk;

  task automatic check(input logic v, input string what);
    checks++;
    if (q !== v) begin
      failures++;
      $display("FAIL %s: q=%b expected %b at %0t", what, q, v, $time);
    end
  endtask

  initial begin
    // Edge-triggered operation.
    @(posedge clk);
    repeat (50) begin
      #1 d = 1'($urandom);
      @(posedge clk);
      expected = d;
      #1 check(expected, "after edge");
      d = ~d;                       // change while clk high: must not pass
      #2 check(expected, "clk high, d changed");
      @(negedge clk);
      #1 check(expected, "clk low");
    end
    // Both latches open: transparent.
    @(posedge clk);
    #1 force_open = 1'b1;
    repeat (4) begin
      #0.5 d = ~d;
      #0.2 check(d, "transparent");
    end
    force_open = 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
