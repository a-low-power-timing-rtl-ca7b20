// tb_comb_logic: exhaustive check of both example logic blocks against their
// reduced forms, ~(a & b) and ~(a | b).
module tb_comb_logic;
  int checks = 0, failures = 0;
  logic a, b, y1, y2;

  comb_and_or_nand u1 (.a(a), .b(b), .y(y1));
  comb_andn_or_nor u2 (.a(a), .b(b), .y(y2));

  initial begin
    for (int i = 0; i < 4; i++) begin
      {a, b} = 2'(i);
      #1;
      checks += 2;
      if (y1 !== !(a && b)) begin
        failures++;
        $display("FAIL and_or_nand a=%b b=%b y=%b", a, b, y1);
      end
      if (y2 !== !(a || b)) begin
        failures++;
        $display("FAIL andn_or_nor a=%b b=%b y=%b", a, b, y2);
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
