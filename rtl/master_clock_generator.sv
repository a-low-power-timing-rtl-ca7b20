// master_clock_generator: builds the master-latch clock CM of the protected
// flip-flop.
//
// CM = Er OR (NOT clk). While clk is low, CM is high and the master latch is
// transparent as in any rising-edge master-slave flip-flop. While clk is high,
// CM is high only during an error pulse Er, which reopens the master latch
// while the slave is also open: the flip-flop becomes transparent and late
// data reaches Q. Gate structure as in the method.
//
// Interface: er, clk in; cm out (master transparent while cm = 1).
// Purely combinational.
module master_clock_generator (
  input  logic er,
  input  logic clk,
  output logic cm
);
  assign cm = er | ~clk;
endmodule
