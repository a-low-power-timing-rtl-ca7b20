// comb_andn_or_nor: example combinational logic of the second pipeline stage.
//
// An AND gate with its a input inverted and an OR gate on the same inputs
// feed a NOR, so y = ~((~a & b) | (a | b)), which equals ~(a | b). The gate
// structure is the method's example logic; which AND input carries the
// inverter is this design's choice and does not change the function. Purely
// combinational.
//
// Interface: a, b in; y out.
module comb_andn_or_nor (
  input  logic a,
  input  logic b,
  output logic y
);
  logic andn_o, or_o;
  assign andn_o = ~a & b;
  assign or_o   = a | b;
  assign y      = ~(andn_o | or_o);
endmodule
