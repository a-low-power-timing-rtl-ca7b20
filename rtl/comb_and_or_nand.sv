// comb_and_or_nand: example combinational logic of the first pipeline stage.
//
// An AND gate and an OR gate share the inputs a and b; a NAND combines their
// outputs, so y = ~((a & b) & (a | b)), which equals ~(a & b). The gate
// structure is the method's example logic; its delay is modelled separately
// in the pipeline top. Purely combinational.
//
// Interface: a, b in; y out.
module comb_and_or_nand (
  input  logic a,
  input  logic b,
  output logic y
);
  logic and_o, or_o;
  assign and_o = a & b;
  assign or_o  = a | b;
  assign y     = ~(and_o & or_o);
endmodule
