// transition_detector: flags every transition of a flip-flop's data input.
//
// The input In is inverted and passed through a delay buffer, so for
// PULSE_PS after an edge the delayed inverted copy still equals the new value
// of In. An AND of In with that copy is high after a rising edge, an AND of
// both inverted (a "bubbled" AND) is high after a falling edge, and their OR
// is the error flag Er. Er is therefore a pulse of width PULSE_PS that starts
// at each edge of In and is low while In is steady. The gate structure
// follows the method; the pulse width is this design's choice (it must cover
// the master latch's setup time and stay short enough to avoid hold
// problems).
//
// Interface: din = In, er = Er. Timing: er rises in the same instant as the
// edge of din and falls PULSE_PS later.
module transition_detector #(
  parameter int PULSE_PS = tet_pkg::TD_PULSE_PS
) (
  input  logic din,
  output logic er
);
  logic din_n;      // output of the inverter
  logic din_n_dly;  // inverter output after the delay buffer

  assign din_n = ~din;

  delay_buffer #(.DELAY_PS(PULSE_PS)) u_dly (
    .a (din_n),
    .y (din_n_dly)
  );

  logic rise_pulse, fall_pulse;
  assign rise_pulse = din & din_n_dly;       // AND
  assign fall_pulse = ~din & ~din_n_dly;     // bubbled AND
  assign er         = rise_pulse | fall_pulse;
endmodule
