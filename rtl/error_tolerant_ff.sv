// error_tolerant_ff: master-slave flip-flop that repairs a late input in the
// same clock cycle.
//
// A timing error means the data meant for a rising clock edge reaches D only
// after that edge, while clk is still high; the flip-flop has already stored
// the stale value. Here a transition detector watches D and emits a pulse Er
// on every edge of it. The master clock generator turns Er into an extra high
// phase of the master clock CM = Er | ~clk. A late edge of D while clk is high
// therefore reopens the master latch while the slave is open too, and the
// late but correct value passes straight to Q: the error is corrected before
// the end of the cycle, without stalling or replaying anything. Edges of D
// while clk is low are ordinary arrivals; CM is already high then and Er has
// no effect. The composition follows the method.
//
// Interface: clk (slave clock), d (In), q; er and cm are brought out for
// observation. Timing: rising-edge flip-flop; a D edge at time t after the
// rising edge and before the falling edge appears on q at t (zero-delay
// model) and is held from t + PULSE_PS.
module error_tolerant_ff #(
  parameter int PULSE_PS = tet_pkg::TD_PULSE_PS
) (
  input  logic clk,
  input  logic d,
  output logic q,
  output logic er,
  output logic cm
);
  transition_detector #(.PULSE_PS(PULSE_PS)) u_td (
    .din (d),
    .er  (er)
  );

  master_clock_generator u_mcg (
    .er  (er),
    .clk (clk),
    .cm  (cm)
  );

  master_slave_ff u_ff (
    .d          (d),
    .master_clk (cm),
    .slave_clk  (clk),
    .q          (q)
  );
endmodule
