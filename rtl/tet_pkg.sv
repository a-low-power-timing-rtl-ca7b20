// tet_pkg: shared timing constants of the timing-error-tolerant pipeline.
//
// The circuit corrects late data by reshaping clocks with small delay
// elements, so its behaviour is set by a handful of delays. They are kept
// here as integer picoseconds so that every module and testbench uses the
// same defaults. None of these values is fixed by the method itself: they are
// this design's choices for a 20 ns clock with a 50% duty cycle.
//   TD_PULSE_PS  width of the transition-detector error pulse (its delay buffer)
//   CLKD_PS      delay of the clock delay buffer in the time-borrowing circuit
//   PATH1_PS     modelled delay of the critical stage-1 combinational path
//   PATH2_PS     modelled delay of the stage-2 combinational path
//   CLK_PERIOD_PS clock period the other values are chosen against
package tet_pkg;
  localparam int CLK_PERIOD_PS = 20000;
  localparam int TD_PULSE_PS   = 2000;
  localparam int CLKD_PS       = 3000;
  localparam int PATH1_PS      = 21000;
  localparam int PATH2_PS      = 19500;
endpackage
