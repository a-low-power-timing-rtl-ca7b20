// delay_buffer: behavioural model of a delay element (not synthesizable).
//
// A buffer whose only job is to delay its input by DELAY_PS picoseconds. The
// transition detector uses one to set the width of its error pulse, the
// time-borrowing circuit uses one to derive the delayed clock CLKD, and the
// pipeline top uses two to stand for the propagation delay of its critical
// combinational paths. In silicon this is a chain of inverters sized for the
// wanted delay; here it is a transport delay, so every input edge reappears at
// the output DELAY_PS later, however close the edges are: pending changes wait in a queue
// and are applied as they fall due. The output starts
// at 0 until the first input change has propagated.
//
// Interface: a (input), y (output, a delayed). When a clock drives a, lint
// tools report that clock as used both as a clock and as data; that is
// expected for a delay element on a clock net.
module delay_buffer #(
  parameter int DELAY_PS = tet_pkg::TD_PULSE_PS
) (
  input  logic a,
  output logic y
);
  // Pending output changes, oldest first. The delay is the same for every
  // edge, so the due times are already in order.
  realtime due_q[$];
  logic    val_q[$];
  event    pushed;

  initial y = 1'b0;

  always @(a) begin
    due_q.push_back($realtime + DELAY_PS * 1ps);
    val_q.push_back(a);
    ->pushed;
  end

  initial forever begin
    if (due_q.size() == 0) @(pushed);
    #(due_q[0] - $realtime);
    y = val_q.pop_front();
    void'(due_q.pop_front());
  end
endmodule
