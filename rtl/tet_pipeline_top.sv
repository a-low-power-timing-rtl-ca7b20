// tet_pipeline_top: three-flip-flop pipeline with in-cycle timing-error
// correction on its critical stage and time borrowing on the stage after it.
//
//   d --FF1--> comb_and_or_nand(q1, b1) --[PATH1]--> FF2 (error tolerant)
//     --> comb_andn_or_nor(q2, b2) --[PATH2]--> FF3 --> q3
//
// FF1 is a plain rising-edge master-slave flip-flop. FF2 has a transition
// detector and a master clock generator: when its input settles after the
// rising edge (PATH1 longer than the clock period, but by less than the high
// phase), it reopens its master latch and passes the late data to q2 in the
// same cycle. FF2's output then changes late, so FF3 may miss it at the next
// edge; the time-borrowing circuit sees that CM was high during the high
// phase and clocks FF3 with the delayed clock CLKDD for the next cycle. The
// system clock itself is never changed.
//
// The [PATH] boxes are delay buffers that stand for the propagation delay of
// the combinational logic, which a zero-delay gate model lacks; they make the
// top a simulation model of the timing behaviour. Their values, the second
// operands b1 and b2, and the single-bit width are this design's choices; the
// arrangement of flip-flops, detector, generator and time-borrowing circuit
// follows the method.
//
// Interface: clk, rst (clears the time-borrowing flip-flop), d, b1, b2 in.
// q1, q2, q3 are the flip-flop outputs; er, cm, cm_sr, borrow and clk_tb are brought
// out for observation. Latency: d reaches q3 after three rising edges; b1
// after two, b2 after one. Inputs should change shortly after a rising edge.
module tet_pipeline_top #(
  parameter int PULSE_PS = tet_pkg::TD_PULSE_PS,
  parameter int CLKD_PS  = tet_pkg::CLKD_PS,
  parameter int PATH1_PS = tet_pkg::PATH1_PS,
  parameter int PATH2_PS = tet_pkg::PATH2_PS
) (
  input  logic clk,
  input  logic rst,
  input  logic d,
  input  logic b1,
  input  logic b2,
  output logic q1,
  output logic q2,
  output logic q3,
  output logic er,
  output logic cm,
  output logic cm_sr,
  output logic borrow,
  output logic clk_tb
);
  logic clk_n, clk_tb_n;
  assign clk_n    = ~clk;
  assign clk_tb_n = ~clk_tb;

  // Flip-flop 1.
  master_slave_ff u_ff1 (
    .d          (d),
    .master_clk (clk_n),
    .slave_clk  (clk),
    .q          (q1)
  );

  // Stage-1 logic and its critical-path delay.
  logic c1, c1_late;
  comb_and_or_nand u_comb1 (.a(q1), .b(b1), .y(c1));
  delay_buffer #(.DELAY_PS(PATH1_PS)) u_path1 (.a(c1), .y(c1_late));

  // Flip-flop 2 with transition detector and master clock generator.
  error_tolerant_ff #(.PULSE_PS(PULSE_PS)) u_ff2 (
    .clk (clk),
    .d   (c1_late),
    .q   (q2),
    .er  (er),
    .cm  (cm)
  );

  // Stage-2 logic and its delay.
  logic c2, c2_late;
  comb_andn_or_nor u_comb2 (.a(q2), .b(b2), .y(c2));
  delay_buffer #(.DELAY_PS(PATH2_PS)) u_path2 (.a(c2), .y(c2_late));

  // Clock for flip-flop 3.
  time_borrowing_circuit #(.CLKD_PS(CLKD_PS)) u_tb (
    .clk    (clk),
    .rst    (rst),
    .cm     (cm),
    .clk_tb (clk_tb),
    .cm_sr  (cm_sr),
    .borrow (borrow)
  );

  // Flip-flop 3, clocked by CLK_TB.
  master_slave_ff u_ff3 (
    .d          (c2_late),
    .master_clk (clk_tb_n),
    .slave_clk  (clk_tb),
    .q          (q3)
  );
endmodule
