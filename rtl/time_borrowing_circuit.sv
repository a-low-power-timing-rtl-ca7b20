// time_borrowing_circuit: gives the stage after a corrected flip-flop a
// delayed clock for one cycle.
//
// When the error-tolerant flip-flop corrects a late input, its output changes
// late too, so the next stage's logic has less than a clock period before the
// next rising edge (a successive-stage error). This circuit detects that CM
// was high while CLK was high (a correction took place) and, for the
// following cycle, hands the next stage the delayed clock CLKDD instead of
// CLK, so that stage's flip-flop samples later.
//
//   * CM_SR is a set/reset latch (the cross-coupled pair of the structure),
//     set by CM & CLK and cleared by Q; clear wins when both are active.
//   * A D flip-flop clocked by CLKB = ~CLK loads CM_SR at each falling edge of
//     CLK, so Q rises at the end of a cycle with a correction. Q then clears
//     CM_SR; the next falling edge loads 0 unless a new correction set it.
//     Because the clear wins, a correction in the very cycle where Q is 1 is
//     not recorded: borrowing can happen at most every other cycle.
//   * CLKD is CLK through a delay buffer; CLKDD = CLK & CLKD rises CLKD_PS
//     after CLK and falls with it.
//   * CLK_TB = Q ? CLKDD : CLK. Q changes only at a falling CLK edge, when CLK
//     and CLKDD are both low, so the switch makes no glitch.
// The latch/flip-flop/select structure follows the method; the gate used to
// form CLKDD, the polarity of CLKB and the delay value are this design's
// choices. The SET input of the flip-flop is unused; RESET is rst.
//
// Interface: clk, rst (asynchronous, active high), cm in; clk_tb out; cm_sr
// and borrow (Q) out for observation.
// The CM_SR latch is intended and is the only latch here.
module time_borrowing_circuit #(
  parameter int CLKD_PS = tet_pkg::CLKD_PS
) (
  input  logic clk,
  input  logic rst,
  input  logic cm,
  output logic clk_tb,
  output logic cm_sr,
  output logic borrow
);
  logic set_sr;
  assign set_sr = cm & clk;

  // Set/reset latch, reset-dominant.
  always_latch begin
    if (borrow)      cm_sr = 1'b0;
    else if (set_sr) cm_sr = 1'b1;
  end

  // D flip-flop clocked by CLKB (inverted CLK) with asynchronous RESET.
  logic clkb;
  assign clkb = ~clk;

  always_ff @(posedge clkb or posedge rst) begin
    if (rst) borrow <= 1'b0;
    else     borrow <= cm_sr;
  end

  // Delayed clocks and the clock select.
  logic clkd, clkdd;

  delay_buffer #(.DELAY_PS(CLKD_PS)) u_clkd (
    .a (clk),
    .y (clkd)
  );

  assign clkdd  = clk & clkd;
  assign clk_tb = borrow ? clkdd : clk;

  // The select must only switch to CLKDD while CLK is low, or CLK_TB could
  // glitch. (It falls either at a falling CLK edge or on reset.)
  always @(posedge borrow) begin
    assert (!clk) else $error("clock select changed while CLK high");
  end
endmodule
