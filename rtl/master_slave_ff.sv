// master_slave_ff: D flip-flop built from two level-sensitive latches with
// separately driven enables.
//
// The master latch is transparent while master_clk = 1, the slave latch while
// slave_clk = 1. With master_clk = ~clk and slave_clk = clk this is a plain
// rising-edge flip-flop. Bringing the master enable out separately is what
// lets the error-correcting scheme reopen the master while clk is high: with
// both latches transparent, d flows straight to q. The two latches are
// intended; they are the flip-flop. No reset: the pipeline is flushed by
// clocking.
//
// Interface: d, master_clk, slave_clk in; q out.
module master_slave_ff (
  input  logic d,
  input  logic master_clk,
  input  logic slave_clk,
  output logic q
);
  logic m;  // master latch state

  always_latch begin
    if (master_clk) m = d;
  end

  always_latch begin
    if (slave_clk) q = m;
  end
endmodule
