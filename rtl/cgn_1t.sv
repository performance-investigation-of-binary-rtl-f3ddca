// cgn_1t: one-transistor clock gating network of the SBC-1T counter.
//
// A single NMOS pass transistor, gated by the enable, connects the master
// clock to the clock pin of a flip-flop. While the enable is 1 the clock
// passes; while it is 0 the node is not driven and keeps the charge it had.
// That floating node is modelled as a level-sensitive latch, transparent
// while en is 1, so the latch reported by synthesis is intended: it is the
// storage of the undriven node.
//
// The held value matters. The enable only changes just after a rising clock
// edge, while the clock is high, so a node that is switched off holds 1, and
// when it is switched on again (also while the clock is high) it sees no
// new edge. The first rising edge it passes is the next real one.
// rst_n (asynchronous, active low) sets the node to that resting value 1;
// the reset is this design's addition.
//
// Interface: clk_in (master clock), en (AND of all lower counter bits),
// rst_n, clk_out (clock of the stage's flip-flop).
module cgn_1t (
  input  logic clk_in,
  input  logic en,
  input  logic rst_n,
  output logic clk_out
);

  always_latch begin
    if (!rst_n)  clk_out = 1'b1;
    else if (en) clk_out = clk_in;
  end

endmodule
