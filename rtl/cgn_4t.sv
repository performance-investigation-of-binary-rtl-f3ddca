// cgn_4t: four-transistor clock gating network of the SBC-4T counter.
//
// Two stacked PMOS and two stacked NMOS devices form a clocked inverter.
// The outer pair is switched by the enable, the inner pair by the master
// clock. With the enable at 1 the output is the inverted master clock; with
// the enable at 0 the output is high impedance and keeps its charge. That
// floating node is modelled as a latch transparent while en is 1, so the
// latch reported by synthesis is intended.
//
// The enable changes just after a rising master-clock edge, when the
// inverted clock is low, so a node that is switched off rests at 0 and is
// switched on again without a new edge. The flip-flops behind this gate are
// falling-edge triggered, so they react to the rising master-clock edge.
// rst_n (asynchronous, active low) sets the node to its resting value 0;
// the reset is this design's addition.
//
// Interface: clk_in (master clock), en (AND of all lower counter bits),
// rst_n, clk_out (inverted, gated clock of the stage's flip-flop).
module cgn_4t (
  input  logic clk_in,
  input  logic en,
  input  logic rst_n,
  output logic clk_out
);

  always_latch begin
    if (!rst_n)  clk_out = 1'b0;
    else if (en) clk_out = ~clk_in;
  end

endmodule
