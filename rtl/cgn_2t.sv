// cgn_2t: two-transistor clock gating network of the SBC-2T counter.
//
// A PMOS device passes the master clock to the output when the enable is 1,
// and an NMOS device in parallel pulls the output to 0 when the enable is 0.
// Only one of them conducts at a time, so the output is always driven and
// there is no path from supply to ground. Logically it is clk_in AND en.
//
// Interface: clk_in (master clock), en (AND of all lower counter bits),
// clk_out (clock of the stage's flip-flop).
// Timing: purely combinational. The output is free of extra edges only if en
// changes while clk_in is low, which is why the SBC-2T flip-flops are all
// falling-edge triggered (this design's choice; see sbc_2t).
module cgn_2t (
  input  logic clk_in,
  input  logic en,
  output logic clk_out
);

  always_comb begin
    if (en) clk_out = clk_in;  // PMOS on: clock passes
    else    clk_out = 1'b0;    // NMOS on: output held low
  end

endmodule
