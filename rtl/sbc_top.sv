// sbc_top: the three clock-gated synchronous binary counters side by side.
//
// SBC-1T (one pass transistor per stage), SBC-2T (PMOS/NMOS AND gate per
// stage) and SBC-4T (clocked inverter per stage) share the master clock and
// reset. Each is a WIDTH-bit up counter whose upper flip-flops are clocked
// only in the cycles in which they toggle. The counts and the per-flip-flop
// clocks of all three are brought out so they can be compared.
//
// Interface: clk, rst_n (asynchronous, active low), q_1t / q_2t / q_4t
// (counts), stage_clk_1t / stage_clk_2t / stage_clk_4t (clocks of the
// individual flip-flops).
// Timing: q_1t and q_4t advance on every rising edge of clk, q_2t on every
// falling edge; all wrap from 2**WIDTH-1 to 0.
//
// Putting the three counters in one top, sharing clock and reset, is this
// design's choice; they are described as three alternative architectures.
module sbc_top
  import sbc_pkg::*;
#(
  parameter int unsigned WIDTH = SBC_WIDTH
) (
  input  logic             clk,
  input  logic             rst_n,
  output logic [WIDTH-1:0] q_1t,
  output logic [WIDTH-1:0] q_2t,
  output logic [WIDTH-1:0] q_4t,
  output logic [WIDTH-1:0] stage_clk_1t,
  output logic [WIDTH-1:0] stage_clk_2t,
  output logic [WIDTH-1:0] stage_clk_4t
);

  sbc_1t #(.WIDTH(WIDTH)) u_sbc_1t (
    .clk      (clk),
    .rst_n    (rst_n),
    .q        (q_1t),
    .stage_clk(stage_clk_1t)
  );

  sbc_2t #(.WIDTH(WIDTH)) u_sbc_2t (
    .clk      (clk),
    .rst_n    (rst_n),
    .q        (q_2t),
    .stage_clk(stage_clk_2t)
  );

  sbc_4t #(.WIDTH(WIDTH)) u_sbc_4t (
    .clk      (clk),
    .rst_n    (rst_n),
    .q        (q_4t),
    .stage_clk(stage_clk_4t)
  );

endmodule
