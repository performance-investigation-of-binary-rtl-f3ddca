// sbc_2t: WIDTH-bit synchronous binary counter with two-transistor clock
// gating (SBC-2T).
//
// Every bit is a T flip-flop with its toggle input tied to 1, so a bit
// changes exactly when its flip-flop receives a clock edge. The LSB is
// clocked straight from the master clock. Bit i (i >= 1) is clocked through
// a PMOS/NMOS pair (cgn_2t) that acts as an AND gate between the master
// clock and the enable en[i] = en[i-1] & q[i-1] (all lower bits are 1).
// Bit i thus receives one clock pulse every 2**i cycles.
//
// An AND gate only yields clean pulses if its enable is stable while the
// clock is high. The enable comes from the counter bits, so the flip-flops
// change on the falling edge of the master clock, when the clock is already
// low; the next high phase then passes or blocks a whole pulse.
//
// Interface: clk, rst_n (asynchronous, active low, clears the count),
// q (count), stage_clk (the clock seen by each flip-flop, for observation).
// Timing: q advances by one, modulo 2**WIDTH, right after every falling edge
// of clk.
//
// The gating structure follows the SBC-2T description. The falling-edge
// flip-flops, the AND chain as the enable and the reset are this design's
// own choices.
module sbc_2t
  import sbc_pkg::*;
#(
  parameter int unsigned WIDTH = SBC_WIDTH
) (
  input  logic             clk,
  input  logic             rst_n,
  output logic [WIDTH-1:0] q,
  output logic [WIDTH-1:0] stage_clk
);

  logic [WIDTH-1:0] en;  // en[i]: all bits below i are 1

  assign en[0]        = 1'b1;
  assign stage_clk[0] = clk;

  for (genvar i = 1; i < WIDTH; i++) begin : g_gate
    assign en[i] = en[i-1] & q[i-1];
    cgn_2t u_cgn (
      .clk_in (clk),
      .en     (en[i]),
      .clk_out(stage_clk[i])
    );
  end

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    t_ff #(.EDGE(EDGE_FALL)) u_ff (
      .clk  (stage_clk[i]),
      .rst_n(rst_n),
      .t    (1'b1),
      .q    (q[i])
    );
  end

endmodule
