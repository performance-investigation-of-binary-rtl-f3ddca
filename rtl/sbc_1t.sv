// sbc_1t: WIDTH-bit synchronous binary counter with one-transistor clock
// gating (SBC-1T).
//
// Every bit is a T flip-flop with its toggle input tied to 1, so a bit
// changes exactly when its flip-flop receives a clock edge. The LSB is
// clocked straight from the master clock. Bit i (i >= 1) is clocked through
// a single NMOS pass transistor (cgn_1t) that is switched on only while all
// lower bits are 1; the enable is formed by a ripple AND chain,
// en[i] = en[i-1] & q[i-1]. A flip-flop therefore sees a clock edge only in
// the cycles in which it toggles: bit i is clocked once every 2**i cycles
// instead of every cycle.
//
// Interface: clk, rst_n (asynchronous, active low, clears the count),
// q (count), stage_clk (the clock seen by each flip-flop, for observation).
// Timing: all flip-flops are rising-edge triggered; q advances by one,
// modulo 2**WIDTH, right after every rising edge of clk.
//
// The structure (direct LSB clock, one pass transistor per upper stage,
// enabled by the lower bits) follows the SBC-1T description. The AND chain
// as the enable, the rising edge for all stages and the reset are this
// design's own choices.
module sbc_1t
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
    cgn_1t u_cgn (
      .clk_in (clk),
      .en     (en[i]),
      .rst_n  (rst_n),
      .clk_out(stage_clk[i])
    );
  end

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    t_ff #(.EDGE(EDGE_RISE)) u_ff (
      .clk  (stage_clk[i]),
      .rst_n(rst_n),
      .t    (1'b1),
      .q    (q[i])
    );
  end

endmodule
