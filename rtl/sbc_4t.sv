// sbc_4t: WIDTH-bit synchronous binary counter with four-transistor clock
// gating (SBC-4T).
//
// Every bit is a T flip-flop with its toggle input tied to 1, so a bit
// changes exactly when its flip-flop receives a clock edge. The LSB is
// clocked straight from the master clock on its rising edge. Bit i (i >= 1)
// is clocked through a clocked inverter (cgn_4t) that drives the inverted
// master clock while en[i] = en[i-1] & q[i-1] is 1 (all lower bits are 1)
// and floats otherwise. Because its clock is inverted, each upper flip-flop
// is falling-edge triggered, which is the rising edge of the master clock:
// all bits change on the same master edge. Bit i is clocked once every
// 2**i cycles.
//
// Interface: clk, rst_n (asynchronous, active low, clears the count),
// q (count), stage_clk (the clock seen by each flip-flop, for observation;
// inverted for i >= 1).
// Timing: q advances by one, modulo 2**WIDTH, right after every rising edge
// of clk.
//
// The structure and the choice of edges (rising-edge LSB, falling-edge upper
// stages) follow the SBC-4T description. The AND chain as the enable and the
// reset are this design's own choices.
module sbc_4t
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

  t_ff #(.EDGE(EDGE_RISE)) u_ff_lsb (
    .clk  (stage_clk[0]),
    .rst_n(rst_n),
    .t    (1'b1),
    .q    (q[0])
  );

  for (genvar i = 1; i < WIDTH; i++) begin : g_stage
    assign en[i] = en[i-1] & q[i-1];
    cgn_4t u_cgn (
      .clk_in (clk),
      .en     (en[i]),
      .rst_n  (rst_n),
      .clk_out(stage_clk[i])
    );
    t_ff #(.EDGE(EDGE_FALL)) u_ff (
      .clk  (stage_clk[i]),
      .rst_n(rst_n),
      .t    (1'b1),
      .q    (q[i])
    );
  end

endmodule
