// t_ff: T flip-flop made of a D flip-flop whose D input is q XOR t.
//
// On each active edge of clk the state toggles when t is 1 and holds when t
// is 0. The active edge is chosen with the EDGE parameter (rising or falling),
// because the gated counters clock some stages on the inverted clock.
// rst_n is asynchronous and active low and clears q to 0.
//
// Interface: clk (the stage's gated clock), rst_n, t, q.
// Timing: q changes right after the active edge of clk; there is no
// combinational path from t to q.
//
// Building the T flip-flop from a D flip-flop and an XOR follows the
// counter description; the reset is this design's addition.
module t_ff
  import sbc_pkg::*;
#(
  parameter edge_e EDGE = EDGE_RISE
) (
  input  logic clk,
  input  logic rst_n,
  input  logic t,
  output logic q
);

  logic d;

  assign d = q ^ t;

  if (EDGE == EDGE_RISE) begin : g_rise
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) q <= 1'b0;
      else        q <= d;
    end
  end else begin : g_fall
    always_ff @(negedge clk or negedge rst_n) begin
      if (!rst_n) q <= 1'b0;
      else        q <= d;
    end
  end

endmodule
