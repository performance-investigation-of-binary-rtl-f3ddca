// tb_sbc_2t: self-checking testbench of the SBC-2T counter.
//
// A 10-time-unit master clock runs the counter through three full wraps
// after reset. After each falling edge the count must equal the number of
// falling edges since reset, modulo 2**WIDTH (one count per cycle, visible
// one time unit after the edge). Falling edges arriving at each flip-flop's
// clock are counted: stage i must be clocked exactly floor(C / 2**i) times
// in C cycles, which shows that the gating passes only the needed edges.
module tb_sbc_2t;
  localparam int unsigned WIDTH  = 4;
  localparam int unsigned CYCLES = 3 * (1 << WIDTH) + 5;

  logic             clk = 1'b0;
  logic             rst_n = 1'b1;
  logic [WIDTH-1:0] q;
  logic [WIDTH-1:0] stage_clk;

  int unsigned checks = 0;
  int unsigned failures = 0;
  int unsigned edges [WIDTH];
  int unsigned cycle = 0;
  logic        counting = 1'b0;  // count clock edges only after reset
  int unsigned expected;

  sbc_2t #(.WIDTH(WIDTH)) dut (.clk(clk), .rst_n(rst_n), .q(q), .stage_clk(stage_clk));

  always #5 clk = ~clk;

  for (genvar i = 0; i < WIDTH; i++) begin : g_edge
    always @(negedge stage_clk[i]) if (counting) edges[i]++;
  end

  initial begin
    foreach (edges[i]) edges[i] = 0;
    #1 rst_n = 1'b0;
    #21 rst_n = 1'b1;  // release while clk is low
    counting = 1'b1;
    checks++;
    if (q !== '0) begin failures++; $display("FAIL reset value %0d", q); end
    repeat (CYCLES) begin
      @(negedge clk);
      cycle++;
      #1;
      expected = cycle % (1 << WIDTH);
      checks++;
      if (q !== WIDTH'(expected)) begin
        failures++;
        $display("FAIL cycle %0d: q=%0d expected %0d", cycle, q, expected);
      end
    end
    for (int i = 0; i < WIDTH; i++) begin
      checks++;
      if (edges[i] != CYCLES / (1 << i)) begin
        failures++;
        $display("FAIL stage %0d clocked %0d times, expected %0d", i, edges[i], CYCLES / (1 << i));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (CYCLES + 20) @(negedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
