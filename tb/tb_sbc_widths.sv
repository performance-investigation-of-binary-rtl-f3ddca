// tb_sbc_widths: the three gated counters at 8 and 16 bits.
//
// The counters are also meant to be built at 8 and 16 bits. Two tops, one
// per size, run from one master clock for a full 16-bit wrap plus a few
// cycles. After each counting edge every count is compared with a
// reference count. At the end, the number of active clock edges received
// by each flip-flop must be floor(C / 2**i) for stage i after C counting
// cycles, which is the clock activity the gating is meant to leave.
module tb_sbc_widths;
  localparam int unsigned CYCLES = (1 << 16) + 7;

  logic clk = 1'b0;
  logic rst_n = 1'b1;
  logic counting = 1'b0;

  logic [7:0]  q8 [3];
  logic [7:0]  c8 [3];
  logic [15:0] q16 [3];
  logic [15:0] c16 [3];

  int unsigned checks = 0;
  int unsigned failures = 0;
  int unsigned e8 [3][8];
  int unsigned e16 [3][16];
  int unsigned cycle = 0;

  sbc_top #(.WIDTH(8)) dut8 (
    .clk(clk), .rst_n(rst_n), .q_1t(q8[0]), .q_2t(q8[1]), .q_4t(q8[2]),
    .stage_clk_1t(c8[0]), .stage_clk_2t(c8[1]), .stage_clk_4t(c8[2])
  );
  sbc_top #(.WIDTH(16)) dut16 (
    .clk(clk), .rst_n(rst_n), .q_1t(q16[0]), .q_2t(q16[1]), .q_4t(q16[2]),
    .stage_clk_1t(c16[0]), .stage_clk_2t(c16[1]), .stage_clk_4t(c16[2])
  );

  always #5 clk = ~clk;

  for (genvar i = 0; i < 16; i++) begin : g16
    always @(posedge c16[0][i]) if (counting) e16[0][i]++;
    always @(negedge c16[1][i]) if (counting) e16[1][i]++;
    if (i == 0) begin : g_lsb
      always @(posedge c16[2][i]) if (counting) e16[2][i]++;
    end else begin : g_up
      always @(negedge c16[2][i]) if (counting) e16[2][i]++;
    end
    if (i < 8) begin : g8
      always @(posedge c8[0][i]) if (counting) e8[0][i]++;
      always @(negedge c8[1][i]) if (counting) e8[1][i]++;
      if (i == 0) begin : g_lsb
        always @(posedge c8[2][i]) if (counting) e8[2][i]++;
      end else begin : g_up
        always @(negedge c8[2][i]) if (counting) e8[2][i]++;
      end
    end
  end

  task automatic cmp(input int v, input logic [15:0] got16, input logic [7:0] got8);
    checks += 2;
    if (got16 !== 16'(cycle)) begin
      failures++;
      $display("FAIL cycle %0d 16-bit variant %0d: q=%0d", cycle, v, got16);
    end
    if (got8 !== 8'(cycle)) begin
      failures++;
      $display("FAIL cycle %0d 8-bit variant %0d: q=%0d", cycle, v, got8);
    end
  endtask

  initial begin
    for (int v = 0; v < 3; v++) begin
      for (int i = 0; i < 16; i++) e16[v][i] = 0;
      for (int i = 0; i < 8; i++) e8[v][i] = 0;
    end
    #1 rst_n = 1'b0;
    #21 rst_n = 1'b1;  // release while clk is low
    counting = 1'b1;
    repeat (CYCLES) begin
      @(posedge clk);
      cycle++;
      #1;
      cmp(0, q16[0], q8[0]);
      cmp(2, q16[2], q8[2]);
      @(negedge clk);
      #1;
      cmp(1, q16[1], q8[1]);
    end
    for (int v = 0; v < 3; v++) begin
      for (int i = 0; i < 16; i++) begin
        checks++;
        if (e16[v][i] != CYCLES >> i) begin
          failures++;
          $display("FAIL 16-bit variant %0d stage %0d: %0d edges, expected %0d",
                   v, i, e16[v][i], CYCLES >> i);
        end
      end
      for (int i = 0; i < 8; i++) begin
        checks++;
        if (e8[v][i] != CYCLES >> i) begin
          failures++;
          $display("FAIL 8-bit variant %0d stage %0d: %0d edges, expected %0d",
                   v, i, e8[v][i], CYCLES >> i);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (CYCLES + 20) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
