// tb_sbc_top: end-to-end testbench of the three gated counters at their
// default size.
//
// The top is instantiated without parameter overrides. A 10-time-unit master
// clock counts through two full wraps, an asynchronous reset is then applied
// in the middle of a count, and counting resumes for two more wraps.
//
// Checks, after every master edge on which a counter is meant to count
// (rising for SBC-1T and SBC-4T, falling for SBC-2T):
//   - the count equals an independent reference count;
//   - each flip-flop received a clock edge exactly when the reference says
//     it must toggle (all lower bits were 1 before the edge) and no edge
//     otherwise.
// The mechanisms are tallied per counter and each must occur at least once:
// a gated clock passed to an upper stage, a gated clock blocked, a wrap from
// all ones to zero, and a clear by the asynchronous reset.
module tb_sbc_top;
  import sbc_pkg::*;
  localparam int unsigned W      = SBC_WIDTH;
  localparam int unsigned WRAP   = 1 << W;
  localparam int unsigned PHASE1 = 2 * WRAP + 3;  // ends mid-count
  localparam int unsigned PHASE2 = 2 * WRAP + 1;
  localparam int unsigned NV     = 3;              // 0: 1T, 1: 2T, 2: 4T

  logic         clk = 1'b0;
  logic         rst_n = 1'b1;
  logic [W-1:0] q [NV];
  logic [W-1:0] sclk [NV];

  int unsigned checks = 0;
  int unsigned failures = 0;
  logic        counting = 1'b0;

  int unsigned seen [NV][W];      // active edges seen at each flip-flop
  int unsigned want [NV][W];      // edges the reference expects
  int unsigned n_pass [NV];       // gated clock passed to an upper stage
  int unsigned n_block [NV];      // gated clock held off an upper stage
  int unsigned n_wrap [NV];       // wrap from all ones to zero
  int unsigned n_clear [NV];      // asynchronous clear of a non-zero count
  logic [W-1:0] ref_q [NV];

  sbc_top dut (
    .clk         (clk),
    .rst_n       (rst_n),
    .q_1t        (q[0]),
    .q_2t        (q[1]),
    .q_4t        (q[2]),
    .stage_clk_1t(sclk[0]),
    .stage_clk_2t(sclk[1]),
    .stage_clk_4t(sclk[2])
  );

  always #5 clk = ~clk;

  // Active edge of every flip-flop: 1T rising; 2T falling; 4T rising for the
  // LSB and falling (inverted clock) above it.
  for (genvar i = 0; i < W; i++) begin : g_edge
    always @(posedge sclk[0][i]) if (counting) seen[0][i]++;
    always @(negedge sclk[1][i]) if (counting) seen[1][i]++;
    if (i == 0) begin : g_lsb
      always @(posedge sclk[2][i]) if (counting) seen[2][i]++;
    end else begin : g_upper
      always @(negedge sclk[2][i]) if (counting) seen[2][i]++;
    end
  end

  // Reference: advance variant v by one count and note which stages toggle.
  task automatic advance(input int v);
    logic all_ones = 1'b1;
    for (int i = 0; i < W; i++) begin
      if (all_ones) begin
        want[v][i]++;
        if (i > 0) n_pass[v]++;
      end else begin
        n_block[v]++;
      end
      all_ones = all_ones & ref_q[v][i];
    end
    if (ref_q[v] == '1) n_wrap[v]++;
    ref_q[v] = ref_q[v] + 1'b1;
  endtask

  task automatic check(input int v, input string when);
    checks++;
    if (q[v] !== ref_q[v]) begin
      failures++;
      $display("FAIL %s variant %0d: q=%0d expected %0d", when, v, q[v], ref_q[v]);
    end
    for (int i = 0; i < W; i++) begin
      checks++;
      if (seen[v][i] != want[v][i]) begin
        failures++;
        $display("FAIL %s variant %0d stage %0d: %0d clock edges, expected %0d",
                 when, v, i, seen[v][i], want[v][i]);
      end
    end
  endtask

  task automatic run(input int unsigned cycles);
    repeat (cycles) begin
      @(posedge clk);
      advance(0);
      advance(2);
      #1;
      check(0, "rising edge");
      check(2, "rising edge");
      @(negedge clk);
      advance(1);
      #1;
      check(1, "falling edge");
    end
  endtask

  task automatic do_reset();
    for (int v = 0; v < NV; v++) if (ref_q[v] != '0) n_clear[v]++;
    counting = 1'b0;
    #2 rst_n = 1'b0;  // asynchronous: between clock edges
    #1;
    for (int v = 0; v < NV; v++) begin
      ref_q[v] = '0;
      checks++;
      if (q[v] !== '0) begin
        failures++;
        $display("FAIL reset variant %0d: q=%0d", v, q[v]);
      end
    end
    @(negedge clk);
    #2 rst_n = 1'b1;  // release while clk is low, before the next rising edge
    for (int v = 0; v < NV; v++)
      for (int i = 0; i < W; i++) begin
        want[v][i] = 0;
        seen[v][i] = 0;
      end
    counting = 1'b1;
  endtask

  initial begin
    for (int v = 0; v < NV; v++) begin
      ref_q[v] = '0;
      n_pass[v] = 0; n_block[v] = 0; n_wrap[v] = 0; n_clear[v] = 0;
      for (int i = 0; i < W; i++) begin seen[v][i] = 0; want[v][i] = 0; end
    end
    do_reset();  // power-up reset
    run(PHASE1);
    do_reset();
    run(PHASE2);

    for (int v = 0; v < NV; v++) begin
      $display("variant %0d: passed=%0d blocked=%0d wraps=%0d clears=%0d",
               v, n_pass[v], n_block[v], n_wrap[v], n_clear[v]);
      checks += 4;
      if (n_pass[v] == 0)  begin failures++; $display("FAIL variant %0d: no gated clock passed", v); end
      if (n_block[v] == 0) begin failures++; $display("FAIL variant %0d: no gated clock blocked", v); end
      if (n_wrap[v] == 0)  begin failures++; $display("FAIL variant %0d: never wrapped", v); end
      if (n_clear[v] == 0) begin failures++; $display("FAIL variant %0d: never cleared", v); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (PHASE1 + PHASE2 + 50) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
