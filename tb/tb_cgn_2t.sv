// tb_cgn_2t: self-checking testbench of the two-transistor clock gate.
//
// All four combinations of clock and enable are applied, then random
// values for many steps. The output must equal clk_in AND en after every
// step: the gate passes the clock when enabled and is driven low, not left
// floating, when disabled (checked by disabling it while the clock is high).
module tb_cgn_2t;
  localparam int unsigned STEPS = 1000;

  logic clk_in = 1'b0;
  logic en = 1'b0;
  logic clk_out;

  int unsigned checks = 0;
  int unsigned failures = 0;

  cgn_2t dut (.clk_in(clk_in), .en(en), .clk_out(clk_out));

  task automatic apply(input logic c, input logic e);
    clk_in = c;
    en     = e;
    #1;
    checks++;
    if (clk_out !== (c & e)) begin
      failures++;
      $display("FAIL clk_in=%b en=%b out=%b", c, e, clk_out);
    end
  endtask

  initial begin
    apply(1'b0, 1'b0);
    apply(1'b1, 1'b1);
    apply(1'b1, 1'b0);  // switched off while the clock is high: must go low
    apply(1'b0, 1'b1);
    for (int s = 0; s < STEPS; s++) apply(1'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(STEPS * 2 + 10);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
