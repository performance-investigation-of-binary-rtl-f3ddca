// tb_cgn_4t: self-checking testbench of the four-transistor clock gate.
//
// Clock, enable and reset are driven with random values, one change every
// time step. A reference model of the clocked inverter with its floating
// node (drive the inverted clock while enabled, keep the last value
// otherwise, rest at 0 in reset) is updated alongside and compared with the output
// after every step. The test also requires that both the pass and the hold
// behaviour were exercised many times.
module tb_cgn_4t;
  localparam int unsigned STEPS = 2000;

  logic clk_in = 1'b0;
  logic en = 1'b0;
  logic rst_n = 1'b1;
  logic clk_out;
  logic model;

  int unsigned checks = 0;
  int unsigned failures = 0;
  int unsigned n_pass = 0;
  int unsigned n_hold = 0;

  cgn_4t dut (.clk_in(clk_in), .en(en), .rst_n(rst_n), .clk_out(clk_out));

  initial begin
    model = 1'b0;
    #1;
    for (int s = 0; s < STEPS; s++) begin
      clk_in = 1'($urandom);
      en     = 1'($urandom);
      rst_n  = ($urandom % 16) != 0;
      if (!rst_n) model = 1'b0;
      else if (en) begin model = ~clk_in; n_pass++; end
      else n_hold++;
      #1;
      checks++;
      if (clk_out !== model) begin
        failures++;
        $display("FAIL step %0d: clk_in=%b en=%b rst_n=%b out=%b expected %b",
                 s, clk_in, en, rst_n, clk_out, model);
      end
    end
    checks++;
    if (n_pass < 100 || n_hold < 100) begin
      failures++;
      $display("FAIL coverage pass=%0d hold=%0d", n_pass, n_hold);
    end
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
