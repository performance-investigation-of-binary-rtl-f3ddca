// tb_t_ff: self-checking testbench of the T flip-flop, both edge options.
//
// One rising-edge and one falling-edge instance share a clock, reset and
// random toggle input. After every active edge each state must equal a
// reference that toggles when t was 1 at the edge. The reset is also
// asserted at random points and must clear both states at once, without a
// clock edge. The test requires both toggle and hold cycles to occur.
module tb_t_ff;
  import sbc_pkg::*;
  localparam int unsigned CYCLES = 400;

  logic clk = 1'b0;
  logic rst_n = 1'b1;
  logic t = 1'b0;
  logic q_r, q_f;
  logic m_r, m_f;

  int unsigned checks = 0;
  int unsigned failures = 0;
  int unsigned n_toggle = 0;
  int unsigned n_hold = 0;

  t_ff #(.EDGE(EDGE_RISE)) dut_r (.clk(clk), .rst_n(rst_n), .t(t), .q(q_r));
  t_ff #(.EDGE(EDGE_FALL)) dut_f (.clk(clk), .rst_n(rst_n), .t(t), .q(q_f));

  task automatic check(input string what);
    checks++;
    if (q_r !== m_r || q_f !== m_f) begin
      failures++;
      $display("FAIL %s: q_r=%b (exp %b) q_f=%b (exp %b)", what, q_r, m_r, q_f, m_f);
    end
  endtask

  initial begin
    m_r = 1'b0;
    m_f = 1'b0;
    #1 rst_n = 1'b0;
    #1 check("reset");
    rst_n = 1'b1;
    for (int c = 0; c < CYCLES; c++) begin
      t = 1'($urandom);
      #3 clk = 1'b1;  // rising edge
      if (t) begin m_r = ~m_r; n_toggle++; end else n_hold++;
      #1 check("rising edge");
      t = 1'($urandom);
      #1 clk = 1'b0;  // falling edge
      if (t) m_f = ~m_f;
      #1 check("falling edge");
      if ($urandom % 32 == 0) begin
        rst_n = 1'b0;
        m_r = 1'b0;
        m_f = 1'b0;
        #1 check("asynchronous reset");
        rst_n = 1'b1;
      end
    end
    checks++;
    if (n_toggle < 50 || n_hold < 50) begin
      failures++;
      $display("FAIL coverage toggle=%0d hold=%0d", n_toggle, n_hold);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(CYCLES * 8 + 20);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
