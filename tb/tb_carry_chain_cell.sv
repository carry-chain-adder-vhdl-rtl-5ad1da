// Self-checking testbench of carry_chain_cell. Applies all eight input
// combinations and checks qo = p ? qi : g. A watchdog ends the run as
// failed if it does not finish in time.
module tb_carry_chain_cell;
  logic qi, g, p, qo;
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  carry_chain_cell dut (.qi(qi), .g(g), .p(p), .qo(qo));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp;
    for (int v = 0; v < 8; v++) begin
      {p, g, qi} = 3'(v);
      @(posedge clk);
      exp = v[2] ? v[0] : v[1];
      checks++;
      if (qo !== exp) begin
        failures++;
        $display("FAIL p=%0d g=%0d qi=%0d: qo=%0d expected %0d", p, g, qi, qo, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
