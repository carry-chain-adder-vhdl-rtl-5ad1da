// Self-checking testbench of rca_adder at its default width (32 bits).
// Drives corner cases (all zeros, all ones, full-length carry ripple) and
// random operands, and compares sum and carry out with a 33-bit reference
// addition. A free-running clock paces the stimulus; a watchdog ends the
// run as failed if it does not finish within a fixed number of cycles.
module tb_rca_adder;
  localparam int unsigned WD = 32;

  logic [WD-1:0] an, bn, cn;
  logic ci, co;
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  rca_adder dut (.an(an), .bn(bn), .ci(ci), .cn(cn), .co(co));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [WD-1:0] a, input logic [WD-1:0] b, input logic c);
    logic [WD:0] exp;
    an = a; bn = b; ci = c;
    @(posedge clk);
    exp = {1'b0, a} + {1'b0, b} + {{WD{1'b0}}, c};
    checks++;
    if ({co, cn} !== exp) begin
      failures++;
      $display("FAIL %h + %h + %0d: got %0d_%h expected %0d_%h", a, b, c, co, cn, exp[WD], exp[WD-1:0]);
    end
  endtask

  initial begin
    apply('0, '0, 1'b0);
    apply('0, '0, 1'b1);
    apply('1, '0, 1'b1);          // ripple across every bit
    apply('1, '1, 1'b1);
    apply('1, 32'd1, 1'b0);
    apply(32'h8000_0000, 32'h8000_0000, 1'b0);
    apply(32'h5555_5555, 32'hAAAA_AAAA, 1'b1);
    for (int k = 0; k < 5000; k++) apply($urandom, $urandom, 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
