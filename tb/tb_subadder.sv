// Self-checking testbench of subadder at its default block width (4 bits).
// Applies every combination of the two operands and the carry in (512
// cases) and compares sum and carry out with a reference addition. A
// watchdog ends the run as failed if it does not finish in time.
module tb_subadder;
  localparam int unsigned BD = 4;

  logic [BD-1:0] an, bn, cn;
  logic ci, co;
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  subadder dut (.an(an), .bn(bn), .ci(ci), .cn(cn), .co(co));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp;
    for (int a = 0; a < 2**BD; a++)
      for (int b = 0; b < 2**BD; b++)
        for (int c = 0; c < 2; c++) begin
          an = BD'(a); bn = BD'(b); ci = 1'(c);
          @(posedge clk);
          exp = a + b + c;
          checks++;
          if ({co, cn} !== (BD+1)'(exp)) begin
            failures++;
            $display("FAIL %0d + %0d + %0d: got %0d_%0d", a, b, c, co, cn);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
