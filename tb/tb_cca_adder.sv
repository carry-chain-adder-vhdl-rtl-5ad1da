// End-to-end, self-checking testbench of the carry chain adder at its
// default size (32-bit operands, eight 4-bit blocks), with no parameter
// overrides.
//
// Each addition is compared with a 33-bit reference sum. The testbench also
// classifies every block from the operands itself (generate: slice sum > 15,
// propagate: slice sum == 15, kill: otherwise) and counts how often each
// chain mechanism was exercised:
//   - a block generating a carry,
//   - a block killing a carry,
//   - a block passing a 1 from its chain input to its chain output,
//   - the carry in travelling through all eight blocks to the carry out.
// A mechanism never exercised counts as a failure. A watchdog ends the run
// as failed if it does not finish within a fixed number of cycles.
module tb_cca_adder;
  localparam int unsigned WD = 32;
  localparam int unsigned BD = 4;
  localparam int unsigned ND = WD / BD;

  logic [WD-1:0] an, bn, cn;
  logic ci, co;
  int checks = 0, failures = 0;
  int n_gen = 0, n_kill = 0, n_prop1 = 0, n_full_chain = 0;
  logic clk = 1'b0;

  cca_adder dut (.an(an), .bn(bn), .ci(ci), .cn(cn), .co(co));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Counts the chain mechanisms the operands exercise, from the operands.
  task automatic classify(input logic [WD-1:0] a, input logic [WD-1:0] b, input logic c);
    int s;
    logic q;
    bit all_prop;
    q = c;
    all_prop = 1'b1;
    for (int i = 0; i < ND; i++) begin
      s = int'(a[i*BD +: BD]) + int'(b[i*BD +: BD]);
      if (s > 2**BD - 1) begin
        n_gen++;  q = 1'b1; all_prop = 1'b0;
      end else if (s == 2**BD - 1) begin
        if (q) n_prop1++;
      end else begin
        n_kill++; q = 1'b0; all_prop = 1'b0;
      end
    end
    if (all_prop && c) n_full_chain++;
  endtask

  task automatic apply(input logic [WD-1:0] a, input logic [WD-1:0] b, input logic c);
    logic [WD:0] exp;
    an = a; bn = b; ci = c;
    @(posedge clk);
    exp = {1'b0, a} + {1'b0, b} + {{WD{1'b0}}, c};
    classify(a, b, c);
    checks++;
    if ({co, cn} !== exp) begin
      failures++;
      $display("FAIL %h + %h + %0d: got %0d_%h expected %0d_%h", a, b, c, co, cn, exp[WD], exp[WD-1:0]);
    end
  endtask

  initial begin
    logic [WD-1:0] a, b;
    // corner cases
    apply('0, '0, 1'b0);
    apply('1, '0, 1'b1);                  // carry in through all blocks
    apply('0, '1, 1'b1);
    apply(32'h0F0F_0F0F, 32'h00F0_00F0, 1'b1);
    apply('1, '1, 1'b0);
    apply('1, '1, 1'b1);
    apply(32'h7FFF_FFFF, 32'd1, 1'b0);
    apply(32'hFFFF_FFFF, 32'd1, 1'b0);
    apply(32'h1234_5678, 32'hEDCB_A987, 1'b1);
    // operands built block by block from generate / propagate / kill pairs,
    // so that long propagate runs occur far more often than with uniform data
    for (int k = 0; k < 20000; k++) begin
      for (int i = 0; i < ND; i++) begin
        logic [BD-1:0] x;
        int cls;
        x   = BD'($urandom);
        cls = $urandom_range(0, 3);
        a[i*BD +: BD] = x;
        if (cls <= 1)      b[i*BD +: BD] = ~x;                         // propagate
        else if (cls == 2 && x != '0)                                  // generate
          b[i*BD +: BD] = BD'($urandom_range(2**BD - int'(x), 2**BD - 1));
        else               b[i*BD +: BD] = BD'($urandom);
      end
      apply(a, b, 1'($urandom));
    end
    // uniform random operands
    for (int k = 0; k < 20000; k++) apply($urandom, $urandom, 1'($urandom));

    $display("mechanisms: generate=%0d kill=%0d propagate_one=%0d full_chain=%0d",
             n_gen, n_kill, n_prop1, n_full_chain);
    checks++; if (n_gen == 0)        begin failures++; $display("FAIL no generate");   end
    checks++; if (n_kill == 0)       begin failures++; $display("FAIL no kill");       end
    checks++; if (n_prop1 == 0)      begin failures++; $display("FAIL no propagate");  end
    checks++; if (n_full_chain == 0) begin failures++; $display("FAIL no full chain"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
