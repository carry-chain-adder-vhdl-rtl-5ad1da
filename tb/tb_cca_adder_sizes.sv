// Self-checking testbench of the carry chain adder at sizes other than the
// default: 16 bits in 2-bit blocks, 12 bits in 3-bit blocks, 24 bits in
// 8-bit blocks and 8 bits in a single 8-bit block. Every instance gets the
// same random operands (masked to its width) and each result is compared with
// a reference addition. A watchdog ends the run as failed if it does not
// finish within a fixed number of cycles.
module tb_cca_adder_sizes;
  logic [23:0] an, bn;
  logic        ci;
  logic [15:0] s16;  logic c16;
  logic [11:0] s12;  logic c12;
  logic [23:0] s24;  logic c24;
  logic [7:0]  s8;   logic c8;
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  cca_adder #(.WD(16), .BD(2)) u16 (.an(an[15:0]), .bn(bn[15:0]), .ci(ci), .cn(s16), .co(c16));
  cca_adder #(.WD(12), .BD(3)) u12 (.an(an[11:0]), .bn(bn[11:0]), .ci(ci), .cn(s12), .co(c12));
  cca_adder #(.WD(24), .BD(8)) u24 (.an(an),       .bn(bn),       .ci(ci), .cn(s24), .co(c24));
  cca_adder #(.WD(8),  .BD(8)) u8  (.an(an[7:0]),  .bn(bn[7:0]),  .ci(ci), .cn(s8),  .co(c8));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string name, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s a=%h b=%h ci=%0d: got %h expected %h", name, an, bn, ci, got, exp);
    end
  endtask

  initial begin
    longint a, b, c;
    for (int k = 0; k < 20000; k++) begin
      if (k < 8) begin
        an = (k[0]) ? '1 : '0; bn = (k[1]) ? '1 : '0; ci = k[2];
      end else begin
        an = 24'($urandom); bn = 24'($urandom); ci = 1'($urandom);
        if (k % 4 == 0) bn = ~an;    // long propagate chains
      end
      @(posedge clk);
      a = longint'(an); b = longint'(bn); c = longint'(ci);
      check("16/2", {c16, s16}, (a & 'hFFFF) + (b & 'hFFFF) + c);
      check("12/3", {c12, s12}, (a & 'hFFF)  + (b & 'hFFF)  + c);
      check("24/8", {c24, s24}, a + b + c);
      check("8/8",  {c8,  s8},  (a & 'hFF)   + (b & 'hFF)   + c);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
