// Self-checking testbench of gprom at its default block width (4 bits).
// Reads all 256 entries of both tables with the enable high and checks
// g = (a + b > 15) and p = (a + b == 15), then checks that both outputs are
// low with the enable low. A watchdog ends the run as failed if it does not
// finish in time.
module tb_gprom;
  localparam int unsigned BD = 4;

  logic [BD-1:0] an, bn;
  logic en, g, p;
  int checks = 0, failures = 0;
  int n_gen = 0, n_prop = 0, n_kill = 0;
  logic clk = 1'b0;

  gprom dut (.an(an), .bn(bn), .en(en), .g(g), .p(p));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic eg, ep;
    for (int e = 1; e >= 0; e--)
      for (int a = 0; a < 2**BD; a++)
        for (int b = 0; b < 2**BD; b++) begin
          an = BD'(a); bn = BD'(b); en = 1'(e);
          @(posedge clk);
          eg = (e == 1) && (a + b >  2**BD - 1);
          ep = (e == 1) && (a + b == 2**BD - 1);
          if (e == 1) begin
            if (eg) n_gen++; else if (ep) n_prop++; else n_kill++;
          end
          checks++;
          if (g !== eg || p !== ep) begin
            failures++;
            $display("FAIL en=%0d a=%0d b=%0d: g=%0d p=%0d expected g=%0d p=%0d", e, a, b, g, p, eg, ep);
          end
        end
    // 120 pairs generate, 16 propagate, 120 kill for BD = 4
    checks++;
    if (n_gen != 120 || n_prop != 16 || n_kill != 120) begin
      failures++;
      $display("FAIL class counts gen=%0d prop=%0d kill=%0d", n_gen, n_prop, n_kill);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
