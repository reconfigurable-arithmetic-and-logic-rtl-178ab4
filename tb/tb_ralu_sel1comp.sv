// Testbench of the one's-complement select: random x, y are added as the
// adder would (x + ~y for a subtraction) and the selected magnitude must
// equal |x - y|, or x + y for an addition.
module tb_ralu_sel1comp;
  import ralu_pkg::*;
  logic [SIG_W-1:0] sum, sum1, mag, x, y;
  logic cy, eff_sub;
  int checks = 0, failures = 0;
  ralu_sel1comp dut (.*);
  initial begin
    for (int i = 0; i < 8000; i++) begin
      logic [63:0] s;
      logic [64:0] r;
      logic [63:0] yy;
      x = {1'b0, (SIG_W-1)'({$urandom, $urandom})};
      y = (i % 5 == 0) ? x : {1'b0, (SIG_W-1)'({$urandom, $urandom})};
      eff_sub = 1'(i);
      yy = eff_sub ? ~64'(y) : 64'(y);
      r = 65'(x) + 65'(yy);
      s = r[63:0];
      sum = s[SIG_W-1:0]; sum1 = s[SIG_W-1:0] + SIG_W'(1); cy = r[64];
      #1;
      checks++;
      if (mag !== (eff_sub ? ((x > y) ? x - y : y - x) : x + y)) begin
        failures++;
        $display("FAIL x=%h y=%h sub=%0b mag=%h", x, y, eff_sub, mag);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
