// Testbench of the sign logic: all 32 input combinations against the sign
// of the real difference they stand for.
module tb_ralu_sign;
  logic sa, sb, swap, cy, is_zero, sign;
  int checks = 0, failures = 0;
  ralu_sign dut (.*);
  initial begin
    for (int i = 0; i < 32; i++) begin
      logic ref_s;
      {sa, sb, swap, cy, is_zero} = 5'(i);
      #1;
      // same signs: the common sign; otherwise the sign of the operand of
      // larger magnitude, which is the larger-exponent one unless the
      // significand subtraction borrowed; exact zero is +0
      if (sa == sb)      ref_s = sa;
      else if (is_zero)  ref_s = 1'b0;
      else if (cy)       ref_s = swap ? sb : sa;
      else               ref_s = swap ? sa : sb;
      checks++;
      if (sign !== ref_s) begin
        failures++;
        $display("FAIL sa=%0b sb=%0b swap=%0b cy=%0b zero=%0b sign=%0b", sa, sb, swap, cy, is_zero, sign);
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
