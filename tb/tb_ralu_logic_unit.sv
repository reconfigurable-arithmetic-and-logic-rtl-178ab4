// Testbench of the logic unit: AND, OR, XOR and NOR on random operands,
// checked bit by bit against truth tables.
module tb_ralu_logic_unit;
  import ralu_pkg::*;
  ralu_op_e op;
  logic [63:0] a, b, y;
  int checks = 0, failures = 0;
  ralu_logic_unit dut (.*);
  initial begin
    for (int i = 0; i < 4000; i++) begin
      logic [3:0] tt;
      a = {$urandom, $urandom}; b = {$urandom, $urandom};
      case (i % 4)
        0: begin op = OP_AND; tt = 4'b1000; end
        1: begin op = OP_OR;  tt = 4'b1110; end
        2: begin op = OP_XOR; tt = 4'b0110; end
        default: begin op = OP_NOR; tt = 4'b0001; end
      endcase
      #1;
      checks++;
      for (int k = 0; k < 64; k++)
        if (y[k] !== tt[{a[k], b[k]}]) begin
          failures++;
          $display("FAIL op=%s bit %0d", op.name(), k);
          break;
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
