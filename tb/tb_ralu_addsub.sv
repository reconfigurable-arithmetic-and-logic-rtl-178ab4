// Testbench of the compound adder: sum, sum+1 and carry for random and
// carry-chain corner operands, in all four inv_y/cin settings.
module tb_ralu_addsub;
  import ralu_pkg::*;
  logic [63:0] x, y, sum, sum1;
  logic inv_y, cin, cy;
  int checks = 0, failures = 0;
  ralu_addsub dut (.*);
  initial begin
    for (int i = 0; i < 8000; i++) begin
      logic [64:0] r;
      logic [63:0] yy;
      x = {$urandom, $urandom}; y = {$urandom, $urandom};
      if (i % 7 == 0) y = ~x;
      if (i % 11 == 0) y = x;
      inv_y = 1'(i); cin = 1'(i >> 1);
      #1;
      yy = inv_y ? ~y : y;
      r = 65'(x) + 65'(yy) + 65'(cin);
      checks++;
      if (sum !== r[63:0] || cy !== r[64] || sum1 !== r[63:0] + 64'd1) begin
        failures++;
        $display("FAIL x=%h y=%h inv=%0b cin=%0b", x, y, inv_y, cin);
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
