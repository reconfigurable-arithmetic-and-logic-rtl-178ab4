// Testbench of the swap unit: random operands with every combination of
// swap request and enable (switch RS1a).
module tb_ralu_swap;
  import ralu_pkg::*;
  logic [63:0] a1, b1, to_a2, to_shift;
  logic swap, enable;
  int checks = 0, failures = 0;
  ralu_swap dut (.*);
  initial begin
    for (int i = 0; i < 4000; i++) begin
      a1 = {$urandom, $urandom}; b1 = {$urandom, $urandom};
      swap = 1'(i); enable = 1'(i >> 1);
      #1;
      checks++;
      if ((swap && enable) ? (to_a2 !== b1 || to_shift !== a1) : (to_a2 !== a1 || to_shift !== b1)) begin
        failures++;
        $display("FAIL swap=%0b enable=%0b", swap, enable);
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
