// Testbench of the barrel shifter: every shift amount in both directions
// on random words, against the shift operators.
module tb_ralu_barrel_shifter;
  import ralu_pkg::*;
  logic [63:0] din, dout;
  logic [5:0]  shamt;
  logic        left;
  int checks = 0, failures = 0;
  ralu_barrel_shifter dut (.*);
  initial begin
    for (int i = 0; i < 8000; i++) begin
      din = {$urandom, $urandom}; shamt = 6'(i); left = 1'(i >> 6);
      #1;
      checks++;
      if (dout !== (left ? din << shamt : din >> shamt)) begin
        failures++;
        $display("FAIL din=%h shamt=%0d left=%0b dout=%h", din, shamt, left, dout);
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
