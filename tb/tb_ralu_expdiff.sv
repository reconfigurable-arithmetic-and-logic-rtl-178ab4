// Testbench of the exponent compare: random and corner exponent pairs are
// checked against the swap, saturated shift and larger exponent worked out
// with integer arithmetic.
module tb_ralu_expdiff;
  import ralu_pkg::*;
  logic [10:0] ea, eb, e_big;
  logic        swap;
  logic [5:0]  shamt;
  int checks = 0, failures = 0;

  ralu_expdiff dut (.*);

  task automatic check1();
    int a_e, b_e, d, ref_sh;
    #1;
    a_e = (ea == 0) ? 1 : int'(ea);
    b_e = (eb == 0) ? 1 : int'(eb);
    d = (a_e >= b_e) ? a_e - b_e : b_e - a_e;
    ref_sh = (d > 63) ? 63 : d;
    checks++;
    if (swap != (b_e > a_e) || int'(shamt) != ref_sh || int'(e_big) != ((a_e >= b_e) ? a_e : b_e)) begin
      failures++;
      $display("FAIL ea=%0d eb=%0d: swap %0b shamt %0d e_big %0d", ea, eb, swap, shamt, e_big);
    end
  endtask

  initial begin
    ea = 0; eb = 0; check1();
    ea = 0; eb = 1; check1();
    ea = 2047; eb = 0; check1();
    ea = 100; eb = 163; check1();
    ea = 100; eb = 164; check1();
    for (int i = 0; i < 20000; i++) begin
      ea = 11'($urandom);
      eb = ($urandom_range(0, 1)) ? 11'($urandom) : ea + 11'($urandom_range(0, 80)) - 11'd40;
      check1();
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
