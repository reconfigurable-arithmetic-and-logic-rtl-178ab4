// Testbench of the normalising shifter: magnitudes with a known leading
// one, a prediction off by -1, 0 or +1, and larger exponents from 1 to
// 2047. The expected exponent and fraction are worked out from the true
// leading-one position, including subnormal results and overflow.
module tb_ralu_shift_left;
  import ralu_pkg::*;
  localparam int TOP = SIG_W - 1;
  logic [SIG_W-1:0] mag;
  logic [5:0]  lzc_pred;
  logic [10:0] e_big, exp_out;
  logic [51:0] frac_out;
  logic        is_zero;
  int checks = 0, failures = 0;
  ralu_shift_left dut (.*);
  initial begin
    for (int i = 0; i < 20000; i++) begin
      int lz, p, e, eexp;
      logic [SIG_W-1:0] norm;
      logic [51:0] efrac;
      lz  = $urandom_range(0, SIG_W);
      mag = (lz == SIG_W) ? '0 : (SIG_W'(1) << (TOP - lz)) | (SIG_W'({$urandom, $urandom}) >> (lz + 1));
      p   = lz + $urandom_range(0, 2) - 1;
      if (p < 0) p = 0;
      if (lz == SIG_W) p = SIG_W;
      lzc_pred = 6'(p);
      e_big = (i % 3 == 0) ? 11'($urandom_range(1, 60)) : 11'($urandom_range(1, 2047));
      #1;
      if (lz == SIG_W) begin
        eexp = 0; efrac = '0;
      end else begin
        e = int'(e_big) + 1 - lz;
        if (e >= 1) begin
          norm = mag << lz;
          eexp = (e >= 2047) ? 2047 : e;
          efrac = (e >= 2047) ? '0 : norm[TOP-1 -: 52];
          if (e == 1 && !norm[TOP]) eexp = 0;
        end else begin
          norm = mag << e_big;
          eexp = 0;
          efrac = norm[TOP-1 -: 52];
        end
      end
      checks++;
      if (int'(exp_out) != eexp || frac_out !== efrac || is_zero != (lz == SIG_W)) begin
        failures++;
        $display("FAIL mag=%h pred=%0d e_big=%0d: got %0d/%h exp %0d/%h", mag, lzc_pred, e_big,
                 exp_out, frac_out, eexp, efrac);
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
