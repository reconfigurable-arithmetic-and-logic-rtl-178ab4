// Testbench of the leading-one predictor: for additions and subtractions
// of random 53-bit significands (with many near-cancellations) the
// prediction must be within one of the true leading-zero count of the
// magnitude of the result, counted in the SIG_W-bit window. Both errors
// occur, and the exact count must be the most common case.
module tb_ralu_lop;
  import ralu_pkg::*;
  logic [SIG_W-1:0] a2, b2;
  logic eff_sub;
  logic [5:0] lzc_pred;
  int checks = 0, failures = 0, exact = 0;
  ralu_lop dut (.*);

  function automatic int lzcw(logic [SIG_W-1:0] v);
    for (int p = SIG_W-1; p >= 0; p--) if (v[p]) return SIG_W - 1 - p;
    return SIG_W;
  endfunction

  initial begin
    for (int i = 0; i < 20000; i++) begin
      logic [SIG_W-1:0] m;
      int t, d;
      a2 = SIG_W'({($urandom_range(0, 1) ? 1'b1 : 1'b0), 20'($urandom), $urandom}) << GUARD_W;
      b2 = (SIG_W'({1'b1, 20'($urandom), $urandom}) << GUARD_W) >> $urandom_range(0, 6);
      case (i % 4)
        0: b2 = a2 ^ SIG_W'($urandom_range(0, 255));
        1: b2 = a2 + SIG_W'($urandom_range(0, 3));
        default: ;
      endcase
      if (i % 2 == 1) {a2, b2} = {b2, a2};
      eff_sub = (i % 3 != 0);
      #1;
      m = eff_sub ? ((a2 > b2) ? a2 - b2 : b2 - a2) : a2 + b2;
      t = lzcw(m);
      d = t - int'(lzc_pred);
      checks++;
      if (d == 0) exact++;
      if (m != 0 && (d < -1 || d > 1)) begin
        failures++;
        $display("FAIL a2=%h b2=%h sub=%0b true %0d predicted %0d", a2, b2, eff_sub, t, lzc_pred);
      end
    end
    checks++;
    if (exact < 10000) begin failures++; $display("FAIL only %0d exact predictions", exact); end
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
