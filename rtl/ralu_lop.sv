// Leading-one predictor (LOP) of the R-ALU floating-point path.
//
// Works on the A2/B2 significands (SIG_W-bit window) in parallel with the
// adder and predicts the number of leading zeros of the magnitude of the
// result, i.e. the normalisation left shift (6 bits). The operands are
// extended with a zero sign bit; for an effective subtraction B2 is
// inverted, exactly as at the adder input. An indicator string f marks
// each position where the leading digit of x + y can sit (the
// Schmookler-Nowka formula, computed from the per-bit propagate t,
// generate g and zero z signals); its leading one is then encoded. The
// prediction can be one position off in either direction; the left
// shifter corrects it. The document names the block and its 6-bit output
// only: the formula is this design's choice. Combinational.
module ralu_lop
  import ralu_pkg::*;
(
  input  logic [SIG_W-1:0]   a2,
  input  logic [SIG_W-1:0]   b2,
  input  logic               eff_sub,
  output logic [SHAMT_W-1:0] lzc_pred   // SIG_W when the indicator is empty
);
  localparam int unsigned N = SIG_W + 1;
  logic [N-1:0] x, y, t, g, z;
  logic [SIG_W-1:0] f;

  always_comb begin
    x = {1'b0, a2};
    y = eff_sub ? ~{1'b0, b2} : {1'b0, b2};
    t = x ^ y;
    g = x & y;
    z = ~x & ~y;
    for (int i = 0; i < SIG_W; i++) begin
      logic gm, zm;
      gm = (i > 0) ? g[i-1] : 1'b0;
      zm = (i > 0) ? z[i-1] : 1'b1;
      f[i] = ( t[i+1] & ((g[i] & ~zm) | (z[i] & ~gm)))
           | (~t[i+1] & ((z[i] & ~zm) | (g[i] & ~gm)));
    end
    lzc_pred = SHAMT_W'(SIG_W);
    for (int i = 0; i < SIG_W; i++)
      if (f[i]) lzc_pred = SHAMT_W'(SIG_W - 1 - i);
  end
endmodule
