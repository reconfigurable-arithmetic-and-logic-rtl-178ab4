// Normalising left shifter and exponent update of the R-ALU (third stage).
//
// The magnitude from "sel 1comp" is shifted left by the LOP prediction so
// that its leading one lands at the top bit of the SIG_W-bit window. Because the prediction
// may be one off, a final one-bit step right or left corrects it. The
// exponent is updated in parallel: e_out = e_big + 1 - shift (the "A-B"
// box of the drawing, with the +1 from placing the 53-bit significand one
// position below the top of the window, under the carry bit). The shift
// is limited so that e_out does not drop below 1: the result is then
// subnormal. The bits below the 52 fraction bits are dropped
// (truncation). Overflow gives
// infinity. The one-bit correction, the subnormal limit, truncation and
// overflow handling are this design's choices: the document only names
// the shifter. Combinational.
module ralu_shift_left
  import ralu_pkg::*;
(
  input  logic [SIG_W-1:0]   mag,
  input  logic [SHAMT_W-1:0] lzc_pred,
  input  logic [EXP_W-1:0]   e_big,      // >= 1
  output logic [EXP_W-1:0]   exp_out,    // exponent field of the result
  output logic [FRAC_W-1:0]  frac_out,   // fraction field of the result
  output logic               is_zero
);
  logic [SIG_W:0]   v;          // one spare bit above the window
  logic [EXP_W+1:0] e;          // wide enough for e_big + 1
  logic [EXP_W+1:0] limit;
  logic [EXP_W+1:0] s;

  always_comb begin
    limit = {2'b00, e_big};
    s     = {{(EXP_W+2-SHAMT_W){1'b0}}, lzc_pred};
    if (s > limit) s = limit;
    v = {1'b0, mag} << s;
    e = limit + 1 - s;
    if (v[SIG_W]) begin
      v = v >> 1;
      e = e + 1;
    end else if (!v[SIG_W-1] && s < limit) begin
      v = v << 1;
      e = e - 1;
    end
    is_zero = (mag == '0);
    if (!v[SIG_W-1]) begin                 // subnormal or zero
      exp_out  = '0;
      frac_out = v[SIG_W-2 -: FRAC_W];
    end else if (e >= (EXP_W+2)'(2**EXP_W - 1)) begin   // overflow
      exp_out  = '1;
      frac_out = '0;
    end else begin
      exp_out  = e[EXP_W-1:0];
      frac_out = v[SIG_W-2 -: FRAC_W];
    end
  end
endmodule
