// Sign logic of the R-ALU floating-point path (third stage).
//
// Inputs are the two operand signs (bit 63 of A1 and B1, carried along the
// pipeline), the swap decision of stage 1 and the adder carry CY. For an
// effective addition the sign is that of A. For an effective subtraction it
// is the sign of the larger-exponent operand, inverted when the adder found
// the smaller-exponent one to have the larger significand (no carry). An
// exact zero from a subtraction is +0, the IEEE 754 rule for
// round-to-nearest and round-toward-zero. Combinational.
module ralu_sign (
  input  logic sa,
  input  logic sb,
  input  logic swap,
  input  logic cy,
  input  logic is_zero,
  output logic sign
);
  logic eff_sub, s_big;
  always_comb begin
    eff_sub = sa ^ sb;
    s_big   = swap ? sb : sa;
    if (!eff_sub)     sign = sa;
    else if (is_zero) sign = 1'b0;
    else              sign = cy ? s_big : ~s_big;
  end
endmodule
