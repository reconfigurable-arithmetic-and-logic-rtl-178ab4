// Stage-1 exponent comparison of the R-ALU floating-point path.
//
// Both differences A-B and B-A of the two exponent fields are formed in
// parallel, as in the document's datapath drawing; the sign of A-B picks
// the larger exponent (the exponent multiplexer) and the positive
// difference becomes the alignment shift of the smaller operand (the shift
// multiplexer, which feeds the barrel shifter through switch RS1b). When
// A-B is negative the operands must be swapped. Purely combinational.
//
// Exponent field 0 (zero or subnormal) is taken as exponent 1, so that
// subnormal inputs line up correctly; the shift amount saturates at 63,
// which clears any significand in the adder window. Both of these are
// choices of this design.
module ralu_expdiff
  import ralu_pkg::*;
(
  input  logic [EXP_W-1:0]   ea,        // exponent field of operand A
  input  logic [EXP_W-1:0]   eb,        // exponent field of operand B
  output logic               swap,      // 1: |B| has the larger exponent
  output logic [SHAMT_W-1:0] shamt,     // alignment right shift of the smaller operand
  output logic [EXP_W-1:0]   e_big      // larger (effective) exponent
);
  logic [EXP_W-1:0] ea_e, eb_e;
  logic [EXP_W:0]   d_ab, d_ba;         // one extra bit: borrow
  logic [EXP_W-1:0] d_sel;

  always_comb begin
    ea_e  = (ea == '0) ? EXP_W'(1) : ea;
    eb_e  = (eb == '0) ? EXP_W'(1) : eb;
    d_ab  = {1'b0, ea_e} - {1'b0, eb_e};
    d_ba  = {1'b0, eb_e} - {1'b0, ea_e};
    swap  = d_ab[EXP_W];
    d_sel = swap ? d_ba[EXP_W-1:0] : d_ab[EXP_W-1:0];
    shamt = (d_sel > EXP_W'(63)) ? SHAMT_W'(63) : d_sel[SHAMT_W-1:0];
    e_big = swap ? eb_e : ea_e;
  end
endmodule
