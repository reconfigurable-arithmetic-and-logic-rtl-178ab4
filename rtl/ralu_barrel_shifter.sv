// 64-bit logarithmic barrel shifter of the R-ALU.
//
// It replaces the 54-bit alignment right shifter of a plain floating-point
// adder. Floating-point mode uses it as a right shifter of the smaller
// significand; integer mode uses it for SLL and SRL. Six stages of 2:1
// multiplexers shift by 1, 2, 4, ..., 32 bit positions; zeros are shifted
// in. A left shift is done as a right shift of the bit-reversed word, so
// one multiplexer tree serves both directions. Combinational.
module ralu_barrel_shifter
  import ralu_pkg::*;
(
  input  logic [XLEN-1:0]    din,
  input  logic [SHAMT_W-1:0] shamt,
  input  logic               left,     // 1: shift left (SLL), 0: shift right
  output logic [XLEN-1:0]    dout
);
  logic [XLEN-1:0] stage [SHAMT_W+1];

  function automatic logic [XLEN-1:0] rev(input logic [XLEN-1:0] v);
    for (int i = 0; i < XLEN; i++) rev[i] = v[XLEN-1-i];
  endfunction

  always_comb begin
    stage[0] = left ? rev(din) : din;
    for (int s = 0; s < SHAMT_W; s++)
      stage[s+1] = shamt[s] ? (stage[s] >> (1 << s)) : stage[s];
    dout = left ? rev(stage[SHAMT_W]) : stage[SHAMT_W];
  end
endmodule
