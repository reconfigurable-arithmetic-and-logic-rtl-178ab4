// Operand swap unit of the R-ALU (first pipeline stage).
//
// In floating-point mode the operand with the larger exponent is routed to
// the A2 path (straight to the adder) and the other one to the barrel
// shifter for alignment. In integer mode the swap control is forced to 0 by
// switch RS1a, so A1 goes to the A path and B1 to the barrel shifter, as the
// document describes. Purely combinational.
module ralu_swap
  import ralu_pkg::*;
(
  input  logic [XLEN-1:0] a1,
  input  logic [XLEN-1:0] b1,
  input  logic            swap,      // swap request from the exponent compare
  input  logic            enable,    // switch RS1a: 0 in integer mode
  output logic [XLEN-1:0] to_a2,       // to the A2 register (larger operand)
  output logic [XLEN-1:0] to_shift      // to the barrel shifter
);
  always_comb begin
    if (enable && swap) begin
      to_a2   = b1;
      to_shift = a1;
    end else begin
      to_a2   = a1;
      to_shift = b1;
    end
  end
endmodule
