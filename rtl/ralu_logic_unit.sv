// Logic unit of the R-ALU, used in integer mode only.
//
// Bitwise AND, OR, XOR and NOR of the two 64-bit operands A1 and B1. The
// document lists "OR, AND, XOR, ..."; NOR is added because the host
// instruction set (MIPS) has it. Any other operation code gives 0.
// Combinational; the result goes to the integer result bus.
module ralu_logic_unit
  import ralu_pkg::*;
(
  input  ralu_op_e        op,
  input  logic [XLEN-1:0] a,
  input  logic [XLEN-1:0] b,
  output logic [XLEN-1:0] y
);
  always_comb begin
    case (op)
      OP_AND:  y = a & b;
      OP_OR:   y = a | b;
      OP_XOR:  y = a ^ b;
      OP_NOR:  y = ~(a | b);
      default: y = '0;
    endcase
  end
endmodule
