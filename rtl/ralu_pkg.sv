// Shared types and constants of the reconfigurable ALU (R-ALU).
//
// The R-ALU is one functional unit that works either as a 64-bit integer
// ALU (ADD, SUB, SLL, SRL and logic operations, one pipeline stage) or as a
// double-precision IEEE 754 floating-point adder (three pipeline stages).
// This package holds the operation encoding, the mode of a reconfigurable
// stage, the instruction classes seen by the steering logic and the
// reservation-station entry format. The operation list follows the
// document; NOR, the numeric encodings and the entry layout are choices of
// this design.
package ralu_pkg;

  localparam int unsigned XLEN     = 64;   // integer data path width
  localparam int unsigned EXP_W    = 11;   // double-precision exponent
  localparam int unsigned FRAC_W   = 52;   // double-precision fraction
  localparam int unsigned GUARD_W  = 2;    // guard bits below the significand
  localparam int unsigned SIG_W    = 56;   // bits of adder/shifter used in FP mode:
                                           // carry, 53-bit significand, guard bits
  localparam int unsigned SHAMT_W  = 6;    // shift amount / LOP count width
  localparam int unsigned TAG_W    = 7;    // rename tag width (assumed)

  // Operations executed by the R-ALU.
  typedef enum logic [3:0] {
    OP_ADD   = 4'd0,
    OP_SUB   = 4'd1,
    OP_AND   = 4'd2,
    OP_OR    = 4'd3,
    OP_XOR   = 4'd4,
    OP_NOR   = 4'd5,
    OP_SLL   = 4'd6,
    OP_SRL   = 4'd7,
    OP_FADD  = 4'd8
  } ralu_op_e;

  // Configuration of one reconfigurable stage (the programmable switches).
  typedef enum logic {
    MODE_INT = 1'b0,
    MODE_FP  = 1'b1
  } ralu_mode_e;

  // Which hardware an operation uses, for the reconfiguration control.
  typedef enum logic [1:0] {
    CLS_LOG   = 2'd0,   // logic unit only
    CLS_ADD   = 2'd1,   // adder (stage 2) in integer mode
    CLS_SHIFT = 2'd2,   // barrel shifter (stage 1) in integer mode
    CLS_FADD  = 2'd3    // stage 1 then stage 2, floating-point mode
  } ralu_cls_e;

  // Decoded instruction classes seen by the steering logic at dispatch.
  typedef enum logic [2:0] {
    IC_NONE  = 3'd0,    // empty dispatch slot
    IC_IALU  = 3'd1,    // integer op the R-ALU can run (add/sub/logic/shift)
    IC_IOTH  = 3'd2,    // other integer op (branch, mul, div, ...)
    IC_MEM   = 3'd3,    // load/store: address generation
    IC_FADD  = 3'd4,    // floating-point add
    IC_FOTH  = 3'd5     // other floating-point op (mul, div, sqrt)
  } instr_cls_e;

  // One operation as held in the R-ALU reservation station.
  typedef struct packed {
    ralu_op_e              op;
    logic [SHAMT_W-1:0]    shamt;     // shift amount from the instruction
    logic                  agen;      // address generation for a memory op
    logic [TAG_W-1:0]      dst_tag;   // tag of the result (or of the LSU entry)
    logic                  a_rdy;
    logic [TAG_W-1:0]      a_tag;
    logic [XLEN-1:0]       a_val;
    logic                  b_rdy;
    logic [TAG_W-1:0]      b_tag;
    logic [XLEN-1:0]       b_val;
  } rs_entry_t;

  // One decoded and renamed instruction of a dispatch group, as presented
  // to the steering logic. For a load/store, a is the base register and b
  // the offset; the R-ALU then computes a + b.
  typedef struct packed {
    instr_cls_e            cls;
    ralu_op_e              op;        // meaningful for IC_IALU and IC_FADD
    logic [SHAMT_W-1:0]    shamt;
    logic [TAG_W-1:0]      dst_tag;
    logic                  a_rdy;
    logic [TAG_W-1:0]      a_tag;
    logic [XLEN-1:0]       a_val;
    logic                  b_rdy;
    logic [TAG_W-1:0]      b_tag;
    logic [XLEN-1:0]       b_val;
  } disp_slot_t;

  function automatic ralu_cls_e op_class(ralu_op_e op);
    case (op)
      OP_ADD, OP_SUB: return CLS_ADD;
      OP_SLL, OP_SRL: return CLS_SHIFT;
      OP_FADD:        return CLS_FADD;
      default:        return CLS_LOG;
    endcase
  endfunction

endpackage
