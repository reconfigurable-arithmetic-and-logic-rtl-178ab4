// Reconfigurable arithmetic and logic unit (R-ALU).
//
// One unit that is either a 64-bit integer ALU (ADD, SUB, SLL, SRL, AND,
// OR, XOR, NOR; one pipeline stage) or a double-precision floating-point
// adder (FP-ADD; three pipeline stages). It is built on the datapath of a
// floating-point adder whose adder is widened from 54 to 64 bits, whose
// alignment shifter is a 64-bit barrel shifter, plus a logic unit and four
// programmable switches:
//   RS1a  swap control: the exponent compare (FP) or 0 (integer)
//   RS1b  barrel-shifter amount and direction: exponent difference (FP) or
//         the instruction's shift field (integer)
//   RS2a/RS2b  adder inputs: the stage-2 registers A2/B2 (FP) or the input
//         registers A1/B1 directly (integer)
// RS1a/RS1b form the stage-1 setting and RS2a/RS2b the stage-2 setting; the
// reconfiguration control switches each stage in a cycle when it is idle
// and holds back operations until their stages are set up.
//
// FP pipeline: stage 1 = exponent differences, swap, alignment shift;
// stage 2 = significand add/subtract with the leading-one predictor in
// parallel; stage 3 = sel 1comp, normalising left shift, exponent update,
// sign. Only the low SIG_W = 56 bits of adder and shifter are used: the
// 53-bit significand sits in bits 54..2, bit 55 takes the carry and bits
// 1..0 are guard bits. The document uses 54 bits (no guard bit); the two
// guard bits are added here because without them a subtraction of
// operands whose exponents differ by one, followed by a large
// cancellation, is wrong by up to 8 units in the last place.
//
// Interface and timing: in_valid/in_op/in_a/in_b/... are taken in cycle t
// only when cls_ok[op_class(in_op)] is 1; otherwise the operation is
// ignored and must be offered again. An
// integer result is on int_* in cycle t+1, a floating-point result on
// fp_* in cycle t+3. A memory address generation is an ADD with in_agen
// set; its result comes out on the integer port with int_agen set.
// Results are not held: the buses are driven for one cycle.
//
// Own choices, where the document is silent: rounding is truncation (the
// document shows no rounding hardware), subnormals are handled by limiting
// the normalising shift, exponent overflow gives infinity, and NaN or
// infinity operands are not treated specially.
module ralu_core
  import ralu_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,          // synchronous, active low
  // issue port
  input  logic               in_valid,
  input  ralu_op_e           in_op,
  input  logic [SHAMT_W-1:0] in_shamt,
  input  logic               in_agen,
  input  logic [TAG_W-1:0]   in_tag,
  input  logic [XLEN-1:0]    in_a,
  input  logic [XLEN-1:0]    in_b,
  output logic [3:0]         cls_ok,         // indexed by ralu_cls_e
  // integer result port
  output logic               int_valid,
  output logic               int_agen,
  output logic [TAG_W-1:0]   int_tag,
  output logic [XLEN-1:0]    int_data,
  // floating-point result port
  output logic               fp_valid,
  output logic [TAG_W-1:0]   fp_tag,
  output logic [XLEN-1:0]    fp_data,
  // status
  output ralu_mode_e         rs1_mode,
  output ralu_mode_e         rs2_mode,
  output logic               reconfig1,
  output logic               reconfig2
);
  // ---------------- input registers (A1, B1) ----------------
  logic               r1_v, r1_agen;
  ralu_op_e           r1_op;
  logic [SHAMT_W-1:0] r1_shamt;
  logic [TAG_W-1:0]   r1_tag;
  logic [XLEN-1:0]    a1, b1;

  logic accept;
  assign accept = in_valid && cls_ok[op_class(in_op)];

  always_ff @(posedge clk) begin
    if (!rst_n) r1_v <= 1'b0;
    else        r1_v <= accept;
    r1_op    <= in_op;
    r1_shamt <= in_shamt;
    r1_agen  <= in_agen;
    r1_tag   <= in_tag;
    a1       <= in_a;
    b1       <= in_b;
  end

  ralu_reconfig_ctrl u_ctrl (
    .clk, .rst_n,
    .issue    (accept),
    .issue_cls(op_class(in_op)),
    .cls_ok, .rs1_mode, .rs2_mode, .reconfig1, .reconfig2
  );

  // ---------------- stage 1 ----------------
  logic               fp1;                 // FP add in stage 1 this cycle
  logic               swap;
  logic [SHAMT_W-1:0] fp_shamt, bs_shamt;
  logic [EXP_W-1:0]   e_big;
  logic [XLEN-1:0]    sw_in_a, sw_in_b, to_a2, to_shift, bs_out;
  logic               bs_left;

  assign fp1 = r1_v && r1_op == OP_FADD;

  ralu_expdiff u_expdiff (
    .ea(a1[62:52]), .eb(b1[62:52]), .swap, .shamt(fp_shamt), .e_big);

  // In FP mode the swap unit sees the unpacked significands (hidden bit
  // restored); in integer mode the raw operands.
  always_comb begin
    if (rs1_mode == MODE_FP) begin
      sw_in_a = XLEN'({a1[62:52] != '0, a1[51:0]}) << GUARD_W;
      sw_in_b = XLEN'({b1[62:52] != '0, b1[51:0]}) << GUARD_W;
    end else begin
      sw_in_a = a1;
      sw_in_b = b1;
    end
    // switch RS1b: shift amount and direction
    bs_shamt = (rs1_mode == MODE_FP) ? fp_shamt : r1_shamt;
    bs_left  = (rs1_mode == MODE_INT) && (r1_op == OP_SLL);
  end

  ralu_swap u_swap (
    .a1(sw_in_a), .b1(sw_in_b), .swap,
    .enable(rs1_mode == MODE_FP),          // switch RS1a
    .to_a2, .to_shift);

  ralu_barrel_shifter u_bs (
    .din(to_shift), .shamt(bs_shamt), .left(bs_left), .dout(bs_out));

  logic [XLEN-1:0] lu_out;
  ralu_logic_unit u_lu (.op(r1_op), .a(a1), .b(b1), .y(lu_out));

  // ---------------- stage-2 registers (A2, B2) ----------------
  logic             r2_v;
  logic [TAG_W-1:0] r2_tag;
  logic [XLEN-1:0]  a2, b2;
  logic [EXP_W-1:0] r2_ebig;
  logic             r2_sa, r2_sb, r2_swap;

  always_ff @(posedge clk) begin
    if (!rst_n) r2_v <= 1'b0;
    else        r2_v <= fp1;
    r2_tag  <= r1_tag;
    a2      <= to_a2;
    b2      <= bs_out;
    r2_ebig <= e_big;
    r2_sa   <= a1[63];
    r2_sb   <= b1[63];
    r2_swap <= swap;
  end

  // ---------------- stage 2: adder and LOP ----------------
  logic            r2_effsub;
  logic [XLEN-1:0] add_x, add_y, sum, sum1;
  logic            add_inv, add_cin, cy;
  logic [SHAMT_W-1:0] lop_cnt;

  always_comb begin
    r2_effsub = r2_sa ^ r2_sb;
    if (rs2_mode == MODE_FP) begin        // switches RS2a/RS2b
      add_x   = a2;
      add_y   = b2;
      add_inv = r2_effsub;
      add_cin = 1'b0;
    end else begin
      add_x   = a1;
      add_y   = b1;
      add_inv = (r1_op == OP_SUB);
      add_cin = (r1_op == OP_SUB);
    end
  end

  ralu_addsub u_add (
    .x(add_x), .y(add_y), .inv_y(add_inv), .cin(add_cin),
    .sum, .sum1, .cy);

  ralu_lop u_lop (
    .a2(a2[SIG_W-1:0]), .b2(b2[SIG_W-1:0]), .eff_sub(r2_effsub), .lzc_pred(lop_cnt));

  // ---------------- stage-3 registers ----------------
  logic               r3_v, r3_effsub, r3_cy, r3_sa, r3_sb, r3_swap;
  logic [TAG_W-1:0]   r3_tag;
  logic [SIG_W-1:0]   r3_sum, r3_sum1;
  logic [SHAMT_W-1:0] r3_lop;
  logic [EXP_W-1:0]   r3_ebig;

  // The FP carry is the carry out of a SIG_W-bit subtraction: with the
  // 64-bit adder and one's-complemented upper bits it appears at bit 64.
  always_ff @(posedge clk) begin
    if (!rst_n) r3_v <= 1'b0;
    else        r3_v <= r2_v;
    r3_tag    <= r2_tag;
    r3_sum    <= sum[SIG_W-1:0];
    r3_sum1   <= sum1[SIG_W-1:0];
    r3_cy     <= cy;
    r3_effsub <= r2_effsub;
    r3_lop    <= lop_cnt;
    r3_ebig   <= r2_ebig;
    r3_sa     <= r2_sa;
    r3_sb     <= r2_sb;
    r3_swap   <= r2_swap;
  end

  // ---------------- stage 3: normalise, exponent, sign ----------------
  logic [SIG_W-1:0]  mag;
  logic [EXP_W-1:0]  exp_out;
  logic [FRAC_W-1:0] frac_out;
  logic              is_zero, sign;

  ralu_sel1comp u_sel (
    .sum(r3_sum), .sum1(r3_sum1), .cy(r3_cy), .eff_sub(r3_effsub), .mag);

  ralu_shift_left u_shl (
    .mag, .lzc_pred(r3_lop), .e_big(r3_ebig), .exp_out, .frac_out, .is_zero);

  ralu_sign u_sign (
    .sa(r3_sa), .sb(r3_sb), .swap(r3_swap), .cy(r3_cy), .is_zero, .sign);

  // ---------------- output drivers ----------------
  always_comb begin
    fp_valid = r3_v;
    fp_tag   = r3_tag;
    fp_data  = {sign, exp_out, frac_out};

    int_valid = r1_v && r1_op != OP_FADD;
    int_agen  = r1_agen;
    int_tag   = r1_tag;
    case (op_class(r1_op))
      CLS_ADD:   int_data = sum;
      CLS_SHIFT: int_data = bs_out;
      default:   int_data = lu_out;
    endcase
  end

  // The switches must be set for whatever uses a stage.
  a_s1_fp:   assert property (@(posedge clk) disable iff (!rst_n)
    fp1 |-> rs1_mode == MODE_FP);
  a_s1_int:  assert property (@(posedge clk) disable iff (!rst_n)
    (r1_v && op_class(r1_op) == CLS_SHIFT) |-> rs1_mode == MODE_INT);
  a_s2_fp:   assert property (@(posedge clk) disable iff (!rst_n)
    r2_v |-> rs2_mode == MODE_FP);
  a_s2_int:  assert property (@(posedge clk) disable iff (!rst_n)
    (r1_v && op_class(r1_op) == CLS_ADD) |-> rs2_mode == MODE_INT);
endmodule
