// Self-checking testbench of the R-ALU core.
//
// 1. Random double-precision additions, back to back, compared with the
//    simulator's own IEEE addition: exactly for operands built so that no
//    bit is lost, within 2 units in the last place otherwise (the unit
//    truncates). Every FP result must appear 3 cycles after issue.
// 2. Random integer ADD/SUB/logic/shift operations against reference
//    expressions; every integer result must appear 1 cycle after issue.
// 3. The switching penalties of the integer/FP table: the gap, in cycles,
//    between consecutive issues of each listed sequence.
module tb_ralu_core;
  import ralu_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic               in_valid = 0, in_agen = 0;
  ralu_op_e           in_op = OP_ADD;
  logic [SHAMT_W-1:0] in_shamt = '0;
  logic [TAG_W-1:0]   in_tag = '0;
  logic [XLEN-1:0]    in_a = '0, in_b = '0;
  logic [3:0]         cls_ok;
  logic               int_valid, int_agen, fp_valid;
  logic [TAG_W-1:0]   int_tag, fp_tag;
  logic [XLEN-1:0]    int_data, fp_data;
  ralu_mode_e         rs1_mode, rs2_mode;
  logic               reconfig1, reconfig2;

  ralu_core dut (.*);

  int checks = 0, failures = 0;
  int ncyc = 0;

  // scoreboard, indexed by tag
  logic [XLEN-1:0] exp_val  [128];
  int              exp_cyc  [128];
  bit              exp_pend [128];
  bit              exp_fp   [128];
  int              exp_tol  [128];
  logic [TAG_W-1:0] next_tag = '0;

  function automatic logic [63:0] absdiff(logic [63:0] x, logic [63:0] y);
    return (x > y) ? x - y : y - x;
  endfunction

  always @(negedge clk) begin
    if (rst_n && int_valid) begin
      checks++;
      if (!exp_pend[int_tag] || exp_fp[int_tag] || exp_cyc[int_tag] != ncyc ||
          int_data != exp_val[int_tag]) begin
        failures++;
        $display("FAIL int tag %0d: got %h exp %h (cycle %0d, expected %0d)",
                 int_tag, int_data, exp_val[int_tag], ncyc, exp_cyc[int_tag]);
      end
      exp_pend[int_tag] = 0;
    end
    if (rst_n && fp_valid) begin
      checks++;
      if (!exp_pend[fp_tag] || !exp_fp[fp_tag] || exp_cyc[fp_tag] != ncyc ||
          fp_data[63] != exp_val[fp_tag][63] ||
          absdiff(fp_data, exp_val[fp_tag]) > 64'(exp_tol[fp_tag])) begin
        failures++;
        $display("FAIL fp tag %0d: got %h exp %h tol %0d (cycle %0d, expected %0d)",
                 fp_tag, fp_data, exp_val[fp_tag], exp_tol[fp_tag], ncyc, exp_cyc[fp_tag]);
      end
      exp_pend[fp_tag] = 0;
    end
    ncyc++;
  end

  function automatic logic [63:0] int_ref(ralu_op_e op, logic [63:0] a, logic [63:0] b,
                                          logic [5:0] sh);
    case (op)
      OP_ADD: return a + b;
      OP_SUB: return a - b;
      OP_AND: return a & b;
      OP_OR:  return a | b;
      OP_XOR: return a ^ b;
      OP_NOR: return ~(a | b);
      OP_SLL: return b << sh;
      OP_SRL: return b >> sh;
      default: return '0;
    endcase
  endfunction

  // Issue one operation as soon as the unit accepts it; returns the cycle.
  task automatic issue(input ralu_op_e op, input logic [63:0] a, input logic [63:0] b,
                       input logic [5:0] sh, input int tol, output int acc);
    in_valid = 1; in_op = op; in_a = a; in_b = b; in_shamt = sh; in_tag = next_tag;
    while (!cls_ok[op_class(op)]) @(negedge clk);
    @(posedge clk);
    acc = ncyc;
    exp_pend[next_tag] = 1;
    exp_fp[next_tag]   = (op == OP_FADD);
    exp_cyc[next_tag]  = (op == OP_FADD) ? acc + 2 : acc;
    exp_tol[next_tag]  = tol;
    exp_val[next_tag]  = (op == OP_FADD) ? $realtobits($bitstoreal(a) + $bitstoreal(b))
                                         : int_ref(op, a, b, sh);
    next_tag++;
    @(negedge clk);
    in_valid = 0;
  endtask

  task automatic idle(int n);
    repeat (n) @(negedge clk);
  endtask

  function automatic logic [63:0] rand_fp(int emin, int emax);
    logic [63:0] r;
    r[63]    = $urandom_range(0, 1);
    r[62:52] = 11'($urandom_range(emin, emax));
    r[51:0]  = {$urandom, $urandom};
    return r;
  endfunction

  int acc, prev, gap;
  logic [63:0] a, b;
  int unsigned nfp_exact = 0, nfp_round = 0, ncancel = 0;

  task automatic expect_gap(string what, int want);
    checks++;
    if (gap != want) begin
      failures++;
      $display("FAIL switching %s: %0d extra cycles, expected %0d", what, gap, want);
    end
  endtask

  initial begin
    for (int i = 0; i < 128; i++) exp_pend[i] = 0;
    idle(3);
    rst_n = 1;
    idle(2);

    // ---- 1. floating-point additions ----
    for (int i = 0; i < 3000; i++) begin
      int e;
      e = $urandom_range(1, 2040);
      a = rand_fp(e, e);
      case ($urandom_range(0, 3))
        0: b = rand_fp(e, e);                              // cancellation
        1: b = rand_fp((e > 60) ? e - 60 : 1, e);
        2: b = rand_fp(0, 2040);
        default: begin b = a; b[63] = ~a[63]; b[3:0] = 4'($urandom); end
      endcase
      if ($urandom_range(0, 20) == 0) a[62:52] = '0;       // subnormal
      if ($urandom_range(0, 3) == 0 && a[62:52] > 2) begin  // exponents one apart, cancelling:
        b = a;                                              // the exact difference fits
        b[63] = ~a[63];
        b[62:52] = a[62:52] - 11'd1;
        b[51:48] = 4'hf;
        nfp_exact++;
        issue(OP_FADD, a, b, 0, 0, acc);
      end else if ($urandom_range(0, 1)) begin              // exact case
        int d;
        d = $urandom_range(0, 10);
        b[62:52] = (a[62:52] > 11'(d)) ? a[62:52] - 11'(d) : a[62:52];
        a[11:0] = '0; b[11:0] = '0;
        nfp_exact++;
        issue(OP_FADD, a, b, 0, 0, acc);
      end else begin
        nfp_round++;
        issue(OP_FADD, a, b, 0, 2, acc);
      end
    end
    idle(5);

    // ---- 2. integer operations ----
    for (int i = 0; i < 3000; i++) begin
      ralu_op_e op;
      op = ralu_op_e'($urandom_range(0, 7));
      a = {$urandom, $urandom};
      b = {$urandom, $urandom};
      if ($urandom_range(0, 3) == 0) b = ~a;
      issue(op, a, b, 6'($urandom), 0, acc);
    end
    idle(5);

    // ---- 3. switching penalties ----
    a = $realtobits(1.5); b = $realtobits(2.25);
    // integer -> floating point
    issue(OP_ADD, a, b, 0, 0, prev); issue(OP_FADD, a, b, 0, 0, acc);
    gap = acc - prev - 1; expect_gap("ADD->FP-ADD", 0); idle(6);
    issue(OP_XOR, a, b, 0, 0, prev); issue(OP_FADD, a, b, 0, 0, acc);
    gap = acc - prev - 1; expect_gap("LOG->FP-ADD", 0); idle(6);
    issue(OP_SLL, a, b, 3, 0, prev); issue(OP_FADD, a, b, 0, 0, acc);
    gap = acc - prev - 1; expect_gap("SHIFT->FP-ADD", 1); idle(6);
    // floating point -> integer
    issue(OP_FADD, a, b, 0, 0, prev); issue(OP_OR, a, b, 0, 0, acc);
    gap = acc - prev - 1; expect_gap("FP-ADD->LOG", 0);
    prev = acc; issue(OP_SRL, a, b, 5, 0, acc);
    gap = acc - prev - 1; expect_gap("FP-ADD,LOG->SHIFT", 0); idle(6);
    issue(OP_FADD, a, b, 0, 0, prev); issue(OP_AND, a, b, 0, 0, acc);
    prev = acc; issue(OP_ADD, a, b, 0, 0, acc);
    gap = acc - prev - 1; expect_gap("FP-ADD,LOG->ADD", 1); idle(6);
    issue(OP_FADD, a, b, 0, 0, prev); issue(OP_SLL, a, b, 1, 0, acc);
    gap = acc - prev - 1; expect_gap("FP-ADD->SHIFT", 1); idle(6);
    issue(OP_FADD, a, b, 0, 0, prev); issue(OP_SUB, a, b, 0, 0, acc);
    gap = acc - prev - 1; expect_gap("FP-ADD->ADD", 2); idle(6);
    // back-to-back FP adds are fully pipelined
    issue(OP_FADD, a, b, 0, 0, prev); issue(OP_FADD, b, a, 0, 0, acc);
    gap = acc - prev - 1; expect_gap("FP-ADD->FP-ADD", 0); idle(6);

    for (int i = 0; i < 128; i++) begin
      checks++;
      if (exp_pend[i]) begin failures++; $display("FAIL tag %0d never completed", i); end
    end
    $display("fp exact %0d, fp truncated %0d", nfp_exact, nfp_round);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
