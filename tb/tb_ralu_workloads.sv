// Workload testbench of the R-ALU cluster at its default size.
//
// The evaluated applications differ, as far as the R-ALU is concerned,
// mainly in how often the instruction stream changes between integer work
// and FP additions: on average every 40.5 instructions (swim), 16.5
// (wave5), 21.1 (su2cor), 370 (compress) and 325 (k-means); jpeg and li
// contain no FP addition at all. For each application the testbench
// dispatches a synthetic stream with that rhythm: integer phases
// (add/sub/logic/shift, loads and stores, other integer work) alternate
// with FP phases (FP additions and other FP work), each FP phase starting
// with an FP addition; phase lengths follow the average exactly. jpeg and
// li get 4000 integer-only instructions. The full programs (and the rest of
// the processor that would run them) are out of reach of an RTL simulation;
// this reproduces the reconfiguration pressure each one puts on the R-ALU.
//
// Checked per application: every R-ALU result (integer exactly, FP within
// 2 ulp of the simulator's IEEE addition, addresses exactly) and that
// every dispatched R-ALU operation completes; that the R-ALU changes
// stage-2 mode at most once per change of the stream, and never for an
// integer-only program; and that issue is held back for reconfiguration at
// most 2 cycles per stage switch (the worst case, FP-ADD then ADD).
// Reported: instructions per reconfiguration, held cycles, R-ALU
// operations and dispatch cycles. The unit is reset between applications.
module tb_ralu_workloads;
  import ralu_pkg::*;
  localparam int W = 4, NX = 4, NT = 128, NAPP = 7;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  disp_slot_t        disp [W];
  logic [4:0]        int_free = 16, addr_free = 16, fp_free = 8;
  logic [W-1:0]      accept, to_ralu, to_int, to_addr, to_fp;
  logic [NX-1:0]     ext_wb_valid = '0;
  logic [TAG_W-1:0]  ext_wb_tag  [NX];
  logic [XLEN-1:0]   ext_wb_data [NX];
  logic              int_valid, int_agen, fp_valid;
  logic [TAG_W-1:0]  int_tag, fp_tag;
  logic [XLEN-1:0]   int_data, fp_data;
  logic [4:0]        ralu_free;
  ralu_mode_e        rs1_mode, rs2_mode;
  logic              reconfig1, reconfig2, iss_valid, iss_blocked;

  ralu_cluster dut (.*);

  // instructions per reconfiguration, times ten; 0 = no FP addition
  string app_name [NAPP];
  int    ipr10    [NAPP];

  int checks = 0, failures = 0;

  // R-ALU operations in flight, by destination tag (all operands ready)
  bit          busy [NT];
  bit          r_pend [NT];
  bit          r_fp [NT], r_agen [NT];
  logic [63:0] r_exp [NT];
  int          next_alloc = 0;

  // per-application counters
  int n_disp, n_done, sw1, sw2_fp, sw2_int, held;

  function automatic int alloc_tag();
    for (int k = 0; k < NT; k++) begin
      int t = (next_alloc + k) % NT;
      if (!busy[t]) begin
        next_alloc = (t + 1) % NT;
        busy[t] = 1;
        return t;
      end
    end
    return -1;
  endfunction

  function automatic logic [63:0] rand_fp();
    logic [63:0] r;
    r[63] = 1'($urandom);
    r[62:52] = 11'($urandom_range(1000, 1046));
    r[51:0] = {$urandom, $urandom};
    return r;
  endfunction

  function automatic logic [63:0] ref_int(ralu_op_e op, logic [63:0] a, logic [63:0] b, logic [5:0] sh);
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

  task automatic check_result(int t, logic [63:0] d, bit fp, bit agen);
    bit bad;
    checks++;
    if (!r_pend[t]) begin
      failures++; $display("FAIL unexpected R-ALU result tag %0d", t); return;
    end
    if (fp) begin
      logic [63:0] diff;
      diff = (d > r_exp[t]) ? d - r_exp[t] : r_exp[t] - d;
      bad = !r_fp[t] || d[63] != r_exp[t][63] || diff > 2;
    end else
      bad = r_fp[t] || agen != r_agen[t] || d != r_exp[t];
    if (bad) begin
      failures++; $display("FAIL tag %0d: got %h expected %h", t, d, r_exp[t]);
    end
    r_pend[t] = 0;
    busy[t] = 0;
    n_done++;
  endtask

  always @(posedge clk) if (rst_n) begin
    if (int_valid) check_result(int'(int_tag), int_data, 0, int_agen);
    if (fp_valid)  check_result(int'(fp_tag), fp_data, 1, 0);
    if (reconfig1) sw1++;
    if (reconfig2) begin if (rs2_mode == MODE_INT) sw2_fp++; else sw2_int++; end
    if (iss_blocked) held++;
  end

  // ---------------- stream generation ----------------
  typedef struct { instr_cls_e cls; ralu_op_e op; logic [5:0] sh; } gen_t;

  function automatic gen_t gen(bit fp_phase, bit first);
    gen_t g;
    int r;
    r = $urandom_range(0, 99);
    g.sh = 6'($urandom);
    g.op = ralu_op_e'($urandom_range(0, 7));
    if (fp_phase) g.cls = (first || r < 60) ? IC_FADD : IC_FOTH;
    else          g.cls = (r < 60) ? IC_IALU : (r < 80) ? IC_MEM : IC_IOTH;
    if (g.cls == IC_FADD) g.op = OP_FADD;
    return g;
  endfunction

  task automatic run_app(int a);
    gen_t q [$];
    int n_instr, n_changes, n_cyc, prev_p;
    disp_slot_t s [W];
    int dst [W];
    // the stream: phase p covers instructions [p*ipr, (p+1)*ipr), odd p are FP
    n_instr = (ipr10[a] == 0) ? 4000 : ((12 * ipr10[a] / 10 > 2000) ? 12 * ipr10[a] / 10 : 2000);
    n_changes = 0;
    prev_p = 0;
    for (int i = 0; i < n_instr; i++) begin
      int p;
      p = (ipr10[a] == 0) ? 0 : (i * 10) / ipr10[a];
      if (p != prev_p) n_changes++;
      q.push_back(gen(p % 2 == 1, p != prev_p));
      prev_p = p;
    end
    n_disp = 0; n_done = 0; sw1 = 0; sw2_fp = 0; sw2_int = 0; held = 0;
    for (int t = 0; t < NT; t++) begin busy[t] = 0; r_pend[t] = 0; end
    @(negedge clk); rst_n = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    n_cyc = 0;
    while (q.size() != 0) begin
      @(negedge clk);
      n_cyc++;
      int_free  = 5'($urandom_range(0, 16));
      addr_free = 5'($urandom_range(2, 16));
      fp_free   = 5'($urandom_range(0, 8));
      for (int k = 0; k < W; k++) begin
        disp[k] = '0;
        dst[k] = -1;
      end
      for (int k = 0; k < W && k < q.size(); k++) begin
        dst[k] = alloc_tag();
        if (dst[k] < 0) break;
        s[k] = '0;
        s[k].cls = q[k].cls; s[k].op = q[k].op; s[k].shamt = q[k].sh;
        s[k].dst_tag = TAG_W'(dst[k]);
        s[k].a_rdy = 1; s[k].b_rdy = 1;
        s[k].a_val = (q[k].cls == IC_FADD) ? rand_fp() : {$urandom, $urandom};
        s[k].b_val = (q[k].cls == IC_FADD) ? rand_fp() : {$urandom, $urandom};
        disp[k] = s[k];
      end
      #1;
      for (int k = 0; k < W; k++) begin
        if (dst[k] < 0) continue;
        if (!accept[k] || !to_ralu[k]) begin busy[dst[k]] = 0; continue; end
        r_pend[dst[k]] = 1;
        n_disp++;
        r_fp[dst[k]]   = (disp[k].cls == IC_FADD);
        r_agen[dst[k]] = (disp[k].cls == IC_MEM);
        if (disp[k].cls == IC_FADD)
          r_exp[dst[k]] = $realtobits($bitstoreal(disp[k].a_val) + $bitstoreal(disp[k].b_val));
        else
          r_exp[dst[k]] = ref_int((disp[k].cls == IC_MEM) ? OP_ADD : disp[k].op,
                                  disp[k].a_val, disp[k].b_val, disp[k].shamt);
      end
      for (int k = 0; k < W; k++) begin
        if (dst[k] < 0 || !accept[k]) break;
        void'(q.pop_front());
      end
    end
    @(negedge clk);                 // the last group is taken at the edge before this
    for (int k = 0; k < W; k++) disp[k] = '0;
    repeat (40) @(negedge clk);

    checks++;
    if (n_done != n_disp) begin
      failures++; $display("FAIL %s: %0d R-ALU ops dispatched, %0d done", app_name[a], n_disp, n_done);
      for (int t = 0; t < NT; t++) if (r_pend[t]) $display("  pending tag %0d fp %0d agen %0d", t, r_fp[t], r_agen[t]);
    end
    // the R-ALU changes mode only when the stream does
    checks++;
    if (sw2_fp + sw2_int > n_changes || sw2_int > sw2_fp) begin
      failures++;
      $display("FAIL %s: %0d stage-2 switches for %0d stream changes", app_name[a], sw2_fp + sw2_int, n_changes);
    end
    // a program with FP additions makes it switch, one without never does
    checks++;
    if ((ipr10[a] == 0) != (sw1 + sw2_fp + sw2_int == 0)) begin
      failures++; $display("FAIL %s: %0d switches", app_name[a], sw1 + sw2_fp + sw2_int);
    end
    // at most 2 held cycles per stage switch
    checks++;
    if (held > 2 * (sw1 + sw2_fp + sw2_int)) begin
      failures++; $display("FAIL %s: %0d held cycles for %0d switches", app_name[a], held, sw1 + sw2_fp + sw2_int);
    end
    $display("%-9s %5d instr in %5d cycles, %4d stream changes; R-ALU ops %5d, stage switches %3d/%3d, held %4d cycles, instr per reconfig %0s (target %0s)",
             app_name[a], n_instr, n_cyc, n_changes, n_disp, sw1, sw2_fp + sw2_int, held,
             (sw2_fp + sw2_int == 0) ? "none" : $sformatf("%0.1f", real'(n_instr) / real'(sw2_fp + sw2_int)),
             (ipr10[a] == 0) ? "none" : $sformatf("%0.1f", real'(ipr10[a]) / 10.0));
  endtask

  initial begin
    app_name = '{"swim", "wave5", "su2cor", "compress", "jpeg", "li", "k-means"};
    ipr10    = '{405, 165, 211, 3700, 0, 0, 3250};
    for (int w = 0; w < NX; w++) begin ext_wb_tag[w] = '0; ext_wb_data[w] = '0; end
    for (int k = 0; k < W; k++) disp[k] = '0;
    for (int t = 0; t < NT; t++) begin busy[t] = 0; r_pend[t] = 0; end
    repeat (3) @(negedge clk);
    for (int a = 0; a < NAPP; a++) run_app(a);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
