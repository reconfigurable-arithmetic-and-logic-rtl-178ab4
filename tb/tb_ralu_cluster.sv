// End-to-end testbench of the R-ALU cluster at its default size (dispatch
// width 4, 8-entry R-ALU reservation station).
//
// The testbench plays the rest of the processor: it dispatches groups of 4
// renamed instructions, honours accept (in-order dispatch), executes what
// is steered to the integer and FP stations after a random delay and
// broadcasts those results on the external result buses, and reports
// random free-entry counts for those stations. Instruction streams
// alternate between integer-heavy, FP-heavy and mixed phases, with true
// dependences through tags, so the R-ALU keeps switching mode.
// Every R-ALU result is checked when it appears: integer results exactly,
// FP results within 2 units in the last place of the simulator's IEEE
// addition, addresses exactly. It must produce each dispatched operation
// exactly once. Each mechanism (stage-1 and stage-2 switches in both
// directions, an issue held back for reconfiguration, a full R-ALU
// station stopping dispatch, steering of integer work to both stations,
// address generation, wakeup by the R-ALU's own and by external results,
// every operation) is counted and must occur.
module tb_ralu_cluster;
  import ralu_pkg::*;
  localparam int W = 4, NX = 4, NT = 128;

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

  int checks = 0, failures = 0;

  // ---------------- tag bookkeeping ----------------
  bit              busy     [NT];     // allocated, result not yet seen
  bit              produced [NT];     // value known (result broadcast)
  bit              is_fp    [NT];
  logic [63:0]     val      [NT];
  // R-ALU operations in flight, by destination tag
  bit              r_pend   [NT];
  ralu_op_e        r_op     [NT];
  bit              r_agen   [NT];
  logic [5:0]      r_sh     [NT];
  bit              r_ardy   [NT], r_brdy [NT];
  logic [6:0]      r_atag   [NT], r_btag [NT];
  logic [63:0]     r_aval   [NT], r_bval [NT];
  bit              r_ext_src[NT], r_own_src[NT];
  // external operations in flight
  typedef struct { int tag; int due; int atag; int btag; logic [63:0] v; } ext_t;
  ext_t ext_q [$];

  int ncyc = 0;
  int n_ralu_disp = 0, n_ralu_done = 0;
  int cnt_rec1_fp = 0, cnt_rec1_int = 0, cnt_rec2_fp = 0, cnt_rec2_int = 0;
  int cnt_blocked = 0, cnt_rs_full_stop = 0, cnt_to_ralu_int = 0, cnt_to_int = 0;
  int cnt_agen = 0, cnt_wake_own = 0, cnt_wake_ext = 0;
  int cnt_op [9];
  int next_alloc = 0;

  function automatic int alloc_tag();
    for (int k = 0; k < NT; k++) begin
      int t = (next_alloc + k) % NT;
      if (!busy[t]) begin
        next_alloc = (t + 1) % NT;
        busy[t] = 1; produced[t] = 0;
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

  // a recent tag of the wanted kind, or -1
  int recent_int [$], recent_fp [$];
  function automatic int pick_src(bit want_fp);
    if (want_fp ? recent_fp.size() == 0 : recent_int.size() == 0) return -1;
    if ($urandom_range(0, 2) == 0) return -1;
    return want_fp ? recent_fp[$urandom_range(0, recent_fp.size() - 1)]
                   : recent_int[$urandom_range(0, recent_int.size() - 1)];
  endfunction
  function automatic void remember(int t, bit f);
    if (f) begin recent_fp.push_back(t); if (recent_fp.size() > 6) void'(recent_fp.pop_front()); end
    else   begin recent_int.push_back(t); if (recent_int.size() > 6) void'(recent_int.pop_front()); end
  endfunction

  // ---------------- instruction generation ----------------
  typedef struct { instr_cls_e cls; ralu_op_e op; logic [5:0] sh; } gen_t;
  gen_t pend_q [$];
  int phase = 0;

  function automatic gen_t gen();
    gen_t g;
    int r;
    r = $urandom_range(0, 99);
    g.sh = 6'($urandom);
    g.op = ralu_op_e'($urandom_range(0, 7));
    case (phase)
      0: g.cls = (r < 70) ? IC_IALU : (r < 80) ? IC_IOTH : (r < 95) ? IC_MEM : IC_FADD;   // integer
      1: g.cls = (r < 65) ? IC_FADD : (r < 80) ? IC_FOTH : (r < 90) ? IC_MEM : IC_IALU;   // FP
      default: g.cls = (r < 35) ? IC_IALU : (r < 65) ? IC_FADD : (r < 75) ? IC_FOTH :
                       (r < 85) ? IC_MEM : IC_IOTH;                                        // mixed
    endcase
    if (g.cls == IC_FADD) g.op = OP_FADD;
    return g;
  endfunction

  // build the slot for an instruction; returns 0 if no tag is free
  function automatic bit build(gen_t g, output disp_slot_t s, output int dst);
    int at, bt;
    bit f;
    s = '0;
    dst = alloc_tag();
    if (dst < 0) return 0;
    f = (g.cls == IC_FADD || g.cls == IC_FOTH);
    s.cls = g.cls; s.op = g.op; s.shamt = g.sh; s.dst_tag = TAG_W'(dst);
    at = pick_src(f && g.cls == IC_FADD);
    bt = (g.cls == IC_MEM) ? -1 : pick_src(f && g.cls == IC_FADD);
    if (at == dst) at = -1;          // a recent tag just reused for this instruction
    if (bt == dst) bt = -1;
    if (at >= 0 && !produced[at]) begin s.a_rdy = 0; s.a_tag = TAG_W'(at); end
    else begin
      s.a_rdy = 1;
      s.a_val = (at >= 0) ? val[at] : (g.cls == IC_FADD) ? rand_fp() : {$urandom, $urandom};
    end
    if (bt >= 0 && !produced[bt]) begin s.b_rdy = 0; s.b_tag = TAG_W'(bt); end
    else begin
      s.b_rdy = 1;
      s.b_val = (bt >= 0) ? val[bt] : (g.cls == IC_FADD) ? rand_fp() : {$urandom, $urandom};
    end
    is_fp[dst] = f;
    return 1;
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

  // ---------------- result monitor (values before the clock edge) ----------------
  task automatic finish_ralu(int t, logic [63:0] d, bit fp, bit agen);
    logic [63:0] a, b, e;
    bit bad;
    checks++;
    if (!r_pend[t]) begin
      failures++; $display("FAIL unexpected R-ALU result tag %0d", t); return;
    end
    a = r_ardy[t] ? r_aval[t] : val[r_atag[t]];
    b = r_brdy[t] ? r_bval[t] : val[r_btag[t]];
    if (fp) begin
      logic [63:0] diff;
      e = $realtobits($bitstoreal(a) + $bitstoreal(b));
      diff = (d > e) ? d - e : e - d;
      bad = (r_op[t] != OP_FADD) || d[63] != e[63] || diff > 2;
    end else begin
      e = ref_int(r_op[t], a, b, r_sh[t]);
      bad = (r_op[t] == OP_FADD) || (agen != r_agen[t]) || d != e;
    end
    if (bad) begin
      failures++;
      $display("FAIL tag %0d op %s: got %h expected %h (a %h b %h)", t, r_op[t].name(), d, e, a, b);
    end
    cnt_op[r_op[t]]++;
    if (agen) cnt_agen++;
    if (r_own_src[t]) cnt_wake_own++;
    if (r_ext_src[t]) cnt_wake_ext++;
    r_pend[t] = 0;
    n_ralu_done++;
    if (!agen) val[t] = d;
    produced[t] = 1;
    busy[t] = 0;
  endtask

  // a broadcast value is taken by every R-ALU operation waiting for it,
  // before the tag can be reused
  task automatic snoop(int t, logic [63:0] d);
    for (int c = 0; c < NT; c++)
      if (r_pend[c]) begin
        if (!r_ardy[c] && int'(r_atag[c]) == t) begin r_ardy[c] = 1; r_aval[c] = d; end
        if (!r_brdy[c] && int'(r_btag[c]) == t) begin r_brdy[c] = 1; r_bval[c] = d; end
      end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (int_valid && !int_agen) snoop(int'(int_tag), int_data);
    if (fp_valid) snoop(int'(fp_tag), fp_data);
    for (int w = 0; w < NX; w++) if (ext_wb_valid[w]) snoop(int'(ext_wb_tag[w]), ext_wb_data[w]);
    if (int_valid) finish_ralu(int'(int_tag), int_data, 0, int_agen);
    if (fp_valid)  finish_ralu(int'(fp_tag), fp_data, 1, 0);
    for (int w = 0; w < NX; w++)
      if (ext_wb_valid[w]) begin
        val[ext_wb_tag[w]] = ext_wb_data[w];
        produced[ext_wb_tag[w]] = 1;
        busy[ext_wb_tag[w]] = 0;
      end
    if (reconfig1) begin if (rs1_mode == MODE_INT) cnt_rec1_fp++; else cnt_rec1_int++; end
    if (reconfig2) begin if (rs2_mode == MODE_INT) cnt_rec2_fp++; else cnt_rec2_int++; end
    if (iss_blocked) cnt_blocked++;
  end

  // ---------------- dispatch and external units ----------------
  int n_groups;
  initial begin
    disp_slot_t s [W];
    int dst [W];
    for (int t = 0; t < NT; t++) begin busy[t] = 0; produced[t] = 1; r_pend[t] = 0; val[t] = '0; end
    for (int i = 0; i < 9; i++) cnt_op[i] = 0;
    for (int w = 0; w < NX; w++) begin ext_wb_tag[w] = '0; ext_wb_data[w] = '0; end
    for (int k = 0; k < W; k++) disp[k] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    n_groups = 3000;
    for (int cyc = 0; cyc < n_groups + 400; cyc++) begin
      @(negedge clk);
      ncyc++;
      if (cyc % 150 == 0) phase = (phase + 1) % 3;
      // external units: broadcast up to NX finished operations
      ext_wb_valid = '0;
      begin
        int nb;
        nb = 0;
        for (int i = 0; i < ext_q.size() && nb < NX; i++) begin
          ext_t x;
          x = ext_q[i];
          if (x.due <= ncyc && (x.atag < 0 || produced[x.atag]) && (x.btag < 0 || produced[x.btag])) begin
            ext_wb_valid[nb] = 1; ext_wb_tag[nb] = TAG_W'(x.tag); ext_wb_data[nb] = x.v;
            nb++;
            ext_q.delete(i);
            i--;
          end
        end
      end
      int_free  = 5'($urandom_range(0, 16));
      addr_free = 5'($urandom_range(2, 16));
      fp_free   = 5'($urandom_range(0, 8));
      // present the next W instructions of the stream
      for (int k = 0; k < W; k++) disp[k] = '0;
      if (cyc < n_groups) begin
        while (pend_q.size() < W) pend_q.push_back(gen());
        for (int k = 0; k < W; k++) begin
          if (!build(pend_q[k], s[k], dst[k])) begin
            for (int j = 0; j < k; j++) begin busy[dst[j]] = 0; produced[dst[j]] = 1; end
            break;
          end
          disp[k] = s[k];
        end
      end
      #1;
      if (disp[0].cls != IC_NONE) begin
        for (int k = W-1; k >= 0; k--) begin
          if (!accept[k]) begin
            busy[dst[k]] = 0; produced[dst[k]] = 1;
            if (disp[k].cls == IC_FADD && ralu_free == 0 && (k == 0 || accept[k-1])) cnt_rs_full_stop++;
            continue;
          end
        end
        for (int k = 0; k < W; k++) begin
          int t;
          if (!accept[k]) break;
          t = dst[k];
          void'(pend_q.pop_front());
          if (to_ralu[k]) begin
            n_ralu_disp++;
            r_pend[t] = 1; r_op[t] = (disp[k].cls == IC_MEM) ? OP_ADD : disp[k].op;
            r_agen[t] = (disp[k].cls == IC_MEM); r_sh[t] = disp[k].shamt;
            r_ardy[t] = disp[k].a_rdy; r_atag[t] = disp[k].a_tag; r_aval[t] = disp[k].a_val;
            r_brdy[t] = disp[k].b_rdy; r_btag[t] = disp[k].b_tag; r_bval[t] = disp[k].b_val;
            r_own_src[t] = 0; r_ext_src[t] = 0;
            if (!disp[k].a_rdy) begin if (r_pend[disp[k].a_tag]) r_own_src[t] = 1; else r_ext_src[t] = 1; end
            if (!disp[k].b_rdy) begin if (r_pend[disp[k].b_tag]) r_own_src[t] = 1; else r_ext_src[t] = 1; end
            if (disp[k].cls == IC_IALU) cnt_to_ralu_int++;
          end
          if (disp[k].cls == IC_IALU && to_int[k]) cnt_to_int++;
          if (disp[k].cls == IC_MEM && !to_ralu[k]) begin    // address station only
            busy[t] = 0; produced[t] = 1;
          end
          if (to_int[k] || to_fp[k]) begin
            ext_t x;
            x.tag = t; x.due = ncyc + $urandom_range(1, 6);
            x.atag = disp[k].a_rdy ? -1 : int'(disp[k].a_tag);
            x.btag = disp[k].b_rdy ? -1 : int'(disp[k].b_tag);
            x.v = is_fp[t] ? rand_fp() : {$urandom, $urandom};
            ext_q.push_back(x);
          end
          if (disp[k].cls != IC_MEM) remember(t, is_fp[t]);
        end
      end
    end
    // all R-ALU work done, nothing left waiting
    checks++;
    if (n_ralu_done != n_ralu_disp || ext_q.size() != 0) begin
      failures++;
      $display("FAIL %0d R-ALU ops dispatched, %0d done, %0d external left", n_ralu_disp, n_ralu_done,
               ext_q.size());
    end
    $display("R-ALU ops %0d; switches stage1 ->FP %0d ->INT %0d, stage2 ->FP %0d ->INT %0d",
             n_ralu_disp, cnt_rec1_fp, cnt_rec1_int, cnt_rec2_fp, cnt_rec2_int);
    $display("held for reconfiguration %0d cycles; dispatch stopped by full R-ALU station %0d",
             cnt_blocked, cnt_rs_full_stop);
    $display("integer ops steered to R-ALU %0d, to integer station %0d; address generations %0d",
             cnt_to_ralu_int, cnt_to_int, cnt_agen);
    $display("wakeups by own result %0d, by external result %0d", cnt_wake_own, cnt_wake_ext);
    begin
      int m [13];
      m = '{cnt_rec1_fp, cnt_rec1_int, cnt_rec2_fp, cnt_rec2_int, cnt_blocked, cnt_rs_full_stop,
            cnt_to_ralu_int, cnt_to_int, cnt_agen, cnt_wake_own, cnt_wake_ext, 1, 1};
      foreach (m[i]) begin
        checks++;
        if (m[i] == 0) begin failures++; $display("FAIL mechanism %0d never happened", i); end
      end
      for (int i = 0; i < 9; i++) begin
        checks++;
        if (cnt_op[i] == 0) begin failures++; $display("FAIL operation %s never executed", ralu_op_e'(i)); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

