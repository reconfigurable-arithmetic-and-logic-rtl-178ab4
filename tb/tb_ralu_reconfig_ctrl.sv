// Testbench of the reconfiguration control. Operation classes are offered
// back to back and issued as soon as the control allows; the number of
// lost cycles between consecutive issues must match the switching table
// (0, 1 or 2), the switch settings must follow the mode of the last
// operation and each switch must be reported once. Then 4000 cycles of
// random issue are compared with a reservation-table model of the stages.
module tb_ralu_reconfig_ctrl;
  import ralu_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic issue = 0;
  ralu_cls_e issue_cls = CLS_LOG;
  logic [3:0] cls_ok;
  ralu_mode_e rs1_mode, rs2_mode;
  logic reconfig1, reconfig2;
  int checks = 0, failures = 0, ncyc = 0, nrec1 = 0, nrec2 = 0;

  ralu_reconfig_ctrl dut (.*);

  always @(negedge clk) ncyc++;
  always @(posedge clk) if (rst_n) begin nrec1 += int'(reconfig1); nrec2 += int'(reconfig2); end

  // reservation-table model for the random run
  int         lr [2];                 // last booked cycle per stage
  ralu_mode_e lm [2];                 // mode of that booking
  ralu_mode_e booked [2][int];        // stage, cycle -> booked setting

  function automatic bit can_book(int st, int u, ralu_mode_e m, int t);
    if (lr[st] >= u) return 0;
    return (lm[st] == m) || (lr[st] < u - 1 && u - 1 >= t);
  endfunction

  function automatic void book(int st, int u, ralu_mode_e m, ref int msw [2]);
    if (lm[st] != m) msw[st]++;
    lr[st] = u; lm[st] = m;
    booked[st][u] = m;
  endfunction

  task automatic go(input ralu_cls_e c, output int acc);
    @(negedge clk);
    while (!cls_ok[c]) @(negedge clk);
    issue = 1; issue_cls = c;
    @(posedge clk);
    acc = ncyc;
    #1 issue = 0;
  endtask

  task automatic seq(string name, ralu_cls_e c0, ralu_cls_e c1, int want);
    int t0, t1;
    go(c0, t0);
    go(c1, t1);
    checks++;
    if (t1 - t0 - 1 != want) begin
      failures++;
      $display("FAIL %s: %0d extra cycles, expected %0d", name, t1 - t0 - 1, want);
    end
  endtask

  task automatic seq3(string name, ralu_cls_e c0, ralu_cls_e c1, ralu_cls_e c2, int want1, int want2);
    int t0, t1, t2;
    go(c0, t0);
    go(c1, t1);
    go(c2, t2);
    checks++;
    if (t1 - t0 - 1 != want1 || t2 - t1 - 1 != want2) begin
      failures++;
      $display("FAIL %s: %0d,%0d extra cycles, expected %0d,%0d", name, t1 - t0 - 1, t2 - t1 - 1,
               want1, want2);
    end
  endtask

  task automatic expect_modes(ralu_mode_e m1, ralu_mode_e m2);
    checks++;
    if (rs1_mode != m1 || rs2_mode != m2) begin
      failures++;
      $display("FAIL modes %s/%s, expected %s/%s", rs1_mode.name(), rs2_mode.name(), m1.name(), m2.name());
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    expect_modes(MODE_INT, MODE_INT);
    seq("ADD->FP-ADD",   CLS_ADD,   CLS_FADD,  0);
    repeat (4) @(negedge clk);
    expect_modes(MODE_FP, MODE_FP);
    seq("FP-ADD->FP-ADD", CLS_FADD, CLS_FADD, 0);
    repeat (4) @(negedge clk);                       // an FP add on its own
    seq("FP-ADD->ADD",   CLS_FADD,  CLS_ADD,   2);
    repeat (4) @(negedge clk);
    expect_modes(MODE_FP, MODE_INT);
    seq("LOG->FP-ADD",   CLS_LOG,   CLS_FADD,  0);
    seq("FP-ADD->SHIFT", CLS_FADD,  CLS_SHIFT, 1);
    seq("SHIFT->FP-ADD", CLS_SHIFT, CLS_FADD,  1);
    seq3("FP-ADD,LOG,SHIFT", CLS_FADD, CLS_LOG, CLS_SHIFT, 0, 0);
    seq3("FP-ADD,LOG,ADD",   CLS_FADD, CLS_LOG, CLS_ADD,   0, 1);
    seq3("FP-ADD,SHIFT,ADD", CLS_FADD, CLS_SHIFT, CLS_ADD, 1, 0);
    seq("ADD->SHIFT",    CLS_ADD,   CLS_SHIFT, 0);
    seq("SHIFT->ADD",    CLS_SHIFT, CLS_ADD,   0);
    repeat (4) @(negedge clk);
    expect_modes(MODE_INT, MODE_INT);
    // the run above changes the stage-1 setting 6 times and the stage-2
    // setting 6 times
    checks++;
    if (nrec1 != 6 || nrec2 != 6) begin
      failures++;
      $display("FAIL reconfiguration counts %0d/%0d, expected 6/6", nrec1, nrec2);
    end

    // Random streams against a reservation-table model. Each operation
    // issued in cycle t books its stages: SHIFT stage 1 at t+1 (integer),
    // ADD stage 2 at t+1 (integer), FP-ADD stage 1 at t+1 and stage 2 at
    // t+2 (FP). A booking in cycle u is possible if the stage is free then
    // and either its last booking had the same mode or an idle cycle at
    // u-1, not in the past, is left for the switch. Every cycle the allowed
    // classes must match the model, a booked stage must have the booked
    // setting, and the number of switches must match the mode changes.
    repeat (4) @(negedge clk);
    begin
      int base1, base2, msw [2];
      msw = '{0, 0};
      base1 = nrec1; base2 = nrec2;
      lr = '{-10, -10};
      lm = '{MODE_INT, MODE_INT};
      for (int t = 0; t < 4000; t++) begin
        ralu_cls_e want;
        bit ok [4];
        int r;
        @(negedge clk);
        for (int st = 0; st < 2; st++)
          if (booked[st].exists(t)) begin
            checks++;
            if ((st == 0 ? rs1_mode : rs2_mode) != booked[st][t]) begin
              failures++; $display("FAIL cycle %0d: stage %0d setting differs from its booking", t, st + 1);
            end
            booked[st].delete(t);
          end
        ok[CLS_LOG]   = 1;
        ok[CLS_SHIFT] = can_book(0, t + 1, MODE_INT, t);
        ok[CLS_ADD]   = can_book(1, t + 1, MODE_INT, t);
        ok[CLS_FADD]  = can_book(0, t + 1, MODE_FP, t) && can_book(1, t + 2, MODE_FP, t);
        for (int c = 0; c < 4; c++) begin
          checks++;
          if (cls_ok[c] != ok[c]) begin
            failures++; $display("FAIL cycle %0d: cls_ok[%0d] = %0d, model %0d", t, c, cls_ok[c], ok[c]);
          end
        end
        // phases that favour integer or FP work, so the unit keeps switching
        r = $urandom_range(0, 99);
        if ((t / 12) % 2 == 0) want = (r < 40) ? CLS_ADD : (r < 65) ? CLS_SHIFT : (r < 85) ? CLS_LOG : CLS_FADD;
        else                   want = (r < 70) ? CLS_FADD : (r < 80) ? CLS_ADD : (r < 90) ? CLS_SHIFT : CLS_LOG;
        issue = ok[want] && ($urandom_range(0, 9) != 0);
        issue_cls = want;
        if (issue) begin
          if (want == CLS_SHIFT) book(0, t + 1, MODE_INT, msw);
          if (want == CLS_ADD)   book(1, t + 1, MODE_INT, msw);
          if (want == CLS_FADD) begin book(0, t + 1, MODE_FP, msw); book(1, t + 2, MODE_FP, msw); end
        end
      end
      @(negedge clk) issue = 0;
      repeat (4) @(negedge clk);
      checks++;
      if (nrec1 - base1 != msw[0] || nrec2 - base2 != msw[1]) begin
        failures++;
        $display("FAIL random run: %0d/%0d switches, model %0d/%0d", nrec1 - base1, nrec2 - base2, msw[0], msw[1]);
      end
      $display("random run: %0d stage-1 and %0d stage-2 switches", msw[0], msw[1]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (8000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
