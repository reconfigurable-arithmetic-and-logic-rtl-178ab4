// Reconfiguration control of the R-ALU.
//
// The R-ALU has two reconfigurable stages: stage 1 (swap and barrel
// shifter, switches RS1a/RS1b) and stage 2 (the adder, switches RS2a/RS2b).
// A floating-point add uses stage 1 in cycle e and stage 2 in cycle e+1;
// an integer shift uses stage 1, an integer ADD/SUB uses stage 2, both for
// one cycle; a logic operation uses neither. A stage is switched to the
// other mode during one cycle in which it is idle. This control keeps, for
// each stage, its switch setting and whether it is used in the current and
// next cycle, and tells the issue logic which classes of operation may be
// issued now. That single rule reproduces the document's switching table:
// LOG/ADD -> FP-ADD costs 0 cycles, SHIFT -> FP-ADD 1, FP-ADD -> LOG 0,
// FP-ADD -> SHIFT 1, FP-ADD -> LOG -> ADD 1 and FP-ADD -> ADD 2.
// The bookkeeping by stage usage is this design's reading of that table
// and of the switching timing diagram.
//
// Timing: an operation accepted (issue) in cycle t sits in the R-ALU input
// register in cycle t+1 and uses its first stage then. rs1_fp/rs2_fp are
// the switch settings for the current cycle.
module ralu_reconfig_ctrl
  import ralu_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,         // synchronous, active low
  input  logic       issue,         // an operation is accepted this cycle
  input  ralu_cls_e  issue_cls,
  output logic [3:0] cls_ok,        // indexed by ralu_cls_e: may issue now
  output ralu_mode_e rs1_mode,      // setting of RS1a/RS1b
  output ralu_mode_e rs2_mode,      // setting of RS2a/RS2b
  output logic       reconfig1,     // stage 1 switched at the end of this cycle
  output logic       reconfig2      // stage 2 switched at the end of this cycle
);
  // Classes of the operations in the input register (stage 1 slot) and of
  // a floating-point add in the stage-2 register.
  logic       v1;
  ralu_cls_e  c1;
  logic       v2_fp;
  ralu_mode_e s2_last;             // mode of the last scheduled stage-2 use

  logic s1_use_now, s2_use_now, s2_use_next;
  ralu_mode_e rs1_nx, rs2_nx;

  always_comb begin
    s1_use_now  = v1 && (c1 == CLS_SHIFT || c1 == CLS_FADD);
    s2_use_now  = (v1 && c1 == CLS_ADD) || v2_fp;
    s2_use_next = v1 && c1 == CLS_FADD;

    cls_ok            = '0;
    cls_ok[CLS_LOG]   = 1'b1;  // logic unit uses neither stage: always free
    cls_ok[CLS_SHIFT] = (rs1_mode == MODE_INT) || !s1_use_now;
    cls_ok[CLS_FADD]  = ((rs1_mode == MODE_FP) || !s1_use_now) &&
                        ((s2_last == MODE_FP) || !s2_use_next);
    cls_ok[CLS_ADD]   = !s2_use_next && ((s2_last == MODE_INT) || !s2_use_now);

    rs1_nx = rs1_mode;
    rs2_nx = rs2_mode;
    if (issue && issue_cls == CLS_SHIFT) rs1_nx = MODE_INT;
    if (issue && issue_cls == CLS_FADD)  rs1_nx = MODE_FP;
    if (issue && issue_cls == CLS_ADD)   rs2_nx = MODE_INT;
    else if (s2_use_next)                rs2_nx = MODE_FP;   // FP add reaches the adder next cycle
    reconfig1 = (rs1_nx != rs1_mode);
    reconfig2 = (rs2_nx != rs2_mode);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v1       <= 1'b0;
      c1       <= CLS_LOG;
      v2_fp    <= 1'b0;
      rs1_mode <= MODE_INT;
      rs2_mode <= MODE_INT;
      s2_last  <= MODE_INT;
    end else begin
      v1       <= issue;
      c1       <= issue_cls;
      v2_fp    <= s2_use_next;
      rs1_mode <= rs1_nx;
      rs2_mode <= rs2_nx;
      if (issue && issue_cls == CLS_ADD)  s2_last <= MODE_INT;
      if (issue && issue_cls == CLS_FADD) s2_last <= MODE_FP;
    end
  end

  // An operation may only be accepted when its class is allowed.
  a_issue_legal: assert property (@(posedge clk) disable iff (!rst_n)
    issue |-> cls_ok[issue_cls]);
  // A stage is only switched while it is idle.
  a_switch1_idle: assert property (@(posedge clk) disable iff (!rst_n)
    reconfig1 |-> !s1_use_now);
  a_switch2_idle: assert property (@(posedge clk) disable iff (!rst_n)
    reconfig2 |-> !s2_use_now);
endmodule
