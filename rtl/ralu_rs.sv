// Reservation station of the R-ALU (8 entries by default).
//
// Holds operations steered to the R-ALU until their operands are
// available, then issues them one per cycle. Entries are kept in age order
// in a collapsing queue: index 0 is the oldest. Each cycle up to ENQ_W new
// entries are appended behind the valid ones, every waiting operand
// compares its tag with the result buses (wakeup) and takes the value on a
// match, and the oldest entry with both operands ready is offered to the
// R-ALU. It issues only if the R-ALU's reconfiguration control allows its
// class this cycle (cls_ok); otherwise the station waits, which is how a
// switch between integer and floating-point work costs cycles. The depth is
// the document's; the age-ordered queue, the oldest-ready-first policy and
// waiting (rather than issuing a younger operation) are choices of this
// design. A new entry must not exceed free_cnt (asserted).
//
// Timing: an entry enqueued in cycle t can issue in t+1 at the earliest; a
// wakeup seen in cycle t makes the operand ready from t+1. Issue is
// combinational from the stored state.
module ralu_rs
  import ralu_pkg::*;
#(
  parameter int unsigned DEPTH  = 8,
  parameter int unsigned ENQ_W  = 4,
  parameter int unsigned NUM_WB = 6
) (
  input  logic                     clk,
  input  logic                     rst_n,        // synchronous, active low
  input  logic [ENQ_W-1:0]         enq_valid,
  input  rs_entry_t                enq_entry [ENQ_W],
  output logic [$clog2(DEPTH+1)-1:0] free_cnt,
  input  logic [NUM_WB-1:0]        wb_valid,
  input  logic [TAG_W-1:0]         wb_tag  [NUM_WB],
  input  logic [XLEN-1:0]          wb_data [NUM_WB],
  input  logic [3:0]               cls_ok,
  output logic                     iss_valid,
  output rs_entry_t                iss_entry,
  output logic                     iss_blocked   // oldest ready op waits for reconfiguration
);
  localparam int unsigned CW = $clog2(DEPTH+1);

  rs_entry_t      q     [DEPTH];
  logic [CW-1:0]  cnt;
  rs_entry_t      q_nx  [DEPTH];
  logic [CW-1:0]  cnt_nx;

  function automatic rs_entry_t wake(rs_entry_t e, logic [NUM_WB-1:0] v,
                                     logic [TAG_W-1:0] t [NUM_WB],
                                     logic [XLEN-1:0] d [NUM_WB]);
    rs_entry_t r = e;
    for (int w = 0; w < NUM_WB; w++) begin
      if (v[w] && !r.a_rdy && r.a_tag == t[w]) begin r.a_rdy = 1'b1; r.a_val = d[w]; end
      if (v[w] && !r.b_rdy && r.b_tag == t[w]) begin r.b_rdy = 1'b1; r.b_val = d[w]; end
    end
    return r;
  endfunction

  logic          found;
  int unsigned   sel;

  always_comb begin
    // oldest ready entry
    found = 1'b0;
    sel   = 0;
    for (int i = DEPTH-1; i >= 0; i--)
      if (CW'(i) < cnt && q[i].a_rdy && q[i].b_rdy) begin
        found = 1'b1;
        sel   = i;
      end
    iss_entry   = q[sel];
    iss_valid   = found && cls_ok[op_class(q[sel].op)];
    iss_blocked = found && !iss_valid;
    free_cnt    = CW'(DEPTH) - cnt;

    // remove the issued entry, wake up the rest
    cnt_nx = cnt;
    for (int i = 0; i < DEPTH; i++) q_nx[i] = q[i];
    if (iss_valid) begin
      for (int i = 0; i < DEPTH-1; i++)
        if (i >= sel) q_nx[i] = q[i+1];
      cnt_nx = cnt - 1'b1;
    end
    for (int i = 0; i < DEPTH; i++) q_nx[i] = wake(q_nx[i], wb_valid, wb_tag, wb_data);
    // append new entries in slot order
    for (int k = 0; k < ENQ_W; k++)
      if (enq_valid[k]) begin
        for (int i = 0; i < DEPTH; i++)
          if (CW'(i) == cnt_nx) q_nx[i] = wake(enq_entry[k], wb_valid, wb_tag, wb_data);
        cnt_nx = cnt_nx + 1'b1;
      end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) cnt <= '0;
    else        cnt <= cnt_nx;
    for (int i = 0; i < DEPTH; i++) q[i] <= q_nx[i];
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    $countones(enq_valid) <= free_cnt);
endmodule
