// R-ALU cluster: steering logic, R-ALU reservation station and R-ALU.
//
// This is what the document adds to an R10000-like out-of-order core: the
// floating-point adder is replaced by the reconfigurable ALU, which gets a
// reservation station of its own (8 entries), and steering logic at
// dispatch decides which instructions go there. The rest of the core
// (decode, rename, the integer, address and FP reservation stations, the
// other functional units and the register files) is outside this module;
// it connects through ports:
//   disp_*       a dispatch group of W renamed instructions; the cluster
//                answers with accept and the routing bits to_int, to_addr,
//                to_fp (for the core's own stations) and to_ralu
//   *_free       free entries in the core's integer, address and FP stations
//   ext_wb_*     result buses of the core's other units, for wakeup
//   int_*, fp_*  the R-ALU's integer and floating-point result buses; an
//                address generated for a memory instruction comes out on
//                the integer bus with int_agen set and is meant for the
//                address station entry named by int_tag
// The R-ALU's own results also wake up its reservation station.
// Integer results appear two cycles after the instruction's operands are
// ready in the station (issue, then execute), FP results four cycles after.
// Switching between integer and FP work costs 0 to 2 cycles, see
// ralu_reconfig_ctrl.
module ralu_cluster
  import ralu_pkg::*;
#(
  parameter int unsigned W          = 4,    // dispatch width
  parameter int unsigned RS_DEPTH   = 8,    // R-ALU reservation station
  parameter int unsigned INT_DEPTH  = 16,   // core's integer station (for steering)
  parameter int unsigned NUM_EXT_WB = 4,    // external result buses
  parameter int unsigned CW         = 5     // width of free-entry counts
) (
  input  logic                 clk,
  input  logic                 rst_n,       // synchronous, active low
  // dispatch
  input  disp_slot_t           disp      [W],
  input  logic [CW-1:0]        int_free,
  input  logic [CW-1:0]        addr_free,
  input  logic [CW-1:0]        fp_free,
  output logic [W-1:0]         accept,
  output logic [W-1:0]         to_ralu,
  output logic [W-1:0]         to_int,
  output logic [W-1:0]         to_addr,
  output logic [W-1:0]         to_fp,
  // wakeup from the rest of the core
  input  logic [NUM_EXT_WB-1:0] ext_wb_valid,
  input  logic [TAG_W-1:0]     ext_wb_tag  [NUM_EXT_WB],
  input  logic [XLEN-1:0]      ext_wb_data [NUM_EXT_WB],
  // R-ALU results
  output logic                 int_valid,
  output logic                 int_agen,
  output logic [TAG_W-1:0]     int_tag,
  output logic [XLEN-1:0]      int_data,
  output logic                 fp_valid,
  output logic [TAG_W-1:0]     fp_tag,
  output logic [XLEN-1:0]      fp_data,
  // status
  output logic [CW-1:0]        ralu_free,     // 0..RS_DEPTH, in the common count width (top bit 0 at 8)
  output ralu_mode_e           rs1_mode,
  output ralu_mode_e           rs2_mode,
  output logic                 reconfig1,
  output logic                 reconfig2,
  output logic                 iss_valid,
  output logic                 iss_blocked
);
  localparam int unsigned NUM_WB = NUM_EXT_WB + 2;
  localparam int unsigned RCW    = $clog2(RS_DEPTH+1);

  instr_cls_e cls [W];
  always_comb for (int k = 0; k < W; k++) cls[k] = disp[k].cls;

  ralu_steer #(.W(W), .RALU_DEPTH(RS_DEPTH), .INT_DEPTH(INT_DEPTH), .CW(CW)) u_steer (
    .cls, .ralu_free, .int_free, .addr_free, .fp_free,
    .accept, .to_ralu, .to_int, .to_addr, .to_fp);

  // entries for the reservation station
  rs_entry_t enq_entry [W];
  always_comb begin
    for (int k = 0; k < W; k++) begin
      enq_entry[k].op      = (disp[k].cls == IC_MEM) ? OP_ADD : disp[k].op;
      enq_entry[k].shamt   = disp[k].shamt;
      enq_entry[k].agen    = (disp[k].cls == IC_MEM);
      enq_entry[k].dst_tag = disp[k].dst_tag;
      enq_entry[k].a_rdy   = disp[k].a_rdy;
      enq_entry[k].a_tag   = disp[k].a_tag;
      enq_entry[k].a_val   = disp[k].a_val;
      enq_entry[k].b_rdy   = disp[k].b_rdy;
      enq_entry[k].b_tag   = disp[k].b_tag;
      enq_entry[k].b_val   = disp[k].b_val;
    end
  end

  // wakeup buses: external ones, then the R-ALU's own two
  logic [NUM_WB-1:0] wb_valid;
  logic [TAG_W-1:0]  wb_tag  [NUM_WB];
  logic [XLEN-1:0]   wb_data [NUM_WB];
  always_comb begin
    for (int w = 0; w < NUM_EXT_WB; w++) begin
      wb_valid[w] = ext_wb_valid[w];
      wb_tag[w]   = ext_wb_tag[w];
      wb_data[w]  = ext_wb_data[w];
    end
    wb_valid[NUM_EXT_WB]   = int_valid && !int_agen;
    wb_tag[NUM_EXT_WB]     = int_tag;
    wb_data[NUM_EXT_WB]    = int_data;
    wb_valid[NUM_EXT_WB+1] = fp_valid;
    wb_tag[NUM_EXT_WB+1]   = fp_tag;
    wb_data[NUM_EXT_WB+1]  = fp_data;
  end

  logic [3:0]     cls_ok;
  rs_entry_t      iss_entry;
  logic [RCW-1:0] rs_free;

  ralu_rs #(.DEPTH(RS_DEPTH), .ENQ_W(W), .NUM_WB(NUM_WB)) u_rs (
    .clk, .rst_n,
    .enq_valid(to_ralu), .enq_entry, .free_cnt(rs_free),
    .wb_valid, .wb_tag, .wb_data,
    .cls_ok, .iss_valid, .iss_entry, .iss_blocked);

  assign ralu_free = CW'(rs_free);

  ralu_core u_core (
    .clk, .rst_n,
    .in_valid(iss_valid), .in_op(iss_entry.op), .in_shamt(iss_entry.shamt),
    .in_agen(iss_entry.agen), .in_tag(iss_entry.dst_tag),
    .in_a(iss_entry.a_val), .in_b(iss_entry.b_val),
    .cls_ok,
    .int_valid, .int_agen, .int_tag, .int_data,
    .fp_valid, .fp_tag, .fp_data,
    .rs1_mode, .rs2_mode, .reconfig1, .reconfig2);
endmodule
