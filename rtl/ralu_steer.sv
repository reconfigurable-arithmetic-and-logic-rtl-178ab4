// Steering logic added to the dispatch stage for the R-ALU.
//
// Works next to register renaming on the W decoded instructions of a
// dispatch group and decides to which reservation station(s) each one
// goes. Floating-point adds must go to the R-ALU, which has replaced the
// FP adder; other FP operations go to the FP station and integer
// operations the R-ALU cannot do to the integer station. An integer
// add/sub/logic/shift goes to the R-ALU station when that station is at
// least as empty, relative to its size, as the integer station; otherwise
// to the integer station. A load/store always goes to the address station
// and, by the same rule, may also be sent to the R-ALU, which then only
// computes its address. Dispatch is in order: the first instruction that
// finds no room stops itself and all later ones in the group (accept).
// The free-entry counts of the four stations are inputs; entries taken by
// earlier slots of the same group are accounted for.
//
// The document says only that the steering logic selects a subset of the
// instructions for the R-ALU; the balancing rule and the in-order stop are
// this design's choices. Combinational.
module ralu_steer
  import ralu_pkg::*;
#(
  parameter int unsigned W          = 4,
  parameter int unsigned RALU_DEPTH = 8,
  parameter int unsigned INT_DEPTH  = 16,
  parameter int unsigned CW         = 5      // width of the free counts
) (
  input  instr_cls_e      cls       [W],
  input  logic [CW-1:0]   ralu_free,
  input  logic [CW-1:0]   int_free,
  input  logic [CW-1:0]   addr_free,
  input  logic [CW-1:0]   fp_free,
  output logic [W-1:0]    accept,
  output logic [W-1:0]    to_ralu,
  output logic [W-1:0]    to_int,
  output logic [W-1:0]    to_addr,
  output logic [W-1:0]    to_fp
);
  always_comb begin
    int unsigned rf, inf, af, ff;
    logic blocked, prefer_ralu;
    rf = 32'(ralu_free); inf = 32'(int_free); af = 32'(addr_free); ff = 32'(fp_free);
    blocked = 1'b0;
    accept = '0; to_ralu = '0; to_int = '0; to_addr = '0; to_fp = '0;
    for (int k = 0; k < W; k++) begin
      prefer_ralu = (rf > 0) && (rf * INT_DEPTH >= inf * RALU_DEPTH);
      if (!blocked && cls[k] != IC_NONE) begin
        case (cls[k])
          IC_FADD: if (rf > 0)  begin to_ralu[k] = 1'b1; rf--; end
          IC_FOTH: if (ff > 0)  begin to_fp[k]   = 1'b1; ff--; end
          IC_IOTH: if (inf > 0) begin to_int[k]  = 1'b1; inf--; end
          IC_IALU: begin
            if (prefer_ralu || (inf == 0 && rf > 0)) begin to_ralu[k] = 1'b1; rf--; end
            else if (inf > 0)                        begin to_int[k]  = 1'b1; inf--; end
          end
          IC_MEM: if (af > 0) begin
            to_addr[k] = 1'b1; af--;
            if (prefer_ralu) begin to_ralu[k] = 1'b1; rf--; end
          end
          default: ;
        endcase
        accept[k] = to_ralu[k] | to_int[k] | to_addr[k] | to_fp[k];
        if (!accept[k]) blocked = 1'b1;
      end
    end
  end
endmodule
