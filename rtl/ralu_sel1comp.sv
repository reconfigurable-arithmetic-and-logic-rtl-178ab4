// "sel 1comp" stage of the R-ALU floating-point path (third stage).
//
// Forms the magnitude of the significand result from the registered sum
// and sum+1 of the compound adder. For an effective subtraction the adder
// computed x + ~y: with a carry out (x > y) the magnitude is sum+1 = x - y,
// without one (x <= y) it is the one's complement of sum, y - x. For an
// effective addition it is sum. The carry also tells the sign logic that
// the result changed sign. Combinational.
module ralu_sel1comp
  import ralu_pkg::*;
(
  input  logic [SIG_W-1:0] sum,
  input  logic [SIG_W-1:0] sum1,
  input  logic             cy,
  input  logic             eff_sub,
  output logic [SIG_W-1:0] mag
);
  always_comb begin
    if (!eff_sub)  mag = sum;
    else if (cy)   mag = sum1;
    else           mag = ~sum;
  end
endmodule
