// 64-bit compound adder/subtractor of the R-ALU (second pipeline stage).
//
// It is the 54-bit significand adder of a floating-point adder widened to
// 64 bits. It returns both sum = x + y' + cin and sum+1, where y' is y or
// its one's complement, plus the carry out of sum. Integer ADD uses sum
// with y' = y, cin = 0; integer SUB uses sum with y' = ~y, cin = 1.
// A floating-point effective subtraction uses y' = ~y, cin = 0, and the
// "sel 1comp" stage then takes sum+1 (x >= y) or ~sum (x < y).
// Written as behavioural additions; the document assumes a carry-lookahead
// adder, which a synthesis tool picks. Combinational.
module ralu_addsub
  import ralu_pkg::*;
(
  input  logic [XLEN-1:0] x,
  input  logic [XLEN-1:0] y,
  input  logic            inv_y,
  input  logic            cin,
  output logic [XLEN-1:0] sum,
  output logic [XLEN-1:0] sum1,     // sum + 1
  output logic            cy        // carry out of sum
);
  logic [XLEN-1:0] yy;
  logic [XLEN:0]   s;
  always_comb begin
    yy   = inv_y ? ~y : y;
    s    = {1'b0, x} + {1'b0, yy} + {{XLEN{1'b0}}, cin};
    sum  = s[XLEN-1:0];
    cy   = s[XLEN];
    sum1 = sum + XLEN'(1);
  end
endmodule
