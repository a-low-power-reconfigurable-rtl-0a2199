// acs_square: squaring unit with one 16-bit input and a 16-bit output.
//
// Computes the Q15 square of x, (x*x) >> 15, saturated to 7FFFh (only x = 8000h
// overflows). Kept apart from the general multiplier so that the square of a
// correlation sum and a general product can be formed in the same cycle.
// The document specifies a library multiplier with a single input; here the
// product is written as a plain signed multiply. Combinational.
module acs_square
  import acs_pkg::*;
(
  input  logic [15:0] x,
  output logic [15:0] y
);
  logic signed [31:0] p;
  assign p = signed'(x) * signed'(x);
  assign y = sat16(34'(p >>> 15));
endmodule
