// acs_sac: shift-accumulate (SAC) unit, the workhorse of the ACS datapath.
//
// Each SAC holds its own shifter and adder: y = sat32(acc + x * 2^(16-n)), i.e. a
// multiply-accumulate by the constant 2^-n done without a multiplier. The data
// operand x is 16 bit, the accumulator operand and the result 32 bit, and the sum
// saturates to 7FFFFFFFh / 80000000h. Chaining several SACs through the operand
// multiplexers of the core builds a multi-term sum in one clock cycle.
// Combinational; the document gives the structure (shifter + adder, 16-bit inputs,
// 32-bit output); the add-only behaviour is this design's reading of "shift accumulate".
module acs_sac
  import acs_pkg::*;
(
  input  logic [15:0] x,    // Q15 data
  input  logic [31:0] acc,  // Q31 accumulator input
  input  logic [3:0]  n,    // data scaled by 2^-n
  output logic [31:0] y
);
  logic [31:0] xs;
  acs_shift u_shift (.x(x), .n(n), .y(xs));
  assign y = sat32(34'(signed'(acc)) + 34'(signed'(xs)));
endmodule
