// acs_shift: scaling shifter, 16-bit Q15 input to 32-bit Q31 output.
//
// The datapath replaces multiplications by constant fractions 2^-n with shifts.
// Multiplying a Q15 word x by the Q15 constant 2^-n and doubling the product (the
// fractional multiply of the reference arithmetic) gives x * 2^(16-n), so the unit
// sign-extends x to 32 bits and shifts it left by 16-n. For n = 0..15 the result
// always fits in 32 bits, so no saturation is needed. Purely combinational.
// The 16-in/32-out shape and the "scale down by 2^n" function follow the document;
// the 4-bit encoding of n is this design's choice.
module acs_shift (
  input  logic [15:0] x,   // Q15 operand
  input  logic [3:0]  n,   // scale factor 2^-n
  output logic [31:0] y    // Q31 result
);
  logic [4:0] amt;
  assign amt = 5'd16 - {1'b0, n};
  assign y   = {{16{x[15]}}, x} << amt;
endmodule
