// acs_add32: 32-bit saturating adder/subtracter.
//
// y = sat32(a + b), or sat32(a - b) when sub is set; the subtract mode forms the
// difference of the two cross products that decides whether a new pulse pair
// beats the best one found so far. Saturation limits 7FFFFFFFh / 80000000h.
// Combinational.
module acs_add32
  import acs_pkg::*;
(
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  logic        sub,
  output logic [31:0] y
);
  logic signed [33:0] ea, eb;
  assign ea = 34'(signed'(a));
  assign eb = 34'(signed'(b));
  assign y  = sat32(sub ? ea - eb : ea + eb);
endmodule
