// acs_add16: 16-bit saturating adder/subtracter.
//
// y = sat16(a + b), or sat16(a - b) when sub is set. The datapath has two of
// them (one feeding MUXREG2, one feeding MUXREG3). The subtract mode is this
// design's addition so that one unit serves both add and sub steps. Combinational.
module acs_add16
  import acs_pkg::*;
(
  input  logic [15:0] a,
  input  logic [15:0] b,
  input  logic        sub,
  output logic [15:0] y
);
  logic signed [33:0] ea, eb;
  assign ea = 34'(signed'(a));
  assign eb = 34'(signed'(b));
  assign y  = sat16(sub ? ea - eb : ea + eb);
endmodule
