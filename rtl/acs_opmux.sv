// acs_opmux: configurable operand multiplexer with operand isolation.
//
// Selects one of N W-bit inputs by sel. When en is low, or sel names no input,
// the output is held at zero, so the unit behind the multiplexer sees a constant
// operand and does not toggle: this is how an unused unit is isolated. Every
// operand multiplexer of the datapath (MUX[1..9], MUX SQ, MUX RND, MUX CMP) and
// the result multiplexers MUXREG1..3 are instances of this module.
// Combinational.
module acs_opmux #(
  parameter int unsigned W  = 16,
  parameter int unsigned N  = 4,
  parameter int unsigned SW = 5
) (
  input  logic [N-1:0][W-1:0] d,
  input  logic [SW-1:0]       sel,
  input  logic                en,
  output logic [W-1:0]        y
);
  always_comb begin
    y = '0;
    if (en && 32'(sel) < N) y = d[sel];
  end
endmodule
