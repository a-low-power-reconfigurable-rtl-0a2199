// acs_booth_mult: radix-4 Booth multiplier, two 16-bit inputs, 32-bit output.
//
// Computes the fractional product y = sat32(2*a*b) (Q15 x Q15 -> Q31), the only
// overflow being 8000h * 8000h, which saturates to 7FFFFFFFh. The multiplier
// operand b is recoded into eight radix-4 Booth digits in {-2,-1,0,1,2}; each
// selects 0, +-a or +-2a as a partial product, shifted by 2i bits, and the eight
// partial products are summed. The document names a Booth multiplier for speed
// and low power; the radix, the recoding and the adder structure are this design's.
// Combinational.
module acs_booth_mult
  import acs_pkg::*;
(
  input  logic [15:0] a,
  input  logic [15:0] b,
  output logic [31:0] y
);
  logic [16:0] bx;                 // b with an implicit 0 below the LSB
  logic signed [33:0] pp [8];
  logic signed [33:0] sum;

  assign bx = {b, 1'b0};

  always_comb begin
    logic signed [33:0] ea;
    ea = 34'(signed'(a));
    for (int i = 0; i < 8; i++) begin
      unique case (bx[2*i +: 3])
        3'b001, 3'b010: pp[i] =  ea;
        3'b011:         pp[i] =  ea <<< 1;
        3'b100:         pp[i] = -(ea <<< 1);
        3'b101, 3'b110: pp[i] = -ea;
        default:        pp[i] = '0;
      endcase
      pp[i] = pp[i] <<< (2 * i);
    end
    sum = '0;
    for (int i = 0; i < 8; i++) sum = sum + pp[i];
  end

  assign y = sat32(sum <<< 1);
endmodule
