// acs_round: rounder, 32-bit Q31 input to 16-bit Q15 output.
//
// Adds 8000h to the input with 32-bit saturation and returns the 16 most
// significant bits, as the document describes. Values above 7FFF7FFFh therefore
// round to 7FFFh. Combinational.
module acs_round
  import acs_pkg::*;
(
  input  logic [31:0] x,
  output logic [15:0] y
);
  // Adding 8000h then keeping the upper half equals an arithmetic shift by 16;
  // the only overflow (x + 8000h above 7FFFFFFFh) saturates the result to 7FFFh.
  assign y = sat16((34'(signed'(x)) + 34'sd32768) >>> 16);
endmodule
