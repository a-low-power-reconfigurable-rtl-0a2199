// acs_cmp: signed comparator.
//
// gt = (a > b) for 32-bit two's-complement operands. In the codebook search it
// tells whether the criterion of the current candidate is better than the best
// one (the document compares the difference of cross products against zero).
// Combinational; the core registers gt into the o_CMP flag.
module acs_cmp (
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic        gt
);
  assign gt = signed'(a) > signed'(b);
endmodule
