// Radix-4 (modified Booth) encoder of one multiplier digit.
//
// It looks at the overlapping triplet {b_hi, b_mid, b_lo} = {b(2i+1), b(2i), b(2i-1)} and
// encodes the digit b(2i-1) + b(2i) - 2*b(2i+1), one of {-2,-1,0,+1,+2}, on a 3-bit bus
// (booth_code_t): one = b_mid ^ b_lo selects the multiplicand, two selects it doubled, and
// neg = b_hi asks the selectors to invert. The 3-bit bus is the encoding the design follows;
// the exact gates are this implementation's choice. Because neg is simply b_hi, the zero
// triplet 111 produces an all-ones partial product, which is the second representation of
// zero in modulo 2^n-1 arithmetic and needs no special case.
//
// Purely combinational, no clock.
module booth_encoder
  import mbm_pkg::*;
(
  input  logic        b_hi,   // b(2i+1)
  input  logic        b_mid,  // b(2i)
  input  logic        b_lo,   // b(2i-1)
  output booth_code_t code
);

  always_comb begin
    code.neg = b_hi;
    code.one = b_mid ^ b_lo;
    code.two = (b_hi & ~b_mid & ~b_lo) | (~b_hi & b_mid & b_lo);
  end

endmodule
