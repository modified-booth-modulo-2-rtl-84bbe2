// Booth selector: one bit of a partial product.
//
// For a digit of magnitude 1 the bit is a_j, for magnitude 2 it is the next lower multiplicand
// bit a_jm1 (modulo 2^n-1 the "next lower" bit of bit 0 is bit n-1, so the caller wires the
// multiplicand cyclically); for a negative digit the bit is inverted, which is the one's
// complement negation of modulo 2^n-1 arithmetic:
//   pp = ((one & a_j) | (two & a_jm1)) ^ neg
// One selector per partial product bit is the published structure; this AND-OR-XOR form of
// it is this implementation's choice. Purely combinational.
module booth_selector
  import mbm_pkg::*;
(
  input  booth_code_t code,
  input  logic        a_j,
  input  logic        a_jm1,
  output logic        pp
);

  always_comb pp = ((code.one & a_j) | (code.two & a_jm1)) ^ code.neg;

endmodule
