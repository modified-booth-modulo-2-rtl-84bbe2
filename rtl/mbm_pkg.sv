// Shared types and elaboration-time helpers of the modified Booth modulo 2^n-1 multiplier.
//
// booth_code_t is the 3-bit bus that a Booth encoder drives and every Booth selector of its
// partial product reads: neg (invert the selected multiplicand bit), one (select A, digit +-1)
// and two (select 2A, digit +-2). Digit 0 has one = two = 0; neg then yields 0...0 or 1...1,
// both of which are zero modulo 2^n-1.
//
// The functions size the design at elaboration time: num_pp gives the number of partial
// products ceil(n/2), wallace_next and wallace_depth describe a Wallace tree that groups its
// operands in threes at every level (one (3,2) carry-save stage per group).
package mbm_pkg;

  typedef struct packed {
    logic neg;  // digit is negative: complement the selected bits
    logic one;  // |digit| = 1: select A rotated by 2i
    logic two;  // |digit| = 2: select A rotated by 2i+1
  } booth_code_t;

  // Partial product reduction scheme in front of the final adder.
  typedef enum logic [0:0] {
    RED_WALLACE = 1'b0,
    RED_CSA     = 1'b1
  } reduction_e;

  // Number of radix-4 partial products for an n-bit modulo 2^n-1 multiplier: ceil(n/2).
  function automatic int num_pp(input int n);
    return (n + 1) / 2;
  endfunction

  // Operand count after one Wallace level that starts with c operands.
  function automatic int wallace_next(input int c);
    return 2 * (c / 3) + (c % 3);
  endfunction

  // Number of Wallace levels needed to bring c operands down to two.
  function automatic int wallace_depth(input int c);
    int d = 0;
    int k = c;
    while (k > 2) begin
      k = wallace_next(k);
      d++;
    end
    return d;
  endfunction

  // Operand count at the input of Wallace level l (level 0 holds the c inputs).
  function automatic int wallace_count(input int c, input int l);
    int k = c;
    for (int i = 0; i < l; i++) k = wallace_next(k);
    return k;
  endfunction

endpackage
