// Modified Booth modulo 2^N-1 multiplier.
//
// Computes p = |a * b| mod 2^N-1 for N-bit residues in three combinational steps:
//   1. pp_generator: ceil(N/2) radix-4 Booth partial products. For even N the first Booth
//      digit uses b(N-1) as its low bit (2^N = 1 modulo 2^N-1), so one partial product fewer
//      than the ordinary N/2 + 1 is needed. Each partial product is the multiplicand rotated
//      left by 2i or 2i+1 bits and complemented for a negative digit.
//   2. Reduction of the partial products to two summands with end-around carries, either by
//      a Wallace tree (REDUCTION = RED_WALLACE, the default) or by a linear CSA array
//      (RED_CSA). Both use N*(ceil(N/2)-2) full adders.
//   3. mod_adder: parallel-prefix modulo 2^N-1 adder.
// Inputs: a, b in [0, 2^N-1); an all-ones operand is taken as the second code of zero.
// Output: the product residue; zero may come out as all ones unless SINGLE_ZERO = 1.
// No clock and no registers: the delay is one Booth encoder, one selector, the reduction
// depth in full adders and the final adder. The structure follows the design; the choice of
// default reduction, the Kogge-Stone adder and SINGLE_ZERO are this implementation's.
module mbm_mod_mult
  import mbm_pkg::*;
#(
  parameter int         N           = 8,
  parameter reduction_e REDUCTION   = RED_WALLACE,
  parameter bit         SINGLE_ZERO = 1'b0
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] p
);

  localparam int NPP = num_pp(N);

  logic [NPP-1:0][N-1:0] pp;
  logic [N-1:0]          sum, carry;

  pp_generator #(.N(N)) u_ppg (
    .a  (a),
    .b  (b),
    .pp (pp)
  );

  if (REDUCTION == RED_WALLACE) begin : g_wallace
    wallace_tree #(.N(N), .M(NPP)) u_red (
      .ops   (pp),
      .sum   (sum),
      .carry (carry)
    );
  end else begin : g_csa
    csa_array #(.N(N), .M(NPP)) u_red (
      .ops   (pp),
      .sum   (sum),
      .carry (carry)
    );
  end

  mod_adder #(.N(N), .SINGLE_ZERO(SINGLE_ZERO)) u_add (
    .x   (sum),
    .y   (carry),
    .s   (p)
  );

  initial assert (N >= 3) else $error("mbm_mod_mult needs N >= 3 (at least two partial products)");

endmodule
