// Wallace-tree reduction modulo 2^N-1.
//
// M operands are reduced to two summands level by level. At each level the operands are
// taken in groups of three and each group goes through an end-around-carry CSA stage
// (eac_csa), giving two operands; the one or two operands left over pass to the next level
// untouched. The number of operands thus falls c -> 2*floor(c/3) + c mod 3, and the depth in
// full adders is 0,1,2,3,4,4,6,6,8 for M = 2,3,4,5,8,9,16,17,32. Every CSA stage removes one
// operand, so the tree uses N*(M-2) full adders, like the CSA array, but with logarithmic
// depth. Since every carry that leaves bit N-1 re-enters at bit 0 of the next level, each of
// the N bit columns is a Wallace tree whose carries go to the next column, cyclically.
// sum + carry = sum of ops (mod 2^N-1). Purely combinational.
module wallace_tree
  import mbm_pkg::*;
#(
  parameter int N = 8,
  parameter int M = 4
) (
  input  logic [M-1:0][N-1:0] ops,
  output logic [N-1:0]        sum,
  output logic [N-1:0]        carry
);

  localparam int L = wallace_depth(M);

  for (genvar l = 0; l <= L; l++) begin : g_lvl
    localparam int C = wallace_count(M, l);
    logic [N-1:0] v [C];

    if (l == 0) begin : g_in
      for (genvar o = 0; o < M; o++) begin : g_op
        assign v[o] = ops[o];
      end
    end else begin : g_red
      localparam int CP = wallace_count(M, l - 1);  // operands entering this level
      localparam int G  = CP / 3;                   // CSA stages in this level
      for (genvar g = 0; g < G; g++) begin : g_csa
        eac_csa #(.N(N)) u_csa (
          .x (g_lvl[l-1].v[3*g]),
          .y (g_lvl[l-1].v[3*g+1]),
          .z (g_lvl[l-1].v[3*g+2]),
          .s (v[2*g]),
          .c (v[2*g+1])
        );
      end
      for (genvar r = 0; r < CP % 3; r++) begin : g_pass
        assign v[2*G+r] = g_lvl[l-1].v[3*G+r];
      end
    end
  end

  assign sum   = g_lvl[L].v[0];
  assign carry = g_lvl[L].v[1];

  initial assert (M >= 2) else $error("wallace_tree needs at least two operands");

endmodule
