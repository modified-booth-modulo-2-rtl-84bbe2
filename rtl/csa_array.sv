// Carry-save-adder array reduction modulo 2^N-1.
//
// M operands are reduced to two summands by a linear chain of M-2 end-around-carry CSA
// stages (eac_csa): the first stage takes operands 0, 1 and 2, and every later stage adds one
// more operand to the sum and carry vectors of the stage before. Each stage is N full adders,
// so the array costs N*(M-2) full adders and M-2 full-adder delays. The order in which the
// operands enter is this implementation's choice. sum + carry = sum of ops (mod 2^N-1).
// With M = 2 nothing needs reducing and the operands are the summands.
// Purely combinational.
module csa_array #(
  parameter int N = 8,
  parameter int M = 4
) (
  input  logic [M-1:0][N-1:0] ops,
  output logic [N-1:0]        sum,
  output logic [N-1:0]        carry
);

  // Summands after stage t; entry 0 is the array input.
  logic [N-1:0] s_st [M-1];
  logic [N-1:0] c_st [M-1];

  assign s_st[0] = ops[0];
  assign c_st[0] = ops[1];

  for (genvar t = 0; t < M - 2; t++) begin : g_stage
    eac_csa #(.N(N)) u_csa (
      .x (s_st[t]),
      .y (c_st[t]),
      .z (ops[t+2]),
      .s (s_st[t+1]),
      .c (c_st[t+1])
    );
  end

  assign sum   = s_st[M-2];
  assign carry = c_st[M-2];

  initial assert (M >= 2) else $error("csa_array needs at least two operands");

endmodule
