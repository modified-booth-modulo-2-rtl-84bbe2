// Modulo 2^N-1 carry-save stage (end-around carry).
//
// N full adders add three N-bit operands bit by bit. Carry c_k has weight 2^(k+1); the carry
// of the top bit has weight 2^N, which is 1 modulo 2^N-1, so it becomes bit 0 of the carry
// vector instead of being dropped. The result satisfies
//   s + c = x + y + z   (mod 2^N-1)
// with both s and c exactly N bits wide. The end-around carry between stages is the
// published method. Purely combinational, one full-adder delay.
module eac_csa #(
  parameter int N = 8
) (
  input  logic [N-1:0] x,
  input  logic [N-1:0] y,
  input  logic [N-1:0] z,
  output logic [N-1:0] s,
  output logic [N-1:0] c
);

  logic [N-1:0] co;

  for (genvar k = 0; k < N; k++) begin : g_fa
    full_adder u_fa (
      .x (x[k]),
      .y (y[k]),
      .z (z[k]),
      .s (s[k]),
      .c (co[k])
    );
  end

  // Rotate the carries one place left: the carry out of bit N-1 re-enters at bit 0.
  always_comb c = {co[N-2:0], co[N-1]};

endmodule
