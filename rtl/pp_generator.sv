// Partial product generator of the modified Booth modulo 2^n-1 multiplier.
//
// The multiplier B is recoded into NPP = ceil(N/2) radix-4 digits
//   b_e,i = b(2i-1) + b(2i) - 2*b(2i+1),  i = 0 .. NPP-1,
// and since 2^N = 1 modulo 2^N-1, for even N the top bit b(N-1) takes the place of b(-1):
// a single encoder handles {b1, b0, b(N-1)}, which saves one partial product compared with
// an encoder for {b1, b0, 0} plus a separate one for {0, 0, b(N-1)}. For odd N, b(-1) = b(N) = 0.
//
// Partial product i is |A * b_e,i * 4^i| modulo 2^N-1. Multiplying by 2^j modulo 2^N-1 is a
// left rotation by j, and negation is the bitwise complement, so bit k of PP_i is
//   digit +-1: a[(k - 2i) mod N],  digit +-2: a[(k - 2i - 1) mod N],  inverted if negative,
// formed by one booth_selector per bit. A zero digit gives 0...0 (triplet 000) or 1...1
// (triplet 111), both zero modulo 2^N-1.
//
// The recoding, the b(N-1) wrap and the rotated selection follow the published method.
// Interface: a, b are N-bit residues; pp[i] is partial product i. Purely combinational:
// one encoder delay plus one selector delay.
module pp_generator
  import mbm_pkg::*;
#(
  parameter int N = 8
) (
  input  logic [N-1:0]                 a,
  input  logic [N-1:0]                 b,
  output logic [num_pp(N)-1:0][N-1:0]  pp
);

  localparam int NPP = num_pp(N);

  // Multiplier bits with the recoding's boundary bits: bx[j+1] = b(j) for j = -1 .. 2*NPP-1.
  logic [2*NPP:0] bx;

  always_comb begin
    bx = '0;
    bx[N:1] = b;
    bx[0] = (N % 2 == 0) ? b[N-1] : 1'b0;  // b(-1): wraps to b(N-1) for even N
  end

  for (genvar i = 0; i < NPP; i++) begin : g_pp
    booth_code_t code;

    booth_encoder u_enc (
      .b_hi  (bx[2*i+2]),
      .b_mid (bx[2*i+1]),
      .b_lo  (bx[2*i]),
      .code  (code)
    );

    for (genvar k = 0; k < N; k++) begin : g_bit
      localparam int J1 = ((k - 2*i) % N + N) % N;
      localparam int J2 = ((k - 2*i - 1) % N + N) % N;
      booth_selector u_sel (
        .code  (code),
        .a_j   (a[J1]),
        .a_jm1 (a[J2]),
        .pp    (pp[i][k])
      );
    end
  end

endmodule
