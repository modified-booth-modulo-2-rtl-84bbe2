// Parallel-prefix modulo 2^N-1 adder (end-around carry).
//
// Bit generate g = x & y and propagate p = x ^ y are combined by a Kogge-Stone prefix tree
// (ceil(log2 N) levels) into group signals G[i:0], P[i:0]. The carry out of the top bit has
// weight 2^N = 1 and is fed back as the carry-in; instead of a second addition, one more
// prefix level folds it into every carry at once:
//   c_0 = cin,  c_i = G[i-1:0] | P[i-1:0] & cin,  s_i = p_i ^ c_i,   cin = G[N-1:0].
// With this cin a sum that is exactly 2^N-1 comes out as all ones, the second code for
// zero. With SINGLE_ZERO = 1, cin also rises when every bit propagates, which turns that
// case into 0...0; the one other way to reach all ones, both summands all ones (every bit
// generates), is detected by an N-input AND of the generate bits, in parallel with the prefix
// tree, and clears the sum. The output is then always below 2^N-1. The prefix-tree style (Kogge-Stone)
// and the SINGLE_ZERO option are this implementation's choices for the adder the design
// names.
// Purely combinational: about log2(N) + 2 AND-OR levels plus the XORs.
module mod_adder #(
  parameter int N           = 8,
  parameter bit SINGLE_ZERO = 1'b0
) (
  input  logic [N-1:0] x,
  input  logic [N-1:0] y,
  output logic [N-1:0] s
);

  logic [N-1:0] g, p;     // bit generate / propagate
  logic [N-1:0] gg, pp;   // prefix group generate / propagate over bits i..0
  logic [N-1:0] c;        // carry into each bit
  logic         cin;

  always_comb begin
    logic [N-1:0] gn, pn;
    g  = x & y;
    p  = x ^ y;
    gg = g;
    pp = p;
    for (int d = 1; d < N; d = 2 * d) begin
      gn = gg;
      pn = pp;
      for (int i = d; i < N; i++) begin
        gn[i] = gg[i] | (pp[i] & gg[i-d]);
        pn[i] = pp[i] & pp[i-d];
      end
      gg = gn;
      pp = pn;
    end
  end

  always_comb begin
    cin = gg[N-1] | (SINGLE_ZERO & pp[N-1]);
    c[0] = cin;
    for (int i = 1; i < N; i++) c[i] = gg[i-1] | (pp[i-1] & cin);
    s = (p ^ c) & ~{N{SINGLE_ZERO & (&g)}};
  end

endmodule
