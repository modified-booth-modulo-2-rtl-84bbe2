// One multiplier configuration under test, used by tb_mbm_mod_mult. It drives mbm_mod_mult
// with every (A, B) pair when EXHAUSTIVE is set, otherwise with VECS random pairs biased
// towards all-zeros and all-ones operands, and checks p = A*B modulo 2^N-1 (an all-ones p
// counts as zero; with SINGLE_ZERO it must not appear). It counts how often each mechanism
// of the design was exercised: every Booth digit value, the even-N digit that takes b(N-1)
// as its low bit, the end-around carry into bit 0 of the reduction's carry vector, the final
// adder's end-around carry, an all-ones operand and an all-ones (second zero) result.
module tb_mult_cfg
  import mbm_pkg::*;
#(
  parameter int         N           = 8,
  parameter reduction_e REDUCTION   = RED_WALLACE,
  parameter bit         SINGLE_ZERO = 1'b0,
  parameter bit         EXHAUSTIVE  = 1'b0,
  parameter int         VECS        = 1000
) (
  output logic done
);

  localparam longint unsigned MOD = (64'd1 << N) - 1;
  localparam int NPP = num_pp(N);

  logic [N-1:0] a, b, p;

  int checks = 0, failures = 0;
  int dig_cnt [7];          // digits -2..+2 at index d+2, index 5: zero from triplet 111
  int wrap_digit = 0;       // even N: b(N-1) = 1 feeding the first encoder's low bit
  int red_eac = 0;          // reduction carry vector bit 0 set (M >= 3)
  int add_eac = 0;          // final adder re-injected a carry
  int ones_in = 0;          // an operand was all ones
  int ones_out = 0;         // result was all ones

  mbm_mod_mult #(.N(N), .REDUCTION(REDUCTION), .SINGLE_ZERO(SINGLE_ZERO)) dut (
    .a (a),
    .b (b),
    .p (p)
  );

  function automatic int bbit(input logic [N-1:0] v, input int j);
    if (j == -1) return (N % 2 == 0) ? int'(v[N-1]) : 0;
    if (j >= N) return 0;
    return int'(v[j]);
  endfunction

  task automatic apply(input logic [N-1:0] va, input logic [N-1:0] vb);
    longint unsigned expect_mod;
    a = va;
    b = vb;
    #1;
    expect_mod = ((64'(va) % MOD) * (64'(vb) % MOD)) % MOD;
    checks++;
    if (64'(p) % MOD != expect_mod || (SINGLE_ZERO && p == '1)) begin
      failures++;
      if (failures < 10)
        $display("FAIL N=%0d red=%0d sz=%0b: %h * %h gave %h, expected %h",
                 N, REDUCTION, SINGLE_ZERO, va, vb, p, expect_mod);
    end
    for (int i = 0; i < NPP; i++) begin
      int hi = bbit(vb, 2*i + 1), mid = bbit(vb, 2*i), lo = bbit(vb, 2*i - 1);
      int d = lo + mid - 2 * hi;
      if (hi == 1 && mid == 1 && lo == 1) dig_cnt[5]++;
      else dig_cnt[d + 2]++;
    end
    if (N % 2 == 0 && vb[N-1]) wrap_digit++;
    if (NPP >= 3 && dut.carry[0]) red_eac++;
    if (dut.u_add.cin) add_eac++;
    if (va == '1 || vb == '1) ones_in++;
    if (p == '1) ones_out++;
  endtask

  initial begin
    done = 1'b0;
    foreach (dig_cnt[k]) dig_cnt[k] = 0;
    // ceil(N/2) partial products: for even N one fewer than the N/2 + 1 of a plain
    // radix-4 multiplier
    checks++;
    if ($bits(dut.pp) != N * ((N % 2 == 0) ? N / 2 : (N + 1) / 2)) begin
      failures++;
      $display("FAIL N=%0d: %0d partial product bits", N, $bits(dut.pp));
    end
    if (EXHAUSTIVE) begin
      for (longint unsigned va = 0; va <= MOD; va++)
        for (longint unsigned vb = 0; vb <= MOD; vb++)
          apply(N'(va), N'(vb));
    end else begin
      for (int t = 0; t < VECS; t++) begin
        logic [N-1:0] va, vb;
        int sel;
        sel = $urandom_range(0, 15);
        va = N'({$urandom, $urandom});
        vb = N'({$urandom, $urandom});
        if (sel == 0) va = '1;
        if (sel == 1) vb = '1;
        if (sel == 2) va = '0;
        if (sel == 3) vb = va;
        if (sel == 4) vb = N'(MOD - 64'(va) % MOD);  // A*B with B = -A
        apply(va, vb);
      end
    end
    done = 1'b1;
  end

endmodule
