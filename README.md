# Modified Booth multiplier modulo 2^n − 1

Residue number systems split a large integer into small residues and compute on each one
in its own channel. The channel for the modulus 2^n − 1 needs a multiplier that returns
|A·B| mod (2^n − 1) directly, without forming the 2n-bit product first. This RTL builds
that multiplier with radix-4 (modified Booth) recoding. The method is the one published by
Efstathiou, Vergos and Nikolos in "Modified Booth Modulo 2^n − 1 Multipliers".

The main idea is that 2^n ≡ 1 modulo 2^n − 1. Because of this, the top bit b(n−1) of an
even-width multiplier can take the place of the usual implicit zero b(−1) under the lowest
Booth digit. An ordinary radix-4 multiplier needs ⌊n/2⌋ + 1 partial products. This one needs
only ⌈n/2⌉, so for even n it saves one Booth encoder, n Booth selectors and n full adders.
Everything else follows from the same identity:

* Multiplying by 2^j is a cyclic left rotation by j bits.
* Negating a number is its bitwise complement.
* A carry out of bit n−1 has weight 2^n = 1, so it re-enters at bit 0. This is the
  end-around carry.

The circuit is purely combinational. It has no clock, no registers and no reset.

```
 a[N-1:0] ─────────┐
 b[N-1:0] ─► pp_generator ─► ⌈N/2⌉ partial products ─► wallace_tree ─► sum, carry ─► mod_adder ─► p[N-1:0]
             (booth_encoder ×⌈N/2⌉,                     (or csa_array)                (parallel prefix,
              booth_selector ×N per PP)                  eac_csa stages                end-around carry)
```

## Recoding the multiplier modulo 2^n − 1

Booth digit i looks at the bit triplet {b(2i+1), b(2i), b(2i−1)} and has the value

    d_i = b(2i−1) + b(2i) − 2·b(2i+1)  ∈ {−2, −1, 0, +1, +2},   i = 0 … ⌈n/2⌉−1

The triplets at the two ends follow these rules:

* **Even n:** b(−1) = b(n−1). In an ordinary multiplier the weight of b(n−1) is split over
  the top digit and an extra digit {0, 0, b(n−1)}. Here the extra digit's weight 2^n is 1,
  so its b(n−1) moves into the lowest digit {b1, b0, b(n−1)}. For N = 8 the four encoders see
  {b1,b0,b7}, {b3,b2,b1}, {b5,b4,b3} and {b7,b6,b5}.
* **Odd n:** b(−1) = 0 and b(n) = 0. The top digit's b(2i+1) is past the operand.

`pp_generator` builds the extended bit vector `bx` with these boundary bits and instantiates
one `booth_encoder` per digit.

### The encoder bus

Each encoder drives a 3-bit bus, `mbm_pkg::booth_code_t` = {neg, one, two}:

| b(2i+1) b(2i) b(2i−1) | digit | neg | one | two | partial product            |
|-----------------------|-------|-----|-----|-----|----------------------------|
| 000                   | 0     | 0   | 0   | 0   | 0…0                        |
| 001, 010              | +1    | 0   | 1   | 0   | A rotated left by 2i       |
| 011                   | +2    | 0   | 0   | 1   | A rotated left by 2i+1     |
| 100                   | −2    | 1   | 0   | 1   | ~(A rotated left by 2i+1)  |
| 101, 110              | −1    | 1   | 1   | 0   | ~(A rotated left by 2i)    |
| 111                   | 0     | 1   | 0   | 0   | 1…1                        |

`neg` is simply b(2i+1). The zero digit from triplet 111 therefore gives an all-ones
partial product. Modulo 2^n − 1 that is the second representation of zero, so no special
case is needed. The published method uses this 3-bit bus (rather than a 4-bit one). The gate
equations for `one` and `two` are this implementation's own, because the source's gate
schematics were not available.

### Partial products are rotations

Partial product i is |A · d_i · 4^i| mod (2^n − 1). Bit k of that value is:

* `a[(k − 2i) mod n]` for a digit of ±1;
* `a[(k − 2i − 1) mod n]` for a digit of ±2;
* inverted when the digit is negative.

One `booth_selector` per bit computes `((one & a_j) | (two & a_jm1)) ^ neg`. The generate
loop wires `a_j` and `a_jm1` with the rotation shown above. No shifting logic is needed:
the rotation is only wiring.

## Reducing the partial products with end-around carries

The basic cell is `eac_csa`, a row of N full adders. It reduces three N-bit operands to a
sum vector and a carry vector, and rotates the carry vector left by one. The carry out of
bit N−1 therefore lands in bit 0 instead of being lost. Both outputs stay exactly N bits
wide, and s + c ≡ x + y + z (mod 2^N − 1).

There are two reduction schemes. Both use N·(⌈N/2⌉ − 2) full adders. The parameter
`REDUCTION` selects one of them:

* **`RED_WALLACE` (the default).** This is `wallace_tree`. At each level the operands are
  taken three at a time, each group through one `eac_csa`. The one or two operands left over
  go straight to the next level. The count falls from c to 2⌊c/3⌋ + c mod 3 per level. The
  published comparison implements the Wallace version, so it is the default here.
* **`RED_CSA`.** This is `csa_array`, a linear chain of ⌈N/2⌉ − 2 stages. Each stage adds one
  more partial product to the running sum and carry. Its depth is linear in the number of
  partial products.

Depth in full adders for M operands, as `mbm_pkg::wallace_depth` computes it (and the
testbench checks):

| M            | 2 | 3 | 4 | 5 | 8 | 9 | 16 | 17 | 32 |
|--------------|---|---|---|---|---|---|----|----|----|
| Wallace      | 0 | 1 | 2 | 3 | 4 | 4 | 6  | 6  | 8  |
| CSA array    | 0 | 1 | 2 | 3 | 6 | 7 | 14 | 15 | 30 |

The generate code of `wallace_tree` needs a closer look. Level l is a generate block
`g_lvl[l]` holding an unpacked array `v` of `wallace_count(M, l)` operands. The CSA stages of
level l read `g_lvl[l-1].v`. Level 0 is the input, and the last level holds exactly two
operands.

## Final adder and the two zeros

`mod_adder` adds the two summands modulo 2^N − 1 with a parallel-prefix adder:

1. It forms the bit generate g = x & y and the bit propagate p = x ^ y.
2. A Kogge-Stone tree (⌈log2 N⌉ levels) computes the group signals G[i:0] and P[i:0].
3. The carry out, G[N−1:0], is the end-around carry-in. One extra prefix level folds it
   into every bit position at once: c_i = G[i−1:0] | P[i−1:0] & cin. No second addition is
   needed.

With this adder a result of zero can come out as 0…0 or as 1…1. All-ones appears when the
summands add to exactly 2^N − 1. Downstream logic must treat both as zero. The inputs follow
the same rule: an all-ones operand is simply another zero, and the multiplier handles it
correctly.

If a single zero is needed, set `SINGLE_ZERO = 1`. The carry-in then also rises when every
bit propagates. An N-input AND of the generate bits catches the one other case, both
summands all ones, and clears the sum. The output is then always in [0, 2^N − 2]. The
source only says that, depending on the final adder, the multiplier "can be forbidden" from
producing all ones. This particular mechanism, and the choice of Kogge-Stone for the prefix
tree, are this implementation's own.

## Parameters and interface

`mbm_mod_mult` (top):

| parameter     | default       | meaning                                                      |
|---------------|---------------|--------------------------------------------------------------|
| `N`           | 8             | operand width; the modulus is 2^N − 1 (N ≥ 3)                 |
| `REDUCTION`   | `RED_WALLACE` | `RED_WALLACE` or `RED_CSA` (type `mbm_pkg::reduction_e`)      |
| `SINGLE_ZERO` | 0             | 1: never output all ones                                     |

| port | dir | width | meaning                                     |
|------|-----|-------|---------------------------------------------|
| `a`  | in  | N     | multiplicand residue                        |
| `b`  | in  | N     | multiplier residue                          |
| `p`  | out | N     | \|a·b\| mod (2^N − 1), zero possibly as 1…1 |

The default N = 8 is the modulo-255 example design. The published evaluation also covers
N = 4, 16 and 32. The same RTL covers those widths by overriding `N`. At the defaults the
design uses:

* 4 Booth encoders and 32 selectors;
* 2 Wallace levels of 8-bit end-around-carry CSA stages (16 full adders);
* an 8-bit prefix adder.

Critical path: one encoder, one selector, the reduction depth in full adders, then the
final adder. For a pipelined channel, registers go around the top or between the reduction
and the adder. The design itself has none.

## Files

| file                     | contents                                                         |
|--------------------------|------------------------------------------------------------------|
| `rtl/mbm_pkg.sv`         | encoder bus struct, reduction enum, sizing functions             |
| `rtl/booth_encoder.sv`   | one radix-4 digit → {neg, one, two}                              |
| `rtl/booth_selector.sv`  | one partial product bit                                          |
| `rtl/pp_generator.sv`    | all ⌈N/2⌉ partial products, with the b(N−1) wrap for even N      |
| `rtl/full_adder.sv`      | (3,2) compressor                                                 |
| `rtl/eac_csa.sv`         | N-bit carry-save stage with end-around carry                     |
| `rtl/csa_array.sv`       | linear reduction                                                 |
| `rtl/wallace_tree.sv`    | logarithmic reduction                                            |
| `rtl/mod_adder.sv`       | parallel-prefix modulo 2^N − 1 adder                             |
| `rtl/mbm_mod_mult.sv`    | the multiplier                                                   |

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=… failures=…`. The reference values come from integer arithmetic in the
testbench, never from the RTL's structure:

* `tb_booth_encoder`, `tb_booth_selector`, `tb_full_adder`: exhaustive.
* `tb_pp_generator`: all 2^16 operand pairs at N = 8 and all pairs at N = 7. Each partial
  product is compared modulo 2^N − 1 with A·d_i·4^i, where d_i is computed from B's bits.
  The test also checks the 0…0 and 1…1 zeros.
* `tb_eac_csa`, `tb_csa_array`, `tb_wallace_tree`: operand counts 2 to 32 and widths 8 to
  32. The Wallace test also checks the depth table above.
* `tb_mod_adder`: both 8-bit summands exhaustively, in both zero modes, plus random 32-bit
  summands.
* `tb_mbm_mod_mult` (end to end):
  * N = 4, 5, 7 and 8 exhaustively, in both reduction schemes and with the single-zero
    adder;
  * N = 16 and 32 with 50 000 random pairs per scheme.

  It counts every Booth digit value, the wrapped b(N−1) digit, the end-around carries of
  the reduction and of the adder, all-ones operands and all-ones results. If any of these
  never occurs, the test fails.
* `tb_mbm_mod_mult_full`: the top at its default parameters, all 65 536 operand pairs.

To run one with plain Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/mbm_pkg.sv tb/tb_mbm_mod_mult.sv --top-module tb_mbm_mod_mult
./obj_dir/Vtb_mbm_mod_mult
```

Lint the RTL with `verilator --lint-only -Wall -Irtl -y rtl rtl/mbm_pkg.sv rtl/mbm_mod_mult.sv`.
To lint a different width or scheme, add `-GN=16` or `-GREDUCTION=1`.

## How far to trust it, and where it departs

* Functionally, every product is checked at N ≤ 8, and random samples are checked at
  N = 16 and 32. Area and delay were not measured. The source reports gate-level area and
  delay in a 0.6 µm CMOS process, and this RTL makes no claim to match those numbers.
* The block structure follows the published method: the encoder count, the selector count,
  the full-adder count N·(⌈N/2⌉ − 2) and the Wallace depths. The gate-level insides of the
  encoder and selector are this implementation's own, and so are the Kogge-Stone choice for
  the final adder and the `SINGLE_ZERO` option.
* Only the proposed multiplier is implemented. The earlier designs it was compared with
  (an array multiplier with n partial products, and a Booth multiplier with ⌊n/2⌋ + 1
  partial products) are not included.
