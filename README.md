# Fast sign detection for the RNS moduli set {2^(n+1)-1, 2^n-1, 2^n}

In a residue number system (RNS) an integer X is held as its remainders
modulo a few coprime moduli. Addition and multiplication then work on each
remainder separately, with no carries between them. The price is that
anything that depends on magnitude is hard, because no single residue holds
the weight of X. A signed RNS uses the lower half of the dynamic range
`[0, M/2)` for non-negative numbers and the upper half `[M/2, M)` for
`X - M`. Finding the sign therefore means deciding `X >= M/2`.

This RTL decides that for the three-moduli set

    m1 = 2^(n+1) - 1,   m2 = 2^n - 1,   m3 = 2^n,   M = m1 * m2 * m3

with one combinational circuit. It never converts X back to binary. The
circuit is built from carry-save rows, two parallel-prefix trees and a last
carry-correction level. Its depth is three full adders, then one
`log2(n)` prefix tree, then one AND-OR level and one XOR.

## The arithmetic: the sign is one bit of a mixed-radix digit

Write X in mixed radix with the even modulus last:

    X = a1 + a2*m1 + a3*m1*m2,   0 <= a1 < m1, 0 <= a2 < m2, 0 <= a3 < 2^n

The lower two terms add up to less than `m1*m2`, and `M/2 = 2^(n-1)*m1*m2`.
So `X >= M/2` exactly when `a3 >= 2^(n-1)`. The sign is the MSB of `a3`.

For this moduli set the mixed-radix conversion needs no multiplications,
because every inverse it uses is 1 or -1:

* `m1 = 2*2^n - 1 ≡ 1 (mod m2)`, so `a2 = |x2 - x1|_m2`.
* `m1 ≡ -1` and `m1*m2 ≡ 1 (mod 2^n)`, so `a3 = |x3 - x1 + a2|_(2^n)`.

The slow part is `a2`. It is a modulo `2^n-1` subtraction whose reduction
carry is only known at the end of a full carry chain. The circuit keeps `a2`
in carry-save form `A + B`. It adds that form straight into `a3`, and
supplies the missing reduction carry `c` as a late carry-in:

    a2 = (A + B + c) mod 2^n,  c = 1 iff A + B >= 2^n - 1
    a3 = (x3 - x1 + A + B + c) mod 2^n

Using `c = (A + B >= 2^n-1)` rather than the plain end-around carry of
`A + B` gives `a2` one representation of zero. An all-ones `a2` would read
as `2^n-1` and shift `a3` by one, which can flip the sign.

## Datapath

```
 x1[n:0] x2[n-1:0] x3[n-1:0]
    |        |         |
 rns_preproc: row 1  csa, end-around carry (mod 2^n-1):
                      x2 + ~x1[n-1:0] + {1..1,~x1[n]}   -> A, B
              row 2  csa (mod 2^n): x3 + ~x1[n-1:0] + A, +1 in carry LSB
              row 3  csa (mod 2^n): + B                 -> W, Z
              g = W & Z, p = W ^ Z
    |                         |
 rns_comparator            prefix_tree (carry generation)
 c = (A+B >= 2^n-1)        gg[i], gp[i] for every span [i:0]
    |                         |
    +---------> rns_carry_corr: carry_i = gg[i-1] | gp[i-1] & c
                digit = p ^ carry  (= a3),  sign_bit = digit[n-1]
```

* **rns_preproc (pre-processing).** Row 1 forms `x2 - x1 (mod 2^n-1)` in
  one's complement. The 17-bit `x1` (for n = 16) is folded as
  `x1[n-1:0] + x1[n]`, because `2^n ≡ 1`. The carry out of the top bit is
  rotated into bit 0, which is the end-around carry. Rows 2 and 3 work
  modulo `2^n` and drop their top carries. The `+1` of the two's-complement
  `-x1` takes the empty LSB of row 2's shifted carry vector, so it costs no
  hardware.
* **prefix_tree (carry generation).** A Kogge-Stone network. For every bit
  it gives the group generate and group propagate of the span `[i:0]`,
  without a carry-in. Any prefix structure would do.
* **rns_comparator.** `A + B >= 2^n - 1` is the same test as `A >= ~B`. It
  equals the carry out of `A + B + 1`, which is group generate OR group
  propagate of the whole word. This uses a second `prefix_tree` that runs in
  parallel with the first.
* **rns_carry_corr (carry correction).** Both candidate sums, with carry-in
  0 and with carry-in 1, are implicit in `(gg, gp)`. `c` picks between
  them with one AND-OR per bit. Only `digit[n-1]` is needed for the sign.
  The other bits are the rest of `a3`, which is brought out as `digit`.
* **csa / full_adder.** A carry-save row is `W` independent full adders.
  `cout` comes out unshifted, and the caller decides whether to shift it
  (modulo `2^n`) or rotate it (modulo `2^n-1`).
* **rns_pkg.** Holds the `gp_t` generate/propagate pair and the prefix
  operator `gp_dot`.

## Interface and timing

`rns_sign_detect #(parameter int unsigned N = 16)`

| port       | dir | width | meaning                                        |
|------------|-----|-------|------------------------------------------------|
| `x1`       | in  | N+1   | residue modulo 2^(N+1)-1                       |
| `x2`       | in  | N     | residue modulo 2^N-1                           |
| `x3`       | in  | N     | residue modulo 2^N                             |
| `sign_bit` | out | 1     | 1 when X >= M/2, so the number is negative     |
| `digit`    | out | N     | mixed-radix digit a3 (sign_bit is its MSB)     |

The circuit is purely combinational, with no clock and no reset. To
pipeline it, register at its ports.

Input rules:

* Inputs must be proper residues: `x1 <= 2^(N+1)-2` and `x2 <= 2^N-2`.
* `x2 = 2^N-1` is accepted as a second form of zero, except together with
  `x1 = 0`.
* `x1 = 2^(N+1)-1` is not accepted.

The default `N = 16` gives the moduli {131071, 65535, 65536}. The design
was also shown at n = 8 and n = 32. Both are supported by setting `N`, and
both are tested.

## Where this RTL makes its own choices

The published design names its units and says what they do. It does not
give their gate-level insides. These parts are choices made for this RTL,
and each is worked out and checked above:

* the three-row carry-save arrangement;
* using a comparator to produce the reduction carry `c`;
* applying `c` as a late carry-in;
* the choice of Kogge-Stone for the prefix trees.

The published description keeps two sets of partial sum bits, one for
`A + B` and one for `A + B + T`, and chooses between them. Here that choice
is folded into a single sum `A + B + T` whose carry-in is `c`. Only one AND-OR
level per bit depends on `c`, and the result is the same.

The published delay figures came from an FPGA synthesis flow: an overall
path of about 15.6 ns through a chain of LUTs. They are not reproduced here.
This RTL is plain gate logic with no device-specific cells.

The sign convention is the usual one for a signed RNS: `[M/2, M)` is
negative, and `sign_bit = 1` means negative. The `digit` output goes beyond
the published interface, which has only the sign bit.

## Verification

Each module has a self-checking testbench in `tb/`. The reference values
come from plain integer arithmetic and are independent of the carry-save
structure.

* `tb_rns_sign_detect` runs the default N = 16. It checks about 200k
  integers: random ones, the range edges, and multiples of `m1*m2` on both
  sides of `M/2`. For each it converts X to residues with `%` and checks
  `sign_bit == (X >= M/2)` and `digit == X / (m1*m2)`. It also counts the
  datapath events and fails if one never happens. The events are:
  * the end-around carry in row 1;
  * `c = 0` and `c = 1`;
  * a late carry that reaches the sign bit;
  * the all-ones form of `x2 = 0`;
  * both signs.
* `tb_rns_sign_detect_widths` tests N = 4 exhaustively over all 7440
  integers. It tests N = 8 and N = 32 on 100k random integers each.
* `tb_full_adder`, `tb_csa`, `tb_prefix_tree`, `tb_rns_comparator`,
  `tb_rns_carry_corr` and `tb_rns_preproc` each check one unit against its
  arithmetic identity.

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops
itself through a watchdog. To simulate with Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/rns_pkg.sv tb/tb_rns_ref_pkg.sv tb/tb_rns_sign_detect.sv \
  --top-module tb_rns_sign_detect
./obj_dir/Vtb_rns_sign_detect
```

The unit testbenches need only `rtl/rns_pkg.sv` and their own file, plus
`-Irtl` so that Verilator finds the modules.
