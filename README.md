# Three-level MLRNS multiplier

A W x W -> 2W bit unsigned multiplier that never multiplies W-bit numbers.
Instead it splits each operand, three times over, into residues of a
residue number system (RNS), multiplies 27 small residue pairs in parallel and
rebuilds the product from the 27 small products. The whole datapath is
combinational SystemVerilog, parameterised by the operand width `W`
(default 64).

## The idea: a residue number system inside a residue number system

An RNS with the moduli `{2^n-1, 2^n, 2^n+1}` (pairwise coprime) represents any
integer below `M = (2^n-1) 2^n (2^n+1)`, roughly `2^(3n)`, by its three
residues. Multiplication is carry-free per channel: the residues of `X*Y` are
the products of the residues, reduced. This modulus set is popular because
conversion into and out of it needs only adders, rotations and bit
inversions. Its drawback is the small range for a given channel width.

The multi-level RNS (MLRNS) gets around this limit by applying the idea
recursively. The residues of one level are not reduced after
multiplication. Instead, each residue is treated as a number in its own
right and converted into a smaller RNS of the same form. That smaller RNS
must be able to hold the *unreduced* product of two such residues. A residue of
the level with exponent `n` is at most `2^n`, so the product is at most
`2^(2n)`. The next level's exponent is therefore the smallest `m` with
`(2^m-1) 2^m (2^m+1) > 2^(2n)`:

    m = floor(2n / 3) + 1

The same rule sizes the first level from the operand width, because
`X*Y < 2^(2W)`. Three levels turn one multiplication into `3^3 = 27`
independent multiplications of much narrower numbers:

| W (operands) | level-1 n | level-2 n | level-3 n | lane multiplier | product |
|---:|---:|---:|---:|---:|---:|
| 32  | 22 | 15 | 11 | 12 x 12 bit | 64 bit  |
| 64 (default) | 43 | 29 | 20 | 21 x 21 bit | 128 bit |
| 128 | 86 | 58 | 39 | 40 x 40 bit | 256 bit |

`mlrns_pkg::next_n` implements the rule; every width in the design follows
from `W` through it.

## Datapath

```
 x ─► bin2mlrns ─┐ 27 residues (n3+1 bits)
                 ├─► mlrns_mul_array ─► 27 products (2 n3+2 bits) ─► mlrns2bin ─► z = x*y
 y ─► bin2mlrns ─┘
```

* `bin2mlrns` (forward conversion) has 1 + 3 + 9 `bin2rns` converters on
  levels 1, 2 and 3.
* `mlrns_mul_array` is 27 plain multipliers, with no modular reduction.
* `mlrns2bin` (reverse conversion) has 9 + 3 + 1 `rns2bin_mod` converters on
  levels 3, 2 and 1. Each one reduces its three inputs to its moduli and then
  rebuilds a binary value.

**Lane order.** On every level, channel `j = 0, 1, 2` is the modulus
`2^n-1`, `2^n` and `2^n+1`. The 27 lanes are numbered `9*j1 + 3*j2 + j3`.
Every residue is carried as an `(n+1)`-bit word. Only the `2^n+1` lanes ever
set the top bit.

## Forward conversion: residue generators

A value below `2^(3n)` is split into n-bit chunks, `X = A + B·2^n + C·2^(2n)`.
Since `2^n ≡ 1 (mod 2^n-1)` and `2^n ≡ -1 (mod 2^n+1)`:

* modulo `2^n`: the residue is `A`;
* modulo `2^n-1`: the residue is `A + B + C`;
* modulo `2^n+1`: the residue is `A - B + C`.

In the forward path each input is a residue of the level above. That residue
has at most `n_prev + 1 <= 2n` bits, so `C = 0`. The third chunk exists only
for the reverse path (see below).

**Modulo 2^n-1 (`res_gen_m1`).** This is an n-bit Kogge-Stone adder whose
carry-out is fed back as its carry-in (end-around carry, EAC). It yields
`A+B` if that is below `2^n`, and `A+B-2^n+1` otherwise. The result may be
`2^n-1` (all ones), which is a second code for zero. The design keeps it:
every later stage uses these residues only modulo `2^n-1`, so no
correction step is needed. With a third chunk, a row of full adders first
compresses `A, B, C` to two words. Its carry out of bit `n-1` weighs
`2^n ≡ 1` and wraps to bit 0.

**Modulo 2^n+1 (`res_gen_p1`).** This channel is the subtle one. The residue
lies in `[0, 2^n]` and needs `n+1` bits. The generator combines a row of full
adders with an *augmented diminished-1 adder*: an inverted-end-around-carry
(IEAC) Kogge-Stone adder plus an AND gate.

1. Modulo `2^n+1`, the bit complement is `~B = 2^n-1-B ≡ -B-2`. It follows that
   `A - B + C ≡ (A + ~B + C + 1) + 1`.
2. Full adders reduce `A`, `~B` and `C` to a sum word `S` and a carry word.
   The carry leaving bit `n-1` has weight `2^n ≡ -1`. It is written as
   `(1-c) - 1` and enters bit 0 *inverted*, and the `-1` cancels the `+1`
   of step 1. So `S + Y ≡ A + ~B + C + 1`, with `Y = {carries, ~c}`.
3. The IEAC adder computes `S + Y + 1 (mod 2^n+1)`. Its carry-out enters
   inverted at bit 0. In the one case `S + Y = 2^n - 1`, every bit propagates,
   the n sum bits are zero and the true result is `2^n`. The AND of all bit
   propagates flags this case and becomes the top bit. The residue is
   `{AND, sum}`.

The result is the exact residue, with no second code.

The classic formulation first turns `A` and `B` into diminished-1 form
(`value - 1`, plus a zero flag) before the IEAC adder. Here no separate
decrement is built. The full-adder row with the inverted wrapped carry
produces an equivalent operand pair for the IEAC adder directly.

**Kogge-Stone adder with end-around carry (`ks_mod_adder`).** The adder
computes bit generate/propagate, then runs `ceil(log2 n)` Kogge-Stone prefix
levels that give the group `(G, P)` of every prefix `[i:0]`. The end-around
carry needs no combinational loop. The carry-in is the group generate of the
whole word (inverted for IEAC). Every carry is then
`c_i = G[i-1:0] | P[i-1:0] & cin`, which is one extra prefix level.
`INV_EAC` selects the mode.

## Channel multipliers

`mlrns_mul_array` computes `p[i] = a[i] * b[i]` at full width, `2·n3+2` bits.
Products are not reduced: the reverse converter needs the exact product of
the level-3 residues (at most `2^(2·n3)`). The lanes are written as `*`, so an
FPGA flow can map each onto a DSP block.

## Reverse conversion

**RNS to binary (`rns2bin`).** With residues `X1` (mod `2^n-1`), `X2`
(mod `2^n`) and `X3` (mod `2^n+1`), the Chinese remainder theorem for this
set gives

    X  = 2^n · Y + X2
    Y  = < v1 + v21 + v22 + v3 >  modulo 2^(2n)-1
    v1  = <-2^n X2>        v21 = <2^(n-1) X3>
    v22 = <-2^(2n-1) X3>   v3  = <2^(n-1) (2^n+1) X1>

Modulo `2^(2n)-1`, a multiplication by `2^p` is a left rotation of the
2n-bit word, and a negation is a bit complement. `(2^n+1)·X1` is `X1`
written twice side by side. All four terms are therefore wiring. Two rows of
EAC full adders and one 2n-bit EAC Kogge-Stone adder sum them. Since
`Y < 2^(2n)-1`, an all-ones sum means zero and is mapped to 0. The output is
the concatenation `{Y, X2}`, which is 3n bits.

The converter accepts either zero code for `X1`, and any `X3` below
`2^(n+1)` that is congruent to the residue. Both differences vanish
modulo `2^(2n)-1`.

**Modified converter (`rns2bin_mod`).** On the way back up, a channel
carries a *value*, not a residue. It is either a product of two residues, or
the output of a converter one level down. Either way it can be as wide as
`3·n_below`, which is larger than the channel's modulus. Each input is
therefore first reduced with the forward residue generators, here including
the third chunk, and only then converted.

A level-`k+1` converter outputs the exact product of two level-`k` residues.
That product is below its range `M(k+1)` by the sizing rule. On level 1 the
converter outputs `X*Y`, which is below `2^(2W) < M(1)`, and `z` is its low
`2W` bits.

## Interface and timing

```systemverilog
mlrns_multiplier #(.W(64)) u_mul (
  .x (x),   // input  [W-1:0]   unsigned operand
  .y (y),   // input  [W-1:0]   unsigned operand
  .z (z)    // output [2*W-1:0] x*y
);
```

The design has no clock, no reset and no handshake. `z` is valid one
combinational delay after `x` and `y` settle. For a clocked system, place
registers around the multiplier. Pipeline registers between the conversion
levels are the natural cut points.

## Files

| file | contents |
|---|---|
| `rtl/mlrns_pkg.sv` | `next_n` sizing rule, `LANES = 27` |
| `rtl/ks_mod_adder.sv` | Kogge-Stone adder, EAC (mod `2^n-1`) or IEAC (diminished-1, mod `2^n+1`) |
| `rtl/res_gen_m1.sv` | residue generator mod `2^n-1` |
| `rtl/res_gen_p1.sv` | residue generator mod `2^n+1` (full adders + augmented diminished-1 adder) |
| `rtl/bin2rns.sv` | binary to `{2^n-1, 2^n, 2^n+1}` |
| `rtl/bin2mlrns.sv` | three-level forward conversion, 13 converters |
| `rtl/mlrns_mul_array.sv` | 27 lane multipliers |
| `rtl/rns2bin.sv` | RNS to binary (rotations, complements, EAC adder tree) |
| `rtl/rns2bin_mod.sv` | reduce-then-convert block of the reverse path |
| `rtl/mlrns2bin.sv` | three-level reverse conversion, 13 converters |
| `rtl/mlrns_multiplier.sv` | top level |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_table1_sizes.sv` | whole multiplier at W = 32 and W = 128 |

## Simulation

Every testbench prints `TB_RESULT checks=N failures=F` and ends with
`$finish`. Each one also has a clock-driven watchdog. For example, to build
and run the end-to-end test at the default size:

```sh
verilator --binary --timing --assert -Irtl rtl/mlrns_pkg.sv \
    tb/tb_mlrns_multiplier.sv --top-module tb_mlrns_multiplier -Mdir obj
./obj/Vtb_mlrns_multiplier
```

Verilator locates the other modules in `rtl/` by file name through `-Irtl`.
Swap in another testbench name to run that testbench.

## Verification

Every testbench compares its outputs with values computed in the testbench
by plain arithmetic (`%`, `*`) on wide integers. None of them reuses the
design's structure.

* `tb_ks_mod_adder`: both modes, exhaustive at n = 8 and random at n = 13.
* `tb_res_gen_m1` and `tb_res_gen_p1`: exhaustive over `(A, B)` at n = 8,
  with random third chunks, plus random vectors at n = 7 and n = 11. The
  all-ones zero code and the result `2^n` are required to occur.
* `tb_bin2rns`: two-chunk and three-chunk inputs.
* `tb_rns2bin` and `tb_rns2bin_mod`: a random X is chosen, and its residues,
  or random values congruent to them, are fed in. This includes the
  alternative zero codes and values near `M`.
* `tb_bin2mlrns`: all 27 residues at W = 32 and 64, against a reference
  model of the three levels.
* `tb_mlrns2bin`: exact residues of random X and Y are multiplied in the
  testbench and must come back as X*Y.
* `tb_mlrns_multiplier`: end-to-end at the default W = 64, with 20,000
  random, sparse and corner operand pairs. It also counts four
  mechanisms, each of which must occur:
  * the all-ones zero code;
  * the residue `2^n`;
  * a non-zero third chunk in a reverse reduction;
  * the all-ones-to-zero correction of the converter.
* `tb_table1_sizes`: the whole multiplier at W = 32 and W = 128.

For every module, a deliberately broken copy was also simulated against the
module's testbench, and the testbench reported failures.

## Design choices and limits

* **Default width.** Operand widths of 32, 64 and 128 bits are all natural
  configurations of this design. The default is `W = 64`; the other two are
  tested.
* **Combinational only.** There are no registers, as in the original design,
  and the delay grows with `W`. No timing or FPGA resource figures are given
  here.
* **Multipliers.** They are generic `*`; no vendor DSP primitive is
  instantiated.
* **Residue-generator internals.** The exact full-adder and IEAC encoding
  of the `2^n+1` generator is this design's own construction, and so is the
  adder tree of the RNS-to-binary converter. They implement the structures
  named above (full adders plus augmented diminished-1 adder; four rotated
  and complemented terms summed modulo `2^(2n)-1`).
* **Third chunk.** The third-chunk input of the residue generators is only
  used by the reverse path. In the forward path it is tied to zero or absent.
* **Parameter range.** `bin2rns` and `rns2bin_mod` assert that their input
  width `WI` is at most `3n`. Widths much below 16 make the level-3 exponent
  too small to be useful, and have not been tested as a whole multiplier.
