# Booth-Wallace 8 x 8 multiplier

An unsigned 8 x 8 multiplier with a 16-bit result, built the way fast
multipliers are usually built: form all partial products at once, squeeze
them down to two numbers with carry-save adders arranged as a Wallace tree,
and spend a single carry-propagating addition at the very end. The carry-save
adders never pass a carry sideways, so the tree costs four full-adder delays
whatever the word width. Only the last adder has a long carry path, and it
uses carry lookahead to keep that path short.

The whole multiplier is one combinational block: no clock, no registers.

## Dataflow

```
 a (multiplier) ──┐
                  ├─ pp_gen ── D0..D7  (Di = a[i] ? b << i : 0)
 b (multiplicand)─┘

 CSA_1 : D0,   D1,     D2      -> sum1, carry1     ┐ level 1
 CSA_2 : D3,   D4,     D5      -> sum2, carry2     ┘
 CSA_3 : D6,   D7,     sum1    -> sum3, carry3     ┐ level 2
 CSA_4 : sum2, carry1, carry2  -> sum4, carry4     ┘
 CSA_5 : sum3, sum4,   carry3  -> sum5, carry5       level 3
 final : sum5, carry5, carry4  -> 3:2 step -> CLA -> result (16 bits)
                                  (level 4)
```

Eight words go in. Each 3:2 carry-save adder (CSA) takes three words and
returns two words with the same sum. After CSA_5 three words are left: sum5,
carry5 and carry4. carry4 skips CSA_5 and goes straight to the final stage.
The final stage does one more 3:2 step and adds the two remaining words with a
carry-lookahead adder (CLA).

Every word in the tree is 2N = 16 bits wide. A carry word is the bitwise
majority of the three inputs moved up one bit. Its top bit falls off the end
of the word. That loses nothing, because the true product of two 8-bit
numbers is below 2^16, so all the arithmetic can be done modulo 2^16.

## Modules

| file | what it is |
|---|---|
| `rtl/bw_pkg.sv` | `MULT_N = 8` and `PROD_W = 16`, the defaults for every module |
| `rtl/pp_gen.sv` | partial product generator: `pp[i] = a[i] ? b << i : 0` |
| `rtl/csa.sv` | 3:2 carry-save adder: `sum = x^y^z`, `carry = maj(x,y,z) << 1` |
| `rtl/cla_adder.sv` | two-level carry-lookahead adder, 4-bit groups |
| `rtl/cla_stage.sv` | final stage: a `csa` followed by a `cla_adder` |
| `rtl/booth_wallace_mult.sv` | top: `pp_gen`, CSA_1..CSA_5 and `cla_stage` wired as above |

Top-level ports: `a[7:0]` multiplier, `b[7:0]` multiplicand,
`result[15:0]` product.

### The carry-lookahead adder

`cla_adder` is the only part with a carry chain, so it is the part worth
reading. Each bit makes a generate `g = a & b` and a propagate `p = a ^ b`.
The 16 bits are split into four groups of `GROUP = 4` bits. Each group makes a
group generate and a group propagate.

- **Second level:** the carry into each group is written out in full as a sum
  of products of the group terms and `cin`, e.g.
  `c8 = G1 | P1·G0 | P1·P0·cin`.
- **First level:** the carry into each bit is written out the same way from
  the bit terms and its group's carry-in.

Nothing ripples. The logic depth is two lookahead levels plus the XOR for the
sum. The loops in the RTL build these sum-of-product terms. They do not build
a ripple chain. `W` and `GROUP` are parameters, and `W` need not be a multiple
of `GROUP`.

## Where this departs from, or adds to, the original design

- **"Booth" stage.** The first block is called a modified Booth stage. What it
  does is choose each partial product as zero or the shifted multiplicand by a
  single multiplier bit. That gives eight partial products, the same count as
  the eight inputs the tree takes. There is no radix-4 recoding, because the
  tree is wired for eight partial products, not four.
- **Unsigned operands.** No sign handling is described, so `a` and `b` are
  unsigned.
- **Combinational, not clocked.** The original was written as a sequence of
  parallel steps, one per tree level. Here the tree is one combinational path.
  To pipeline it, put registers between the levels marked in the diagram.
- **One word width.** The original widened words stage by stage. Here every
  word is 16 bits. The values are the same.
- **Final adder.** The design says only that the result comes from a CLA. The
  two-level structure and the 4-bit groups are this implementation's choice.
- **Size.** Only the 8 x 8 core is defined. `booth_wallace_mult` stops
  elaboration with an error for any `N` other than 8, because the tree wiring
  is fixed. `pp_gen`, `csa`, `cla_adder` and `cla_stage` work at any width.
- **No figures for area or delay** are reproduced or checked.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog.

| testbench | what it checks |
|---|---|
| `pp_gen_tb` | all 65,536 operand pairs; every partial product, and that they sum to `a*b` |
| `csa_tb` | corner and 5,000 random triples; sum, carry and `sum+carry == x+y+z` |
| `cla_adder_tb` | carry-through-all-groups corners and 10,000 random adds, at 16 bits (4-bit groups) and 10 bits (3-bit groups) |
| `cla_stage_tb` | corner and 10,000 random triples against `x+y+z mod 2^16` |
| `booth_wallace_mult_tb` | the top at its default size, all 65,536 products |

The top-level test also counts how often carry4 (the word that skips CSA_5) is
non-zero, how often carry5 is non-zero, and how often the CLA carries across a
group boundary. It fails if any of these never happens. It reads these
signals by hierarchical name, so it needs the real `booth_wallace_mult`
hierarchy.

Running one with Verilator:

```
verilator --binary --timing -Irtl -y rtl +libext+.sv \
    rtl/bw_pkg.sv tb/booth_wallace_mult_tb.sv --top-module booth_wallace_mult_tb
./obj_dir/Vbooth_wallace_mult_tb
```

Every test finishes in well under a second.
