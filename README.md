# 16 x 16 Vedic multiplier with a carry save adder tree

This is a purely combinational unsigned 16 x 16 -> 32 bit multiplier. It is
built for a short critical path. The design has three levels:

1. A **4 x 4 multiplier** that uses the "vertical and crosswise" (Urdhva
   Tiryagbhyam) method of Vedic arithmetic. It forms all the bit products of
   a result column at once, in parallel.
2. An **8 x 8 multiplier** made of four 4 x 4 multipliers.
3. A **16 x 16 multiplier** made of four 8 x 8 multipliers. Their four
   partial products are added by a small tree of **8-bit carry save
   adders**.

The 16 x 16 level matters most. A plain design would add the partial
products with two 16-bit ripple adders, one after the other, so the second
adder waits for the first one's carry chain. Here each output byte has its
own adder. No carry crosses more than one byte before the next stage
starts.

## Files

| file | module | what it is |
|---|---|---|
| `rtl/vedic_mul16.sv` | `vedic_mul16` | top: 16 x 16 multiplier |
| `rtl/vedic_mul8.sv` | `vedic_mul8` | 8 x 8 multiplier from four `vedic_mul4` |
| `rtl/vedic_mul4.sv` | `vedic_mul4` | 4 x 4 vertical and crosswise multiplier |
| `rtl/csa_tree.sv` | `csa_tree #(H)` | adds four 2H-bit partial products into a 4H-bit product |
| `rtl/csa_adder.sv` | `csa_adder #(WIDTH)` | three-operand carry save adder |
| `tb/tb_*.sv` | | one self-checking testbench per module |

## Top-level interface

| port | dir | width | meaning |
|---|---|---|---|
| `a` | in | 16 | multiplicand, unsigned |
| `b` | in | 16 | multiplier, unsigned |
| `pp` | out | 4 x 16 | partial products PP0..PP3 (see below), for observation |
| `prod` | out | 32 | `a * b` |

There is no clock, reset or handshake. `prod` is valid one propagation
delay after `a` and `b` settle. To pipeline the multiplier, put registers
around it. Register the partial products too if you want to cut the path
between the multipliers and the adder tree.

## The 4 x 4 vertical and crosswise step

Write the operands as a3a2a1a0 and b3b2b1b0. The result r7..r0 comes out in
seven column steps, starting at the least significant column. Step k adds
every bit product ai·bj with i + j = k to the carry left over from step
k-1:

```
step 1:  r0    = a0b0
step 2:  c1 r1 = a1b0 + a0b1
step 3:  c2 r2 = c1 + a2b0 + a1b1 + a0b2
step 4:  c3 r3 = c2 + a3b0 + a2b1 + a1b2 + a0b3
step 5:  c4 r4 = c3 + a3b1 + a2b2 + a1b3
step 6:  c5 r5 = c4 + a3b2 + a2b3
step 7:  c6 r6 = c5 + a3b3
         r7    = c6
```

"ck rk" means the binary value of the column sum: its low bit is the result
bit and the higher bits are the carry. A carry can be more than one bit. In
the widest column, step 4, the sum reaches 7, so each column sum is 3 bits
wide and each carry 2 bits. The last carry is a single bit, because
15 x 15 = 225 fits in 8 bits. In the RTL each column is one small addition,
and synthesis chooses its half and full adders.

## Splitting and the partial products

At each level the operands are split into halves: `a = {aH, aL}` and
`b = {bH, bL}`. Four half-width multipliers then work in parallel:

```
PP0 = aL * bL     PP1 = aL * bH     PP2 = aH * bL     PP3 = aH * bH
product = PP0 + (PP1 + PP2) << H + PP3 << 2H
```

In `vedic_mul16`, H = 8. In `vedic_mul8`, H = 4. Both levels use the same
`csa_tree` to combine the four products.

## The carry save adder tree (hardest part)

`csa_tree` builds the 4H-bit product one H-bit slice at a time. It uses four
H-bit three-operand adders in three stages:

```
stage 1:  hi:  PP3[H-1:0] + PP2[2H-1:H] + PP1[2H-1:H]  -> s_hi,          c_hi  (0..2)
          lo:  PP2[H-1:0] + PP1[H-1:0]  + PP0[2H-1:H]  -> PROD[2H-1:H],  c_lo  (0..2)
stage 2:       s_hi + c_lo                             -> PROD[3H-1:2H], c_mid (0..1)
stage 3:       PP3[2H-1:H] + c_hi + c_mid              -> PROD[4H-1:3H], carry dropped
wire:          PP0[H-1:0]                              -> PROD[H-1:0]
```

- **Slice 0.** `PROD[H-1:0]` is `PP0[H-1:0]`. No adder is needed.
- **Slice 1.** The low first-stage adder adds the three operands of weight
  2^H. Its H-bit sum is `PROD[2H-1:H]`. It passes a carry of 0..2 to
  stage 2.
- **Slice 2.** The high first-stage adder adds the three operands of weight
  2^2H at the same time. Stage 2 adds the low adder's carry to that sum.
  The result is `PROD[3H-1:2H]`, and stage 2 carries out 0 or 1.
- **Slice 3.** Stage 3 adds `PP3[2H-1:H]`, the high adder's carry (0..2)
  and the stage 2 carry. The result is `PROD[4H-1:3H]`. Stage 3's own
  carry out is dropped. For real partial products it is always 0, because
  a product of two 2H-bit numbers fits in 4H bits.

The two first-stage adders run in parallel. The longest path goes through
three H-bit adders, not through a 2H-bit ripple chain after another one.

Each `csa_adder` is a carry save adder. A row of full adders turns the
three operands into a partial sum vector `x ^ y ^ z` and a saved carry
vector `maj(x, y, z)`. No carry moves between bit positions in that row.
One final addition then adds the saved carries, shifted one place left, to
the partial sum. That gives an H-bit sum and a 2-bit carry out. The final
addition is written as `+`, so synthesis picks its adder architecture.

## Where this design makes its own choices

The architecture above (the three levels, the split, which partial product
goes where, which slices each adder handles, and the dropped final carry)
follows the published design. These details were not specified and were
chosen here:

- **The 8 x 8 level** uses the same adder tree as the 16 x 16 level, at
  half width (H = 4). The source says only that the 8 x 8 multiplier is
  built from 4 x 4 modules.
- **Carry widths between stages** are the smallest that always hold the
  value: 2 bits from stage 1 and 1 bit from stage 2, zero-extended into the
  next adder.
- **Which carry goes where.** The routing of the high first-stage adder's
  carry straight to stage 3 is inferred from the arithmetic. It is the only
  routing that gives the correct product.
- **Gate level.** Each 4 x 4 column sum and each carry save adder's final
  addition is a word-level `+`. The original gate arrangement is not
  reproduced: 8 half adders and 7 full adders per 4 x 4 block, and the
  reported XOR gate counts.
- **Pipelining.** The design is purely combinational, with no registers.
- **The `pp` port** is added so that the partial products can be watched in
  simulation.

## Verification

Each testbench checks every output against an integer reference that it
computes itself, for example `a * b` or `x + y + z`. It ends with a line
`TB_RESULT checks=N failures=M`.

| testbench | what it does |
|---|---|
| `tb_vedic_mul4` | all 256 operand pairs |
| `tb_vedic_mul8` | all 65536 operand pairs |
| `tb_csa_adder` | 8-bit adder over all 2^24 operand triples plus 100 000 random triples; 4-bit adder over all 4096 triples; checks that carry outs 0, 1 and 2 all occur |
| `tb_csa_tree` | H = 8 and H = 4 trees with 200 000 random partial product sets each (not only real products), checked against the weighted sum modulo 2^4H |
| `tb_vedic_mul16` | top, default size (see below) |

Both adder widths that the design uses (8 and 4 bits) and both multiplier
sizes below the top are checked over every input. The top-level
test then exercises how they are wired together.

`tb_vedic_mul16` applies, in order:

- the worked examples 61682 x 30345 = 1871740290 and 65535 x 65535 =
  4294836225, where `pp` and `prod` are also checked bit for bit against
  the expected binary values;
- all single-bit operand pairs;
- every value of `a` against 256 values of `b`;
- 2 million random pairs.

`tb_vedic_mul16` also counts how often each carry path of the tree is
used: low and high stage-1 carries of 1 and 2, and a stage-2 carry of 1. It fails if any path
is never used. It does not cover all 2^32 operand pairs. At about 2 million
pairs per second that would take roughly 40 minutes of simulation.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb tb/tb_vedic_mul16.sv --top-module tb_vedic_mul16
./obj_dir/Vtb_vedic_mul16
```

The whole top-level run takes a few seconds.

## Changing it

- **Other widths.** `csa_tree #(H)` and `csa_adder #(WIDTH)` work at any
  width. A 32 x 32 multiplier would be four `vedic_mul16` plus
  `csa_tree #(.H(16))`, wired like `vedic_mul16`.
- **Signed operands** are not supported. They would need sign handling
  around the unsigned core.
- **Synthesis.** All modules are synthesizable. `csa_tree` declares the
  stage 3 carry out (`c_top`) but never reads it, so lint tools report it as
  unused. This is on purpose: the carry is always 0 for real partial
  products.
