# Vedic multipliers: one 2x2 cell, four ways to add the partial products

These modules multiply unsigned numbers using the *Urdhva-Tiryakbhyam* rule of Vedic
arithmetic ("vertically and crosswise"). To multiply two N-bit numbers, split each into a
high and a low half. Multiply the halves pairwise, low by low and high by high ("vertically")
and low by high both ways ("crosswise"). Then add the four half-size products at their
weights. Applied recursively, this bottoms out in a tiny 2x2-bit multiplier built from AND
gates and two half adders.

The multiplication itself is the same everywhere. What the architectures differ in is how
they add the partial products. This RTL provides four of them, the way the published
4x4 design compares them:

| module            | how the partial products are added                          | built sizes in `vedic_top` |
|-------------------|-------------------------------------------------------------|----------------------------|
| `vedic_mult_rca`  | three N-bit ripple carry adders                             | 4x4                        |
| `vedic_mult_cla`  | three N-bit carry look-ahead adders                         | 4x4, 8x8, 32x32            |
| `vedic_mult_csa2` | two N-bit carry save adders                                 | 4x4                        |
| `vedic_mult_csa1` | one 3N/2-bit carry save adder, after a free concatenation   | 4x4, 8x8, 32x32            |

All of them are purely combinational, with no clock and no registers. Each is exact for every
operand pair: the 4x4 and 8x8 versions were checked exhaustively.

## The 2x2 cell (`vedic2x2`)

For `a = a1a0` and `b = b1b0`:

```
s0      = a0b0                 vertical, low bits
{c1,s1} = a0b1 + a1b0          crosswise: half adder 1
{c2,s2} = c1   + a1b1          vertical, high bits, plus carry: half adder 2
p       = {c2, s2, s1, s0}
```

Four 2-input ANDs form the bit products and two half adders (`half_adder`) add them. No
column ever holds more than two bits to add, so half adders are enough.

## Splitting an NxN product

Let H = N/2. With `a = {a_hi, a_lo}` and `b = {b_hi, b_lo}`, four HxH multipliers give N-bit
partial products:

```
q0 = a_lo*b_lo   (weight 2^0)
q1 = a_lo*b_hi   (weight 2^H)
q2 = a_hi*b_lo   (weight 2^H)
q3 = a_hi*b_hi   (weight 2^N)
```

Seen as columns of H bits:

```
 bit:     2N-1 .. N+H | N+H-1 .. N | N-1 .. H | H-1 .. 0
          [------ q3 ------------]
                      [------ q1 ----------]
                      [------ q2 ----------]
                                   [------ q0 --------]
```

The low H bits of q0 are final product bits as they stand. Everything else is a sum. The
*middle sum* `mid = q1 + q2 + q0[N-1:H]` is the critical quantity. Its low H bits are product
bits N-1..H. Its upper part must then be added to q3. `mid` can exceed N bits: for N=4 it
reaches 20 (when a = b = 15), so its carries matter. The four architectures handle this
middle column differently.

## Three-adder chain: `vedic_mult_rca` and `vedic_mult_cla`

These two architectures are identical apart from the adder type (`rca` or `cla`, both N bits
wide):

```
adder 1:  s1 = q2 + q1                        carry ca1
adder 2:  s2 = s1 + {0, q0[N-1:H]}            carry ca2
adder 3:  s3 = q3 + {0, ca1|ca2, s2[N-1:H]}   carry ca3 (always 0)
p = {s3, s2[H-1:0], q0[H-1:0]}
```

The subtle point is how the two carries `ca1` and `ca2` reach adder 3. Both have weight
2^(N+H), one above `s2[N-1:H]`, so they belong in the same bit of adder 3's operand. They can
never be 1 together. Each of q1 and q2 is at most (2^H-1)^2 = 2^N - 2^(H+1) + 1. So if
q1 + q2 overflows N bits, what is left in s1 is at most 2^N - 2^(H+2) + 2. Adding
q0[N-1:H], which is at most 2^H - 2, gives at most 2^N - 3·2^H. That cannot overflow again.
For N=4: s1 ≤ 2 and q0[3:2] ≤ 2. So a
single OR merges them without losing anything. This merge is a choice of this RTL: the
published block diagram shows both carries entering the last adder but not how. Each of
these modules has an immediate assertion that flags `ca1 && ca2`, and another that flags a
carry out of adder 3.

`rca` is a chain of `full_adder` cells. `cla` forms generate `g = a&b` and propagate `p = a^b`.
It then computes every carry directly as a sum of products of g and p below it, so no carry
waits for the one before. The look-ahead is a single level over the full width, also at
32 bits. The published design only names the look-ahead adder, so this form is an
assumption.

## Carry save adders: `csa`, `vedic_mult_csa2`, `vedic_mult_csa1`

`csa #(W)` adds three W-bit numbers `x + y + z` exactly, into W+2 bits, in two stages:

1. A row of W full adders reduces each bit position `(x_i, y_i, z_i)` to a sum bit `s_i` and
   a carry bit `k_i`. No carry travels sideways.
2. A W-bit ripple carry adder adds the carry vector `k` to the sum vector shifted down by one,
   `{0, s[W-1:1]}`. Bit 0 of the result is `s_0`. The ripple adder gives bits 1..W, and its
   carry out is bit W+1.

**Two carry save adders (`vedic_mult_csa2`).** The middle column is a three-operand sum, so
one carry save adder computes all of `mid` at once:

```
m = csa(q2, q1, {0, q0[N-1:H]})            N+2 bits
t = csa(q3, {0, m[N+1:H]}, 0)              third operand unused
p = {t[N-1:0], m[H-1:0], q0[H-1:0]}
```

All of `m[N+1:H]` is passed up, which is H+2 bits (bits 5..2 for N=4). The published diagram
labels this link with bits (3:2) only, but bit 4 is set whenever `mid` ≥ 16, e.g. 15*15.
Passing two bits would give wrong products.

**One carry save adder (`vedic_mult_csa1`).** q3 starts exactly where q0 ends (weight 2^N). So
the upper half of q0 is simply appended below q3 by concatenation, with no gates. Then the
three remaining operands are all 3H bits wide:

```
x = {q3, q0[N-1:H]}     y = {0, q2}     z = {0, q1}
p = {csa(x, y, z)[3H-1:0], q0[H-1:0]}
```

For N=4 this is one 6-bit carry save adder in place of three 4-bit adders. That is the point
of the architecture: there is only one carry-propagating stage, after one full-adder level.
The top two bits of the carry save adder's result are always 0, because x + y + z < 2^(2N-H).
An assertion watches this.

## Larger sizes by recursion

Every `vedic_mult_*` module takes a parameter `N`: a power of two, at least 4, default 4. For
N=4 the four sub-multipliers are `vedic2x2` cells. For larger N, each sub-multiplier is the
same module at N/2, so a 32x32 multiplier has five levels: 32 → 16 → 8 → 4 → 2. Each level
uses the same architecture for its own partial-product sum. The published work reports 8x8
and 32x32 versions of the look-ahead and single-carry-save architectures but does not draw
them. The recursion is this RTL's reading of "extend the same method to more bits". The
ripple carry and two-carry-save versions also accept larger N and pass their tests at 8 and
16 bits, but `vedic_top` builds them only at 4x4.

## Top level (`vedic_top`)

`vedic_top` instantiates every configuration side by side:

| port                  | width | meaning                                       |
|-----------------------|-------|-----------------------------------------------|
| `a4`, `b4`            | 4     | operands shared by the four 4x4 architectures |
| `p4_rca`, `p4_cla`, `p4_csa2`, `p4_csa1` | 8 | their products                 |
| `a8`, `b8`            | 8     | 8x8 operands                                  |
| `p8_cla`, `p8_csa1`   | 16    | 8x8 products                                  |
| `a32`, `b32`          | 32    | 32x32 operands                                |
| `p32_cla`, `p32_csa1` | 64    | 32x32 products                                |

To use a single multiplier, instantiate the `vedic_mult_*` module you want directly, with
`N` set to your width.

## Verification

Each module has a self-checking testbench in `tb/` that compares against the integer
product (or sum) and ends by printing `TB_RESULT checks=<n> failures=<n>`:

* `tb_vedic2x2`: all 16 operand pairs.
* `tb_rca`, `tb_cla`: all 4-bit pairs, plus 32-bit corners and random pairs.
* `tb_csa`: all 4-bit and all 6-bit triples, plus random 24-bit triples.
* `tb_vedic_mult_*`: all 4x4 and 8x8 pairs, plus random 16x16 pairs. Working only from the
  operands, each testbench also counts how often the middle column overflowed in the first
  addition (ca1), only in the second (ca2), or at all. If any of these never happened, the
  testbench counts a failure. At 4x4 there is one ca1 case (15*15) and four ca2 cases.
* `tb_vedic_top`: the whole top at its default sizes. It runs all 4x4 pairs on the four
  architectures and all 8x8 pairs on both 8x8 multipliers. The 32x32 multipliers get corners,
  a directed pair that causes ca2 without ca1 at the top level, and 20000 random pairs. The
  same carry cases are counted for every size.

Run one with Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl tb/tb_vedic_top.sv --top-module tb_vedic_top
./obj_dir/Vtb_vedic_top
```

Building `tb_vedic_top` takes about half a minute, mostly for the 32-bit look-ahead adders.
The simulation takes a few seconds.

## Departures and limits

* **Timing is not modelled.** The architectures exist to trade combinational delay. The
  published comparison measured that on an FPGA: on a Spartan-6, the single carry save adder
  was fastest and the ripple carry adder slowest at 4x4. The single carry save adder also
  beat the look-ahead version at 8x8 and 32x32. Reproducing those numbers needs an FPGA
  implementation flow. This RTL is only functionally verified.
* **Own choices where the source is silent:** unsigned operands; no carry-in on the adders;
  an OR to merge the two middle carries of the three-adder chain; full-width single-level
  carry look-ahead; passing all upper bits of the middle sum in `vedic_mult_csa2`; tying off
  the third operand of its upper carry save adder; recursion for sizes above 4x4.
* **The adder named for the single-carry-save architecture:** the published design also calls
  it a look-ahead adder once. It is built as a carry save adder (a full-adder row followed by
  a ripple adder), as the architecture's name and diagram say.
* **Not included:** the direct column-by-column form of the Urdhva rule (all crosswise
  products of a column added at once, with carries handed on), which is used only to explain
  the rule. Its 2x2 case is `vedic2x2`.

## Files

`rtl/`: `half_adder`, `full_adder`, `vedic2x2`, `rca`, `cla`, `csa`, `vedic_mult_rca`,
`vedic_mult_cla`, `vedic_mult_csa2`, `vedic_mult_csa1`, `vedic_top`. Each file holds one
module and opens with a comment on its function, interface and timing.
`tb/`: `tb_<module>` for every module except the two adder cells, which the
adder testbenches cover.
