# Radix-16 Booth multiplier with ripple carry adders

A signed N x N multiplier (N = 16 by default) that cuts the number of
partial products to N/4 by recoding the multiplier in radix 16: every four
multiplier bits, together with the bit just below them, become one signed
digit between -8 and +8. Each digit selects a multiple of the multiplicand,
and the multiples are summed with plain ripple carry adders, which trade speed
for small area and low switching activity.

The multiplier comes in two forms that share all their parts:

* `radix16_booth_mult` is combinational. All N/4 partial products are
  formed at once and summed by a chain of ripple carry adders.
* `radix16_booth_seq` is iterative. It handles one digit per clock cycle
  with a single encoder, a single partial-product generator and a single
  adder, and finishes in N/4 cycles (4 for N = 16).

`radix16_booth_top` puts the two side by side on the same operand inputs.

## Radix-16 Booth recoding

Take the multiplier `b` and append a zero below its least significant bit,
`b[-1] = 0`. Group k (k = 0 .. N/4-1) is the five bits
`{b[4k+3], b[4k+2], b[4k+1], b[4k], b[4k-1]}`. Neighbouring groups overlap
by one bit. The group's digit is

    d_k = -8*b[4k+3] + 4*b[4k+2] + 2*b[4k+1] + b[4k] + b[4k-1]

and `b = sum_k d_k * 16^k` holds exactly for a two's-complement `b`. The
top bit of the top group is the sign bit and carries weight -8, so signed
operands need no correction term. So the product is
`a*b = sum_k (d_k*a) * 16^k`, a sum of N/4 terms.

`booth16_encoder` holds this mapping as a 32-entry case table. Each
magnitude 1..7 comes from two neighbouring codes, +8 only from `01111` and
-8 only from `10000`. A digit travels as the packed struct
`booth16_pkg::booth_digit_t`, a sign flag `neg` plus a magnitude `mag` of
0..8. A zero digit (`00000` or `11111`) always has `neg = 0`.

## Partial products and the deferred +1

`booth16_ppgen` turns a digit into `d*a` on N+4 bits. 8a needs N+3 bits,
and the extra bit covers -8 times the most negative operand.

* 0, a, 2a, 4a and 8a are shifts of the sign-extended multiplicand.
* 3a = 2a + a and 5a = 4a + a each take a ripple carry adder.
* 7a = 8a + ~a + 1 takes one too, through the adder's carry-in.
* 6a is 3a shifted left by one bit.

These are the "hard multiples" that make radix 16 more costly per partial
product than radix 4.

A negative digit needs the two's complement of the multiple. The generator
only inverts the bits and raises `neg`. The missing +1 goes in as the
carry-in of the adder that later adds this partial product. So the value of
a partial product is always `signed(pp) + neg`, and no separate incrementer
is needed. Keep this in mind when you reuse `booth16_ppgen` by itself.

## Summing the partial products (combinational form)

Row k is added with weight 16^k. A running sum `acc` of 2N bits starts at
zero. Adder k is a ripple carry adder of width `2N - 4k`:

* it adds the sign-extended partial product k to bits `[2N-1:4k]` of the sum;
* its carry-in is `neg_k`;
* bits `[4k-1:0]` pass through unchanged, because the shifted partial
  product is zero there.

The adders get narrower as k grows, and the last one is N+4 bits wide. The
arithmetic is modulo 2^2N. Intermediate sums may wrap, but the final signed
product always fits in 2N bits, so the result is exact.

The critical path runs through the encoder, the 7a adder, the multiplexer,
and then the ripple through the chain of row adders. There are no
registers. Register the inputs and outputs outside if the design is to be
timed in a pipeline.

## Iterative form

`radix16_booth_seq` keeps a register `{hi, lo, lo_m1}`:

* `hi` has N+5 bits, enough headroom that the running sum cannot overflow;
* `lo` is loaded with the multiplier;
* `lo_m1` is the implied bit below `lo`, cleared at start.

In each busy cycle, the group `{lo[3:0], lo_m1}` is encoded. The partial
product is added into `hi` by one (N+5)-bit ripple carry adder, with `neg`
as carry-in. Then the whole register is shifted right arithmetically by four
bits. After N/4 cycles, `{hi[N-1:0], lo}` is the 2N-bit product.

Handshake (all synchronous to `clk`, reset `rst_n` asynchronous active low):

| signal    | behaviour |
|-----------|-----------|
| `start`   | sampled only when idle; loads both operands |
| `busy`    | high for the N/4 working cycles |
| `done`    | one-cycle pulse N/4 clock edges after the edge that sampled `start` |
| `product` | valid from `done` until the next accepted `start` |

A `start` raised while busy is ignored. A `start` in the cycle where `done`
is high is accepted, so products can follow back to back every N/4 + 1
cycles. Two assertions check that the counter is idle whenever `busy` is
low, and that `done` and `busy` are never high together. They use `rst_n`
in `disable iff`, which is why Verilator reports `rst_n` as used both
synchronously and asynchronously. That report is expected.

## Module list

| file | role |
|------|------|
| `rtl/booth16_pkg.sv` | digit struct `booth_digit_t`, group count helper |
| `rtl/full_adder.sv` | 1-bit full adder (sum = XOR of three, carry = generate or propagate-and-carry) |
| `rtl/ripple_carry_adder.sv` | W-bit chain of full adders, parameter `W` (default 32) |
| `rtl/booth16_encoder.sv` | 5-bit group to digit -8..+8 |
| `rtl/booth16_ppgen.sv` | digit times multiplicand, parameter `N` |
| `rtl/radix16_booth_mult.sv` | combinational multiplier, parameter `N` |
| `rtl/radix16_booth_seq.sv` | iterative multiplier, parameter `N` |
| `rtl/radix16_booth_top.sv` | both forms side by side, parameter `N` |

`N` must be a multiple of 4 and at least 8. Other values stop elaboration
with an error.

## Where this departs from, or adds to, the original description

The original description gives the recoding table, the list of multiples,
ripple carry adders as the way of adding, and a worked example that adds
one digit and shifts by four per cycle. The following points are this
design's own choices:

* **Operand width.** The default of 16 bits is the size the multiplier was
  demonstrated at (320 x 400 = 128000). The introduction also speaks of
  32-bit signed operands. Set `N = 32` for that; it is tested.
* **Adders.** One remark mentions carry-lookahead adders for the negated
  multiples. Everything here uses ripple carry adders, the adder the whole
  design is built around.
* **The +1 of negation** goes into the accumulating adder's carry-in, not
  into a separate incrementer.
* **Adder arrangement.** The partial products are summed by a linear chain
  of narrowing adders, not by a tree.
* **Iteration count.** The worked example of the iterative algorithm is
  ambiguous about what happens in its first cycle. This design does exactly
  one add and one 4-bit shift per group, N/4 cycles in all.
* **Control.** The start/busy/done handshake, the reset and the
  accumulator width are not specified and were chosen here.
* **Timing and area.** The reported FPGA results (about 50 ns and about
  1100 four-input LUTs for a 16-bit radix-16 multiplier on a Spartan-3E)
  were not reproduced. They depend on the vendor's tools.

## Simulation

Every testbench checks itself and ends with a line
`TB_RESULT checks=<n> failures=<m>`. Each also has a watchdog. Expected
values come from the simulator's own signed multiply, or from the digit
formula above, never from the design.

| testbench | what it covers |
|-----------|----------------|
| `tb_full_adder` | all 8 input combinations |
| `tb_ripple_carry_adder` | 32-bit corner carries and random operands |
| `tb_booth16_encoder` | all 32 groups against the digit formula |
| `tb_booth16_ppgen` | every digit against corner and random multiplicands |
| `tb_radix16_booth_mult` | 16-bit corner and random pairs, the worked examples; an 8-bit instance exhaustively (65536 pairs) |
| `tb_radix16_booth_seq` | values, exact latency, ignored start while busy, back-to-back starts |
| `tb_radix16_booth_top` | end to end at default size (see below) |
| `tb_radix16_booth_n32` | 32 x 32 signed products in both forms |

`tb_radix16_booth_top` runs both forms on the worked examples, on corner
values and on 2000 random pairs. It changes the operands and raises a stray
start while the iterative unit is busy. It also counts coverage and fails
if any of these never happened:

* each digit value -8..+8;
* a negative top digit;
* an ignored start;
* a back-to-back start.

With Verilator 5, for example:

    verilator --binary --timing --assert -y rtl +libext+.sv \
        rtl/booth16_pkg.sv tb/tb_radix16_booth_top.sv \
        --top-module tb_radix16_booth_top -Mdir obj
    ./obj/Vtb_radix16_booth_top

Replace the testbench name to run another one. The package must come first
on the command line. Each run takes well under a second.
