# SPIM-style iterative 4-2 multiplier with IEEE rounding

A 64 x 64 bit unsigned multiplier that uses a small, deeply pipelined 4-2
adder tree many times over instead of one full tree. This is the organisation
of the Stanford Pipelined Iterative Multiplier (SPIM), described in the thesis
"Design and Clocking of VLSI Multipliers". Each array clock cycle takes 16 bits
of the multiplier. The 16 bits are radix-4 Booth encoded into 8 partial
products. An 8-input 4-2 tree, registered after each of its two levels,
reduces them to one carry-save pair. A 4-2 carry-save accumulator adds that
pair to its own previous contents shifted right by 16 bits. Four cycles bring
in all 64 multiplier bits. After them a correction row and a carry-propagate
adder (CPA) give the 128-bit product, and a rounding stage rounds the product
to a 64-bit significand in any IEEE 754 mode.

The array clock comes from a stoppable on-chip oscillator. It runs only while
a multiply is in flight, so from outside the part behaves like a flow-through
multiplier: apply the operands, raise `start`, and some time later `done`
rises with the result.

## Datapath and pipe

```
 y --> Booth encode --> select MUX --> 4-2 level 1 --> 4-2 level 2 --> 4-2 accumulator --> result latch --> correction row + CPA --> product
       (16 bits)        (8 x 66 b)     (A/B blocks)    (C block)       (D block, >>16)          |                                  |
                                                                              |                 +--> sticky, low carry         ieee_round
                                                                      16 bits/cycle --> piped carry --> low product bits
```

| cycle | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 |
|---|---|---|---|---|---|---|---|---|
| Booth encode | g0 | g1 | g2 | g3 | next g0 | | | |
| select MUX | | g0 | g1 | g2 | g3 | | | |
| tree level 1 | | | g0 | g1 | g2 | g3 | | |
| tree level 2 | | | | g0 | g1 | g2 | g3 | |
| accumulator | | | | | g0 | g1 | g2 | g3 |

Group g0 (multiplier bits 15..0) is encoded in cycle 0, before the clock
starts. The operands are latched and the encoder output captured on the first
array clock edge. The result is latched on the 8th edge, at the end of
cycle 7. With `start` held high, the next product enters in cycle 4, so the
pipelined rate is one product every 4 array cycles. With `start` low, the
controller drops its clock request and the clock stops right after the result
edge.

Every level of the tree ends in a register. The accumulator is the critical
stage: a 4-2 row, a register, a zero/feedback multiplexer and the 16-bit
shift wiring. The tree and accumulator are N + K + 2 = 82 bits wide. N = 64
bits are for the operand, 2 bits are for the Booth multiples (2x and the sign
bias), and K = 16 bits keep the bits of a group until they leave the
accumulator.

## Negative Booth partial products

Radix-4 Booth digits lie in {-2, -1, 0, 1, 2}, so partial products can be
negative. The design never carries a negative number through the tree:

* `booth_select` forms m = 0, x or 2x in 65 bits. For a negative digit it
  inverts m. It then prepends the inverted sign, giving a 66-bit vector
  `e = {~neg, neg ? ~m : m}` that is always nonnegative. For each digit,
  `d * x = e + neg - 2^65`.
* The `neg` bits (the "+1" of each two's complement) stay out of the tree.
  They travel down a delay line beside it. When their group's low 16 bits
  leave the accumulator, `piped_carry` adds them in. The last group's bits
  are added in `spim_cpa`.
* All the `-2^65 * 4^j` terms together make one constant. `spim_cpa` adds it
  once, in a 4-2 correction row just before the CPA.
* 32 Booth digits read the 64-bit multiplier as a two's complement number.
  For an unsigned multiplier with y[63] = 1 the correction row also adds
  x * 2^64.

Because every vector in the tree and the accumulator is nonnegative, the
accumulator's right shift simply fills with zeros, and no sign extension is
needed anywhere.

## Low-order bits: the piped carry

Each cycle 16 carry-save bit pairs fall off the bottom of the accumulator.
`piped_carry` adds them, together with the pending Booth "+1" bits of the
same weight and the carry from the previous chunk. The 16-bit sum is final
product bits. The carry (0, 1 or 2) is registered for the next chunk. This
gives product bits 47..0 while the array is still working. It also gives the
carry into the upper half, which the final row takes in its two free bit-0
slots. So the CPA only has to span the upper 64 bits, with one 16-bit chunk
in front of it.

## Rounding (ieee_round)

The rounding stage takes the carry-save upper part of the product. Its bits
are V (overflow, product >= 2), the 64 result bits and R (the round bit,
product bit 62). It also takes the carry into R from below and the sticky
bit. For round to nearest:

1. R's sum and carry bits plus the known rounding 1 limit the carry into L
   (the result LSB) to either {0, 1} or {1, 2}. A row of half adders over
   L..V frees one slot at L. The OR of the two R bits fills it, so only a
   carry of 0 or 1 is left open.
2. A compound adder (`cond_sum_adder`) forms A+B and A+B+1 at the same time.
3. Once the carry from below is known, a first selection assumes no overflow
   and yields V. V then decides the extra half unit that an overflowed
   (right-shifted) result needs, and the final selection is made.
4. This gives round-to-nearest/up. It differs from round-to-nearest/even only
   on an exact tie, and then only in the LSB. On a tie (round bit 1, nothing
   below it) the LSB is forced to 0.

Round toward zero uses the same path without the rounding 1 (an AND instead of
the OR in the slot). Toward +inf and -inf truncate, then add one in an
incrementer when any discarded bit is set and the sign points away from zero.
The incrementer is this design's choice. `exp_adj` reports the exponent
change: +1 for the normalising shift, and +2 when a directed round-up then
carries out of an overflowed result.

The carry-save inputs are taken modulo 2^66. This is exact for any product of
two significands 1.f: the product is below 4 and never rounds to 4.

**Sticky bit.** A Booth-encoded array makes the OR of the carry-save low bits
useless for sticky, because a negative partial product can cancel bits. The
sticky bit is therefore computed from the operands (`sticky_tz`). The product
has tz(x) + tz(y) trailing zeros, so sticky = (tz(x) + tz(y) < 62). It is
worked out once per product while the array runs.

## Clock (spim_clkgen, behavioural)

The clock generator is a model, because a ring oscillator's period is gate
delay. A NAND-gated ring runs while `run` is high and finishes its last
period when `run` falls, so it never makes a short pulse. Three `speed` bits
lengthen the feedback path in steps of two inverter delays. `test_mode`
substitutes `test_clk`. The datapath is fully static, so the test clock may
be arbitrarily slow. `loop_mode` keeps the clock running with no work, for
measuring it at `clk_out`. The model's half period is 5.9 ns + speed x
0.2 ns, which gives about 85 MHz at speed 0.

## Modules

| module | role |
|---|---|
| `spim_top` | clock model + core + rounding; plain-signal ports |
| `spim_core` | operand latches, Booth stages, tree, accumulator, piped carry, result latch, final adder |
| `spim_ctrl` | group sequencing, tag pipeline, accumulator reset, result latch, clock request, `done` |
| `booth_encoder` | 8 radix-4 digits from 17 overlapping bits |
| `booth_select` | biased partial product and "+1" bit per digit |
| `adder42`, `adder42_row` | 4-2 adder cell (two CSAs, cout independent of cin) and a row of them |
| `tree42` | pipelined partial 4-2 tree, `NUM_PP` inputs, log2(NUM_PP/2) levels |
| `acc42` | 4-2 carry-save accumulator with right shift and zero multiplexer |
| `piped_carry` | per-cycle resolution of the bits leaving the accumulator |
| `spim_cpa` | bias/correction 4-2 row and carry-propagate adder |
| `ieee_round`, `cond_sum_adder` | rounding and its compound adder |
| `sticky_tz` | sticky from operand trailing zeros |
| `spim_pkg` | Booth digit struct, rounding mode enum |

Parameters: `N` (operand width, 64) and `K` (multiplier bits per cycle, 16)
on `spim_core` and `spim_top`. K must be 8, 16 or 32 (a tree of 4, 8 or 16
inputs), and N must be a multiple of K with at least two groups. A product then
takes N/K + log2(K/2) + 1 edges and the pipelined rate is one per N/K
cycles. `tb_spim_core` simulates the core at K = 8, 16 and 32 side by side.
The top, with its rounding stage, is verified at the default only.

## Interface and timing (spim_top)

1. Reset with `rst_n` low; the reset is asynchronous because the clock is
   stopped when idle.
2. Put `x` and `y` on the pins and raise `start`. `run` starts the
   oscillator. The first edge takes the operands, and `busy` rises. Drop
   `start` after that, unless the next product should follow at once.
3. 8 array edges after the first one, counting it, `done` rises. `product`
   is then valid, and so are `mant`, `exp_adj` and `inexact` for the `rmode`
   and `sign` on the pins. They hold until the next product is taken.

For pipelined use, hold `start` high and change `x`/`y` after each accept (the
core's `accept`, every 4th edge). A result is then latched every 4 edges.

## Departures from the original chip

* The original chip did not round. Rounding here follows the rounding scheme
  proposed for this kind of multiplier (half-adder row, compound adder,
  two-step selection).
* Sticky comes from operand trailing zeros, not from a pipelined OR of the
  carry-save bits. The OR method assumes nonnegative partial products, and
  this design keeps Booth encoding as the chip did.
* Registers are edge-triggered flip-flops. The chip used static master/slave
  latches and discussed half-latch and single-phase styles.
* Tracking clock generators, whose delay copies a 4-2 adder, and the clock
  buffer network are analog/physical and are not modelled. Only the
  programmable-delay oscillator is modelled, and only behaviourally.
* The Booth sign handling (biasing, the constant, the y[63] correction), the
  start/busy/done handshake and the final correction row are this design's
  own.
* The exponent and sign datapath of a floating-point multiplier are not
  included. `exp_adj` and `sign` are the hooks for them.

## Simulation

Each testbench in `tb/` checks itself and ends with a
`TB_RESULT checks=N failures=M` line. For example, the end-to-end test at
full size:

```
verilator --binary --timing --assert -Irtl -Itb rtl/spim_pkg.sv tb/tb_spim_top.sv \
          --top-module tb_spim_top -o sim
./obj_dir/sim
```

`tb_spim_top` runs about 780 products through the top. They include:

* random significands in all four modes;
* constructed ties;
* 53-bit (double-precision) significands in the top bits of the operands;
* a product just below 2 that rounds up to 2;
* 80 back-to-back pipelined products;
* products on the external test clock;
* loop mode;
* the period at each speed code.

It checks the 8-edge latency, the 4-edge pipelined spacing and that the clock
stops. It counts each mechanism and fails if one never occurred.
`tb_spim_core` runs three cores (K = 8, 16, 32) through 350 to 500 products
each. The operands include corners: 0, all ones, powers of two and shifted
patterns. It checks each product, the sticky bit, the latency and the
pipelined rate of each size. Every leaf block has
its own randomised testbench against an independent reference. The largest,
`tb_ieee_round`, checks 48,000 roundings.

Known limits:

* A carry of 2 out of a low-order chunk is possible but rare under random
  data. The `piped_carry` unit test drives it directly.
* Sizes other than N = 64, K = 16 are simulated only for the core (K = 8,
  32), not at the top level.
