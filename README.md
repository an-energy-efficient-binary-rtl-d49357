# BipSMul: an exact multiplier built from parallel stochastic bitstreams

Stochastic computing multiplies two numbers with a single AND gate, provided
each number is first turned into a bitstream whose fraction of ones is the
value. The price is time: an n-bit value needs a 2^n-bit stream, and an exact
product (the "deterministic" variant, where every bit of one stream meets
every bit of the other) needs 2^(2n) bits. Processing all of those bits in
parallel makes the product a one-cycle operation but needs 2^(2n) AND gates,
which is hopeless beyond a few bits.

This RTL implements the binary-interfaced parallel stochastic multiplier
(BipSMul) that avoids the blow-up by **splitting each operand into R
segments**. Each k = n/R bit segment becomes a short stream of 2^k bits, every
segment of `a` is multiplied stochastically with every segment of `b`, and the
R² small products are recombined with binary shifts and adds, exactly as in
long multiplication. The whole multiplier is combinational, takes binary
operands and returns the exact binary product: it is a drop-in replacement for
an n x n binary multiplier. An m-input multiply-accumulate unit (MAC) built
from it is the top level.

## How a product is formed

Take n = 4, R = 2, so k = 2 and every short stream is L = 2^k = 4 bits.

**1. Hybrid bit splitting generator (`hbsg`).** `a = a3 a2 a1 a0` splits into
the segments `a3a2` (stream 0, the most significant) and `a1a0` (stream 1).
A segment is turned into a stream purely by wiring: bit i of the segment has
weight 2^i, so it is wired to the 2^i stream positions 2^i .. 2^(i+1)-1, and
position 0 is a constant 0. For `a3a2` the stream, positions 3..0, is
`a3 a3 a2 0`: it holds exactly `2*a3 + a2` ones out of 4, i.e. the segment
value divided by 2^k. The extra zero is what makes the denominator a power of
two. There are no gates and no random source in the generator.

**2. Deterministic expansion (`det_expand`).** To make an AND of two streams
count exactly `x * y` ones, each stream is lengthened to L² bits. The `a`
streams are simply repeated L times; the `b` streams are repeated with a
rotation of one more place per copy. With positions in time order,

    a:  a0 a1 a2 a3 | a0 a1 a2 a3 | a0 a1 a2 a3 | a0 a1 a2 a3
    b:  b0 b1 b2 b3 | b3 b0 b1 b2 | b2 b3 b0 b1 | b1 b2 b3 b0

so every `a` position meets every `b` position exactly once. For example
1110 (3/4) against 1100 (1/2) expands to `1110 1110 1110 1110` and
`1100 0110 0011 1001`, whose AND has 6 ones out of 16 = 3/8, exact. This step
is also only wiring.

**3. AND arrays and SUM counters (`and_array`, `par_counter`).** For every
pair (segment i of `a`, segment j of `b`) an array of L² AND gates multiplies
the two expanded streams, and a parallel counter counts the ones. The count is
the exact product of the two segment values. With R = 2 there are four pairs,
usually called aH·bH, aH·bL, aL·bH and aL·bL, and four arrays of 16 gates.

**4. Shift-accumulate (`shift_accumulator`).** Each count is a partial
product of long multiplication and is shifted left by the combined weight of
its two segments, `((R-1-i) + (R-1-j)) * k`: for R = 2, aH·bH by n, the two
cross terms by n/2, aL·bL by 0. The shifted counts are added into the 2n-bit
product.

### Choosing R

R trades the size of the stochastic part against the number of pairs:

| configuration | streams per operand | gates per AND array | arrays (R²) |
|---|---|---|---|
| n = 4, R = 1 | 1 x 16 bits | 256 | 1 |
| n = 4, R = 2 | 2 x 4 bits | 16 | 4 |
| n = 4, R = 4 | 4 x 2 bits | 4 | 16 |
| n = 8, R = 1 | 1 x 256 bits | 65536 | 1 |
| n = 8, R = 2 | 2 x 16 bits | 256 | 4 |
| n = 16, R = 2 | 2 x 256 bits | 65536 | 4 |

R = 1 is the unsplit deterministic multiplier, whose cost explodes with n
(n = 8, R = 1 and n = 16, R = 2 are legal but very large). R = n reduces every
segment to one bit and the design to an ordinary array multiplier. n must be a
multiple of R; elaboration stops otherwise. The default of the multiplier
itself is n = 4, R = 2, the configuration intended for 4-bit quantized neural
networks; the MAC uses n = 8, R = 2.

## Signed operands (`bipsmul_signed`)

The stochastic part works on unipolar (non-negative) values only. Signed
numbers are therefore carried as sign and magnitude: each operand has one
extra sign bit, the magnitudes go through the unsigned multiplier, and the
product sign is the XOR of the two signs. The output is sign-magnitude too;
a zero magnitude with sign 1 is a negative zero and means 0.

## The MAC (`bipsmul_mac`, top level)

`bipsmul_mac` multiplies M operand pairs in the same cycle and adds the
products: `acc = sum_m a[m] * b[m]`. Each lane is a `bipsmul_signed`; its
sign-magnitude product is converted to two's complement and the M lane
products are added by an adder tree. The sum is registered.

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock |
| `rst_n` | in | 1 | asynchronous reset, active low; clears `out_valid` and `acc` |
| `in_valid` | in | 1 | the operands below are valid this cycle |
| `a_sign`, `b_sign` | in | M | operand signs (tie to 0 for unsigned use) |
| `a_mag`, `b_mag` | in | M x N | operand magnitudes, `[m][N-1:0]` |
| `out_valid` | out | 1 | `acc` was loaded on the last clock edge |
| `acc` | out | 2N+1+clog2(M), signed | sum of the M products; never overflows |

Timing: operands presented with `in_valid` high in cycle t appear on `acc`,
with `out_valid` high, after the clock edge that ends cycle t: one result per
cycle, one cycle of latency. When `in_valid` is low, `acc` holds its value.
The MAC does not accumulate over successive cycles; a longer dot product is
the sum of successive `acc` values.

Parameters: `N` = 8 (multiplier width), `R` = 2, `M` = 16 (MAC widths of 2,
4, 8 and 16 were evaluated with 8-bit multipliers; 16 is the default).

## Module map

| file | module | contents |
|---|---|---|
| `rtl/bipsmul_pkg.sv` | package | `det_mode_e` (repeat / rotate), `pair_shift()` |
| `rtl/hbsg.sv` | `hbsg #(N, R)` | bit splitting generator; `bin[N-1:0]` to `streams[R][2^k]` |
| `rtl/det_expand.sv` | `det_expand #(L, R, MODE)` | deterministic expansion; `[R][L]` to `[R][L*L]` |
| `rtl/and_array.sv` | `and_array #(W)` | W AND gates |
| `rtl/par_counter.sv` | `par_counter #(W)` | ones count, `clog2(W+1)` bits |
| `rtl/shift_accumulator.sv` | `shift_accumulator #(N, R, CW)` | shift and add of the R² counts |
| `rtl/bipsmul.sv` | `bipsmul #(N, R)` | unsigned multiplier, `a, b[N-1:0]` to `p[2N-1:0]` |
| `rtl/bipsmul_signed.sv` | `bipsmul_signed #(N, R)` | sign-magnitude multiplier |
| `rtl/bipsmul_mac.sv` | `bipsmul_mac #(N, R, M)` | M-input MAC, registered output (top) |

Everything below `bipsmul_mac` is combinational. Stream and array ports are
packed arrays indexed `[stream][position]`, positions in time order (index 0
is the first bit of a stream).

## What follows the original design and what is this implementation's choice

Taken from the design description: the segment splitting, the wiring by bit
weight with the added zero, repetition of one operand and rotation of the
other, one AND array and one counter per segment pair, the shift amounts, the
sign bit with XOR, and the MAC sizes.

Choices made here, where the description is silent or only names the block:

- The SUM counter is a plain sum of all its input bits; a synthesis tool
  turns it into an adder tree. Its internal structure was not specified.
- The "accumulator" is a combinational multi-operand adder, not a register
  that accumulates over cycles, because the whole multiplier is meant to
  produce its product in one cycle.
- Rotation is by one place per copy in the direction of the 1100 -> 0110
  example; the opposite direction would be equally exact.
- The shift rule is generalised to any R as `((R-1-i)+(R-1-j))*k` from the
  R = 2 case (n, n/2, n/2, 0).
- Signed numbers are sign-magnitude with a separate sign bit.
- The MAC's lane structure, two's-complement adder tree, output register,
  `in_valid`/`out_valid`, reset and R = 2 are this implementation's choices;
  only its function and sizes were given.
- The neural network the multiplier was meant for (a 4-bit quantized
  AlexNet) is not part of this RTL: there is no data storage, dataflow
  control, pooling, ReLU or softmax hardware. The testbench
  `tb_alexnet_conv` only runs that network's dot-product sizes through the
  MAC.
- The gate-level fault-tolerance study of the original work (bit flips
  injected at every gate output) is not modelled.

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=<n> failures=<n>` and stops through a watchdog if it hangs.
Expected values are computed inside the testbenches from first principles
(integer products, bit counts, the wiring rule), never from the RTL.

| testbench | what it covers |
|---|---|
| `tb_hbsg` | every input of 4-bit/R=2 and 6-bit/R=3 generators, 8-bit/R=2: positions, added zero, ones count |
| `tb_det_expand` | both modes bit by bit; every pair of positions meets exactly once; the 3/4 x 1/2 example |
| `tb_and_array` | random and corner inputs; the 3/8 example |
| `tb_par_counter` | 16- and 256-bit counters against a reference count |
| `tb_shift_accumulator` | hand-written R = 2 formula; R = 3 recombination of exact segment products |
| `tb_bipsmul` | all operand pairs for n = 4 (R = 1, 2, 4), n = 6 (R = 2, 3), n = 8 (R = 2, 4, 8) |
| `tb_bipsmul_signed` | all signs and 4-bit magnitudes |
| `tb_bipsmul_mac` | default size (N=8, R=2, M=16), 3000 cycles with idle gaps: results, one-cycle latency (also as a concurrent assertion), hold while idle, reset, largest positive and negative sums, negative zero |
| `tb_mult_sizes` | n = 6 (R = 1, 6), n = 16 (R = 4, 8, 16), n = 32 (R = 8, 16, 32) |
| `tb_long_streams` | n = 8, R = 1: one 65536-gate AND array on 2^16-bit streams |
| `tb_mac_sizes` | MACs with 2, 4 and 8 inputs |
| `tb_alexnet_conv` | 4-bit MAC (N=4, R=2, M=16) computing one output each of a 5x5x64 and a 3x3x192 convolution and a 4096-input fully connected layer |

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Irtl -Itb rtl/bipsmul_pkg.sv \
        tb/tb_bipsmul_mac.sv --top-module tb_bipsmul_mac -Mdir obj_mac
    ./obj_mac/Vtb_bipsmul_mac

Replace `tb_bipsmul_mac` by any testbench name. The package must be read
first; other modules are found through `-Irtl`. All testbenches finish in
seconds except `tb_long_streams`, whose 65536-gate array takes about
two minutes to build. The n = 16, R = 2 configuration (four such arrays) was
not simulated; it uses the same 8-bit-segment code as n = 8, R = 1. Verilator
is a two-state simulator, so the testbenches reset or drive everything they
read.

To change the multiplier, set `N` and `R` on `bipsmul_mac` (or on `bipsmul`
directly); `N` must be a multiple of `R`. The cost grows with 2^(2N/R) per
AND array, so keep N/R small (k ≤ 4 is cheap, k = 8 is very large).
