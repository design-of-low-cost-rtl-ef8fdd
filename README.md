# Shared-LFSR stochastic number generator (8-bit, weighted binary generator)

In stochastic computing a number p in [0, 1] is carried as a bit stream in
which each bit is 1 with probability p. Arithmetic then becomes very cheap
(an AND gate multiplies two independent streams), but every binary operand has
to be turned into such a stream first by a **stochastic number generator
(SNG)**, and the SNGs tend to dominate the cost of a stochastic circuit.

This design is a low-cost SNG for 8-bit words. One 8-bit linear feedback
shift register (LFSR) produces eight random bits per clock, and **two**
weighted binary generators (WBGs) use those same bits to convert two binary
words X and Y into two streams, `out1` and `out2`. The WBG replaces the usual
magnitude comparator of an SNG by a priority decode and an AND-OR network.
Over any 255 consecutive clocks `out1` holds exactly X ones and `out2` exactly
Y ones, so the streams encode X/256 and Y/256 (to within one part in 256,
see below).

The design was published as a transistor-level comparison of a static CMOS
and a true single-phase clock (TSPC) realisation in a 45 nm process. Both
realise the same logic, which is what this RTL describes.

```
            +-----------+   L8..L1    +-------+
  clk ----->|  8-bit    |--------+--->| WBG 1 |---> out1   (X/256)
  seed ---->|  LFSR     |        |    +-------+
            +-----------+        |        ^ x[7:0]
                                 |    +-------+
                                 +--->| WBG 2 |---> out2   (Y/256)
                                      +-------+
                                          ^ y[7:0]
```

## The random source: an 8-bit LFSR

Eight D flip-flops DFF8..DFF1 hold the bits L8..L1 (`lfsr_q[7]` is L8). Each
clock the register shifts one place towards L1 and the new L8 is

    L8' = L5 ^ L4 ^ L3 ^ L1

This is the primitive polynomial x^8 + x^4 + x^3 + x^2 + 1, so from any
non-zero seed the register visits all 255 non-zero states and then repeats.
The all-zero state maps onto itself and must never be loaded.

The tap positions follow the published schematic. The shift direction
(towards L1, feedback into L8), the reset and the seed port are choices of
this design. The published design only says that the LFSR must be
initialised ("seeded") before use.

## The weighted binary generator

This is the part that needs some explanation. The WBG has two levels.

**First level (`sng_wbg_weights`).** From L8..L1 it forms eight weights:

    W8 = L8
    W7 = !L8 & L7
    W6 = !L8 & !L7 & L6
    ...
    W1 = !L8 & !L7 & ... & !L2 & L1

At most one W is 1: the one at the highest set bit of L. If the L bits are
unbiased and independent, P(W8) = 1/2, P(W7) = 1/4, ..., P(W1) = 1/256.

**Second level (`sng_wbg`).** Each W_i is ANDed with target bit x_i, and the
eight products are ORed (a tree of seven 2-input ORs in the original circuit):

    out = (W8 & x8) | (W7 & x7) | ... | (W1 & x1)

Since the W's are mutually exclusive, the probabilities add:

    P(out) = x8/2 + x7/4 + ... + x1/256 = X / 256

**Exact count over a period.** Over one LFSR period, L takes each of the 255
non-zero values exactly once. The number of non-zero 8-bit values whose
highest set bit is bit i is 2^(i-1), so W_i is 1 in exactly 2^(i-1) of the 255
cycles and `out` is 1 in exactly X of them. The all-zero value is the one
missing from the 256, and it would have given 0 anyway. So the ratio is
X/255 over a period, not X/256. The value 255 itself gives 255 ones, a stream
of all 1s. For example, X = 4 (`00000100`) gives 4 ones per period: the cycles
where L = 0000_01xx.

This exact count holds for any window of 255 consecutive cycles, whatever the
seed. Shorter windows give only an approximation.

## Sharing the LFSR between two WBGs

Both WBGs see the same L every cycle, so both pick the target bit at the same
position. The two streams therefore are **not independent**. Over a period
they are 1 together in exactly `X & Y` cycles (the bitwise AND of the two
words, read as a number), where independent streams would overlap in about
X*Y/255. They are identical when X = Y, and disjoint when X and Y share no set
bit. Each stream on its own has the correct probability. A circuit that
multiplies the two streams with an AND gate gets `X & Y` instead of X*Y/255.
It needs a second random source, or a permuted copy of the LFSR bits, for
operands that must be independent.

## Interface and timing (`sng_top`)

| port        | dir | width | meaning |
|-------------|-----|-------|---------|
| `clk`       | in  | 1     | rising-edge clock; one stochastic bit per cycle |
| `rst_n`     | in  | 1     | asynchronous active-low reset; loads `SEED` (default `8'h01`) |
| `seed_load` | in  | 1     | load `seed` into the LFSR at the next edge (takes priority over shifting) |
| `seed`      | in  | 8     | seed value; must be non-zero |
| `x`, `y`    | in  | 8     | target words; bit 7 is the most significant (x8) |
| `out1`      | out | 1     | stochastic stream for `x` |
| `out2`      | out | 1     | stochastic stream for `y` |
| `lfsr_q`    | out | 8     | shared random bits L8..L1, for observation |

Parameters: `K` (precision, 8), `TAPS` (feedback mask over L8..L1,
`8'b0001_1101`), `SEED` (reset value). `out1`/`out2` are combinational from the
LFSR flip-flops and from `x`/`y`. A change of `x` shows in the same cycle.
There is no pipeline register, so the critical path is one flip-flop, the
eight-level priority chain and the OR tree. If you change `K`, give matching
primitive taps. The exact-count property needs a maximal-length LFSR.

## Files

| file | contents |
|------|----------|
| `rtl/sng_pkg.sv` | precision, default taps, default seed |
| `rtl/sng_dff.sv` | D flip-flop with asynchronous reset value |
| `rtl/sng_lfsr.sv` | 8-bit Fibonacci LFSR built from eight `sng_dff` |
| `rtl/sng_wbg_weights.sv` | WBG first level: L -> W priority decode |
| `rtl/sng_wbg.sv` | complete WBG: weights, AND with targets, OR |
| `rtl/sng_top.sv` | shared LFSR and two WBGs |
| `tb/tb_*.sv` | one self-checking testbench per module |

The testbenches compare against models written independently in the
testbench. `tb_sng_wbg` tries all 65536 (L, X) pairs and checks that each X
gives exactly X ones over the 255 non-zero L values. `tb_sng_lfsr` checks the
255-cycle period and the bit balance. `tb_sng_top` runs at the default size.
It checks the X = 4 example, random X/Y after random seed loads, X = Y, and
X = 0 / 255, comparing every cycle against the model. It also counts that seed
loads, period wraps and coincident ones really happened.

Simulating one testbench with Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
    rtl/sng_pkg.sv tb/tb_sng_top.sv --top-module tb_sng_top
./obj_dir/Vtb_sng_top
```

Each testbench ends with a line `TB_RESULT checks=N failures=M`.

## Where this RTL departs from or goes beyond the published design

- **Circuit style.** The original is a transistor-level design, in both CMOS
  and TSPC logic. Its figures of merit, 640 vs 736 transistors,
  38.85 vs 35.95 um^2, 8.7 vs 15.1 mW and 1.3 vs 2 GHz, belong to those
  circuits and are not reproduced by RTL. TSPC logic is often pipelined
  gate by gate. The published TSPC WBG does not show which gates are
  clocked, so this RTL keeps the WBG combinational, as in the CMOS version.
- **First-level gates.** The original builds each W_i from its own small AND
  tree (eight separate blocks). Here the W's share one "all higher bits are
  zero" chain. The function is the same, with fewer gates.
- **Stream length.** The original describes the output as X ones in 256
  bits. With a 255-state LFSR the exact statement is X ones in every 255
  cycles, which is what the testbenches check.
- **Reset and seeding.** The asynchronous reset, the default seed 0x01 and
  the synchronous `seed_load` port are additions. Loading seed 0 locks the
  LFSR at zero and is not guarded against.
- **Shift direction.** The direction of the LFSR shift is inferred from the
  feedback entering the L8 flip-flop. Its 255-cycle period confirms the
  reading.
- The conventional comparator-based SNG, which the WBG replaces, is not
  included.
