# Signature-analyzer pattern generator with a slow-clock input

A conventional LFSR used as a built-in self-test pattern generator repeats
after at most 2^n − 1 clocks and can never produce the all-zeros pattern. This
design takes an LFSR *signature analyzer* (an LFSR with a serial data input
XORed into its feedback) and feeds that input, D(X), with a square wave that
runs r times slower than the register clock. The wave keeps disturbing the
feedback, so the register walks through the same set of states in a longer
order. With the 3-stage polynomial X³ + X² + 1:

* the pattern sequence is 7·r patterns long when r is not a multiple of 7
  (14 for r = 2, 70 for r = 10);
* it is 14 long for r = 7, 14 for r = 14 and 28 for r = 28;
* the register enters the all-zeros state and leaves it again by itself.

The price is that each pattern appears more than once per period. A few seeds
are also caught in short loops, described under "Trivial cycles" below.

## Structure

```
            +----------------------------- sa_tpg_top -------------------------+
 ratio ---->| dx_clock_gen --dx--+                                              |
 load  ---->|  (mod-r counter)   |    lfsr_sig_analyzer                         |
 en    ---->|                    +--> (+)--> Q[N-1] -> ... -> Q[1] -> Q[0] --+--|--> qx
 seed  ---->|                          ^       |              |       |    |  |
            |                          +--- XOR of TAPS[i] & Q[i] <----------+  |
            |                                  +--------------+-------+-------|--> pattern
            +-------------------------------------------------------------------+
```

| File | Contents |
|---|---|
| `rtl/sa_tpg_pkg.sv` | default size, polynomial, seed and ratio width |
| `rtl/lfsr_sig_analyzer.sv` | the N-stage signature analyzer |
| `rtl/dx_clock_gen.sv` | the divided D(X) wave |
| `rtl/sa_tpg_top.sv` | the two joined into the pattern generator |
| `tb/tb_*.sv` | one self-checking testbench per module |

## The signature analyzer

`lfsr_sig_analyzer` is a standard LFSR: the feedback is computed outside the
chain, and the register shifts from Q[N−1] towards Q[0]. On each enabled
clock the new Q[N−1] is

    Q[N-1]' = D(X) xor ( xor over i of TAPS[i] & Q[i] )

and every other stage takes the value of its left neighbour. `TAPS[i]` is the
coefficient of X^i in the characteristic polynomial (the X^N term is implied),
so X³ + X² + 1 is `TAPS = 3'b101` and the feedback is Q2 ⊕ Q0 ⊕ D(X). Q[0] is
also the serial output Q(X). All stages are brought out in parallel as the test
pattern.

With D(X) = 0 and seed 100, the register steps through
100, 110, 111, 011, 101, 010, 001 and then repeats.

## The D(X) wave

`dx_clock_gen` counts register clocks modulo r. For the first ⌊r/2⌋ clocks of
each period, dx is 0. For the remaining ⌈r/2⌉ clocks it is 1. When r is odd,
the extra clock goes to the high half. The output comes straight from a
flip-flop, so the LFSR samples a clean synchronous signal rather than a second
clock.

The phase matters as much as the ratio. After reset, and after every seed load,
the wave starts at the beginning of its low half. With that phase, the r = 2
run from seed 100 gives this 14-pattern sequence:

    100 110 011 101 110 111 111 011 001 100 010 001 000 000 | 100 ...

A different phase would give a different sequence and can land in a trivial
cycle. A ratio of 0 or 1 holds dx at 0, and the block is then a plain
maximum-length LFSR.

## Why the sequences get longer

Write the state update as s' = A·s ⊕ b·d. For a primitive polynomial,
A^(2^n−1) = I. Over one full period of the wave, the input adds a fixed offset
c to the state.

* **r not a multiple of 7.** The joint period of the register and the wave is
  lcm(7, r) = 7r.
* **r a multiple of 7.** The register's own cycle fits the wave exactly.
  * If c ≠ 0, a second wave period is needed to cancel it. This gives 14 for
    r = 7 and 42 for r = 21.
  * If c = 0, the length is r. This holds for r = 14 and 28, because a
    balanced wave of length 2·7·k adds every power of A once, and those sum to
    zero.

Sequence lengths measured on the RTL (the longest over all 8 seeds):

| r | 0/1 (conventional) | 2 | 3 | 4 | 5 | 6 | 7 | 8 | 10 | 14 | 21 | 28 |
|---|---|---|---|---|---|---|---|---|---|---|---|---|
| length | 7 | 14 | 21 | 28 | 35 | 42 | 14 | 56 | 70 | 14 | **42** | 28 |

An earlier published sweep gives 21 for r = 21 and states that multiples of 7
give length r. A wave sampled on register clock edges cannot produce that for
odd r: with 10 low and 11 high clocks, the offset c is not zero. Every other
entry agrees.

## Trivial cycles

For each ratio, some (seed, phase) pairs close on themselves after only a few
states. These cycles were found with the starting phase described above:

| r | seed | cycle |
|---|---|---|
| 2 | 101 | 101 → 010 → 101 |
| 3 | 011 | 011 → 101 → 110 → 011 |
| 4 | 001 | 001 → 100 → 110 → 011 → 001 |
| 6 | 100 | a 6-state cycle |

With X³ + X² + 1 and this phase, exactly one of the 8 seeds is trivial for each
of r = 2, 3, 4, 5, 6, 8 and 10. No seed is trivial for r = 7, 14, 21 or 28.
Choose the seed with the ratio in mind. The default seed 100 is safe for every
ratio above except r = 6.

## Interface and timing (`sa_tpg_top`)

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk` | in | 1 | register clock; everything changes on its rising edge |
| `rst_n` | in | 1 | asynchronous, active low; the register is set to `RESET_SEED` and the wave to the start of its low half |
| `en` | in | 1 | advances the register and the wave by one clock; when low, both hold |
| `load` | in | 1 | synchronous, and wins over `en`; loads `seed` and restarts the wave |
| `seed` | in | N | state loaded, written Q[N−1]..Q[0] |
| `ratio` | in | RATIO_W | r; values 0 and 1 select the conventional LFSR |
| `pattern` | out | N | test pattern, Q[N−1]..Q[0] |
| `qx` | out | 1 | serial output, Q[0] |
| `dx` | out | 1 | the D(X) value that will be sampled at the next rising edge |

The block produces one pattern per enabled clock, with no latency beyond the
register itself. After `load` the seed is visible at once. The first shift
then uses dx = 0.

| Parameter | Default | |
|---|---|---|
| `N` | 3 | number of stages |
| `TAPS` | `3'b101` | X³ + X² + 1 |
| `RESET_SEED` | `3'b100` | |
| `RATIO_W` | 5 | ratios up to 31 |

## What is given and what is chosen

The following are given by the architecture this design implements:

* the analyzer structure;
* the polynomial, the seed 100 and the 3-stage example;
* the use of a symmetric D(X) clock at f_reg/r.

The following are this design's own choices:

* generating D(X) on chip with a counter instead of a separate clock pin;
* the starting phase of the wave and the ⌊r/2⌋ / ⌈r/2⌉ split for odd r;
* the r < 2 conventional mode;
* the load and enable inputs, and the reset values.

The phase and the split were chosen because they reproduce the published
r = 2 sequence and the published trivial cycles for r = 3 and r = 4.

The design does not include asymmetric D(X) waves, non-primitive polynomials,
automatic detection of trivial seeds or a response-compaction wrapper. The
analyzer itself accepts any D(X) stream, so it can be used as a signature
register by driving `dx` directly.

## Verification

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself with a
watchdog.

* `tb_lfsr_sig_analyzer` checks the reset seed and the conventional sequence.
  It checks the r = 2 sequence with an alternating input, and all 16
  transitions of the 3-stage state graph. It also checks the 101/010 trap, load
  priority and hold, and a 200-bit random-stream signature against a bit-level
  model. A 4-stage X⁴ + X³ + 1 instance must visit all 15 non-zero states.
* `tb_dx_clock_gen` compares the wave clock by clock, for three periods, for
  every ratio from 0 to 31. It also checks the count of high clocks, hold and
  restart.
* `tb_sa_tpg_top` runs at the default parameters and covers these cases:
  * conventional mode;
  * the 28-row r = 2 sequence;
  * the full ratio sweep for all 8 seeds, against a reference model in the
    testbench and the table above;
  * the three trivial cycles;
  * hold and resume.

  It counts that each mechanism happened at least once: conventional mode,
  extended sequences, entering and leaving all-zeros, trivial cycles and hold.

## Running

```
verilator --binary --timing --assert -Wall \
  rtl/sa_tpg_pkg.sv rtl/dx_clock_gen.sv rtl/lfsr_sig_analyzer.sv rtl/sa_tpg_top.sv \
  tb/tb_sa_tpg_top.sv --top-module tb_sa_tpg_top
./obj_dir/Vtb_sa_tpg_top
```

To run the other testbenches, replace the testbench file and the top module.
The package file must come first.

To use a different polynomial, set `N`, `TAPS` (bit i = coefficient of X^i)
and `RESET_SEED`. The sequence lengths in the table above hold only for
X³ + X² + 1. The testbenches' expected values are written for the default
size, except the 4-stage check.
