# Swarm-tuned adaptive noise filter (OABC + LMS) in SystemVerilog

MRI receive chains pick up noise whose bandwidth changes from slice to slice:
gradient switching, eddy currents, RF pickup and patient motion all leave
their mark. An adaptive FIR filter can track such noise, but how fast and how
stably it converges depends on its step size. This design pairs an
LMS adaptive filter with a hardware swarm optimizer. The optimizer is an
*opposition-based artificial bee colony* (OABC) with several bees working in
parallel, and it sets the filter's step size.

The RTL is a synthesizable rendering of the OABC architecture and the
shared-multiplier LMS processing element from the publication *Hybrid Swarm
Intelligence for FPGA-Based Noise Mitigation in Gradient-Sensitive MRI
Systems*. The publication describes these blocks mostly as block diagrams and
schematics, without sizes, encodings or timing. Every width, handshake and
sequencing detail that it leaves open has been filled in here, and the
sections below mark which parts follow the publication and which are this
design's choices.

```
                 +----------------------------- oabc_core ------------------------------+
 opt_start ----> | oabc_fsm: INIT -> (EMPLOY -> GLOBAL -> PROB -> ONLOOK -> SCOUT) x MAX_ITER |
 seed, l_max --> |           -> FINAL -> DONE                                           |
                 |  lane 0..S-1: lfsr16 x2 -> k, j, phi -> bee_update -> fitness_f1/f2   |
                 |               -> bee_individual (position, fitness, trial counter)    |
                 |  global_detect (f_min, f_max, best index)                            |
                 |  probability_unit (p(i) = f_i / f_max by Newton-Raphson; onlookers)  |
                 +----------------------------------------------- best_x, best_f -------+
                                                                        |
                                                    mu = {best_x[0], 8'h00} on done
                                                                        v
 x_in, d_in ---> adaptive_fir: delay line -> N/L x lms_pe -> adder tree -> y, e = d - y
                               mu*e (1 multiplier) -> lms_pe update phase -> w += ...
```

## The bee colony optimizer (`oabc_core`)

### What is being optimised

A *food source* is a point of four unsigned 8-bit coordinates in
`[0, l_max]`. Its cost is one of two fitness functions, chosen per instance by
`FIT_FUNC`. Both are built exactly as the publication draws them:

| function | module | datapath | result |
|---|---|---|---|
| f1 = x1² + x2² + x3² + x4² | `fitness_f1` | four 16×16 squarers, three chained 32-bit adders | 32 bit |
| f2 = (x1 + x2 + x3 + x4)² | `fitness_f2` | three chained 16-bit adders (they wrap), one squarer | 32 bit |

Lower cost is better. The global stage reports `f_min`, and a candidate
replaces its source when `f_new <= f_old`.

### One bee lane

There are `S` lanes (default 4), one per food source, and they all work in
the same clock cycle. Each lane has:

* **Two 16-bit LFSRs** (`lfsr16`, polynomial x¹⁶+x¹⁴+x¹³+x¹¹+1). They are
  seeded from the common `seed` while reset is held, each with a different
  constant mixed in. `rnd_a` supplies the move parameters: `phi = rnd_a[7:0]`,
  `j = rnd_a[9:8]` (the coordinate) and `k = rnd_a[11:10]` (the neighbour; if
  that is the lane itself, `i+1` is used). `rnd_b` supplies the onlooker
  random number, and together with `rnd_a` the 32 bits of a random start
  point.
* **The move unit** (`bee_update`) computes `v = x_ij + phi·(x_ij − x_kj)` in
  the four stages of the publication's update unit: *distance* (a 9-bit
  adder with the complement of `x_kj` and a carry-in), *mutate* (8×8
  multiplier), *add* (16-bit adder) and *comparator* (`v <= l_max` selects
  `v`, otherwise `l_max`). The arithmetic is 8.8 fixed point. The distance
  is used as a signed 8-bit number, `phi` is a fraction in [0, 1), and
  `x_ij` enters the adder as `{x_ij, 8'h00}`. The new coordinate is the
  integer part of the result. A move that would go below zero wraps to a
  large value and so is replaced by `l_max`. The limit passed to the unit
  is `{l_max, 8'hFF}`, so every accepted coordinate stays within `l_max`.
* **A fitness unit** evaluates the candidate point: the current point with
  coordinate `j` replaced.
* **A register-bank entry** (`bee_individual`) holds the point, its fitness
  and a trial counter `tr`. A *try* keeps the candidate when
  `f_cand <= f` and clears `tr`. Otherwise it keeps the old point and
  increments `tr`, saturating. A *load* writes unconditionally.

The same lane hardware is reused in every phase. Only the multiplexer in
front of the fitness unit changes: random point, moved point or opposite
point.

### The phases of one iteration

| state | cycles | what happens |
|---|---|---|
| `ST_EMPLOY` | 1 | every lane tries one move on its own source |
| `ST_GLOBAL` | S + 1 | `global_detect` scans the S fitness values one per clock, keeping min (`<=`, ties to the later bee) and max (`>=`) |
| `ST_PROB` | NR_ITERS + S + 2 | `probability_unit` forms p(i) = f_i / f_max and sets onlooker(i) = p(i) <= rnd_b(i) |
| `ST_ONLOOK` | 1 | lanes with onlooker(i) set try one more move |
| `ST_SCOUT` | 1 | **opposition step:** every lane with `tr >= MAX_TR` inverts the most significant bit of each coordinate (limited to `l_max`) and loads that point unconditionally |

A run is `ST_INIT` (1 cycle, random start points), then `MAX_ITER`
iterations, then `ST_FINAL`, which is one more global scan. From the
`start` pulse to `done` it takes exactly `2 + MAX_ITER·(2S + NR_ITERS + 6) + S`
cycles (550 at the defaults). After every global scan the best point of the
run so far is kept in `best_x`/`best_f`.

Because the cost is minimised, a *small* p(i) marks a *good* source. The
comparison `p(i) <= random` therefore sends onlookers mostly to good sources.
Flipping the top bit moves a coordinate x to roughly x ± 128, about the
opposite end of the 8-bit range. This replaces the random restart of a
classical scout bee.

### Division by Newton–Raphson

`probability_unit` never divides directly. It normalises `f_max` by its
leading-zero count to `d ∈ [0.5, 1)` and starts from `y0 = 48/17 − 32/17·d`
(Q2.16). It then runs `NR_ITERS` (3) iterations of `y ← y·(2 − d·y)`, one per
clock. Each bee then needs one multiply, `p(i) = ((f_i << lz)·y) >> 32`,
saturated to 16 bits. The result is within 2 LSB of
`floor(f_i·2¹⁶ / f_max)` over the randomised test (the test allows 4). If
`f_max = 0`, all p(i) are 0.

## The adaptive filter (`adaptive_fir`, `lms_pe`)

An N-tap (default 8) LMS filter in Q1.15:

```
y  = sat16( Σ w[n]·x(n) >>> 15 )
e  = sat16( d − y )
em = (e · mu) >>> 16                  mu: unsigned Q0.16
w[n] ← sat16( w[n] + (em · x(n) >>> 15) )
```

The taps are split into N/L processing elements of L = 4 taps each. In every
`lms_pe`, each of the L multipliers has a MUX in front, which selects the
weight or the scaled error. Behind it a DMUX sends the product either to the
PE's adder tree (filter phase) or out as a weight increment (update phase).
The same N multipliers therefore serve both halves of the LMS step. Together
with the single `mu·e` multiplier that makes N + 1. The PE sums and a second
tree add up to log₂N adder levels.

**Timing:** a sample is accepted when `in_valid && in_ready`. The next cycle
is the filter phase. In the cycle after that `out_valid` is high with `y` and
`e`, and the weights are written at its end. One sample is taken every 3
cycles, with a latency of 2. Shifts truncate toward −∞. Every result is
saturated.

## How the two halves are coupled

`mri_noise_filter_top` runs both at once. The step size `mu` resets to
`MU_INIT` (0x2000 = 0.125). On the rising edge of `opt_done` it is loaded
with `{best_x[0], 8'h00}`, and `mu_loads` counts these loads. The filter keeps
processing samples throughout and picks up the new step size with the next
sample.

The publication says that the swarm sets the step size. It does not say how
an optimum becomes a step size, and its fitness functions are benchmark
functions of the coordinates, not filter-error measures. The mapping used
here is therefore a placeholder. With f1 or f2 the optimum is at the origin,
so the loaded step size tends to be small: the end-to-end test sees 0x0300
and 0x0700. A fitness unit that measures filter error would plug in beside
`fitness_f1`/`fitness_f2` with the same ports. As a result, `mu[7:0]` is
always zero.

## Files

| file | contents |
|---|---|
| `rtl/oabc_pkg.sv` | FSM state type, fitness widths, fitness selectors |
| `rtl/lfsr16.sv` | random number generator |
| `rtl/bee_update.sv` | move unit (distance, mutate, add, l_max comparator) |
| `rtl/fitness_f1.sv`, `rtl/fitness_f2.sv` | fitness functions |
| `rtl/bee_individual.sv` | register-bank entry with greedy selection and trial counter |
| `rtl/global_detect.sv` | sequential min/max scan |
| `rtl/probability_unit.sv` | Newton–Raphson division and onlooker selection |
| `rtl/oabc_fsm.sv` | phase sequencer |
| `rtl/oabc_core.sv` | the S-lane optimizer |
| `rtl/lms_pe.sv` | shared-multiplier processing element |
| `rtl/adaptive_fir.sv` | N-tap LMS filter |
| `rtl/mri_noise_filter_top.sv` | top level |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/fir_ref_pkg.sv` | bit-accurate integer model of one LMS step, shared by two testbenches |

Top-level parameters: `S` (lanes, 4), `XW` (coordinate width, 8), `MAX_ITER`
(32), `MAX_TR` (trial limit, 8), `FIT_FUNC` (1 = f1, 2 = f2), `N` (taps, 8),
`L` (taps per PE, 4), `DW` (data width, 16) and `MU_INIT`. `XW` is tied to
the random-bit layout: `XW + log2(4) + log2(S)` must not exceed 16, and
`4·XW` must not exceed 32. Assertions at the start of simulation check both.

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<m>` and stops itself,
with a watchdog. With Verilator 5:

```sh
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/oabc_pkg.sv tb/fir_ref_pkg.sv tb/tb_mri_noise_filter_top.sv \
    --top-module tb_mri_noise_filter_top -Mdir obj -o sim
./obj/sim
```

Replace the testbench name to run another one. The simulator has two states,
so every register that is read has a reset.

What the testbenches establish:

* `tb_mri_noise_filter_top` runs with all parameters at their defaults. It
  streams about 1,200 samples through the filter, checking y, e and all
  weights after every sample against the integer model. Two optimisation
  runs overlap the stream. For each run it checks the exact run length,
  `best_f = f1(best_x)`, `best_x <= l_max` and the step-size load. It
  requires every mechanism to occur: accept, reject, clamp, onlooker move,
  opposition, global scan, probability scan and step-size load. The filter
  must run with both step sizes, and its error energy must fall.
* `tb_oabc_core` rebuilds every lane's candidate from the lane's random word,
  every cycle. It checks each accept or reject decision, the trial counters,
  the opposition step, the invariant `stored fitness = f(stored point)` and
  the run length, for an f1 and an f2 instance. In 24 iterations f1 drops
  from 66434 to 7495, for example.
* The remaining testbenches compare their module against independent
  integer arithmetic. Among them: the full 65535-step LFSR period, the
  probability error bound, the FSM state order and the filter
  learning a known 8-tap channel (error energy down more than 500×).

## Where this departs from, or goes beyond, the publication

* **Widths.** 8-bit coordinates come from the detailed update schematic.
  The overview diagram writes the opposition step as inverting bit 31 of
  each position, which implies 32-bit positions. The 8-bit width was kept,
  and the step inverts bit `XW−1`.
* **Fixed-point reading of the move.** The update schematic shows a constant
  zero byte joined to `x_ij` on the 16-bit adder, but not on which side.
  Placing it as the low byte, with a signed distance and a fractional `phi`,
  is this design's reading. It gives the usual ABC move. With the zero byte
  as the high byte and an integer `phi`, nearly every move left the search
  range.
* **Out-of-range replacement.** The block diagram of the update unit feeds
  `l_max` to the output multiplexer. The synthesized schematic shows a
  random number there. `l_max` is used.
* **Opposition step** is also limited to `l_max`, and it fires at
  `tr >= MAX_TR` rather than `tr == MAX_TR`, because a counter can pass the
  limit in the onlooker phase.
* **Memories.** The initial-position "RAM", the register bank and the
  "inbuilt latch" for results are all edge-triggered registers.
* **Sizes and encodings the publication does not give:** S, MAX_ITER,
  MAX_TR, N, L, the Q formats, the saturation, the Newton–Raphson start
  value and iteration count, the LFSR polynomial, the random-bit layout,
  the FSM encoding, all handshakes and the step-size mapping.
* **Clock.** The publication quotes a 500–800 Hz clock for the error
  computation. The RTL is fully synchronous with one clock and places no
  limit on its frequency.

## Not included

* The publication's third benchmark fitness function (37-bit result). No
  formula for it is given, so it is not built.
* The "ant" half of the hybrid ant/bee algorithm. No ant-colony hardware
  (pheromone memory or update) is described beyond the name. Only the bee
  colony with opposition is built.
* The buffer stages for drive strength, which are electrical rather than
  logical. Also the target FPGA and the analog MRI acquisition chain: the
  top takes digitised samples.
* The FPGA resource, delay and power figures are not reproduced. At the
  defaults, generic synthesis gives about 1,900 word-level cells and
  970 flip-flops for the whole design. Most of the logic is in the
  Newton–Raphson divider and the S lanes.
