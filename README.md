# Multilevel multiphase space vector PWM in SystemVerilog

This is a space vector pulse-width modulator (SVPWM) for multilevel inverters
with any number of phases. It is set up for a five-level, five-phase cascaded
full-bridge inverter switching at 10 kHz. Each modulation period it takes a
normalized voltage reference for every phase. From it, it produces a short
sequence of switching states and the time each one is applied. It then plays
that sequence as gate signals for the inverter's transistors.

Usually an N-level, P-phase space vector modulator has to search a space of
N^P switching states. This one does not. It reduces the whole problem to one
sort of P fractions and a few subtractions. The cost does not depend on the
number of levels. It needs no lookup tables, no trigonometry and no multiplier.

## The algorithm in brief

Voltages are measured in inverter voltage steps V_dc. The reference of phase
k, divided by V_dc, is the real number v_r[k]. One modulation period must
apply P+1 switching vectors v_s1 … v_s(P+1) (integer levels per phase) for
times t_1 … t_(P+1) (fractions of the period) so that

    sum_j t_j = 1          and          sum_j t_j · v_sj = v_r .

**Displacement.** Split the reference as v_r = v_i + v_f. Here v_i = floor(v_r)
is an integer vector and every component of v_f lies in [0, 1). Suppose a
two-level modulator finds 0/1 vectors v_dj and times t_j that synthesize v_f.
Then v_sj = v_i + v_dj synthesizes v_r with the same times. A multilevel
modulator is therefore a two-level modulator plus one adder per phase and
vector.

**Two-level modulator by sorting.** Sort the fractions in descending order,
giving v̂_1 ≥ v̂_2 ≥ … ≥ v̂_P. Then:

* The times are differences of neighbours:
  t_1 = 1 − v̂_1, t_j = v̂_(j−1) − v̂_j, t_(P+1) = v̂_P. All of them are
  non-negative because the list is sorted.
* The vectors come from an upper triangular 0/1 matrix with P rows and P+1
  columns. Row r is 1 in every column after r. The phase with the r-th
  largest fraction takes row r. Column j of the result is vector v_dj.
  Vector 1 is all zeros and vector P+1 is all ones. Each vector switches
  exactly one more phase from 0 to 1 than the one before, in order of
  decreasing fraction. So consecutive vectors are adjacent, and the number
  of switchings is minimal.

Worked example (five phases, V_dc = 20 V). Take V_r = [28.6, 22.6, −14.6,
−31.6, −5.0] V. Then:

* v_r = [1.43, 1.13, −0.73, −1.58, −0.25]
* v_i = [1, 1, −1, −2, −1]
* v_f = [0.43, 0.13, 0.27, 0.42, 0.75]
* sorted: 0.75 (phase 5), 0.43 (1), 0.42 (4), 0.27 (3), 0.13 (2)
* t = [0.25, 0.32, 0.01, 0.15, 0.14, 0.13]
* v_s1 … v_s6 = [1,1,−1,−2,−1], [1,1,−1,−2,0], [2,1,−1,−2,0],
  [2,1,−1,−1,0], [2,1,0,−1,0], [2,2,0,−1,0]

Several testbenches check the hardware against these numbers.

## Number formats

| quantity | format (defaults) | meaning |
|---|---|---|
| `vr[k]` | signed, `lvl_w(N)` = 4 integer bits + `FRAC_W` = 12 fraction bits | reference in voltage steps |
| `vi[k]`, levels | signed, 4 bits | −(N−1)/2 … (N−1)/2 = −2 … 2 |
| `vf[k]`, sorted values | unsigned, 12 bits | code / 4096, in [0, 1) |
| `t[j]` | unsigned, 13 bits | code / 4096 of the period; t_1 reaches 4096 when all fractions are 0 |

Because the reference is fixed point, floor() is simply the integer bits of a
two's complement number, and v_f is the fraction bits. `ref_decompose` first
saturates each component to [−(N−1)/2, (N−1)/2 − 2^−12]. This keeps v_i + 1
on an existing level. A reference with modulation index up to (N−1)/2 = 2
passes through unchanged.

In fixed point the modulation law holds exactly:
sum_j t_j · v_sj[k] = vr[k] for the (saturated) reference code. The
testbenches check this identity rather than a tolerance.

## Hardware structure

```
svpwm_top
├── svpwm_nl              N-level modulator, 4-stage pipeline
│   ├── ref_decompose     floor / fraction split + saturation      (stage 1)
│   ├── svpwm_2l          two-level modulator
│   │   ├── sorter        rank sort, gives sorted values and Idx    (stage 2)
│   │   ├── time_calc     [1; v̂] − [v̂; 0]                           (stage 3)
│   │   ├── sort_inverse  inverse permutation = matrix row per phase
│   │   └── row_selector  triangular matrix + row selection -> v_d
│   └── vs_adder          v_s = v_i + v_d                            (stage 4)
├── switch_sequencer      plays v_s1..v_s(P+1) for t_1..t_(P+1) each period
├── fb_trigger            level -> full-bridge cell leg commands
└── dead_time (x 2·P·(N−1)/2)   complementary gates with dead time
svpwm_pkg                 defaults, width functions, triangular matrix entry
```

### The two-level modulator (`svpwm_2l`)

No permutation matrix is ever built.

* **`sorter`** computes a rank for each phase in one combinational step. The
  rank is the number of phases whose fraction is larger, or equal with a
  lower phase index. Position r of the output then takes the phase of
  rank r. It outputs the sorted values and `idx[r]`, the phase at position
  r. Ties keep phase order. Any tie order gives the same times, and only
  zero-time vectors differ.
* **`sort_inverse`** turns `idx` into `row[k]`, the sorted position of
  phase k. This is the inverse permutation, and it is exactly the row of
  the triangular matrix that phase k takes.
* **`row_selector`** holds the triangular matrix as a constant and sets
  `vd[j][k] = (j > row[k])`.
* **`time_calc`** subtracts the vector [v̂; 0] from [1; v̂]. An assertion
  checks that the times of a sorted input sum to one period.

The sort result is registered. The times and vectors are registered at the
output. `svpwm_2l` therefore has a latency of 2 cycles and accepts one vector
per cycle. `svpwm_nl` adds one register before it (decomposition) and one
after it (adder), delays v_i to match, and has a latency of 4 cycles.

### Playing a sequence (`switch_sequencer`)

A modulation period is `PERIOD_CYCLES = CLK_HZ / FSW_HZ` clock cycles, which
is 5000 at the defaults. Times arrive as fractions of 4096. The sequencer
converts them to cycles without multiplying:

* A fractional divider adds 4096 to an accumulator every clock. Each time
  the accumulator passes `PERIOD_CYCLES`, it subtracts `PERIOD_CYCLES` and
  advances a period position `pos`. So `pos` runs 0 … 4095 exactly once per
  period, with `pos = floor(c · 4096 / PERIOD_CYCLES)` in cycle c.
* When a sequence is loaded, the running sums `end_j = t_1 + … + t_j` are
  stored.
* The vector being played is the number of `end_j` values that `pos` has
  reached. Vectors with zero time are never output.

Vector j is therefore on for exactly
`ceil(end_j · PERIOD_CYCLES / 4096) − ceil(end_(j−1) · PERIOD_CYCLES / 4096)`
cycles. The testbenches check this count exactly.

This needs `PERIOD_CYCLES ≥ 2^FRAC_W`, which holds for a 50 MHz clock up to
about 12 kHz with 12 fraction bits.

Vectors are played in the order 1 … P+1 in every period. Within a period
each phase therefore rises by at most one level, once. It returns at the
period boundary.

A new sequence goes into a shadow register. It becomes active at the next
period start, so the playback of a period is never torn.

### Inverter interface (`fb_trigger`, `dead_time`)

Each phase of a cascaded full-bridge inverter is a series string of
C = (N−1)/2 H-bridge cells, each fed by V_dc. A cell gives +V_dc with leg A
up and leg B down, −V_dc the other way round, and 0 with both legs down.

For level n > 0, cells 0 … n−1 give +V_dc. For n < 0, cells 0 … |n|−1 give
−V_dc. The remaining cells give 0.

Each leg then goes through `dead_time`. After every change of the command
both switches of the leg are off for `DEAD_CYCLES` cycles (default 50, i.e.
1 µs). Only then does the new switch turn on. A level pulse shorter than the
dead time is swallowed. The inverter then misses that switching pulse, and
the average output voltage deviates slightly from the reference.

### Top level (`svpwm_top`) and its timing

| port | dir | width (default) | |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, synchronous active-low reset |
| `vr` | in | 5 × 16 | normalized reference, sampled in the `period_start` cycle |
| `gate_a_hi/lo`, `gate_b_hi/lo` | out | 5 × 2 each | gate of upper/lower switch of leg A/B of cell c of phase k |
| `level` | out | 5 × 4 | level commanded per phase (before dead time) |
| `vec_idx` | out | 3 | switching vector being played (0 … P) |
| `period_start` | out | 1 | one-cycle pulse at the start of each period |

The timeline is:

1. In the first cycle of period n, `vr` is sampled.
2. The sequence is ready 4 cycles later.
3. It is played during period n+1.
4. The gates follow `level` by one cycle, plus the dead time on turn-on.

The first period begins in the first cycle after reset. During it every
phase is at level 0, and the gates are all off for the first `DEAD_CYCLES`
cycles.

## Parameters

| parameter | default | where the value comes from |
|---|---|---|
| `P` (phases) | 5 | the five-phase prototype |
| `N` (levels) | 5 | the five-level prototype; must be odd for `fb_trigger` |
| `FRAC_W` | 12 | design choice (time resolution T/4096) |
| `CLK_HZ` | 50 000 000 | design choice (a common FPGA board clock) |
| `FSW_HZ` | 10 000 | the prototype's switching frequency |
| `DEAD_CYCLES` | 50 | design choice (1 µs) |

The modulator core (`svpwm_nl`, `svpwm_2l` and their parts) works for any P
and N. The sorter grows as P². Nothing in the core grows with N except the
level width. The sequencer and cell mapping assume a symmetric level range
and an odd N.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=… failures=…` and has a watchdog.

| testbench | what it checks |
|---|---|
| `ref_decompose_tb` | worked example; random and out-of-range references against floor() in real arithmetic |
| `sorter_tb` | worked example; random vectors with many ties: order, permutation, tie order |
| `sort_inverse_tb`, `row_selector_tb` | all 120 permutations of five phases; the worked example's coefficient matrix |
| `time_calc_tb`, `vs_adder_tb` | worked example; random inputs against direct formulas |
| `svpwm_2l_tb`, `svpwm_nl_tb` | worked example vectors and times; streamed random inputs: exact modulation law, adjacency, level range, latency 2 / 4 |
| `svpwm_nl_generic_tb` | the modulator at (P, N) = (3, 3), (7, 9) and (6, 7 with 10 fraction bits): the same exact law; helper `svpwm_nl_law_check` |
| `switch_sequencer_tb` | 60 periods of random sequences (many zero times): exact cycle count per vector, order, `period_start` spacing |
| `fb_trigger_tb` | all levels for 5 and 7 levels: cell outputs add up to the level, no shorted leg |
| `dead_time_tb` | cycle-exact comparison with a reference model, gap length, absorbed pulses |
| `svpwm_top_tb` | default parameters, see below |
| `svpwm_top_2khz_tb` | 2 kHz switching, 80 periods of an unbalanced reference with a fifth harmonic |

`svpwm_top_tb` runs the whole design at its default parameters. It plays the
worked example and one 50 Hz cycle (200 periods) of a balanced five-phase
sine for each of four settings of the fundamental m1 and third-harmonic m3
amplitude: (1.8, 0), (1.8, 0.3), (0.8, 0) and (0.8, 0.13). It ends with a few
over-range periods. A shared monitor, `svpwm_top_checker`, checks every
period and phase:

* the exact volt-second balance of the commanded levels;
* that levels rise at most one step at a time within a period;
* that no leg shoots through;
* that the voltage rebuilt from the gate signals differs from the
  commanded one only within the dead-time allowance.

It also requires that each of the following occurred at least once:
saturation, zero-time vectors, pulses shorter than the dead time,
five-level operation at m1 = 1.8 and three-level-only operation at
m1 = 0.8. The run takes a few seconds.

To run one testbench with plain Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/svpwm_pkg.sv tb/svpwm_top_tb.sv --top-module svpwm_top_tb -o sim
./obj_dir/sim
```

Replace the testbench name for the others. The package file must come
first. `svpwm_top_checker.sv` is a helper used by the two top-level benches.

## Where this design makes its own choices

The algorithm, the split into blocks and the five-level five-phase
configuration follow the published method and its FPGA prototype. The
following are this implementation's own choices:

* **Fixed point.** The formats above. The algorithm is stated for real
  numbers.
* **Saturation.** The reference is saturated to the inverter range.
* **Sorting method.** A single-cycle rank sort.
* **Pipelining.** Registers as described, 4-cycle modulator latency.
* **Clock and time conversion.** A 50 MHz clock and the
  accumulator-based conversion of times to cycles.
* **Reference transfer.** `vr` is a parallel input sampled once per
  period, with one period of latency.
* **Sequence order.** The same vector order in every period, with no
  mirrored order in alternate periods.
* **Cell assignment.** Fixed cell priority: cell 0 is used first, with no
  rotation between cells to balance their use.
* **Dead time.** The value and mechanism.

## Limits

* Normalizing the voltage reference (dividing by V_dc) is left to whatever
  supplies `vr`.
* The power stage, dc sources and load are outside the RTL. The top-level
  testbench only rebuilds phase voltages from the gates.
* Analog results such as THD or load current waveforms cannot be reproduced
  by this RTL alone.
* The design has been simulated, not run on an FPGA. Synthesis with a
  generic flow gives about 1,060 flip-flop bits and 800 word-level cells at
  the defaults. How that maps to the LUTs of a particular small FPGA was
  not measured.
