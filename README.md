# Digital interface for heterodyne laser interferometer signals

A heterodyne laser head emits two optical frequencies. Two periodic signals
reach the electronics. The **reference signal** (a few MHz, here 4 MHz) is the
beat of the two frequencies taken straight at the laser. The **measurement
signal** is the same beat after one beam has travelled to the target mirror
and back. While the mirror moves, the measurement signal is shifted by the
Doppler frequency. Each period it gains or loses a little phase against the
reference. That phase difference, summed over all periods, is the
displacement. With a plain `λ/2` interferometer, one reference period of phase
is `λ` (632 nm for He-Ne).

The resolution depends on how finely one period can be timed. Counting a
256 MHz clock on a 4 MHz signal resolves 1/64 of a period (`λ/64`). This
design gets a further factor of 8, to 1/512 of a period (`λ/512`, about
1.2 nm), without a faster clock. It uses **eight copies of the same clock,
45° apart**, which one analog part, a multi-phase PLL, delivers:

* eight counters, one per phase, count the same measurement period;
* an **octonary (eight-phase) interpolator** samples the eight clocks at the
  measurement edge to find where inside a clock period the edge fell;
* a **minimum sorter** combines the eight counts into one integral part that
  stays right even when one counter miscounts near the edge.

All of it is plain synchronous logic apart from the PLL, so it fits a small
FPGA or a standard-cell ASIC.

## Units

Everything is counted in **phase steps**. A phase step is 1/8 of a fast-clock
period. With a 4 MHz reference and 256 MHz clocks (×64), one reference period
is `64 × 8 = 512` steps. A measured period `P` is reported as

    P = (integral + 2) * 8 + fraction        [phase steps]

and each period produces

    count_sub   = P - 512            velocity: phase gained this period, in λ/512
    total_count = Σ count_sub        displacement since the last total reset, in λ/512

For example, a period of `511/512` of the reference gives integral `0x3D`,
fraction 7 and count_sub −1. The whole sweep 511, 502, …, 448 gives
`0x3D.7, 0x3C.6, …, 0x36.0`.

## How one period is measured

### The counters and their dead cycles (`int_counter`)

Each phase clock has its own counter. The measurement signal enters that
clock's domain through a two-flop synchroniser and an edge detector. After
each rising edge a small control unit takes three steps, one clock each:

| state | strobe         | action                                       |
|-------|----------------|----------------------------------------------|
| S1    | `reg_transfer` | counter value → `count_reg`                  |
| S2    | `cnt_reset`    | counter cleared                              |
| S3    | `sel_ctrl`     | counting resumes; phase locations shift      |
| S0    | –              | counting                                     |

The counter stands still in S1 and S2. So `count_reg` is always **two less**
than the number of clock edges in the period, which is where the `+2` in the
formula above comes from. On the falling edge of the measurement signal the
counter pulses `add`. By then, half a period after the rising edge, every
counter has saved its value, so the eight values can be combined safely.

### The interpolator and the fractional part (`phase_interp`)

Eight flip-flops, clocked by the measurement signal, capture the levels of
`clk_ph[0..7]` at the rising edge. `clk_ph[k]` lags `clk_ph[0]` by k/8 of a
period, so the pattern is a run of four ones rotated by the edge position.
For example, an edge in the third eighth after `clk_ph[0]` rose captures
`clk_ph[2], clk_ph[1], clk_ph[0], clk_ph[7]` high. The code converter returns
the index k where `clk_ph[k]` is high and `clk_ph[k+1]` is low. That index is
the **phase location** `sel`, from 0 to 7.

The fractional part of a period is how much the edge moved inside the clock
period since the previous edge:

    fraction = (sel_now - sel_previous) mod 8

This is computed on `sel_ctrl`. For example, locations 6, 5, 4, … in
successive periods give fraction 7 every period.

Four of the eight samples are enough, because `clk_ph[k+4]` is the inverse
of `clk_ph[k]`. `FOUR_SAMPLES = 1` captures only `clk_ph[0..3]` and derives
the rest. Every 4-bit value is then a valid location, and a metastable
sample can only move the result to the neighbouring location.

### Why eight counters, and the minimum sorter (`min_sorter`)

One counter with the fraction added does not work in practice. The
measurement edge is asynchronous, so whether an edge close to it is counted
in this period or the next is decided by a metastable flip-flop. The
integral part then jumps by one clock (8 steps) even though the fraction
says the edge barely moved. The eight counters fix this.

Take a period of `8q + r` steps. Each phase clock has an edge every 8 steps,
so exactly `r` of the eight counters see `q + 1` edges and the other `8 − r`
see `q`. The integral part is therefore the **minimum** of the eight values.
When `r > 0` it is also the **maximum minus one**.

A metastable sample can flip one counter between `q` and `q + 1`:

* the minimum is wrong only if that counter was the last one at `q`, which
  needs `r = 7`;
* the maximum minus one is wrong only if that counter was the last one at
  `q + 1`, which needs `r = 1`.

The sorter computes both and uses the fraction to choose. For `r = 0…3` it
takes the minimum, because at least five counters sit at `q`. For
`r = 4…7` it takes the maximum minus one, because at least four counters sit
at `q + 1`. Any single flip then leaves the result unchanged.

### The phasemeter (`phasemeter`)

The phasemeter bundles the eight counters, the interpolator, the fraction
subtractor and the sorter. The state machine of the phase-0 counter drives
the shared steps: `sel_ctrl` updates the phase locations and the fraction,
and `add` registers `integral` and `fraction` and raises `valid`. All
outputs are in the `clk_ph[0]` domain. The first two periods after reset
produce no result.

### Accumulation (`phase_accumulator`)

On each `valid` the accumulator forms the period word, subtracts the
reference word and adds the difference into `total_count`.
`total_reset_n` (active low, synchronous) clears `total_count`. Both
registers are 32 bits and wrap around in two's complement.

## Two ways to get the reference period (`heterodyne_interface`)

* `USE_REF_PHASEMETER = 0` (the default, the main architecture): the PLL
  locks to the reference, so the reference period is the constant
  `REF_COUNT = 512` steps, and `ref_sig` is not used by the logic.
* `USE_REF_PHASEMETER = 1`: for a PLL that cannot lock to a 4 MHz input, for
  example on some FPGAs. A second phasemeter measures the reference signal
  on the same eight clocks and keeps its latest word. Each measurement
  result is compared with the word held at that moment. Both words lack the
  same two dead counts, so these cancel in the difference. Because both
  phasemeters share the clocks, no clock-domain crossing is needed.

## Interface and timing (top)

| port            | dir | width      | meaning                                              |
|-----------------|-----|------------|------------------------------------------------------|
| `clk_ph`        | in  | 8          | fast clock, `clk_ph[k]` lags `clk_ph[0]` by k·45°     |
| `rst_n`         | in  | 1          | asynchronous reset                                   |
| `mea`           | in  | 1          | measurement signal (asynchronous)                    |
| `ref_sig`       | in  | 1          | reference signal (used only by the variant)          |
| `total_reset_n` | in  | 1          | clear the displacement                               |
| `valid`         | out | 1          | `count_sub`/`total_count` updated this cycle         |
| `count_sub`     | out | 32 signed  | period minus reference period, in steps              |
| `total_count`   | out | 32 signed  | accumulated `count_sub`                              |
| `integral`, `fraction`, `sel`, `use_max`, `count_regs`, `meas_word`, `ref_word`, `ref_valid` | out | | internal values, for observation |

* Throughput: one result per measurement period.
* Latency: `valid` rises on the 5th `clk_ph[0]` edge after the falling edge
  of `mea` that ends the measured period.
* `mea` and `ref_sig` must stay high and low for at least 4 fast-clock
  cycles each. An assertion in `int_counter` reports a violation. At
  256 MHz this allows signals up to about 30 MHz.
* Parameters: `CNT_W = 32` (counter width), `ACC_W = 32`,
  `REF_COUNT = 512`, `USE_REF_PHASEMETER = 0`, `FOUR_SAMPLES = 0`.

Resolution in length: one step is `λ / (8·M)` of the reference period for
clocks at M times the reference. That is `λ/512` for M = 64, and `λ/64` for
the 32 MHz clocks of the FPGA gate-level case. Add the optical fold factor of
the interferometer (for example ÷2 for a double-pass plane mirror).

## Files

| file                          | contents                                          |
|-------------------------------|---------------------------------------------------|
| `rtl/hli_pkg.sv`              | constants, state type, phase-code converter       |
| `rtl/phase_interp.sv`         | octonary phase interpolator                       |
| `rtl/int_counter.sv`          | counter with save-and-reset control unit          |
| `rtl/min_sorter.sv`           | minimum / maximum-minus-one sorter                |
| `rtl/phasemeter.sv`           | one complete phasemeter                           |
| `rtl/phase_accumulator.sv`    | velocity and displacement registers               |
| `rtl/heterodyne_interface.sv` | top level                                         |
| `tb/pll8_model.sv`            | ideal eight-phase clock source (behavioural)      |
| `tb/tb_*.sv`                  | self-checking testbenches, one per module, plus `tb_heterodyne_interface_fpga` (variant) and `tb_doppler_levels` (long level test) |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops. For example:

    verilator --binary --timing -Wno-fatal -Irtl -Itb -y rtl -y tb \
        rtl/hli_pkg.sv tb/tb_heterodyne_interface.sv --top-module tb_heterodyne_interface
    ./obj_dir/Vtb_heterodyne_interface

The clock model divides time into ticks of 244 ps. A clock period is 16
ticks and a phase step is 2 ticks. The testbenches change `mea` and
`ref_sig` only on odd ticks, half a step away from any clock edge, so every
period is an exact number of steps and no edge races a clock.

* `tb_heterodyne_interface` runs the top with all defaults: the 511…448
  sweep, a still target, a total reset, and 120 random periods for Doppler
  shifts up to ±0.8 MHz. It checks every result and the latency. It also
  counts that each mechanism happened: the save/reset sequence, both sorter
  branches, fraction wrap-around, the total reset, and motion in both
  directions.
* `tb_heterodyne_interface_fpga` runs the reference-phasemeter variant. It
  first repeats a 32 MHz case (reference 64 steps, periods 127…64 steps →
  `0xD.7 … 0x6.0`). It then runs a 260 MHz case: reference 520 steps,
  periods 433…650 steps. Both interpolators use the four-sample form.
* `tb_doppler_levels` runs a constant Doppler shift at each of 11 levels,
  from +0.8 MHz to −0.8 MHz in 0.16 MHz steps, with 8192 results per level.
  At most levels the period is not a whole number of steps, so single
  periods alternate between the two neighbouring values. The testbench
  checks every result, the mean displacement per period, and an RMS spread
  of the displacement difference (`count_sub/512 · 632 nm`) below 1 nm. It
  measures 0 to 0.62 nm, which is pure quantisation. It takes about
  30 s.
* The unit testbenches cover each module on its own. `tb_min_sorter` also
  flips one counter by one to check that the sorter corrects it.

## Limits and choices to be aware of

* **PLL.** The eight-phase PLL is analog and is not part of the RTL. Its
  clocks are inputs. `tb/pll8_model.sv` is an ideal, already-locked
  stand-in with no jitter.
* **Metastability is not simulated.** The simulator has no timing
  violations. Tolerance to a miscounting counter is checked only by
  flipping a counter value in `tb_min_sorter`, not by placing an edge on a
  clock edge.
* **Sorter threshold.** Choosing the minimum for fraction 0–3 and the
  maximum minus one for 4–7 is this design's reading of the sorter rule.
* **Design choices.** These are this design's own:
  * the synchroniser depth;
  * the 4-cycle minimum pulse width;
  * using the phase-0 counter's strobes for the shared control;
  * discarding two periods after reset;
  * the active-low total reset;
  * wrap-around of the 32-bit registers;
  * the held reference word in the variant.
* **Not built.** An earlier selection scheme picks one counter by the phase
  location through a multiplexer. It is not built, because it depends on
  process corners. The single-counter baseline is not built either.
* **Other warnings.** Verilator lint reports unused strobes of counters 1–7
  and an `rst_n` that is both an asynchronous reset and a condition of the
  assertion. Neither affects the circuit.
