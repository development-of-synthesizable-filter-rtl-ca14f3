# An all-digital PLL built from one system clock and a random walk loop filter

This design locks a clock output to a slow, possibly noisy input signal
using nothing but a fast system clock and counters. It has no oscillator
of its own. The "digitally controlled oscillator" is a counter that
divides the system clock, and the control loop moves that counter's edges
one system clock at a time until they coincide with the input's edges. The
output can run at an integer multiple (`DIVIDER`) of the input frequency,
so a 500 kHz input on a 50 MHz system clock can give a locked 500 kHz,
2.5 MHz or other output.

The loop filter is a *random walk filter*, a reversible counter that
passes a correction on only after the phase detector has reported the same
direction N more times than the opposite one. While the loop is locked,
noise produces early and late reports about equally often, so they cancel
in the counter and hardly ever reach the oscillator.

Everything is synchronous to one clock (`clk`). The only asynchronous
signal is `signal_in`.

## The loop

```
 signal_in ──► phase_detector ──lead/lag──► rw_filter
     ▲          │ divider_max                  │ pos_shift / neg_shift
     │          ▼                              ▼
 signal_out ◄── freq_divider ◄──half_period── phase_controller
```

| Block | File | Role |
|---|---|---|
| phase detector | `rtl/phase_detector.sv` | synchronises the input, measures its half-period, derives the divider count, judges lead/lag/lock at each input edge |
| random walk filter | `rtl/rw_filter.sv` | up/down counter over −N..+N that emits a shift request at either end |
| phase controller | `rtl/phase_controller.sv` | queues shift requests and lengthens or shortens one output half-period by one clock per request |
| frequency divider | `rtl/freq_divider.sv` | counts system clocks to make the output signal |
| top | `rtl/adpll_top.sv` | wires the four together; sets `DIVIDER` |
| shared types | `rtl/adpll_pkg.sv` | widths (`CNT_W` = 8, `FILT_W` = 8, `CORR_W` = 4) and the phase-relation enum |

The loop works in two stages.

1. **Frequency, in one step.** The detector counts how many system clocks
   the input stays high (`period_count`). For a 50 % duty input that is half
   the input period: 50 clocks for 500 kHz at 50 MHz. It divides this by
   `DIVIDER` (integer quotient) to get `divider_max`. The divider toggles
   its output every `divider_max` clocks, so the output period is
   `2 × divider_max` clocks. There is no frequency-tracking loop. The
   frequency is measured again and set again at every input falling edge.
2. **Phase, one clock at a time.** What is left is a phase offset. The
   detector, filter and controller shift the output edges by single system
   clocks until an output rising edge falls in the same clock as the input
   rising edge.

## Judging lead and lag

This is the least obvious part of the design. The output may be several
times faster than the input, so the detector cannot pair each input edge
with "its" output edge. Instead, at every rising edge of the synchronised
input it asks one question: how many clocks ago did the output last rise?

* **0**, meaning the output rises in this very clock: the edges are
  aligned, and `lock` is set.
* **1 to `divider_max`**, which is up to half an output period: the output
  edge came first. The feedback is *ahead*, and `lead` pulses for one
  clock.
* **more than that**: the nearest output edge is still to come. The
  feedback is *behind*, and `lag` pulses for one clock.

A lead or lag decision clears `lock`. While `divider_max` is 0 the
detector makes no decisions and holds `lock` low. That is the case
before the first complete high time has been measured, or when the high
time is shorter than `DIVIDER` clocks.

Timing: the input passes two synchronising flops, so `in_edge` comes two
to three clocks after the raw input edge. Lock therefore means the output
edge coincides with the *synchronised* input, which trails the raw input
by that much. `lead`, `lag` and `lock` are registered one clock after
`in_edge`.

## The random walk filter

`rw_filter` holds a signed count, starting at 0:

* `inc` (lead) counts up, and `dec` (lag) counts down. If both come in the
  same clock they cancel.
* When the count reaches +N, `pos_shift` pulses for one clock and the count
  returns to 0. When it reaches −N, `neg_shift` pulses and the count
  returns to 0. The two ends are ORed into the counter reset.

A correction therefore needs N more leads than lags, or the reverse, since
the last correction. N is the `filter_n` input (`cap_n` on the module). It
can change at run time. A value of 0 behaves like 1, so every pulse passes
through.

A large N gives more noise rejection and slower acquisition. Each
correction moves the output by one clock and costs at least N input
periods. An initial offset of E clocks therefore takes at least `E × N`
input periods to remove.

The filter is described as adapting its bandwidth to how noisy the input
is, but no rule for that adaptation exists to build from. Here N is
simply an input, and any adaptation policy would drive `filter_n` from
outside.

## Phase controller and divider

A `pos_shift` means the output is early, so it must be delayed. A
`neg_shift` means it is late, so it must be advanced. The controller keeps
a saturating signed count of requests not yet carried out (±7 with
`CORR_W` = 4). It offers the divider `half_period`:

* `divider_max + 1` while delays are pending;
* `divider_max − 1` while advances are pending;
* `divider_max` otherwise.

The divider captures `half_period` at the start of each half-period (its
`load` pulse). Each capture uses up one pending request. Every request
therefore moves all later output edges by exactly one system clock, and
at most one request is carried out per output half-period. A half-period
is never shortened below 1 clock or lengthened past 255. A clamped request
is still used up.

The divider is idle, with its output low, while `half_period` is 0. It
starts with a rising edge as soon as a count appears. `out_edge` pulses
in the clock in which `signal_out` has just gone high.

## Multiplication factor and its rounding

`DIVIDER` is a parameter of `adpll_top`, default 5. It is passed down to
the phase detector. Because `divider_max` is an integer quotient, the
output is exact only when `DIVIDER` divides the input half-period. At
50 MHz with a 500 kHz input (half-period 50 clocks):

| `DIVIDER` | `divider_max` | output period | result |
|---|---|---|---|
| 1 | 50 | 100 clocks | 1:1, locks |
| 5 | 10 | 20 clocks | ×5, locks (default) |
| 4 | 12 | 24 clocks (ideal 25) | output gains 4 clocks per input period; the phase-only loop cannot hold this and the output slips, with lead and lag alternating |
| 20 | 2 | 4 clocks (ideal 5) | edges coincide every input period, so it locks, but the output is ×25, not ×20 |

The 8-bit counters limit the input high time to 255 system clocks: at
least about 98 kHz at 50 MHz. Longer high times saturate the measurement.

## Measured behaviour

At the defaults, with a 50 MHz clock, a 500 kHz input that starts
3287 ns after reset and N = 4, the loop:

* measures 50 clocks and sets `divider_max` = 10;
* locks 66 µs after the input starts;
* then gives exactly 5 output edges per input period with no corrections.

Lock time depends on where the output happens to start relative to the
input, and grows roughly in proportion to N. Over 8 random start phases
each:

| N | mean lock time |
|---|---|
| 1 | about 15 µs |
| 2 | about 30 µs |
| 4 | about 63 µs |
| 8 | about 127 µs |

The worst case is an initial error of half an output period (10 clocks).
That gives a bound of `10 × N + 4` input periods, for example 168 µs at
N = 8. A published run of this architecture reports 149 µs to lock,
without stating its filter capacity. Synthesis of the top gives 74 flip-flops. No
memories are used.

## Where this RTL departs from the reference or fills gaps

Taken from the reference architecture:

* the four blocks and how they connect;
* a flip-flop synchroniser on the input;
* the measured period and the divider count derived from it with the
  `Divider` parameter;
* one-clock Lead/Lag pulses, with Lead meaning the feedback is ahead;
* the 2N+1-state random walk counter whose ends reset it;
* Positive/Negative following Lead/Lag;
* the Lock output;
* the 8-bit period and divider counts.

This design's own choices:

* **Exactly how lead and lag are decided** (clocks since the last output
  edge, threshold at half an output period).
* **The lock criterion**: the edges fall in the same clock, with no
  tolerance.
* **The size of a correction**: one system clock per filter pulse, applied
  at half-period boundaries through a pending counter.
* **Measuring the high time rather than the full period.** A non-50 %
  duty input therefore sets the output frequency from its high time only.
* **N as a run-time input** with no automatic adaptation.
* **The handling of edge cases**: simultaneous inc/dec and N = 0, the
  divider's start/stop behaviour, and the saturating counters.
* **An asynchronous active-low reset, `rst_n`.**
* **A separate phase-controller module.** In the reference FPGA netlist
  the shift logic sits inside the divider.

The jitter, phase error, power and FPGA utilisation figures quoted for the
reference implementation are hardware measurements. RTL simulation does
not reproduce them.

## Ports of `adpll_top`

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk` | in | 1 | system clock |
| `rst_n` | in | 1 | asynchronous reset, active low |
| `signal_in` | in | 1 | reference input (asynchronous) |
| `filter_n` | in | 8 | random walk filter capacity N |
| `signal_out` | out | 1 | locked output, `DIVIDER` × input frequency |
| `sync_signal` | out | 1 | synchronised input |
| `in_edge`, `out_edge` | out | 1 | one-clock rising-edge pulses of input and output |
| `lead`, `lag` | out | 1 | phase detector decisions |
| `pos_shift`, `neg_shift` | out | 1 | filter outputs (delay / advance request) |
| `lock` | out | 1 | output edge aligned with input edge |
| `period_count` | out | 8 | measured input high time, clocks |
| `divider_max` | out | 8 | output half-period, clocks |

## Simulating

Every testbench checks itself and ends by printing
`TB_RESULT checks=<n> failures=<n>`. Each has a watchdog.

| Testbench | What it checks |
|---|---|
| `tb/tb_adpll_top.sv` | default parameters end to end: measurement, acquisition within 200 µs, locked edge count and alignment, relock after a 5-clock early and a 7-clock late phase step (lag/neg_shift and lead/pos_shift), noise absorption under ±1-clock input jitter |
| `tb/tb_adpll_acquire.sv` | lock time for N = 1, 2, 4, 8 over random start phases, against the `10 × N + 4` period bound, then lock held |
| `tb/tb_adpll_ratio.sv` | `DIVIDER` = 1, 4 and 20 side by side, as in the table above |
| `tb/tb_phase_detector.sv` | lead/lag/lock for output offsets of −9..+9 clocks, period and divider counts, a frequency change, in_edge latency |
| `tb/tb_rw_filter.sv` | clock-by-clock comparison with a counter model, with random pulses and a changing N |
| `tb/tb_phase_controller.sv` | half-period and pending count against a model, including clamping |
| `tb/tb_freq_divider.sv` | every output level lasts the captured half-period |

With Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl rtl/adpll_pkg.sv \
  rtl/phase_detector.sv rtl/rw_filter.sv rtl/phase_controller.sv \
  rtl/freq_divider.sv rtl/adpll_top.sv tb/tb_adpll_top.sv \
  --top-module tb_adpll_top
./obj_dir/Vtb_adpll_top
```

The block testbenches need only `rtl/adpll_pkg.sv`, their module and
their testbench file. The testbenches pulse `rst_n` low after time 0, so
that the asynchronous reset sees an edge even in a two-state simulator
that starts registers at random values.

## Changing it

* **Multiplication factor:** set `DIVIDER` on `adpll_top`. Check the
  rounding table above for your input/clock ratio.
* **Slower inputs or faster clocks:** raise `CNT_W` in `adpll_pkg` so that
  the input high time fits.
* **Acquisition speed against noise rejection:** drive `filter_n`. A
  smaller N locks faster, and a larger N rejects more jitter.
* **Lock tolerance:** widen the `PH_ALIGNED` test in `phase_detector` if
  a lock indication within a window of a few clocks is wanted.
