# Margin-free ultra-low-voltage operation with in-situ timing error detection

Digital logic at near-threshold supply voltages is very slow, and it varies a lot
from die to die and from gate to gate. The usual answer is to add margin: design
for the slow corner, or watch a replica ring oscillator and keep a safety gap to
it. Both give away energy, and a replica does not see local (intra-die)
variation. This design takes another route. The flip-flops at the end of the
most critical paths are replaced by **error-detection flip-flops** that keep
working when data arrives a little late, and that *report* it. The reports are
gathered by an **error processor**, and a **voltage scaling loop** uses its
statistics to lower the supply until late arrivals just start to appear. That
point is the *point of first failure* (PoFF). The chip then runs with no timing
margin, and a late transition is never lost: it is caught and reported.

The RTL models the error-aware part of a 32-bit microcontroller:

* a bank of `N_EDFF` error-detection flip-flops (`edff`);
* the error processor (`error_processor`): an OR-tree, a running-mean register,
  counters, three interrupts and an AHB-Lite register port;
* the closed-loop supply controller (`dvs_controller`).

The processor core, UART, GPIO, test/debug logic, SRAM, bus fabric and the
DC/DC converter are not included. The top brings out the AHB slave port and
the `irq[2:0]` lines where a Cortex-M0-class system would connect them. It
also brings out a digital supply code, `vdd_code`, for the converter.

Published silicon results give the scale of the technique. A 40 nm
Cortex-M0 system built this way ran down to 0.29 V at 5 MHz (12.90 pJ/cycle).
Its minimum-energy point was 11.11 pJ/cycle at 7.5 MHz and about 306 mV. That
was about 75 % less energy than the same system designed with slow-corner
margins, and 8 % less than margin taken from a ring-oscillator replica. These
numbers belong to that chip. The RTL here reproduces the mechanism, not the
energy figures.

## The error-detection flip-flop

This is the part that is hardest to follow, and all the rest depends on it.
Each cell (`edff`) is made of four pieces:

| piece | file | what it does |
|---|---|---|
| timing/control | `edff_timing_control.sv` | makes the slave clock `sclk`, the delayed master clock `mclk` and the detection `window` from the clock |
| soft-edge flip-flop | `soft_edge_ff.sv` | differential master-slave flip-flop; master transparent while `mclk` is low, slave while `sclk` is high |
| transition detector | `transition_detector.sv` | pulses `edge` while the master latch input and output disagree |
| error latch | `error_latch.sv` | set/reset latch: set by `edge` inside the window, cleared at the next rising clock edge |

### Why late data is masked

`sclk` is the clock after a short buffer delay, `T_BUF`. `mclk` is `sclk`
delayed again by a tapped delay line of `(1 + window_control) * T_TAP`. The
master latch closes when `mclk` rises, not when the clock rises. So for a short
time after every rising edge, the *window*, both latches are transparent at
once. Data that arrives in that time flows straight through to Q. The flip-flop
behaves as if its edge were "soft". A slightly late value is still stored in the
right cycle and the pipeline state stays correct. The cost is that the next
stage gets less time: the time is borrowed, much as in a latch-based pipeline.
The hold time of the flip-flop also grows by the window length.

### Why late data is detected, with no second sampling element

The master latch has a propagation delay. While a new value is travelling
through the transparent latch, its input already shows the new level and its
output still shows the old one. With differential rails this means that
either (`d`, `dd_n`) or (`d_n`, `dd`) are both 1 for the latch delay. The
transition detector turns that overlap into an `edge` pulse:

    edge = (d & dd_n) | (d_n & dd)

So every data transition gives a pulse, early or late. The error latch only
listens while `window` is high, that is, between the rise of `sclk` and the
rise of `mclk`. A pulse then can only come from data that arrived after the
clock edge. That data was late.

### When the flag is seen and cleared

The flag stays set for the rest of the cycle. It is cleared by the short
interval after the next rising clock edge in which `clock` is already high but
`sclk` is still low. The error processor samples all flags on that same edge. A
small output buffer delay on `error` (`T_OUT`) makes sure it samples the old
value before the clear arrives.

```
clock   ____/‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾\_________________/‾‾‾‾‾‾‾
sclk    _____/‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾\_________________/‾‾‾‾‾‾
mclk    _______________/‾‾‾‾‾‾‾‾‾‾‾\_________________/‾‾
window  _____/‾‾‾‾‾‾‾‾‾\______________________________
d       ==old=====X==new==================================   (late arrival inside the window)
edge    __________/‾\_____________________________________
error   ___________/‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾\____   (sampled and cleared at the next edge)
q       ==old======X==new=================================
```

### What the window cannot catch

Data that arrives after `mclk` has risen is not stored until the next cycle, and
it is not flagged. The window must therefore be wide enough for three things:

* the transition detector must have time to set the latch;
* one supply step of the converter must not be able to jump a path from "on
  time" straight past the window;
* unmonitored paths, which have more slack, must not fail before the monitored
  ones.

A wider window costs more delay-line energy, more hold-time buffering and more
time borrowed from the next stage. `window_control` (3 bits, 8 settings) lets
software trade these off.

### Models, not logic

The timing/control block is a delay line and the flip-flop is a
transistor-level cell whose latch delay is part of how it works. Both are
**behavioural models** with `#` delays: `edff_timing_control`, `soft_edge_ff`,
and `edff`, which joins the four pieces. All delays are in ns, with a 1 ns / 1 ps
timescale. The default values are `T_BUF = 1`, `T_TAP = 2`, `T_ML = 1` and
`T_OUT = 0.5`. With `window_control = 4` the window is open from 1 ns to 11 ns
after each rising edge. These delays are illustrative, not extracted from
silicon. `transition_detector` and `error_latch` are plain logic. The error
latch is a latch by design.

## Error processor

`error_processor` samples the `N_EDFF` error flags on every rising edge.

* **Slack-prioritised OR-tree** (`error_or_tree`). The inputs are ordered by
  endpoint slack, index 0 being the least slack. They are split into
  `N_GROUPS` equal groups. The block produces one flag per group, one global
  flag, and the index of the most critical group that flagged.
* **Running mean and counters** (`running_mean_error`). Each enabled cycle
  updates an exponentially weighted mean of the global flag:
  `mean += ((err ? 0xFFFF : 0) - mean) >>> alpha`. So `mean` is the fraction
  of erroneous cycles in units of 2^-16. Saturating counters count the observed
  cycles and the cycles with an error.
* **Events and interrupts.** There are three events, each latched in
  `IRQ_STAT`. An enabled status bit drives its `irq` line until software writes
  1 to clear it.

| line | event |
|---|---|
| `irq[0]` | `MEAN > THR_HI`: error rate too high |
| `irq[1]` | `MEAN < THR_LO` and `CYCLES >= OBS_CYCLES`: error-free long enough |
| `irq[2]` | `ERR_COUNT >= CNT_THR`, with `CNT_THR != 0` |

The same high and low events also feed the voltage loop directly
(`ev_high`, `ev_low`).

### Register map

AHB-Lite, 32-bit single transfers, word accesses only, no wait states, always
OKAY. Assertions in the RTL flag other transfer sizes and bursts. The offsets
are in `edm_pkg.sv`.

| offset | name | access | fields (reset) |
|---|---|---|---|
| 0x00 | CTRL | rw | [0] EN (0), [1] CLR (write 1, self-clearing), [2] DVS_EN (0), [7:4] ALPHA (4), [10:8] WINDOW_CTRL (4) |
| 0x04 | IRQ_EN | rw | [2:0] (0) |
| 0x08 | IRQ_STAT | r/w1c | [2:0] (0) |
| 0x0C | THR_HI | rw | [15:0] (0x0800 = 1/32) |
| 0x10 | THR_LO | rw | [15:0] (0x0040 = 1/1024) |
| 0x14 | OBS_CYCLES | rw | 64 |
| 0x18 | CNT_THR | rw | 0 (off) |
| 0x1C | ERR_COUNT | ro | cycles with at least one error |
| 0x20 | CYCLES | ro | cycles observed while EN |
| 0x24 | MEAN | ro | [15:0] running mean |
| 0x28 | GROUPS | ro | [N_GROUPS-1:0] sticky group flags, [23:16] most critical group of the last error |

Clearing (CTRL.CLR, or the `stat_clr` input that the voltage loop pulses after
each step) zeroes MEAN, both counters and GROUPS. The clear acts one cycle
after the write.

## Voltage scaling loop

`dvs_controller` holds `vdd_code`, which starts at the top of its range. When
enabled (CTRL.DVS_EN):

* a low-rate event lowers the code by `STEP`;
* a high-rate event raises it by `STEP`; raising wins if both are present;
* after every step it ignores requests for `SETTLE` cycles and pulses
  `step_up` or `step_down` once. In the top that pulse restarts the error
  statistics.

The code walks down while the monitored paths are on time. It steps back up as
soon as a late arrival is flagged, and then dithers around the point of first
failure. No data is lost on the way, because the window masks every late arrival
that a single step can cause.

In the published chip the voltage scaling sits on the board, next to the DC/DC
converter that sets the supply. Here it is synthesizable logic so that the whole loop can
be simulated. The mapping from `vdd_code` to volts is left to the converter.

## Top level: `edm_mcu_top`

| parameter | default | meaning |
|---|---|---|
| `N_EDFF` | 32 | monitored endpoints |
| `N_GROUPS` | 4 | slack groups of the OR-tree (must divide `N_EDFF`) |
| `VCODE_W` | 8 | supply code width |
| `SETTLE` | 16 | cycles between supply steps |
| `WC_W` | 3 | window control width |

Ports:

* `clock`, `rst` (active high);
* differential `d/d_n` from the critical stage and `q/q_n` to the next stage;
* the AHB-Lite slave port (`hsel`, `haddr`, `htrans`, `hwrite`, `hsize`,
  `hwdata`, `hready`, `hrdata`, `hreadyout`, `hresp`);
* `irq[2:0]`, `vdd_code`, `step_up`, `step_down`.

Each cell also has a complementary flag, `error_n`, which the error processor
does not use; it is left open in the top.

Latency: flags from the window after edge *k* are sampled at edge *k+1*. The
statistics change at edge *k+1* and the loop acts on them at edge *k+2*.

## What is this design's own choice

The cell structure, the in-latch detection principle, the window made from a
delayed master clock, the error latch's set and clear conditions, and the list
of error processor parts all follow the published design. That source gives
no numbers or encodings for any of them. Everything below was chosen here:

* all delay values, and the 8-setting delay line;
* what "slack prioritised" means: equal slack groups plus a priority encoder;
* the exponential form of the running mean;
* the three interrupt events, the register map and the AHB-Lite subset;
* the stepping policy, code width and settling time of the voltage loop;
* that the window control setting lives in the error processor;
* `N_EDFF = 32`. The source says only that a subset of critical endpoints is
  replaced.

Resets are active high and clear every flip-flop to Q = 0. During reset the
local clocks are held high.

## Simulating

Every file is self-contained SystemVerilog-2017. Testbenches need Verilator 5
with `--timing`. For example, the closed-loop run of the full design:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
  rtl/edm_pkg.sv tb/tb_edm_mcu_top.sv --top-module tb_edm_mcu_top -o sim
./obj_dir/sim
```

Every testbench ends with a line `TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `tb_transition_detector` | exhaustive truth table; one pulse per rising and falling transition |
| `tb_error_latch` | set only inside the window, held to the next edge, cleared by the edge and by `rst` |
| `tb_edff_timing_control` | `sclk` and `mclk` delays and window edges for all 8 window codes; reset state |
| `tb_soft_edge_ff` | normal capture, masking of in-window data, data after the window waits a cycle, reset |
| `tb_edff` | the whole cell: on time, in window (masked and flagged), after window, window code change |
| `tb_error_or_tree` | random and sparse vectors against a loop model |
| `tb_running_mean_error` | random streams and alphas against an integer model; saturation and decay |
| `tb_dvs_controller` | cycle-accurate model comparison; settling, saturation, priority |
| `tb_error_processor` | reset values, read-back, statistics against a model, all three interrupts, w1c, clears |
| `tb_edm_mcu_top` | the closed loop at default parameters (below) |
| `tb_edm_freq_sweep` | the closed loop at 5 to 30 MHz (below) |

`tb_edm_mcu_top` drives 32 random endpoints at 10 MHz. The path delay grows as
the code falls: `40 + (255 - vdd_code) * 0.5 - 2 * (i / 8)` ns. The testbench
also acts as the processor, configuring the registers and servicing interrupts.
Over 5000 cycles the loop settles at code 134, where the least-slack group
arrives right at the clock edge. On the way it checks:

* every Q against the launched value;
* that no flag is raised for on-time data;
* that every late arrival is both masked and flagged;
* that stepping up, stepping down, all three interrupts and a window change
  each happen at least once.

It runs in a few seconds.

`tb_edm_freq_sweep` repeats the closed loop at ten clock frequencies from 5 to
30 MHz, with a path delay that rises steeply at low codes:
`8000 / (vdd_code + 20)` ns for the least-slack group. For every frequency the
loop must end within two codes of the lowest code that still meets the period.
At 5 MHz one code step changes the delay by about 5 ns. This is the case where
the window must cover the converter's step size. No value may be lost and late
arrivals must be flagged. The whole sweep simulates about 35 000 cycles in
roughly 20 s.

Not checked: anything electrical. That includes real delays, hold-time
buffering, the differential library, and the behaviour of the converter or of
supply noise.
