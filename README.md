# IF frequency tracking loop for a crystal-less sensor node

A body-area sensor node that drops its quartz crystal has to run on an on-chip
oscillator that is only accurate to a few percent over process, voltage and
temperature. A radio link of several Mb/s needs a clock within about 100 ppm.
This loop closes that gap without a crystal. The central node broadcasts a sine
reference. The sensor node mixes it down with a local oscillator derived from its
own DCO (N_SYN times the DCO frequency). The resulting intermediate frequency (IF)
is then proportional to the DCO's frequency error. The loop searches for the DCO
code that drives this IF towards zero. It brings the clock from ±3 % to about one
code step, 50 ppm.

The RTL follows the loop published by Sung, Yu and Lee ("A Robust Frequency
Tracking Loop for Energy-Efficient Crystalless WBAN Systems"). That work gives the
structure, the search rule, the arithmetic and the main numbers. Timing constants,
widths, handshakes and reset are this implementation's own. They are listed below
under *Departures and own choices*.

## The V curve: counting IF edges

After a limiting comparator, the IF is a square wave IF'(t) at frequency
`f_IF = N_SYN · f_0 · |ε|`, where ε is the DCO's relative frequency error. If you
count IF' edges over a fixed time T_ACC and plot the count against the DCO
frequency, you get a V whose valley sits at the target f_0. The loop never
measures the sign of ε. It only looks for the bottom of the V.

Noise at the limiter input produces extra edges ("glitches"). Over one window
their number is roughly Gaussian with mean N_Bias and variance σ_G². N_Bias
hardly depends on the DCO frequency. So the noise lifts the whole V by N_Bias and
blurs it by σ_G. It does not move the valley.

## Comparison-based binary search (CBST)

The controller keeps a search window of three frequencies: low f_L, median f_M
and high f_H. It starts with f_M at the free-running frequency and the edges at
f_M·(1 ∓ 3 %). Each iteration does three things:

1. It counts IF edges at f_L (giving N_L) and at f_H (giving N_H), over the same
   time.
2. It keeps the half-window on the side with the smaller count: [f_M, f_H] if
   N_H < N_L, otherwise [f_L, f_M].
3. It takes the new median as the middle of that half.

The two counts carry the same glitch bias, so the comparison cancels it. Only
σ_G can flip a decision. After ⌈log2(3 % / 50 ppm)⌉ = 10 halvings, the window is
±0.6 code steps and the median is the result.

**Codes are periods.** The DCO's period is its code times a 10 ps unit delay.
Code 20000 is 200 ns (5 MHz), and one step is 50 ppm. Frequency operations
therefore become divisions on codes:

| operation | on codes |
|---|---|
| first window edges f_M·(1 ± ε_max) | C_H = C_M / (1 + ε_max), C_L = C_M / (1 − ε_max) |
| new median (f_L + f_H)/2 | C_M = 2·C_L·C_H / (C_L + C_H), a harmonic mean |
| window of constant time L·T_ACC | N_DCO = L·T_ACC / (C·10 ps) DCO cycles |

All three are rounded to nearest. They run one after another on a single shared
sequential divider with 32-bit dividend and 17-bit divisor, taking 33 clocks each.
The scale factors 1 ± 0.03 are 16-bit fractions, 67502/2^16 and 63570/2^16.

**Three tuning stages.** As the window shrinks, the count difference the
comparison has to resolve shrinks too. The window is therefore lengthened to
T'_ACC = L·T_ACC, which divides the glitch variance by L. The search runs
through a coarse stage, a first fine stage and a second fine stage, each with its
own L:

| stage | iterations | L | window T'_ACC |
|---|---|---|---|
| coarse | 0–2 | 1 | 8 µs |
| first fine | 3–6 | 4 | 32 µs |
| second fine | 7–9 | 16 | 128 µs |

The twenty windows take 1072 µs. Adding the divisions, the synthesizer settle
waits and the read waits, a full search takes about 1.32 ms of DCO time.

## Frequency detector: two counters in two clock domains

The detector is a frequency-counter structure:

- `ftl_ctrl_timer` runs on the DCO clock. It counts down N_DCO cycles and holds
  the gate `acc_gate` open for exactly that many cycles. Because N_DCO is
  recomputed for every code, the window lasts L·T_ACC in real time whichever
  code is being measured. It is accurate to within one DCO period.
- `ftl_if_counter` is clocked by IF'(t) itself. IF' can be faster than the
  system clock: at 3 % error it is 13 MHz against 5 MHz. The counter is reached
  only through two asynchronous controls: a clear (`if_clr`) and the gate level.
  An IF' edge that arrives at the same moment as a gate transition may or may
  not be counted. That error of one count is of the same kind as a glitch and
  also cancels in the comparison. The controller reads N_IF three DCO cycles
  after the gate closes, when it can no longer change. The count saturates at
  all ones.

One measurement, in DCO cycles:

1. Set the code and start the N_DCO division (33 cycles). At the same time, wait
   at least `SETTLE_CYC` = 16 cycles for the RF synthesizer to follow.
2. Pulse the counter clear, then start the timer.
3. Hold the gate open for N_DCO cycles.
4. Wait `READ_WAIT` = 3 cycles, then latch N_IF.

## Modules

| file | what it is |
|---|---|
| `rtl/ftl_pkg.sv` | widths, unit delay, nominal code, `tuning_stage_e` |
| `rtl/ftl_if_counter.sv` | N_IF counter, clocked by IF' |
| `rtl/ftl_ctrl_timer.sv` | N_DCO window timer |
| `rtl/ftl_divider.sv` | shared restoring divider |
| `rtl/ftl_cbst_controller.sv` | search state machine, window registers, stage selection |
| `rtl/ftl_core.sv` | the synthesizable loop: controller + timer + counter |
| `rtl/ftl_p2_dco.sv` | **behavioural model** of the power-of-two delay-cell DCO, period = code · 10 ps |
| `rtl/ftl_top.sv` | core closed around the DCO model (simulation top) |

Interface of `ftl_core` (and of `ftl_top`, which replaces `clk` with the output
`sys_clk`):

- **Inputs:**
  - `clk`: the DCO clock.
  - `rst_n`: asynchronous reset, active low.
  - `if_in`: IF'(t).
  - `start`: a one-cycle pulse, accepted while idle.
  - `c_init`: the free-running code from the DCO self-calibration.
- **Results:**
  - While idle and not locked, `c_dco` follows `c_init`.
  - `busy` is high during a search.
  - `locked` rises at the end of a search. It then holds, with the result on
    `c_dco`, until the next `start`.
- **Observation outputs:**
  - `stage` and `iter`: where the search is.
  - `dec_valid`, `dec_high`: one pulse per iteration; `dec_high` = 1 when the
    high-frequency half was kept.
  - `acc_gate`, `n_if`: the detector's gate and count.

The controller has two assertions. The timer starts only straight after the
counter has been cleared, and decisions never come on back-to-back cycles.

The following parts are not in the RTL:

- The RF front end and synthesizer (a commercial FSK chip in the published
  prototype).
- The Schmitt trigger that limits the analog IF. IF'(t) is an input port.
- The DCO self-calibration (PVT detector). Its result is the `c_init` port.
- The chip's interface logic, which the published design names but does not
  describe.

## Simulating

Every testbench prints one line `TB_RESULT checks=N failures=M` and stops itself
with a watchdog. With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -y rtl -y tb rtl/ftl_pkg.sv tb/tb_ftl_top.sv \
          --top-module tb_ftl_top -o sim && obj_dir/sim
```

Replace `tb_ftl_top` with any other testbench:

| testbench | what it checks |
|---|---|
| `tb_ftl_if_counter` | edges counted only with the gate open; asynchronous clear; saturation on a 4-bit instance |
| `tb_ftl_ctrl_timer` | gate open for exactly the load, `done` timing, zero load, restart |
| `tb_ftl_divider` | quotient and remainder against integer division; 33-clock latency; divide by zero |
| `tb_ftl_p2_dco` | period = code · 10 ps over the code range |
| `tb_ftl_cbst_controller` | every code, timer load, stage and decision, against an independent model of the search; the controller sees an ideal V curve plus bias |
| `tb_ftl_core` | N_IF equals the edges the testbench saw in each window; gate length equals the load; lock within 100 ppm |
| `tb_ftl_top` | closed loop at default parameters: three searches (+0.06 %, +2.5 %, −2.8 %) with random glitches |
| `tb_ftl_snr_sweep` | closed loop at default parameters against channel noise, SNR 3–15 dB, four searches each |

`tb_ftl_top` checks the residual error, 10 decisions and 20 windows per search,
the first window edges, and every window's length against L·T_ACC. It also
checks a tracking time between 1072 and 1400 µs, and that the search window
halves in frequency at every iteration (it prints this convergence trace).
Finally it counts how often each mechanism occurred: the three stages, both
decision directions, glitches inside a window, and a lock.
It runs in well under a second.

## How far to trust it

**What the closed-loop simulation shows.** Residual errors are 17, 63 and
88 ppm for the three targets in `tb_ftl_top`, and 10–40 ppm in the other
testbenches. Errors above 50 ppm come from the integer codes. When the target
lies almost exactly on a window median, a near-tie can drop it just outside the
kept half. The search then ends one step beside it, because the median of
neighbouring codes cannot reach the window edge. Because of this, the
testbenches enforce the ±100 ppm that the 4.85 Mb/s link needs, not ±50 ppm.
For comparison, the published prototype reports 23.5 ppm, measured at 7 dB SNR.

**The IF model is idealised.** It is a square wave at exactly
|f_ref − N_SYN·f_DCO|, plus glitches. There is no phase noise and no gain
mismatch.

**Noise sweep.** `tb_ftl_snr_sweep` turns an SNR into a glitch probability with
the loop's own glitch model. One trial runs every T_D. A trial succeeds when the
noise carries the limiter input across the opposite threshold V_TH = 0.3. The
probability is averaged over one sine period as the mean of
Q((V_TH + |sin|)/σ_w). T_D is not known from the published design; 2.5 µs is
assumed (about 200 kHz of noise bandwidth ahead of the limiter).

| SNR | P(glitch) per trial | glitch rate | worst residual (4 searches) |
|---|---|---|---|
| 3 dB | 0.058 | 23 kHz | 34 ppm |
| 5 dB | 0.034 | 14 kHz | 66 ppm |
| 7 dB | 0.019 | 7.5 kHz | 77 ppm |
| 11 dB | 0.0037 | 1.5 kHz | 60 ppm |
| 15 dB | 0.0002 | 0.1 kHz | 60 ppm |

At these rates the code quantization described above, not the noise, sets the
residual. With a shorter T_D the glitch rate grows in proportion, and the
second-fine-stage L would have to grow with it.

## Departures and own choices

- **Accumulation time and L.** The accumulation time T_ACC = 8 µs and the factors
  L = 1/4/16 are chosen, not derived. The published method sizes T'_ACC per stage
  from the detection condition Q(−T'_ACC·f_REF·ε / √(2σ_G'²)) ≥ 1 − α, which
  needs σ_G for the actual channel. Raise `L_FINE2_LOG2` to trade tracking time
  for accuracy.
- **Tracking time.** A search takes about 1.32 ms, against 1.06 ms measured on
  silicon. Most of the difference is divider latency and settle waits.
- **Tuning stages.** The published DCO has separate coarse and fine tuning banks,
  each searched on its own. Their bit split and step sizes are not published.
  Here the DCO is one linear 15-bit code, and the stages differ only in L and in
  which iterations they cover (3/4/3).
- **DCO code law.** Period = code · 10 ps, so code 20000 is 5 MHz. This matches
  the published 5 MHz target, 50 ppm tuning step and 10 ps finest delay.
- **Small behaviours.** On a tie N_L = N_H, the low-frequency half is kept. The
  low edge is measured before the high edge. The settle wait is 16 DCO cycles per
  code change. The published prototype's external synthesizer took about 2 ms in
  total, which a controllable synthesizer would avoid.
- **Widths.** C_DCO is 15 bits, N_IF and N_DCO are 16 bits, and the divider has a
  32-bit dividend and a 17-bit divisor. All are sized for 20000 ± 3 % and the
  longest window.

## Changing it

All timing and search constants are parameters of `ftl_core`
(`N_ITER`, `EPS_MAX_Q16`, `TACC_LSB`, `COARSE_ITERS`, `FINE1_ITERS`,
`L_*_LOG2`, `SETTLE_CYC`, `READ_WAIT`). Widths and the unit delay are in
`ftl_pkg`. If you change ε_max or ε_0, set `N_ITER` to ⌈log2(ε_max/ε_0)⌉ and
check that `CODE_W` still holds C_nominal·(1 + ε_max). The DCO model's unit delay
`T_UNIT_FS` models process spread. The loop does not care about its value, as
long as the reference is reachable within ±ε_max of `c_init`.
