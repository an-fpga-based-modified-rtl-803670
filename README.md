# MA-PID: a modified adaptive PID controller for a digital buck converter

A buck converter regulated by a digital PID has to trade two things off. A
high loop bandwidth recovers quickly from line and load steps, but at steady
state it makes the loop nervous, and in practice it is kept near a tenth of
the switching frequency. The modified adaptive PID (MA-PID) keeps the
conservative gains while the output sits near its reference. It raises Kp, Ki
and Kd only while the error is large, and drops them again as the error
shrinks or changes sign. Three extra gain terms are added on top of the
steady-state PID:

    u(k) = u(k-1) + (Kp+α)[e(k) - e(k-1)] + (Ki+β) e(k) + (Kd+γ)[e(k) - 2e(k-1) + e(k-2)]

α, β and γ are zero at steady state. They are chosen afresh for every sample
from the size and trend of the error. The controller needs no extra sensing:
one ADC channel on the output voltage is enough.

This repository holds synthesizable SystemVerilog for the whole digital part
of such a controller, as it would sit in an FPGA:

* a **clock divider**;
* the **MA-PID compensator**, which turns an 8-bit ADC code into a 10-bit
  duty command;
* a **hybrid DPWM**: a 7-bit counter plus an 8-tap delay line.

It also has self-checking testbenches. One of them closes the loop around a
switching model of the reference power stage: 5 V in, 1.8 V out,
4.7 µH / 200 mΩ, 10 µF / 100 mΩ, 1 MHz.

```
          +-------------+  clk1 (f_s)    +---------------------------------------------+
 clk ---> | fre_divider |--------------->| compensator                                  |
 n_rst -> |             |                |  error_calc -> ma_pid_adapt -> coef_lut       |
          |             |                |      |                           |            |
          |             |  vo, vref ---->|      +------> d_correction <-----+            |
          |             |                |                    |                          |
          |             |                |               dn_output ---------------> dn --+--+
          |             |                +---------------------------------------------+  |
          |             |  dpwm_clk (clk/8), delay_line_clk (clk)                          |
          |             |----------------------------------------> dpwm <----------------+
          +-------------+                                           |-> dpwm_out, syn
```

## The gain schedule

This is the heart of the design (`rtl/ma_pid_adapt.sv`). Each sample is put
into one of four states. The tests are made in this order:

| state | condition | α | β | γ | peak register |
|---|---|---|---|---|---|
| steady | \|e(k)\| < V_thr | 0 | 0 | 0 | kept |
| transition | e(k) and e(k-1) of opposite sign (both non-zero) | ΔKp2 | ΔKi2 | ΔKd | kept |
| falling | \|e(k-1)\| > \|e(k)\| | ΔKp·\|e\|/peak | ΔKi·\|e\|/peak | ΔKd | kept |
| rising | otherwise | ΔKp | ΔKi | ΔKd | ← \|e(k)\| |

How to read the states:

* **Rising.** While the error grows, the full increments apply and `peak`
  follows the error.
* **Falling.** Once the error starts to shrink, the P and I increments fade
  in proportion to how far the error has fallen from its peak. The D
  increment stays on for the whole excursion.
* **Transition.** When the error crosses zero while still above the
  threshold, the loop is about to overshoot. ΔKp2 and ΔKi2 are *negative*
  (Kp drops from 2 to 0.2), which damps the swing.

Design values, in volts of error per unit of duty:

| | Kp | Ki | Kd | ΔKp | ΔKi | ΔKd | ΔKp2 | ΔKi2 | V_thr |
|---|---|---|---|---|---|---|---|---|---|
| real | 2 | 0.1 | 4 | 0.7 | 0.3 | 2.3 | −1.8 | −0.02 | 60 mV |
| RTL parameter | 5243 | 262 | 10486 | 1835 | 786 | 6029 | −4719 | −52 | 6 |

At steady state these gains give a 114 kHz crossover with 65° phase margin.
Fully boosted they give about 202 kHz.

Details that matter when changing it:

* **Threshold.** The test is `>=`: a sample exactly at V_thr is adapted.
* **Sign change.** The test is strict (`<0`). A jump from exactly zero
  error is therefore treated as rising, not as a transition.
* **The ratio.** |e|/peak is computed as a Q8 fraction by one integer
  division and clamped to 1. It can exceed 1 when the previous sample was a
  transition sample larger than the stored peak. The peak is only cleared
  by reset.
* **Clamping.** The effective gains are clamped to be non-negative. The
  default values never need it.
* **Carried P contribution.** In the velocity form, P contributions added
  while the gain was boosted stay in the accumulator when the gain drops.
  The boost therefore also pushes the duty like a temporary integral. This
  is inherent in the control law above, and it shows in the closed-loop
  results further down.

## Fixed-point scaling

The errors are ADC codes, the duty is a 10-bit DPWM code, and the gains are
integers. A real gain K becomes

    K_hw = round(K · V_LSB · 2^DPWM_BITS · 2^FRAC),   V_LSB = 10 mV, DPWM_BITS = 10, FRAC = 8

so Kp = 2 becomes round(2 · 0.01 · 1024 · 256) = 5243. The accumulator
`u` in `dn_output` keeps the FRAC = 8 fractional bits, so the small Ki term
still builds up. The duty command is `dn = u >> 8`, i.e. u scaled back by
2^-n.

The 10 mV step is an assumption: an 8-bit converter with a 2.56 V full
scale. With another ADC range, recompute every gain and V_thr with the
formula. They are all parameters of `mapid_top`.

Widths follow from the package `mapid_pkg`:

* effective gains: 16 bits;
* coefficients a = Kp+Ki+Kd and |b| = Kp+2Kd: 18 bits;
* products: 26 bits;
* signed increment: 29 bits. That is enough for three full-scale products
  of the same sign, which a 28-bit sum cannot hold.

## Compensator datapath

`compensator` evaluates the law once per rising edge of `clk1`, which runs
at the switching frequency. It uses the expanded form
u(k) = u(k-1) + a·e(k) + b·e(k-1) + c·e(k-2), with a = Kp'+Ki'+Kd',
b = −(Kp'+2Kd') and c = Kd'.

| block | job |
|---|---|
| `error_calc` | e(k) = vref − vo, held as magnitude + sign. e(k) is combinational; e(k-1) and e(k-2) are registers cleared by reset. |
| `ma_pid_adapt` | the gain schedule above; gives Kp', Ki', Kd' and the state |
| `coef_lut` | the unsigned products a·\|e(k)\|, \|b\|·\|e(k-1)\|, c·\|e(k-2)\| |
| `d_correction` | applies the signs (a, c positive; b negative) and sums them into delta_d |
| `dn_output` | u ← clamp(u + delta_d, 0, 2^18−1); dn = u >> 8; `sat` flags a clamped update |

**Timing.** The `vo` present at a clk1 rising edge is sample k. The dn
computed from it is registered at that same edge. There is no extra sample
of latency inside the compensator. Clamping the accumulator itself (not just
its output) stops wind-up at 0 % and 100 % duty.

**Conventional PID.** Setting DKP, DKI, DKD, DKP2 and DKI2 to 0 turns the
block into the fixed-gain PID. `tb_transient_compare` uses this for
comparison.

## Hybrid DPWM

`dpwm` makes a 1024-step duty from two parts:

* **Coarse edge.** A 7-bit counter on `dpwm_clk` (clk/8) gives the coarse
  edge in steps of 8 fast clocks.
* **Fine edge.** A clocked 8-tap delay line on `delay_line_clk` (clk) moves
  that edge by 0 to 7 fast clocks.

One period is 128 × 8 = 1024 fast clocks. The on-time is exactly `dn` fast
clocks, and dn = 0 produces no pulse.

The output stage works with single pulses:

* A strobe is high for the first fast clock after each rising edge of
  `dpwm_clk`.
* `set_pwm = is_zero & strobe` fires once per period, at count 0.
* `is_high & strobe` fires once at the coarse match (count = dn[9:3]). It
  enters the delay line and reaches tap dn[2:0] that many fast clocks later.
* The selected tap is `reset_pwm`. Reset wins over set.

Single pulses keep one period from leaking into the next. Level signals or
edge detection on the selected tap would do so in two cases: a match at
count 127 followed by a match at count 0, or a change of the tap select at
the boundary.

An assertion in `dpwm` checks that set and reset never meet except at
dn = 0. The duty command is copied into a shadow register at count 127. A new dn
therefore always starts cleanly with the next period. `syn` is high during
count 0 and can be used to trigger the ADC.

Cycle view, in fast clocks after the counter reaches 0 (edge 0):

    edge 1            dpwm_out rises  (set_pwm)
    edge 8·C          coarse match, C = dn[9:3]
    edge 8·C + F + 1  dpwm_out falls  (tap F = dn[2:0])   -> high for 8C + F = dn clocks

## Clocks

`fre_divider` runs a 10-bit counter on `clk`. Its outputs:

| output | source | rate |
|---|---|---|
| `delay_line_clk` | `clk` itself | clk |
| `dpwm_clk` | bit 2 | clk/8 |
| `clk8` | bit 6 | 8 × f_s |
| `clk4` | bit 7 | 4 × f_s |
| `clk2` | bit 8 | 2 × f_s |
| `clk1` (sample clock) | bit 9 | f_s |

The clk2, clk4 and clk8 outputs drive nothing in this design.

The sample edge falls half a switching period before the DPWM loads a new
duty. The delay from sample to duty is therefore half a period, plus the
pulse itself.

**Clock-rate caveat.** Because the delay line is clocked, the fine step is
one `clk` period. A 1 MHz switching frequency with 10 bits therefore needs
clk = 1.024 GHz, which FPGA fabric cannot reach. The options are:

* run at a lower switching frequency, for example 250 kHz from 256 MHz;
* reduce DL_BITS and DPWM_BITS;
* replace `delay_line` with a chain of placed delay cells. That is
  device-specific and not portable RTL.

The RTL itself is rate-independent: everything scales with clk.

## Closed-loop behaviour

`tb/buck_plant.sv` is a behavioural switching model of the power stage. It
uses the component values above, plus an assumed 50 mΩ switch resistance,
and advances one fast clock per step. Its ADC quantises to 10 mV. With it,
at full size (1024 fast clocks per period):

* The loop starts from 0 V and settles to code 180 (1.8 V) within ±2 codes
  in about 35 periods.
* It handles line steps 5↔4 V and 5↔3.6 V, load steps 0.5↔1 A and
  0.8↔1.5 A, and reference steps.
* Load regulation is exact to one code from 0.5 A to 1.5 A.

`tb_transient_compare` runs the same steps on MA-PID and on the fixed-gain
PID side by side. Recovery means staying within ±20 mV:

| step | MA-PID recovery / peak | PID recovery / peak |
|---|---|---|
| line 5→4 V | 14 µs / 50 mV | 15 µs / 50 mV |
| line 4→5 V | 13 µs / 40 mV | 10 µs / 40 mV |
| load 0.5→1 A | 12 µs / 70 mV | 2 µs / 70 mV |
| load 1→0.5 A | 3 µs / 50 mV | 4 µs / 60 mV |
| load 0.8→1.5 A | 11 µs / 110 mV | 3 µs / 110 mV |
| load 1.5→0.8 A | 20 µs / 80 mV | 4 µs / 80 mV |

In this model the adaptive gains do **not** shorten recovery. Peak
deviations are equal or slightly lower, but recovery is mostly slower. The
reasons:

* Most of the load-step dip is the instantaneous drop across the capacitor
  ESR (0.5 A × 100 mΩ).
* The boosted proportional contribution stays in the accumulator (see the
  gain schedule) and adds overshoot.

The published claims for this controller are 50–80 % shorter recovery than
PID. They come from a different simulation setup and from hardware
measurements, and are not reproduced here. Treat the default Δ gains as a
starting point to tune against your own power stage.

## Where this RTL makes its own choices

The algorithm, the block split, the signal names, the 8-bit ADC / 10-bit
DPWM / 7+3-bit DPWM structure, the gain values and the threshold follow the
published design. The following are choices made here:

* **ADC step.** 10 mV, and the integer gain scaling with FRAC = 8.
* **Clock ratios.** clk1 at f_s, dpwm_clk = clk/8, delay line on clk.
* **Gain products.** Multipliers instead of a stored look-up table. The
  gains change every sample, so a fixed table cannot hold the products.
* **Threshold and sign tests.** The sources disagree: `>=` against `>` for
  the threshold, and `<0` against `<=0` for the sign change. This RTL uses
  `>=` and `<0`.
* **ΔKi2.** The values −0.02 and −0.07 both appear; −0.02 is used.
* **Derivative term.** It uses Kd (+γ). One printed form of the law shows
  Kp there, which is taken as a typo.
* **Error sign.** e = vref − vo.
* **Reset.** Active-low, asynchronous, clearing all state to zero.
* **Duty limits.** Clamped to the full DPWM range. No maximum-duty limit or
  soft start is built.
* **DPWM output stage.** Strobe-gated single pulses, reset priority, and the
  shadow register for dn.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. Build and run one with plain Verilator, for example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/mapid_pkg.sv tb/tb_mapid_top.sv \
          --top-module tb_mapid_top -o sim && ./obj_dir/sim
```

| testbench | what it checks |
|---|---|
| `tb_mapid_top` | Full-size closed loop, about 1 s of CPU time. Exact pulse widths and 1024-clock periods. Settling after start-up, line, load and reference steps. Every adaptation state and the duty limit occur. |
| `tb_transient_compare` | MA-PID against PID on the line and load steps, plus load regulation. |
| `tb_compensator` | dn after every sample against a direct velocity-form model, with all four states and both limits. |
| `tb_ma_pid_adapt` | state and gains against a real-arithmetic model of the rules |
| `tb_dpwm` | on-time = dn for boundary values (0, 1, 7, 8, 1023, 1023→0, 1023→5) and random values |
| `tb_fre_divider`, `tb_error_calc`, `tb_coef_lut`, `tb_d_correction`, `tb_dn_output`, `tb_counter_7bits`, `tb_comparator_7bits`, `tb_delay_line`, `tb_mux8to1` | one block each |

To try other gains, override the parameters of `mapid_top`, as
`tb_transient_compare` does for the PID loop. To try another power stage,
change the parameters of `buck_plant`. Verilator is two-state, so every
testbench gives the reset a real falling edge or a clock edge while it is
held low.
