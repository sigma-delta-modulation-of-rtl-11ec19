# Sigma-delta modulated multi-phase converter controller

Very-high-frequency resonant converters (class E, class Φ2, switching around
10 MHz) do not take well to pulse-width modulation: their waveforms depend on
a fixed duty cycle. They can, however, be started and stopped almost
instantly. This controller regulates a bank of P such converters connected in
parallel by deciding, once per sample, **how many** of them run (a sigma-delta
modulator) and **which** ones (a balancer). With q of P phases on, the
effective duty ratio of the bank is q/P. A PI loop sets the demanded duty
ratio from the output voltage.

The default build is an eight-phase controller: a 12-bit command, a 3-bit
modulator output and eight enable lines, clocked from 24 MHz with one sample
every 13 clocks (about 1.85 MHz).

```
            M bits            N bits              P = 2**N lines
 vref ─►┌────┐  cmd  ┌──────────┐  y  ┌──────────┐  en  ┌──────────────┐
 vout ─►│ PI │──►mux─►│ sigma-   │────►│ balancer │─────►│ P converter  │─► Vout
        └────┘   ▲   │ delta    │     │ (ring)   │      │ phases (ext.)│
       ext_cmd ──┘   └──────────┘     └──────────┘      └──────────────┘
                 closed_loop
  clk ─► sample_clock_divider ─► sample strobe (clock enable for all stages)
```

## The balancer: a rotating window on a ring of phases

This is the part that makes the scheme work for many phases, and the least
obvious one.

A plain thermometer code (phases 0 … y−1 on) would leave phase 0 on almost
always, phase P−1 almost never, and a few phases in the middle toggling at
the full sample rate. Instead the phases sit on a ring. A `rotation` register
marks where the ring starts, and phase *i* is enabled when

    (rotation + i) mod P  <  y

so exactly *y* neighbouring phases are on, starting at ring position
`P − rotation`. Every `divider + 1` samples the rotation register advances by
one, moving the window by one phase. Over one full turn of the ring
(P·(divider+1) samples) every phase spends the same number of samples inside
the window. All phases therefore get the same long-term duty ratio and, over
time, the same switching frequency.

Example, P = 8, y = 3:

| rotation | on phases |
|---|---|
| 0 | 0, 1, 2 |
| 1 | 7, 0, 1 |
| 2 | 6, 7, 0 |

`divider` trades switching frequency against ripple. A longer rotation period
lets a phase stay on for a longer stretch, so each phase switches less often.
Measured with a sine-varying command (`rotation_sweep_tb`), the mean
per-phase switching frequency falls from 0.125 to 0.045 of the sample rate
as the period grows from 1 to 8 samples. The phases stay within 0.5 % of each
other. A period of one sample gives an almost exactly uniform rate. Setting
`divider = 1` (rotate every other sample) is the setting used in the
four-phase configuration.

The enable outputs are combinational in `y` and the registered `rotation`.
Because `y` has N bits, at most P−1 phases are on together. A concurrent
assertion in `balancer.sv` checks that the number of enables always equals
`y`.

## The sigma-delta modulator

The command is M bits wide but the phase count only N bits, so the spare
M−N bits must be carried in time. The modulator is first-order:

    x_sat = min(x, (2**N − 1) · 2**(M−N))          input saturation
    y     = acc >> (M−N)                           quantiser (right shift)
    acc  <= sat(acc + x_sat − (y << (M−N)))        integrator, unit delay

`acc − (y << (M−N))` is just the low M−N bits of the accumulator. Those bits
are the quantisation error, and they are added to the next sample. The
long-term average of `y` is thus exactly `x / 2**(M−N)`, so the bank's
duty ratio is `x / 2**M`. For a constant command, `y` alternates between the
two codes on either side of `x / 2**(M−N)`.

Example with the four-phase build (M = 12, N = 2): an analog command of
1.49 V on a 3.3 V, 12-bit scale is code 1849. The modulator then alternates
between one and two active phases, with a mean of 1849/1024 = 1.806 phases,
a duty ratio of 0.451.

The input limit (P−1 phases on average) is this implementation's choice.
With it, the accumulator can never leave `[0, 2**M − 1]`, so the accumulator
saturation is only a guard. `y` is registered: a sample's command shows up
in `y` one clock after that sample's strobe.

## The PI voltage regulator

`pi_controller` is a parallel-form PI with unsigned Q8.8 gains (`kp`, `ki`
are ports):

    e      = vref − vmeas
    integ  = clamp(integ + ki·e, 0, (2**M − 1)·2**8)
    u      = clamp((kp·e + integ) >> 8, 0, 2**M − 1)

The integrator clamp is an anti-windup measure. `sat_hi`/`sat_lo` report
clamping of the output. The regulator structure, gain format and limits are
this implementation's choices. The original method only calls for a PI loop
with a 12-bit output.

## Clocking, timing and reset

* One clock domain. `sample_clock_divider` makes a one-cycle `sample` strobe
  every `CLK_DIV` clocks (24 MHz / 13 ≈ 1.846 MHz). Every stage uses this
  strobe as its clock enable.
* On strobe *k* the PI registers a new command from the current
  `vout_code`. On strobe *k+1* the modulator accumulates it. One clock later
  `y`, the rotation and the enables change. From a voltage sample to the
  enables is therefore one sample period plus one clock.
* Reset `rst_n` is asynchronous and active low in every block. It clears the
  integrator, the accumulator, the rotation and the counters, so all enables
  are off.

## Top level `sdm_multiphase_ctrl`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, async active-low reset |
| `closed_loop` | in | 1 | 1: PI output drives the modulator; 0: `ext_cmd` does |
| `ext_cmd` | in | M | open-loop command (ADC code of an analog command) |
| `vout_code` | in | M | ADC code of the output voltage |
| `vref_code` | in | M | reference in the same scale |
| `kp`, `ki` | in | 16 | PI gains, Q8.8 |
| `divider` | in | 4 | ring rotates every `divider+1` samples |
| `sample` | out | 1 | sample strobe |
| `cmd` | out | M | command into the modulator |
| `pi_sat` | out | 1 | PI output clamped (closed loop) |
| `y` | out | N | phases on |
| `en` | out | P | phase enables |

| parameter | default | meaning |
|---|---|---|
| `M` | 12 | command and ADC width |
| `N` | 3 | modulator output width; P = 2**N phases |
| `CLK_DIV` | 13 | clocks per sample |
| `DIV_W` | 4 | width of the rotation divider |

The four-phase configuration is `N = 2`. The ADC and the converter phases
are outside the controller: the ADC results arrive as `vout_code` /
`ext_cmd`, and `en` drives the phases' enable inputs.

Files: `rtl/sdm_pkg.sv` (defaults and the input-limit function),
`rtl/sample_clock_divider.sv`, `rtl/pi_controller.sv`, `rtl/sigma_delta.sv`,
`rtl/balancer.sv`, `rtl/sdm_multiphase_ctrl.sv`.

## Verification

Each testbench checks itself and ends by printing
`TB_RESULT checks=N failures=F`. Each also has a watchdog.

* `balancer_tb`: checks every enable vector against a reference ring model
  (N = 3 and N = 2), with random commands, dividers and update pulses. It
  also checks the rotation period and that each phase gets exactly
  y·(divider+1) on-samples per ring turn.
* `sigma_delta_tb`: compares every output with an integer model and checks
  the running-sum error bound. It checks that a constant input gives two
  adjacent codes and that the output holds without a strobe. For the 1.49 V
  four-phase point, the mean over 1024 samples is 1849/1024.
* `pi_controller_tb`: compares every output and saturation flag with a
  64-bit model, using random gains. It also checks the integral ramp up to
  saturation.
* `sample_clock_divider_tb`: checks the strobe period, the strobe width and
  the first strobe after reset.
* `sdm_multiphase_ctrl_tb` (default parameters, end to end): closes the
  loop through `tb/phi2_plant_model.sv`. That model treats each enabled phase
  as a 60 mA current source into 40 µF with a 60 Ω load and a 20 V ADC scale;
  all of these values are illustrative. The test covers:
  * Start at 14.4 V with an empty integrator: the output dips on start-up,
    then regulates to 14.4 V (mean within 0.5 %).
  * A reference step to 17 V saturates the PI output, then the loop settles.
  * Switch to open loop with code 1849: each phase's duty ratio is
    1849/4096, y toggles between 3 and 4, and all phases switch at equal
    rates.
  * An over-range command pins y at 7.

  The test counts PI saturation, modulator input saturation, ring rotation,
  adjacent-code toggling and the mode switch, and requires each of them to
  occur.
* `four_phase_experiment_tb` (N = 2, divider = 1): runs commands of 1.0,
  1.49 and 2.0 V on a 3.3 V scale. It checks that each phase's duty ratio is
  V/3.3 within 0.005 and that the spread between phases is below 0.005. It
  prints the switching frequency.
* `rotation_sweep_tb` (defaults): eight phases, sine command, rotation
  period 1 to 8 samples. It checks equal duty, a frequency spread below 2 %,
  and that the frequency falls as the period grows.

Each block's testbench has been shown to fail against a deliberately broken
copy of its block. The breaks were: a frozen rotation, a modulator without
error feedback, a PI without an integrator, a strobe one clock early, and
swapped loop modes.

Simulating with Verilator 5, for example the end-to-end test:

```
verilator --binary --timing --assert -Irtl rtl/sdm_pkg.sv rtl/*.sv \
    tb/phi2_plant_model.sv tb/sdm_multiphase_ctrl_tb.sv \
    --top-module sdm_multiphase_ctrl_tb
./obj_dir/Vsdm_multiphase_ctrl_tb
```

Lint: `verilator --lint-only -Wall rtl/sdm_pkg.sv rtl/*.sv --top-module
sdm_multiphase_ctrl`. Verilator reports the package defaults as unused
parameters when a module is linted alone. It also flags `rst_n` as used both
asynchronously and in the assertion's `disable iff`; both warnings are
harmless.

## Departures, limits and open points

* **Rotation period granularity.** The divider counts whole samples, so the
  ring can rotate only every 1 … 16 samples. Fractional periods (for example
  every 1.5 samples) would need the balancer to count a faster strobe, and
  are not provided.
* **Switching frequency in the four-phase case.** With `divider = 1` at
  1.49 V, this design's enables have a mean edge rate of about 276 kHz at a
  1.85 MHz sample rate, with individual periods between 3 and 8 samples. A
  bench measurement of the original four-phase hardware quoted about
  154 kHz. The setting and measurement method behind that figure are not
  known well enough to reproduce it, so the testbench only checks that the
  rate is well below the sample rate.
* **Sample rate.** Two sample rates appear for the eight-phase study:
  1 MHz and 100 kHz. The RTL has no fixed rate; it is the clock frequency
  over `CLK_DIV`.
* **Own choices where the method is silent:** the PI structure, gain format
  and anti-windup; the modulator's saturation limits; the clock-enable
  realisation of the divide-by-13; the open/closed-loop multiplexer; and the
  reset behaviour of the blocks other than the balancer.
* **Not included:** the AD7276 ADC and its serial interface (the controller
  takes 12-bit codes), and the class Φ2 power stages (analog; modelled only
  in the testbench). Higher-order modulators are possible in principle but
  are not built.
* The bench relation between command and duty ratio had a small offset,
  attributed to wiring. The RTL is exact: duty = code/4096.
