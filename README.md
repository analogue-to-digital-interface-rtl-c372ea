# One-bit delta-sigma feedback for a digital buck-converter controller

A digital controller for a DC-DC converter needs the converter's output voltage
as a number. The usual way is a flash ADC, and a flash ADC is a large analogue
block that eats most of the benefit of doing the controller in logic. This
design replaces it with a **first-order delta-sigma modulator** that delivers
**one bit per sample**. The bit is fed straight into an **integral control law**,
an up/down counter on the PWM duty command, and a **counter-based digital PWM**
drives the power switches at 500 kHz.

The idea follows the letter *"Analogue-to-digital interface technique for
digital controllers in DC-DC converters"*. That letter gives the modulator
structure, the integral control law and its gain, the switching frequency and
the measured step responses. It gives no widths, clock rates or element
values. Every number below that is not in the list under
[What comes from the source and what does not](#what-comes-from-the-source-and-what-does-not)
is this design's own choice.

```
             +------------------ dsm_dcdc_controller (the chip) ------------------+
 vref ------>| vin_p                                                              |
             |  dsm_first_order --dsm_bit--> integral_controller --duty--> dpwm --|--> pwm --> power stage --> L --+--> vout
 vout --+--->| vin_n      ^                        ^                               |                                C|
        |    |            +------ sample_en -------+---- tick_gen                  |                                 |
        |    +--------------------------------------------------------------------+                                 |
        +-----------------------------------------------------------------------------------------------------------+
```

## Why one bit is enough: the loop as a whole

The modulator does not measure `vout`. It measures the **error** `vref - vout`,
and its bit stream has an average proportional to that error (over a
±`DSM_VFS_V` full scale). The quantisation error of a single bit is huge, but a
first-order modulator shapes it. Its noise transfer function is `1 - z^-1`:
zero at DC and rising with frequency. The signal passes with only a one-sample
delay (`z^-1`).

The integral controller is the low-pass filter that removes the shaped noise.
Every sample moves the duty command by exactly one LSB, up for a 1 and down for
a 0. Averaged over many samples, the duty therefore slews at

    d(duty)/dt = (Δd / T_cnt) · mean(±1 bits) = (Δd / T_cnt) · (vref − vout) / VFS

so the controller is a continuous-time integrator `K/s` with `K = Δd / T_cnt`.
Here Δd is the PWM duty resolution (1/256) and `T_cnt` is the integrator clock
period (2 µs). There is no decimation filter and no multi-bit arithmetic: the
whole "ADC plus compensator" is a 1-bit comparator and an 8-bit up/down counter.

The loop crossover is about `Vin · Δd / (T_cnt · VFS)`. With a 3.3 V input this
is 3.3 · (1/256) / (2 µs · 0.75 V) ≈ 8.6·10³ rad/s, about 1.4 kHz. An
integral-only loop around an LC filter has −270° of phase at the LC resonance.
The loop is stable only if the loop gain there is below one. That holds when
the resonance is well above the crossover and the filter is damped, by its
ESR, its winding resistance and the load. So `SAMPLE_DIV` and `DSM_VFS_V` are
really loop-gain knobs: halving either doubles the crossover. A lightly damped
filter (for example 10 µH, 40 µF, 20 mΩ ESR) oscillates at its resonance when
`SAMPLE_DIV` is 256 and `DSM_VFS_V` is 0.5 V. Retune both for a different power
stage.

Two large-signal limits follow from the one-LSB-per-sample rule:

* **Slew limit.** The duty can move at most one LSB per `T_cnt`. A 1.5 V → 2.0 V
  reference step at 3.3 V input needs 39 LSBs, so it takes at least 78 µs,
  whatever the loop gain.
* **Modulator overload.** An error beyond ±`DSM_VFS_V` (at start-up, or when
  `vref` exceeds what the input can deliver) makes the bit stream all ones or
  all zeros. The modulator integrator then clamps at ±`DSM_VSAT_V`, so it
  recovers within a few samples once the error is back in range.

## Blocks

### `dsm_first_order`: the delta-sigma modulator (behavioural model)

On silicon this is an analogue switched-capacitor circuit, so the RTL is a
**behavioural model**: its state is a `real` and it is not synthesizable. Each
`sample_en` strobe does

    u[n+1] = clamp( u[n] + (vin_p − vin_n)[n] − (y[n] ? +VFS : −VFS), ±VSAT )
    y[n]   = u[n] > 0            (comparator against ground, combinational)

The comparator looks at the delayed integrator state. The output therefore
reflects inputs up to the previous sample, and `STF = z^-1`, `NTF = 1 − z^-1`.
Voltages enter as signed 24-bit integers in microvolts (`dcdc_pkg::volt_uv_t`,
±8.38 V), so the model has ordinary two-state ports. Reset clears `u`, so the
first bit after reset is 0. To tape out, replace this module with the analogue
macro. The ports are the macro's: a clock with a sample enable, a differential
input and one bit out.

### `tick_gen`: integrator clock

A modulo-`DIV` counter gives a one-cycle `tick` on its last count. This strobe
is both the modulator's sampling clock and the integrator's update clock, so
`f_s = 1/T_cnt`. With `DIV = 256` and both counters starting at reset, the
strobe falls on the last clock of every PWM period. Every sample is taken at
the same point of the switching ripple. This gives a small, constant offset in
the regulated voltage that depends on the ripple shape: about +10 mV in the
test converter.

### `integral_controller`: the control law

An 8-bit up/down register, updated only on `sample_en`. It saturates at
`DUTY_MIN`/`DUTY_MAX` (default 0 and 255). `at_max`/`at_min` flag a sample whose
step was blocked by a limit. Reset loads `DUTY_INIT` (0), which gives a natural
soft start: the output ramps up at the slew limit.

### `dpwm`: PWM duty control

A free-running 8-bit counter at 128 MHz sets a 256-clock period = 500 kHz.
`pwm` is high while `counter < duty`, so duty 0 is always off and 255 is
255/256 on. The duty input is latched when the counter is 0 (`period_start`).
A change in mid-period never shortens or splits a pulse. `pwm` is registered and
lags the counter by one clock. Because the integrator updates on the clock after
the sample strobe, which is the clock where the counter is 0, each new duty value
applies to the very next switching period.

### `dsm_dcdc_controller`: the controller

Wires the four blocks together: `vin_p = vref`, `vin_n = vout`. It brings out
`pwm` and, for observation, the bit stream, the sample strobe, the duty command,
the period start and the limit flags.

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk` | in | 1 | system clock, 128 MHz for 500 kHz switching |
| `rst_n` | in | 1 | asynchronous, active low |
| `vref` | in | 24 | reference voltage, signed µV |
| `vout` | in | 24 | converter output voltage, signed µV |
| `pwm` | out | 1 | gate drive for the power stage |
| `period_start` | out | 1 | first clock of each switching period |
| `sample_en` | out | 1 | modulator sample / integrator update strobe |
| `dsm_bit` | out | 1 | modulator output (1: vref above vout on average) |
| `duty` | out | `DUTY_BITS` | duty command |
| `duty_at_max`, `duty_at_min` | out | 1 | integrator held at a limit this sample |

| Parameter | Default | Effect |
|---|---|---|
| `DUTY_BITS` | 8 | PWM resolution Δd = 2^-DUTY_BITS; period = 2^DUTY_BITS clocks |
| `SAMPLE_DIV` | 256 | T_cnt in clocks (2 µs = one switching period) |
| `DSM_VFS_V` | 0.75 | modulator feedback level, V; sets the error full scale and the loop gain |
| `DSM_VSAT_V` | 1.5 | modulator integrator clamp, V |

Everything in `pwm`'s path is synthesizable. In the top, only the modulator
model is not.

## What comes from the source and what does not

From the letter:

* the modulator topology: two summers, a unit delay, and a comparator to ground
  with the output fed back negatively;
* feeding the modulator the error between reference and output;
* replacing the ADC by the modulator;
* an integral control law with gain Δd/T_cnt;
* a PWM generator with duty resolution Δd;
* 500 kHz switching;
* the test conditions: load 75 → 275 → 75 mA, reference 1.5 → 2.0 → 1.5 V, and
  recovery in about 300 µs.

This design's own choices:

* one duty LSB per modulator bit, with no decimator;
* modulator sampled once per switching period (f_s = 500 kHz);
* an 8-bit counter-comparator DPWM at 128 MHz, with the duty latched at period
  start;
* saturation limits and the soft-start reset value;
* the microvolt port encoding;
* VFS = 0.75 V and VSAT = 1.5 V;
* all reset behaviour.

The letter's controller logic follows an earlier design that it does not
describe, so this RTL may differ in detail from the measured chip. Examples are
a decimator, or an integrator clock that is not tied to the switching period.
The power stage and the LC filter are off-chip analogue parts. They exist here
only as a testbench model.

## Verification

Each testbench is self-checking and prints `TB_RESULT checks=N failures=M`.

* `tb_dsm_first_order`: compares every output bit with an integer-µV reference
  of the same loop, including overload into the clamp. Where the reference
  state is within 10 µV of zero, the floating-point model may round either way,
  and the reference takes the model's decision. For every in-range constant
  input it checks that the bit stream's average matches the input to within the
  integrator swing. This is the first-order shaping property: zero quantisation
  error at DC.
* `tb_tick_gen`: strobe spacing for the default divider and for `DIV = 5`.
* `tb_integral_controller`: random bits and strobes against a reference
  counter, for the default instance and a 4-bit instance with limits 2..13.
  Both limits and both flags are exercised.
* `tb_dpwm`: high-time per period for 40 duty values, including 0 and 255, with
  the duty input disturbed in mid-period. Also checks the 256-clock period.
* `tb_dsm_dcdc_controller`: the whole controller at default parameters, closed
  around `buck_plant` (3.3 V in, 4.7 µH, 22 µF, 50 mΩ ESR and inductor
  resistance, resistive load). It steps the load 75 → 275 → 75 mA at 1.5 V and
  the reference 1.5 → 2.0 → 1.5 V, then drives `vref` above the input to
  saturate the duty. It checks:
  * regulation: the 100 µs average is within 20 mV of `vref`;
  * recovery: within 40 mV, period-averaged, no later than 300 µs after each
    step;
  * the 256-clock period and sample spacing;
  * that every duty change is ±1 LSB in the direction of the bit, on the clock
    after a sample;
  * that each mechanism happened at least once: ones, zeros, up- and
    down-steps, both integrator limits, modulator clamp, and both kinds of
    step.

  Typical results are recovery in 120 µs (load up), 26 µs (load down), 280 µs
  (reference up) and 300 µs (reference down). The regulated level sits about
  +10 mV high because of the sampling phase. The reference-down step settles
  right at the 300 µs limit. The plant values were picked for this controller
  and are not measured ones.

* `tb_loop_response`: the same closed loop, measuring the reference-to-output
  transfer function. It uses a 1.5 V ± 50 mV sine on `vref` and correlates the
  output with sin/cos over whole periods. Measured gains are −0.05 dB at
  100 Hz, −0.26 dB at 300 Hz, −7 dB at 3 kHz and −37 dB at 40 kHz. At a
  constant reference, the period-averaged output wanders by 13 mV RMS, while
  the modulator's own error is ±0.75 V. What remains is mostly the
  one-LSB duty dither: 12.9 mV at 3.3 V input, because an up/down integrator
  fed by a bit stream never stands still.

Each end-to-end simulation takes a few seconds at most.

## Simulating

Every testbench builds with plain Verilator 5. The package goes first and the
rest is found through `-I`:

```
verilator --binary --timing -Irtl -Itb rtl/dcdc_pkg.sv tb/tb_dsm_dcdc_controller.sv \
          --top-module tb_dsm_dcdc_controller
./obj_dir/Vtb_dsm_dcdc_controller
```

Swap in `tb_loop_response` for the frequency-response run, or
`tb_dsm_first_order`, `tb_tick_gen`, `tb_integral_controller` or `tb_dpwm` for
the block tests. To try another power stage, change the parameters
of `buck_plant` in the end-to-end testbench. To retune the loop, override
`SAMPLE_DIV` and `DSM_VFS_V` on `dsm_dcdc_controller`. Keep the crossover well
below the LC resonance.

## Files

* `rtl/dcdc_pkg.sv`: voltage type and default sizes.
* `rtl/dsm_first_order.sv`: modulator (behavioural).
* `rtl/tick_gen.sv`: integrator clock.
* `rtl/integral_controller.sv`: control law.
* `rtl/dpwm.sv`: PWM.
* `rtl/dsm_dcdc_controller.sv`: top.
* `tb/buck_plant.sv`: buck power stage, LC filter and load, as a model.
* `tb/tb_*.sv`: testbenches.
