# 8-bit PWM DAC and ramp ADC

This design measures an analog voltage using little more than two counters and
a comparator. The digital side produces a pulse-width-modulated (PWM) signal,
and an RC low-pass filter turns it into a voltage. That makes a digital-to-
analog converter (DAC). When the DAC is stepped through all 256 codes, the
filtered voltage is a repeating ramp, a sawtooth. An analog comparator
compares the ramp with the voltage being measured. The code on the ramp at
the moment the comparator output rises is the analog-to-digital (ADC) result.
It is shown as two hex digits on an LED display.

The logic is written for a small CPLD. Outside the CPLD there are only
passive parts and one comparator:

```
             +---------------- lab8 (CPLD) -----------------+
             |  pwm_dac          sawtooth_gen    adc_capture |
  clk ------>|  count 0..255 --> dac 0..255 ---> value ------+--> adc_value
             |     |  period_end   |  (= n)        ^         |     (to display)
             |     v               v               |         |
             |  pwm = count < n <--+        sync + rise      |
             +-----|--------------------------------^--------+
                   | pwm                            | over (pull-up)
                 R 1k                               |
                   +---- C 10n ---> IN+ [comparator]-+
                                    IN- <--- input voltage (potentiometer)
```

## How a conversion works

* **PWM DAC (`pwm_dac`).** An 8-bit counter runs freely from 0 to 255. The
  output is high from count 0 up to the DAC value `n` and low for the rest
  of the period. The duty cycle is therefore n/256, and after filtering the
  voltage is n/256 of the output high level (3.3 V). A period is 256 clocks.
* **Sawtooth (`sawtooth_gen`).** A second 8-bit counter, `dac`, supplies
  `n`. It steps by one each time the PWM counter is at 255 and wraps from 255
  to 0. The filtered output climbs through 256 steps and then drops back: one
  ramp lasts 256 × 256 = 65,536 clocks.
* **Capture (`adc_capture`).** The comparator output `over` is high while
  the ramp at IN+ is above the input at IN−. As the ramp passes the input,
  `over` rises, and `dac` is stored at that moment. The stored value is the
  conversion result. It is refreshed on every ramp.

The conversion takes one ramp, so the sample rate is f_clk / 65,536. The
ideal transfer function is code = 256 × V_in / V_OH. With V_OH = 3.3 V, one
code is 12.9 mV.

## Where the result departs from the ideal

This is the part of the design that needs the most care, because the digital
logic is exact but the result is not. Three analog effects shift the code:

1. **Ripple.** The filter averages the PWM pulses only partly. With
   R = 1 kΩ and C = 10 nF, RC is 10 µs. At a 50 MHz clock the PWM period is
   5.12 µs, so the ripple at mid-scale is about 0.4 V, or 30 codes
   peak-to-peak. Near the threshold the ripple peaks cross the input before
   the average does. `over` then toggles once per PWM period, and every rise
   triggers a capture. The last capture of a ramp comes when the ripple
   troughs clear the input. The displayed result therefore lies about half a
   ripple, roughly 5 to 20 codes, above the ideal code.
2. **Lag and the wrap.** The filter lags the ramp by about RC. After the wrap
   from 255 to 0 it needs a few time constants to discharge. An input lower
   than the lowest point the filter reaches after the wrap never sees
   `over` fall and rise again. That input gets no new result, and the display
   keeps its old value. In the simulated circuit this happens for 0 V.
3. **Output levels and the comparator's range.** The real output swings
   between V_OL and V_OH, not exactly 0 V and 3.3 V, which scales and offsets
   the ramp. The comparator (LM2903 class) is specified only for inputs up to
   its supply minus 2 V, so inputs above about 3 V are unreliable on a 5 V
   supply. Neither effect is modelled.

The clock rate sets the balance between the first two effects. A faster clock
shortens the PWM period and reduces ripple, but makes the ramp steeper, so
the lag in codes grows as RC / (256 × T_clk). The RTL itself does not depend
on the clock rate.

The system testbench reproduces these effects and checks them against an
independent model. The model uses an ideal PWM wave, the same RC filter and
an ideal comparator, and ignores effect 3. At 50 MHz it gives:

| Input (V) | Ideal code | Simulated result |
|-----------|-----------:|-----------------:|
| 0.00 | 0   | no conversion (below the post-wrap minimum) |
| 0.49 | 38  | 49 (0x31) |
| 1.00 | 78  | 94 (0x5e) |
| 1.50 | 116 | 135 (0x87) |
| 2.00 | 155 | 172 (0xac) |
| 2.49 | 193 | 206 (0xce) |
| 3.00 | 233 | 239 (0xef) |

Over one ramp the filtered sawtooth averages 1.644 V with 0.932 V RMS AC.
An ideal 0–3.3 V sawtooth gives 1.65 V and 0.95 V.

## Modules

All modules have a `WIDTH` parameter, default 8. Reset is asynchronous and
active low, and everything runs on the single clock `clk`.

| Module | Role | Interface |
|--------|------|-----------|
| `lab8` | top level: the three blocks below, wired as in the diagram | `clk`, `rst_n`, `over` in; `pwm`, `adc_value`, `adc_valid`, `ramp`, `ramp_wrap` out |
| `pwm_dac` | period counter and PWM output | `n` in; `pwm`, `period_end` out |
| `sawtooth_gen` | the `dac` ramp counter | `step` in; `dac`, `wrap` out |
| `adc_capture` | synchronizer, rising-edge detector and result register | `over`, `dac` in; `value`, `valid` out |

Timing details that the plain description leaves open, and the choices made
here:

* **`pwm` is registered.** It equals `count < n` for the counter and `n` of
  the previous clock, so it runs one cycle behind the counter. The sawtooth
  counter steps on the same edge where the PWM counter wraps to 0. Because of
  the one-cycle delay, the new value governs the whole next period, and every
  period has exactly `n` high cycles. A glitch-free flip-flop drives the pin.
* **`over` is asynchronous.** It comes from an analog comparator.
  `adc_capture` passes it through two synchronizing flip-flops and compares
  it with the previous level. When it sees a rise, it loads `dac` on the
  next clock. `value` therefore updates 2–3 clocks after `over` rises, and
  `valid` pulses for one cycle at the same time. The alternative is to clock
  a register directly with `over`. That would capture with no delay, but it
  adds a second clock domain and makes the design sensitive to glitches on
  `over`.
* **`ramp` and `ramp_wrap`** are brought out for observation. `ramp_wrap`
  marks the start of each conversion.

## What is outside the RTL

* **LED display.** This is a separate multiplexed two-digit hex display
  driver. Connect `adc_value` to it. `adc_valid` can serve as a load strobe,
  but the display can equally sample `adc_value` continuously.
* **Pull-up on `over`.** The comparator has an open-collector output, so the
  pin that receives `over` must have its weak pull-up enabled. That is a pin
  setting in the device constraints, not logic.
* **Analog parts.** The RC filter (1 kΩ, 10 nF), the comparator and a 5 kΩ
  potentiometer that sets the input voltage. The testbench models the filter
  and the comparator in `tb/rc_filter_model.sv` and `tb/comparator_model.sv`.
  These models are not synthesizable.

A note on the filter: the component values give RC = 10 µs. The design's
original description also quotes RC = 100 µs, which would correspond to
C = 100 nF. The filter model follows the component values. Its
`R_OHM`/`C_FARAD` parameters change it. A 100 µs filter cuts the ripple by a
factor of ten but raises the lag to about 20 codes at 50 MHz.

## Simulation

Each testbench checks itself and prints `TB_RESULT checks=N failures=M`. With
Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module lab8_tb \
    rtl/pwm_dac.sv rtl/sawtooth_gen.sv rtl/adc_capture.sv rtl/lab8.sv \
    tb/rc_filter_model.sv tb/comparator_model.sv tb/lab8_tb.sv
./obj_dir/Vlab8_tb
```

The block testbenches build the same way from their module and testbench:

* `tb/pwm_dac_tb.sv` checks every output cycle against `count < n`, the
  period flag, and the duty cycle at corner values (0, 1, 127, 128, 255),
  at random values and with mid-period changes.
* `tb/sawtooth_gen_tb.sv` drives random and back-to-back steps and checks the
  count and the wrap flag across several wraps.
* `tb/adc_capture_tb.sv` drives random pulses, some only one cycle long,
  between clock edges. It changes `dac` every cycle, so the testbench checks
  the exact capture cycle and value. It also checks that `value` holds
  between edges and that falling edges capture nothing.
* `tb/lab8_tb.sv` runs the whole loop at default parameters with a 50 MHz
  clock. It checks each PWM period's duty against the ramp value, the ramp
  steps and wraps, that every capture follows a rise of `over`, the
  sawtooth's DC and AC levels, and the conversion result for ten input
  voltages. It takes about one second.
