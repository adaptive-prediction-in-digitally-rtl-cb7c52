# Adaptive-prediction digital controller for a 1 MHz buck converter

A digitally controlled switching regulator loses phase margin to delay. The
error voltage is sampled, converted, filtered and only then turned into a
pulse edge. Together with the sample-and-hold action of the ADC and the PWM,
the loop lags by roughly

    phi = 2*pi * (f_UGF / f_s) * (D + 1/N)

where D is the duty ratio, f_s the switching frequency and T_s/N the delay
from the sampling instant to the modulating edge. For D = 0.5, a delay of half
a period and f_UGF = f_s/10, that is 36 degrees. Sampling faster helps, but it
lets in switching noise and costs power.

This controller cancels most of that delay. It does not sample faster. Each
sample, it predicts what the error will be at the *next* sampling instant and
feeds that prediction to the compensator. The prediction is a linear
extrapolation from the last two samples, plus a small self-training
correction. The correction uses how wrong the previous prediction was, so the
extrapolation slope adapts during a load transient. In steady state the
correction switches off. The predictor needs no model of the power stage.

The RTL implements the controller of the voltage-mode synchronous buck
converter described in *Adaptive Prediction in Digitally Controlled Buck
Converter with Fast Load Transient Response* (COMPEL 2012). The operating
point is 3 V in, 1.8 V out, 4.7 uH, 4.7 uF and up to 600 mA, switching at
1 MHz and sampling at 2 MHz. The transfer functions and rates come from that
design. Word lengths, thresholds, the DPWM and the interfaces are this
implementation's own choices; each is listed below.

## Signal chain

```
            adc_start (2 MHz)                                              pwm (1 MHz)
   +---------------------------------------------------------------------------+----> gate driver
   |                                                                           |
  ADC --adc_code/adc_valid--> error_sub --e[n]--> adaptive_predictor --e^[n+1]--> iir_comp --duty--> dpwm
   ^                            ^ vref              (two-tap FIR)                (three-tap IIR)
   |                                                                           
 Vfb (divided output voltage)
```

| stage | module | function | latency |
|---|---|---|---|
| error node | `error_sub` | e[n] = Vref - Vfb, 9-bit signed | 1 clock |
| predictor | `adaptive_predictor` | e^[n+1] = a0*e[n] - e[n-1], with a0 adapted in 1.75 .. 2.25 | 1 clock |
| compensator | `iir_comp` | (9.166 - 16.69 z^-1 + 7.582 z^-2) / (1 - 1.516 z^-1 + 0.5156 z^-2) | 1 clock |
| modulator | `dpwm` | trailing-edge PWM, 256 counts per period; also generates `adc_start` | 1 clock to hold |

`buck_dctrl_top` wires these in order. The DPWM holds a new duty 4 clocks
(15.6 ns at 256 MHz) after the ADC's `adc_valid`. That is small next to the
500 ns sampling period, so almost all of the loop delay is the ADC's
conversion time. The ADC, gate driver, power stage and feedback divider are
analog and are not part of the RTL. Their connections are the top's ports.

Everything runs on one clock. The DPWM counter divides it by 256 to give the
1 MHz switching period. It issues `adc_start` at the period start and at
mid-period, for an oversampling ratio of two.

## The adaptive predictor

This is the part of the design that needs the most explanation.

For each error sample e[n] (an integer in ADC LSBs):

```
de[n]      = e[n] - e^[n]                       error of the previous prediction
m          = min(|de[n]|, |e[n]|, DE_MAX)        bounded magnitude
k          = 2 if |de| < TH_K3,  3 if |de| < TH_K4,  4 otherwise
c[n]       = 0                                   if |de| < EPS or adapt_en = 0
           = sign(de[n]) * m / 2^k               otherwise
e^[n+1]    = 2 e[n] - e[n-1] + c[n]
```

Defaults: EPS = 2, TH_K3 = 16, TH_K4 = 32, DE_MAX = 64 (all in LSBs).

- **Why the bound |e[n]|.** The correction acts as a modulation of the first
  tap: e^[n+1] = a0*e[n] - e[n-1] with a0 = 2 + c[n]/e[n]. With k >= 2 and
  m <= |e[n]|, |c| <= |e|/4, so a0 stays within 1.75 .. 2.25. That is the
  range over which the loop was shown to stay stable: phase margin 63.5 deg
  at a0 = 1.75 and 56.8 deg at a0 = 2.25; gain margin 18.1 dB and 16.9 dB;
  crossover at f_s/11 and f_s/8. DE_MAX is a second, fixed ceiling.
- **Why the threshold.** Below EPS the loop is taken to be in steady state.
  The stage is then exactly the fixed extrapolator 2 - z^-1, which adds a
  high-frequency zero that offsets the compensator's secondary pole.
- **Bins.** Larger estimation errors get a larger k, so a big disturbance
  cannot push the effective gain far. The bin edges are set where each shift
  still leaves a non-zero term. The source design only says that k is chosen
  by binning |de|. The edges and the direction of the bins are this design's.
- **Sign.** The correction follows the sign of de, so the next prediction
  moves the way the last one fell short.
- **Fraction bits.** During regulation the error is only a few LSBs, and
  |de|/4 of a whole-LSB value would truncate to zero. So e^, de and c carry 4
  fraction bits (PRED_FRAC). The IIR compensator takes its input with those
  bits and drops them after the multiply.
- `adapt_en = 0` gives the fixed 2 - z^-1 predictor, the baseline the
  adaptive scheme is compared with.

`evt` (`pred_evt_t` in `buck_ctrl_pkg`) reports for each step whether a
correction was applied, zeroed or clipped, and which k was used.

## The IIR compensator

`iir_comp` is a direct-form-I biquad in Q10 fixed point:

    y[n] = 9.166 x[n] - 16.69 x[n-1] + 7.582 x[n-2] + 1.515625 y[n-1] - 0.515625 y[n-2]

The denominator coefficients 1.516 and 0.5156 are held as the binary fractions
97/64 and 33/64, which they round to. With those values the denominator
factors exactly into (1 - z^-1)(1 - 33/64 z^-1): an integrator, which is the
dominant low-frequency pole, and the secondary pole at 0.516. Taking the
four-digit decimal values literally would put the integrator pole at about
z = 1.0007, slightly unstable. The numerator zeros offset the LC double pole.

Because of the integrator, y is the absolute duty command in DPWM counts, not
a deviation from it. y is clipped to 0 .. 256 before it is stored, which also
stops integrator wind-up while the duty is pinned (`sat_hi`, `sat_lo`). The
coefficients apply unchanged from ADC LSBs to DPWM counts. The loop design
folds the ADC and DPWM gains into the plant, whose discretized form (0.5 us
sampling) is

    Gp(z) = (0.01068 z^-1 + 0.0002769 z^-2) / (1 - 1.928 z^-1 + 0.9395 z^-2)

The loop was designed for a crossover of 6.82e5 rad/s (about f_s/9),
59.8 deg of phase margin and 17.6 dB of gain margin with the fixed
predictor. Computing the open-loop response from the four-digit coefficients
above gives a somewhat lower crossover: 5.2e5 rad/s with 58.5 deg at
a0 = 2, and 61.7 / 56.2 deg at a0 = 1.75 / 2.25. The printed values are
rounded, which explains the difference. The Q10 coefficients of this RTL
reproduce those figures to within 0.3 deg.

## DPWM and sampling

`dpwm` is a 256-count counter-compare modulator. The output rises at the
period start and falls when the counter reaches the held duty, so it is high
for exactly `duty` clocks (0 and 256 give 0 % and 100 %). A new duty is taken
as soon as the compensator produces it, so the hold matches the 0.5 us
sample-and-hold that the loop was designed for. A once-per-period update adds
about half a period of delay, and in a loop model it caused a limit cycle.
Once the pulse has fallen it stays low until the next period, so a mid-period
increase never produces a second pulse.

## Top-level interface (`buck_dctrl_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | 256 MHz clock; asynchronous active-low reset (the duty starts at 0) |
| `adapt_en` | in | 1 | 1 adaptive, 0 fixed extrapolation |
| `vref` | in | 8 | reference code |
| `adc_start` | out | 1 | one-clock start-of-conversion, every 128 clocks |
| `adc_valid`, `adc_code` | in | 1, 8 | conversion result, one-clock valid |
| `pwm` | out | 1 | PWM signal to the gate driver |
| `period_start` | out | 1 | first clock of each switching period |
| `duty` | out | 9 | duty held by the DPWM |
| `err`, `err_pred`, `pred_corr` | out | 9, 15, 15 | e[n], e^[n+1], correction (the last two with 4 fraction bits) |
| `pred_evt`, `duty_sat_hi`, `duty_sat_lo` | out | 6, 1, 1 | predictor events, duty clipping |

The shared constants live in `rtl/buck_ctrl_pkg.sv`: clock and switching
rates, widths, predictor thresholds and IIR coefficients. Each module also
takes them as parameters.

## Verification

Each module has a self-checking testbench in `tb/`. Each ends with a
`TB_RESULT checks=N failures=M` line and has a watchdog. Assertions in
`dpwm` and `buck_dctrl_top` check the duty range and the ADC handshake
during every simulation (build with `--assert`).

- `tb_error_sub`: corner values and random codes against e = Vref - Vfb, and
  the latency.
- `tb_adaptive_predictor`: an integer reference model on ramps, steps, a
  decaying oscillation and 3000 random samples. It checks that every k bin,
  zeroing, clipping and fixed mode occur, and that a0 stays within
  1.75 .. 2.25 on every sample.
- `tb_iir_comp`: a bit-exact model plus a floating-point model of the
  transfer function (within 1 count + 2 %). It also checks integration of a
  constant input and both saturation limits.
- `tb_dpwm`: period and strobe timing, pulse widths from 0 to 100 %, clamping,
  and the mid-period update cases.
- `tb_buck_dctrl_top`: the whole controller in closed loop, at its default
  parameters, with `tb/buck_plant_model.sv`. That model is the Gp(z) above,
  driven by the held duty, with a load disturbance and an ADC that rounds to
  8 bits and answers 20 clocks after `adc_start`. The run covers start-up,
  load steps up and down in both modes and a 20-code reference step. It
  checks the sampling rate, the 4-clock latency, pulse width against duty,
  settling to within 2 % with zero steady error, and that each predictor bin
  and both saturation limits occur.

In that loop model a load step of 30 duty counts dips the output by about
5 %. It settles within 2 % in 34–35 samples (17–17.5 us), in both the
adaptive and the fixed mode. The source design reports 15–21 us, and an
adaptive gain of up to 28 % over the fixed predictor. Those results come from a real power stage and were not
reproduced here. Against the linear plant model, the adaptive term is active
(mostly k = 2) but changes the settling time by at most one sample. Do not
read the loop model as evidence of the adaptive scheme's benefit. It only
shows that the controller regulates and stays stable in both modes.

Running a testbench with plain Verilator, from the repository root:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb rtl/buck_ctrl_pkg.sv \
    tb/tb_buck_dctrl_top.sv --top-module tb_buck_dctrl_top
./obj_dir/Vtb_buck_dctrl_top
```

Replace `tb_buck_dctrl_top` with any other testbench name. The end-to-end
run simulates about 1800 samples (0.9 ms of converter time) in a few seconds.

## Where this departs from, or adds to, the source design

- **ADC and DPWM resolution, clock:** not specified by the source. The
  choices here are an 8-bit ADC, a 256-count DPWM and a 256 MHz clock. A real
  1 MHz converter would use a finer or hybrid DPWM. Change `PWM_PERIOD` and
  the package clock constants together.
- **Predictor details:** the bins, threshold, upper bound, sign rule and
  fraction bits are chosen here, as described above.
- **Duty update rate:** per sample (twice per period), following the
  0.5 us sample-and-hold loop model. The source design's timing sketch shows
  the duty updated once per period.
- **Saturation and reset:** duty clipping, anti-windup and reset to zero are
  this implementation's.
- **Not in RTL:** ADC, MOSFET gate driver, power stage and feedback divider.
  The plant model in `tb/` stands in for the last three and the ADC in
  simulation only.
- **Observation outputs:** the debugging outputs of the top are additions.
