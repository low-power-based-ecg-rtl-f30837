# Wavelet QRS detector for an implantable pacemaker

A pacemaker must notice each heartbeat (the QRS complex of the ECG) reliably,
and it must spend almost no energy doing so. This design detects QRS
complexes with very little arithmetic. It splits the digitised ECG into four
wavelet scales with a decimating filter bank. It then multiplies two of those
scales, because a QRS complex is steep at several scales at once while most
noise is not. A single comparator then produces a one-bit detection. A
zero-crossing counter on the finest scale tells whether the signal is noisy.
When it is, the detector moves to coarser scales. An 8-bit successive
approximation (SAR) ADC controller supplies the samples.

```
  VIN ─► S/H ─► comparator ◄── DAC ◄──┐        (analog, outside the RTL)
                    │                  │
              adc_comp_i          adc_dac_o
                    ▼                  │
               ┌──────────── sar_logic ┘
               │ 8-bit code, one per conversion (offset binary → signed)
               ▼
        wavelet_decomposer ── WF1 ──► noise_detector ── ND ─┐
               │ WF2, WF3, WF4                               │
               ▼                                             ▼
        qrs_detector:  multiscale_product (ND selects scales) ─► MP1
                       soft_threshold (MP1 > Vth, 200-sample hold) ─► qrs_o
```

The whole design runs on one clock. Work happens on sample strobes
(`sample_valid_i`, which is the ADC's end-of-conversion pulse in `ecg_top`).

## Files

| file | role |
|---|---|
| `rtl/ecg_pkg.sv` | widths, types, the ND mode enum |
| `rtl/ecg_top.sv` | top: SAR controller plus detector, analog ports brought out |
| `rtl/ecg_detector.sv` | filter bank, noise detector and QRS detector wired together |
| `rtl/wavelet_decomposer.sv`, `rtl/wavelet_stage.sv` | four-level decimating filter bank |
| `rtl/noise_detector.sv` | zero-crossing counter and ND flag |
| `rtl/qrs_detector.sv` | hypothesis test followed by the comparator |
| `rtl/multiscale_product.sv` | ND-steered multiplexers and 8x8 multiplier |
| `rtl/soft_threshold.sv` | threshold comparator with 200-sample hold |
| `rtl/sar_logic.sv` | successive approximation register, MSB first |
| `tb/ecg_ref_pkg.sv` | untimed reference models and a synthetic ECG source |
| `tb/sar_analog_model.sv` | ideal S/H, DAC and comparator, for simulation only |
| `tb/tb_*.sv` | one self-checking testbench per block (the filter stage is tested inside the filter bank), plus `tb_ecg_top` end to end |

## The wavelet filter bank

Each level has a lowpass and a highpass filter, and each filter is followed by
a 2:1 decimator. The decimated lowpass output feeds the next level. The
decimated highpass output of level k is the detail signal WF*k*. Level 4 has
only a highpass filter. WF1 therefore updates once every 2 input samples,
WF2 every 4, WF3 every 8 and WF4 every 16.

The original design drives the levels from clocks divided by 2, 4 and 8.
Here every level runs on the system clock and works only in the cycles when
its input strobe is high. The rates are the same, and no derived clocks are
needed.

The filter taps are this implementation's choice. It uses the quadratic
spline wavelet, a standard choice for QRS detection:

* lowpass `lp[m] = (x[m] + 3·x[m-1] + 3·x[m-2] + x[m-3]) >>> 3`, a DC gain of 1
  (the sum needs 11 bits);
* highpass `hp[m] = (x[m] − x[m-1]) >>> 1`. This is the spline's `2·(x[m]−x[m-1])`
  scaled by 1/4 so that every detail fits in 8 signed bits.

Built this way, three lowpass filters need 4 adders each and four highpass
filters need 1 each. That makes 16 adders, which agrees with the adder count
of the original synthesis. Each level keeps the second output of each pair
(m = 1, 3, 5, …). Each level's output strobe comes one cycle after its input
strobe, so WF4 settles 4 cycles after the sample that completes it.

Because the highpass filters block DC, a constant input gives zero details.
The original design's own simulation shows non-zero details for a constant
input. That cannot be reproduced without its filter taps, which the original
description does not give.

## Noise detector and mode switch

On each WF1 update, the sign bit of the new value is XORed with the sign bit
of the previous value. A 1 is a zero crossing and advances an 8-bit counter,
which saturates at 255. A 32-bit interval counter counts input samples. After
`reset_interval_i` samples it closes the interval, clears the crossing
counter and sets

    ND = (crossings in the closing interval > noise_level_i)

ND keeps that value for the whole next interval. Latching ND at the end of
the interval, rather than comparing continuously, is this implementation's
choice. It keeps the mode stable for a whole interval. A crossing that is
strobed in the same cycle as the interval end is counted in the closing
interval.

## QRS detector: multi-scaled product and soft threshold

`multiscale_product` uses ND to pick its operands:

| ND | product |
|---|---|
| 0 (clean) | WF2 × WF2 |
| 1 (noisy) | WF3 × WF4 |

The 8×8 signed product is reduced to the unsigned 8-bit MP1 that the
comparator takes. Negative products give 0, and products above 255 give 255.
This clamping is this implementation's choice. MP1 is registered once per
input sample, from the scales and ND present at that sample strobe.

`soft_threshold` is a feedback loop. The comparator computes `Vth < MP1`. A
multiplexer then passes either the comparator result or a constant 1. Its
output is `qrs_o`, and that output also arms a counter. While the counter
runs, the multiplexer holds the output at 1. The output is high for exactly
`HOLD` = 200 sample strobes, counted from the strobe that triggered it. The
counter then releases it. If the comparator is still high at that point, a
new hold starts at once, so pulses are always a whole multiple of 200
samples. The counter does not restart when the comparator fires again during
a hold. This gives one pulse per beat and works as a refractory period: at
1 kHz sampling it lasts 200 ms.

Timing: `qrs_o` is combinational from the registered MP1 and the hold
counter. A product above Vth therefore shows on `qrs_o` one clock after the
sample strobe that formed it. Detection comes on the steep R upstroke. In the
end-to-end test, with R waves that rise over 24 samples, `qrs_o` rises 5 to 19
samples before the R peak.

## SAR ADC controller

`sar_logic` carries out the conversion procedure. After `start_i`, one cycle
raises `sample_o` for the sample-and-hold and clears the result. Then N = 8
cycles each test one bit, MSB first. `dac_o` drives the trial code, and
`comp_i` = 1 (VIN above the DAC voltage) keeps the bit. In the next cycle
`eoc_o` pulses and `data_o` holds the code. From the start cycle to `eoc_o`
takes N+2 clocks. `start_i` is ignored while a conversion is running. An
assertion checks that the bit under test is one-hot.

The S/H, DAC and comparator are analog. No RTL is given for them. `ecg_top`
brings their connections out as `adc_sample_o`, `adc_dac_o` and `adc_comp_i`.
`tb/sar_analog_model.sv` is an ideal model of them for simulation:
`vdac = vref·code/2^N`. `ecg_top` reads ADC codes as offset binary (128 means
zero signal) and inverts the MSB to pass signed samples on to the detector.

## Parameters and configuration

| name | default | where |
|---|---|---|
| `SAMPLE_W` | 8 | `ecg_pkg` — ADC and datapath width |
| `MP_W` | 8 | `ecg_pkg` — MP1 and Vth width |
| `ZC_CNT_W` / `INTERVAL_W` | 8 / 32 | `ecg_pkg` — crossing and interval counters |
| `HOLD` / `HOLD_SAMPLES` | 200 | `soft_threshold`, `qrs_detector`, `ecg_detector` |
| `N` | 8 | `sar_logic` |

There are three run-time inputs: `vth_i` (threshold), `noise_level_i` and
`reset_interval_i`. The original design gives no values for them. The
testbenches use Vth = 12, a noise level of 30 crossings and an interval of
256 samples, with beats of about 90 codes in amplitude.

## How it departs from the original description

* The filter taps, the detail scaling and the decimation phase are chosen
  here, because the original gives none of them. Details for a constant input
  are therefore zero, unlike the original simulation.
* The original uses divided clocks. This design uses one clock with strobes.
* The original's prose describes soft thresholding as wavelet shrinkage. The
  circuit implemented here is its comparator, multiplexer and 200-sample
  counter, which is the hardware it shows.
* These behaviours are this implementation's own choices: ND latched per
  interval, the crossing counter saturating at 255, the product clamped to
  0..255, the sampling cycle and start handshake of the SAR controller, the
  offset-binary ADC format, and an asynchronous active-low reset that clears
  every register to zero.
* The 16 latches in the original synthesis summary reflect how its HDL was
  coded. This RTL is fully registered and infers no latches.

## Simulating

Each testbench prints one `TB_RESULT checks=N failures=M` line and stops
itself with a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/ecg_pkg.sv tb/ecg_ref_pkg.sv tb/tb_ecg_top.sv --top-module tb_ecg_top
./obj_dir/Vtb_ecg_top
```

The same command runs the other testbenches once the name is changed.
Expected values come from `tb/ecg_ref_pkg.sv`. It holds integer models of the
filter bank, the noise detector and the QRS detector, written from their
arithmetic definitions. It also holds a synthetic ECG source with P, Q, R, S
and T waves, beat-to-beat jitter and repeating noisy stretches.

`tb_ecg_top` runs 16,000 samples through the ADC and the detector with every
parameter at its default. It checks:

* every ADC code, and the conversion time;
* MP1, ND and `qrs_o` after every sample;
* that each R peak in a clean stretch is detected;
* that no detection starts in a clean stretch away from an R peak.

It also counts the mechanisms and fails if any of them never happens: all four
scales, zero crossings, ND rising and falling, both products, clamping,
triggers, hold releases and re-triggers blocked by the hold. It finishes in
well under a second.

A known limitation shows in simulation. With very narrow synthetic QRS
complexes (an R wave under about 10 samples wide), WF3 and WF4 can have
opposite signs at the peak. In noisy mode their product is then clamped to 0,
and the beat can be missed. The testbench uses QRS complexes of about 50
samples, like a real ECG sampled near 1 kHz.
