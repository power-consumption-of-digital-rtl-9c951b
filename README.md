# A hearing aid in three number systems

A digital hearing aid splits speech into frequency bands. It amplifies each band with a gain
that falls as the signal gets louder, so quiet sounds become audible and loud ones do not hurt.
In each band the work is the same: a band-pass FIR filter, a compressive amplifier, and a
second band-pass FIR filter. The arithmetic runs on a battery, so its power depends strongly
on how the numbers are represented.

This RTL builds that channel three times, in three number formats:

* 16-bit two's complement fixed point;
* 9-bit logarithmic, where a multiply becomes an addition;
* 10-bit floating point with a 5-bit mantissa.

The three channels are identical in structure, run side by side in `hearing_aid_top`, and can
be compared on the same speech. The channel modelled is the highest band of a six-band
multirate hearing aid: 4-8 kHz, sampled at 32 kS/s.

The complete six-band multirate hearing aid is also built in the 16-bit format
(`multirate_lin`), and sits in the same top. Each lower band runs at half the sample rate of
the band above it, so it can reuse the same filters.

```
            din_en (sample request)
  sample ──► FIR 1 ──► master ──► amplifier ──► master ──► FIR 2 ──► master ──► dout
                       latch                    latch                latch
```

## Number formats

| format | word | value |
|---|---|---|
| linear (`lin_t`) | 16-bit signed | x / 32768 (Q0.15) |
| log (`log9_t`) | `{sign, mag[7:0]}` | ±0.941^mag |
| float (`fp10_t`) | `{sign, exp[3:0], mant[4:0]}` | ±mant/32 · 2^(exp−15); the all-zero word is 0 |

**Log format.** The magnitude code counts steps of 0.941 (about −0.53 dB) down from 1.0.
Code 0 is 1.0 and code 255 is 1.8·10⁻⁷, about 135 dB of range. A larger code is a smaller
value, and the format has no zero. Multiplying two values adds their codes. A gain g above 1
is a negative code offset, log_0.941(g).

**Float format.** The float mantissa keeps its leading one explicitly (16 ≤ mant ≤ 31 for
a normal value). That makes exactly 16 mantissa values and 16 exponent values, which the float
amplifier relies on. The largest value is 0.96875 and the smallest 2⁻¹⁶.

Amplifier gains must exceed 1, so the float gains A_f and B_f use the same 9-bit
magnitude layout with an exponent bias of 7 instead of 15 (`FP_GAIN_BIAS`). That allows gains
up to about 248.

`ha_pkg` holds the types, the float multiply and add functions, and the functions that compute
the tables below at elaboration.

## The compressive amplifier

In every format the amplifier computes

```
y = sgn(x) · A·|x|        if |x| ≤ t      (linear region, high gain)
y = sgn(x) · B·|x|^p      if |x| >  t      (compression, 1/4 ≤ p ≤ 1/2)
```

For a continuous curve, choose B = A·t^(1−p). All three versions share one structure:

* A comparator picks the region.
* Only the selected path's operand register is loaded, so the other path's logic does not
  toggle.
* A registered select drives the output multiplexer.
* `dout_en` follows `din_en` by two cycles, and a new sample can enter every cycle.

### Linear format: |x|^p computed with arithmetic (`xp_lin`)

Fixed point has no cheap way to raise a number to a fractional power. `xp_lin` computes
|x|^p = 2^(p·log₂|x|) in six combinational steps:

1. **Normalise.** A leading-one detector writes |x| = (1+u)·2^m, with u in [0,1) and m from
   −15 to −1.
2. **log₂(1+u).** A degree-6 polynomial with no constant term, evaluated by Horner's rule with
   six 16×16 multipliers. The coefficients are a least-squares fit on [0,1]:
   23634, −11762, 7486, −4544, 1997, −427 in Q2.14. A truncated Taylor series of ln(1+u)
   converges too slowly near u = 1 to be used.
3. **Multiply by p.** w = p·(m + log₂(1+u)) in one 20×20 multiplier. This stage uses the Q5.14
   format, so w is never positive.
4. **Split.** w = i + f, where i = floor(w) and f is in [0,1).
5. **2^f.** The Taylor series of e^(f·ln 2) up to f⁶, with six more 16×16 multipliers.
   The coefficients are (ln 2)^k/k! in Q2.14: 16384, 11357, 3936, 909, 158, 22, 3.
6. **Shift.** Shift 2^f right by −i places, round to Q0.15, and saturate at 32767.

That makes twelve 16-bit multipliers and one 20-bit multiplier, all of them Baugh-Wooley
(`bw_mult`). The result is within about 6 LSB of the exact value for p from 0.25 to 0.5.
Most of the error is in the 2^f series and the Q2.14 rounding.

Gains are unsigned Q8.8 and p is unsigned Q2.14. Products are truncated to Q0.15 and the output
saturates at ±32767.

### Log format: the power becomes a multiply (`nla_log`)

In the log format, |x|^p is p times a code, and a gain is a code offset:

```
y_l = A_l + |x_l|        when |x_l| ≥ t_l   (code ≥ threshold code: small signal)
y_l = B_l + p·|x_l|      otherwise
```

The comparison is reversed, because a larger code means a smaller value. p is Q0.8, and the
product is rounded to the nearest code. A_l and B_l are signed 10-bit values. The result is
clamped to codes 0..255.

### Float format: two 16-entry tables (`nla_float`)

With 16 mantissas and 16 exponents, |x|^p = (mant/32)^p · 2^((exp−15)·p) is the product of
two table values:

* The mantissa table holds m/256 with an 8-bit m.
* The exponent table holds {E, m}, meaning m/256·2^E.

A small normaliser multiplies the two 8-bit mantissas, renormalises the product, and adds the
exponents. The tables are registers. They reset to the contents for the parameter `P_INIT`
(0.5). Because p is a per-patient fitting constant, new contents can be written through
`lut_we/lut_sel/lut_addr/lut_wdata`, with `lut_sel=1` for the exponent table. The formulas
are in `ha_pkg::fp_mant_lut` and `fp_exp_lut`.

## FIR filters

Each of the 21-tap filters (`fir_lin`, `fir_log`, `fir_float`) has one multiplier and one
accumulator, time-shared over the taps:

```
y(j) = Σ_{k=0..20} c(k) · x(j−k)
```

* A sample accepted with `din_en` (only while `busy` is low) is written into a 21-word
  circular buffer.
* One tap is processed per cycle.
* `dout_en` pulses 22 cycles after `din_en`, with the result on `dout`.
* Coefficients live in a register file written through `coef_we/coef_addr/coef_data`.
  Nothing is built in, so any band can be loaded.

**Linear.** The multiplier is a 16×16 Baugh-Wooley. The 32-bit accumulator saturates at every
step. The result is rounded to Q0.15 and clipped. `clipped` reports that either limit was hit.

**Float.** The multiplier multiplies the mantissas, adds the exponents, XORs the signs and
renormalises. The adder shifts the mantissa with the smaller exponent right, adds or
subtracts, and renormalises again. Both round half-up (the adder keeps three guard bits),
saturate at the largest value, and flush to zero below the smallest. The accumulator is itself
a 10-bit float, so its rounding error is the main limit on accuracy. `align` pulses whenever
the alignment shifter had to move a mantissa.

**Log.** This is the least obvious of the three. A multiply adds the codes. An addition uses

```
log(x + y) = log(x) + log(1 ± y/x),   x the larger magnitude (smaller code)
```

With d = |code(x) − code(y)|, the new code is code(x) + T(d). There are two tables of 64
signed entries:

* T₊(d) = round(log_0.941(1 + 0.941^d)) for terms of equal sign;
* T₋(d) = round(log_0.941(1 − 0.941^d)) for terms of opposite sign.

Both tables are computed from real arithmetic at elaboration (`log_add_lut`, `log_sub_lut`).
A comparator bypasses the tables when d ≥ 64: the smaller term is then worth less than half a
code step, and the larger one passes through unchanged. `lut_used` and `bypass` count the two
cases.

The accumulator has a separate empty flag, because the format has no zero. The flag is set at
the start of each sample and again after an exact cancellation (equal codes, opposite signs).
An empty result is output as code 255. Every accumulation rounds to the nearest code (about
±3 %), so the log channel has the lowest signal-to-error ratio of the three: about 27 dB on
speech-like input, compared with about 77 dB for linear and 25 dB for float at these sizes.

## Master controller and channel timing

The stages take 22 cycles (FIRs) and 2 cycles (amplifier), so `master_ctrl` runs them in lock
step:

* It latches each stage's output word on that stage's `dout_*_en` pulse.
* Once all three have reported, it pulses `din_en` for one cycle. On the same edge it hands
  FIR 1's word to the amplifier, the amplifier's word to FIR 2, and FIR 2's word to the
  channel output.
* The same `din_en` is the channel's sample request: the source must hold the next sample on
  `din` when `din_en` is high.
* An assertion checks that no stage reports twice between releases.

After reset the controller acts as if every stage had just reported, so the first request
follows at once. The pipeline fills with zero words (code 255 in the log channel), and
`dout_valid` is high from the fourth release on. From then on, each output is the input
sample from three releases earlier, processed.

A channel takes one sample every **25 cycles** (21 taps + 4). Real-time operation at 32 kS/s
therefore needs a clock of at least 800 kHz.

## The six-band multirate system (`multirate_lin`)

The lower bands need far less computation at a lower sample rate. The input (level 0,
32 kS/s) feeds the 4-8 kHz channel directly. It also feeds a chain of lowpass filters,
each followed by dropping every second sample. Level d therefore runs at 32/2^d kS/s.

Every level has the same band-pass filter. At half the rate, the same coefficients pass the
octave below: 2-4 kHz, 1-2 kHz, and so on down to 125-250 Hz at level 5.

On the way back, each level's output is added to the upsampled sum of the levels below it.
Upsampling inserts a zero between samples, applies the same lowpass filter at the higher
rate, and multiplies by 2 (saturating). All lowpass filters share one coefficient set, with
a cutoff of 0.3π in the testbenches.

```
 din ─┬─ eq ─ BP ─ NLA ─ BP ──────────────(+)── dout           level 0, 32 kS/s
      LP↓2                                 ↑
      ├─ eq ─ BP ─ NLA ─ BP ──────(+)── ↑2 LP                   level 1, 16 kS/s
      LP↓2                         ↑
      ⋮                             ⋮                            ...
      └────── BP ─ NLA ─ BP ─── ↑2 LP                           level 5, 1 kS/s
```

**Schedule.** A frame controller issues one input request (`din_en`) per frame of N+4 = 25
cycles.

* Level-d blocks start in frames whose number is a multiple of 2^d.
* The two lowpass filters between levels d−1 and d start with level d−1.
* Every block reads the outputs its neighbours hold from earlier frames, so all due blocks
  work in parallel within one frame.
* Each block adds one step of its own rate to the delay, and each FIR adds a group delay
  of 10 of its own samples.

**Equalisation.** Higher bands pass through fewer filters than lower ones. Each level
therefore starts with a circular delay buffer (`eq_delay`), sized so that every band
reaches its adder with the same total delay.

The delay of the level-d input is 11·(2^d − 1) frames. A channel adds (E_d + 24)·2^d frames.
The interpolator from level d adds 11·2^(d−1). Solving for equal arrival gives depths of
1426, 690, 322, 138, 46 and 0 samples for levels 0 to 5 (2622 words in all). The whole system
delays the signal by exactly 1450 frames.

The depths are computed from N and the number of channels by constant functions in the
module. `dout_valid` starts pulsing in the first frame whose output reflects input
sample 0.

**Settings.** Each level has its own amplifier settings: the arrays `thr`, `a_gain`,
`b_gain` and `p`, with index 0 being the 4-8 kHz band. `bp_we` writes one coefficient into
every band-pass filter, and `lp_we` into every lowpass filter.

## Interfaces

`hearing_aid_top` brings each channel's ports out with a prefix `lin_`, `log_` or `flt_`.
All units share `clk` and `rst_n` (active low, asynchronous).

| port | linear | log | float |
|---|---|---|---|
| `*_din`, `*_dout` | 16, Q0.15 | 9, `{sign,code}` | 10, `{sign,exp,mant}` |
| `*_din_en` (out) | sample request | same | same |
| `*_dout_valid` (out) | dout holds a new output | same | same |
| `*_thr` | 15, Q0.15 | 8, code | 9, `{exp,mant}` |
| `*_a`, `*_b` | 16, Q8.8 | 10 signed, code offset | 9, gain float (bias 7) |
| `*_p` | 16, Q2.14 | 8, Q0.8 | tables: `flt_lut_*` |
| `*_coef_we` | 2: bit 0 FIR 1, bit 1 FIR 2 | same | same |
| `*_coef_addr`, `*_coef_data` | 5, 16 | 5, 9 | 5, 10 |

The multirate unit's ports carry the prefix `mr_` (`mr_din`, `mr_din_en`, `mr_thr[6]`,
`mr_a[6]`, `mr_b[6]`, `mr_p[6]`, `mr_bp_we`, `mr_lp_we`, `mr_coef_addr`, `mr_coef_data`,
`mr_dout`, `mr_dout_valid`). Their formats are those of the linear channel.

Parameters: `N` (taps, default 21), `P_INIT` (reset value of p for the float tables,
default 0.5) and `NCH` (channels of the multirate unit, default 6). The coefficient and parameter ports can be changed at any time, but a change
takes effect in the middle of whichever sample is in flight.

## Where this design goes beyond the source

The structure of every block comes from the published design:

* the comparator, two paths and multiplexer of the amplifier;
* the normaliser, polynomial log, multiply, split, 2^f and shift pipeline;
* the two 16-entry tables of the float amplifier;
* the table-plus-bypass log accumulator;
* the multiply-accumulate FIR with clipping;
* the three-enable master controller.

The following are this design's own:

* **Widths and fixed-point formats** of gains, thresholds and p in every format, and the
  separate exponent bias of the float gains.
* **The log2 polynomial coefficients.** The source names a polynomial but gives no values.
* **Rounding and saturation rules** everywhere. For the float format: round half-up, three
  guard bits, saturate, flush to zero.
* **The opposite-sign accumulation table**, the empty flag, and the bypass limit d ≥ 64 in
  the log FIR. The source describes only the table for equal signs.
* **Write ports** for coefficients and float tables, and their reset contents.
* **Start-up of the master controller**, and the exact latencies: 2 cycles for the amplifier,
  N+1 for an FIR, N+4 per sample.
* **Tap indexing.** Taps are indexed from the newest sample (k = 0), which avoids one sample
  of extra delay.
* **The multirate system's frame schedule**, its equalisation depths (derived from that
  schedule), and the gain of 2 after interpolation. The source sizes its buffers at about
  1000 words in total, counting filter buffers. This design needs 2622 equalisation words
  plus 462 filter words, because every block adds a pipeline step.
* **Rate of the interpolating lowpass filters.** They run at the higher of the two rates,
  as zero insertion requires.

The filter coefficients themselves are not part of the RTL. The testbenches load a 4-8 kHz
band-pass (a Hamming-windowed ideal band-pass, 21 taps). The source used sampled Butterworth
responses.

Not built: the multirate system in the log and float formats. Only the single top band
exists in those formats. A log-format multirate system would also need a log-domain adder
for the band sums.

## Simulation

All testbenches are self-checking and end with a line
`TB_RESULT checks=<n> failures=<n>`. For example:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb rtl/ha_pkg.sv tb/tb_ha_util.sv \
          tb/tb_hearing_aid_top.sv --top-module tb_hearing_aid_top
./obj_dir/Vtb_hearing_aid_top
```

| testbench | checks |
|---|---|
| `tb_bw_mult` | corner and random products of 16×16, 8×12 and 20×20 multipliers |
| `tb_xp_lin` | \|x\|^p against real arithmetic, all magnitudes, p = 0.25…0.5 |
| `tb_nla_lin`, `tb_nla_log`, `tb_nla_float` | amplifier against a model of the same format, both regions, threshold edges, saturation, latency; rewriting the float tables |
| `tb_fir_lin`, `tb_fir_log`, `tb_fir_float` | bit-exact (float: bounded-error) models, impulse responses, clipping, table bypass, alignment, inputs ignored while busy, latency |
| `tb_master_ctrl` | random stage timings; release order, data routing, `out_valid` start |
| `tb_channel_lin/log/float` | one channel on a speech-like signal against a real-valued reference, 25-cycle sample period |
| `tb_multirate_lin` | six-band system against a real-valued model of the same schedule (about 67 dB), band alignment from an impulse (peak exactly 1450 frames later), 25-cycle frames, both amplifier regions on every level, buffer wrap |
| `tb_hearing_aid_top` | all four units at default parameters, 3000 samples, tables rewritten for p = 1/4, a loud burst to force clipping; counts every mechanism |
| `tb_speech_3s` | the same for 96,000 samples, 3 s of audio at 32 kS/s (about two minutes of simulation) |

`tb_ha_util` is a package with the reference band-pass and lowpass coefficients, the test
signals (tones and noise under a 40 Hz envelope that sweeps 40 dB), a real-valued amplifier
model, a frame-accurate real-valued model of the multirate system (`mr_model`), and
conversions between `real` and each format.
