# Interpolation filter and 5-bit sigma-delta DAC for an ADSL transmitter

This is the transmit path of an ADSL analog front end. It takes 14-bit samples at
276 kHz, raises the sample rate 32 times to 8.832 MHz, and turns the result into a
5-bit code with a fifth-order noise shaper. The noise shaper moves quantization
noise out of the 0–138 kHz signal band. A thermometer code then selects unit
current cells in a current-steering DAC, and an analog lowpass removes the images
and the shaped noise.

A 32x oversampled, 5-bit converter avoids a 14-bit-accurate analog DAC. The
interpolation is split into three cheap stages. Two halfband filters each double
the rate, and half of their taps are zero. A comb (CIC) filter then multiplies the
rate by 8 with adders and registers only.

```
 in 14b    +-------------+  552k  +-------------+ 1104k +-----------+ 8832k
 276 kHz ->| x2 halfband |------->| x2 halfband |------>| x8 comb   |------+
           |  71 taps    |  14b   |  19 taps    |  14b  | order 4   | 14b  |
           +-------------+        +-------------+       +-----------+      |
   +-----------------------------------------------------------------------+
   |   +-------------+  5b   +-------------+  31   +----------+     +--------+
   +-->| 5th-order   |------>| 2's compl.  |------>| current  |---->| analog |--> out
       | sigma-delta |       | thermometer |       | steering |     | lowpass|
       +-------------+       +-------------+       | DAC      |     +--------+
                                                   +----------+
```

The digital part is synthesizable SystemVerilog. The current-steering DAC and the
reconstruction filter are analog parts, so they are written as real-valued
behavioural models for simulation only.

## Clocking and data flow

Everything runs on one clock at the final sample rate, nominally 8.832 MHz. A
modulo-32 counter in the core raises `in_take` once every 32 cycles. `in_data`
must hold the next input sample in that cycle. From there each stage hands its
output to the next with a one-cycle valid strobe:

| point                      | rate      | strobe period |
|----------------------------|-----------|---------------|
| input (`in_take`)          | 276 kHz   | 32 cycles     |
| after halfband 1           | 552 kHz   | 16 cycles     |
| after halfband 2           | 1104 kHz  | 8 cycles      |
| after the comb, modulator  | 8832 kHz  | every cycle   |

Every sample between stages is a 14-bit two's complement fraction (Q1.13, range
-1 to 1-2^-13). Every stage rounds to nearest and saturates back to that word.
Reset is asynchronous and active low (`rst_n`), and it clears every register.

## Halfband interpolators (`halfband_interp`)

Interpolating by 2 inserts a zero after each sample, then lowpass filters at the
new rate to remove the image. A halfband filter of 4K+3 taps is zero at every even
distance from its centre, except at the centre itself. So the filter splits into
two phases, and both are computed once per input sample:

- even output `y[2n] = sum c[i] x[n-i]`: a symmetric FIR of (TAPS+1)/2 taps
  (36 for the first stage, 10 for the second). It is built from the pre-added
  pairs, with one multiplier per pair, all working in parallel;
- odd output `y[2n+1] = x[n-D]` with D = (TAPS-3)/4: the centre tap, which is a
  pure delay.

The first output is registered at the clock edge after the input strobe. The
second follows `OUT_GAP` cycles later (16 for stage 1, 8 for stage 2), so the
output stream is evenly spaced. An assertion checks that inputs are spaced
widely enough.

The taps are in `adsl_dac_pkg`, as Q15 integers already multiplied by 2 to make up
for the zero stuffing. They are the first half of a Kaiser-windowed sinc
(beta = 6.0). The innermost pair is adjusted so that the taps sum to exactly 1.0:

| stage | taps | multipliers | flat (ripple)          | ≥ 60 dB down from | output rate |
|-------|------|-------------|------------------------|-------------------|-------------|
| 1     | 71   | 18          | 0–125 kHz (≤ 0.1 dB)   | 153 kHz           | 552 kHz     |
| 2     | 19   | 5           | 0–138 kHz (≤ 0.01 dB)  | 392 kHz           | 1104 kHz    |

A halfband response is always -6 dB at a quarter of its output rate. For stage 1
that point is exactly 138 kHz. The stage-1 response therefore cannot be flat to
138 kHz and also have 60 dB of rejection there. This filter trades the top ~13 kHz
of the band for its stopband.

## Comb interpolator (`cic_interp`)

The comb stage implements

    H(z) = (1 - z^-8)^4 · (z^-1 / (1 - z^-1))^4

The four first-difference combs run at the input rate, where one delay equals 8
output samples. Each comb result is followed by seven zeros. The four delaying
integrators then run on every clock. Their DC gain is 8^4/8 = 512, and one
rounding arithmetic shift by 9 removes it at the output. The internal word is
14 + 4·3 = 26 bits. It wraps in two's complement, which is harmless in a CIC
because the end result always fits the word.

The impulse response is never negative, so the output never leaves the input
range. Taking a sample at clock edge e first changes `out_data` at edge e+5.

The comb response is not flat: it droops by 0.88 dB at 138 kHz and by much less
at lower frequencies. There is no compensation filter. Images around 1104 kHz are
at least 67.8 dB down.

## Fifth-order sigma-delta modulator (`sigma_delta_mod`)

This block is the core of the converter and the least obvious part.

### Loop structure

The loop filter is a chain of five delaying integrators 1/(z-1) with feed-forward
taps. Two local feedbacks turn integrator pairs 2–3 and 4–5 into resonators:

```
u  = x - v                      v = code/16 (fed-back DAC level)
s1 <= s1 + u
s2 <= s2 + s1 - b1*s3           resonator 1
s3 <= s3 + s2
s4 <= s4 + s3 - b2*s5           resonator 2
s5 <= s5 + s4
y  = a1 s1 + a2 s2 + a3 s3 + a4 s4 + a5 s5
code = clamp(round(16*y), -16, +15)
```

### Where the coefficients come from

The target noise transfer function (NTF) has the poles of

    D(z) = (z-0.7477)(z^2-1.556z+0.6233)(z^2-1.756z+0.8336)

and zeros at DC and at the angles of the roots of z^2-1.997z+1 and z^2-1.992z+1.
At 8.832 MHz those angles are about 77 kHz and 126 kHz, inside the 138 kHz
band. With delaying integrators, a resonator with feedback b has the
characteristic polynomial (z-1)^2 + b. Its zeros sit at angle atan(sqrt(b)).
That gives:

- b1 = tan^2(acos(1.997/2)) = 0.003007, stored as 197/2^16;
- b2 = tan^2(acos(1.992/2)) = 0.008048, stored as 527/2^16.

The loop's NTF is N(z)/D(z) with N = (z-1)(R1)(R2) and Rk = (z-1)^2 + bk.
Requiring 1 + L(z) = D/N gives a linear system:

    D - N = a1 R1 R2 + a2 (z-1) R2 + a3 R2 + a4 (z-1) + a5

It solves to a1..a5 = 0.9403, 0.4158, 0.1044, 0.01469, 0.000456, stored as
61624, 27248, 6841, 963, 30 over 2^16.

The resonator zeros come out at radius sqrt(1+b), that is 1.0015 and 1.004,
instead of exactly on the unit circle. This is the price of using only delaying
integrators. The loop is still stable, and its measured SNR is below.

### Number formats and overload

The input is Q1.13. The five states are 34-bit words with 20 fraction bits. The
coefficients are 18-bit Q16 values, and products are truncated. A quantizer code c
stands for the level c/16, so a full-scale input of ±1 spans the 32 levels.

Each state update saturates instead of wrapping. When the loop is overdriven, the
states and the output therefore stay pinned at the rails rather than flipping sign.
The `overload` output is high on every step where the quantizer clipped.

In simulation the loop is stable up to about 0.9 of full scale for a sine and
about 0.5 for a constant input. Above that it overloads, and the only way to
recover is a reset or a smaller input.

### Performance

The modulator is measured with a sine, an 8192-point Hann-windowed record, and
the in-band SNR integrated over 0–138 kHz (fs/64):

| input level | 0.9 (-0.9 dBFS) | 0.5 (-6 dBFS) | 0.1 | 0.01 | 0.001 |
|-------------|-----------------|---------------|-----|------|-------|
| SNR (dB)    | 100.5           | 95.2          | 82.1| 62.7 | 39.4  |

The noise floor does not depend on the level. Out of band, the averaged noise
spectrum follows |NTF|^2 of the target expression to within 2 dB in every octave
from 138 kHz to 4.4 MHz. A linear noise model of the loop matches it to within
0.2 dB; the extra deviation comes from the real quantizer's slightly coloured
error.

The dynamic range is about 98.5 dB. It runs from the level that would give 0 dB
SNR up to 0.9 of full scale. That is above the 88.6 dB target for a 5th-order,
32x, 8.8 MHz modulator of this kind. The modulator output is a new code on every
clock, registered one cycle after the input strobe.

## Thermometer encoder, current-steering DAC and output filter

`therm_encoder` offsets the two's complement code by 16 (it inverts the MSB) to
get a level 0..31. It then turns on elements 1..level of a 31-bit word, so bit k-1
is 1 when level ≥ k. With `M = 3` and `TWOS_COMP = 0` it reproduces the classic
3-bit decoder: 000 → none, 001 → T1, ..., 111 → T1..T7. The encoder is
combinational.

`current_steering_dac` (behavioural) has 31 unit cells. At each rising clock edge,
every selected cell steers its current to `i_p` and every other cell to `i_n`.
The sums are held until the next edge. `iout = i_p - i_n = 2·code + 1` units.
`MISMATCH` gives each cell a static random error (uniform, ±MISMATCH). This lets
you see cell mismatch appear as in-band distortion, because there is no
dynamic element matching. With ±0.5 % cell errors, the in-band SNDR of the DAC
current falls from 78.9 dB to 67.8 dB in the end-to-end test.

`recon_filter` (behavioural) is two real poles at `FC_HZ`, 276 kHz by default. Its
input is held between clock edges, so it is solved exactly once per sample. In the
top, the DAC current is scaled by 1/32 before the filter. The analog output then
equals the modulator level plus a constant offset of half a level (1/32), which
comes from the odd number of cells.

## Top level (`adsl_sd_dac_top`)

`adsl_sd_dac_core` holds all the synthesizable logic: the rate counter, the two
halfband stages, the comb, the modulator and the encoder. `adsl_sd_dac_top` adds
the two analog models around it.

| port         | dir | width | meaning                                           |
|--------------|-----|-------|---------------------------------------------------|
| `clk`        | in  | 1     | 8.832 MHz clock                                   |
| `rst_n`      | in  | 1     | asynchronous reset, active low                    |
| `in_data`    | in  | 14    | input sample (Q1.13), captured when `in_take` = 1 |
| `in_take`    | out | 1     | input request, one cycle in 32                    |
| `code`       | out | 5     | modulator code, -16..15                           |
| `code_valid` | out | 1     | `code` is valid (every cycle once running)        |
| `overload`   | out | 1     | quantizer clipped                                 |
| `therm`      | out | 31    | thermometer word to the cells                     |
| `dac_iout`   | out | real  | held differential DAC current (cell units)        |
| `vout`       | out | real  | output of the analog lowpass                      |

The two top parameters (`DAC_MISMATCH`, `FILTER_FC_HZ`) only affect the models.
The design constants (the widths, the factors 2/2/8, the tap tables and the
modulator coefficients) are in `adsl_dac_pkg`.

The end-to-end SNR is lower than the modulator's own. The 14-bit input word puts
all of its quantization noise in the band, which limits a half-scale sine to about
80 dB before any filtering. The end-to-end testbench measures 78.9 dB. A wider
input or wider inter-stage words would be needed to reach the modulator's figure
through the whole chain.

## Verification

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and stops itself with a
watchdog.

| testbench                  | what it checks                                                                                                                  |
|----------------------------|---------------------------------------------------------------------------------------------------------------------------------|
| `tb_halfband1`, `tb_halfband2` | every output against a full-length zero-stuffed convolution; output timing (registered 1 and 1+OUT_GAP edges after the input); saturation reached |
| `tb_cic_interp`            | every output against the 29-tap box-car^4 kernel, at a fixed latency; `out_valid` on every cycle                                |
| `tb_sigma_delta_mod`       | bit-exact against an independent 64-bit model, with idle cycles; in-band SNR > 85 dB (measures 95.2 dB); overload flag and state saturation |
| `tb_sdm_snr_sweep`         | SNR at five input levels: > 85 dB at half scale, 20 dB per decade below it (± 4 dB), no quantizer clipping; prints the dynamic range |
| `tb_sdm_ntf`               | averaged 8192-point FFT (radix-2, in the testbench) of the modulator output: noise power in five octave bands from 138 kHz to 4.4 MHz follows the target NTF expression within 3 dB |
| `tb_dac_mismatch`          | two full chains side by side, ideal cells and ±0.5 % cell mismatch: the ideal DAC output keeps the codes' SNDR (78.9 dB), the mismatched one drops by more than 6 dB (measures 67.8 dB) |
| `tb_therm_encoder`         | all 8 codes of the 3-bit table; all 32 two's complement codes                                                                   |
| `tb_current_steering_dac`  | exact cell sums for every level and random words, hold between edges; bounds with 1 % mismatch                                  |
| `tb_recon_filter`          | closed-form step response, DC gain, 50 kHz gain, more than 40 dB rejection at fs/2                                              |
| `tb_adsl_sd_dac_top`       | whole chain at default parameters: all strobe periods, thermometer consistency, in-band SNR > 75 dB, amplitude within 1 %, analog amplitude within 2 % of the filter's response |

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    --top-module tb_adsl_sd_dac_top rtl/adsl_dac_pkg.sv tb/tb_adsl_sd_dac_top.sv
./obj_dir/Vtb_adsl_sd_dac_top
```

Replace the top module and file name for the other testbenches. The package must
always come first. Every testbench finishes in well under a second.

## Choices this design makes

These are this design's own choices, not part of the original design:

- The tap values of both halfband filters (window design, Q15), the rounding and
  saturation at every stage, and the single clock with valid strobes.
- The comb gain is removed in one final shift rather than after each integrator.
  The comb uses zero insertion between the sections, so that its response is
  exactly the comb equation above.
- The modulator's coefficient values, derived from the specified NTF, together
  with its number formats, quantizer levels, state saturation and `overload` flag.
- 31 unit cells, that is 2^m − 1, as in the 3-bit decoding table, rather than 2^m.
- The analog filter's order and corner. The DAC's differential output and
  mismatch model.

Not built:

- Dynamic element matching. The cells are driven straight from the thermometer
  code, so cell mismatch goes into the band unshaped.
- The exact input levels of the SNR-versus-level characterization are unknown.
  `tb_sdm_snr_sweep` uses its own five levels.
