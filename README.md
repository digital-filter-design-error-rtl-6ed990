# Digital error correction for a multi-bit sigma-delta ADC

A multi-bit sigma-delta modulator gets good resolution at a modest
oversampling ratio, but its analog parts are never perfect. The integrators
leak, the capacitor ratios are off, the op-amp and comparator have offsets.
Worst of all, the unit elements of the feedback DAC do not match, and that
error enters the loop unshaped. This RTL holds the digital logic that fixes
these errors without stopping the conversion:

* **Second-order dynamic element matching (DEM).** It decides which of the
  eight unit DAC elements stand for each 3-bit quantizer code. The element
  mismatch error then gets a (1 - z^-1)^2 spectrum and lands outside the
  signal band.
* **An LMS adaptive filter with 20 taps.** It takes the output of the fast,
  inaccurate modulator and fits it online to the output of a slow, accurate
  reference converter that sees the same held input. The aim is to
  calibrate the static errors (gain, leakage, offsets) in the background.
  In the behavioural SNR runs under Verification, the filter at its
  default step size added more in-band noise than it removed. Read that
  section before relying on it.
* **Two decimation filters.** A 32-phase, 64-tap polyphase FIR and a 4-stage
  CIC each turn the corrected 4 MHz stream into words at fs/32 = 125 kHz.

The reference numbers are fs = 4 MHz, OSR = 32, a 3-bit quantizer, 8 DAC
elements, 12-bit words in the adaptive filter and a step size mu = 0.02.
They come from the thesis this design follows, which evaluated the scheme in
mixed-signal simulation. The RTL, its word formats and the DEM circuit are
this implementation's own wherever that work gives only the function.

## Signal chain

```
              +--------------------+  q_ideal_i (3b)
 Vin --T/H--+-| accurate modulator |------------------------------+
            | +--------------------+                              |
            |                                                     v
            | +---------------------------------+  q_code_i  code_to_word -> Dideal
            +-| inaccurate 2nd-order modulator  |----+--------> code_to_word -> D
              |  int - int - 3-bit quantizer    |    |                |         |
              |        ^                        |    v                v         v
              |        +-- 8-element DAC <------|-- dem2_selector   +-----------------+
              +---------------------------------+   dac_sel_o       |  lms_adf        |
                    (analog, outside this RTL)                      |  Dout, e=Dideal-Dout
                                                                    +-----------------+
                                                                        | Dout
                                                      +-----------------+-----------------+
                                                      v                                   v
                                             polyphase_fir_decim                      cic_decim
                                              (fir_dout_o, /32)                   (cic_dout_o, /32)
```

`sd_correction_top` contains everything below the dashed analog boundary.
The two quantizer codes come in as ports. The DAC element enables go out as
`dac_sel_o`. The analog parts (track-and-hold, integrators, quantizers,
resistor DAC and the reference converter) are not RTL. The testbenches model
them behaviourally in `tb/sd2_mod3_model.sv`.

Each 3-bit code becomes a signed 12-bit Q1.11 word by
`word = (2*code - 7) * 256`, so the levels sit symmetrically around zero at
±7/8 of full scale. The low 8 bits of `x_o` are therefore always zero. The
two decimators run side by side on `Dout`. They are alternative designs for
the same job, so both outputs are brought out.

## Second-order element matching (`dem2_selector`)

This is the least obvious block. A code d in 0..7 must switch on exactly d of
the 8 elements. With a fixed choice (a plain thermometer code), element i's
mismatch appears as an error that follows the signal. First-order schemes
rotate a pointer so that every element is used equally often (data weighted
averaging). That gives the usage error of each element a (1 - z^-1) shape.
The second-order target is a (1 - z^-1)^2 shape. Doing that with the pointer
bookkeeping would need each element switched several times per sample.

This block reaches the same target in one pass, with error feedback per
element:

* Let `s_i(k)` be 1 when element i is on. Its scaled usage error is
  `u_i = 8*s_i - d`.
* Each element keeps a state q_i. The block enforces
  `u_i(k) = q_i(k) - 2 q_i(k-1) + q_i(k-2)`, so each element's usage error
  is exactly a second difference of a bounded sequence. That is the
  (1 - z^-1)^2 shaping.
* Rearranged, this gives `q_i(k) = u_i(k) + x_i` with the prediction
  `x_i = 2 q_i(k-1) - q_i(k-2)`. To keep q small, switch on the d elements
  with the *smallest* x_i.
* The hardware ranks the 8 predictions with 28 pairwise comparators. Ties go
  to the lower index. The code goes through the thermometer decoder, and
  element i takes the thermometer bit at its rank. This is a sorting network
  where a randomizer would have a butterfly.

The states are 10-bit and saturating. In a million samples of uniformly
random codes (the hardest case) their magnitude stayed below about 230, so
the shaping is exact in practice. The selection is combinational because it
sits inside the modulator loop. The states advance on each sample strobe. An
assertion checks that `$countones(sel_o) == code_i` on every sample.

The testbench checks the shaping directly. For a second-order shaped
sequence, the double running sum of every element's usage error stays
bounded. With a fixed thermometer code it grows without limit.

## LMS adaptive filter (`lms_adf`, `lms_block`)

The filter computes `Dout = sum_{i=0}^{19} w_i x[n-i]` and `e = Dideal - Dout`.
It updates every tap with `w_i += mu * e * x[n-i]` (Widrow-Hoff, with the
factor 2 folded into mu). It is built as four 5-tap sections (`lms_block`).
Each section has delay registers, tap registers, tap multipliers, an adder
chain and tap-update multipliers:

* The first section has no D0 register: its first tap uses the live input.
  So the 20 taps see x[n]..x[n-19], and the sections pass on x[n-4],
  x[n-9] and x[n-14].
* The partial sum runs backwards, from the last section to the first. The
  last section has no partial sum coming in.
* The error is formed once, in `lms_adf`, and shared by all update
  multipliers.

Word formats (this implementation's choice):

| quantity | format |
|---|---|
| x, Dideal, Dout, e | signed 12-bit Q1.11 |
| taps | signed 12-bit Q2.10, saturating |
| mu | 1311 / 2^16 = 0.0200 |
| partial sums | 29 bits, full precision |

Dout is rounded to nearest and saturated to 12 bits at the output.

**Dead zone.** A tap update below half a tap LSB rounds to zero. With 12-bit
taps and mu = 0.02, adaptation stops once |e·x| drops below about 2^27/1311
(in Q1.11 integer units). The filter settles near the optimum, not on it. In
a system-identification test the taps ended some tens of LSB away from the
ideal values, with the error power down about 50 times. For finer
convergence, widen `W_W`/`W_FRAC` or raise `MU`. The top passes these
three parameters through. The step size also sets the tap noise. See the
SNR results under Verification.

Timing: one sample per clock edge with `en_i` high. Dout and e are
combinational in the current inputs, and the taps update on the same edge.
The critical path runs through 20 multipliers, the adder chain, the error
subtractor and an update multiplier. That is fine at a 4 MHz sample rate.
For a faster clock, pipeline it. Be aware that delaying the error turns the
filter into delayed LMS.

## Decimators

**`polyphase_fir_decim`** computes `y[n] = sum_{i<64} h[i] x[32n - i]`
without computing the 31 of 32 outputs that would be discarded:

* A commutator steps 0, 31, 30, ..., 1. Sample m goes into phase
  (32 - m mod 32) mod 32.
* Each of the 32 phases keeps a 2-deep delay line, 64 registers in all.
* After each phase-0 sample, all 64 products are summed in one clock.
  `valid_o` rises one clock after that sample's edge.

The coefficients in `sd_pkg::FIR_COEF` are a Hamming-windowed sinc, designed
for this implementation:

    h[n] = w[n] · sin(2π·fc/fs·m) / (π·m),  m = n − 31.5,
    w[n] = 0.54 − 0.46·cos(2π·n/63),  fc = 43.75 kHz,  fs = 4 MHz

The cutoff is midway between the 25 kHz pass edge and the 62.5 kHz stop
edge. The values are scaled to sum to 32768 (DC gain 1 in Q1.15) and
rounded.

Sixty-four taps at 4 MHz cannot make a transition band of only 37.5 kHz.
The window's main lobe alone is about 250 kHz wide. The response is:

| frequency | gain |
|---|---|
| 25 kHz (pass edge) | −0.9 dB |
| 62.5 kHz (stop edge, half the output rate) | −5.7 dB |
| 125 kHz | −27 dB |
| 200 kHz and above | below −48 dB |

Noise between 62.5 and about 150 kHz therefore aliases into the output
band with little attenuation. For a sigma-delta input, shaped noise
rises steeply with frequency, so the loss is moderate. A sharper filter
needs more taps per phase (`P`) or a cascade: CIC first, then a short
FIR at the lower rate. The output is rounded and saturated to the 12-bit input width. To
use other coefficients, override the `COEF` parameter.

**`cic_decim`** has N = 4 integrators at fs, a rate switch at R = 32 and
N = 4 combs with M = 1 at fs/32, so `H(z) = ((1 - z^-32)/(1 - z^-1))^4`:

* All registers are N·log2(RM) + B_in = 32 bits wide and wrap in two's
  complement, which the CIC structure tolerates.
* The output keeps the input's 12-bit length. It is the top 12 bits, that
  is, the result divided by 32^4 and truncated.
* The integrators are registered, which adds 3 samples of latency.
* `valid_o` rises one clock after every 32nd sample's edge.

## Where this departs from the source design

* **DEM circuit.** The source gives the second-order shaping target and
  calls a direct implementation impractical. The error-feedback sorting
  selector above is this implementation's own.
* **Filter coefficients.** The source's 64 FIR coefficients came from a
  filter-design tool and were not published. The ones here are a
  replacement with the same pass and stop edges as design targets; with
  64 taps the stop edge gets only 5.7 dB (see Decimators).
* **CIC rate.** The source states both R = 32 and a 4 MHz to 62.5 kHz
  conversion, which would mean R = 64. It also quotes a 34-bit output MSB
  that matches neither. R = 32 is used, with widths from the standard
  register-growth formula. `R` is a parameter; R = 64 gives 36-bit
  registers.
* **LMS update input.** The source's drawing feeds the reference word d
  into the update multipliers. Its text says the taps are driven by the
  error e = d − Dout, which is what is built.
* **Glue logic.** Word formats, rounding, saturation, the code-to-word
  mapping, resets (asynchronous, active-low, to zero) and the sample-strobe
  interface are all this implementation's choices.
* **Decimator placement.** Placing both decimators on the corrected stream
  is an integration choice. The source designs both decimators but does not
  draw them into the corrected system.

## Verification

Every block has a self-checking testbench in `tb/`. Each ends with
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_therm_decoder` | all 3- and 4-bit codes |
| `tb_dem2_selector` | exact element count every sample; bounded double-integrated usage error over 16k random, constant and slowly varying codes; selections rotate |
| `tb_lms_block` | first and inner section against an integer model: partial sum, forwarded sample, all taps, with skipped samples |
| `tb_lms_adf` | 20-tap filter bit-exact against an integer LMS model for 8000 samples; identification of a known 4-tap FIR spread over all sections |
| `tb_polyphase_fir_decim` | impulse and random data against the direct-form FIR; output rate and latency |
| `tb_cic_decim` | random and full-scale DC data against the convolution of four moving sums; output rate and latency |
| `tb_sd_correction_top` | whole chain, no parameter overrides (see below) |
| `tb_fir_response` | FIR decimator's measured gain at DC and six tones against the response computed from the coefficients; pass-edge loss and stop-band attenuation |
| `tb_cic_response` | CIC passband droop at 1/32 to 1/4 of the output rate against the exact response and the standard attenuation table (0.04 to 3.64 dB, within 0.05 dB) |
| `tb_dem_snr` | in-band SNR of a modulator with a mismatched DAC, with and without the DEM (see below) |
| `tb_lms_snr` | in-band SNR of the whole scheme with analog errors, at two LMS step sizes (see below) |
| `tb_lms1_snr` | the same for a 1-bit modulator fed in as codes 0 and 7 (see below) |

`tb_sd_correction_top` drives two behavioural 3-bit modulators with a 0.2 V
sine. The inaccurate one has leakage 0.99, 0.09 % gain and element errors,
10 % offsets and 1 % comparator noise. The run lasts 16384 samples and
checks the following:

* The DEM switches on exactly `code` elements on every sample.
* After adaptation, the LMS error power is far below both the reference
  power and the uncorrected difference D − Dideal. The run shows about
  155k LSB², against 383k and 289k. Most of the remainder is the reference
  modulator's own quantization noise, which no filter of D can remove.
* Every FIR and CIC output word equals a direct computation from the
  recorded Dout stream.
* Each mechanism occurs at least once: DEM rotations, tap updates and both
  decimators' outputs.

**In-band SNR runs.** Both SNR testbenches decimate each stream by 32 with
`polyphase_fir_decim`. They fit a sine, cosine and DC term at the known
frequency over 384 output words and count everything else as noise. The
modulators are simple behavioural stand-ins, not the analog circuits, so
the figures show trends, not the source's numbers. The 12-bit decimated
word limits every measurement to about 62 dB.

* `tb_dem_snr` uses a fixed element mismatch pattern of up to ±2 %.
  Results: ideal DAC 61.6 dB, mismatched DAC with thermometer selection
  54.4 dB, mismatched DAC with `dem2_selector` 61.5 dB. The DEM recovers
  the mismatch loss.
* `tb_lms_snr` runs the whole top with the errors listed above. Results:
  accurate modulator 61.8 dB, erroneous modulator uncorrected 60.4 dB. The
  LMS-corrected output reaches only 21.0 dB with the default step
  (mu = 0.02, 12-bit taps). It reaches 32.6 dB with mu = 16/2^16 and 24-bit
  taps. The cause is gradient noise. The reference stream carries its own
  quantization noise, which is uncorrelated with x. That noise keeps
  moving the taps, and the moving taps modulate the signal into the band.
  In this model, then, the LMS stage with the default settings makes the
  in-band SNR worse, not better. Use a much smaller step with wider taps,
  or adapt on decimated words. The top exposes `MU`, `W_W` and `W_FRAC`
  for this.
* `tb_lms1_snr` uses 1-bit modulators (`tb/sd2_mod1_model.sv`). The
  erroneous one has a 20 % sampling-capacitor error, leakage 0.99, 10 %
  offsets and 1 % comparator noise. Results: accurate 47.2 dB, erroneous
  47.1 dB, after LMS 18.8 dB with the default step and 24.9 dB with the
  fine step. The picture is the same. With these simple modulator models,
  the analog errors cost almost nothing in band, because the sine fit
  absorbs gain and offset. The LMS tap noise then dominates.

## Simulating

Everything is plain SystemVerilog 2017. `rtl/sd_pkg.sv` must come first.
For example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/sd_pkg.sv tb/tb_sd_correction_top.sv --top-module tb_sd_correction_top
./obj_dir/Vtb_sd_correction_top
```

Replace the testbench name to run another one. All run in seconds.

## Files

* `rtl/sd_pkg.sv` holds the shared sizes, types, the FIR coefficients and
  `code_to_word`.
* `rtl/sd_correction_top.sv` is the top level.
* `rtl/dem2_selector.sv` and `rtl/therm_decoder.sv` hold the element
  selection.
* `rtl/lms_adf.sv` and `rtl/lms_block.sv` hold the adaptive filter.
* `rtl/polyphase_fir_decim.sv` and `rtl/cic_decim.sv` hold the decimators.
* `tb/sd2_mod3_model.sv` and `tb/sd2_mod1_model.sv` are the behavioural 3-bit and 1-bit modulators, testbench only.
* `tb/tb_*.sv` are the testbenches.
