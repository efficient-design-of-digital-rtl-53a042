# Complex digital up converter (DUC)

A transmitter produces its baseband signal as complex samples, I and Q, at a
low rate, typically the symbol rate. Before it can drive a final analog
up converter, that signal must be raised to a higher sample rate and
modulated onto an intermediate-frequency (IF) carrier. This RTL does both:

```
            +-------+    +-----------+
 i_in  ---->|  ^2   |--->| 10-tap LP |---> I' --(x)--+
            +-------+    |    FIR    |        ^     |  +
                         +-----------+        |cos  v
                               +-----------+  |   (+)---> if_out  (real IF)
 tune_word/tune_we ----------->|    DDS    |--+     ^
                               | 32-bit NCO|--+     |  -
            +-------+    +-----------+        |sin  |
 q_in  ---->|  ^2   |--->| 10-tap LP |---> Q' --(x)--+
            +-------+    |    FIR    |
                         +-----------+

   if_out[n] = I'[n] * cos(w0 n) - Q'[n] * sin(w0 n),   w0 = 2*pi*M / 2^32
```

The two paths are identical. Each raises its rate by two by inserting a zero
after every sample, and a low-pass FIR removes the spectral image that zero
insertion creates. A direct digital synthesizer (DDS, also called an NCO)
makes a cosine and a sine at the carrier frequency, and a quadrature
modulator combines the two paths into one real signal. With a complex
input tone `I = A cos(wm n)`, `Q = A sin(wm n)` the output is a single tone
at `w0 + wm`.

The overall structure follows a published reference design: upsample by 2,
a filter of order 9 (10 taps) in direct form, and a DDS with a 32-bit phase,
16-bit sine and cosine, Taylor-series correction, full-range amplitude and a
default tuning word of 349525333. The reference does not give the sample
widths, the filter coefficients, the handshake, the reset behaviour or the
pipeline. Those are choices of this implementation, listed under
[Departures and open points](#departures-and-open-points).

## Files

| file | contents |
|---|---|
| `rtl/duc_pkg.sv` | shared widths, filter coefficients and default tuning word |
| `rtl/upsampler.sv` | zero insertion by `L` |
| `rtl/fir_filter.sv` | direct-form FIR with rounding and saturation |
| `rtl/dds.sv` | phase accumulator, sine table, Taylor correction |
| `rtl/complex_mixer.sv` | two multipliers and the I·cos − Q·sin combiner |
| `rtl/duc_top.sv` | the converter |
| `tb/*_tb.sv` | one self-checking testbench per module |

## Clocking, rates and handshake

The whole design runs on one clock `clk`. Every block after the
upsamplers produces one sample per clock, so the IF rate equals `fclk`.
The baseband rate is `fclk / 2`.

The input is a valid/ready stream shared by I and Q. A pair is taken on a
rising edge where `in_valid` and `in_ready` are both high. After a pair is
taken, `in_ready` stays low for one clock while the inserted zero goes out.
A source that keeps `in_valid` high therefore delivers one pair every two
clocks, and the output is then valid every clock. If the source pauses,
the upsamplers emit nothing, and `if_valid` drops for the same number of
clocks further down. There is no back-pressure on the output.

Latency, counted in rising edges from the edge that takes a pair:

| stage | register stages | sample visible after edge |
|---|---|---|
| upsampler output | 1 | t |
| FIR output | 1 | t+1 |
| mixer products | 1 | t+2 |
| `if_out` | 1 | t+3 |

The zero that follows the sample appears one edge later at each point.
The DDS runs every clock from reset, independently of the data. The
carrier samples that meet a data sample are the ones present in that
clock. Because the pipeline delay is fixed, it only shifts the carrier
phase and does not change the result. The DDS has two pipeline stages. The
accumulator value present between edges `k-1` and `k` appears as
sine/cosine after edge `k+1`. The mixer uses that carrier pair at edge `k+2`.

Reset `rst_n` is synchronous and active low. It clears the data path,
sets the accumulator to phase 0, and loads the default tuning word. The
first valid carrier sample (`sin 0 = 0`, `cos 0 = 32767`) appears two clocks
after reset is released.

## Number formats

| signal | width | format |
|---|---|---|
| `i_in`, `q_in`, filter outputs | 16 | Q1.15, signed |
| filter coefficients | 16 | Q2.14, signed |
| DDS sine/cosine | 16 | ±32767 (full range, Q1.15) |
| mixer products | 32 | Q2.30 |
| `if_out` | 17 | Q2.15 |

`if_out` cannot overflow. `|I cos − Q sin| ≤ sqrt(I² + Q²)`, and that stays
below 2 for Q1.15 inputs. The low 15 bits of the Q3.30 difference are
dropped by truncation. The filter output is rounded half up and saturated.

## Interpolation: zero insertion and the low-pass filter

Inserting a zero after each sample doubles the rate without changing the
spectrum. The baseband spectrum now repeats at `fs/2`, and the FIR removes
that copy. Zero insertion also halves the signal's average amplitude. The
coefficients are therefore scaled to a DC gain of 2, so a baseband
amplitude `A` comes out of the filter as about `A`.

The coefficients (`duc_pkg::FIR_COEFS`) are a Hamming-windowed sinc with 10
taps and cutoff `0.3125·fs`. For `fs` = 40 MHz that is 12.5 MHz.

```
h[k] = 2 * w[k] * s[k] / sum_j(w[j] * s[j]),   k = 0..9
s[k] = sin(2*pi*0.3125*(k-4.5)) / (pi*(k-4.5))
w[k] = 0.54 - 0.46*cos(2*pi*k/9)
coefficients = round(2^14 * h) = 103 310 -1876 1041 16807 16807 1041 -1876 310 103
```

At `fs` = 40 MHz the response, relative to DC, is:

| frequency | 5 MHz | 10 MHz | 15 MHz | 19.5 MHz | 20 MHz |
|---|---|---|---|---|---|
| response | −0.06 dB | −2.2 dB | −13 dB | −42 dB | zero |

The zero at 20 MHz comes from the even, symmetric tap count. The
reference's filter specification (5 MHz pass band, 20 MHz stop band) puts
its stop band at `fs/2` for a 40 MHz rate, which this filter meets in shape.
A 10-tap filter cannot reach a stop-band attenuation of 140 dB, and neither
can the order-9 filter of the reference. Both halves of every output pair
see a gain of almost exactly 1: the even taps sum to 16385 and the odd taps
to 16385.

The filter is a plain direct form. On each valid input it forms the full
sum of all 10 products of the new sample and the 9-deep delay line. The
accumulator is 37 bits, so a full-scale input cannot overflow it. The
inserted zeros go through the multipliers like any other sample. A
polyphase filter would skip them and halve the multipliers; this design
does not do that. Other coefficient sets can be passed through the
`COEFS` parameter, with `NTAPS`, `COEF_W` and `COEF_FRAC` set to match.

## Carrier synthesis: the DDS

A 32-bit accumulator adds the tuning word `M` every clock. Its value is the
carrier phase in units of `2π / 2^32`:

```
fout = M * fclk / 2^32        frequency step = fclk / 2^32
```

The default `M = 349525333` gives `fout = 0.0813802·fclk`:

| clock | carrier |
|---|---|
| 245.76 MHz | 20.000 MHz |
| 100 MHz | 8.138 MHz |

A 20 MHz carrier at 100 MHz needs `M = 858993459`. Writing `tune_word`
with `tune_we` high changes `M` from the next accumulation on. Phase stays
continuous, so frequency hops are glitch-free.

Turning phase into amplitude takes two steps:

1. **Table.** The top 10 phase bits address a 1024-entry full-wave sine
   table. Each entry is `round(32767·sin(2πi/1024))`. The table is computed
   at elaboration by a constant function, so nothing is read from a file.
   The cosine is the same table read at address + 256, a quarter turn
   ahead. Synthesis maps the two reads to ROM; yosys keeps one 16 Kbit copy
   per read port.
2. **Taylor correction.** The table alone is off by up to `2π/1024·32767`,
   about 200 LSB. The next 12 phase bits give the residual angle `d`, in
   `[0, 2π/1024)`, and a first-order correction is applied:

   ```
   sin(a+d) ≈ sin a + d·cos a        cos(a+d) ≈ cos a − d·sin a
   d·x = (x · r · round(2π·2^16)) >> (12 + 10 + 16)   (rounded), r = residual bits
   ```

   The remaining error is the second-order term, `d²/2·32767`, at most
   about 0.6 LSB, plus the error from dropping the lowest 10 phase bits.
   The testbench measures at most 1.54 LSB over random phases. Results are
   clipped to ±32767.

`LUT_AW` (table address bits) and `FRAC_W` (correction bits) are parameters.
A larger table lowers the second-order error at the cost of ROM.

## Quadrature modulator

Two signed 16×16 multipliers form `I'·cos` and `Q'·sin` in one register
stage. A subtractor forms their difference in the next. The minus sign on
the sine path makes the output the upper sideband, `w0 + wm`, for a
positive-frequency baseband tone. Swapping the sign would mirror the
spectrum.

## Parameters

| module | parameter | default | origin |
|---|---|---|---|
| `upsampler` | `L` | 2 | reference |
| all | `DW` | 16 | own choice |
| `fir_filter` | `NTAPS` | 10 | reference (order 9) |
| `fir_filter` | `COEF_W` / `COEF_FRAC` / `COEFS` | 16 / 14 / above | own choice |
| `dds` | `PHASE_W` | 32 | reference |
| `dds` | `OUT_W` | 16 | reference |
| `dds` | `PINC_RESET` | 349525333 | reference |
| `dds` | `LUT_AW` / `FRAC_W` | 10 / 12 | own choice |
| `complex_mixer` | `OUT_W` | 17 | own choice |

All synthesizable code is plain SystemVerilog-2017. Yosys maps the whole
converter to about 130 word-level cells and 263 flip-flops, plus the
sine ROM and the two filters' coefficient tables.

## Simulation

Every testbench checks itself, ends with a line
`TB_RESULT checks=N failures=M`, and needs no input files. With Verilator 5:

```
verilator --binary --timing -y rtl rtl/duc_pkg.sv tb/duc_top_tb.sv --top-module duc_top_tb
./obj_dir/Vduc_top_tb
```

Replace `duc_top_tb` with `upsampler_tb`, `fir_filter_tb`, `dds_tb` or
`complex_mixer_tb` to test one block. Verilator has only two logic states,
so every register that is read is reset or qualified by a valid signal.

What each testbench checks against its own independent model:

- **`upsampler_tb`** uses instances with L = 2 and L = 4 and random gaps.
  It checks each sample and its L−1 zeros, the timing of `in_ready`, and
  the full-rate output.
- **`fir_filter_tb`** checks that an impulse gives back the coefficients,
  and that a full-scale DC input saturates both ways. It compares random
  data, with gaps, bit-exactly against a 64-bit model. It also checks that
  the gain is about 2 near DC and at least 20 dB lower at 0.45·fs, and that
  the latency is one clock.
- **`dds_tb`** follows its own phase accumulator through reset, the default
  word, two retunes and random retunes. It compares every output with
  exact sine and cosine within 2 LSB. It also counts carrier cycles to check
  `fout = M·fclk/2^32`.
- **`complex_mixer_tb`** compares random and extreme operands bit-exactly
  and checks the two-clock valid delay.
- **`duc_top_tb`** models the whole chain cycle by cycle and compares every
  `if_out` within 5 LSB. Part 1 drives random data, idle gaps, input
  stalls, several retunes and full-scale input that saturates the filters. Part 2
  is the reference workload: a 4 kHz complex tone at 122.88 MS/s,
  upconverted with the default word (a 20 MHz carrier at 245.76 MHz), for
  one full 4 kHz period of 61440 clocks. It checks that the envelope stays
  within 2 % of the input amplitude, and that the IF tone makes
  5001 ± 2 cycles, one more than the carrier's 5000.
  It counts each mechanism (zero insertion, stall, gap, retune, saturation,
  phase wrap) and fails if any never happened. It runs at default
  parameters in well under a second.

## Departures and open points

- **Filter coefficients** are this design's own. The reference shows only
  the order, the structure and a magnitude plot.
- **Filter specification.** The reference lists a 0.1 dB and a 140 dB
  ripple figure with the two labels apparently swapped. Neither its
  filter nor this one reaches 140 dB.
- **Clock rate.** The reference configures its DDS for a 100 MHz clock and
  reports a 20 MHz carrier, but its tuning word gives 8.14 MHz at 100 MHz
  and 20 MHz at 245.76 MHz. The RTL has no fixed clock. The tuning word is
  the reference's, and the port `tune_word` sets any other frequency.
- **Combiner sign.** The block diagram marks the sine product as
  subtracted, and that is what is built. A later implementation figure
  labels its adder `a + b`.
- **DDS internals.** The table size, correction width and two-stage
  pipeline are this design's own. Only the configuration (phase and output
  width, Taylor correction, sine and cosine, full range) comes from the
  reference. A phase-offset input is not provided.
- **Handshake, reset and widths** are this design's own, as described
  above.
- Outside this RTL: the signal sources and scopes of the reference's
  simulation model, and the analog up converter that `if_out` would drive.
