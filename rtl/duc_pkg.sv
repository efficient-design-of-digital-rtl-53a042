// duc_pkg: types and constants shared by the digital up converter.
//
// The converter takes a complex baseband stream (I and Q), raises its rate
// by 2 with zero insertion, low-pass filters each path with a 10-tap FIR,
// and mixes the result onto a carrier from a 32-bit DDS:
//   IF = I*cos(w0 n) - Q*sin(w0 n).
// Interpolation factor 2, the filter order (9), the DDS phase width (32),
// the DDS output width (16) and the reset tuning word 349525333 follow the
// reference design. Sample widths and the filter coefficients are this
// design's own choices.
package duc_pkg;

  // Baseband / filtered sample width (Q1.15).
  localparam int unsigned DATA_W = 16;

  // Interpolation factor.
  localparam int unsigned INTERP = 2;

  // FIR filter: 10 taps (order 9), direct form.
  localparam int unsigned NTAPS     = 10;
  localparam int unsigned COEF_W    = 16;
  localparam int unsigned COEF_FRAC = 14;   // coefficients are Q2.14

  typedef logic signed [COEF_W-1:0] coef_t;
  typedef coef_t coef_arr_t [NTAPS];

  // h[k] = round(2^14 * 2 * w[k] * sinc), a Hamming-windowed sinc with
  // cutoff 12.5 MHz at fs = 40 MHz (0.3125 fs), normalised to DC gain 2 so
  // that the amplitude lost to zero insertion is restored:
  //   h[k] = 2 * w[k] * 2fc*sinc(2fc*(k-4.5)) / sum_j(...),
  //   w[k] = 0.54 - 0.46 cos(2 pi k / 9),  fc = 0.3125.
  localparam coef_arr_t FIR_COEFS = '{
    16'sd103,   16'sd310,   -16'sd1876, 16'sd1041,  16'sd16807,
    16'sd16807, 16'sd1041,  -16'sd1876, 16'sd310,   16'sd103
  };

  // DDS: 32-bit phase accumulator, 16-bit sine/cosine.
  localparam int unsigned PHASE_W = 32;
  localparam int unsigned DDS_W   = 16;

  // Tuning word loaded at reset: fout = M * fclk / 2^32, i.e. 0.0813802 fclk
  // (20.0 MHz at 245.76 MHz, 8.14 MHz at 100 MHz).
  localparam logic [PHASE_W-1:0] PINC_DEFAULT = 32'd349525333;

  // IF output width: I*cos - Q*sin in Q2.15.
  localparam int unsigned IF_W = 17;

endpackage
