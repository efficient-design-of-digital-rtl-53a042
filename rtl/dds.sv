// dds: direct digital synthesizer (numerically controlled oscillator) with
// sine and cosine outputs.
//
// A PHASE_W-bit accumulator adds the tuning word M every clock, so the
// output frequency is fout = M * fclk / 2^PHASE_W and the step between
// tunable frequencies is fclk / 2^PHASE_W. The top LUT_AW phase bits address
// a full-wave sine table (the cosine is read from the same table a quarter
// turn ahead); the next FRAC_W bits are the residual phase d, used for a
// first-order Taylor correction:
//   sin(a + d) ~ sin(a) + d cos(a),   cos(a + d) ~ cos(a) - d sin(a).
// The table is computed at elaboration: T[i] = round(A sin(2 pi i / 2^LUT_AW)),
// A = 2^(OUT_W-1) - 1 (full-range amplitude).
//
// Interface: 'we' loads 'data' as the new tuning word; it is used from the
// next accumulation on. The accumulator is reset to phase 0 and the tuning
// word to PINC_RESET. Timing: the accumulator value present in cycle t is
// turned into sine/cosine two clocks later (table read register, correction
// register); out_valid rises once that pipeline holds real values.
//
// Phase width 32, output width 16, sine-and-cosine output, full-range
// amplitude, Taylor-series correction and the reset tuning word follow the
// reference design; the table size, the correction width and the pipeline
// are this design's choices.
module dds #(
  parameter int unsigned        PHASE_W    = duc_pkg::PHASE_W,
  parameter int unsigned        OUT_W      = duc_pkg::DDS_W,
  parameter int unsigned        LUT_AW     = 10,
  parameter int unsigned        FRAC_W     = 12,
  parameter logic [PHASE_W-1:0] PINC_RESET = duc_pkg::PINC_DEFAULT
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    we,
  input  logic [PHASE_W-1:0]      data,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] sine,
  output logic signed [OUT_W-1:0] cosine
);

  localparam int unsigned LUT_N = 2 ** LUT_AW;
  localparam int          AMP   = (2 ** (OUT_W - 1)) - 1;

  typedef logic signed [OUT_W-1:0] sample_t;
  typedef sample_t lut_t [LUT_N];

  function automatic lut_t make_sine_table();
    lut_t t;
    for (int i = 0; i < LUT_N; i++) begin
      t[i] = OUT_W'($rtoi($floor(real'(AMP) * $sin(2.0 * 3.14159265358979323846 * i / LUT_N) + 0.5)));
    end
    return t;
  endfunction

  localparam lut_t SINE_TABLE = make_sine_table();

  // 2*pi in Q4.16, the residual phase is d = r * 2*pi / 2^(LUT_AW+FRAC_W).
  localparam int unsigned K_FRAC = 16;
  localparam int          TWO_PI_Q = 411775;   // round(2*pi * 2^16)
  localparam int unsigned SHIFT    = FRAC_W + LUT_AW + K_FRAC;
  localparam int unsigned CORR_W   = OUT_W + FRAC_W + 21;

  // ---- phase generator --------------------------------------------------
  logic [PHASE_W-1:0] pinc;
  logic [PHASE_W-1:0] acc;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pinc <= PINC_RESET;
      acc  <= '0;
    end else begin
      acc <= acc + pinc;
      if (we) pinc <= data;
    end
  end

  // ---- stage 1: coarse table read ---------------------------------------
  logic [LUT_AW-1:0] addr;
  logic [FRAC_W-1:0] resid;
  sample_t           s_coarse, c_coarse;
  logic [FRAC_W-1:0] resid_q;

  assign addr  = acc[PHASE_W-1 -: LUT_AW];
  assign resid = acc[PHASE_W-LUT_AW-1 -: FRAC_W];

  always_ff @(posedge clk) begin
    s_coarse <= SINE_TABLE[addr];
    c_coarse <= SINE_TABLE[LUT_AW'(addr + LUT_AW'(LUT_N / 4))];
    resid_q  <= resid;
  end

  // ---- stage 2: Taylor correction ---------------------------------------
  function automatic logic signed [CORR_W-1:0] correction(sample_t x, logic [FRAC_W-1:0] r);
    logic signed [CORR_W-1:0] p;
    p = CORR_W'(x) * CORR_W'($signed({1'b0, r})) * CORR_W'(TWO_PI_Q);
    return (p + (CORR_W'(1) <<< (SHIFT - 1))) >>> SHIFT;
  endfunction

  function automatic sample_t clip(logic signed [CORR_W-1:0] v);
    if (v > CORR_W'(AMP))       return sample_t'(AMP);
    else if (v < -CORR_W'(AMP)) return sample_t'(-AMP);
    else                        return v[OUT_W-1:0];
  endfunction

  logic signed [CORR_W-1:0] s_fine, c_fine;

  always_comb begin
    s_fine = CORR_W'(s_coarse) + correction(c_coarse, resid_q);
    c_fine = CORR_W'(c_coarse) - correction(s_coarse, resid_q);
  end

  logic [1:0] fill;

  always_ff @(posedge clk) begin
    sine   <= clip(s_fine);
    cosine <= clip(c_fine);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) fill <= '0;
    else        fill <= {fill[0], 1'b1};
  end

  assign out_valid = fill[1];

endmodule
