// duc_top: complex digital up converter.
//
// Converts a complex baseband stream (I, Q) into one real intermediate-
// frequency stream at twice the input rate:
//   I, Q --(x2 zero insertion)--(10-tap low-pass FIR)--> I', Q'
//   IF[n] = I'[n] cos(w0 n) - Q'[n] sin(w0 n),   w0 = 2 pi M / 2^32
// where M is the DDS tuning word (fout = M fclk / 2^32). The two paths are
// identical and share one handshake.
//
// Interface and timing: one clock; one IF sample per clock when the input
// is supplied at full rate (a new I/Q pair every 2 clocks). A pair is taken
// on a clock edge where in_valid and in_ready are both high. The pair taken
// at edge t reaches the upsampler output after t, the filter output after
// t+1, and its first IF sample is on if_out after edge t+3 (the mixer adds
// two register stages). The DDS runs every clock from reset; tune_we loads
// tune_word as the new tuning word from the next accumulation on.
//
// The structure (two upsample-by-2 / FIR paths, DDS cosine and sine, two
// multipliers, plus/minus combination) follows the reference design; the
// clocking, the handshake and the widths are this design's choices.
module duc_top #(
  parameter int unsigned DW      = duc_pkg::DATA_W,
  parameter int unsigned L       = duc_pkg::INTERP,
  parameter int unsigned PHASE_W = duc_pkg::PHASE_W,
  parameter int unsigned CW      = duc_pkg::DDS_W,
  parameter int unsigned OUT_W   = duc_pkg::IF_W
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  output logic                    in_ready,
  input  logic signed [DW-1:0]    i_in,
  input  logic signed [DW-1:0]    q_in,
  input  logic                    tune_we,
  input  logic [PHASE_W-1:0]      tune_word,
  output logic                    if_valid,
  output logic signed [OUT_W-1:0] if_out
);

  logic                 ready_i, ready_q;
  logic                 take;
  logic                 up_valid_i, up_valid_q;
  logic signed [DW-1:0] up_i, up_q;
  logic                 flt_valid_i, flt_valid_q;
  logic signed [DW-1:0] flt_i, flt_q;
  logic                 dds_valid;
  logic signed [CW-1:0] carrier_sin, carrier_cos;

  assign in_ready = ready_i & ready_q;
  assign take     = in_valid & in_ready;

  // ---- in-phase path ------------------------------------------------------
  upsampler #(.L(L), .DW(DW)) u_up_i (
    .clk, .rst_n,
    .in_valid (take),     .in_ready (ready_i), .in_data (i_in),
    .out_valid(up_valid_i), .out_data(up_i)
  );

  fir_filter #(.DW(DW)) u_fir_i (
    .clk, .rst_n,
    .in_valid (up_valid_i),  .in_data (up_i),
    .out_valid(flt_valid_i), .out_data(flt_i)
  );

  // ---- quadrature path ----------------------------------------------------
  upsampler #(.L(L), .DW(DW)) u_up_q (
    .clk, .rst_n,
    .in_valid (take),     .in_ready (ready_q), .in_data (q_in),
    .out_valid(up_valid_q), .out_data(up_q)
  );

  fir_filter #(.DW(DW)) u_fir_q (
    .clk, .rst_n,
    .in_valid (up_valid_q),  .in_data (up_q),
    .out_valid(flt_valid_q), .out_data(flt_q)
  );

  // ---- carrier ------------------------------------------------------------
  dds #(.PHASE_W(PHASE_W), .OUT_W(CW)) u_dds (
    .clk, .rst_n,
    .we       (tune_we), .data(tune_word),
    .out_valid(dds_valid),
    .sine     (carrier_sin), .cosine(carrier_cos)
  );

  // ---- modulator ----------------------------------------------------------
  complex_mixer #(.DW(DW), .CW(CW), .OUT_W(OUT_W)) u_mix (
    .clk, .rst_n,
    .in_valid (flt_valid_i & flt_valid_q & dds_valid),
    .i_data   (flt_i), .q_data(flt_q),
    .cosine   (carrier_cos), .sine(carrier_sin),
    .out_valid(if_valid), .if_data(if_out)
  );

endmodule
