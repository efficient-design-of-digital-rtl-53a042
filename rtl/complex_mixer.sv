// complex_mixer: quadrature modulator of the up converter.
//
// Multiplies the filtered in-phase sample by the carrier cosine and the
// filtered quadrature sample by the carrier sine, and subtracts:
//   if_data = I*cos(w0 n) - Q*sin(w0 n).
// Products are kept at full precision (Q2.30 for Q1.15 inputs); the
// difference is truncated (low bits dropped) to OUT_W bits starting at bit
// DW+CW-OUT_W, i.e. Q2.15 for the defaults. Since |I cos - Q sin| is at most
// sqrt(I^2 + Q^2) times the carrier amplitude, it stays below 2 and
// cannot overflow Q2.15.
//
// Interface: in_valid qualifies i_data, q_data, cosine and sine together;
// out_valid follows in_valid two clocks later (product register, then
// difference register). No back-pressure.
//
// The two multipliers and the +/- combination (plus on the cosine path,
// minus on the sine path) follow the reference block diagram; widths and
// pipeline depth are this design's choices.
module complex_mixer #(
  parameter int unsigned DW    = duc_pkg::DATA_W,
  parameter int unsigned CW    = duc_pkg::DDS_W,
  parameter int unsigned OUT_W = duc_pkg::IF_W
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [DW-1:0]    i_data,
  input  logic signed [DW-1:0]    q_data,
  input  logic signed [CW-1:0]    cosine,
  input  logic signed [CW-1:0]    sine,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] if_data
);

  localparam int unsigned PW = DW + CW;        // product width
  localparam int unsigned SW = PW + 1;         // difference width
  localparam int unsigned LSB = PW - OUT_W;   // Q3.30 sum -> Q2.15 for the defaults

  logic signed [PW-1:0] prod_i, prod_q;
  logic                 valid_p;
  logic signed [SW-1:0] diff;

  assign diff = SW'(prod_i) - SW'(prod_q);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      valid_p   <= 1'b0;
      out_valid <= 1'b0;
      prod_i    <= '0;
      prod_q    <= '0;
      if_data   <= '0;
    end else begin
      valid_p   <= in_valid;
      out_valid <= valid_p;
      prod_i    <= i_data * cosine;
      prod_q    <= q_data * sine;
      if_data   <= diff[LSB +: OUT_W];
    end
  end

endmodule
