// fir_filter: low-pass anti-imaging FIR, direct form, one sample per clock.
//
// y[n] = sum_{k=0}^{NTAPS-1} h[k] * x[n-k]. The delay line holds the last
// NTAPS-1 accepted samples; on every in_valid the new sample and the delay
// line are multiplied by the coefficients, summed at full precision, and the
// sum is rounded (round half up) from Q(.COEF_FRAC) back to the input format
// and saturated to DW bits.
//
// Interface: in_valid/in_data in, out_valid/out_data out, no back-pressure.
// Latency: the result for the sample taken at edge t is registered at that
// same edge, so out_valid follows in_valid by one clock.
//
// The filter order (9, i.e. 10 taps) and the direct-form structure follow
// the reference design. Its coefficients are not given there; the defaults
// (duc_pkg::FIR_COEFS) are a windowed-sinc low-pass of this design, with a
// DC gain of 2 that makes up for the zero insertion before it.
module fir_filter #(
  parameter int unsigned DW        = duc_pkg::DATA_W,
  parameter int unsigned NTAPS     = duc_pkg::NTAPS,
  parameter int unsigned COEF_W    = duc_pkg::COEF_W,
  parameter int unsigned COEF_FRAC = duc_pkg::COEF_FRAC,
  parameter logic signed [COEF_W-1:0] COEFS [NTAPS] = duc_pkg::FIR_COEFS
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [DW-1:0] in_data,
  output logic                 out_valid,
  output logic signed [DW-1:0] out_data
);

  // Accumulator wide enough for NTAPS full-scale products.
  localparam int unsigned ACC_W = DW + COEF_W + $clog2(NTAPS) + 1;

  localparam logic signed [ACC_W-1:0] OUT_MAX = ACC_W'((2 ** (DW - 1)) - 1);
  localparam logic signed [ACC_W-1:0] OUT_MIN = -ACC_W'(2 ** (DW - 1));

  logic signed [DW-1:0]    dly [NTAPS-1];   // x[n-1] .. x[n-NTAPS+1]
  logic signed [ACC_W-1:0] acc;
  logic signed [ACC_W-1:0] rounded;

  always_comb begin
    acc = ACC_W'(COEFS[0]) * ACC_W'(in_data);
    for (int k = 1; k < NTAPS; k++) begin
      acc += ACC_W'(COEFS[k]) * ACC_W'(dly[k-1]);
    end
    rounded = (acc + (ACC_W'(1) <<< (COEF_FRAC - 1))) >>> COEF_FRAC;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < NTAPS - 1; k++) dly[k] <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        dly[0] <= in_data;
        for (int k = 1; k < NTAPS - 1; k++) dly[k] <= dly[k-1];
        if (rounded > OUT_MAX)      out_data <= OUT_MAX[DW-1:0];
        else if (rounded < OUT_MIN) out_data <= OUT_MIN[DW-1:0];
        else                        out_data <= rounded[DW-1:0];
      end
    end
  end

endmodule
