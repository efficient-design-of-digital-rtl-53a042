// upsampler: raises the sample rate by L with zero insertion.
//
// Each accepted input sample is sent out once, followed by L-1 zero
// samples, one output sample per clock. This is interpolation by "adding
// zeroes": the images it creates are removed by the FIR filter that follows.
//
// Interface: a valid/ready input. in_ready is high when the zero run of the
// previous sample has ended, so a sample is taken at most once every L
// clocks; if no sample is offered the output simply goes idle
// (out_valid = 0). Output is registered: a sample taken at clock edge t
// appears on out_data after that edge, and its L-1 zeros follow on the next
// L-1 edges.
//
// The factor L = 2 is the reference design's; the sample width, the
// handshake and the synchronous active-low reset are this design's choices.
module upsampler #(
  parameter int unsigned L  = duc_pkg::INTERP,
  parameter int unsigned DW = duc_pkg::DATA_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic signed [DW-1:0] in_data,
  output logic                 out_valid,
  output logic signed [DW-1:0] out_data
);

  localparam int unsigned CW = (L > 1) ? $clog2(L) : 1;

  // Number of zeros still to be sent for the current sample.
  logic [CW-1:0] zeros_left;

  assign in_ready = (zeros_left == '0);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      zeros_left <= '0;
      out_valid  <= 1'b0;
      out_data   <= '0;
    end else if (in_valid && in_ready) begin
      zeros_left <= CW'(L - 1);
      out_valid  <= 1'b1;
      out_data   <= in_data;
    end else if (zeros_left != '0) begin
      zeros_left <= zeros_left - 1'b1;
      out_valid  <= 1'b1;
      out_data   <= '0;
    end else begin
      out_valid  <= 1'b0;
      out_data   <= '0;
    end
  end

endmodule
