// fir_filter_tb: self-checking test of the 10-tap direct-form FIR.
//
// A reference model in the testbench keeps its own delay line and computes
// y[n] = sat(round(sum h[k] x[n-k] / 2^14)) with 64-bit integers. The test
// applies (1) an impulse of 0.5 full scale, whose response must be the
// coefficient list itself, (2) a full-scale DC step, which must saturate,
// (3) random samples with random gaps in in_valid, each output compared
// with the model, and (4) sines near DC and near half the sample rate to
// check that the filter is a low-pass (gain about 2 at low frequency, at
// least 20 dB less near fs/2). It also checks the one-clock latency.
module fir_filter_tb;
  localparam int DW = 16;
  localparam int NT = 10;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  logic                 in_valid, out_valid;
  logic signed [DW-1:0] in_data, out_data;

  fir_filter dut (.clk, .rst_n, .in_valid, .in_data, .out_valid, .out_data);

  // Reference coefficients: Hamming-windowed sinc, 0.3125 fs, gain 2, Q2.14.
  int h[NT] = '{103, 310, -1876, 1041, 16807, 16807, 1041, -1876, 310, 103};
  int x[NT];

  function automatic int model_step(input int sample);
    longint acc = 0;
    for (int k = NT - 1; k > 0; k--) x[k] = x[k-1];
    x[0] = sample;
    for (int k = 0; k < NT; k++) acc += longint'(h[k]) * x[k];
    acc = (acc + 8192) >>> 14;
    if (acc > 32767) acc = 32767;
    if (acc < -32768) acc = -32768;
    return int'(acc);
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Drive one cycle; when valid, compare the registered output after the edge.
  task automatic drive(input bit v, input int sample, output int got, output bit got_v);
    int expv;
    in_valid = v;
    in_data  = DW'(sample);
    if (v) expv = model_step(sample);
    @(posedge clk);
    #1;
    got   = int'(out_data);
    got_v = out_valid;
    check(out_valid == v, "out_valid follows in_valid by one clock");
    if (v) check(int'(out_data) == expv, $sformatf("y=%0d expected %0d", out_data, expv));
  endtask

  int   got;
  bit   gv;
  real  pk_lo, pk_hi;
  int   sat_seen;

  initial begin
    in_valid = 0; in_data = '0;
    foreach (x[k]) x[k] = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    #1;
    // (1) impulse of 0.5 FS -> coefficients appear in order
    for (int n = 0; n < NT + 2; n++) begin
      drive(1'b1, (n == 0) ? 16384 : 0, got, gv);
      check(got == ((n < NT) ? h[n] : 0), $sformatf("impulse response tap %0d = %0d", n, got));
    end
    // (2) full-scale DC: gain 2 must saturate at +FS
    sat_seen = 0;
    for (int n = 0; n < 20; n++) begin
      drive(1'b1, 32767, got, gv);
      if (got == 32767) sat_seen++;
    end
    check(sat_seen >= 5, "positive saturation reached");
    for (int n = 0; n < 20; n++) drive(1'b1, -32768, got, gv);
    check(got == -32768, "negative saturation reached");
    // (3) random data with gaps
    for (int n = 0; n < 3000; n++) begin
      drive($urandom_range(3) != 0, int'($signed(16'($urandom))) / 2, got, gv);
    end
    // (4) low-pass shape: 0.02 fs passes with gain ~2, 0.45 fs is stopped
    pk_lo = 0; pk_hi = 0;
    for (int n = 0; n < 400; n++) begin
      drive(1'b1, $rtoi(8000.0 * $sin(2.0 * 3.141592653589793 * 0.02 * n)), got, gv);
      if (n > 50 && $itor(got) > pk_lo) pk_lo = $itor(got);
    end
    for (int n = 0; n < 400; n++) begin
      drive(1'b1, $rtoi(8000.0 * $sin(2.0 * 3.141592653589793 * 0.45 * n)), got, gv);
      if (n > 50 && $itor(got) > pk_hi) pk_hi = $itor(got);
    end
    check(pk_lo > 15000.0 && pk_lo < 17000.0, $sformatf("passband peak %f (expect ~16000)", pk_lo));
    check(pk_hi < 1600.0, $sformatf("stopband peak %f (expect < 1600)", pk_hi));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
