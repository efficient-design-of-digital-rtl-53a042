// duc_top_tb: end-to-end test of the complex digital up converter at its
// default parameters.
//
// The testbench holds its own cycle model of the whole chain: zero
// insertion by 2, two 10-tap FIR filters with the published coefficient
// formula, a 32-bit phase accumulator with exact real sine and cosine, and
// IF = I*cos - Q*sin in Q2.15. Every if_out sample is compared with the
// model within 5 LSB (the synthesizer's table is accurate to about 1.5 LSB
// per term, plus truncation).
//
// Part 1 drives random I/Q pairs with random idle gaps and offers data while
// the converter is busy (stalls), retunes the synthesizer several times and
// drives full-scale values so that the filters saturate.
// Part 2 is the reference workload: a 4 kHz complex tone
// (I = A cos, Q = A sin) at an input rate of fclk/2 with the reset tuning
// word, i.e. a 20 MHz carrier for fclk = 245.76 MHz (baseband rate
// 122.88 MHz). One full 4 kHz period (61440 clocks) is run; the result is a
// single tone at 20.004 MHz: its envelope must stay near A and it must
// make 5001 cycles in the 61440 clocks.
// Each mechanism (zero insertion, input stall, idle gap, retune, filter
// saturation, carrier phase wrap) is counted and must occur.
module duc_top_tb;
  localparam int  DW = 16;
  localparam int  PW = 32;
  localparam int  NT = 10;
  localparam real PI = 3.14159265358979323846;
  localparam int  WORKLOAD_CLKS = 61440;       // one 4 kHz period at 245.76 MHz

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #2 clk = ~clk;

  int checks = 0;
  int failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  logic                 in_valid, in_ready, tune_we, if_valid;
  logic signed [DW-1:0] i_in, q_in;
  logic [PW-1:0]        tune_word;
  logic signed [16:0]   if_out;

  duc_top dut (.clk, .rst_n, .in_valid, .in_ready, .i_in, .q_in, .tune_we, .tune_word,
               .if_valid, .if_out);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- model --------------------------------------------------
  int h[NT] = '{103, 310, -1876, 1041, 16807, 16807, 1041, -1876, 310, 103};
  int xi[NT], xq[NT];

  function automatic int fir_step(ref int x[NT], input int s);
    longint acc = 0;
    for (int k = NT - 1; k > 0; k--) x[k] = x[k-1];
    x[0] = s;
    for (int k = 0; k < NT; k++) acc += longint'(h[k]) * x[k];
    acc = (acc + 8192) >>> 14;
    if (acc > 32767) acc = 32767;
    if (acc < -32768) acc = -32768;
    return int'(acc);
  endfunction

  // State "after edge k"; the suffix _p means "after edge k-1", etc.
  int            zeros_left;
  bit            up_v;     int up_i, up_q;
  bit            fir_v;    int fir_i, fir_q;
  bit            fir_v_p;  int fir_i_p, fir_q_p;
  logic [PW-1:0] acc, pinc;
  logic [PW-1:0] acc_h [4];    // acc after edges k-1 .. k-4 (k-2 .. k-5 before the update)
  int            k;

  // mechanism counters
  int n_taken, n_zeros, n_stall, n_gap, n_retune, n_sat, n_wrap, n_out;
  int n_cross;
  bit if_pos;
  real env_max, env_min;

  task automatic clock_step(input bit in_v, input int di, input int dq,
                      input bit we, input logic [PW-1:0] word, input bit workload);
    bit   take;
    bit   exp_v;
    real  ang, e;
    int   got;
    real  en;
    in_valid = in_v; i_in = DW'(di); q_in = DW'(dq);
    tune_we = we; tune_word = word;
    #1;
    check(in_ready == (zeros_left == 0), "in_ready");
    take = in_v && in_ready;
    if (in_v && !in_ready) n_stall++;
    @(posedge clk);
    k++;
    // mixer/output expectation uses filter output after edge k-2 and the
    // accumulator after edge k-4
    exp_v = fir_v_p && (k - 2 >= 2);
    ang   = 2.0 * PI * $itor(acc_h[2]) / 4294967296.0;
    e     = ($itor(fir_i_p) * 32767.0 * $cos(ang) - $itor(fir_q_p) * 32767.0 * $sin(ang)) / 32768.0;
    // advance the filter model (input: upsampler output after edge k-1)
    fir_v_p = fir_v; fir_i_p = fir_i; fir_q_p = fir_q;
    fir_v = up_v;
    if (up_v) begin
      fir_i = fir_step(xi, up_i);
      fir_q = fir_step(xq, up_q);
      if (fir_i == 32767 || fir_i == -32768 || fir_q == 32767 || fir_q == -32768) n_sat++;
    end
    // advance the upsampler model
    if (take) begin
      up_v = 1; up_i = di; up_q = dq; zeros_left = 1; n_taken++;
    end else if (zeros_left > 0) begin
      up_v = 1; up_i = 0; up_q = 0; zeros_left--; n_zeros++;
    end else begin
      up_v = 0; up_i = 0; up_q = 0;
    end
    // advance the phase accumulator model
    for (int j = 3; j > 0; j--) acc_h[j] = acc_h[j-1];
    acc_h[0] = acc;
    if (acc + pinc < acc) n_wrap++;
    acc = acc + pinc;
    if (we) begin pinc = word; n_retune++; end
    #1;
    check(if_valid == exp_v, $sformatf("if_valid at edge %0d: got %0b expected %0b", k, if_valid, exp_v));
    if (exp_v) begin
      got = int'(if_out);
      n_out++;
      check($itor(got) - e <= 5.0 && e - $itor(got) <= 5.0,
            $sformatf("if_out at edge %0d: %0d expected %f", k, got, e));
      if (workload) begin
        // carrier cycles of the IF tone: rising zero crossings
        if (got >= 0 && !if_pos) n_cross++;
        if_pos = (got >= 0);
        // envelope |I' + jQ'| of the filtered pair, for the workload check
        en = $sqrt($itor(fir_i_p) * fir_i_p + $itor(fir_q_p) * fir_q_p);
        if (en > env_max) env_max = en;
        if (en < env_min) env_min = en;
      end
    end else if (k > 10) n_gap++;
  endtask

  initial begin
    int  amp, di, dq;
    bit  v, w;
    real t;
    in_valid = 0; i_in = '0; q_in = '0; tune_we = 0; tune_word = '0;
    foreach (xi[j]) begin xi[j] = 0; xq[j] = 0; end
    zeros_left = 0; up_v = 0; up_i = 0; up_q = 0;
    fir_v = 0; fir_i = 0; fir_q = 0; fir_v_p = 0; fir_i_p = 0; fir_q_p = 0;
    acc = '0; pinc = 32'd349525333;
    foreach (acc_h[j]) acc_h[j] = '0;
    k = 0;
    n_taken = 0; n_zeros = 0; n_stall = 0; n_gap = 0; n_retune = 0; n_sat = 0; n_wrap = 0; n_out = 0;
    env_max = 0.0; env_min = 1.0e9;
    n_cross = 0; if_pos = 1'b1;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    // ---- part 1: random traffic, stalls, gaps, retunes, saturation --------
    for (int n = 0; n < 6000; n++) begin
      v  = ($urandom_range(3) != 0);
      w  = ($urandom_range(499) == 0);
      di = int'($signed(16'($urandom))) / 2;
      dq = int'($signed(16'($urandom))) / 2;
      if (n >= 3000 && n < 3100) begin di = 32767; dq = -32768; end   // full-scale DC
      clock_step(v, di, dq, w, $urandom, 1'b0);
    end
    // back to the reset tuning word before the workload
    clock_step(1'b0, 0, 0, 1'b1, 32'd349525333, 1'b0);
    for (int n = 0; n < 30; n++) clock_step(1'b0, 0, 0, 1'b0, '0, 1'b0);

    // ---- part 2: 4 kHz complex tone, 20 MHz carrier at 245.76 MHz ---------
    amp = 16000;
    for (int n = 0; n < WORKLOAD_CLKS; n++) begin
      // one input pair every 2 clocks: baseband rate 122.88 MHz
      t  = $itor(n / 2) * 4000.0 / 122.88e6;
      di = $rtoi(amp * $cos(2.0 * PI * t));
      dq = $rtoi(amp * $sin(2.0 * PI * t));
      clock_step(1'b1, di, dq, 1'b0, '0, n >= 20);   // envelope after the filter has settled
    end
    check(env_max < amp * 1.02 && env_min > amp * 0.98,
          $sformatf("workload envelope %f .. %f, expected ~%0d", env_min, env_max, amp));

    // IF tone = carrier + 4 kHz: 61440 * 0.0813802 + 1 = 5001 cycles
    check(n_cross >= 4999 && n_cross <= 5003, $sformatf("IF tone cycles %0d, expected 5001", n_cross));
    $display("mechanisms: taken=%0d zeros=%0d stalls=%0d gaps=%0d retunes=%0d saturations=%0d carrier_wraps=%0d outputs=%0d",
             n_taken, n_zeros, n_stall, n_gap, n_retune, n_sat, n_wrap, n_out);
    check(n_taken > 0,  "input samples were taken");
    check(n_zeros > 0,  "zeros were inserted");
    check(n_stall > 0,  "input was stalled by in_ready");
    check(n_gap > 0,    "output had idle gaps");
    check(n_retune > 0, "synthesizer was retuned");
    check(n_sat > 0,    "filter saturated");
    check(n_wrap > 0,   "carrier phase wrapped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
