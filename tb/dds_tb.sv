// dds_tb: self-checking test of the direct digital synthesizer.
//
// The testbench keeps its own 32-bit phase: it starts at 0 after reset and
// adds the current tuning word every clock, the word changing one clock
// after a write on 'we'. Each sine/cosine output is compared with
// A*sin(2 pi p / 2^32) and A*cos(...), A = 32767, for the phase p two clocks
// earlier; the error must stay within 2 LSB (a table without the Taylor
// correction would be off by up to about 200 LSB). It checks the reset
// tuning word 349525333 (fout = 0.08138 fclk) by counting carrier cycles,
// retunes twice, and checks out_valid after reset.
module dds_tb;
  localparam int  PW  = 32;
  localparam int  OW  = 16;
  localparam real AMP = 32767.0;
  localparam real PI  = 3.14159265358979323846;

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

  logic                 we;
  logic [PW-1:0]        data;
  logic                 out_valid;
  logic signed [OW-1:0] sine, cosine;

  dds dut (.clk, .rst_n, .we, .data, .out_valid, .sine, .cosine);

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Model phase history: ph[0] is the accumulator value now, ph[2] two clocks ago.
  logic [PW-1:0] ph [3];
  logic [PW-1:0] inc;
  real           max_err = 0.0;
  int            wraps;
  logic          prev_sign;

  task automatic step(input bit w, input logic [PW-1:0] d);
    real es, ec, err_s, err_c;
    we = w; data = d;
    @(posedge clk);
    #1;
    ph[2] = ph[1]; ph[1] = ph[0];
    ph[0] = ph[0] + inc;
    if (w) inc = d;
    es = AMP * $sin(2.0 * PI * $itor(ph[2]) / 4294967296.0);
    ec = AMP * $cos(2.0 * PI * $itor(ph[2]) / 4294967296.0);
    err_s = $itor(sine) - es;   if (err_s < 0) err_s = -err_s;
    err_c = $itor(cosine) - ec; if (err_c < 0) err_c = -err_c;
    if (err_s > max_err) max_err = err_s;
    if (err_c > max_err) max_err = err_c;
    check(out_valid, "out_valid high in steady state");
    check(err_s <= 2.0 && err_c <= 2.0,
          $sformatf("phase %h: sin %0d (%f) cos %0d (%f)", ph[2], sine, es, cosine, ec));
    // count full carrier cycles by sine sign changes from - to +
    if (!prev_sign && sine >= 0 && ph[2] != ph[1]) wraps++;
    prev_sign = (sine >= 0);
  endtask

  initial begin
    we = 0; data = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    ph[0] = '0; ph[1] = '0; ph[2] = '0;
    inc = 32'd349525333;
    // First two clocks: pipeline filling.
    @(posedge clk); #1;
    check(!out_valid, "out_valid low while the pipeline fills");
    ph[1] = ph[0]; ph[0] = ph[0] + inc;
    @(posedge clk); #1;
    check(out_valid, "out_valid high two clocks after reset");
    check(sine == 0 && cosine == 16'sd32767, "first output is sin(0), cos(0)");
    ph[2] = ph[1]; ph[1] = ph[0]; ph[0] = ph[0] + inc;
    prev_sign = 1'b1;
    wraps = 0;
    // Reset tuning word: 4096 clocks hold 4096*0.0813802 = 333.3 carrier cycles.
    for (int n = 0; n < 4096; n++) step(1'b0, '0);
    check(wraps >= 332 && wraps <= 334, $sformatf("carrier cycles at reset word: %0d", wraps));
    // Retune: fout = fclk/8 -> 4096 clocks hold 512 cycles.
    step(1'b1, 32'h2000_0000);
    wraps = 0;
    for (int n = 0; n < 4096; n++) step(1'b0, '0);
    check(wraps >= 511 && wraps <= 513, $sformatf("carrier cycles at fclk/8: %0d", wraps));
    // Fine, odd tuning word to exercise the correction over all residues.
    step(1'b1, 32'd12345679);
    for (int n = 0; n < 20000; n++) step(1'b0, '0);
    // Random words.
    for (int n = 0; n < 20000; n++) step(($urandom_range(99) == 0), $urandom);
    $display("dds max error %f LSB", max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
