// upsampler_tb: self-checking test of the zero-insertion upsampler.
//
// Offers random signed samples with random idle gaps to an L = 2 and an
// L = 4 instance. For every accepted sample it expects, independently of
// the block, the sample on the output one clock later, followed by exactly
// L-1 zero samples on the next clocks, and in_ready low for those L-1
// clocks. It also checks that the output stream, read as a whole, is the
// input stream with L-1 zeros after each sample, and that back-to-back
// input gives one output sample every clock (rate L times the input rate).
module upsampler_tb;
  localparam int DW = 16;

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

  // ---- two instances ------------------------------------------------------
  logic                 v2, r2, ov2;
  logic signed [DW-1:0] d2, o2;
  logic                 v4, r4, ov4;
  logic signed [DW-1:0] d4, o4;

  upsampler #(.L(2), .DW(DW)) dut2 (.clk, .rst_n, .in_valid(v2), .in_ready(r2), .in_data(d2),
                                    .out_valid(ov2), .out_data(o2));
  upsampler #(.L(4), .DW(DW)) dut4 (.clk, .rst_n, .in_valid(v4), .in_ready(r4), .in_data(d4),
                                    .out_valid(ov4), .out_data(o4));

  // Expected output stream per instance, built from accepted inputs.
  logic signed [DW-1:0] exp2[$], exp4[$];
  int                   outs2 = 0, outs4 = 0;
  int                   busy2 = 0, busy4 = 0;   // remaining zeros expected

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Scoreboard on the output side.
  always @(posedge clk) begin
    if (rst_n) begin
      #1;
      if (ov2) begin
        check(exp2.size() > 0, "L=2 output without expected sample");
        if (exp2.size() > 0) begin
          automatic logic signed [DW-1:0] e = exp2.pop_front();
          check(o2 == e, $sformatf("L=2 out %0d expected %0d", o2, e));
        end
        outs2++;
      end
      if (ov4) begin
        check(exp4.size() > 0, "L=4 output without expected sample");
        if (exp4.size() > 0) begin
          automatic logic signed [DW-1:0] e = exp4.pop_front();
          check(o4 == e, $sformatf("L=4 out %0d expected %0d", o4, e));
        end
        outs4++;
      end
    end
  end

  task automatic run_phase(input int cycles, input int gap_pct);
    for (int c = 0; c < cycles; c++) begin
      // Offer (or not) a sample before the edge.
      v2 = ($urandom_range(99) >= gap_pct);
      v4 = ($urandom_range(99) >= gap_pct);
      d2 = DW'($urandom);
      d4 = DW'($urandom);
      #1;
      // in_ready must follow the zero run that is still being sent.
      check(r2 == (busy2 == 0), "L=2 in_ready");
      check(r4 == (busy4 == 0), "L=4 in_ready");
      @(posedge clk);
      if (v2 && r2) begin
        exp2.push_back(d2);
        exp2.push_back('0);
        busy2 = 1;
      end else if (busy2 > 0) busy2--;
      if (v4 && r4) begin
        exp4.push_back(d4);
        for (int z = 0; z < 3; z++) exp4.push_back('0);
        busy4 = 3;
      end else if (busy4 > 0) busy4--;
      #2;
    end
  endtask

  initial begin
    v2 = 0; v4 = 0; d2 = '0; d4 = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    #2;
    // Random traffic with gaps.
    run_phase(2000, 50);
    // Back-to-back input: output must be valid every clock.
    outs2 = 0; outs4 = 0;
    run_phase(400, 0);
    check(outs2 >= 398 && outs2 <= 400, $sformatf("L=2 full-rate output count %0d", outs2));
    check(outs4 >= 398 && outs4 <= 400, $sformatf("L=4 full-rate output count %0d", outs4));
    v2 = 0; v4 = 0;
    repeat (6) @(posedge clk);
    #2;
    check(exp2.size() == 0, "L=2 all expected samples emitted");
    check(exp4.size() == 0, "L=4 all expected samples emitted");
    check(!ov2 && !ov4, "outputs idle after input stops");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
