// complex_mixer_tb: self-checking test of the quadrature modulator.
//
// Drives random I, Q, cosine and sine words (including the extreme values)
// with a random in_valid pattern, and compares if_data two clocks later
// with floor((I*cos - Q*sin) / 2^15), computed with 64-bit integers; it also
// checks that out_valid is in_valid delayed by two clocks.
module complex_mixer_tb;
  localparam int DW = 16;
  localparam int CW = 16;
  localparam int OW = 17;

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
  logic signed [DW-1:0] i_data, q_data;
  logic signed [CW-1:0] cosine, sine;
  logic signed [OW-1:0] if_data;

  complex_mixer dut (.clk, .rst_n, .in_valid, .i_data, .q_data, .cosine, .sine,
                     .out_valid, .if_data);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic signed [15:0] pick();
    case ($urandom_range(7))
      0:       return 16'sh7FFF;
      1:       return 16'sh8000;
      2:       return 16'sh8001;
      default: return 16'($urandom);
    endcase
  endfunction

  longint exp_q [1];
  bit     vld_q [1];

  initial begin
    in_valid = 0; i_data = '0; q_data = '0; cosine = '0; sine = '0;
    exp_q = '{0}; vld_q = '{0};
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int n = 0; n < 5000; n++) begin
      longint e;
      in_valid = $urandom_range(3) != 0;
      i_data = pick(); q_data = pick();
      // Carrier words stay within the DDS full-range amplitude, +/-32767.
      cosine = pick(); sine = pick();
      if (cosine == 16'sh8000) cosine = 16'sh8001;
      if (sine == 16'sh8000) sine = 16'sh8001;
      e = (longint'(i_data) * cosine - longint'(q_data) * sine) >>> 15;
      @(posedge clk);
      #1;
      // Inputs set before edge n+1 are multiplied at edge n+1 and the
      // difference is registered at edge n+2: seen after the next edge.
      if (n >= 1) begin
        check(out_valid == vld_q[0], "out_valid is in_valid delayed by two clocks");
        check(longint'(if_data) == exp_q[0],
              $sformatf("if_data %0d expected %0d", if_data, exp_q[0]));
      end
      exp_q[0] = e; vld_q[0] = in_valid;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
