// tb_iir_biquad: self-checking test of the direct-form-II biquad section.
//
// Two instances, one per coefficient set of the 4th-order low-pass, each
// shared by 8 channels with different inputs: a full-scale step, a 50 Hz and
// a 400 Hz sine at 5 kHz sampling, random noise, negative full scale, zero,
// and two slow ramps. Every output is compared with a floating-point
// direct-form-II model using the same quantized coefficients (tolerance 2
// LSB), its channel tag is checked, and the result must appear exactly one
// clock after its input. Afterwards `clear` must zero the history.
`timescale 1ns/1ps
module tb_iir_biquad;
  import daq_pkg::*;

  logic clk = 0, rst_n = 0, clear = 0;
  always #10 clk = ~clk;

  logic in_valid = 0;
  logic [2:0] in_ch = 0;
  sample_t in_sample = 0;
  logic v1, v2;
  logic [2:0] c1, c2;
  sample_t y1, y2;

  iir_biquad #(.COEF(SECTION1_COEF)) dut1 (.clk, .rst_n, .clear, .in_valid,
    .in_ch, .in_sample, .out_valid(v1), .out_ch(c1), .out_sample(y1));
  iir_biquad #(.COEF(SECTION2_COEF)) dut2 (.clk, .rst_n, .clear, .in_valid,
    .in_ch, .in_sample, .out_valid(v2), .out_ch(c2), .out_sample(y2));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // floating-point reference, coefficients as printed / 2^22
  real rw1 [2][8], rw2 [2][8];
  real cb0[2] = '{15780.0, 14821.0}, cb1[2] = '{31560.0, 29642.0},
       cb2[2] = '{15780.0, 14821.0}, ca1[2] = '{-7941560.0, -7458787.0},
       ca2[2] = '{3810375.0, 3323766.0};
  localparam real Q = 4194304.0;

  function automatic real ref_step(int s, int ch, real x);
    real w0 = x - (ca1[s] / Q) * rw1[s][ch] - (ca2[s] / Q) * rw2[s][ch];
    real y = (cb0[s] * w0 + cb1[s] * rw1[s][ch] + cb2[s] * rw2[s][ch]) / Q;
    rw2[s][ch] = rw1[s][ch];
    rw1[s][ch] = w0;
    if (y > 32767.0) y = 32767.0;
    if (y < -32768.0) y = -32768.0;
    return y;
  endfunction

  function automatic int stimulus(int ch, int n);
    real pi = 3.141592653589793;
    case (ch)
      0: return 20000;
      1: return int'(12000.0 * $sin(2.0 * pi * 50.0 * n / 5000.0));
      2: return int'(12000.0 * $sin(2.0 * pi * 400.0 * n / 5000.0));
      3: return int'($urandom % 65536) - 32768;
      4: return -32768;
      5: return 0;
      6: return (n * 37) % 30000 - 15000;
      default: return -(n * 11) % 20000;
    endcase
  endfunction

  real maxerr = 0;
  int settled_step = 0, sine400_amp = 0, sine50_amp = 0;

  task automatic compare(int s, int ch, int x, sample_t got);
    real want = ref_step(s, ch, real'(x));
    real d = real'(got) - want;
    if (d < 0) d = -d;
    if (d > maxerr) maxerr = d;
    check(d <= 2.0, $sformatf("sec%0d ch%0d got %0d want %f", s + 1, ch, got, want));
  endtask

  initial begin
    #50000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (rw1[s, c]) begin rw1[s][c] = 0; rw2[s][c] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int n = 0; n < 1500; n++) begin
      for (int ch = 0; ch < 8; ch++) begin
        automatic int x = stimulus(ch, n);
        in_valid <= 1; in_ch <= 3'(ch); in_sample <= sample_t'(x);
        @(posedge clk); #1;
        check(v1 && v2 && c1 == 3'(ch) && c2 == 3'(ch), "valid and channel after 1 clock");
        compare(0, ch, x, y1);
        compare(1, ch, x, y2);
        if (n > 1000 && ch == 2 && (int'(y1) > sine400_amp)) sine400_amp = int'(y1);
        if (n > 1000 && ch == 1 && (int'(y1) > sine50_amp)) sine50_amp = int'(y1);
        if (ch == 0) settled_step = int'(y1);
        // an idle cycle between some samples
        if (ch == 7) begin in_valid <= 0; @(posedge clk); #1; check(!v1, "no output without input"); end
      end
    end
    in_valid <= 0;
    check(settled_step >= 19990 && settled_step <= 20010, $sformatf("unity DC gain: %0d", settled_step));
    check(sine50_amp > 11000, $sformatf("50 Hz passes: amplitude %0d", sine50_amp));
    check(sine400_amp < 1200, $sformatf("400 Hz attenuated: amplitude %0d", sine400_amp));
    // clear empties the history: a zero input then gives zero output
    clear <= 1; @(posedge clk); clear <= 0;
    in_valid <= 1; in_ch <= 0; in_sample <= 0;
    @(posedge clk); #1; in_valid <= 0;
    check(y1 == 0 && y2 == 0, "clear zeroes the state");
    $display("max deviation from floating point: %f LSB", maxerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
