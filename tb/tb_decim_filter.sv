// tb_decim_filter: self-checking test of the decimation filter unit in all
// three modes.
//
// Frames arrive one per clock (the unit does not care about the 1 us spacing
// of the real ADC). Checks:
//   1 MHz mode: every frame comes out unchanged one clock later.
//   5 kHz mode: frames 0, 200, 400, ... come out two clocks later, no others.
//   filtered mode: each kept frame comes out 12 clocks later, every channel
//     within 3 LSB of a floating-point model of the two cascaded sections
//     (same quantized coefficients, section output rounded to 16 bits);
//     a 50 Hz sine passes, a 400 Hz sine is attenuated, DC gain is 1.
//   a mode change or a restart pulse restarts the decimator and clears the
//   filter history.
`timescale 1ns/1ps
module tb_decim_filter;
  import daq_pkg::*;

  logic clk = 0, rst_n = 0;
  always #10 clk = ~clk;
  acq_mode_e mode = MODE_1MHZ;
  logic restart = 0;
  logic in_valid = 0, out_valid;
  frame_t in_frame = '0, out_frame;

  decim_filter dut (.clk, .rst_n, .mode, .restart, .in_valid, .in_frame, .out_valid, .out_frame);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // output log, sampled between edges; times in clock periods
  frame_t outq[$];
  int     outc[$];
  always @(negedge clk) if (out_valid) begin
    outq.push_back(out_frame);
    outc.push_back(int'(($time - 10) / 20));
  end

  // floating-point reference of the cascade
  real rw1 [2][8], rw2 [2][8];
  real cb0[2] = '{15780.0, 14821.0}, cb1[2] = '{31560.0, 29642.0},
       cb2[2] = '{15780.0, 14821.0}, ca1[2] = '{-7941560.0, -7458787.0},
       ca2[2] = '{3810375.0, 3323766.0};
  localparam real Q = 4194304.0;
  function automatic real sec(int s, int ch, real x);
    real w0 = x - (ca1[s] / Q) * rw1[s][ch] - (ca2[s] / Q) * rw2[s][ch];
    real y = (cb0[s] * w0 + cb1[s] * rw1[s][ch] + cb2[s] * rw2[s][ch]) / Q;
    rw2[s][ch] = rw1[s][ch];
    rw1[s][ch] = w0;
    y = (y >= 0) ? $floor(y + 0.5) : -$floor(-y + 0.5);
    if (y > 32767.0) y = 32767.0;
    if (y < -32768.0) y = -32768.0;
    return y;
  endfunction
  task automatic ref_clear();
    foreach (rw1[s, c]) begin rw1[s][c] = 0; rw2[s][c] = 0; end
  endtask

  localparam real PI = 3.141592653589793;
  // channel k of 1 MHz frame n
  function automatic int sig(int k, int n);
    real t = n / 1.0e6;
    case (k)
      0: return 10000;
      1: return int'(15000.0 * $sin(2.0 * PI * 50.0 * t));
      2: return int'(15000.0 * $sin(2.0 * PI * 400.0 * t));
      3: return -20000;
      4: return int'(8000.0 * $sin(2.0 * PI * 10.0 * t)) + 5000;
      5: return int'($urandom % 4001) - 2000;
      6: return int'(12000.0 * $sin(2.0 * PI * 417.0 * t));
      default: return int'(15000.0 * $sin(2.0 * PI * 50.0 * t + 1.0));
    endcase
  endfunction
  function automatic frame_t mk(int n);
    frame_t f;
    for (int k = 0; k < 8; k++) f[k] = 16'(sig(k, n));
    return f;
  endfunction

  initial begin
    #40000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  frame_t sent[$];
  int     sentc[$];
  task automatic feed(int count);
    for (int n = 0; n < count; n++) begin
      in_valid = 1;
      in_frame = mk(n);
      sent.push_back(in_frame);
      sentc.push_back(int'(($time - 1) / 20));   // edge before the one that takes it
      @(posedge clk); #1;
    end
    in_valid = 0;
    repeat (20) @(posedge clk);
    #1;
  endtask

  int amp50 = 0, amp400 = 0, amp417 = 0;
  real maxerr = 0;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;

    // ---- 1 MHz mode
    feed(300);
    check(outq.size() == 300, $sformatf("1 MHz: %0d frames out of 300", outq.size()));
    for (int i = 0; i < outq.size() && i < 300; i++) begin
      check(outq[i] == sent[i], $sformatf("1 MHz frame %0d unchanged", i));
      check(outc[i] == sentc[i] + 1, $sformatf("1 MHz latency %0d clocks, want 1", outc[i] - sentc[i]));
    end
    outq.delete(); outc.delete(); sent.delete(); sentc.delete();

    // ---- 5 kHz mode
    mode = MODE_5KHZ;
    @(posedge clk); #1;
    feed(1000);
    check(outq.size() == 5, $sformatf("5 kHz: %0d frames out of 1000, want 5", outq.size()));
    for (int i = 0; i < outq.size(); i++) begin
      check(outq[i] == sent[200 * i], $sformatf("5 kHz frame %0d is input %0d", i, 200 * i));
      check(outc[i] == sentc[200 * i] + 2, "5 kHz latency 2 clocks");
    end
    outq.delete(); outc.delete(); sent.delete(); sentc.delete();

    // ---- 5 kHz filtered mode: 0.6 s of signal = 3000 output frames
    mode = MODE_5KHZ_FILT;
    @(posedge clk); #1;
    ref_clear();
    feed(600000);
    check(outq.size() == 3000, $sformatf("filtered: %0d frames, want 3000", outq.size()));
    for (int i = 0; i < outq.size(); i++) begin
      automatic frame_t x = sent[200 * i];
      check(outc[i] == sentc[200 * i] + 12, $sformatf("filter latency %0d clocks, want 12",
                                                      outc[i] - sentc[200 * i]));
      for (int k = 0; k < 8; k++) begin
        automatic real want = sec(1, k, sec(0, k, real'($signed(x[k]))));
        automatic real d = real'($signed(outq[i][k])) - want;
        if (d < 0) d = -d;
        if (d > maxerr) maxerr = d;
        check(d <= 3.0, $sformatf("filtered frame %0d ch%0d got %0d want %f", i, k + 1,
                                  $signed(outq[i][k]), want));
      end
      if (i > 1500) begin
        if (int'($signed(outq[i][1])) > amp50)  amp50  = int'($signed(outq[i][1]));
        if (int'($signed(outq[i][2])) > amp400) amp400 = int'($signed(outq[i][2]));
        if (int'($signed(outq[i][6])) > amp417) amp417 = int'($signed(outq[i][6]));
      end
    end
    check($signed(outq[2999][0]) == 10000, $sformatf("DC gain 1: %0d", $signed(outq[2999][0])));
    check($signed(outq[2999][3]) == -20000, "DC gain 1, negative");
    check(amp50 > 14500, $sformatf("50 Hz passes: %0d", amp50));
    check(amp400 < 1000, $sformatf("400 Hz attenuated: %0d", amp400));
    check(amp417 < 700, $sformatf("417 Hz attenuated: %0d", amp417));
    $display("filter: max deviation %f LSB, 50 Hz amp %0d, 400 Hz amp %0d, 417 Hz amp %0d",
             maxerr, amp50, amp400, amp417);
    outq.delete(); outc.delete(); sent.delete(); sentc.delete();

    // ---- mode change clears: back to 5 kHz unfiltered, then filtered again
    mode = MODE_5KHZ;
    @(posedge clk); #1;
    mode = MODE_5KHZ_FILT;
    @(posedge clk); #1;
    ref_clear();
    feed(1);
    check(outq.size() == 1, "first frame after a mode change is kept");
    if (outq.size() == 1)
      for (int k = 0; k < 8; k++) begin
        automatic real want = sec(1, k, sec(0, k, real'($signed(sent[0][k]))));
        automatic real d = real'($signed(outq[0][k])) - want;
        check(d <= 1.0 && d >= -1.0, "filter restarts from zero history");
      end
    outq.delete(); outc.delete(); sent.delete(); sentc.delete();

    // ---- restart pulse: same effect without a mode change
    feed(457);
    outq.delete(); outc.delete(); sent.delete(); sentc.delete();
    restart = 1;
    @(posedge clk); #1;
    restart = 0;
    ref_clear();
    feed(1);
    check(outq.size() == 1, "first frame after restart is kept");
    if (outq.size() == 1)
      for (int k = 0; k < 8; k++) begin
        automatic real want = sec(1, k, sec(0, k, real'($signed(sent[0][k]))));
        automatic real d = real'($signed(outq[0][k])) - want;
        check(d <= 1.0 && d >= -1.0, "filter history cleared by restart");
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
