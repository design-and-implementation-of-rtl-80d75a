// tb_ad_driver: self-checking test of the AD7606C-16 interface controller.
//
// Drives the controller against the behavioural ADC model with channel codes
// that change at every conversion (channel k of conversion n holds
// n*16 + k, plus a sign bit on odd channels). Checks: RESET is pulsed after
// reset and `ready` rises after INIT_CYCLES; every frame holds the codes of
// its own conversion in channel order; frames come exactly every 50 clocks
// (1 MHz at 50 MHz); no reads happen while BUSY is high or without CS_n;
// no conversions start while disabled.
`timescale 1ns/1ps
module tb_ad_driver;
  import daq_pkg::*;

  localparam int INIT = 100;
  logic clk = 0, rst_n = 0, enable = 0;
  always #10 clk = ~clk;

  logic [15:0] db;
  logic busy, convst, cs_n, rd_n, ad_reset, frame_valid, ready, overrun;
  frame_t frame;
  logic [7:0][15:0] analog;
  int conversions, perr;

  ad_driver #(.INIT_CYCLES(INIT)) dut (
    .clk, .rst_n, .enable, .ad_db(db), .ad_busy(busy), .ad_convst(convst),
    .ad_cs_n(cs_n), .ad_rd_n(rd_n), .ad_reset, .frame_valid, .frame,
    .ready, .overrun);

  ad7606_model adc (.analog, .convst, .cs_n, .rd_n, .reset(ad_reset),
                    .busy, .db, .conversions, .protocol_errors(perr));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [15:0] code(int n, int k);
    return 16'((n * 16 + k) | ((k % 2 != 0) ? 32'h8000 : 0));
  endfunction

  // analog inputs for the next conversion
  always_comb for (int k = 0; k < 8; k++) analog[k] = code(conversions + 1, k);

  int cyc = 0;
  always @(posedge clk) cyc++;

  int frames = 0, last_frame_cyc = -1, ovr = 0;
  always @(negedge clk) begin
    if (overrun && rst_n) ovr++;
    if (frame_valid) begin
      for (int k = 0; k < 8; k++)
        check(frame[k] == code(conversions, k),
              $sformatf("frame %0d ch%0d got %h want %h", frames, k + 1,
                        frame[k], code(conversions, k)));
      if (last_frame_cyc >= 0)
        check(cyc - last_frame_cyc == 50,
              $sformatf("frame spacing %0d clocks, want 50", cyc - last_frame_cyc));
      last_frame_cyc = cyc;
      frames++;
    end
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    check(ad_reset == 1, "RESET high after reset");
    repeat (10) @(posedge clk); #1;
    check(ad_reset == 0, "RESET released");
    check(ready == 0, "not ready during power-up wait");
    repeat (INIT) @(posedge clk); #1;
    check(ready == 1, "ready after power-up wait");
    repeat (200) @(posedge clk);
    check(conversions == 0, "no conversion while disabled");
    enable = 1;
    repeat (50 * 40) @(posedge clk);
    enable = 0;
    repeat (100) @(posedge clk);
    check(frames >= 38 && frames <= 41, $sformatf("%0d frames in 40 us", frames));
    check(frames == conversions, "one frame per conversion");
    check(perr == 0, $sformatf("%0d ADC protocol errors", perr));
    check(ovr == 0, "no sample overrun");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
