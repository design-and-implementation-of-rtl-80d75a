// decim_filter: the decimation filter unit, selecting the acquisition mode.
//
//   MODE_1MHZ       every ADC frame is passed on (registered, 1 cycle).
//   MODE_5KHZ       one frame in 200 is passed on (decimator, 2 cycles).
//   MODE_5KHZ_FILT  the 5 kHz frames run through a 4th-order IIR low-pass,
//                   two cascaded direct-form-II biquad sections.
// In the filtering mode the eight channels of a decimated frame are fed one
// per clock into section 1, whose output feeds section 2; the results are
// gathered back into a frame, which is presented with out_valid NCH + 4
// clocks after the kept ADC frame entered (12 clocks for 8 channels). A new frame
// only comes every 200 us, so one shared datapath per section is enough.
// Any change of mode, and a `restart` pulse (the top level gives one when the
// ADC is switched on), restarts the decimator and zeroes the filter state, so
// every capture starts fresh: its first frame is kept and no history from an
// earlier capture or mode leaks into it.
// The three modes and the cascade of two sections follow the document; the
// channel-serial schedule and the restart on mode change are this design's.
`timescale 1ns/1ps

module decim_filter
  import daq_pkg::*;
#(
  parameter int unsigned  RATIO = 200,
  parameter biquad_coef_t COEF1 = SECTION1_COEF,
  parameter biquad_coef_t COEF2 = SECTION2_COEF
) (
  input  logic      clk,
  input  logic      rst_n,
  input  acq_mode_e mode,
  input  logic      restart,
  input  logic      in_valid,
  input  frame_t    in_frame,
  output logic      out_valid,
  output frame_t    out_frame
);

  localparam int unsigned CH_W = $clog2(NCH);

  // restart on mode change or on request
  acq_mode_e mode_q;
  logic      clear;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) mode_q <= MODE_1MHZ;
    else        mode_q <= mode;
  end
  assign clear = (mode != mode_q) || restart;

  // decimation
  logic   dec_valid;
  frame_t dec_frame;
  decimator #(.RATIO(RATIO)) u_decim (
    .clk, .rst_n, .clear,
    .in_valid  (in_valid && mode != MODE_1MHZ),
    .in_frame,
    .out_valid (dec_valid),
    .out_frame (dec_frame)
  );

  // channel-serial feed of the filter
  frame_t          feed_frame;
  logic            feeding;
  logic [CH_W-1:0] feed_ch;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      feed_frame <= '0;
      feeding    <= 1'b0;
      feed_ch    <= '0;
    end else if (clear) begin
      feeding <= 1'b0;
    end else if (dec_valid && mode == MODE_5KHZ_FILT) begin
      feed_frame <= dec_frame;
      feeding    <= 1'b1;
      feed_ch    <= '0;
    end else if (feeding) begin
      feed_ch <= feed_ch + 1'b1;
      if (feed_ch == CH_W'(NCH - 1)) feeding <= 1'b0;
    end
  end

  logic            s1_valid, s2_valid;
  logic [CH_W-1:0] s1_ch, s2_ch;
  sample_t         s1_y, s2_y;

  iir_biquad #(.NCHAN(NCH), .COEF(COEF1)) u_sec1 (
    .clk, .rst_n, .clear,
    .in_valid   (feeding),
    .in_ch      (feed_ch),
    .in_sample  (sample_t'(feed_frame[feed_ch])),
    .out_valid  (s1_valid),
    .out_ch     (s1_ch),
    .out_sample (s1_y)
  );

  iir_biquad #(.NCHAN(NCH), .COEF(COEF2)) u_sec2 (
    .clk, .rst_n, .clear,
    .in_valid   (s1_valid),
    .in_ch      (s1_ch),
    .in_sample  (s1_y),
    .out_valid  (s2_valid),
    .out_ch     (s2_ch),
    .out_sample (s2_y)
  );

  // gather filtered channels, select the output by mode
  frame_t filt_frame;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      filt_frame <= '0;
      out_valid  <= 1'b0;
      out_frame  <= '0;
    end else begin
      out_valid <= 1'b0;
      if (s2_valid) filt_frame[s2_ch] <= s2_y;
      unique case (mode)
        MODE_1MHZ: if (in_valid && !clear) begin
          out_valid <= 1'b1;
          out_frame <= in_frame;
        end
        MODE_5KHZ: if (dec_valid && !clear) begin
          out_valid <= 1'b1;
          out_frame <= dec_frame;
        end
        MODE_5KHZ_FILT: if (s2_valid && s2_ch == CH_W'(NCH - 1) && !clear) begin
          out_valid <= 1'b1;
          out_frame <= filt_frame;
          out_frame[NCH-1] <= s2_y;
        end
        default: ;
      endcase
    end
  end

endmodule
