// daq_pkg: types and constants shared by the acquisition datapath.
//
// The system samples 8 analog channels simultaneously with a 16-bit ADC at
// 1 MHz. One conversion of all channels forms a 128-bit frame, channel 1 in
// bits [15:0] up to channel 8 in bits [127:112], so that a little-endian
// memory dump shows channel 1 first. The 8 channels, 16-bit samples, 128-bit
// frame and 1 MHz / 5 kHz rates follow the document; the bit order inside the
// frame and the mode encoding are this design's choices.
`timescale 1ns/1ps

package daq_pkg;

  localparam int unsigned NCH      = 8;    // channels per ADC frame
  localparam int unsigned SAMPLE_W = 16;   // bits per sample
  localparam int unsigned FRAME_W  = NCH * SAMPLE_W;  // 128 bits

  typedef logic signed [SAMPLE_W-1:0] sample_t;
  typedef logic [NCH-1:0][SAMPLE_W-1:0] frame_t;   // [0] = channel 1

  // Acquisition mode selected by the PS driver.
  typedef enum logic [1:0] {
    MODE_1MHZ      = 2'd0,  // every ADC frame, unfiltered
    MODE_5KHZ      = 2'd1,  // one frame in 200, unfiltered
    MODE_5KHZ_FILT = 2'd2   // one frame in 200, 4th-order IIR low-pass
  } acq_mode_e;

  // IIR coefficients are 24-bit signed integers scaled by 2^COEF_FRAC.
  localparam int unsigned COEF_W    = 24;
  localparam int unsigned COEF_FRAC = 22;

  typedef struct packed {
    logic signed [COEF_W-1:0] b0, b1, b2;
    logic signed [COEF_W-1:0] a1, a2;   // a0 = 2^COEF_FRAC implied
  } biquad_coef_t;

  // Section 1: the document's quantized coefficients.
  localparam biquad_coef_t SECTION1_COEF = '{
    b0: 24'sd15780, b1: 24'sd31560, b2: 24'sd15780,
    a1: -24'sd7941560, a2: 24'sd3810375
  };
  // Section 2: companion pole pair of the same 4th-order Butterworth low-pass
  // (100 Hz cut-off at 5 kHz), scaled to unity DC gain and quantized the same
  // way (coefficient * 2^22, rounded).
  localparam biquad_coef_t SECTION2_COEF = '{
    b0: 24'sd14821, b1: 24'sd29642, b2: 24'sd14821,
    a1: -24'sd7458787, a2: 24'sd3323766
  };

endpackage
