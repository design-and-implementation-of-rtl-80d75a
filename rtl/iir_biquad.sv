// iir_biquad: one second-order IIR section in direct form II, shared by all
// channels.
//
// For each channel the section keeps two delay elements w(n-1), w(n-2) and
// computes
//     w(n) = x(n) - a1*w(n-1) - a2*w(n-2)
//     y(n) = b0*w(n) + b1*w(n-1) + b2*w(n-2)
// with 24-bit signed coefficients scaled by 2^22 (a0 = 2^22). The delay
// elements carry STATE_FRAC fraction bits beyond the 16-bit sample scale, so
// that the poles close to z = 1 do not lose resolution; products are rounded
// back to that scale after each sum. The output is rounded to 16 bits and
// saturated.
// One channel is processed per valid input: the sample, its channel number
// and the result appear on the outputs one clock later. `clear` zeroes every
// channel's delay elements. The direct-form-II structure, the 24-bit
// coefficients and their scale follow the document; the shared datapath with
// per-channel state, the state width and the rounding are this design's
// choices. The a-terms are subtracted: with the printed a1 < 0 that is the
// stable low-pass the coefficients describe.
`timescale 1ns/1ps

module iir_biquad
  import daq_pkg::*;
#(
  parameter int unsigned  NCHAN      = 8,
  parameter int unsigned  STATE_W    = 40,
  parameter int unsigned  STATE_FRAC = 8,
  parameter biquad_coef_t COEF       = SECTION1_COEF
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     clear,
  input  logic                     in_valid,
  input  logic [$clog2(NCHAN)-1:0] in_ch,
  input  sample_t                  in_sample,
  output logic                     out_valid,
  output logic [$clog2(NCHAN)-1:0] out_ch,
  output sample_t                  out_sample
);

  localparam int unsigned ACC_W = STATE_W + COEF_W + 3;

  typedef logic signed [STATE_W-1:0] state_t;
  typedef logic signed [ACC_W-1:0]   acc_t;

  state_t w1 [NCHAN];
  state_t w2 [NCHAN];

  state_t w1_c, w2_c, w0_c;
  acc_t   acc_w, acc_y, y_scaled;

  localparam acc_t RND_W = acc_t'(1) <<< (COEF_FRAC - 1);
  localparam acc_t RND_Y = acc_t'(1) <<< (COEF_FRAC + STATE_FRAC - 1);
  localparam acc_t Y_MAX = acc_t'(32767);
  localparam acc_t Y_MIN = -acc_t'(32768);

  always_comb begin
    w1_c  = w1[in_ch];
    w2_c  = w2[in_ch];
    acc_w = (acc_t'(in_sample) <<< (COEF_FRAC + STATE_FRAC))
          - acc_t'(COEF.a1) * acc_t'(w1_c)
          - acc_t'(COEF.a2) * acc_t'(w2_c);
    w0_c  = state_t'((acc_w + RND_W) >>> COEF_FRAC);
    acc_y = acc_t'(COEF.b0) * acc_t'(w0_c)
          + acc_t'(COEF.b1) * acc_t'(w1_c)
          + acc_t'(COEF.b2) * acc_t'(w2_c);
    y_scaled = (acc_y + RND_Y) >>> (COEF_FRAC + STATE_FRAC);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NCHAN; i++) begin
        w1[i] <= '0;
        w2[i] <= '0;
      end
      out_valid  <= 1'b0;
      out_ch     <= '0;
      out_sample <= '0;
    end else begin
      out_valid <= in_valid && !clear;
      if (clear) begin
        for (int i = 0; i < NCHAN; i++) begin
          w1[i] <= '0;
          w2[i] <= '0;
        end
      end else if (in_valid) begin
        w2[in_ch]  <= w1_c;
        w1[in_ch]  <= w0_c;
        out_ch     <= in_ch;
        if (y_scaled > Y_MAX)      out_sample <= sample_t'(Y_MAX);
        else if (y_scaled < Y_MIN) out_sample <= sample_t'(Y_MIN);
        else                       out_sample <= sample_t'(y_scaled);
      end
    end
  end

endmodule
