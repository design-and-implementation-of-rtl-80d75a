// decimator: frame-rate reduction for the 5 kHz sampling mode.
//
// The 5 kHz mode is produced from the 1 MHz ADC stream by keeping one frame
// out of every RATIO = 1 MHz / 5 kHz = 200, with no anti-alias filtering in
// front of it (the low-pass filter of the filtering mode runs on the 5 kHz
// stream behind this block). The first frame after reset or `clear` is kept,
// then every RATIO-th frame. Output is registered: one cycle of latency.
// Keeping frame 0 of each group and the synchronous `clear` are this design's
// choices.
`timescale 1ns/1ps

module decimator
  import daq_pkg::*;
#(
  parameter int unsigned RATIO = 200
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   clear,         // restart the count (mode change)
  input  logic   in_valid,
  input  frame_t in_frame,
  output logic   out_valid,
  output frame_t out_frame
);

  localparam int unsigned CNT_W = $clog2(RATIO);
  logic [CNT_W-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt       <= '0;
      out_valid <= 1'b0;
      out_frame <= '0;
    end else begin
      out_valid <= 1'b0;
      if (clear) begin
        cnt <= '0;
      end else if (in_valid) begin
        if (cnt == '0) begin
          out_valid <= 1'b1;
          out_frame <= in_frame;
        end
        cnt <= (cnt == CNT_W'(RATIO - 1)) ? '0 : cnt + 1'b1;
      end
    end
  end

endmodule
