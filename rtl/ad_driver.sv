// ad_driver: parallel-interface controller for an AD7606C-16 8-channel ADC.
//
// A state machine with the five states of the acquisition flow:
//   S0 INIT     after reset, hold the chip's RESET pin high for RESET_CYCLES,
//               then wait out a power-up delay (INIT_CYCLES, under 10 ms).
//   S1 IDLE     "signal reset": all interface pins idle (CONVST high, CS_n and
//               RD_n high); wait for the next sample tick while enabled.
//   S2 CONVST   drive CONVST low for CONVST_LOW_CYCLES and then high; the
//               rising edge starts a simultaneous conversion of all channels.
//   S3 CS       assert CS_n and stay until BUSY has been seen high and then
//               low again (conversion finished).
//   S4 READ     issue eight RD_n pulses; DB[15:0] is captured on the last
//               low cycle of each pulse, channel 1 first. After the eighth,
//               the frame is presented for one cycle (frame_valid) and the
//               machine returns to S1.
// The sample tick comes from a free-running divider of CLK_HZ / SAMPLE_HZ
// (50 MHz / 1 MHz = 50 cycles), so conversions start on a fixed 1 us grid
// whatever the read timing. A tick that arrives while a frame is still in
// progress is dropped and reported on `overrun` for one cycle.
// BUSY comes from the chip asynchronously and passes through a two-flop
// synchroniser. The state sequence and the channel order follow the
// document; pulse widths, the reset pulse in S0 and the overrun flag are this
// design's choices.
`timescale 1ns/1ps

module ad_driver
  import daq_pkg::*;
#(
  parameter int unsigned CLK_HZ            = 50_000_000,
  parameter int unsigned SAMPLE_HZ         = 1_000_000,
  parameter int unsigned INIT_CYCLES       = 250_000,  // 5 ms power-up wait
  parameter int unsigned RESET_CYCLES      = 5,        // 100 ns RESET pulse
  parameter int unsigned CONVST_LOW_CYCLES = 2,
  parameter int unsigned RD_LOW_CYCLES     = 2,
  parameter int unsigned RD_HIGH_CYCLES    = 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          enable,        // start conversions on each tick
  // AD7606C-16 parallel interface
  input  logic [15:0]   ad_db,
  input  logic          ad_busy,
  output logic          ad_convst,
  output logic          ad_cs_n,
  output logic          ad_rd_n,
  output logic          ad_reset,
  // frame output
  output logic          frame_valid,
  output frame_t        frame,
  output logic          ready,         // power-up delay finished
  output logic          overrun        // a sample tick was missed
);

  localparam int unsigned TICK_DIV = CLK_HZ / SAMPLE_HZ;
  localparam int unsigned TICK_W   = $clog2(TICK_DIV);
  localparam int unsigned INIT_W   = $clog2(INIT_CYCLES + 1);

  typedef enum logic [2:0] {S0_INIT, S1_IDLE, S2_CONVST, S3_CS, S4_READ} state_e;
  state_e state;

  // sample-rate tick
  logic [TICK_W-1:0] tick_cnt;
  logic tick;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) tick_cnt <= '0;
    else if (tick_cnt == TICK_W'(TICK_DIV - 1)) tick_cnt <= '0;
    else tick_cnt <= tick_cnt + 1'b1;
  end
  assign tick = (tick_cnt == TICK_W'(TICK_DIV - 1));

  // BUSY synchroniser
  logic [1:0] busy_sync;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) busy_sync <= '0;
    else busy_sync <= {busy_sync[0], ad_busy};
  end
  logic busy_s;
  assign busy_s = busy_sync[1];

  logic [INIT_W-1:0] init_cnt;
  logic [7:0]  phase_cnt;     // cycles inside a CONVST or RD phase
  logic [2:0]  ch;            // channel being read
  logic        rd_low;        // RD_n low phase of the current pulse
  logic        busy_seen;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S0_INIT;
      init_cnt    <= '0;
      phase_cnt   <= '0;
      ch          <= '0;
      rd_low      <= 1'b0;
      busy_seen   <= 1'b0;
      ad_convst   <= 1'b1;
      ad_cs_n     <= 1'b1;
      ad_rd_n     <= 1'b1;
      ad_reset    <= 1'b1;
      frame_valid <= 1'b0;
      frame       <= '0;
      ready       <= 1'b0;
      overrun     <= 1'b0;
    end else begin
      frame_valid <= 1'b0;
      overrun     <= tick && enable && (state != S1_IDLE) && (state != S0_INIT);
      unique case (state)
        S0_INIT: begin
          init_cnt <= init_cnt + 1'b1;
          if (init_cnt == INIT_W'(RESET_CYCLES - 1)) ad_reset <= 1'b0;
          if (init_cnt == INIT_W'(INIT_CYCLES - 1)) begin
            ad_reset <= 1'b0;
            ready    <= 1'b1;
            state    <= S1_IDLE;
          end
        end
        S1_IDLE: begin
          ad_convst <= 1'b1;
          ad_cs_n   <= 1'b1;
          ad_rd_n   <= 1'b1;
          if (enable && tick) begin
            ad_convst <= 1'b0;
            phase_cnt <= '0;
            state     <= S2_CONVST;
          end
        end
        S2_CONVST: begin
          phase_cnt <= phase_cnt + 1'b1;
          if (phase_cnt == 8'(CONVST_LOW_CYCLES - 1)) begin
            ad_convst <= 1'b1;          // rising edge starts the conversion
            ad_cs_n   <= 1'b0;
            busy_seen <= 1'b0;
            state     <= S3_CS;
          end
        end
        S3_CS: begin
          if (busy_s) busy_seen <= 1'b1;
          else if (busy_seen) begin     // BUSY fell: conversion complete
            ch        <= '0;
            phase_cnt <= '0;
            rd_low    <= 1'b1;
            ad_rd_n   <= 1'b0;
            state     <= S4_READ;
          end
        end
        S4_READ: begin
          phase_cnt <= phase_cnt + 1'b1;
          if (rd_low) begin
            if (phase_cnt == 8'(RD_LOW_CYCLES - 1)) begin
              frame[ch] <= ad_db;
              ad_rd_n   <= 1'b1;
              rd_low    <= 1'b0;
              phase_cnt <= '0;
            end
          end else if (phase_cnt == 8'(RD_HIGH_CYCLES - 1)) begin
            phase_cnt <= '0;
            if (ch == 3'(NCH - 1)) begin
              frame_valid <= 1'b1;
              ad_cs_n     <= 1'b1;
              state       <= S1_IDLE;
            end else begin
              ch      <= ch + 1'b1;
              rd_low  <= 1'b1;
              ad_rd_n <= 1'b0;
            end
          end
        end
        default: state <= S0_INIT;
      endcase
    end
  end

  // RD_n may only pulse while the chip is selected.
  assert property (@(posedge clk) disable iff (!rst_n) !ad_rd_n |-> !ad_cs_n);

endmodule
