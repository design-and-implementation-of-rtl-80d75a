// ad7606_model: behavioural model (not synthesizable) of the AD7606C-16
// parallel interface, for testbenches.
//
// A rising CONVST edge samples all eight `analog` codes at once and raises
// BUSY after BUSY_DLY_NS for CONV_NS. While CS_n and RD_n are both low, DB
// shows the code of the current channel; each rising RD_n edge advances to
// the next channel, channel 1 first. A high RESET clears the channel pointer.
// Reading before BUSY falls, or an RD_n pulse without CS_n, is counted as a
// protocol error. `conversions` counts CONVST rising edges.
`timescale 1ns/1ps
module ad7606_model #(
  parameter int unsigned CONV_NS     = 300,
  parameter int unsigned BUSY_DLY_NS = 10
) (
  input  logic [7:0][15:0] analog,
  input  logic             convst,
  input  logic             cs_n,
  input  logic             rd_n,
  input  logic             reset,
  output logic             busy,
  output logic [15:0]      db,
  output int               conversions,
  output int               protocol_errors
);
  logic [7:0][15:0] held;
  int unsigned ptr;

  initial begin
    busy = 1'b0;
    held = '0;
    ptr = 0;
    conversions = 0;
    protocol_errors = 0;
  end

  always @(posedge convst) begin
    if (!reset) begin
      held = analog;
      ptr = 0;
      conversions++;
      #(BUSY_DLY_NS) busy = 1'b1;
      #(CONV_NS) busy = 1'b0;
    end
  end

  always @(posedge reset) ptr = 0;

  always @(negedge rd_n) begin
    if (busy) protocol_errors++;
    if (cs_n) protocol_errors++;
  end

  always @(posedge rd_n) if (!cs_n) ptr = (ptr + 1) % 8;

  assign db = (!cs_n && !rd_n) ? held[ptr[2:0]] : 16'h0000;
endmodule
