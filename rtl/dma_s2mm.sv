// dma_s2mm: stream-to-memory DMA writing acquisition frames into PS DDR.
//
// On a `start` pulse the engine latches a destination address and a length
// in bytes, then moves 128-bit frames from its AXI-Stream input to memory
// through a 64-bit AXI4 write port (the Zynq HP port): each frame becomes two
// beats, the low half (channels 1-4) first, so memory holds the channels in
// order, little-endian. Writes go out as INCR bursts of up to MAX_BURST beats,
// cut short so that no burst crosses a 4 KiB boundary. One burst is in flight
// at a time: address, then data, then the write response. When all bytes are
// written, `done` pulses for one clock and `busy` falls; an error response
// (SLVERR/DECERR) on any burst raises `error` with the same `done` pulse.
// The address is used 16-byte aligned and the length is counted in whole
// 16-byte frames (low four bits ignored). The DMA path into DDR through the
// HP port with 64-bit data follows the document; the burst policy, the
// one-burst-at-a-time ordering and the register-level interface are this
// design's choices, a simple stand-in for the vendor DMA core.
`timescale 1ns/1ps

module dma_s2mm #(
  parameter int unsigned MAX_BURST = 16,
  parameter int unsigned LEN_W     = 26
) (
  input  logic              clk,
  input  logic              rst_n,
  // control
  input  logic              start,
  input  logic [31:0]       dest_addr,
  input  logic [LEN_W-1:0]  length,
  output logic              busy,
  output logic              done,
  output logic              error,
  // frame stream in
  input  logic              s_tvalid,
  output logic              s_tready,
  input  logic [127:0]      s_tdata,
  // AXI4 write master, 64-bit
  output logic [31:0]       m_axi_awaddr,
  output logic [7:0]        m_axi_awlen,
  output logic [2:0]        m_axi_awsize,
  output logic [1:0]        m_axi_awburst,
  output logic              m_axi_awvalid,
  input  logic              m_axi_awready,
  output logic [63:0]       m_axi_wdata,
  output logic [7:0]        m_axi_wstrb,
  output logic              m_axi_wlast,
  output logic              m_axi_wvalid,
  input  logic              m_axi_wready,
  input  logic [1:0]        m_axi_bresp,
  input  logic              m_axi_bvalid,
  output logic              m_axi_bready
);

  typedef enum logic [1:0] {IDLE, ADDR, DATA, RESP} state_e;
  state_e state;

  logic [31:0]      addr;
  logic [LEN_W-3:0] beats_left;     // 8-byte beats still to issue
  logic [8:0]       burst_beats;    // beats left in the current burst
  logic             half;           // 0: low 64 bits of the frame, 1: high
  logic             err_acc;

  // length of the next burst: min(MAX_BURST, beats_left, beats to 4 KiB)
  logic [9:0] to_4k;
  logic [9:0] next_len;
  always_comb begin
    to_4k    = 10'((13'd4096 - {1'b0, addr[11:0]}) >> 3);
    next_len = 10'(MAX_BURST);
    if (beats_left < (LEN_W-2)'(next_len)) next_len = 10'(beats_left);
    if (to_4k < next_len) next_len = to_4k;
  end

  assign busy          = (state != IDLE);
  assign m_axi_awsize  = 3'd3;       // 8 bytes per beat
  assign m_axi_awburst = 2'b01;      // INCR
  assign m_axi_wstrb   = '1;
  assign m_axi_awvalid = (state == ADDR);
  assign m_axi_awaddr  = addr;
  assign m_axi_awlen   = 8'(next_len - 1'b1);
  assign m_axi_wvalid  = (state == DATA) && s_tvalid;
  assign m_axi_wdata   = half ? s_tdata[127:64] : s_tdata[63:0];
  assign m_axi_wlast   = (burst_beats == 9'd1);
  assign m_axi_bready  = (state == RESP);
  assign s_tready      = (state == DATA) && m_axi_wready && half;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= IDLE;
      addr         <= '0;
      beats_left   <= '0;
      burst_beats  <= '0;
      half         <= 1'b0;
      err_acc      <= 1'b0;
      done         <= 1'b0;
      error        <= 1'b0;
    end else begin
      done  <= 1'b0;
      error <= 1'b0;
      unique case (state)
        IDLE: if (start) begin
          addr       <= {dest_addr[31:4], 4'b0};
          beats_left <= (LEN_W-2)'({length[LEN_W-1:4], 1'b0});
          half       <= 1'b0;
          err_acc    <= 1'b0;
          if (length[LEN_W-1:4] == '0) done <= 1'b1;
          else state <= ADDR;
        end
        ADDR: if (m_axi_awready) begin
          burst_beats <= 9'(next_len);
          state       <= DATA;
        end
        DATA: if (m_axi_wvalid && m_axi_wready) begin
          half        <= ~half;
          addr        <= addr + 32'd8;
          beats_left  <= beats_left - 1'b1;
          burst_beats <= burst_beats - 1'b1;
          if (m_axi_wlast) state <= RESP;
        end
        RESP: if (m_axi_bvalid) begin
          if (m_axi_bresp[1]) err_acc <= 1'b1;
          if (beats_left == '0) begin
            state <= IDLE;
            done  <= 1'b1;
            error <= err_acc | m_axi_bresp[1];
          end else begin
            state <= ADDR;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  // AXI rule: a write beat, once offered, stays offered and unchanged.
  assert property (@(posedge clk) disable iff (!rst_n)
                   m_axi_wvalid && !m_axi_wready |=> m_axi_wvalid && $stable(m_axi_wdata));

endmodule
