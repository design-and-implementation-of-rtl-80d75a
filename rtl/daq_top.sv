// daq_top: programmable-logic side of the 8-channel synchronous acquisition
// system.
//
// Data flow: the AD driver converts all eight channels of the AD7606C-16
// simultaneously once per microsecond and assembles a 128-bit frame; the
// decimation filter unit passes frames at 1 MHz, or one in 200 at 5 kHz,
// optionally through a 4th-order IIR low-pass; frames enter an AXI-Stream
// FIFO; the DMA empties the FIFO into DDR through the 64-bit HP port.
// Control: the PS driver reaches the register block over AXI4-Lite to enable
// the ADC, choose the mode, give the DMA its address and length and start it,
// then polls DMA status or waits for `irq`.
// A frame that arrives while the FIFO is full is dropped and counted; the
// ADC is never stalled, so conversions stay on their 1 us grid. While the ADC
// is disabled and the DMA idle the FIFO is held empty, so that each capture
// starts with fresh frames. Everything
// runs on one clock (50 MHz by default, the HP port clock).
// The blocks and their order follow the document's system architecture; the
// register map, the FIFO depth and the drop policy are this design's.
`timescale 1ns/1ps

module daq_top
  import daq_pkg::*;
#(
  parameter int unsigned CLK_HZ      = 50_000_000,
  parameter int unsigned SAMPLE_HZ   = 1_000_000,
  parameter int unsigned INIT_CYCLES = 250_000,
  parameter int unsigned DECIM_RATIO = 200,
  parameter int unsigned FIFO_DEPTH  = 512,
  parameter int unsigned MAX_BURST   = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  // AD7606C-16 parallel interface
  input  logic [15:0] ad_db,
  input  logic        ad_busy,
  output logic        ad_convst,
  output logic        ad_cs_n,
  output logic        ad_rd_n,
  output logic        ad_reset,
  // AXI4-Lite slave from the PS (general-purpose port)
  input  logic [5:0]  s_axil_awaddr,
  input  logic        s_axil_awvalid,
  output logic        s_axil_awready,
  input  logic [31:0] s_axil_wdata,
  input  logic [3:0]  s_axil_wstrb,
  input  logic        s_axil_wvalid,
  output logic        s_axil_wready,
  output logic [1:0]  s_axil_bresp,
  output logic        s_axil_bvalid,
  input  logic        s_axil_bready,
  input  logic [5:0]  s_axil_araddr,
  input  logic        s_axil_arvalid,
  output logic        s_axil_arready,
  output logic [31:0] s_axil_rdata,
  output logic [1:0]  s_axil_rresp,
  output logic        s_axil_rvalid,
  input  logic        s_axil_rready,
  // AXI4 write master to the PS (HP port into DDR)
  output logic [31:0] m_axi_awaddr,
  output logic [7:0]  m_axi_awlen,
  output logic [2:0]  m_axi_awsize,
  output logic [1:0]  m_axi_awburst,
  output logic        m_axi_awvalid,
  input  logic        m_axi_awready,
  output logic [63:0] m_axi_wdata,
  output logic [7:0]  m_axi_wstrb,
  output logic        m_axi_wlast,
  output logic        m_axi_wvalid,
  input  logic        m_axi_wready,
  input  logic [1:0]  m_axi_bresp,
  input  logic        m_axi_bvalid,
  output logic        m_axi_bready,
  // interrupt to the PS
  output logic        irq
);

  localparam int unsigned LEN_W = 26;

  logic             adc_enable, adc_ready, adc_overrun;
  acq_mode_e        mode;
  logic             ad_valid, flt_valid;
  frame_t           ad_frame, flt_frame;
  logic             fifo_ready, fifo_m_valid, fifo_m_ready;
  logic [FRAME_W-1:0] fifo_m_data;
  logic [$clog2(FIFO_DEPTH):0] fifo_level;
  logic             dma_start, dma_busy, dma_done, dma_error;
  logic [31:0]      dma_addr;
  logic [LEN_W-1:0] dma_len;

  ad_driver #(
    .CLK_HZ(CLK_HZ), .SAMPLE_HZ(SAMPLE_HZ), .INIT_CYCLES(INIT_CYCLES)
  ) u_ad (
    .clk, .rst_n,
    .enable      (adc_enable),
    .ad_db, .ad_busy, .ad_convst, .ad_cs_n, .ad_rd_n, .ad_reset,
    .frame_valid (ad_valid),
    .frame       (ad_frame),
    .ready       (adc_ready),
    .overrun     (adc_overrun)
  );

  // each capture starts with a fresh decimator count and filter history
  logic adc_enable_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) adc_enable_q <= 1'b0;
    else        adc_enable_q <= adc_enable;
  end

  decim_filter #(.RATIO(DECIM_RATIO)) u_filt (
    .clk, .rst_n, .mode,
    .restart   (adc_enable && !adc_enable_q),
    .in_valid  (ad_valid),
    .in_frame  (ad_frame),
    .out_valid (flt_valid),
    .out_frame (flt_frame)
  );

  // stale frames are discarded while the ADC is off and the DMA idle
  axis_fifo #(.WIDTH(FRAME_W), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n,
    .flush    (!adc_enable && !dma_busy),
    .s_tvalid (flt_valid),
    .s_tready (fifo_ready),
    .s_tdata  (flt_frame),
    .m_tvalid (fifo_m_valid),
    .m_tready (fifo_m_ready),
    .m_tdata  (fifo_m_data),
    .level    (fifo_level)
  );

  dma_s2mm #(.MAX_BURST(MAX_BURST), .LEN_W(LEN_W)) u_dma (
    .clk, .rst_n,
    .start     (dma_start),
    .dest_addr (dma_addr),
    .length    (dma_len),
    .busy      (dma_busy),
    .done      (dma_done),
    .error     (dma_error),
    .s_tvalid  (fifo_m_valid),
    .s_tready  (fifo_m_ready),
    .s_tdata   (fifo_m_data),
    .m_axi_awaddr, .m_axi_awlen, .m_axi_awsize, .m_axi_awburst,
    .m_axi_awvalid, .m_axi_awready, .m_axi_wdata, .m_axi_wstrb,
    .m_axi_wlast, .m_axi_wvalid, .m_axi_wready, .m_axi_bresp,
    .m_axi_bvalid, .m_axi_bready
  );

  ctrl_regs #(.LEN_W(LEN_W)) u_regs (
    .clk, .rst_n,
    .s_axil_awaddr, .s_axil_awvalid, .s_axil_awready, .s_axil_wdata,
    .s_axil_wstrb, .s_axil_wvalid, .s_axil_wready, .s_axil_bresp,
    .s_axil_bvalid, .s_axil_bready, .s_axil_araddr, .s_axil_arvalid,
    .s_axil_arready, .s_axil_rdata, .s_axil_rresp, .s_axil_rvalid,
    .s_axil_rready,
    .adc_enable, .mode, .adc_ready,
    .frame_push (flt_valid && fifo_ready),
    .frame_drop (flt_valid && !fifo_ready),
    .dma_start, .dma_addr, .dma_len, .dma_busy, .dma_done, .dma_error,
    .irq
  );

endmodule
