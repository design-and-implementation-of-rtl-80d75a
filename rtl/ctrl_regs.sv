// ctrl_regs: control and status registers of the acquisition logic, reached
// by the PS driver over AXI4-Lite (32-bit data).
//
//   0x00 CTRL        [0] ADC enable  [2:1] mode (0 1 MHz, 1 5 kHz, 2 5 kHz
//                    filtered)                                        RW
//   0x04 STATUS      [0] ADC power-up done  [1] frame dropped (sticky,
//                    write 1 to clear)                                RO/W1C
//   0x08 FRAMES      frames accepted into the FIFO                     RO
//   0x0C DROPS       frames lost because the FIFO was full             RO
//   0x10 DMA_CTRL    [0] start (write 1; reads 0)  [1] interrupt enable RW
//   0x14 DMA_STATUS  [0] busy  [1] done (sticky, W1C)  [2] error (sticky,
//                    W1C)                                              RO/W1C
//   0x18 DMA_ADDR    destination byte address in DDR                  RW
//   0x1C DMA_LEN     transfer length in bytes                         RW
// irq = done && interrupt enable. A write is taken when address and data
// are both valid and no response is pending; the response follows one clock
// later. A read answers one clock after the address. Unmapped addresses read
// 0 and ignore writes; both respond OKAY. The register set is this design's:
// the document names only what the driver does with it (enable the ADC,
// pick the mode, set up and start the DMA, poll its status).
`timescale 1ns/1ps

module ctrl_regs
  import daq_pkg::*;
#(
  parameter int unsigned LEN_W = 26
) (
  input  logic             clk,
  input  logic             rst_n,
  // AXI4-Lite slave
  input  logic [5:0]       s_axil_awaddr,
  input  logic             s_axil_awvalid,
  output logic             s_axil_awready,
  input  logic [31:0]      s_axil_wdata,
  input  logic [3:0]       s_axil_wstrb,
  input  logic             s_axil_wvalid,
  output logic             s_axil_wready,
  output logic [1:0]       s_axil_bresp,
  output logic             s_axil_bvalid,
  input  logic             s_axil_bready,
  input  logic [5:0]       s_axil_araddr,
  input  logic             s_axil_arvalid,
  output logic             s_axil_arready,
  output logic [31:0]      s_axil_rdata,
  output logic [1:0]       s_axil_rresp,
  output logic             s_axil_rvalid,
  input  logic             s_axil_rready,
  // to / from the datapath
  output logic             adc_enable,
  output acq_mode_e        mode,
  input  logic             adc_ready,
  input  logic             frame_push,
  input  logic             frame_drop,
  output logic             dma_start,
  output logic [31:0]      dma_addr,
  output logic [LEN_W-1:0] dma_len,
  input  logic             dma_busy,
  input  logic             dma_done,
  input  logic             dma_error,
  output logic             irq
);

  localparam logic [5:0] A_CTRL = 6'h00, A_STATUS = 6'h04, A_FRAMES = 6'h08,
                         A_DROPS = 6'h0C, A_DMA_CTRL = 6'h10,
                         A_DMA_STATUS = 6'h14, A_DMA_ADDR = 6'h18,
                         A_DMA_LEN = 6'h1C;

  logic        drop_flag, done_flag, err_flag, irq_en;
  logic [31:0] frames, drops;

  logic wr_en;
  assign wr_en          = s_axil_awvalid && s_axil_wvalid && !s_axil_bvalid;
  assign s_axil_awready = wr_en;
  assign s_axil_wready  = wr_en;
  assign s_axil_bresp   = 2'b00;
  assign s_axil_rresp   = 2'b00;
  assign s_axil_arready = !s_axil_rvalid;
  assign irq            = done_flag && irq_en;

  // byte-lane merge of a write into a 32-bit register
  function automatic logic [31:0] merge(logic [31:0] old, logic [31:0] d,
                                        logic [3:0] strb);
    for (int i = 0; i < 4; i++) if (strb[i]) old[8*i +: 8] = d[8*i +: 8];
    return old;
  endfunction

  logic [31:0] wd_ctrl, wd_addr, wd_len;
  assign wd_ctrl = merge({29'b0, 2'(mode), adc_enable}, s_axil_wdata, s_axil_wstrb);
  assign wd_addr = merge(dma_addr, s_axil_wdata, s_axil_wstrb);
  assign wd_len  = merge(32'(dma_len), s_axil_wdata, s_axil_wstrb);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      adc_enable    <= 1'b0;
      mode          <= MODE_1MHZ;
      dma_start     <= 1'b0;
      dma_addr      <= '0;
      dma_len       <= '0;
      irq_en        <= 1'b0;
      drop_flag     <= 1'b0;
      done_flag     <= 1'b0;
      err_flag      <= 1'b0;
      frames        <= '0;
      drops         <= '0;
      s_axil_bvalid <= 1'b0;
      s_axil_rvalid <= 1'b0;
      s_axil_rdata  <= '0;
    end else begin
      dma_start <= 1'b0;
      if (frame_push) frames <= frames + 1'b1;
      if (frame_drop) begin
        drops     <= drops + 1'b1;
        drop_flag <= 1'b1;
      end
      if (dma_done) begin
        done_flag <= 1'b1;
        if (dma_error) err_flag <= 1'b1;
      end

      // write channel
      if (s_axil_bvalid && s_axil_bready) s_axil_bvalid <= 1'b0;
      if (wr_en) begin
        s_axil_bvalid <= 1'b1;
        unique case (s_axil_awaddr & 6'h3C)
          A_CTRL: begin
            adc_enable <= wd_ctrl[0];
            mode       <= acq_mode_e'(wd_ctrl[2:1]);
          end
          A_STATUS:     if (s_axil_wstrb[0] && s_axil_wdata[1]) drop_flag <= 1'b0;
          A_DMA_CTRL:   if (s_axil_wstrb[0]) begin
            dma_start <= s_axil_wdata[0] && !dma_busy;
            irq_en    <= s_axil_wdata[1];
            if (s_axil_wdata[0]) begin
              done_flag <= 1'b0;
              err_flag  <= 1'b0;
            end
          end
          A_DMA_STATUS: if (s_axil_wstrb[0]) begin
            if (s_axil_wdata[1]) done_flag <= 1'b0;
            if (s_axil_wdata[2]) err_flag  <= 1'b0;
          end
          A_DMA_ADDR:   dma_addr <= wd_addr;
          A_DMA_LEN:    dma_len  <= LEN_W'(wd_len);
          default: ;
        endcase
      end

      // read channel
      if (s_axil_rvalid && s_axil_rready) s_axil_rvalid <= 1'b0;
      if (s_axil_arvalid && s_axil_arready) begin
        s_axil_rvalid <= 1'b1;
        unique case (s_axil_araddr & 6'h3C)
          A_CTRL:       s_axil_rdata <= {29'b0, 2'(mode), adc_enable};
          A_STATUS:     s_axil_rdata <= {30'b0, drop_flag, adc_ready};
          A_FRAMES:     s_axil_rdata <= frames;
          A_DROPS:      s_axil_rdata <= drops;
          A_DMA_CTRL:   s_axil_rdata <= {30'b0, irq_en, 1'b0};
          A_DMA_STATUS: s_axil_rdata <= {29'b0, err_flag, done_flag, dma_busy};
          A_DMA_ADDR:   s_axil_rdata <= dma_addr;
          A_DMA_LEN:    s_axil_rdata <= 32'(dma_len);
          default:      s_axil_rdata <= '0;
        endcase
      end
    end
  end

  // AXI rule: a response, once offered, is held until taken.
  assert property (@(posedge clk) disable iff (!rst_n)
                   s_axil_rvalid && !s_axil_rready |=> s_axil_rvalid);

endmodule
