// tb_ctrl_regs: self-checking test of the AXI4-Lite register block.
//
// Writes and reads every register through AXI4-Lite transactions (with a
// master that sometimes delays taking the responses), and checks: CTRL bits
// reach adc_enable and mode; byte strobes; DMA_ADDR and DMA_LEN round-trip
// and reach the DMA ports; writing start gives exactly one dma_start pulse,
// and none while the DMA is busy; done and error flags are sticky, cleared
// by writing 1 and by a new start; irq follows done only when enabled;
// frame and drop counters count their pulses; unmapped addresses read 0.
`timescale 1ns/1ps
module tb_ctrl_regs;
  import daq_pkg::*;

  logic clk = 0, rst_n = 0;
  always #10 clk = ~clk;

  logic [5:0] awaddr = 0, araddr = 0;
  logic awvalid = 0, awready, wvalid = 0, wready, bvalid, bready = 0;
  logic arvalid = 0, arready, rvalid, rready = 0;
  logic [31:0] wdata = 0, rdata;
  logic [3:0] wstrb = 0;
  logic [1:0] bresp, rresp;
  logic adc_enable, dma_start, irq;
  acq_mode_e mode;
  logic adc_ready = 0, frame_push = 0, frame_drop = 0;
  logic dma_busy = 0, dma_done = 0, dma_error = 0;
  logic [31:0] dma_addr;
  logic [25:0] dma_len;

  ctrl_regs dut (.clk, .rst_n,
    .s_axil_awaddr(awaddr), .s_axil_awvalid(awvalid), .s_axil_awready(awready),
    .s_axil_wdata(wdata), .s_axil_wstrb(wstrb), .s_axil_wvalid(wvalid),
    .s_axil_wready(wready), .s_axil_bresp(bresp), .s_axil_bvalid(bvalid),
    .s_axil_bready(bready), .s_axil_araddr(araddr), .s_axil_arvalid(arvalid),
    .s_axil_arready(arready), .s_axil_rdata(rdata), .s_axil_rresp(rresp),
    .s_axil_rvalid(rvalid), .s_axil_rready(rready),
    .adc_enable, .mode, .adc_ready, .frame_push, .frame_drop, .dma_start,
    .dma_addr, .dma_len, .dma_busy, .dma_done, .dma_error, .irq);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int starts = 0;
  always @(negedge clk) if (dma_start) starts++;

  task automatic wr(logic [5:0] a, logic [31:0] d, logic [3:0] s = 4'hF);
    @(negedge clk);
    awaddr = a; wdata = d; wstrb = s; awvalid = 1; wvalid = 1;
    #1;
    while (!(awready && wready)) @(negedge clk);
    @(posedge clk);
    #1 awvalid = 0; wvalid = 0;
    repeat ($urandom % 3) @(posedge clk);
    #1 bready = 1;
    do @(negedge clk); while (!bvalid);
    check(bresp == 2'b00, "write response OKAY");
    @(posedge clk);
    #1 bready = 0;
  endtask

  task automatic rd(logic [5:0] a, output logic [31:0] d);
    @(negedge clk);
    araddr = a; arvalid = 1;
    #1;
    while (!arready) @(negedge clk);
    @(posedge clk);
    #1 arvalid = 0;
    repeat ($urandom % 3) @(posedge clk);
    #1 rready = 1;
    do @(negedge clk); while (!rvalid);
    d = rdata;
    @(posedge clk);
    check(rresp == 2'b00, "read response OKAY");
    #1 rready = 0;
  endtask

  task automatic expect_rd(logic [5:0] a, logic [31:0] want, string what);
    logic [31:0] d;
    rd(a, d);
    check(d == want, $sformatf("%s: read %h want %h", what, d, want));
  endtask

  task automatic pulse(ref logic s, input int n);
    repeat (n) begin #1 s = 1; @(posedge clk); #1 s = 0; @(posedge clk); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    check(!adc_enable && mode == MODE_1MHZ && !irq, "reset values");
    wr(6'h00, 32'h5);                 // enable, mode 2
    check(adc_enable && mode == MODE_5KHZ_FILT, "CTRL drives enable and mode");
    expect_rd(6'h00, 32'h5, "CTRL");
    wr(6'h00, 32'h2, 4'h0);           // no strobes: no change
    expect_rd(6'h00, 32'h5, "CTRL without strobes");
    wr(6'h00, 32'h2);
    check(!adc_enable && mode == MODE_5KHZ, "CTRL second write");
    adc_ready = 1;
    expect_rd(6'h04, 32'h1, "STATUS ready");
    wr(6'h18, 32'h1000_0000);
    wr(6'h1C, 32'h0010_0000);
    check(dma_addr == 32'h1000_0000 && dma_len == 26'h10_0000, "DMA address and length reach the DMA");
    wr(6'h18, 32'hAB00_0000, 4'h8);   // top byte only
    expect_rd(6'h18, 32'hAB00_0000, "DMA_ADDR byte strobe");
    expect_rd(6'h1C, 32'h0010_0000, "DMA_LEN");
    pulse(frame_push, 7);
    pulse(frame_drop, 3);
    expect_rd(6'h08, 32'd7, "FRAMES counter");
    expect_rd(6'h0C, 32'd3, "DROPS counter");
    expect_rd(6'h04, 32'h3, "STATUS drop flag");
    wr(6'h04, 32'h2);
    expect_rd(6'h04, 32'h1, "drop flag cleared");
    wr(6'h10, 32'h3);                 // start, irq enable
    check(starts == 1, "one start pulse");
    expect_rd(6'h10, 32'h2, "DMA_CTRL reads irq enable, start reads 0");
    dma_busy = 1;
    wr(6'h10, 32'h3);
    check(starts == 1, "no start while busy");
    expect_rd(6'h14, 32'h1, "DMA busy");
    #1 dma_done = 1; dma_error = 1; dma_busy = 0;
    @(posedge clk); #1 dma_done = 0; dma_error = 0;
    @(posedge clk);
    check(irq, "irq on done");
    expect_rd(6'h14, 32'h6, "done and error sticky");
    wr(6'h14, 32'h2);
    check(!irq, "irq drops when done cleared");
    expect_rd(6'h14, 32'h4, "error still set");
    wr(6'h10, 32'h1);                 // start, irq disabled
    check(starts == 2, "second start pulse");
    expect_rd(6'h14, 32'h0, "start clears flags");
    #1 dma_done = 1; @(posedge clk); #1 dma_done = 0;
    @(posedge clk);
    check(!irq, "no irq when disabled");
    expect_rd(6'h14, 32'h2, "done without irq");
    expect_rd(6'h3C, 32'h0, "unmapped reads 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
