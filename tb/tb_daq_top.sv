// tb_daq_top: end-to-end test of the acquisition logic at reduced sizes.
//
// The top is connected to the behavioural ADC model and to an AXI memory
// model that stalls at random; a register sequence like the PS driver's runs
// over AXI4-Lite. Reduced parameters: 200-cycle power-up wait, decimation
// ratio 20 instead of 200, 16-frame FIFO. Sequence:
//   1 MHz capture of 64 frames into a 4 KiB-crossing buffer, irq enabled;
//     memory must hold consecutive conversions, channel codes intact, and
//     conversions must start exactly every 50 clocks.
//   FIFO overflow: ADC running with the DMA idle; DROPS must count.
//   5 kHz capture of 8 frames: every 20th conversion.
//   filtered capture of 96 frames with sines on all channels; each word is
//     compared with a floating-point model of the two IIR sections applied to
//     the conversions kept.
//   a transfer into the memory's error region must end with the error flag.
// Every mechanism (three modes, drop, 4 KiB split, memory back-pressure,
// irq, error response) is counted and must have happened at least once.
`timescale 1ns/1ps
module tb_daq_top;
  import daq_pkg::*;

  localparam int RATIO = 20;
  logic clk = 0, rst_n = 0;
  always #10 clk = ~clk;

  // ADC pins
  logic [15:0] db; logic busy, convst, cs_n, rd_n, ad_reset;
  logic [7:0][15:0] analog;
  int conversions, perr;
  // AXI-Lite
  logic [5:0] awaddr = 0, araddr = 0;
  logic awvalid = 0, awready, wvalid = 0, wready, bvalid, bready = 0;
  logic arvalid = 0, arready, rvalid, rready = 0;
  logic [31:0] wdata = 0, rdata;
  logic [3:0] wstrb = 0;
  logic [1:0] bresp, rresp;
  // AXI4 write
  logic [31:0] m_awaddr; logic [7:0] m_awlen; logic [2:0] m_awsize; logic [1:0] m_awburst;
  logic m_awvalid, m_awready, m_wlast, m_wvalid, m_wready, m_bvalid, m_bready;
  logic [63:0] m_wdata; logic [7:0] m_wstrb; logic [1:0] m_bresp;
  logic irq;

  daq_top #(.INIT_CYCLES(200), .DECIM_RATIO(RATIO), .FIFO_DEPTH(16)) dut (
    .clk, .rst_n,
    .ad_db(db), .ad_busy(busy), .ad_convst(convst), .ad_cs_n(cs_n),
    .ad_rd_n(rd_n), .ad_reset,
    .s_axil_awaddr(awaddr), .s_axil_awvalid(awvalid), .s_axil_awready(awready),
    .s_axil_wdata(wdata), .s_axil_wstrb(wstrb), .s_axil_wvalid(wvalid),
    .s_axil_wready(wready), .s_axil_bresp(bresp), .s_axil_bvalid(bvalid),
    .s_axil_bready(bready), .s_axil_araddr(araddr), .s_axil_arvalid(arvalid),
    .s_axil_arready(arready), .s_axil_rdata(rdata), .s_axil_rresp(rresp),
    .s_axil_rvalid(rvalid), .s_axil_rready(rready),
    .m_axi_awaddr(m_awaddr), .m_axi_awlen(m_awlen), .m_axi_awsize(m_awsize),
    .m_axi_awburst(m_awburst), .m_axi_awvalid(m_awvalid), .m_axi_awready(m_awready),
    .m_axi_wdata(m_wdata), .m_axi_wstrb(m_wstrb), .m_axi_wlast(m_wlast),
    .m_axi_wvalid(m_wvalid), .m_axi_wready(m_wready), .m_axi_bresp(m_bresp),
    .m_axi_bvalid(m_bvalid), .m_axi_bready(m_bready),
    .irq);

  ad7606_model adc (.analog, .convst, .cs_n, .rd_n, .reset(ad_reset), .busy, .db,
                    .conversions, .protocol_errors(perr));

  axi_mem_model mem (.clk, .rst_n, .awaddr(m_awaddr), .awlen(m_awlen),
    .awsize(m_awsize), .awburst(m_awburst), .awvalid(m_awvalid), .awready(m_awready),
    .wdata(m_wdata), .wstrb(m_wstrb), .wlast(m_wlast), .wvalid(m_wvalid),
    .wready(m_wready), .bresp(m_bresp), .bvalid(m_bvalid), .bready(m_bready));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---- analog input: conversion number c, channel k
  bit use_sines = 0;
  localparam real PI = 3.141592653589793;
  function automatic logic [15:0] code(int c, int k);
    if (!use_sines) return 16'(c * 8 + k);
    return 16'(int'(14000.0 * $sin(2.0 * PI * c / (40.0 + 30.0 * k))));
  endfunction
  always_comb for (int k = 0; k < 8; k++) analog[k] = code(conversions + 1, k);

  // ---- mechanism counters
  int m_stall = 0, m_irq = 0, m_split = 0, last_convst = -1, bad_spacing = 0, cyc = 0;
  logic convst_q = 1;
  always @(negedge clk) begin
    cyc++;
    if ((m_awvalid && !m_awready) || (m_wvalid && !m_wready)) m_stall++;
    if (irq) m_irq++;
    if (m_awvalid && m_awready && m_awlen != 8'd15) m_split++;
    if (convst && !convst_q) begin
      if (last_convst >= 0 && dut.adc_enable && cyc - last_convst != 50 && cyc - last_convst < 200)
        bad_spacing++;
      last_convst = cyc;
    end
    convst_q <= convst;
  end

  // ---- AXI4-Lite master
  task automatic wr(logic [5:0] a, logic [31:0] d);
    @(negedge clk);
    awaddr = a; wdata = d; wstrb = 4'hF; awvalid = 1; wvalid = 1;
    #1;
    while (!(awready && wready)) @(negedge clk);
    @(posedge clk);
    #1 awvalid = 0; wvalid = 0; bready = 1;
    do @(negedge clk); while (!bvalid);
    @(posedge clk);
    #1 bready = 0;
  endtask
  task automatic rd(logic [5:0] a, output logic [31:0] d);
    @(negedge clk);
    araddr = a; arvalid = 1;
    #1;
    while (!arready) @(negedge clk);
    @(posedge clk);
    #1 arvalid = 0; rready = 1;
    do @(negedge clk); while (!rvalid);
    d = rdata;
    @(posedge clk);
    #1 rready = 0;
  endtask

  localparam logic [5:0] CTRL = 6'h00, STATUS = 6'h04, FRAMES = 6'h08, DROPS = 6'h0C,
                         DMA_CTRL = 6'h10, DMA_STATUS = 6'h14, DMA_ADDR = 6'h18,
                         DMA_LEN = 6'h1C;

  // one capture as the driver does it; returns the conversion count at start
  task automatic capture(int mode, logic [31:0] addr, int frames, bit use_irq,
                         output int c0, output logic [31:0] st);
    int t = 0;
    wr(CTRL, 32'(mode << 1));              // ADC off, select mode
    repeat (60) @(posedge clk);
    wr(DMA_ADDR, addr);
    wr(DMA_LEN, 32'(frames * 16));
    wr(DMA_CTRL, use_irq ? 32'h3 : 32'h1);
    c0 = conversions;
    wr(CTRL, 32'((mode << 1) | 1));        // ADC on
    if (use_irq) begin
      while (!irq && t < 4000000) begin @(posedge clk); t++; end
      check(irq, "irq at end of transfer");
    end
    do begin
      rd(DMA_STATUS, st);
      t++;
    end while (!st[1] && t < 4000000);
    wr(CTRL, 32'(mode << 1));              // ADC off
    wr(DMA_STATUS, 32'h6);
  endtask

  function automatic logic [127:0] mem_frame(logic [31:0] addr, int i);
    logic [31:0] wa = (addr >> 3) + 32'(2 * i);
    if (!mem.words.exists(wa) || !mem.words.exists(wa + 1)) return 'x;
    return {mem.words[wa + 1], mem.words[wa]};
  endfunction

  // floating-point model of the two sections
  real rw1 [2][8], rw2 [2][8];
  real cb0[2] = '{15780.0, 14821.0}, cb1[2] = '{31560.0, 29642.0},
       cb2[2] = '{15780.0, 14821.0}, ca1[2] = '{-7941560.0, -7458787.0},
       ca2[2] = '{3810375.0, 3323766.0};
  function automatic real sec(int s, int ch, real x);
    real w0 = x - (ca1[s] / 4194304.0) * rw1[s][ch] - (ca2[s] / 4194304.0) * rw2[s][ch];
    real y = (cb0[s] * w0 + cb1[s] * rw1[s][ch] + cb2[s] * rw2[s][ch]) / 4194304.0;
    rw2[s][ch] = rw1[s][ch];
    rw1[s][ch] = w0;
    y = (y >= 0) ? $floor(y + 0.5) : -$floor(-y + 0.5);
    if (y > 32767.0) y = 32767.0;
    if (y < -32768.0) y = -32768.0;
    return y;
  endfunction

  initial begin
    #20000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d, st;
    int c0, good, m_1m, m_5k, m_filt, m_drop, m_err;
    real maxerr, sec_dbg;
    m_1m = 0; m_5k = 0; m_filt = 0; m_drop = 0; m_err = 0;
    maxerr = 0; sec_dbg = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // power-up: wait for the ADC to be ready
    do rd(STATUS, d); while (!d[0]);
    check(conversions == 0, "no conversion before enable");

    // ---- 1 MHz capture, 64 frames, buffer crosses a 4 KiB boundary
    capture(0, 32'h1000_0F40, 64, 1, c0, st);
    check(st[1] && !st[2], "1 MHz: done without error");
    good = 0;
    for (int i = 0; i < 64; i++) begin
      automatic logic [127:0] f = mem_frame(32'h1000_0F40, i);
      automatic bit ok = 1;
      for (int k = 0; k < 8; k++) if (f[16*k +: 16] != code(c0 + 1 + i, k)) ok = 0;
      check(ok, $sformatf("1 MHz frame %0d holds conversion %0d: %h", i, c0 + 1 + i, f));
      good += ok;
    end
    if (good == 64) m_1m++;
    check(bad_spacing == 0, $sformatf("conversions 50 clocks apart (%0d wrong)", bad_spacing));

    // ---- overflow: ADC on, DMA idle
    rd(DROPS, d);
    check(d == 0, "no drops yet");
    wr(CTRL, 32'h1);
    repeat (50 * 40) @(posedge clk);
    wr(CTRL, 32'h0);
    rd(DROPS, d);
    check(d >= 20, $sformatf("FIFO full: %0d frames dropped", d));
    if (d >= 20) m_drop++;
    rd(STATUS, d);
    check(d[1], "drop flag set");
    wr(STATUS, 32'h2);
    repeat (100) @(posedge clk);

    // ---- 5 kHz capture (ratio RATIO here), 8 frames
    capture(1, 32'h1001_0000, 8, 0, c0, st);
    good = 0;
    for (int i = 0; i < 8; i++) begin
      automatic logic [127:0] f = mem_frame(32'h1001_0000, i);
      automatic bit ok = 1;
      for (int k = 0; k < 8; k++) if (f[16*k +: 16] != code(c0 + 1 + RATIO * i, k)) ok = 0;
      check(ok, $sformatf("5 kHz frame %0d holds conversion %0d", i, c0 + 1 + RATIO * i));
      good += ok;
    end
    if (good == 8) m_5k++;

    // ---- filtered capture, 96 frames of sines
    use_sines = 1;
    capture(2, 32'h1002_0000, 96, 1, c0, st);
    foreach (rw1[s, c]) begin rw1[s][c] = 0; rw2[s][c] = 0; end
    good = 0;
    for (int i = 0; i < 96; i++) begin
      automatic logic [127:0] f = mem_frame(32'h1002_0000, i);
      automatic bit ok = 1;
      for (int k = 0; k < 8; k++) begin
        automatic real want = sec(1, k, sec(0, k, real'($signed(code(c0 + 1 + RATIO * i, k)))));
        automatic real dd = real'($signed(f[16*k +: 16])) - want;
        if (dd < 0) dd = -dd;
        if (dd > maxerr) maxerr = dd;
        if (dd > 3.0) ok = 0;
        if (k == 0) sec_dbg = want;
      end
      check(ok, $sformatf("filtered frame %0d: %h, channel 1 expected %f", i, f, sec_dbg));
      good += ok;
    end
    if (good == 96) m_filt++;
    $display("filtered capture: max deviation %f LSB", maxerr);
    use_sines = 0;

    // ---- error response from memory
    capture(0, 32'hF000_0000, 4, 0, c0, st);
    rd(DMA_STATUS, d);
    check(d == 0, "status flags cleared by write");
    if (st[2]) m_err++;
    check(st[2], "error response reported");

    rd(FRAMES, d);
    check(d >= 64 + 8 + 96, $sformatf("FRAMES counter %0d", d));
    check(perr == 0, $sformatf("%0d ADC protocol errors", perr));
    check(mem.protocol_errors == 0, $sformatf("%0d AXI protocol errors", mem.protocol_errors));

    $display("mechanisms: 1MHz=%0d 5kHz=%0d filtered=%0d drop=%0d split4k=%0d stall=%0d irq=%0d error=%0d",
             m_1m, m_5k, m_filt, m_drop, m_split, m_stall, m_irq, m_err);
    check(m_1m > 0, "1 MHz mode exercised");
    check(m_5k > 0, "5 kHz mode exercised");
    check(m_filt > 0, "filtered mode exercised");
    check(m_drop > 0, "FIFO overflow exercised");
    check(m_split > 0, "4 KiB burst split exercised");
    check(m_stall > 0, "memory back-pressure exercised");
    check(m_irq > 0, "interrupt exercised");
    check(m_err > 0, "error response exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
