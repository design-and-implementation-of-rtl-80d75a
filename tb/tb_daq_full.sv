// tb_daq_full: the acquisition logic at its default sizes, running the two
// captures a user of the system would run first.
//
// Nothing is scaled: 5 ms power-up wait, 1 MHz conversions from a 50 MHz
// clock, decimation by 200, 512-frame FIFO. The ADC and DDR are behavioural
// models; the AXI4-Lite sequence follows the PS driver.
//   1. 1 MHz capture of 1 MiB (65536 frames) to 0x1000_0000, ending in an
//      interrupt: every frame must hold its own conversion, channels in
//      order, conversions exactly 50 clocks apart, and the transfer must take
//      about 65.5 ms of simulated time.
//   2. 5 kHz filtered capture of 256 frames (51.2 ms) with a 50 Hz sine on
//      channel 8 and a 400 Hz sine on channel 7: every word matches a
//      floating-point model of the two IIR sections within 3 LSB, the 50 Hz
//      sine passes with its amplitude, the 400 Hz one is suppressed.
`timescale 1ns/1ps
module tb_daq_full;
  import daq_pkg::*;

  localparam int RATIO = 200;
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

  daq_top dut (
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
    if (k == 7) return 16'(int'(6000.0 * $sin(2.0 * PI * 50.0 * c / 1.0e6)));
    if (k == 6) return 16'(int'(6000.0 * $sin(2.0 * PI * 400.0 * c / 1.0e6)));
    return 16'(k * 1000 - 3000);
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
    #200000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d, st;
    int c0, good, t0, amp7, amp8;
    real maxerr;
    amp7 = 0; amp8 = 0; maxerr = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    do rd(STATUS, d); while (!d[0]);
    check(cyc >= 250000, $sformatf("power-up wait of %0d clocks", cyc));
    check(conversions == 0, "no conversion before enable");

    // ---- 1. 1 MHz capture of 1 MiB
    t0 = cyc;
    capture(0, 32'h1000_0000, 65536, 1, c0, st);
    check(st[1] && !st[2], "1 MHz: done without error");
    check(cyc - t0 > 65536 * 50 && cyc - t0 < 65536 * 50 + 2000,
          $sformatf("1 MiB at 1 MHz took %0d clocks", cyc - t0));
    good = 0;
    for (int i = 0; i < 65536; i++) begin
      automatic logic [127:0] f = mem_frame(32'h1000_0000, i);
      automatic bit ok = 1;
      for (int k = 0; k < 8; k++) if (f[16*k +: 16] != code(c0 + 1 + i, k)) ok = 0;
      if (!ok && good == i) check(0, $sformatf("1 MHz frame %0d holds conversion %0d", i, c0 + 1 + i));
      good += ok;
    end
    check(good == 65536, $sformatf("%0d of 65536 frames correct", good));
    check(bad_spacing == 0, $sformatf("conversions 50 clocks apart (%0d wrong)", bad_spacing));
    rd(DROPS, d);
    check(d == 0, "no frame dropped during the capture");

    // ---- 2. 5 kHz filtered capture, 50 Hz on channel 8, 400 Hz on channel 7
    use_sines = 1;
    capture(2, 32'h1010_0000, 256, 1, c0, st);
    check(st[1] && !st[2], "filtered: done without error");
    foreach (rw1[s, c]) begin rw1[s][c] = 0; rw2[s][c] = 0; end
    good = 0;
    for (int i = 0; i < 256; i++) begin
      automatic logic [127:0] f = mem_frame(32'h1010_0000, i);
      automatic bit ok = 1;
      for (int k = 0; k < 8; k++) begin
        automatic real want = sec(1, k, sec(0, k, real'($signed(code(c0 + 1 + RATIO * i, k)))));
        automatic real dd = real'($signed(f[16*k +: 16])) - want;
        if (dd < 0) dd = -dd;
        if (dd > maxerr) maxerr = dd;
        if (dd > 3.0) ok = 0;
      end
      if (!ok && good == i) check(0, $sformatf("filtered frame %0d", i));
      good += ok;
      if (i >= 128) begin
        if (int'($signed(f[127:112])) > amp8) amp8 = int'($signed(f[127:112]));
        if (int'($signed(f[111:96])) > amp7) amp7 = int'($signed(f[111:96]));
      end
    end
    check(good == 256, $sformatf("%0d of 256 filtered frames match the model", good));
    check(amp8 > 5900 && amp8 < 6100, $sformatf("50 Hz on channel 8 passes: amplitude %0d", amp8));
    check(amp7 < 100, $sformatf("400 Hz on channel 7 suppressed: amplitude %0d", amp7));
    $display("filtered capture: max deviation %f LSB, ch8 amplitude %0d, ch7 amplitude %0d",
             maxerr, amp8, amp7);
    check(perr == 0, $sformatf("%0d ADC protocol errors", perr));
    check(mem.protocol_errors == 0, $sformatf("%0d AXI protocol errors", mem.protocol_errors));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
