// tb_daq_sync: two-channel synchrony test of the whole acquisition logic at
// its default sizes, in the 1 MHz mode.
//
// The same 10 kHz, 1 Vpp sine drives channels 7 and 8 (the other channels are
// held at constants). The sine is a function of simulated time, re-evaluated
// for every clock edge, so the logic samples it wherever it places CONVST.
// Assuming the +/-10 V input range, 1 Vpp is +/-1638.4 codes.
// After the 5 ms power-up wait, one capture of 2000 frames (2 ms, 20 periods)
// goes to DDR. The test then measures what a bench test of the system would:
//   - sampling rate: CONVST rising edges must be exactly 1000 ns apart;
//   - waveform: every stored code equals the input at its CONVST edge, and
//     the NRMSE and correlation against an ideal 1 MHz sampling of the sine
//     are printed and bounded;
//   - synchrony: the phases of channels 7 and 8 at 10 kHz, from a DFT of the
//     stored data, must agree to within 1 ns of time difference. All eight
//     channels come from one conversion, so the logic adds no skew.
// The signal, the channels and the three measured quantities follow the
// system's two-channel bench test; the input range, the capture length and
// the bounds are this test's own choices.
`timescale 1ns/1ps
module tb_daq_sync;
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

  // ---- analog input as a function of time (ns)
  localparam real PI = 3.141592653589793;
  localparam real F_SIG = 10.0e3;
  localparam real AMP = 1638.4;
  localparam int  NFR = 2000;
  function automatic logic [15:0] level(int k, real t_ns);
    if (k >= 6) return 16'($rtoi(AMP * $sin(2.0 * PI * F_SIG * t_ns * 1.0e-9) + 40000.5) - 40000);
    return 16'(k * 1000 - 3000);
  endfunction
  // CONVST changes only just after a rising clock edge, so the input for the
  // next rising edge is set up half a clock ahead
  always @(negedge clk)
    for (int k = 0; k < 8; k++) analog[k] = level(k, $realtime + 10.0);

  // ---- CONVST rising edges while the ADC is enabled
  real rise[$];
  logic convst_q = 1;
  always @(negedge clk) begin
    if (rst_n && convst && !convst_q && dut.adc_enable) rise.push_back($realtime - 10.0);
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

  initial begin
    #40000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d, st;
    int c0, bad_gap, bad_code;
    real re7, im7, re8, im8, ph7, ph8, dt_ns, fs, e2, s2, sx, sy, sxx, syy, sxy, nrmse, corr;
    bad_gap = 0; bad_code = 0;
    re7 = 0; im7 = 0; re8 = 0; im8 = 0; e2 = 0; s2 = 0;
    sx = 0; sy = 0; sxx = 0; syy = 0; sxy = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    do rd(STATUS, d); while (!d[0]);

    capture(0, 32'h1000_0000, NFR, 0, c0, st);
    check(st[1] && !st[2], "capture done without error");
    check(rise.size() >= NFR, $sformatf("%0d conversions seen, want %0d", rise.size(), NFR));

    // sampling rate from the CONVST pin
    for (int i = 1; i < NFR && i < rise.size(); i++)
      if (rise[i] - rise[i-1] != 1000.0) bad_gap++;
    check(bad_gap == 0, $sformatf("%0d CONVST intervals differ from 1000 ns", bad_gap));
    fs = 1.0e9 * (NFR - 1) / (rise[NFR-1] - rise[0]);
    check(fs > 999999.0 && fs < 1000001.0, $sformatf("sampling rate %f Hz", fs));

    for (int i = 0; i < NFR; i++) begin
      automatic logic [127:0] f = mem_frame(32'h1000_0000, i);
      automatic real x7 = real'($signed(f[111:96])), x8 = real'($signed(f[127:112]));
      automatic real ph = 2.0 * PI * F_SIG * i * 1.0e-6;
      // stored code against the input at this frame's CONVST edge
      for (int k = 0; k < 8; k++)
        if (f[16*k +: 16] != level(k, rise[i])) bad_code++;
      // 10 kHz component of each channel, on the ideal 1 us grid
      re7 += x7 * $cos(ph); im7 -= x7 * $sin(ph);
      re8 += x8 * $cos(ph); im8 -= x8 * $sin(ph);
      // channel 8 against the ideal samples of the sine
      begin
        automatic real ideal = AMP * $sin(2.0 * PI * F_SIG * (rise[0] + 1000.0 * i) * 1.0e-9);
        e2 += (x8 - ideal) ** 2; s2 += ideal ** 2;
        sx += x8; sy += ideal; sxx += x8 * x8; syy += ideal * ideal; sxy += x8 * ideal;
      end
    end
    check(bad_code == 0, $sformatf("%0d stored codes differ from the input at CONVST", bad_code));

    ph7 = $atan2(im7, re7);
    ph8 = $atan2(im8, re8);
    dt_ns = (ph8 - ph7) / (2.0 * PI * F_SIG) * 1.0e9;
    check(dt_ns < 1.0 && dt_ns > -1.0, $sformatf("channel 7/8 time difference %f ns", dt_ns));
    check($sqrt(re7 * re7 + im7 * im7) / (NFR / 2) > AMP - 2.0,
          $sformatf("channel 7 amplitude %f", $sqrt(re7 * re7 + im7 * im7) / (NFR / 2)));
    nrmse = 100.0 * $sqrt(e2 / s2);
    corr = (NFR * sxy - sx * sy) / $sqrt((NFR * sxx - sx * sx) * (NFR * syy - sy * sy));
    check(nrmse < 0.1, $sformatf("channel 8 NRMSE %f %%", nrmse));
    check(corr > 0.99999, $sformatf("channel 8 correlation %f", corr));
    $display("sampling rate %f Hz, channel 7/8 time difference %f ns, NRMSE %f %%, correlation %f",
             fs, dt_ns, nrmse, corr);
    rd(DROPS, d);
    check(d == 0, "no frame dropped");
    check(perr == 0, $sformatf("%0d ADC protocol errors", perr));
    check(mem.protocol_errors == 0, $sformatf("%0d AXI protocol errors", mem.protocol_errors));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
