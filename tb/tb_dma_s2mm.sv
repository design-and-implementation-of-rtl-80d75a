// tb_dma_s2mm: self-checking test of the stream-to-memory DMA.
//
// A frame source (128-bit words numbered n, 16-bit lane k holding n*8+k)
// feeds the DMA with random gaps; the AXI memory model stalls at random.
// Transfers: 1 KiB aligned (8 full bursts of 16 beats), 160 bytes starting
// 48 bytes below a 4 KiB boundary (must split there), a transfer into the
// error region (must report error), and a zero-length one (done at once).
// Each checks memory contents word by word, the done pulse, the error flag,
// the burst count and the memory model's protocol error count.
`timescale 1ns/1ps
module tb_dma_s2mm;
  logic clk = 0, rst_n = 0;
  always #10 clk = ~clk;

  logic start, busy, done, error;
  logic [31:0] dest;
  logic [25:0] len;
  logic s_tvalid, s_tready;
  logic [127:0] s_tdata;
  logic [31:0] awaddr; logic [7:0] awlen; logic [2:0] awsize; logic [1:0] awburst;
  logic awvalid, awready, wlast, wvalid, wready, bvalid, bready;
  logic [63:0] wdata; logic [7:0] wstrb; logic [1:0] bresp;

  dma_s2mm dut (
    .clk, .rst_n, .start, .dest_addr(dest), .length(len), .busy, .done, .error,
    .s_tvalid, .s_tready, .s_tdata,
    .m_axi_awaddr(awaddr), .m_axi_awlen(awlen), .m_axi_awsize(awsize),
    .m_axi_awburst(awburst), .m_axi_awvalid(awvalid), .m_axi_awready(awready),
    .m_axi_wdata(wdata), .m_axi_wstrb(wstrb), .m_axi_wlast(wlast),
    .m_axi_wvalid(wvalid), .m_axi_wready(wready), .m_axi_bresp(bresp),
    .m_axi_bvalid(bvalid), .m_axi_bready(bready));

  axi_mem_model mem (
    .clk, .rst_n, .awaddr, .awlen, .awsize, .awburst, .awvalid, .awready,
    .wdata, .wstrb, .wlast, .wvalid, .wready, .bresp, .bvalid, .bready);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [127:0] frame_of(int n);
    logic [127:0] f;
    for (int k = 0; k < 8; k++) f[16*k +: 16] = 16'(n * 8 + k);
    return f;
  endfunction

  // frame source: holds each frame until taken, random gaps
  // (handshake sampled between edges, acted on at the edge)
  int sent = 0;
  bit taken = 0;
  always @(negedge clk) taken = s_tvalid && s_tready;
  always @(posedge clk) begin
    if (!rst_n) begin
      s_tvalid <= 0;
    end else begin
      if (taken) sent++;
      if (!s_tvalid || taken) s_tvalid <= ($urandom % 4) != 0;
    end
  end
  assign s_tdata = frame_of(sent);

  int done_pulses = 0;
  always @(negedge clk) if (done) done_pulses++;

  task automatic run(logic [31:0] d, int bytes, bit expect_err);
    int first = sent, b0 = mem.bursts, dp = done_pulses, cyc = 0;
    bit got_err = 0;
    dest = d; len = 26'(bytes);
    @(posedge clk); start <= 1;
    @(posedge clk); start <= 0;
    while (!done && cyc < 20000) begin @(posedge clk); cyc++; end
    got_err = error;
    @(posedge clk);
    check(done_pulses == dp + 1, $sformatf("one done pulse for %0d bytes", bytes));
    check(!busy, "idle after done");
    check(got_err == expect_err, $sformatf("error flag %0d want %0d", got_err, expect_err));
    check(sent - first == bytes / 16, $sformatf("frames taken %0d want %0d", sent - first, bytes / 16));
    for (int i = 0; i < bytes / 8; i++) begin
      logic [127:0] f = frame_of(first + i / 2);
      logic [63:0] want = (i % 2 != 0) ? f[127:64] : f[63:0];
      logic [31:0] wa = (d + 32'(i * 8)) >> 3;
      check(mem.words.exists(wa) && mem.words[wa] == want,
            $sformatf("word %0d at %h", i, d + 32'(i * 8)));
    end
    $display("transfer of %0d bytes at %h: %0d bursts, %0d cycles",
             bytes, d, mem.bursts - b0, cyc);
  endtask

  initial begin
    #2000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int b;
    start = 0; dest = 0; len = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3) @(posedge clk);
    b = mem.bursts;
    run(32'h1000_0000, 1024, 0);
    check(mem.bursts - b == 8, "1 KiB in 8 bursts of 16 beats");
    b = mem.bursts;
    run(32'h1000_0FD0, 160, 0);
    check(mem.bursts - b == 2, "split at the 4 KiB boundary");
    run(32'hF000_0000, 64, 1);
    b = mem.bursts;
    run(32'h1000_2000, 0, 0);
    check(mem.bursts == b, "zero length writes nothing");
    check(mem.protocol_errors == 0, $sformatf("%0d AXI protocol errors", mem.protocol_errors));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
