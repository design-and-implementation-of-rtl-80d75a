// tb_axis_fifo: self-checking test of the first-word-fall-through FIFO.
//
// Random pushes and pops on a 16-deep FIFO, compared with a queue model:
// every popped word, m_tvalid, s_tready (low exactly when 16 words are held)
// and the level output. Phases with a slow reader fill the FIFO to full and
// phases with a slow writer drain it to empty. Now and then `flush` must
// empty it in one clock.
`timescale 1ns/1ps
module tb_axis_fifo;
  logic clk = 0, rst_n = 0;
  always #10 clk = ~clk;
  logic flush = 0, s_tvalid = 0, s_tready, m_tvalid, m_tready = 0;
  logic [127:0] s_tdata = '0, m_tdata;
  logic [4:0] level;

  axis_fifo #(.WIDTH(128), .DEPTH(16)) dut (.clk, .rst_n, .flush, .s_tvalid, .s_tready,
    .s_tdata, .m_tvalid, .m_tready, .m_tdata, .level);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [127:0] q[$];
  int fulls = 0, empties = 0, flushes = 0;

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
    for (int i = 0; i < 4000; i++) begin
      automatic int phase = (i / 250) % 2;   // 0: fill, 1: drain
      @(posedge clk); #1;
      check(level == 5'(q.size()), $sformatf("level %0d want %0d", level, q.size()));
      check(s_tready == (q.size() < 16), "s_tready low only when full");
      check(m_tvalid == (q.size() > 0), "m_tvalid high when not empty");
      if (m_tvalid) check(m_tdata == q[0], "head word");
      if (q.size() == 16) fulls++;
      if (q.size() == 0) empties++;
      // this edge's transfers, as the DUT sees them
      s_tvalid = ($urandom % 100) < (phase == 0 ? 80 : 20);
      m_tready = ($urandom % 100) < (phase == 0 ? 20 : 80);
      s_tdata  = {$urandom, $urandom, $urandom, $urandom};
      flush    = (i % 700) == 699;
      #1;
      if (flush) begin
        flushes += (q.size() > 0);
        q.delete();
      end else begin
        automatic bit pop = m_tvalid && m_tready;
        automatic bit push = s_tvalid && s_tready;
        if (pop) void'(q.pop_front());
        if (push) q.push_back(s_tdata);
      end
    end
    check(fulls > 0 && empties > 0, "reached both full and empty");
    check(flushes > 0, "flushed a non-empty FIFO");
    $display("full %0d cycles, empty %0d cycles", fulls, empties);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
