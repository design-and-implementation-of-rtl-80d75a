// tb_decimator: self-checking test of the 1-in-200 frame decimator.
//
// Frames numbered 0, 1, 2, ... arrive with random gaps; the decimator must
// pass frames 0, 200, 400, ... one clock after they arrive, and nothing else.
// A `clear` mid-stream restarts the count, so the next frame is kept.
`timescale 1ns/1ps
module tb_decimator;
  import daq_pkg::*;

  logic clk = 0, rst_n = 0, clear = 0;
  always #10 clk = ~clk;
  logic in_valid = 0, out_valid;
  frame_t in_frame = '0, out_frame;

  decimator dut (.clk, .rst_n, .clear, .in_valid, .in_frame, .out_valid, .out_frame);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic frame_t mk(int n);
    frame_t f;
    for (int k = 0; k < 8; k++) f[k] = 16'(n * 8 + k);
    return f;
  endfunction

  int outs = 0;
  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // n counts frames since the last restart; `base` is the frame number
  task automatic feed(int count, int base);
    for (int n = 0; n < count; n++) begin
      while (($urandom % 3) == 0) begin
        in_valid = 0; @(posedge clk); #1;
        check(!out_valid, "no output in a gap");
      end
      in_valid = 1; in_frame = mk(base + n);
      // registered output: visible right after the edge that takes the frame
      @(posedge clk); #1;
      in_valid = 0;
      if (n % 200 == 0) begin
        check(out_valid && out_frame == mk(base + n), $sformatf("frame %0d kept", base + n));
        outs++;
      end else check(!out_valid, $sformatf("frame %0d dropped", base + n));
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    feed(1000, 0);
    check(outs == 5, $sformatf("%0d of 1000 frames kept, want 5", outs));
    feed(57, 1000);
    clear = 1; @(posedge clk); #1; clear = 0;
    feed(401, 5000);
    check(outs == 9, $sformatf("count restarts on clear: %0d kept, want 9", outs));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
