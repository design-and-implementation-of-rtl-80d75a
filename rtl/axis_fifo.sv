// axis_fifo: synchronous first-word-fall-through FIFO with AXI-Stream
// handshakes on both sides.
//
// It decouples the sample stream, which cannot be stalled (the ADC converts
// on a fixed 1 us grid), from the DMA, which waits for the memory port. A
// word is written when s_tvalid && s_tready and read when m_tvalid &&
// m_tready; the head word is visible on m_tdata as soon as m_tvalid is high,
// one clock after it was written. s_tready is low only when the FIFO is full;
// what the producer does with a refused word is its own business (the top
// level counts it as a dropped frame). `flush` empties the FIFO at the next
// clock edge, discarding its contents. DEPTH must be a power of two.
// The FIFO between filter unit and DMA follows the document; its depth and
// the FWFT organisation are this design's choices.
`timescale 1ns/1ps

module axis_fifo #(
  parameter int unsigned WIDTH = 128,
  parameter int unsigned DEPTH = 512
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     flush,
  input  logic                     s_tvalid,
  output logic                     s_tready,
  input  logic [WIDTH-1:0]         s_tdata,
  output logic                     m_tvalid,
  input  logic                     m_tready,
  output logic [WIDTH-1:0]         m_tdata,
  output logic [$clog2(DEPTH):0]   level
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0] wr_ptr, rd_ptr;
  logic push, pop;

  assign level    = wr_ptr - rd_ptr;
  assign s_tready = (level != (AW+1)'(DEPTH));
  assign m_tvalid = (level != '0);
  assign m_tdata  = mem[rd_ptr[AW-1:0]];
  assign push     = s_tvalid && s_tready;
  assign pop      = m_tvalid && m_tready;

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr[AW-1:0]] <= s_tdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
    end else if (flush) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
    end else begin
      if (push) wr_ptr <= wr_ptr + 1'b1;
      if (pop)  rd_ptr <= rd_ptr + 1'b1;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) level <= (AW+1)'(DEPTH));

endmodule
