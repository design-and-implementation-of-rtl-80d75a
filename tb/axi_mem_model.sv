// axi_mem_model: behavioural AXI4 write-only memory (64-bit data) standing in
// for the PS HP port and DDR in testbenches.
//
// Accepts one burst at a time: address, then data beats, then a response.
// awready, wready and bvalid are withheld at random (one cycle in STALL_PCT
// percent) to exercise back-pressure. Written 64-bit words land in an
// associative array `words`, keyed by byte address / 8. It counts protocol
// errors: a burst crossing 4 KiB, a WLAST on the wrong beat, a size other
// than 8 bytes or a burst type other than INCR. Addresses at or above
// ERR_BASE answer SLVERR. The master's signals are sampled half a clock
// before the edge at which the handshake takes effect.
`timescale 1ns/1ps

module axi_mem_model #(
  parameter int unsigned STALL_PCT = 30,
  parameter logic [31:0] ERR_BASE  = 32'hF000_0000
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] awaddr,
  input  logic [7:0]  awlen,
  input  logic [2:0]  awsize,
  input  logic [1:0]  awburst,
  input  logic        awvalid,
  output logic        awready,
  input  logic [63:0] wdata,
  input  logic [7:0]  wstrb,
  input  logic        wlast,
  input  logic        wvalid,
  output logic        wready,
  output logic [1:0]  bresp,
  output logic        bvalid,
  input  logic        bready
);
  logic [63:0] words [int unsigned];
  int protocol_errors = 0;
  int bursts = 0;

  typedef enum {M_ADDR, M_DATA, M_RESP} mstate_e;
  mstate_e st = M_ADDR;
  logic [31:0] a;
  int unsigned beats_left;
  logic err;

  // handshakes and payload, sampled between edges
  bit aw_hs, w_hs, b_hs;
  logic [31:0] aw_addr;
  logic [7:0]  aw_len;
  logic [2:0]  aw_size;
  logic [1:0]  aw_burst;
  logic [63:0] w_data;
  logic [7:0]  w_strb;
  logic        w_last;

  initial begin
    awready = 0; wready = 0; bvalid = 0; bresp = 0;
  end

  function automatic bit stall();
    return ($urandom % 100) < STALL_PCT;
  endfunction

  always @(negedge clk) begin
    aw_hs = awvalid && awready;
    w_hs  = wvalid && wready;
    b_hs  = bvalid && bready;
    aw_addr = awaddr; aw_len = awlen; aw_size = awsize; aw_burst = awburst;
    w_data = wdata; w_strb = wstrb; w_last = wlast;
  end

  always @(posedge clk) begin
    if (!rst_n) begin
      st = M_ADDR; awready <= 0; wready <= 0; bvalid <= 0;
    end else begin
      case (st)
        M_ADDR: if (aw_hs) begin
          a = aw_addr;
          beats_left = int'(aw_len) + 1;
          if (aw_size != 3'd3 || aw_burst != 2'b01) protocol_errors++;
          if ((aw_addr[11:0] + 13'((int'(aw_len) + 1) * 8)) > 13'd4096) protocol_errors++;
          err = (aw_addr >= ERR_BASE);
          bursts++;
          st = M_DATA;
        end
        M_DATA: if (w_hs) begin
          if (w_strb != 8'hFF) protocol_errors++;
          words[a >> 3] = w_data;
          a += 8;
          beats_left--;
          if (w_last != (beats_left == 0)) protocol_errors++;
          if (beats_left == 0) st = M_RESP;
        end
        M_RESP: if (b_hs) st = M_ADDR;
        default: ;
      endcase
      aw_hs = 0; w_hs = 0; b_hs = 0;
      // next-cycle ready/valid, randomly withheld
      awready <= (st == M_ADDR) && !stall();
      wready  <= (st == M_DATA) && !stall();
      if (st == M_RESP) begin
        if (!bvalid) begin
          bvalid <= !stall();
          bresp  <= err ? 2'b10 : 2'b00;
        end
      end else bvalid <= 0;
    end
  end
endmodule
