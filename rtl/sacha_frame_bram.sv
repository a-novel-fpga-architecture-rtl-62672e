// sacha_frame_bram: block RAM that holds one received command packet: the
// command word, the frame address and one configuration frame.
//
// Write port: one byte per RX clock; byte address b goes to word b/4, byte
// lane 3 - b%4, so the first byte of each group of four lands in bits 31:24
// (big-endian words). Read port: one 32-bit word per ICAP clock, registered
// (one cycle latency), as in a block RAM. The 8-bit write and 32-bit read
// widths follow the bus widths of the static-partition block diagram; the
// byte order and the depth (128 words, one 18-kbit block RAM) are this
// design's choices.
module sacha_frame_bram #(
  parameter int unsigned WORDS = 128
) (
  input  logic                       wclk,
  input  logic                       we,
  input  logic [$clog2(WORDS)+1:0]   waddr,   // byte address
  input  logic [7:0]                 wdata,
  input  logic                       rclk,
  input  logic [$clog2(WORDS)-1:0]   raddr,   // word address
  output logic [31:0]                rdata
);
  logic [3:0][7:0] mem [WORDS];

  always_ff @(posedge wclk) begin
    if (we) mem[waddr[$clog2(WORDS)+1:2]][2'd3 - waddr[1:0]] <= wdata;
  end

  always_ff @(posedge rclk) begin
    rdata <= mem[raddr];
  end

endmodule
