// sacha_hdr_rom: supplies the bytes of the header that starts every packet
// the prover sends back to the verifier.
//
// The header is an Ethernet II header: destination MAC, source MAC and
// EtherType, 14 bytes, returned one per index (index 0 = first byte on the
// wire). The read is registered, one cycle latency. That a header is loaded
// first into the outgoing FIFO follows the static-partition design; its
// contents are this design's choice.
module sacha_hdr_rom #(
  parameter logic [47:0] DST_MAC   = 48'h02_00_00_00_00_01,
  parameter logic [47:0] SRC_MAC   = 48'h02_00_00_00_00_02,
  parameter logic [15:0] ETHERTYPE = 16'h88B5
) (
  input  logic       clk,
  input  logic [3:0] idx,
  output logic [7:0] data
);
  logic [111:0] hdr;
  assign hdr = {DST_MAC, SRC_MAC, ETHERTYPE};

  always_ff @(posedge clk) begin
    data <= (idx < 4'd14) ? hdr[111 - 8*idx -: 8] : 8'h00;
  end
endmodule
