// sacha_pulse_sync: carries a single-cycle pulse from one clock domain to
// another.
//
// A pulse in the source domain flips a toggle flop; the toggle is passed
// through a two-flop synchroniser in the destination domain and an edge
// detector turns each change back into a one-cycle pulse. Pulses must be at
// least three destination cycles apart to be seen separately. The crossing
// method is this design's choice; the three clock domains it joins (RX,
// ICAP, TX) are those of the static partition.
//
// Latency: the destination pulse appears two to three destination cycles
// after the source edge.
module sacha_pulse_sync (
  input  logic src_clk,
  input  logic src_rst_n,
  input  logic src_pulse,
  input  logic dst_clk,
  input  logic dst_rst_n,
  output logic dst_pulse
);
  logic tog_q;
  logic [2:0] sync_q;

  always_ff @(posedge src_clk or negedge src_rst_n) begin
    if (!src_rst_n)     tog_q <= 1'b0;
    else if (src_pulse) tog_q <= ~tog_q;
  end

  always_ff @(posedge dst_clk or negedge dst_rst_n) begin
    if (!dst_rst_n) sync_q <= '0;
    else            sync_q <= {sync_q[1:0], tog_q};
  end

  assign dst_pulse = sync_q[2] ^ sync_q[1];

endmodule
