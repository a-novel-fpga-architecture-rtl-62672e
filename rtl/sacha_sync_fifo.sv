// sacha_sync_fifo: single-clock FIFO that holds one outgoing packet in the
// TX clock domain until the Ethernet core has sent it.
//
// Each entry is a byte and an end-of-packet flag (WIDTH = 9 by default).
// Circular buffer with read and write pointers one bit wider than the
// address. Show-ahead read: `rd_data` is valid while `rd_valid` is high and
// is popped by `rd_en`. A write to a full FIFO is refused. The FIFO's place
// in front of the Ethernet core follows the static-partition block diagram;
// its depth and entry format are this design's choices.
module sacha_sync_fifo #(
  parameter int unsigned WIDTH      = 9,
  parameter int unsigned DEPTH_LOG2 = 9
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  output logic             full,
  input  logic             rd_en,
  output logic             rd_valid,
  output logic [WIDTH-1:0] rd_data,
  output logic [DEPTH_LOG2:0] count
);
  localparam int unsigned A = DEPTH_LOG2;

  logic [WIDTH-1:0] mem [2**A];
  logic [A:0] wptr_q, rptr_q;

  assign count    = wptr_q - rptr_q;
  assign full     = (count == (A+1)'(2**A));
  assign rd_valid = (count != '0);
  assign rd_data  = mem[rptr_q[A-1:0]];

  always_ff @(posedge clk) begin
    if (wr_en && !full) mem[wptr_q[A-1:0]] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr_q <= '0;
      rptr_q <= '0;
    end else begin
      if (wr_en && !full)    wptr_q <= wptr_q + 1'b1;
      if (rd_en && rd_valid) rptr_q <= rptr_q + 1'b1;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) wr_en |-> !full)
    else $error("write to a full FIFO");

endmodule
