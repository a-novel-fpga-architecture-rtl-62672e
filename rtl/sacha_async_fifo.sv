// sacha_async_fifo: dual-clock FIFO that carries read-back configuration
// words from the ICAP clock domain to the TX clock domain.
//
// Binary read and write pointers, one bit wider than the address, are
// converted to Gray code and passed through two-flop synchronisers to the
// other side, where they are converted back for the full and empty tests.
// The storage is a simple dual-port array (a block RAM on an FPGA) with a
// registered read. That the FIFO exists and crosses from the ICAP to the TX
// domain follows the static-partition block diagram; depth and the Gray-code
// scheme are this design's choices.
//
// Interface: write side `wr_en`/`wr_data`/`full` on `wclk`; read side is a
// show-ahead FIFO: `rd_data` is valid whenever `rd_valid` is high and
// `rd_en` pops it. The output register adds one entry, so the FIFO holds
// 2**DEPTH_LOG2 + 1 words. Empty-to-valid latency is about three read
// cycles.
module sacha_async_fifo #(
  parameter int unsigned WIDTH      = 32,
  parameter int unsigned DEPTH_LOG2 = 7
) (
  input  logic             wclk,
  input  logic             wrst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  output logic             full,
  input  logic             rclk,
  input  logic             rrst_n,
  input  logic             rd_en,
  output logic             rd_valid,
  output logic [WIDTH-1:0] rd_data
);
  localparam int unsigned A = DEPTH_LOG2;

  logic [WIDTH-1:0] mem [2**A];

  logic [A:0] wptr_q, rptr_q, wgray_q, rgray_q;
  logic [A:0] rgray_w1, rgray_w2, wgray_r1, wgray_r2;
  logic [A:0] rptr_w, wptr_r;

  function automatic logic [A:0] bin2gray(input logic [A:0] b);
    return b ^ (b >> 1);
  endfunction
  function automatic logic [A:0] gray2bin(input logic [A:0] g);
    logic [A:0] b;
    b[A] = g[A];
    for (int i = int'(A) - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // ---------------- write domain
  assign rptr_w = gray2bin(rgray_w2);
  assign full   = (wptr_q[A] != rptr_w[A]) && (wptr_q[A-1:0] == rptr_w[A-1:0]);

  always_ff @(posedge wclk) begin
    if (wr_en && !full) mem[wptr_q[A-1:0]] <= wr_data;
  end

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wptr_q   <= '0;
      wgray_q  <= '0;
      rgray_w1 <= '0;
      rgray_w2 <= '0;
    end else begin
      rgray_w1 <= rgray_q;
      rgray_w2 <= rgray_w1;
      if (wr_en && !full) begin
        wptr_q  <= wptr_q + 1'b1;
        wgray_q <= bin2gray(wptr_q + 1'b1);
      end
    end
  end

  // ---------------- read domain
  // Output register holds the head word; it is refilled from the array.
  logic             out_valid_q;
  logic [WIDTH-1:0] out_q;
  logic             fetch;
  logic [WIDTH-1:0] mem_rd;

  assign wptr_r   = gray2bin(wgray_r2);
  assign fetch    = (rptr_q != wptr_r) && (!out_valid_q || rd_en);
  assign rd_valid = out_valid_q;
  assign rd_data  = out_q;
  assign mem_rd   = mem[rptr_q[A-1:0]];

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rptr_q      <= '0;
      rgray_q     <= '0;
      wgray_r1    <= '0;
      wgray_r2    <= '0;
      out_valid_q <= 1'b0;
      out_q       <= '0;
    end else begin
      wgray_r1 <= wgray_q;
      wgray_r2 <= wgray_r1;
      if (fetch) begin
        out_q       <= mem_rd;
        out_valid_q <= 1'b1;
        rptr_q      <= rptr_q + 1'b1;
        rgray_q     <= bin2gray(rptr_q + 1'b1);
      end else if (rd_en) begin
        out_valid_q <= 1'b0;
      end
    end
  end

  assert property (@(posedge wclk) disable iff (!wrst_n) wr_en |-> !full)
    else $error("write to a full FIFO");
  assert property (@(posedge rclk) disable iff (!rrst_n) rd_en |-> rd_valid)
    else $error("read from an empty FIFO");

endmodule
