// tb_sacha_async_fifo: pushes random words at 100 MHz and pops them at
// 125 MHz with random gaps on both sides, and checks that every word comes
// out once and in order, that `full` holds writes off when the FIFO holds
// 2**DEPTH_LOG2 + 1 words (array plus output register), and that an empty
// FIFO shows no valid data.
module tb_sacha_async_fifo;
  localparam int unsigned DL = 4;
  logic wclk = 0, rclk = 0, wrst_n = 0, rrst_n = 0;
  always #5 wclk = ~wclk;
  always #4 rclk = ~rclk;

  logic wr_en = 0, full, rd_en, rd_valid;
  logic [31:0] wr_data = 0, rd_data;
  int checks = 0, failures = 0, nw = 0, nr = 0, fulls = 0;
  logic [31:0] q [$];
  bit draining = 0, stop_reading = 0;

  sacha_async_fifo #(.WIDTH(32), .DEPTH_LOG2(DL)) dut (.*);

  // Writer
  initial begin
    repeat (3) @(posedge wclk); wrst_n = 1; rrst_n = 1;
    // Fill until full with the reader stopped.
    stop_reading = 1;
    while (!full) begin
      @(negedge wclk); wr_en = 1; wr_data = $urandom; q.push_back(wr_data); nw++;
      @(negedge wclk); wr_en = 0;
    end
    checks++;
    if (nw != 2**DL + 1) begin failures++; $display("FAIL full after %0d words", nw); end
    stop_reading = 0;
    for (int i = 0; i < 500; i++) begin
      @(negedge wclk);
      if (!full && $urandom_range(0, 2) != 0) begin
        wr_en = 1; wr_data = $urandom; q.push_back(wr_data); nw++;
      end else begin
        wr_en = 0; if (full) fulls++;
      end
    end
    @(negedge wclk); wr_en = 0;
    draining = 1;
  end

  assign rd_en = rd_valid && !stop_reading && ($urandom_range(0, 3) != 0);

  always @(posedge rclk) if (rd_en) begin
    checks++; nr++;
    if (q.size() == 0 || rd_data !== q[0]) begin
      failures++; $display("FAIL data %h", rd_data);
    end
    if (q.size() != 0) void'(q.pop_front());
  end

  initial begin
    wait (draining);
    repeat (200) @(posedge rclk);
    checks++;
    if (nr != nw || rd_valid) begin failures++; $display("FAIL count %0d/%0d", nr, nw); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge wclk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
