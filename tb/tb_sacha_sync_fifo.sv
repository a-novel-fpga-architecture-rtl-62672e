// tb_sacha_sync_fifo: random pushes and pops on one clock; checks order,
// `count`, `full` at 2**DEPTH_LOG2 entries and that a write to a full FIFO
// is refused.
module tb_sacha_sync_fifo;
  localparam int unsigned DL = 4;
  logic clk = 0, rst_n = 0;
  always #4 clk = ~clk;

  logic wr_en = 0, full, rd_en = 0, rd_valid;
  logic [8:0] wr_data = 0, rd_data;
  logic [DL:0] count;
  int checks = 0, failures = 0, fulls = 0;
  logic [8:0] q [$];

  sacha_sync_fifo #(.WIDTH(9), .DEPTH_LOG2(DL)) dut (.*);

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      checks++;
      if (count != ($bits(count))'(q.size()) || full != (q.size() == 2**DL) || rd_valid != (q.size() != 0)) begin
        failures++; $display("FAIL flags size %0d count %0d", q.size(), count);
      end
      if (rd_valid) begin
        checks++;
        if (rd_data !== q[0]) begin failures++; $display("FAIL data %h exp %h", rd_data, q[0]); end
      end
      // Phases: mostly writes, then mostly reads.
      wr_en   = ((i / 200) % 2 == 0) ? ($urandom_range(0, 3) != 0) : ($urandom_range(0, 3) == 0);
      rd_en   = rd_valid && (((i / 200) % 2 == 0) ? ($urandom_range(0, 3) == 0) : ($urandom_range(0, 3) != 0));
      wr_data = 9'($urandom);
      if (full && wr_en) begin fulls++; wr_en = 0; end
      @(posedge clk);
      if (rd_en) void'(q.pop_front());
      if (wr_en) q.push_back(wr_data);
    end
    checks++;
    if (fulls == 0) begin failures++; $display("FAIL never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
