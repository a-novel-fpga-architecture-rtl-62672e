// tb_sacha_frame_bram: writes a random packet image byte by byte on a
// 125 MHz clock and reads it back as big-endian 32-bit words on a 100 MHz
// clock, checking every word and the one-cycle read latency.
module tb_sacha_frame_bram;
  logic wclk = 0, rclk = 0;
  always #4 wclk = ~wclk;
  always #5 rclk = ~rclk;

  logic we = 0;
  logic [8:0] waddr = 0;
  logic [7:0] wdata = 0;
  logic [6:0] raddr = 0;
  logic [31:0] rdata;
  logic [7:0] img [512];
  int checks = 0, failures = 0;

  sacha_frame_bram #(.WORDS(128)) dut (.*);

  initial begin
    for (int i = 0; i < 512; i++) img[i] = 8'($urandom);
    for (int i = 0; i < 512; i++) begin
      @(negedge wclk); we = 1; waddr = 9'(i); wdata = img[i];
    end
    @(negedge wclk); we = 0;
    for (int w = 0; w < 128; w++) begin
      @(negedge rclk); raddr = 7'(w);
      @(posedge rclk); #1;
      checks++;
      if (rdata !== {img[4*w], img[4*w+1], img[4*w+2], img[4*w+3]}) begin
        failures++; $display("FAIL word %0d %h", w, rdata);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge rclk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
