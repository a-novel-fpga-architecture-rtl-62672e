// tb_sacha_hdr_rom: reads the 14 header bytes with non-default addresses
// and checks destination MAC, source MAC and EtherType byte by byte, with
// one cycle of read latency.
module tb_sacha_hdr_rom;
  logic clk = 0;
  always #4 clk = ~clk;
  logic [3:0] idx = 0;
  logic [7:0] data;
  logic [7:0] exp [14] = '{8'h0a, 8'h0b, 8'h0c, 8'h0d, 8'h0e, 8'h0f,
                           8'h11, 8'h22, 8'h33, 8'h44, 8'h55, 8'h66, 8'h12, 8'h34};
  int checks = 0, failures = 0;

  sacha_hdr_rom #(.DST_MAC(48'h0a0b0c0d0e0f), .SRC_MAC(48'h112233445566), .ETHERTYPE(16'h1234))
    dut (.*);

  initial begin
    for (int r = 0; r < 3; r++)
      for (int i = 13; i >= 0; i--) begin
        @(negedge clk); idx = 4'(i);
        @(negedge clk);
        checks++;
        if (data !== exp[i]) begin failures++; $display("FAIL byte %0d = %h", i, data); end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
