// tb_sacha_key_reg: checks the reset key, that the key holds without `load`
// and that `load` takes a new key (as a key-generating PUF would supply).
module tb_sacha_key_reg;
  logic clk = 0, rst_n = 0, load = 0;
  always #4 clk = ~clk;
  logic [127:0] key_in = '0, key;
  int checks = 0, failures = 0;

  sacha_key_reg dut (.*);

  initial begin
    repeat (2) @(negedge clk);
    checks++;
    if (key !== 128'h2b7e151628aed2a6abf7158809cf4f3c) begin failures++; $display("FAIL reset key"); end
    rst_n = 1;
    for (int i = 0; i < 20; i++) begin
      logic [127:0] k, prev;
      k = {$urandom, $urandom, $urandom, $urandom};
      prev = key;
      @(negedge clk); key_in = k; load = 0;
      @(negedge clk);
      checks++;
      if (key !== prev) begin failures++; $display("FAIL key changed without load"); end
      load = 1;
      @(negedge clk); load = 0;
      checks++;
      if (key !== k) begin failures++; $display("FAIL load"); end
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
