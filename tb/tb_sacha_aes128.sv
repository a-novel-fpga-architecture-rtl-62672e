// tb_sacha_aes128: checks the iterative AES-128 core against the FIPS-197
// and RFC 4493 known answers and against an independent reference model
// for random keys and blocks, and checks its 10-cycle start-to-done latency
// and that a start while busy is ignored.
module tb_sacha_aes128;
  import sacha_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start = 0, busy, done;
  logic [127:0] key = '0, din = '0, dout;
  int checks = 0, failures = 0;

  sacha_aes128 dut (.*);

  task automatic run(input logic [127:0] k, input logic [127:0] p, input logic [127:0] exp,
                     input bit poke_busy);
    int cyc = 0;
    @(negedge clk); key = k; din = p; start = 1;
    @(negedge clk); start = 0;
    if (poke_busy) begin
      din = ~p; start = 1; @(negedge clk); start = 0; cyc++;
    end
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (dout !== exp) begin
      failures++; $display("FAIL aes k=%h p=%h got %h exp %h", k, p, dout, exp);
    end
    checks++;
    if (cyc != 10) begin failures++; $display("FAIL latency %0d", cyc); end
    @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    run(128'h000102030405060708090a0b0c0d0e0f, 128'h00112233445566778899aabbccddeeff,
        128'h69c4e0d86a7b0430d8cdb78070b4c55a, 0);
    run(128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h6bc1bee22e409f96e93d7e117393172a,
        128'h3ad77bb40d7a3660a89ecaf32466ef97, 1);
    checks++;
    if (ref_aes(128'h000102030405060708090a0b0c0d0e0f, 128'h00112233445566778899aabbccddeeff)
        !== 128'h69c4e0d86a7b0430d8cdb78070b4c55a) begin failures++; $display("FAIL ref model"); end
    for (int i = 0; i < 40; i++) begin
      logic [127:0] k, p;
      k = {$urandom, $urandom, $urandom, $urandom};
      p = {$urandom, $urandom, $urandom, $urandom};
      run(k, p, ref_aes(k, p), i % 3 == 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
