// tb_sacha_aes_cmac: checks the CMAC engine against the four RFC 4493
// examples (0, 16, 40 and 64 bytes) and against the reference streaming CMAC
// for random keys and random message lengths (whole blocks and tails), and
// checks the cycle count of INIT (one AES call).
module tb_sacha_aes_cmac;
  import sacha_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [127:0] key = 128'h2b7e151628aed2a6abf7158809cf4f3c, blk = '0, tag;
  logic op_valid = 0, op_ready, tag_valid;
  logic [1:0] op = 0;
  logic [3:0] tail_bytes = 0;
  int checks = 0, failures = 0;

  sacha_aes_cmac dut (.*);

  localparam logic [511:0] MSG = {
    128'h6bc1bee22e409f96e93d7e117393172a, 128'hae2d8a571e03ac9c9eb76fac45af8e51,
    128'h30c81c46a35ce411e5fbc1191a0a52ef, 128'hf69f2445df4f9b17ad2b417be66c3710};

  task automatic do_op(input logic [1:0] o, input logic [127:0] b, input logic [3:0] t);
    @(negedge clk);
    while (!op_ready) @(negedge clk);
    op = o; blk = b; tail_bytes = t; op_valid = 1;
    @(negedge clk); op_valid = 0;
  endtask

  task automatic get_tag(output logic [127:0] t);
    while (!tag_valid) @(negedge clk);
    t = tag;
  endtask

  // MAC of the first nbytes of MSG.
  task automatic rfc(input int nbytes, input logic [127:0] exp);
    logic [127:0] t;
    int full = nbytes / 16, tail = nbytes % 16;
    do_op(0, '0, 0);
    for (int i = 0; i < full; i++) do_op(1, MSG[511 - 128*i -: 128], 0);
    do_op(2, tail ? MSG[511 - 128*full -: 128] : '0, 4'(tail));
    get_tag(t);
    checks++;
    if (t !== exp) begin failures++; $display("FAIL rfc len %0d got %h exp %h", nbytes, t, exp); end
  endtask

  initial begin
    int cyc;
    repeat (3) @(negedge clk); rst_n = 1;
    rfc(0,  128'hbb1d6929e95937287fa37d129b756746);
    rfc(16, 128'h070a16b46b4d4144f79bdd9dd04a287c);
    rfc(40, 128'hdfa66747de9ae63030ca32611497c827);
    rfc(64, 128'h51f0bebf7e3b9d92fc49741779363cfe);

    // INIT latency: op_ready is back on the 11th edge after the accepting one.
    do_op(0, '0, 0);
    cyc = 1;
    while (!op_ready) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != 12) begin failures++; $display("FAIL init cycles %0d", cyc); end

    for (int r = 0; r < 30; r++) begin
      cmac_ref m;
      logic [127:0] t, w;
      int nblk, tail;
      nblk = $urandom_range(0, 6);
      tail = $urandom_range(0, 15);
      key = {$urandom, $urandom, $urandom, $urandom};
      m = new(key);
      do_op(0, '0, 0);
      for (int i = 0; i < nblk; i++) begin
        w = {$urandom, $urandom, $urandom, $urandom};
        for (int j = 0; j < 16; j++) m.add_byte(w[127 - 8*j -: 8]);
        do_op(1, w, 0);
      end
      w = {$urandom, $urandom, $urandom, $urandom};
      for (int j = 0; j < tail; j++) m.add_byte(w[127 - 8*j -: 8]);
      do_op(2, w, 4'(tail));
      get_tag(t);
      checks++;
      if (t !== m.finish()) begin failures++; $display("FAIL random %0d blocks %0d tail %0d", r, nblk, tail); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
