// tb_sacha_icap_ctrl: runs the ICAP program against the ICAP and
// configuration-memory model. It configures random frames at random
// addresses and checks the configuration memory, reads frames back and
// checks the words pushed into the readback FIFO (frame address first, then
// the frame, register bits masked), checks that an unknown command ends
// without touching the ICAP, and checks the cycle counts of a configuration
// (2*FRAME_WORDS + 16 cycles from go to cfg_done) and of a read-back
// (2*FRAME_WORDS + RD_LAT + 22 cycles from go to rb_done).
module tb_sacha_icap_ctrl;
  import sacha_pkg::*;
  localparam int unsigned FW = 81, NF = 32, REGW = 7;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic go = 0;
  logic [6:0] bram_raddr;
  logic [31:0] bram_rdata;
  logic icap_csib, icap_rdwrb;
  logic [31:0] icap_i, icap_o;
  logic fifo_wr, fifo_full = 0, cfg_done, rb_done, busy;
  logic [31:0] fifo_wdata;
  logic [31:0] ram [128];
  logic [31:0] pushed [$];
  int checks = 0, failures = 0;

  always_ff @(posedge clk) bram_rdata <= ram[bram_raddr];
  always @(posedge clk) if (fifo_wr) pushed.push_back(fifo_wdata);

  sacha_icap_ctrl #(.FRAME_WORDS(FW), .BRAM_WORDS(128), .RD_LAT(1)) dut (.*);
  sacha_icap_cfgmem_model #(.NFRAMES(NF), .FRAME_WORDS(FW), .REG_WORD(REGW)) cm (
    .clk(clk), .csib(icap_csib), .rdwrb(icap_rdwrb), .i(icap_i), .o(icap_o));

  task automatic run(input logic [7:0] cmd, input int addr, output int cycles, output bit was_rb);
    ram[0] = {cmd, 24'h0};
    ram[1] = 32'(addr);
    @(negedge clk); go = 1;
    @(negedge clk); go = 0;
    cycles = 1;
    while (!cfg_done && !rb_done) begin @(negedge clk); cycles++; end
    was_rb = rb_done;
  endtask

  initial begin
    int cyc; bit rb;
    logic [31:0] golden [NF][FW];
    repeat (3) @(negedge clk); rst_n = 1;
    for (int f = 0; f < NF; f++) for (int k = 0; k < FW; k++) golden[f][k] = 'x;
    // Configure every frame once, in a shuffled order.
    for (int n = 0; n < NF; n++) begin
      int a;
      a = (n * 13 + 5) % NF;
      for (int k = 0; k < FW; k++) begin ram[2 + k] = $urandom; golden[a][k] = ram[2 + k]; end
      run(CMD_ICAP_CONFIG, a, cyc, rb);
      checks++;
      if (rb || cyc != 2 * FW + 16) begin failures++; $display("FAIL config timing %0d", cyc); end
    end
    checks++;
    if (cm.frames_written != NF || cm.syncs != NF || cm.desyncs != NF) begin
      failures++; $display("FAIL model counters %0d %0d %0d", cm.frames_written, cm.syncs, cm.desyncs);
    end
    for (int f = 0; f < NF; f++) for (int k = 0; k < FW; k++) begin
      checks++;
      if (cm.mem[f * FW + k] !== golden[f][k]) begin failures++; $display("FAIL mem f%0d w%0d", f, k); end
    end
    // Read frames back.
    for (int n = 0; n < 10; n++) begin
      int a;
      a = $urandom_range(0, NF - 1);
      pushed.delete();
      run(CMD_ICAP_READBACK, a, cyc, rb);
      @(negedge clk);
      checks++;
      if (!rb || cyc != 2 * FW + 1 + 22) begin failures++; $display("FAIL readback timing %0d", cyc); end
      checks++;
      if (pushed.size() != FW + 1 || pushed[0] !== 32'(a)) begin
        failures++; $display("FAIL readback size %0d", pushed.size());
      end else
        for (int k = 0; k < FW; k++) begin
          logic [31:0] m;
          m = (k == REGW) ? 32'hFFFF_FF00 : 32'hFFFF_FFFF;
          checks++;
          if ((pushed[1 + k] & m) !== (golden[a][k] & m)) begin
            failures++; $display("FAIL readback f%0d w%0d %h", a, k, pushed[1 + k]);
          end
        end
    end
    // Unknown command.
    begin
      int s0;
      s0 = cm.syncs;
      run(8'h55, 0, cyc, rb);
      checks++;
      if (rb || cm.syncs != s0) begin failures++; $display("FAIL unknown command"); end
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
