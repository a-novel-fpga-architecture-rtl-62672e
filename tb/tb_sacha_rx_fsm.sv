// tb_sacha_rx_fsm: feeds packets to the RX FSM and checks what lands in the
// frame RAM (payload after the 14-byte header, byte addresses from 0), the
// trigger it raises for each command (icap_go for ICAP_config and
// ICAP_readback, mac_go for MAC_checksum), that it stays busy until
// cmd_done, and that packets arriving while busy, too short for their
// command or with an unknown command are dropped and counted.
module tb_sacha_rx_fsm;
  import sacha_pkg::*;
  localparam int unsigned FW = 81;

  logic clk = 0, rst_n = 0;
  always #4 clk = ~clk;

  logic rx_valid = 0, rx_last = 0, cmd_done = 0;
  logic [7:0] rx_data = 0;
  logic bram_we, icap_go, mac_go, busy;
  logic [8:0] bram_waddr;
  logic [7:0] bram_wdata;
  logic [15:0] drop_count;
  logic [7:0] ram [512];
  int checks = 0, failures = 0, n_icap = 0, n_mac = 0;

  sacha_rx_fsm #(.HDR_BYTES(14), .BRAM_BYTES(512), .FRAME_WORDS(FW)) dut (.*);

  always @(posedge clk) begin
    if (bram_we) ram[bram_waddr] <= bram_wdata;
    if (rst_n && icap_go) n_icap++;
    if (rst_n && mac_go)  n_mac++;
  end

  task automatic send(input logic [7:0] pay [], input int gap);
    for (int i = 0; i < 14 + pay.size(); i++) begin
      @(negedge clk);
      rx_valid = 1;
      rx_data  = (i < 14) ? 8'(8'hA0 + i) : pay[i - 14];
      rx_last  = (i == 14 + pay.size() - 1);
    end
    @(negedge clk); rx_valid = 0; rx_last = 0;
    repeat (gap) @(negedge clk);
  endtask

  task automatic done();
    @(negedge clk); cmd_done = 1; @(negedge clk); cmd_done = 0;
  endtask

  task automatic expect_counts(input int ei, input int em, input int ed, input string what);
    repeat (2) @(negedge clk);
    checks++;
    if (n_icap != ei || n_mac != em || drop_count != 16'(ed)) begin
      failures++;
      $display("FAIL %s: icap %0d/%0d mac %0d/%0d drop %0d/%0d", what, n_icap, ei, n_mac, em, drop_count, ed);
    end
  endtask

  initial begin
    logic [7:0] cfg [], rb [], cs [], shrt [], unk [];
    repeat (3) @(negedge clk); rst_n = 1;
    cfg = new[8 + 4 * FW];
    foreach (cfg[i]) cfg[i] = 8'($urandom);
    cfg[0] = CMD_ICAP_CONFIG;
    send(cfg, 3);
    expect_counts(1, 0, 0, "config");
    checks++;
    if (!busy) begin failures++; $display("FAIL not busy"); end
    foreach (cfg[i]) begin
      checks++;
      if (ram[i] !== cfg[i]) begin failures++; $display("FAIL ram %0d", i); end
    end
    // Arrives while busy: dropped, RAM untouched.
    rb = new[8];
    foreach (rb[i]) rb[i] = 8'($urandom);
    rb[0] = CMD_ICAP_READBACK;
    send(rb, 3);
    expect_counts(1, 0, 1, "drop while busy");
    checks++;
    if (ram[1] !== cfg[1]) begin failures++; $display("FAIL RAM overwritten by dropped packet"); end
    done();
    send(rb, 3);
    expect_counts(2, 0, 1, "readback");
    for (int i = 0; i < 8; i++) begin
      checks++;
      if (ram[i] !== rb[i]) begin failures++; $display("FAIL rb ram %0d", i); end
    end
    done();
    cs = new[4];
    cs[0] = CMD_MAC_CHECKSUM; cs[1] = 0; cs[2] = 0; cs[3] = 0;
    send(cs, 3);
    expect_counts(2, 1, 1, "checksum");
    done();
    // Too-short config and unknown command.
    shrt = new[20];
    foreach (shrt[i]) shrt[i] = 8'($urandom);
    shrt[0] = CMD_ICAP_CONFIG;
    send(shrt, 3);
    expect_counts(2, 1, 2, "short config");
    unk = new[8];
    unk[0] = 8'h77;
    send(unk, 3);
    expect_counts(2, 1, 3, "unknown");
    checks++;
    if (busy) begin failures++; $display("FAIL busy after dropped packets"); end
    // Back-to-back readbacks with completion in between.
    for (int n = 0; n < 5; n++) begin
      send(rb, 1);
      done();
    end
    expect_counts(7, 1, 3, "back to back");
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
