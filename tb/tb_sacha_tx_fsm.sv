// tb_sacha_tx_fsm: drives the TX FSM with read-back frames (frame address
// plus FRAME_WORDS words in a FIFO model) and checksum requests, with the
// real CMAC engine, header ROM and outgoing FIFO around it, and a receiver
// that drains the FIFO with random back-pressure. Checks every packet byte
// (header, type, address, frame words), the MAC against the reference CMAC
// over all frame words since the last checksum, for a word count that fills
// whole blocks (K1 path), one that leaves a tail (K2 path) and an empty
// message, and that the FSM stalls when the outgoing FIFO has no room.
module tb_sacha_tx_fsm;
  import sacha_pkg::*;
  import sacha_ref_pkg::*;
  localparam int unsigned FW = 81;

  logic clk = 0, rst_n = 0;
  always #4 clk = ~clk;

  logic rb_go = 0, cs_go = 0, rbf_rd, pkt_done, stall, mac_active;
  logic rbf_valid;
  logic [31:0] rbf_data;
  logic mac_op_valid, mac_op_ready, mac_tag_valid;
  logic [1:0] mac_op;
  logic [127:0] mac_blk, mac_tag;
  logic [3:0] mac_tail_bytes, hdr_idx;
  logic [7:0] hdr_data;
  logic txf_wr, txf_full, txf_valid, txf_rd;
  logic [8:0] txf_wdata, txf_rdata;
  logic [9:0] txf_count;
  logic [127:0] key = 128'h000102030405060708090a0b0c0d0e0f;
  logic ready = 1;

  logic [31:0] rbq [$];
  assign rbf_valid = rbq.size() != 0;
  assign rbf_data  = rbf_valid ? rbq[0] : '0;
  always @(posedge clk) if (rst_n && rbf_rd) void'(rbq.pop_front());

  sacha_tx_fsm #(.FRAME_WORDS(FW), .TXF_LOG2(9)) dut (.*);
  sacha_aes_cmac u_cmac (.clk(clk), .rst_n(rst_n), .key(key), .op_valid(mac_op_valid),
    .op_ready(mac_op_ready), .op(mac_op), .blk(mac_blk), .tail_bytes(mac_tail_bytes),
    .tag_valid(mac_tag_valid), .tag(mac_tag));
  sacha_hdr_rom u_hdr (.clk(clk), .idx(hdr_idx), .data(hdr_data));
  sacha_sync_fifo #(.WIDTH(9), .DEPTH_LOG2(9)) u_txf (.clk(clk), .rst_n(rst_n),
    .wr_en(txf_wr), .wr_data(txf_wdata), .full(txf_full), .rd_en(txf_rd),
    .rd_valid(txf_valid), .rd_data(txf_rdata), .count(txf_count));

  assign txf_rd = txf_valid && ready;

  // Receiver: collect packets.
  logic [7:0] cur [$];
  logic [7:0] pkts [$][$];
  always @(posedge clk) if (rst_n && txf_rd) begin
    cur.push_back(txf_rdata[7:0]);
    if (txf_rdata[8]) begin pkts.push_back(cur); cur.delete(); end
  end

  int checks = 0, failures = 0, stalls = 0;
  always @(posedge clk) if (rst_n && stall) stalls++;

  localparam logic [111:0] HDR = {48'h02_00_00_00_00_01, 48'h02_00_00_00_00_02, 16'h88B5};

  task automatic check_hdr(input logic [7:0] p [$], input logic [7:0] typ);
    for (int i = 0; i < 14; i++) begin
      checks++;
      if (p[i] !== HDR[111 - 8*i -: 8]) begin failures++; $display("FAIL header byte %0d", i); end
    end
    checks++;
    if (p[14] !== typ) begin failures++; $display("FAIL type %h", p[14]); end
  endtask

  task automatic send_frames(input int n, cmac_ref m, input bit hold_ready);
    for (int f = 0; f < n; f++) begin
      logic [31:0] words [FW];
      logic [31:0] addr;
      logic [7:0] p [$];
      addr = $urandom_range(0, 28487);
      rbq.push_back(addr);
      for (int k = 0; k < FW; k++) begin words[k] = $urandom; rbq.push_back(words[k]); m.add_word(words[k]); end
      @(negedge clk); rb_go = 1; @(negedge clk); rb_go = 0;
      while (!pkt_done) @(negedge clk);
      if (hold_ready) continue;
      while (pkts.size() == 0) @(negedge clk);
      p = pkts.pop_front();
      checks++;
      if (p.size() != 14 + 1 + 4 + 4 * FW) begin failures++; $display("FAIL frame size %0d", p.size()); continue; end
      check_hdr(p, RSP_FRAME);
      checks++;
      if ({p[15], p[16], p[17], p[18]} !== addr) begin failures++; $display("FAIL addr"); end
      for (int k = 0; k < FW; k++) begin
        checks++;
        if ({p[19+4*k], p[20+4*k], p[21+4*k], p[22+4*k]} !== words[k]) begin
          failures++; $display("FAIL frame word %0d", k);
        end
      end
    end
  endtask

  task automatic checksum(cmac_ref m, input string what);
    logic [7:0] p [$];
    logic [127:0] exp, got;
    exp = m.finish();
    @(negedge clk); cs_go = 1; @(negedge clk); cs_go = 0;
    while (pkts.size() == 0) @(negedge clk);
    p = pkts.pop_front();
    checks++;
    if (p.size() != 31) begin failures++; $display("FAIL checksum size %0d", p.size()); return; end
    check_hdr(p, RSP_CHECKSUM);
    for (int i = 0; i < 16; i++) got[127 - 8*i -: 8] = p[15 + i];
    checks++;
    if (got !== exp) begin failures++; $display("FAIL MAC %s got %h exp %h", what, got, exp); end
  endtask

  initial begin
    cmac_ref m;
    m = new(key);
    repeat (3) @(negedge clk); rst_n = 1;
    // Whole blocks: 4 frames = 324 words = 81 blocks.
    send_frames(4, m, 0);
    checksum(m, "whole blocks");
    // Tail: 3 frames = 243 words, 3 words left over.
    send_frames(3, m, 0);
    checksum(m, "tail");
    // Empty message.
    checksum(m, "empty");
    // Back-pressure: receiver stopped, second frame must wait for room.
    ready = 0;
    send_frames(1, m, 1);
    fork
      send_frames(1, m, 1);
      begin repeat (200) @(negedge clk); ready = 1; end
    join
    while (pkts.size() < 2) @(negedge clk);
    pkts.delete();
    checks++;
    if (stalls == 0) begin failures++; $display("FAIL no stall seen"); end
    checksum(m, "after stall");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
