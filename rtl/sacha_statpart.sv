// sacha_statpart: static partition of a self-attesting FPGA prover.
//
// A verifier proves that an FPGA holds exactly the configuration it sent by
// (1) overwriting the whole dynamic partition, frame by frame, including a
// nonce, and (2) having the FPGA read back every configuration frame in an
// order the verifier chooses, MAC the read-back data with a key only the
// device holds, and return both the frames and the MAC. This module is the
// small, fixed logic that makes that possible: it receives the verifier's
// three commands (ICAP_config, ICAP_readback, MAC_checksum) over Ethernet,
// writes and reads configuration frames through the ICAP, and computes the
// AES-CMAC.
//
// Three clock domains, as in the proof-of-concept:
//  * RX (125 MHz, recovered from the network): RX FSM stores each packet in
//    the frame block RAM and starts the ICAP program or the TX FSM.
//  * ICAP (100 MHz): the ICAP program writes the buffered frame, or reads
//    the addressed frame into the readback FIFO.
//  * TX (125 MHz): the TX FSM loads header plus frame (copied from the
//    readback FIFO, and MACed on the way) or header plus checksum into the
//    outgoing FIFO, which feeds the Ethernet core.
// Triggers cross domains through toggle synchronisers; frame data cross
// through the dual-clock block RAM and the dual-clock readback FIFO.
//
// The Ethernet core, the ICAP primitive and the clock manager are device or
// vendor blocks and sit outside: their signals are the ports. Bus widths (8
// bits on the network side, 32 bits on the ICAP side, 128 bits into the
// MAC), the clock domains and the key register follow the proof-of-concept;
// packet formats, ICAP word sequence and the crossing circuits are this
// design's choices (see the sub-modules).
module sacha_statpart
  import sacha_pkg::*;
#(
  parameter int unsigned  FRAME_WORDS = FRAME_WORDS_DEF,
  parameter logic [127:0] KEY_RESET   = 128'h2b7e1516_28aed2a6_abf71588_09cf4f3c,
  parameter int unsigned  ICAP_RD_LAT = 1
) (
  input  logic         clk_rx,
  input  logic         rst_rx_n,
  input  logic         clk_icap,
  input  logic         rst_icap_n,
  input  logic         clk_tx,
  input  logic         rst_tx_n,
  // Ethernet core, receive side (one byte per clk_rx)
  input  logic         rx_valid,
  input  logic [7:0]   rx_data,
  input  logic         rx_last,
  // Ethernet core, transmit side (one byte per clk_tx when tx_ready)
  output logic         tx_valid,
  output logic [7:0]   tx_data,
  output logic         tx_last,
  input  logic         tx_ready,
  // ICAP primitive (clk_icap)
  output logic         icap_csib,
  output logic         icap_rdwrb,
  output logic [31:0]  icap_i,
  input  logic [31:0]  icap_o,
  // key from a key-generating PUF (clk_tx)
  input  logic         key_load,
  input  logic [127:0] key_in,
  // status
  output logic [15:0]  rx_drop_count,
  output logic         rx_busy,       // a command is executing (clk_rx)
  output logic         icap_busy,     // the ICAP program is running (clk_icap)
  output logic         tx_stall,
  output logic         mac_active
);
  localparam int unsigned BRAM_WORDS = 128;
  localparam int unsigned BRAM_BYTES = 4 * BRAM_WORDS;

  // ---------------- RX domain
  logic                          bram_we;
  logic [$clog2(BRAM_BYTES)-1:0] bram_waddr;
  logic [7:0]                    bram_wdata;
  logic                          icap_go_rx, mac_go_rx, cmd_done_rx;
  logic                          cfg_done_rx, pkt_done_rx;

  sacha_rx_fsm #(.BRAM_BYTES(BRAM_BYTES), .FRAME_WORDS(FRAME_WORDS)) u_rx (
    .clk(clk_rx), .rst_n(rst_rx_n),
    .rx_valid(rx_valid), .rx_data(rx_data), .rx_last(rx_last),
    .bram_we(bram_we), .bram_waddr(bram_waddr), .bram_wdata(bram_wdata),
    .icap_go(icap_go_rx), .mac_go(mac_go_rx), .cmd_done(cmd_done_rx),
    .busy(rx_busy), .drop_count(rx_drop_count)
  );

  assign cmd_done_rx = cfg_done_rx | pkt_done_rx;

  // ---------------- frame block RAM (RX write, ICAP read)
  logic [$clog2(BRAM_WORDS)-1:0] bram_raddr;
  logic [31:0]                   bram_rdata;

  sacha_frame_bram #(.WORDS(BRAM_WORDS)) u_bram (
    .wclk(clk_rx), .we(bram_we), .waddr(bram_waddr), .wdata(bram_wdata),
    .rclk(clk_icap), .raddr(bram_raddr), .rdata(bram_rdata)
  );

  // ---------------- ICAP domain
  logic        icap_go, cfg_done, rb_done;
  logic        rbf_wr, rbf_full;
  logic [31:0] rbf_wdata;

  sacha_pulse_sync u_sync_go (
    .src_clk(clk_rx), .src_rst_n(rst_rx_n), .src_pulse(icap_go_rx),
    .dst_clk(clk_icap), .dst_rst_n(rst_icap_n), .dst_pulse(icap_go)
  );

  sacha_icap_ctrl #(.FRAME_WORDS(FRAME_WORDS), .BRAM_WORDS(BRAM_WORDS), .RD_LAT(ICAP_RD_LAT)) u_icap (
    .clk(clk_icap), .rst_n(rst_icap_n), .go(icap_go),
    .bram_raddr(bram_raddr), .bram_rdata(bram_rdata),
    .icap_csib(icap_csib), .icap_rdwrb(icap_rdwrb), .icap_i(icap_i), .icap_o(icap_o),
    .fifo_wr(rbf_wr), .fifo_wdata(rbf_wdata), .fifo_full(rbf_full),
    .cfg_done(cfg_done), .rb_done(rb_done), .busy(icap_busy)
  );

  sacha_pulse_sync u_sync_cfg_done (
    .src_clk(clk_icap), .src_rst_n(rst_icap_n), .src_pulse(cfg_done),
    .dst_clk(clk_rx), .dst_rst_n(rst_rx_n), .dst_pulse(cfg_done_rx)
  );

  // ---------------- readback FIFO (ICAP write, TX read)
  logic        rbf_valid, rbf_rd;
  logic [31:0] rbf_rdata;

  sacha_async_fifo #(.WIDTH(32), .DEPTH_LOG2(7)) u_rbf (
    .wclk(clk_icap), .wrst_n(rst_icap_n), .wr_en(rbf_wr), .wr_data(rbf_wdata), .full(rbf_full),
    .rclk(clk_tx), .rrst_n(rst_tx_n), .rd_en(rbf_rd), .rd_valid(rbf_valid), .rd_data(rbf_rdata)
  );

  // ---------------- TX domain
  logic rb_go_tx, cs_go_tx, pkt_done;

  sacha_pulse_sync u_sync_rb (
    .src_clk(clk_icap), .src_rst_n(rst_icap_n), .src_pulse(rb_done),
    .dst_clk(clk_tx), .dst_rst_n(rst_tx_n), .dst_pulse(rb_go_tx)
  );

  sacha_pulse_sync u_sync_cs (
    .src_clk(clk_rx), .src_rst_n(rst_rx_n), .src_pulse(mac_go_rx),
    .dst_clk(clk_tx), .dst_rst_n(rst_tx_n), .dst_pulse(cs_go_tx)
  );

  sacha_pulse_sync u_sync_pkt_done (
    .src_clk(clk_tx), .src_rst_n(rst_tx_n), .src_pulse(pkt_done),
    .dst_clk(clk_rx), .dst_rst_n(rst_rx_n), .dst_pulse(pkt_done_rx)
  );

  logic [127:0] key;

  sacha_key_reg #(.KEY_RESET(KEY_RESET)) u_key (
    .clk(clk_tx), .rst_n(rst_tx_n), .load(key_load), .key_in(key_in), .key(key)
  );

  logic         mac_op_valid, mac_op_ready, mac_tag_valid;
  logic [1:0]   mac_op;
  logic [127:0] mac_blk, mac_tag;
  logic [3:0]   mac_tail_bytes;

  sacha_aes_cmac u_cmac (
    .clk(clk_tx), .rst_n(rst_tx_n), .key(key),
    .op_valid(mac_op_valid), .op_ready(mac_op_ready), .op(mac_op), .blk(mac_blk),
    .tail_bytes(mac_tail_bytes), .tag_valid(mac_tag_valid), .tag(mac_tag)
  );

  logic [3:0] hdr_idx;
  logic [7:0] hdr_data;

  sacha_hdr_rom u_hdr (.clk(clk_tx), .idx(hdr_idx), .data(hdr_data));

  logic       txf_wr, txf_rd, txf_valid;
  logic [8:0] txf_wdata, txf_rdata;
  logic [9:0] txf_count;
  logic       txf_full;

  sacha_tx_fsm #(.FRAME_WORDS(FRAME_WORDS), .TXF_LOG2(9)) u_tx (
    .clk(clk_tx), .rst_n(rst_tx_n), .rb_go(rb_go_tx), .cs_go(cs_go_tx),
    .rbf_valid(rbf_valid), .rbf_data(rbf_rdata), .rbf_rd(rbf_rd),
    .mac_op_valid(mac_op_valid), .mac_op_ready(mac_op_ready), .mac_op(mac_op),
    .mac_blk(mac_blk), .mac_tail_bytes(mac_tail_bytes),
    .mac_tag_valid(mac_tag_valid), .mac_tag(mac_tag),
    .hdr_idx(hdr_idx), .hdr_data(hdr_data),
    .txf_wr(txf_wr), .txf_wdata(txf_wdata), .txf_count(txf_count),
    .pkt_done(pkt_done), .stall(tx_stall), .mac_active(mac_active)
  );

  sacha_sync_fifo #(.WIDTH(9), .DEPTH_LOG2(9)) u_txf (
    .clk(clk_tx), .rst_n(rst_tx_n), .wr_en(txf_wr), .wr_data(txf_wdata), .full(txf_full),
    .rd_en(txf_rd), .rd_valid(txf_valid), .rd_data(txf_rdata), .count(txf_count)
  );

  // The TX FSM only starts a packet that fits, so the FIFO never overflows.
  assert property (@(posedge clk_tx) disable iff (!rst_tx_n) txf_wr |-> !txf_full);

  assign txf_rd   = txf_valid && tx_ready;
  assign tx_valid = txf_valid;
  assign tx_data  = txf_rdata[7:0];
  assign tx_last  = txf_rdata[8];

endmodule
