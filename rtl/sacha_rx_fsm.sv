// sacha_rx_fsm: receive-side controller of the static partition (RX clock
// domain).
//
// It takes the byte stream of a received network packet from the Ethernet
// core, skips the Ethernet header and writes the rest of the packet into the
// frame block RAM: a 32-bit command word (command code in its first byte), a
// 32-bit frame address and, for ICAP_config, one frame of FRAME_WORDS
// words. At the end of the packet it looks at the command: ICAP_config and
// ICAP_readback start the ICAP program (`icap_go`), which reads the command
// and address back from the RAM; MAC_checksum tells the transmit side to
// finalise the MAC and send it (`mac_go`). It then waits for the matching
// completion (`cmd_done`) before it accepts the next packet; a packet that
// starts while a command is outstanding, or that is too short for its
// command, is dropped and counted, since the Ethernet core cannot be
// stalled. The three commands and the split of work between the RX FSM, the
// ICAP program and the TX FSM follow the proof-of-concept; the packet
// layout, the command codes and the drop policy are this design's choices.
//
// Timing: one byte per cycle; `icap_go` or `mac_go` pulses in the cycle
// after the last byte. The RAM write data are the received byte itself, so
// `bram_wdata` is a plain wire from `rx_data`; only the write enable and
// address are decided here.
module sacha_rx_fsm
  import sacha_pkg::*;
#(
  parameter int unsigned HDR_BYTES   = ETH_HDR_BYTES,
  parameter int unsigned BRAM_BYTES  = 512,
  parameter int unsigned FRAME_WORDS = FRAME_WORDS_DEF
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // byte stream from the Ethernet core
  input  logic                          rx_valid,
  input  logic [7:0]                    rx_data,
  input  logic                          rx_last,
  // frame block RAM write port
  output logic                          bram_we,
  output logic [$clog2(BRAM_BYTES)-1:0] bram_waddr,
  output logic [7:0]                    bram_wdata,
  // triggers and completion
  output logic                          icap_go,
  output logic                          mac_go,
  input  logic                          cmd_done,
  output logic                          busy,
  output logic [15:0]                   drop_count
);
  localparam int unsigned CFG_BYTES = 8 + 4 * FRAME_WORDS;

  typedef enum logic [1:0] {R_IDLE, R_RECV, R_DROP} rstate_e;
  rstate_e state_q;

  logic [11:0] cnt_q;          // bytes of this packet seen so far
  logic [7:0]  cmd_q;
  logic [11:0] pay_len;        // payload bytes including this one
  logic [7:0]  cmd_now;

  assign pay_len    = cnt_q + 12'd1 - 12'(HDR_BYTES);
  assign cmd_now    = (cnt_q == 12'(HDR_BYTES)) ? rx_data : cmd_q;
  assign bram_wdata = rx_data;
  assign bram_waddr = ($clog2(BRAM_BYTES))'(cnt_q - 12'(HDR_BYTES));
  assign bram_we    = rx_valid && (state_q == R_RECV || (state_q == R_IDLE && !busy))
                      && cnt_q >= 12'(HDR_BYTES) && (cnt_q - 12'(HDR_BYTES)) < 12'(BRAM_BYTES);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q    <= R_IDLE;
      cnt_q      <= '0;
      cmd_q      <= '0;
      busy       <= 1'b0;
      icap_go    <= 1'b0;
      mac_go     <= 1'b0;
      drop_count <= '0;
    end else begin
      icap_go <= 1'b0;
      mac_go  <= 1'b0;
      if (cmd_done) busy <= 1'b0;

      if (rx_valid) begin
        cnt_q <= rx_last ? '0 : (cnt_q == 12'hFFF ? cnt_q : cnt_q + 12'd1);
        if (cnt_q == 12'(HDR_BYTES)) cmd_q <= rx_data;

        unique case (state_q)
          R_IDLE, R_RECV: begin
            if (state_q == R_IDLE && busy) begin
              // A command is still executing: drop the whole packet.
              drop_count <= drop_count + 16'd1;
              state_q    <= rx_last ? R_IDLE : R_DROP;
            end else if (rx_last) begin
              state_q <= R_IDLE;
              if (cnt_q >= 12'(HDR_BYTES) &&
                  ((cmd_now == CMD_ICAP_CONFIG   && pay_len >= 12'(CFG_BYTES)) ||
                   (cmd_now == CMD_ICAP_READBACK && pay_len >= 12'd8))) begin
                icap_go <= 1'b1;
                busy    <= 1'b1;
              end else if (cnt_q >= 12'(HDR_BYTES) && cmd_now == CMD_MAC_CHECKSUM
                           && pay_len >= 12'd4) begin
                mac_go <= 1'b1;
                busy   <= 1'b1;
              end else begin
                drop_count <= drop_count + 16'd1;
              end
            end else begin
              state_q <= R_RECV;
            end
          end
          R_DROP: if (rx_last) state_q <= R_IDLE;
          default: state_q <= R_IDLE;
        endcase
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(icap_go && mac_go));

endmodule
