// sacha_tx_fsm: transmit-side controller of the static partition (TX clock
// domain). It builds the packets sent back to the verifier and drives the
// MAC computation.
//
// Two kinds of packet are built, byte by byte, into the outgoing FIFO:
//  * after a read-back (`rb_go`): header, response type RSP_FRAME, the
//    32-bit frame address and the FRAME_WORDS read-back words, all copied
//    from the readback FIFO. The frame words are also packed four at a time
//    into 128-bit blocks and handed to the AES-CMAC engine as UPDATE steps;
//    the packing runs on across frames. Before the first frame after reset
//    or after a checksum, the MAC is initialised (INIT).
//  * after MAC_checksum (`cs_go`): the MAC is finalised with whatever words
//    did not fill a block, and header, response type RSP_CHECKSUM and the
//    16 MAC bytes are sent.
// A packet is only started when the outgoing FIFO has room for the whole
// packet; the wait is reported on `stall`. `pkt_done` pulses when a packet is
// complete in the FIFO. The header comes from the header ROM (one cycle read
// latency). The order header-then-content and the choice between a frame
// copied from the readback FIFO and the checksum of the MAC block follow the
// proof-of-concept; the response type byte, the address word and the
// packing are this design's choices.
//
// Timing: one byte per cycle into the FIFO; a frame packet takes about
// 4*FRAME_WORDS + 22 cycles when the MAC keeps up (it needs 11 cycles per
// 16 bytes).
module sacha_tx_fsm
  import sacha_pkg::*;
#(
  parameter int unsigned FRAME_WORDS = FRAME_WORDS_DEF,
  parameter int unsigned TXF_LOG2    = 9
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               rb_go,
  input  logic               cs_go,
  // readback FIFO, show-ahead read side
  input  logic               rbf_valid,
  input  logic [31:0]        rbf_data,
  output logic               rbf_rd,
  // AES-CMAC engine
  output logic               mac_op_valid,
  input  logic               mac_op_ready,
  output logic [1:0]         mac_op,
  output logic [127:0]       mac_blk,
  output logic [3:0]         mac_tail_bytes,
  input  logic               mac_tag_valid,
  input  logic [127:0]       mac_tag,
  // header ROM
  output logic [3:0]         hdr_idx,
  input  logic [7:0]         hdr_data,
  // outgoing FIFO
  output logic               txf_wr,
  output logic [8:0]         txf_wdata,     // {end of packet, byte}
  input  logic [TXF_LOG2:0]  txf_count,
  // status
  output logic               pkt_done,
  output logic               stall,
  output logic               mac_active       // MAC initialised and not yet finalised
);
  localparam int unsigned FRAME_PKT = ETH_HDR_BYTES + 1 + 4 + 4 * FRAME_WORDS;
  localparam int unsigned CS_PKT    = ETH_HDR_BYTES + 1 + 16;
  localparam logic [1:0] OP_INIT = 2'd0, OP_UPDATE = 2'd1, OP_FINAL = 2'd2;

  typedef enum logic [3:0] {
    T_IDLE, T_ROOM, T_INIT, T_FINREQ, T_HDR, T_TYPE, T_ADDR, T_DATA, T_TAGWAIT, T_TAG, T_END
  } tstate_e;
  tstate_e state_q;

  logic         rb_pend_q, cs_pend_q, is_cs_q;
  logic [4:0]   hcnt_q;          // header bytes: issue index 0..14
  logic [8:0]   words_q;         // frame words taken from the readback FIFO
  logic [31:0]  word_q;          // word being serialised
  logic [1:0]   byte_q;
  logic         have_word_q;
  logic [127:0] pk_q;            // MAC block being packed
  logic [2:0]   pk_n_q;          // words in pk_q, 0..4
  logic [127:0] tag_q;
  logic         tag_have_q;
  logic [4:0]   tcnt_q;

  logic [TXF_LOG2:0] room;
  assign room = (TXF_LOG2+1)'(2**TXF_LOG2) - txf_count;

  // MAC requests: a full block is handed over whenever the engine is ready.
  logic upd_fire;
  assign upd_fire = (pk_n_q == 3'd4) && mac_op_ready && mac_active && (state_q != T_INIT);

  always_comb begin
    mac_op_valid   = 1'b0;
    mac_op         = OP_UPDATE;
    mac_blk        = pk_q;
    mac_tail_bytes = 4'd0;
    if (state_q == T_INIT) begin
      mac_op_valid = 1'b1;
      mac_op       = OP_INIT;
    end else if (state_q == T_FINREQ && pk_n_q != 3'd4) begin
      mac_op_valid   = 1'b1;
      mac_op         = OP_FINAL;
      mac_tail_bytes = {pk_n_q[1:0], 2'b00};
    end else if (upd_fire) begin
      mac_op_valid = 1'b1;
      mac_op       = OP_UPDATE;
    end
  end

  // Take the next frame word when the serialiser is free or on its last byte
  // and the packer has room.
  logic take;
  assign take = (state_q == T_DATA) && rbf_valid && words_q < 9'(FRAME_WORDS) &&
                (!have_word_q || byte_q == 2'd3) && (pk_n_q != 3'd4 || upd_fire);
  assign rbf_rd  = take || (state_q == T_ADDR && rbf_valid && !have_word_q);
  assign hdr_idx = hcnt_q[3:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q     <= T_IDLE;
      rb_pend_q   <= 1'b0;
      cs_pend_q   <= 1'b0;
      is_cs_q     <= 1'b0;
      hcnt_q      <= '0;
      words_q     <= '0;
      word_q      <= '0;
      byte_q      <= '0;
      have_word_q <= 1'b0;
      pk_q        <= '0;
      pk_n_q      <= '0;
      tag_q       <= '0;
      tag_have_q  <= 1'b0;
      tcnt_q      <= '0;
      txf_wr      <= 1'b0;
      txf_wdata   <= '0;
      pkt_done    <= 1'b0;
      stall       <= 1'b0;
      mac_active    <= 1'b0;
    end else begin
      txf_wr   <= 1'b0;
      pkt_done <= 1'b0;
      stall    <= 1'b0;
      if (rb_go) rb_pend_q <= 1'b1;
      if (cs_go) cs_pend_q <= 1'b1;
      if (mac_tag_valid) begin
        tag_q      <= mac_tag;
        tag_have_q <= 1'b1;
      end
      if (upd_fire) pk_n_q <= 3'd0;

      unique case (state_q)
        T_IDLE: begin
          if (rb_pend_q) begin
            rb_pend_q <= 1'b0;
            is_cs_q   <= 1'b0;
            state_q   <= T_ROOM;
          end else if (cs_pend_q) begin
            cs_pend_q <= 1'b0;
            is_cs_q   <= 1'b1;
            state_q   <= T_ROOM;
          end
        end
        T_ROOM: begin
          if (room >= (TXF_LOG2+1)'(is_cs_q ? CS_PKT : FRAME_PKT)) begin
            hcnt_q  <= '0;
            words_q <= '0;
            if (!mac_active) state_q <= T_INIT;
            else           state_q <= is_cs_q ? T_FINREQ : T_HDR;
          end else begin
            stall <= 1'b1;
          end
        end
        T_INIT: if (mac_op_ready) begin
          mac_active <= 1'b1;
          pk_n_q   <= '0;
          state_q  <= is_cs_q ? T_FINREQ : T_HDR;
        end
        T_FINREQ: if (mac_op_ready && pk_n_q != 3'd4) begin
          mac_active <= 1'b0;
          pk_n_q     <= '0;
          tag_have_q <= 1'b0;
          state_q    <= T_HDR;
        end
        T_HDR: begin
          // Index issued in one cycle, ROM byte written in the next.
          hcnt_q <= hcnt_q + 5'd1;
          if (hcnt_q != 5'd0) begin
            txf_wr    <= 1'b1;
            txf_wdata <= {1'b0, hdr_data};
          end
          if (hcnt_q == 5'(ETH_HDR_BYTES)) state_q <= T_TYPE;
        end
        T_TYPE: begin
          txf_wr    <= 1'b1;
          txf_wdata <= {1'b0, is_cs_q ? RSP_CHECKSUM : RSP_FRAME};
          tcnt_q    <= '0;
          state_q   <= is_cs_q ? T_TAGWAIT : T_ADDR;
        end
        T_ADDR: begin
          if (!have_word_q) begin
            if (rbf_valid) begin
              word_q      <= rbf_data;
              byte_q      <= '0;
              have_word_q <= 1'b1;
            end
          end else begin
            txf_wr    <= 1'b1;
            txf_wdata <= {1'b0, word_q[31 - 8*byte_q -: 8]};
            byte_q    <= byte_q + 2'd1;
            if (byte_q == 2'd3) begin
              have_word_q <= 1'b0;
              state_q     <= T_DATA;
            end
          end
        end
        T_DATA: begin
          if (have_word_q) begin
            txf_wr    <= 1'b1;
            txf_wdata <= {(byte_q == 2'd3 && words_q == 9'(FRAME_WORDS)),
                          word_q[31 - 8*byte_q -: 8]};
            byte_q    <= byte_q + 2'd1;
            if (byte_q == 2'd3) begin
              have_word_q <= 1'b0;
              if (words_q == 9'(FRAME_WORDS)) state_q <= T_END;
            end
          end
          if (take) begin
            word_q      <= rbf_data;
            byte_q      <= '0;
            have_word_q <= 1'b1;
            words_q     <= words_q + 9'd1;
            pk_q[127 - 32*pk_n_q[1:0] -: 32] <= rbf_data;
            pk_n_q      <= (upd_fire ? 3'd0 : pk_n_q) + 3'd1;
            if (upd_fire) pk_q[127 -: 32] <= rbf_data;
          end
        end
        T_TAGWAIT: if (tag_have_q || mac_tag_valid) state_q <= T_TAG;
        T_TAG: begin
          txf_wr    <= 1'b1;
          txf_wdata <= {tcnt_q == 5'd15, tag_q[127 - 8*tcnt_q[3:0] -: 8]};
          tcnt_q    <= tcnt_q + 5'd1;
          if (tcnt_q == 5'd15) state_q <= T_END;
        end
        T_END: begin
          pkt_done <= 1'b1;
          state_q  <= T_IDLE;
        end
        default: state_q <= T_IDLE;
      endcase
    end
  end

  // A full block is never overwritten before it has been handed to the MAC.
  assert property (@(posedge clk) disable iff (!rst_n) take && pk_n_q == 3'd4 |-> upd_fire);

endmodule
