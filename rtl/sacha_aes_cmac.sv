// sacha_aes_cmac: AES-CMAC engine (RFC 4493) with separate init, update and
// finalize steps, as used by the attestation protocol: the MAC is
// initialised once, updated with the read-back configuration data frame
// after frame, and finalised when the verifier asks for the checksum.
//
// How it works: INIT encrypts the zero block to get L and derives the
// subkeys K1 = dbl(L) and K2 = dbl(K1). Each UPDATE hands over one complete
// 128-bit block. Because CMAC treats the last block differently, the newest
// block is held back in a buffer and only the previous one is chained
// (X = AES_K(X xor M)). FINAL carries the 0..15 bytes of data that did not
// fill a block: with no tail, the buffered block is the last one and is
// combined with K1; with a tail (or with no data at all), the tail is padded
// with 10..0 and combined with K2 after the buffered block is chained. One
// iterative AES core does all encryptions.
//
// Interface: `op_valid`/`op_ready` handshake; an op is accepted in a cycle
// where both are high. `blk` byte 0 is in bits 127:120. For FINAL the valid
// tail bytes are the first `tail_bytes` bytes of `blk`. `tag_valid` pulses
// for one cycle with the MAC on `tag`, which holds until the next FINAL.
// Timing: INIT and an UPDATE that chains take one AES call: `op_ready`
// returns on the 11th clock edge after the accepting edge (12 cycles per
// op). An UPDATE into an empty buffer takes one cycle; FINAL takes one or
// two AES calls, with `tag_valid` one edge after the last AES result.
module sacha_aes_cmac (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [127:0] key,
  input  logic         op_valid,
  output logic         op_ready,
  input  logic [1:0]   op,          // 0 INIT, 1 UPDATE, 2 FINAL
  input  logic [127:0] blk,
  input  logic [3:0]   tail_bytes,
  output logic         tag_valid,
  output logic [127:0] tag
);
  localparam logic [1:0] OP_INIT = 2'd0, OP_UPDATE = 2'd1, OP_FINAL = 2'd2;

  typedef enum logic [2:0] {S_IDLE, S_L, S_UPD, S_FPRE, S_FIN} state_e;
  state_e state_q;

  logic [127:0] x_q, buf_q, k1_q, k2_q, tailpad_q;
  logic         have_buf_q;

  logic         aes_start, aes_busy, aes_done;
  logic [127:0] aes_din, aes_dout;

  sacha_aes128 u_aes (
    .clk(clk), .rst_n(rst_n), .start(aes_start), .key(key), .din(aes_din),
    .busy(aes_busy), .done(aes_done), .dout(aes_dout)
  );

  function automatic logic [127:0] dbl(input logic [127:0] v);
    return {v[126:0], 1'b0} ^ (v[127] ? 128'h87 : 128'h0);
  endfunction

  // Keep the first n bytes of b, put 0x80 right after them, zero the rest.
  function automatic logic [127:0] pad(input logic [127:0] b, input logic [3:0] n);
    logic [127:0] r;
    for (int i = 0; i < 16; i++) begin
      if (i < int'(n))       r[127 - 8*i -: 8] = b[127 - 8*i -: 8];
      else if (i == int'(n)) r[127 - 8*i -: 8] = 8'h80;
      else                   r[127 - 8*i -: 8] = 8'h00;
    end
    return r;
  endfunction

  assign op_ready = (state_q == S_IDLE);

  // AES start and input, decided combinationally from state and op.
  always_comb begin
    aes_start = 1'b0;
    aes_din   = '0;
    unique case (state_q)
      S_IDLE: if (op_valid) begin
        unique case (op)
          OP_INIT:   begin aes_start = 1'b1; aes_din = '0; end
          OP_UPDATE: begin aes_start = have_buf_q; aes_din = x_q ^ buf_q; end
          OP_FINAL: begin
            aes_start = 1'b1;
            if (tail_bytes == 4'd0)
              aes_din = have_buf_q ? (x_q ^ buf_q ^ k1_q) : (pad('0, 4'd0) ^ k2_q);
            else
              aes_din = have_buf_q ? (x_q ^ buf_q) : (x_q ^ pad(blk, tail_bytes) ^ k2_q);
          end
          default: ;
        endcase
      end
      S_FPRE: if (aes_done) begin aes_start = 1'b1; aes_din = aes_dout ^ tailpad_q ^ k2_q; end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q    <= S_IDLE;
      x_q        <= '0;
      buf_q      <= '0;
      k1_q       <= '0;
      k2_q       <= '0;
      tailpad_q  <= '0;
      have_buf_q <= 1'b0;
      tag_valid  <= 1'b0;
      tag        <= '0;
    end else begin
      tag_valid <= 1'b0;
      unique case (state_q)
        S_IDLE: if (op_valid) begin
          unique case (op)
            OP_INIT: state_q <= S_L;
            OP_UPDATE: begin
              buf_q      <= blk;
              have_buf_q <= 1'b1;
              if (have_buf_q) state_q <= S_UPD;
            end
            OP_FINAL: begin
              tailpad_q <= pad(blk, tail_bytes);
              state_q   <= (tail_bytes != 4'd0 && have_buf_q) ? S_FPRE : S_FIN;
            end
            default: ;
          endcase
        end
        S_L: if (aes_done) begin
          k1_q       <= dbl(aes_dout);
          k2_q       <= dbl(dbl(aes_dout));
          x_q        <= '0;
          have_buf_q <= 1'b0;
          state_q    <= S_IDLE;
        end
        S_UPD: if (aes_done) begin
          x_q     <= aes_dout;
          state_q <= S_IDLE;
        end
        S_FPRE: if (aes_done) begin
          x_q     <= aes_dout;
          state_q <= S_FIN;
        end
        S_FIN: if (aes_done) begin
          tag        <= aes_dout;
          tag_valid  <= 1'b1;
          x_q        <= '0;
          have_buf_q <= 1'b0;
          state_q    <= S_IDLE;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // The AES core must be free whenever this engine starts it.
  assert property (@(posedge clk) disable iff (!rst_n) aes_start |-> !aes_busy);

endmodule
