// sacha_aes128: iterative AES-128 encryption core (FIPS-197).
//
// One AES round per clock, with the round keys computed on the fly from the
// cipher key, so the core needs one 128-bit state register, one round-key
// register and a round counter. The design this core serves asks only for
// "128-bit AES" in a low-area MAC; the iterative round-per-cycle structure
// is this design's choice.
//
// Interface: pulse `start` for one cycle with `key` and `din` valid (they are
// sampled on that edge). `busy` is high while the rounds run; `done` pulses
// for one cycle with the ciphertext on `dout`, which then holds until the
// next start. `done` rises on the 10th clock edge after the edge that
// samples `start` (one edge per round); the next block may start in the
// cycle in which `done` is high. A start while busy is ignored.
module sacha_aes128 (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [127:0] key,
  input  logic [127:0] din,
  output logic         busy,
  output logic         done,
  output logic [127:0] dout
);
  import sacha_aes_pkg::*;

  logic [127:0] state_q, rkey_q;
  logic [3:0]   round_q;     // round about to be applied, 1..10
  logic [7:0]   rcon_q;
  logic [127:0] rkey_next, sr, mc;

  assign rkey_next = next_round_key(rkey_q, rcon_q);
  assign sr        = shift_rows(sub_bytes(state_q));
  assign mc        = mix_columns(sr);
  assign dout      = state_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= '0;
      rkey_q  <= '0;
      round_q <= '0;
      rcon_q  <= 8'h01;
      busy    <= 1'b0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          state_q <= din ^ key;      // initial AddRoundKey
          rkey_q  <= key;
          rcon_q  <= 8'h01;
          round_q <= 4'd1;
          busy    <= 1'b1;
        end
      end else begin
        rkey_q  <= rkey_next;
        rcon_q  <= xtime(rcon_q);
        round_q <= round_q + 4'd1;
        if (round_q == 4'd10) begin
          state_q <= sr ^ rkey_next; // last round has no MixColumns
          busy    <= 1'b0;
          done    <= 1'b1;
        end else begin
          state_q <= mc ^ rkey_next;
        end
      end
    end
  end

endmodule
