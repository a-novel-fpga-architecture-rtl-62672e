// sacha_icap_ctrl: the "ICAP program" of the static partition (ICAP clock
// domain): it executes the command stored in the frame block RAM through the
// Internal Configuration Access Port.
//
// On `go` it reads the command word (RAM word 0) and the frame address (word
// 1). For ICAP_config it writes a configuration-packet sequence to the ICAP:
// dummy, sync word, NOOP, CMD=WCFG, FAR=address, an FDRI write of the frame
// (RAM words 2..FRAME_WORDS+1) followed by one pad frame of zeros that pushes
// the frame through the device's frame buffer, then CMD=DESYNC and NOOPs.
// For ICAP_readback it writes sync, CMD=RCFG, FAR=address and an FDRO read
// header for two frames, turns the port around to read, reads 2*FRAME_WORDS
// words, throws away the leading pad frame and pushes the requested frame
// into the readback FIFO, preceded by one word holding the frame address;
// it then turns the port back and desynchronises. `cfg_done` pulses when a
// configuration (or an unknown command) is finished, `rb_done` when a
// read-back frame is complete in the FIFO.
//
// That the ICAP writes the buffered frame and reads a frame at an address
// chosen by the verifier into a FIFO follows the proof-of-concept. The exact
// word sequence, the linear frame number used as frame address and the read
// latency RD_LAT (ICAP cycles from a read cycle to its data on `icap_o`) are
// this design's choices, after the public Virtex configuration interface.
//
// Timing: ICAP outputs are registered. From `go` to `cfg_done` a
// configuration takes 2*FRAME_WORDS + 16 cycles (178 at 81 words, 1.78 us
// at 100 MHz); from `go` to `rb_done` a read-back takes
// 2*FRAME_WORDS + RD_LAT + 22 cycles.
module sacha_icap_ctrl
  import sacha_pkg::*;
#(
  parameter int unsigned FRAME_WORDS = FRAME_WORDS_DEF,
  parameter int unsigned BRAM_WORDS  = 128,
  parameter int unsigned RD_LAT      = 1
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          go,
  // frame block RAM read port (one cycle latency)
  output logic [$clog2(BRAM_WORDS)-1:0] bram_raddr,
  input  logic [31:0]                   bram_rdata,
  // ICAP primitive
  output logic                          icap_csib,
  output logic                          icap_rdwrb,
  output logic [31:0]                   icap_i,
  input  logic [31:0]                   icap_o,
  // readback FIFO write side
  output logic                          fifo_wr,
  output logic [31:0]                   fifo_wdata,
  input  logic                          fifo_full,
  // completion
  output logic                          cfg_done,
  output logic                          rb_done,
  output logic                          busy
);
  localparam int unsigned PRE_CFG = 8;
  localparam int unsigned PRE_RB  = 10;
  localparam int unsigned N_POST  = 4;
  localparam logic [10:0] TWO_FRAMES = 11'(2 * FRAME_WORDS);

  typedef enum logic [3:0] {
    I_IDLE, I_CMD, I_ADDR, I_PRE, I_DATA, I_PAD, I_RSW, I_READ, I_DRAIN, I_WSW, I_POST, I_DONE
  } istate_e;
  istate_e state_q;

  logic        is_rb_q;
  logic [31:0] addr_q;
  logic [8:0]  k_q;                 // word index within the current phase
  logic [10:0] cap_q;               // read-back words captured
  logic [RD_LAT:0] rd_pipe_q;       // read cycles in flight
  logic [31:0] pre_word, post_word;
  logic        addr_pushed_q;

  // Words of the sequence before the frame data and after it.
  always_comb begin
    unique case (k_q[3:0])
      4'd0:    pre_word = ICAP_DUMMY;
      4'd1:    pre_word = ICAP_SYNC;
      4'd2:    pre_word = ICAP_NOOP;
      4'd3:    pre_word = type1_hdr(1'b1, REG_CMD, 11'd1);
      4'd4:    pre_word = is_rb_q ? CMDV_RCFG : CMDV_WCFG;
      4'd5:    pre_word = type1_hdr(1'b1, REG_FAR, 11'd1);
      4'd6:    pre_word = addr_q;
      4'd7:    pre_word = is_rb_q ? type1_hdr(1'b0, REG_FDRO, TWO_FRAMES)
                                  : type1_hdr(1'b1, REG_FDRI, TWO_FRAMES);
      default: pre_word = ICAP_NOOP;
    endcase
    unique case (k_q[1:0])
      2'd0:    post_word = type1_hdr(1'b1, REG_CMD, 11'd1);
      2'd1:    post_word = CMDV_DESYNC;
      default: post_word = ICAP_NOOP;
    endcase
  end

  // RAM address: 0 and 1 while fetching the command, then frame words,
  // one cycle ahead of their use.
  always_comb begin
    if (state_q == I_IDLE)                             bram_raddr = '0;
    else if (state_q == I_CMD)                         bram_raddr = 1;
    else if (state_q == I_PRE)                         bram_raddr = 2;
    else if (state_q == I_DATA)                        bram_raddr = ($clog2(BRAM_WORDS))'(k_q + 9'd3);
    else                                               bram_raddr = '0;
  end

  logic rd_cycle;        // a read cycle is visible on the ICAP port now
  logic rd_data_valid;   // icap_o holds read-back data now
  assign rd_cycle      = !icap_csib && icap_rdwrb;
  assign rd_data_valid = rd_pipe_q[RD_LAT-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q       <= I_IDLE;
      is_rb_q       <= 1'b0;
      addr_q        <= '0;
      k_q           <= '0;
      cap_q         <= '0;
      rd_pipe_q     <= '0;
      icap_csib     <= 1'b1;
      icap_rdwrb    <= 1'b0;
      icap_i        <= '0;
      fifo_wr       <= 1'b0;
      fifo_wdata    <= '0;
      cfg_done      <= 1'b0;
      rb_done       <= 1'b0;
      busy          <= 1'b0;
      addr_pushed_q <= 1'b0;
    end else begin
      cfg_done  <= 1'b0;
      rb_done   <= 1'b0;
      fifo_wr   <= 1'b0;
      rd_pipe_q <= {rd_pipe_q[RD_LAT-1:0], rd_cycle};
      icap_csib <= 1'b1;

      unique case (state_q)
        I_IDLE: if (go) begin
          busy    <= 1'b1;
          state_q <= I_CMD;     // RAM word 0 is being read
        end
        I_CMD: begin            // word 0 arrives now
          is_rb_q <= (bram_rdata[31:24] == CMD_ICAP_READBACK);
          if (bram_rdata[31:24] == CMD_ICAP_CONFIG || bram_rdata[31:24] == CMD_ICAP_READBACK)
            state_q <= I_ADDR;
          else
            state_q <= I_DONE;
        end
        I_ADDR: begin           // word 1 arrives now
          addr_q        <= bram_rdata;
          k_q           <= '0;
          addr_pushed_q <= 1'b0;
          state_q       <= I_PRE;
        end
        I_PRE: begin
          icap_csib  <= 1'b0;
          icap_rdwrb <= 1'b0;
          icap_i     <= pre_word;
          if (k_q == 9'((is_rb_q ? PRE_RB : PRE_CFG) - 1)) begin
            k_q     <= '0;
            state_q <= is_rb_q ? I_RSW : I_DATA;
          end else begin
            k_q <= k_q + 9'd1;
          end
        end
        I_DATA: begin
          icap_csib <= 1'b0;
          icap_i    <= bram_rdata;
          if (k_q == 9'(FRAME_WORDS - 1)) begin
            k_q     <= '0;
            state_q <= I_PAD;
          end else begin
            k_q <= k_q + 9'd1;
          end
        end
        I_PAD: begin
          icap_csib <= 1'b0;
          icap_i    <= '0;
          if (k_q == 9'(FRAME_WORDS - 1)) begin
            k_q     <= '0;
            state_q <= I_POST;
          end else begin
            k_q <= k_q + 9'd1;
          end
        end
        I_RSW: begin            // port idle for one cycle, then turned to read
          icap_rdwrb <= 1'b1;
          k_q        <= '0;
          cap_q      <= '0;
          state_q    <= I_READ;
          // The frame address leads the frame in the FIFO.
          fifo_wr       <= 1'b1;
          fifo_wdata    <= addr_q;
          addr_pushed_q <= 1'b1;
        end
        I_READ: begin
          icap_csib <= 1'b0;
          if (k_q == 9'(2 * FRAME_WORDS - 1)) state_q <= I_DRAIN;
          else                                k_q <= k_q + 9'd1;
        end
        I_DRAIN: if (cap_q == TWO_FRAMES) state_q <= I_WSW;
        I_WSW: begin
          icap_rdwrb <= 1'b0;
          k_q        <= '0;
          state_q    <= I_POST;
        end
        I_POST: begin
          icap_csib  <= 1'b0;
          icap_rdwrb <= 1'b0;
          icap_i     <= post_word;
          if (k_q == 9'(N_POST - 1)) state_q <= I_DONE;
          else                       k_q <= k_q + 9'd1;
        end
        I_DONE: begin
          busy    <= 1'b0;
          state_q <= I_IDLE;
          if (is_rb_q && addr_pushed_q) rb_done <= 1'b1;
          else                          cfg_done <= 1'b1;
          is_rb_q <= 1'b0;
        end
        default: state_q <= I_IDLE;
      endcase

      // Capture read-back data: the first frame is the pad frame.
      if (rd_data_valid && (state_q == I_READ || state_q == I_DRAIN)) begin
        cap_q <= cap_q + 11'd1;
        if (cap_q >= 11'(FRAME_WORDS)) begin
          fifo_wr    <= 1'b1;
          fifo_wdata <= icap_o;
        end
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) fifo_wr |-> !fifo_full)
    else $error("readback FIFO overflow");

endmodule
