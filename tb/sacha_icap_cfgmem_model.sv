// sacha_icap_cfgmem_model: behavioural model of the ICAP primitive together
// with the device's configuration memory (NFRAMES frames of FRAME_WORDS
// 32-bit words). Not synthesizable; for simulation only.
//
// It understands the packet sequence the ICAP program sends: nothing happens
// before the sync word; type-1 write headers select FAR, CMD or FDRI and the
// following words are written to them; CMD=DESYNC ends the session. FDRI
// data are grouped into frames; each complete frame is committed to
// FAR, FAR+1, ... only when the next frame is complete, so the last frame of
// a write (the pad frame) never lands, as in the device's frame buffer. A
// type-1 read header on FDRO arms a readback: each read cycle (CSIB low,
// RDWRB high) returns the next word on `o` one cycle later; the first frame
// returned is a pad frame of zeros, then frames from FAR onwards.
//
// Register bits: word REG_WORD of every frame has its low 8 bits replaced
// on readback by `live`, a counter that runs with the clock. This stands in
// for flip-flop contents the device reads back along with the
// configuration, which the verifier must mask out.
module sacha_icap_cfgmem_model #(
  parameter int unsigned NFRAMES     = 64,
  parameter int unsigned FRAME_WORDS = 81,
  parameter int unsigned REG_WORD    = 7
) (
  input  logic        clk,
  input  logic        csib,
  input  logic        rdwrb,
  input  logic [31:0] i,
  output logic [31:0] o
);
  import sacha_pkg::*;

  logic [31:0] mem [NFRAMES * FRAME_WORDS];
  logic [31:0] fbuf [FRAME_WORDS];
  logic [31:0] pend [FRAME_WORDS];

  bit          synced = 0, have_pend = 0;
  int unsigned far = 0, wc = 0, fi = 0, ncommit = 0;
  logic [4:0]  cur_reg = 0;
  int unsigned rd_left = 0, rd_idx = 0;
  logic [7:0]  live = 0;

  // Counters the testbenches read.
  int unsigned frames_written = 0, readbacks = 0, syncs = 0, desyncs = 0;

  initial o = '0;

  always @(posedge clk) live <= live + 8'd1;

  task automatic commit_pend();
    int unsigned fa;
    fa = far + ncommit;
    if (fa < NFRAMES)
      for (int k = 0; k < FRAME_WORDS; k++) mem[fa * FRAME_WORDS + k] = pend[k];
    ncommit++;
    frames_written++;
  endtask

  always @(posedge clk) begin
    if (!csib && !rdwrb) begin
      if (!synced) begin
        if (i == ICAP_SYNC) begin synced = 1; syncs++; end
      end else if (wc > 0) begin
        wc--;
        unique case (cur_reg)
          REG_FAR: far = i;
          REG_CMD: if (i == CMDV_DESYNC) begin synced = 0; have_pend = 0; desyncs++; end
          REG_FDRI: begin
            fbuf[fi] = i;
            fi++;
            if (fi == FRAME_WORDS) begin
              if (have_pend) commit_pend();
              pend = fbuf;
              have_pend = 1;
              fi = 0;
            end
          end
          default: ;
        endcase
      end else if (i[31:29] == 3'b001) begin
        cur_reg = i[17:13];
        if (i[28:27] == 2'b10) begin
          wc = i[10:0];
          if (cur_reg == REG_FDRI) begin fi = 0; ncommit = 0; have_pend = 0; end
        end else if (i[28:27] == 2'b01 && cur_reg == REG_FDRO) begin
          rd_left = i[10:0];
          rd_idx  = 0;
        end
      end
    end else if (!csib && rdwrb && synced && rd_left > 0) begin
      int unsigned fr, wd;
      logic [31:0] w;
      fr = rd_idx / FRAME_WORDS;
      wd = rd_idx % FRAME_WORDS;
      if (fr == 0) w = '0;
      else begin
        w = ((far + fr - 1) < NFRAMES) ? mem[(far + fr - 1) * FRAME_WORDS + wd] : '0;
        if (wd == REG_WORD) w[7:0] = live;
      end
      o <= w;
      rd_idx++;
      rd_left--;
      if (rd_left == 0) readbacks++;
    end
  end
endmodule
