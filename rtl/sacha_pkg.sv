// sacha_pkg: constants and types shared by the static-partition logic of the
// self-attestation prover.
//
// Holds the verifier command codes, the response type codes, the sizes of a
// configuration frame and the words of the ICAP configuration-packet
// language used to write and read frames. The frame size (81 words of 32
// bits) and the three commands follow the proof-of-concept on a Virtex-6;
// the numeric command codes, the packet layout and the ICAP word encodings
// are this design's choices (the ICAP words follow the public Virtex
// configuration-packet format).
package sacha_pkg;

  // Words in one configuration frame of the target device.
  localparam int unsigned FRAME_WORDS_DEF = 81;
  // Frames in the whole configuration memory and in the dynamic partition.
  localparam int unsigned TOTAL_FRAMES    = 28488;
  localparam int unsigned DYN_FRAMES      = 26400;

  // Verifier commands, first byte of the command word of a received packet.
  typedef enum logic [7:0] {
    CMD_NONE          = 8'h00,
    CMD_ICAP_CONFIG   = 8'h01,
    CMD_ICAP_READBACK = 8'h02,
    CMD_MAC_CHECKSUM  = 8'h03
  } cmd_e;

  // Response type byte sent right after the packet header.
  localparam logic [7:0] RSP_FRAME    = 8'h02;
  localparam logic [7:0] RSP_CHECKSUM = 8'h03;

  // Bytes of the Ethernet header on both directions.
  localparam int unsigned ETH_HDR_BYTES = 14;

  // ICAP configuration-packet words.
  localparam logic [31:0] ICAP_DUMMY = 32'hFFFF_FFFF;
  localparam logic [31:0] ICAP_SYNC  = 32'hAA99_5566;
  localparam logic [31:0] ICAP_NOOP  = 32'h2000_0000;

  // Configuration registers addressed by type-1 packet headers.
  localparam logic [4:0] REG_FAR  = 5'd1;
  localparam logic [4:0] REG_FDRI = 5'd2;
  localparam logic [4:0] REG_FDRO = 5'd3;
  localparam logic [4:0] REG_CMD  = 5'd4;

  // Values written to the CMD register.
  localparam logic [31:0] CMDV_WCFG   = 32'd1;
  localparam logic [31:0] CMDV_RCFG   = 32'd4;
  localparam logic [31:0] CMDV_DESYNC = 32'd13;

  // Type-1 packet header: [31:29]=001, [28:27]=opcode (01 read, 10 write),
  // [17:13]=register, [10:0]=word count.
  function automatic logic [31:0] type1_hdr(input logic write, input logic [4:0] register,
                                            input logic [10:0] count);
    logic [31:0] h;
    h        = '0;
    h[31:29] = 3'b001;
    h[28:27] = write ? 2'b10 : 2'b01;
    h[17:13] = register;
    h[10:0]  = count;
    return h;
  endfunction

endpackage
