// trbnet_pkg: constants and types shared by all TrbNet blocks.
//
// A TrbNet packet is 64 bits and travels inside a node as four 16-bit words,
// highest word first, each tagged with a 2-bit packet number (0..3).
// Word 0 holds {reserved[7:0], channel[3:0], reply path bit, packet type[2:0]};
// words 1..3 are the data fields F1, F2 and F3 whose meaning depends on the
// packet type. Packet types, field layout, the media error states and the
// common error bits follow the protocol definition. The encoding of the
// init/reply bit (0 = init), the F3 layout {4'b0, seqnr[7:0], dtype[3:0]} and
// the buffer-size code mapping for codes 4 and 5 are this design's choices.
package trbnet_pkg;

  // ---------------------------------------------------------------- words
  typedef struct packed {
    logic [1:0]  num;   // position of the word inside the packet
    logic [15:0] data;
  } word_t;

  typedef logic [63:0] packet_t;

  // ---------------------------------------------------------- packet types
  typedef enum logic [2:0] {
    TYPE_DAT = 3'd0,  // normal data
    TYPE_HDR = 3'd1,  // header / source change
    TYPE_EOB = 3'd2,  // end of buffer
    TYPE_TRM = 3'd3,  // termination
    TYPE_EXT = 3'd4,  // extended data word
    TYPE_ACK = 3'd5,  // acknowledge
    TYPE_ILL = 3'd7   // illegal word
  } ptype_e;

  localparam logic PATH_INIT  = 1'b0;
  localparam logic PATH_REPLY = 1'b1;

  // ------------------------------------------------------- media status
  localparam logic [2:0] ERROR_OK    = 3'd0;
  localparam logic [2:0] ERROR_ENCOD = 3'd1;
  localparam logic [2:0] ERROR_FATAL = 3'd3;
  localparam logic [2:0] ERROR_WAIT  = 3'd6;
  localparam logic [2:0] ERROR_NC    = 3'd7;

  // ------------------------------------------------- common error pattern
  localparam int ERR_ENDPOINT_REACHED = 0;
  localparam int ERR_COLLISION        = 1;
  localparam int ERR_WORD_MISSING     = 2;
  localparam int ERR_CHECKSUM         = 3;
  localparam int ERR_DONT_UNDERSTAND  = 4;

  // ------------------------------------------------- slow control dtypes
  localparam logic [3:0] DTYPE_REG_READ       = 4'h8;
  localparam logic [3:0] DTYPE_REG_WRITE      = 4'h9;
  localparam logic [3:0] DTYPE_REG_READ_MULT  = 4'hA;
  localparam logic [3:0] DTYPE_REG_WRITE_MULT = 4'hB;
  localparam logic [3:0] DTYPE_NET_ADMIN      = 4'hF;

  // network administration commands (upper byte of F1)
  localparam logic [7:0] CMD_SETADDR = 8'h01;
  localparam logic [7:0] CMD_ACKADDR = 8'h02;
  localparam logic [7:0] CMD_READUID = 8'h03;
  localparam logic [7:0] CMD_UID     = 8'h04;

  localparam logic [15:0] BROADCAST_ALL = 16'hFFFF;

  // ---------------------------------------------------------- functions
  function automatic logic [15:0] word0(input logic [3:0] chan, input logic path,
                                        input logic [2:0] ptype);
    return {8'h00, chan, path, ptype};
  endfunction

  function automatic logic [15:0] f3_seq(input logic [7:0] seqnr, input logic [3:0] dtype);
    return {4'h0, seqnr, dtype};
  endfunction

  // Buffer size, in packets, for a 3-bit buffer depth code. Code 0 means no
  // buffer, code 7 an endless one (the receiver always reads).
  function automatic int unsigned buf_packets(input logic [2:0] code);
    case (code)
      3'd0:    return 0;
      3'd6:    return 127;
      3'd7:    return 0;
      default: return 1 << code;
    endcase
  endfunction

  // Physical FIFO depth, in packets, that holds two buffers of that code.
  function automatic int unsigned fifo_packets(input logic [2:0] code);
    case (code)
      3'd0, 3'd7: return 2;
      3'd6:       return 256;
      default:    return 2 << code;
    endcase
  endfunction

  // IBM CRC-16, polynomial x^16 + x^15 + x^2 + 1 (0x8005), MSB first,
  // one 16-bit word per call.
  function automatic logic [15:0] crc16_next(input logic [15:0] crc, input logic [15:0] d);
    logic [15:0] c;
    c = crc;
    for (int i = 15; i >= 0; i--) begin
      if (c[15] ^ d[i]) c = {c[14:0], 1'b0} ^ 16'h8005;
      else              c = {c[14:0], 1'b0};
    end
    return c;
  endfunction

endpackage
