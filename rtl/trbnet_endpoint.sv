// trbnet_endpoint: a complete network endpoint on one link.
//
// One media port feeds the channel multiplexer; each of the NCH channels has
// an IOBuf (input and output buffer for the init and reply path) and an API.
// API_TYPE gives each channel's role (bit c = 1: active API that starts
// transfers on the init path and receives replies; 0: passive API that
// receives init transfers and answers on the reply path). USE_ACK selects
// the EOB/ACK handshake per channel; the default switches it off for
// channel 0, the first-level trigger channel, as the HADES setup does.
// The application ports of all channels are brought out as arrays indexed
// by channel; their meaning is that of trbnet_api. link_up should be high
// while the media interface reports a working link; its rising edge starts
// the buffer-size exchange on every channel.
// A channel whose USED_CHANNELS bit is clear gets a terminating buffer
// instead of an API: it answers every request with an empty reply; its
// application ports are then unused and its outputs are zero.
// Structure follows the document's endpoint (multiplexer, four IOBufs,
// APIs); the per-channel parameter vectors are this design's.
module trbnet_endpoint
  import trbnet_pkg::*;
#(
  parameter int           NCH               = 4,
  parameter logic [3:0]   API_TYPE          = 4'b0000,
  parameter logic [3:0]   USE_ACK           = 4'b1110,
  parameter logic [3:0]   USED_CHANNELS     = 4'b1111,
  parameter logic [2:0]   IBUF_DEPTH        = 3'd6,
  parameter logic [2:0]   API_FIFO_DEPTH    = 3'd6,
  parameter logic [7:0]   BROADCAST_BITMASK = 8'hFF
) (
  input  logic        clk,
  input  logic        reset,
  input  logic        link_up,
  // media interface
  input  word_t       med_data_in,
  input  logic        med_dataready_in,
  output logic        med_read_out,
  output word_t       med_data_out,
  output logic        med_dataready_out,
  input  logic        med_read_in,
  // applications, one set per channel
  input  logic [15:0] apl_data_in           [NCH],
  input  logic [1:0]  apl_packet_num_in     [NCH],
  input  logic [NCH-1:0] apl_dataready_in,
  output logic [NCH-1:0] apl_read_out,
  input  logic [NCH-1:0] apl_short_transfer_in,
  input  logic [NCH-1:0] apl_send_in,
  input  logic [3:0]  apl_dtype_in          [NCH],
  input  logic [31:0] apl_error_pattern_in  [NCH],
  input  logic [15:0] apl_target_address_in [NCH],
  output logic [15:0] apl_data_out          [NCH],
  output logic [1:0]  apl_packet_num_out    [NCH],
  output logic [2:0]  apl_typ_out           [NCH],
  output logic [NCH-1:0] apl_dataready_out,
  input  logic [NCH-1:0] apl_read_in,
  output logic [NCH-1:0] apl_run_out,
  output logic [7:0]  apl_seqnr_out         [NCH],
  output logic [3:0]  apl_dtype_out         [NCH],
  input  logic [15:0] my_address_in,
  // status
  output logic [NCH-1:0] stat_stalled,
  output logic [15:0] stat_crc_errors,
  output logic [15:0] stat_lost_words,
  output logic [15:0] stat_rr_decisions
);
  localparam int NP = 2 * NCH;

  word_t        mx_out [NP];
  logic [NP-1:0] mx_out_ready, mx_out_read;
  word_t        mx_in  [NP];
  logic [NP-1:0] mx_in_ready, mx_in_read;
  logic [15:0]  crc_err [NCH];

  trbnet_io_multiplexer #(.NCH(NCH)) u_mux (
    .clk, .reset,
    .med_data_in, .med_dataready_in, .med_read_out,
    .med_data_out, .med_dataready_out, .med_read_in,
    .int_data_out      (mx_out),
    .int_dataready_out (mx_out_ready),
    .int_read_in       (mx_out_read),
    .int_data_in       (mx_in),
    .int_dataready_in  (mx_in_ready),
    .int_read_out      (mx_in_read),
    .lost_words        (stat_lost_words),
    .rr_decisions      (stat_rr_decisions)
  );

  for (genvar c = 0; c < NCH; c++) begin : g_ch
    word_t       io_int_out [2];
    logic [1:0]  io_int_out_ready, io_int_out_read;
    word_t       io_int_in  [2];
    logic [1:0]  io_int_in_ready, io_int_in_read;
    word_t       io_med_in  [2];
    word_t       io_med_out [2];
    logic [1:0]  io_stalled;
    logic [15:0] io_crc [2];
    logic [15:0] io_eob [2];
    logic [1:0]  io_ovf;

    assign io_med_in[0] = mx_out[2*c];
    assign io_med_in[1] = mx_out[2*c+1];
    assign mx_in[2*c]   = io_med_out[0];
    assign mx_in[2*c+1] = io_med_out[1];

    trbnet_iobuf #(
      .CHANNEL(4'(c)), .IBUF_DEPTH(IBUF_DEPTH), .USE_ACKNOWLEDGE(USE_ACK[c])
    ) u_iobuf (
      .clk, .reset, .link_up,
      .med_data_in       (io_med_in),
      .med_dataready_in  (mx_out_ready[2*c+1:2*c]),
      .med_read_out      (mx_out_read[2*c+1:2*c]),
      .med_data_out      (io_med_out),
      .med_dataready_out (mx_in_ready[2*c+1:2*c]),
      .med_read_in       (mx_in_read[2*c+1:2*c]),
      .int_data_out      (io_int_out),
      .int_dataready_out (io_int_out_ready),
      .int_read_in       (io_int_out_read),
      .int_data_in       (io_int_in),
      .int_dataready_in  (io_int_in_ready),
      .int_read_out      (io_int_in_read),
      .stalled           (io_stalled),
      .crc_errors        (io_crc),
      .eob_sent          (io_eob),
      .overflow          (io_ovf)
    );
    assign stat_stalled[c] = |io_stalled;
    assign crc_err[c]      = io_crc[0] + io_crc[1];

    if (USED_CHANNELS[c]) begin : g_api
      word_t       api_out, api_in;
      logic        api_out_ready, api_out_read, api_in_ready, api_in_read;
      logic [15:0] api_dropped;
      // active API: sends on init (0), receives on reply (1);
      // passive API: receives on init, sends on reply.
      localparam int TXP = API_TYPE[c] ? 0 : 1;
      localparam int RXP = 1 - TXP;
      always_comb begin
        io_int_in[TXP]        = api_out;
        io_int_in_ready[TXP]  = api_out_ready;
        io_int_in[RXP]        = '0;
        io_int_in_ready[RXP]  = 1'b0;
        api_in                = io_int_out[RXP];
        api_in_ready          = io_int_out_ready[RXP];
        io_int_out_read[RXP]  = api_in_read;
        io_int_out_read[TXP]  = 1'b1;   // nothing is expected here: discard
      end
      assign api_out_read = io_int_in_read[TXP];

      trbnet_api #(
        .CHANNEL(4'(c)), .API_TYPE(API_TYPE[c]),
        .FIFO_TO_INT_DEPTH(API_FIFO_DEPTH), .FIFO_TO_APL_DEPTH(API_FIFO_DEPTH),
        .BROADCAST_BITMASK(BROADCAST_BITMASK)
      ) u_api (
        .clk, .reset,
        .apl_data_in           (apl_data_in[c]),
        .apl_packet_num_in     (apl_packet_num_in[c]),
        .apl_dataready_in      (apl_dataready_in[c]),
        .apl_read_out          (apl_read_out[c]),
        .apl_short_transfer_in (apl_short_transfer_in[c]),
        .apl_send_in           (apl_send_in[c]),
        .apl_dtype_in          (apl_dtype_in[c]),
        .apl_error_pattern_in  (apl_error_pattern_in[c]),
        .apl_target_address_in (apl_target_address_in[c]),
        .apl_data_out          (apl_data_out[c]),
        .apl_packet_num_out    (apl_packet_num_out[c]),
        .apl_typ_out           (apl_typ_out[c]),
        .apl_dataready_out     (apl_dataready_out[c]),
        .apl_read_in           (apl_read_in[c]),
        .apl_run_out           (apl_run_out[c]),
        .apl_seqnr_out         (apl_seqnr_out[c]),
        .apl_dtype_out         (apl_dtype_out[c]),
        .my_address_in,
        .int_data_out          (api_out),
        .int_dataready_out     (api_out_ready),
        .int_read_in           (api_out_read),
        .int_data_in           (api_in),
        .int_dataready_in      (api_in_ready),
        .int_read_out          (api_in_read),
        .dropped_transfers     (api_dropped)
      );
    end else begin : g_term
      logic [15:0] term_cnt;
      trbnet_term_buf #(.CHANNEL(4'(c))) u_term (
        .clk, .reset,
        .init_in             (io_int_out[0]),
        .init_in_dataready   (io_int_out_ready[0]),
        .init_in_read        (io_int_out_read[0]),
        .reply_out           (io_int_in[1]),
        .reply_out_dataready (io_int_in_ready[1]),
        .reply_out_read      (io_int_in_read[1]),
        .reply_in            (io_int_out[1]),
        .reply_in_dataready  (io_int_out_ready[1]),
        .reply_in_read       (io_int_out_read[1]),
        .terminated          (term_cnt)
      );
      assign io_int_in[0]          = '0;
      assign io_int_in_ready[0]    = 1'b0;
      assign apl_read_out[c]       = 1'b0;
      assign apl_data_out[c]       = '0;
      assign apl_packet_num_out[c] = '0;
      assign apl_typ_out[c]        = '0;
      assign apl_dataready_out[c]  = 1'b0;
      assign apl_run_out[c]        = 1'b0;
      assign apl_seqnr_out[c]      = '0;
      assign apl_dtype_out[c]      = '0;
    end
  end

  always_comb begin
    stat_crc_errors = '0;
    for (int c = 0; c < NCH; c++) stat_crc_errors = stat_crc_errors + crc_err[c];
  end

endmodule
