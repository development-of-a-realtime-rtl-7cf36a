// trbnet_iobuf: input and output buffers of one channel, both paths.
//
// Holds an input buffer and an output buffer for the init path (index 0)
// and for the reply path (index 1). The two buffers of one path are coupled
// as the handshake needs: ACK packets seen by the input buffer release the
// output buffer, and every buffer the input buffer hands on makes the
// output buffer send an ACK. med_* ports face the multiplexer, int_* ports
// the API or the hub logic. USE_ACKNOWLEDGE switches the EOB/ACK handshake
// for the whole channel (off for the first-level trigger channel, where the
// channel lock already prevents overflow). Port naming follows the document's
// IOBuf; the array form of the ports is this design's.
module trbnet_iobuf
  import trbnet_pkg::*;
#(
  parameter logic [3:0] CHANNEL         = 4'd0,
  parameter logic [2:0] IBUF_DEPTH      = 3'd6,
  parameter bit         USE_ACKNOWLEDGE = 1'b1,
  parameter bit         USE_CHECKSUM    = 1'b1,
  parameter int         IBUF_SECURE_MODE = 2
) (
  input  logic        clk,
  input  logic        reset,
  input  logic        link_up,
  // multiplexer side, [0] init path, [1] reply path
  input  word_t       med_data_in      [2],
  input  logic [1:0]  med_dataready_in,
  output logic [1:0]  med_read_out,
  output word_t       med_data_out     [2],
  output logic [1:0]  med_dataready_out,
  input  logic [1:0]  med_read_in,
  // API / hub side
  output word_t       int_data_out     [2],
  output logic [1:0]  int_dataready_out,
  input  logic [1:0]  int_read_in,
  input  word_t       int_data_in      [2],
  input  logic [1:0]  int_dataready_in,
  output logic [1:0]  int_read_out,
  // status
  output logic [1:0]  stalled,
  output logic [15:0] crc_errors       [2],
  output logic [15:0] eob_sent         [2],
  output logic [1:0]  overflow
);
  for (genvar p = 0; p < 2; p++) begin : g_path
    logic       ack_rx, eob_cons;
    logic [2:0] ack_code;
    logic [1:0] outst;

    trbnet_ibuf #(
      .DEPTH(IBUF_DEPTH), .USE_ACKNOWLEDGE(USE_ACKNOWLEDGE),
      .USE_CHECKSUM(USE_CHECKSUM), .SECURE_MODE(IBUF_SECURE_MODE)
    ) u_ibuf (
      .clk, .reset,
      .med_data_in       (med_data_in[p]),
      .med_dataready_in  (med_dataready_in[p]),
      .med_read_out      (med_read_out[p]),
      .int_data_out      (int_data_out[p]),
      .int_dataready_out (int_dataready_out[p]),
      .int_read_in       (int_read_in[p]),
      .ack_received      (ack_rx),
      .ack_bufcode       (ack_code),
      .eob_consumed      (eob_cons),
      .crc_errors        (crc_errors[p]),
      .overflow          (overflow[p])
    );

    trbnet_obuf #(
      .CHANNEL(CHANNEL), .PATH(p[0]), .MY_DEPTH(IBUF_DEPTH),
      .USE_ACKNOWLEDGE(USE_ACKNOWLEDGE), .USE_CHECKSUM(USE_CHECKSUM)
    ) u_obuf (
      .clk, .reset, .link_up,
      .int_data_in       (int_data_in[p]),
      .int_dataready_in  (int_dataready_in[p]),
      .int_read_out      (int_read_out[p]),
      .med_data_out      (med_data_out[p]),
      .med_dataready_out (med_dataready_out[p]),
      .med_read_in       (med_read_in[p]),
      .ack_received      (ack_rx),
      .ack_bufcode       (ack_code),
      .send_ack          (eob_cons),
      .outstanding       (outst),
      .stalled           (stalled[p]),
      .eob_sent          (eob_sent[p])
    );
  end
endmodule
