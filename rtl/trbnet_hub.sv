// trbnet_hub: hub with MII_NUMBER media ports.
//
// Each media port has its own channel multiplexer and one IOBuf per channel,
// as in every endpoint. For each channel one hub logic block joins the
// IOBufs of all ports: init transfers from one port go out on all other
// enabled ports, their replies are merged and returned to the source port
// with one merged termination (see trbnet_hub_logic). Channels are fully
// independent, so a trigger on channel 0 passes while channel 1 is busy
// merging data.
// port_enable[c] marks, per channel, the ports that take part (the
// document's "active ports" control register); a port without a connected
// link must be disabled or the hub waits for its reply forever.
// link_up[p] is the link status of port p.
// Structure follows the document; parameter defaults: 4 channels with the
// handshake off on channel 0 and big FIFOs (code 6) as the document's HADES
// setup uses; four ports are this design's default (the document builds
// 2 to 16).
module trbnet_hub
  import trbnet_pkg::*;
#(
  parameter int         NCH          = 4,
  parameter int         MII_NUMBER   = 4,
  parameter logic [3:0] USE_ACK      = 4'b1110,
  parameter logic [2:0] IBUF_DEPTH   = 3'd6,
  parameter bit         REPLY_SWITCH = 1'b1
) (
  input  logic        clk,
  input  logic        reset,
  input  logic [MII_NUMBER-1:0] link_up,
  input  logic [MII_NUMBER-1:0] port_enable [NCH],
  // media interfaces
  input  word_t       med_data_in       [MII_NUMBER],
  input  logic [MII_NUMBER-1:0] med_dataready_in,
  output logic [MII_NUMBER-1:0] med_read_out,
  output word_t       med_data_out      [MII_NUMBER],
  output logic [MII_NUMBER-1:0] med_dataready_out,
  input  logic [MII_NUMBER-1:0] med_read_in,
  // status, per channel
  output logic [NCH-1:0]        stat_locked,
  output logic [MII_NUMBER-1:0] stat_busy_ports [NCH],
  output logic [15:0] stat_sessions    [NCH],
  output logic [15:0] stat_merged_trms [NCH],
  output logic [15:0] stat_hdr_resends [NCH],
  output logic [15:0] stat_port_switches [NCH]
);
  localparam int M  = MII_NUMBER;
  localparam int NP = 2 * NCH;

  // hub-logic side of every IOBuf, indexed [channel][port]
  word_t      ii_data  [NCH][M];   // init, from IBuf
  logic [M-1:0] ii_ready [NCH], ii_read [NCH];
  word_t      io_data  [NCH][M];   // init, to OBuf
  logic [M-1:0] io_ready [NCH], io_read [NCH];
  word_t      ri_data  [NCH][M];   // reply, from IBuf
  logic [M-1:0] ri_ready [NCH], ri_read [NCH];
  word_t      ro_data  [NCH][M];   // reply, to OBuf
  logic [M-1:0] ro_ready [NCH], ro_read [NCH];

  for (genvar p = 0; p < M; p++) begin : g_port
    word_t         mx_out [NP];
    logic [NP-1:0] mx_out_ready, mx_out_read;
    word_t         mx_in  [NP];
    logic [NP-1:0] mx_in_ready, mx_in_read;
    logic [15:0]   lost, rrd;

    trbnet_io_multiplexer #(.NCH(NCH)) u_mux (
      .clk, .reset,
      .med_data_in       (med_data_in[p]),
      .med_dataready_in  (med_dataready_in[p]),
      .med_read_out      (med_read_out[p]),
      .med_data_out      (med_data_out[p]),
      .med_dataready_out (med_dataready_out[p]),
      .med_read_in       (med_read_in[p]),
      .int_data_out      (mx_out),
      .int_dataready_out (mx_out_ready),
      .int_read_in       (mx_out_read),
      .int_data_in       (mx_in),
      .int_dataready_in  (mx_in_ready),
      .int_read_out      (mx_in_read),
      .lost_words        (lost),
      .rr_decisions      (rrd)
    );

    for (genvar c = 0; c < NCH; c++) begin : g_ch
      word_t       io_med_in [2], io_med_out [2], io_int_out [2], io_int_in [2];
      logic [1:0]  io_int_out_ready, io_int_out_read, io_int_in_ready, io_int_in_read;
      logic [1:0]  io_stalled, io_ovf;
      logic [15:0] io_crc [2];
      logic [15:0] io_eob [2];

      assign io_med_in[0] = mx_out[2*c];
      assign io_med_in[1] = mx_out[2*c+1];
      assign mx_in[2*c]   = io_med_out[0];
      assign mx_in[2*c+1] = io_med_out[1];

      trbnet_iobuf #(
        .CHANNEL(4'(c)), .IBUF_DEPTH(IBUF_DEPTH), .USE_ACKNOWLEDGE(USE_ACK[c])
      ) u_iobuf (
        .clk, .reset,
        .link_up           (link_up[p]),
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

      assign ii_data[c][p]     = io_int_out[0];
      assign ii_ready[c][p]    = io_int_out_ready[0];
      assign io_int_out_read[0] = ii_read[c][p];
      assign ri_data[c][p]     = io_int_out[1];
      assign ri_ready[c][p]    = io_int_out_ready[1];
      assign io_int_out_read[1] = ri_read[c][p];
      assign io_int_in[0]       = io_data[c][p];
      assign io_int_in_ready[0] = io_ready[c][p];
      assign io_read[c][p]      = io_int_in_read[0];
      assign io_int_in[1]       = ro_data[c][p];
      assign io_int_in_ready[1] = ro_ready[c][p];
      assign ro_read[c][p]      = io_int_in_read[1];
    end
  end

  for (genvar c = 0; c < NCH; c++) begin : g_logic
    trbnet_hub_logic #(.CHANNEL(4'(c)), .P(M), .REPLY_SWITCH(REPLY_SWITCH)) u_logic (
      .clk, .reset,
      .port_enable         (port_enable[c]),
      .init_in             (ii_data[c]),
      .init_in_dataready   (ii_ready[c]),
      .init_in_read        (ii_read[c]),
      .init_out            (io_data[c]),
      .init_out_dataready  (io_ready[c]),
      .init_out_read       (io_read[c]),
      .reply_in            (ri_data[c]),
      .reply_in_dataready  (ri_ready[c]),
      .reply_in_read       (ri_read[c]),
      .reply_out           (ro_data[c]),
      .reply_out_dataready (ro_ready[c]),
      .reply_out_read      (ro_read[c]),
      .locked              (stat_locked[c]),
      .busy_ports          (stat_busy_ports[c]),
      .sessions            (stat_sessions[c]),
      .merged_trms         (stat_merged_trms[c]),
      .hdr_resends         (stat_hdr_resends[c]),
      .port_switches       (stat_port_switches[c])
    );
  end

endmodule
