// trbnet_system: a small TrbNet: central trigger system, one hub and
// N_FEE front-end boards.
//
// Structure:
//   CTS endpoint (active API on all four channels) --LVDS-- hub port 0
//   hub ports 1..N_FEE --LVDS-- front-end endpoint e (passive APIs)
//   hub port N_FEE+1 -- optical link interface (TLK2501 pins brought out),
//                       the uplink to a further hub or readout board
// Every LVDS link is made of two trbnet_med_lvds, one at each end, joined
// inside this block. The hub takes part with a port on a channel only while
// that port's link is up, so an unconnected optical port is left out.
// Each front-end board has:
//   channel 0 (trigger) and 1 (data readout): application ports brought out
//   channel 2: not used, closed by a terminating buffer
//   channel 3 (slow control): register interface with network address
//     handling; its unique ID comes from the board's DS18S20 sensor read
//     by a 1-wire master (pins brought out). Common status register 0
//     shows the link state, 1 the board temperature. Bit 0 of common
//     control register 0 sends a resynchronisation sequence on the board's
//     link. User status/control registers are brought out; the external
//     data port is not used (accesses to it are answered "don't
//     understand").
// CTS application ports are brought out per channel (arrays [4]); front-end
// ports as [board][channel].
// The arrangement of CTS, hub and front ends follows the document's setup;
// the number of boards, the use of LVDS for the short links and the
// register assignment are this design's.
module trbnet_system
  import trbnet_pkg::*;
#(
  parameter int          N_FEE            = 2,
  parameter logic [3:0]  USE_ACK          = 4'b1110,
  parameter logic [2:0]  IBUF_DEPTH       = 3'd6,
  parameter logic [2:0]  API_FIFO_DEPTH   = 3'd6,
  parameter int          LVDS_CLK_DIV     = 4,
  parameter int          TLK_RX_WAIT_BITS = 27,
  parameter int          TLK_TX_WAIT_BITS = 16,
  parameter int          CLK_MHZ          = 100,
  parameter int          TEMP_CONV_US     = 750000,
  parameter int          TEMP_PERIOD_US   = 1000000
) (
  input  logic        clk,
  input  logic        reset,
  // CTS applications, channels 0..3
  input  logic [15:0] cts_data_in           [4],
  input  logic [1:0]  cts_packet_num_in     [4],
  input  logic [3:0]  cts_dataready_in,
  output logic [3:0]  cts_read_out,
  input  logic [3:0]  cts_short_transfer_in,
  input  logic [3:0]  cts_send_in,
  input  logic [3:0]  cts_dtype_in          [4],
  input  logic [15:0] cts_target_address_in [4],
  output logic [15:0] cts_data_out          [4],
  output logic [1:0]  cts_packet_num_out    [4],
  output logic [2:0]  cts_typ_out           [4],
  output logic [3:0]  cts_dataready_out,
  input  logic [3:0]  cts_read_in,
  output logic [3:0]  cts_run_out,
  output logic [7:0]  cts_seqnr_out         [4],
  input  logic        cts_resync_in,
  // front-end applications, channels 0 and 1
  input  logic [15:0] fee_data_in          [N_FEE][2],
  input  logic [1:0]  fee_packet_num_in    [N_FEE][2],
  input  logic [1:0]  fee_dataready_in     [N_FEE],
  output logic [1:0]  fee_read_out         [N_FEE],
  input  logic [1:0]  fee_short_transfer_in [N_FEE],
  input  logic [1:0]  fee_send_in          [N_FEE],
  input  logic [31:0] fee_error_pattern_in [N_FEE][2],
  output logic [15:0] fee_data_out         [N_FEE][2],
  output logic [1:0]  fee_packet_num_out   [N_FEE][2],
  output logic [2:0]  fee_typ_out          [N_FEE][2],
  output logic [1:0]  fee_dataready_out    [N_FEE],
  input  logic [1:0]  fee_read_in          [N_FEE],
  output logic [1:0]  fee_run_out          [N_FEE],
  output logic [7:0]  fee_seqnr_out        [N_FEE][2],
  output logic [3:0]  fee_dtype_out        [N_FEE][2],
  // front-end registers and sensors
  input  logic [31:0] fee_stat_reg_in      [N_FEE][4],
  output logic [31:0] fee_ctrl_reg_out     [N_FEE][4],
  input  logic [N_FEE-1:0] fee_onewire_in,
  output logic [N_FEE-1:0] fee_onewire_drive_low_out,
  output logic [15:0] fee_address_out      [N_FEE],
  // optical uplink of the hub (TLK2501 and SFP)
  input  logic        tlk_clk,
  output logic [15:0] tlk_txd_out,
  output logic        tlk_tx_en_out,
  output logic        tlk_tx_er_out,
  input  logic        tlk_rx_clk,
  input  logic [15:0] tlk_rxd_in,
  input  logic        tlk_rx_dv_in,
  input  logic        tlk_rx_er_in,
  output logic        tlk_enable_out,
  output logic        tlk_loopen_out,
  output logic        tlk_prbsen_out,
  input  logic        sfp_los_in,
  // status
  output logic [N_FEE+1:0] stat_hub_link_up,
  output logic        stat_cts_link_up,
  output logic [3:0]  stat_cts_stalled,
  output logic [15:0] stat_cts_rr_decisions,
  output logic [15:0] stat_hub_sessions     [4],
  output logic [15:0] stat_hub_merged_trms  [4],
  output logic [15:0] stat_hub_hdr_resends  [4],
  output logic [15:0] stat_hub_port_switches [4],
  output logic [15:0] stat_parity_errors,
  output logic [15:0] stat_fee_requests     [N_FEE]
);
  localparam int M = N_FEE + 2;   // hub ports
  localparam int T = N_FEE + 1;   // optical port

  // hub media side
  word_t        h_in [M], h_out [M];
  logic [M-1:0] h_in_ready, h_in_read, h_out_ready, h_out_read;
  logic [M-1:0] h_link;
  logic [M-1:0] h_enable [4];
  logic [15:0]  parity_err [2*N_FEE+2];
  logic [3:0]   hub_locked;
  logic [M-1:0] hub_busy [4];

  for (genvar c = 0; c < 4; c++) begin : g_en
    assign h_enable[c] = h_link;
  end
  assign stat_hub_link_up = h_link;

  trbnet_hub #(
    .NCH(4), .MII_NUMBER(M), .USE_ACK(USE_ACK), .IBUF_DEPTH(IBUF_DEPTH)
  ) u_hub (
    .clk, .reset,
    .link_up           (h_link),
    .port_enable       (h_enable),
    .med_data_in       (h_in),
    .med_dataready_in  (h_in_ready),
    .med_read_out      (h_in_read),
    .med_data_out      (h_out),
    .med_dataready_out (h_out_ready),
    .med_read_in       (h_out_read),
    .stat_locked       (hub_locked),
    .stat_busy_ports   (hub_busy),
    .stat_sessions     (stat_hub_sessions),
    .stat_merged_trms  (stat_hub_merged_trms),
    .stat_hdr_resends  (stat_hub_hdr_resends),
    .stat_port_switches (stat_hub_port_switches)
  );

  // ------------------------------------------------------------ CTS
  word_t c_in, c_out;
  logic  c_in_ready, c_in_read, c_out_ready, c_out_read;
  logic [7:0] l0_d, l1_d;       // link 0: CTS -> hub (l0), hub -> CTS (l1)
  logic [3:0] l0_c, l1_c;       // {clk, carrier, parity, first}
  logic [2:0] c_op, h0_op;
  logic       c_resync, h0_resync;
  logic [31:0] cts_err [4];
  logic [3:0]  cts_dtype_unused [4];
  logic [15:0] cts_crc, cts_lost;

  for (genvar c = 0; c < 4; c++) begin : g_cts_err
    assign cts_err[c] = '0;
  end

  trbnet_endpoint #(
    .NCH(4), .API_TYPE(4'b1111), .USE_ACK(USE_ACK),
    .IBUF_DEPTH(IBUF_DEPTH), .API_FIFO_DEPTH(API_FIFO_DEPTH)
  ) u_cts (
    .clk, .reset,
    .link_up               (stat_cts_link_up),
    .med_data_in           (c_in),
    .med_dataready_in      (c_in_ready),
    .med_read_out          (c_in_read),
    .med_data_out          (c_out),
    .med_dataready_out     (c_out_ready),
    .med_read_in           (c_out_read),
    .apl_data_in           (cts_data_in),
    .apl_packet_num_in     (cts_packet_num_in),
    .apl_dataready_in      (cts_dataready_in),
    .apl_read_out          (cts_read_out),
    .apl_short_transfer_in (cts_short_transfer_in),
    .apl_send_in           (cts_send_in),
    .apl_dtype_in          (cts_dtype_in),
    .apl_error_pattern_in  (cts_err),
    .apl_target_address_in (cts_target_address_in),
    .apl_data_out          (cts_data_out),
    .apl_packet_num_out    (cts_packet_num_out),
    .apl_typ_out           (cts_typ_out),
    .apl_dataready_out     (cts_dataready_out),
    .apl_read_in           (cts_read_in),
    .apl_run_out           (cts_run_out),
    .apl_seqnr_out         (cts_seqnr_out),
    .apl_dtype_out         (cts_dtype_unused),
    .my_address_in         (16'h0001),
    .stat_stalled          (stat_cts_stalled),
    .stat_crc_errors       (cts_crc),
    .stat_lost_words       (cts_lost),
    .stat_rr_decisions     (stat_cts_rr_decisions)
  );

  trbnet_med_lvds #(.CLK_DIV(LVDS_CLK_DIV)) u_cts_lvds (
    .clk, .reset,
    .int_data_in (c_out), .int_dataready_in (c_out_ready), .int_read_out (c_out_read),
    .int_data_out (c_in), .int_dataready_out (c_in_ready), .int_read_in (c_in_read),
    .lvds_data_out (l0_d), .lvds_clk_out (l0_c[3]), .lvds_carrier_out (l0_c[2]),
    .lvds_parity_out (l0_c[1]), .lvds_first_out (l0_c[0]),
    .lvds_data_in (l1_d), .lvds_clk_in (l1_c[3]), .lvds_carrier_in (l1_c[2]),
    .lvds_parity_in (l1_c[1]), .lvds_first_in (l1_c[0]),
    .ctrl_resync_in (cts_resync_in), .stat_op (c_op), .link_up (stat_cts_link_up),
    .stat_resync_out (c_resync), .stat_parity_errors (parity_err[0])
  );

  trbnet_med_lvds #(.CLK_DIV(LVDS_CLK_DIV)) u_hub_lvds0 (
    .clk, .reset,
    .int_data_in (h_out[0]), .int_dataready_in (h_out_ready[0]), .int_read_out (h_out_read[0]),
    .int_data_out (h_in[0]), .int_dataready_out (h_in_ready[0]), .int_read_in (h_in_read[0]),
    .lvds_data_out (l1_d), .lvds_clk_out (l1_c[3]), .lvds_carrier_out (l1_c[2]),
    .lvds_parity_out (l1_c[1]), .lvds_first_out (l1_c[0]),
    .lvds_data_in (l0_d), .lvds_clk_in (l0_c[3]), .lvds_carrier_in (l0_c[2]),
    .lvds_parity_in (l0_c[1]), .lvds_first_in (l0_c[0]),
    .ctrl_resync_in (1'b0), .stat_op (h0_op), .link_up (h_link[0]),
    .stat_resync_out (h0_resync), .stat_parity_errors (parity_err[1])
  );

  // ---------------------------------------------------- front ends
  for (genvar e = 0; e < N_FEE; e++) begin : g_fee
    word_t f_in, f_out;
    logic  f_in_ready, f_in_read, f_out_ready, f_out_read;
    logic [7:0] up_d, dn_d;
    logic [3:0] up_c, dn_c;
    logic [2:0] f_op, hp_op;
    logic       f_link, f_resync, hp_resync;
    logic [15:0] my_addr;
    logic [63:0] uid;
    logic        uid_valid, temp_valid, presence;
    logic [15:0] temperature;
    logic [7:0]  ow_crc;
    logic [3:0]  f_stalled;
    logic [15:0] f_crc, f_lost, f_rrd;

    // endpoint application arrays, channel 3 goes to the register interface
    logic [15:0] a_data_in [4], a_data_out [4], a_target [4];
    logic [1:0]  a_pnum_in [4], a_pnum_out [4];
    logic [3:0]  a_dtype_in [4], a_dtype_out [4];
    logic [31:0] a_err [4];
    logic [2:0]  a_typ [4];
    logic [7:0]  a_seqnr [4];
    logic [3:0]  a_dready_in, a_read_out, a_short, a_send, a_dready_out, a_read_in, a_run;

    for (genvar c = 0; c < 2; c++) begin : g_app
      assign a_data_in[c]  = fee_data_in[e][c];
      assign a_pnum_in[c]  = fee_packet_num_in[e][c];
      assign a_dready_in[c] = fee_dataready_in[e][c];
      assign a_short[c]    = fee_short_transfer_in[e][c];
      assign a_send[c]     = fee_send_in[e][c];
      assign a_dtype_in[c] = '0;
      assign a_err[c]      = fee_error_pattern_in[e][c];
      assign a_target[c]   = '0;
      assign a_read_in[c]  = fee_read_in[e][c];
      assign fee_read_out[e][c]       = a_read_out[c];
      assign fee_data_out[e][c]       = a_data_out[c];
      assign fee_packet_num_out[e][c] = a_pnum_out[c];
      assign fee_typ_out[e][c]        = a_typ[c];
      assign fee_dataready_out[e][c]  = a_dready_out[c];
      assign fee_run_out[e][c]        = a_run[c];
      assign fee_seqnr_out[e][c]      = a_seqnr[c];
      assign fee_dtype_out[e][c]      = a_dtype_out[c];
    end
    // channel 2 is terminated inside the endpoint
    assign a_data_in[2] = '0;  assign a_pnum_in[2] = '0; assign a_dready_in[2] = 1'b0;
    assign a_short[2]   = 1'b0; assign a_send[2]   = 1'b0; assign a_dtype_in[2] = '0;
    assign a_err[2]     = '0;  assign a_target[2]  = '0; assign a_read_in[2]   = 1'b1;

    logic [31:0] cstat [2];
    logic [31:0] cctrl [2];
    logic [1:0]  cctrl_strobe;
    logic [3:0]  ctrl_strobe;
    logic [15:0] dat_addr;
    logic        dat_re, dat_we;
    logic [31:0] dat_wdata;
    assign cstat[0] = {f_crc, 13'd0, f_op};
    assign cstat[1] = {15'd0, temp_valid, temperature};

    trbnet_regio #(
      .ENDPOINT_ID (8'h00),
      .BOARD_INFO  (16'h0101)
    ) u_regio (
      .clk, .reset,
      .apl_data_out           (a_data_in[3]),
      .apl_packet_num_out     (a_pnum_in[3]),
      .apl_dataready_out      (a_dready_in[3]),
      .apl_read_in            (a_read_out[3]),
      .apl_short_transfer_out (a_short[3]),
      .apl_send_out           (a_send[3]),
      .apl_dtype_out          (a_dtype_in[3]),
      .apl_error_pattern_out  (a_err[3]),
      .apl_target_address_out (a_target[3]),
      .apl_data_in            (a_data_out[3]),
      .apl_packet_num_in      (a_pnum_out[3]),
      .apl_typ_in             (a_typ[3]),
      .apl_dataready_in       (a_dready_out[3]),
      .apl_read_out           (a_read_in[3]),
      .apl_run_in             (a_run[3]),
      .apl_dtype_in           (a_dtype_out[3]),
      .common_stat_reg_in     (cstat),
      .common_ctrl_reg_out    (cctrl),
      .common_ctrl_strobe_out (cctrl_strobe),
      .stat_reg_in            (fee_stat_reg_in[e]),
      .ctrl_reg_out           (fee_ctrl_reg_out[e]),
      .ctrl_strobe_out        (ctrl_strobe),
      .dat_addr_out           (dat_addr),
      .dat_read_enable_out    (dat_re),
      .dat_write_enable_out   (dat_we),
      .dat_data_out           (dat_wdata),
      .dat_data_in            (32'd0),
      .dat_ack_in             (1'b0),
      .dat_unknown_in         (dat_re | dat_we),
      .uid_in                 (uid),
      .my_address_out         (my_addr),
      .stat_requests          (stat_fee_requests[e])
    );
    assign fee_address_out[e] = my_addr;

    trbnet_onewire #(
      .CLK_MHZ(CLK_MHZ), .CONV_US(TEMP_CONV_US), .PERIOD_US(TEMP_PERIOD_US)
    ) u_onewire (
      .clk, .reset,
      .onewire_in            (fee_onewire_in[e]),
      .onewire_drive_low_out (fee_onewire_drive_low_out[e]),
      .uid_out               (uid),
      .uid_valid             (uid_valid),
      .temperature_out       (temperature),
      .temp_valid            (temp_valid),
      .stat_presence         (presence),
      .stat_crc_errors       (ow_crc)
    );

    trbnet_endpoint #(
      .NCH(4), .API_TYPE(4'b0000), .USE_ACK(USE_ACK), .USED_CHANNELS(4'b1011),
      .IBUF_DEPTH(IBUF_DEPTH), .API_FIFO_DEPTH(API_FIFO_DEPTH)
    ) u_ep (
      .clk, .reset,
      .link_up               (f_link),
      .med_data_in           (f_in),
      .med_dataready_in      (f_in_ready),
      .med_read_out          (f_in_read),
      .med_data_out          (f_out),
      .med_dataready_out     (f_out_ready),
      .med_read_in           (f_out_read),
      .apl_data_in           (a_data_in),
      .apl_packet_num_in     (a_pnum_in),
      .apl_dataready_in      (a_dready_in),
      .apl_read_out          (a_read_out),
      .apl_short_transfer_in (a_short),
      .apl_send_in           (a_send),
      .apl_dtype_in          (a_dtype_in),
      .apl_error_pattern_in  (a_err),
      .apl_target_address_in (a_target),
      .apl_data_out          (a_data_out),
      .apl_packet_num_out    (a_pnum_out),
      .apl_typ_out           (a_typ),
      .apl_dataready_out     (a_dready_out),
      .apl_read_in           (a_read_in),
      .apl_run_out           (a_run),
      .apl_seqnr_out         (a_seqnr),
      .apl_dtype_out         (a_dtype_out),
      .my_address_in         (my_addr),
      .stat_stalled          (f_stalled),
      .stat_crc_errors       (f_crc),
      .stat_lost_words       (f_lost),
      .stat_rr_decisions     (f_rrd)
    );

    trbnet_med_lvds #(.CLK_DIV(LVDS_CLK_DIV)) u_fee_lvds (
      .clk, .reset,
      .int_data_in (f_out), .int_dataready_in (f_out_ready), .int_read_out (f_out_read),
      .int_data_out (f_in), .int_dataready_out (f_in_ready), .int_read_in (f_in_read),
      .lvds_data_out (up_d), .lvds_clk_out (up_c[3]), .lvds_carrier_out (up_c[2]),
      .lvds_parity_out (up_c[1]), .lvds_first_out (up_c[0]),
      .lvds_data_in (dn_d), .lvds_clk_in (dn_c[3]), .lvds_carrier_in (dn_c[2]),
      .lvds_parity_in (dn_c[1]), .lvds_first_in (dn_c[0]),
      .ctrl_resync_in (cctrl[0][0]), .stat_op (f_op), .link_up (f_link),
      .stat_resync_out (f_resync), .stat_parity_errors (parity_err[2*e+2])
    );

    trbnet_med_lvds #(.CLK_DIV(LVDS_CLK_DIV)) u_hub_lvds (
      .clk, .reset,
      .int_data_in (h_out[e+1]), .int_dataready_in (h_out_ready[e+1]),
      .int_read_out (h_out_read[e+1]),
      .int_data_out (h_in[e+1]), .int_dataready_out (h_in_ready[e+1]),
      .int_read_in (h_in_read[e+1]),
      .lvds_data_out (dn_d), .lvds_clk_out (dn_c[3]), .lvds_carrier_out (dn_c[2]),
      .lvds_parity_out (dn_c[1]), .lvds_first_out (dn_c[0]),
      .lvds_data_in (up_d), .lvds_clk_in (up_c[3]), .lvds_carrier_in (up_c[2]),
      .lvds_parity_in (up_c[1]), .lvds_first_in (up_c[0]),
      .ctrl_resync_in (1'b0), .stat_op (hp_op), .link_up (h_link[e+1]),
      .stat_resync_out (hp_resync), .stat_parity_errors (parity_err[2*e+3])
    );
  end

  // ------------------------------------------------- optical uplink
  logic [2:0] t_op;
  logic       t_resync;
  trbnet_med_tlk #(
    .RX_WAIT_BITS(TLK_RX_WAIT_BITS), .TX_WAIT_BITS(TLK_TX_WAIT_BITS)
  ) u_tlk (
    .clk, .reset,
    .int_data_in (h_out[T]), .int_dataready_in (h_out_ready[T]), .int_read_out (h_out_read[T]),
    .int_data_out (h_in[T]), .int_dataready_out (h_in_ready[T]), .int_read_in (h_in_read[T]),
    .tlk_clk, .tlk_txd_out, .tlk_tx_en_out, .tlk_tx_er_out,
    .tlk_rx_clk, .tlk_rxd_in, .tlk_rx_dv_in, .tlk_rx_er_in,
    .tlk_enable_out, .tlk_loopen_out, .tlk_prbsen_out, .sfp_los_in,
    .ctrl_resync_in (1'b0), .stat_op (t_op), .link_up (h_link[T]),
    .stat_resync_out (t_resync)
  );

  always_comb begin
    stat_parity_errors = '0;
    for (int i = 0; i < 2 * N_FEE + 2; i++)
      stat_parity_errors = stat_parity_errors + parity_err[i];
  end

endmodule
