// trbnet_med_tlk: optical link media interface for a TLK2501 transceiver.
//
// The TLK2501 serialises 16-bit words; this block drives its parallel side.
// Three clocks are involved: clk (FPGA logic), tlk_clk (transmit clock from
// the on-board oscillator, TXD is driven with it) and tlk_rx_clk (clock
// recovered by the transceiver, RXD is valid with it). One dual-clock FIFO
// per direction moves the words between the domains.
//  * Sending: words from the multiplexer go into the send FIFO; in the
//    tlk_clk domain a word is put on TXD with TX_EN high, otherwise TX_EN is
//    low and the chip sends idle characters.
//  * Receiving: words with RX_DV high and RX_ER low are written into the
//    receive FIFO and handed to the multiplexer (one cycle valid, no flow
//    control) with a packet word number from a counter.
//  * Start-up: while the optical receiver reports loss of signal
//    (sfp_los_in) or the chip reports receive errors, the link is down
//    (ERROR_NC) and both FIFOs are held clear. When valid data comes in, a
//    counter starts; after 2^RX_WAIT_BITS cycles (1.3 s at 100 MHz for 27
//    bits) receiving is enabled, after 2^TX_WAIT_BITS more the sender is
//    enabled and the link is up (ERROR_OK). Until then stat_op is
//    ERROR_WAIT.
//  * Resynchronisation: a rising edge of ctrl_resync_in sends 007F four
//    times. Four received 007F in a row, starting at a packet boundary,
//    clear the word counter and both FIFOs and pulse stat_resync_out. A
//    007F in the middle of a packet is ordinary data; as the first word of
//    a packet it would be the unused type 7.
// The clear signal crosses into the transceiver domains through two
// flip-flops; it is held for CLEAR_CYCLES system cycles.
// Start-up timing, FIFOs, 007F sequence and status codes follow the
// document; the receive-enable time's counter width uses 27 bits as the
// document states, the transmit delay 16 bits (650 us at 100 MHz). The
// FIFO depth and clear handling are this design's.
module trbnet_med_tlk
  import trbnet_pkg::*;
#(
  parameter int RX_WAIT_BITS = 27,
  parameter int TX_WAIT_BITS = 16,
  parameter int FIFO_AW      = 4,
  parameter int CLEAR_CYCLES = 8
) (
  input  logic        clk,
  input  logic        reset,
  // multiplexer side
  input  word_t       int_data_in,
  input  logic        int_dataready_in,
  output logic        int_read_out,
  output word_t       int_data_out,
  output logic        int_dataready_out,
  input  logic        int_read_in,
  // TLK2501 and optical transceiver
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
  // control and status
  input  logic        ctrl_resync_in,
  output logic [2:0]  stat_op,
  output logic        link_up,
  output logic        stat_resync_out
);
  localparam int CW = RX_WAIT_BITS + 1;

  assign tlk_enable_out = 1'b1;
  assign tlk_loopen_out = 1'b0;
  assign tlk_prbsen_out = 1'b0;
  assign tlk_tx_er_out  = 1'b0;

  // ------------------------------------------------- link state (clk)
  logic       rx_ok_rx;                // in tlk_rx_clk domain
  logic [2:0] ok_sync;
  logic [2:0] los_sync;
  logic       valid;
  logic [CW-1:0] cnt;
  logic       rx_en, tx_en;
  logic [7:0] clear_cnt;
  logic       clear_sys;
  logic       resync_seen;

  always_ff @(posedge tlk_rx_clk) begin
    if (reset) rx_ok_rx <= 1'b0;
    else       rx_ok_rx <= !tlk_rx_er_in;
  end

  assign valid     = ok_sync[1] && !los_sync[1];
  assign clear_sys = reset || !valid || clear_cnt != 8'd0;

  always_ff @(posedge clk) begin
    if (reset) begin
      ok_sync   <= '0;
      los_sync  <= '1;
      cnt       <= '0;
      rx_en     <= 1'b0;
      tx_en     <= 1'b0;
      clear_cnt <= '0;
      stat_op   <= ERROR_NC;
    end else begin
      ok_sync  <= {ok_sync[1:0], rx_ok_rx};
      los_sync <= {los_sync[1:0], sfp_los_in};
      if (clear_cnt != 8'd0) clear_cnt <= clear_cnt - 1'b1;
      if (resync_seen) clear_cnt <= 8'(CLEAR_CYCLES);
      if (!valid) begin
        cnt     <= '0;
        rx_en   <= 1'b0;
        tx_en   <= 1'b0;
        stat_op <= ERROR_NC;
      end else if (!rx_en) begin
        stat_op <= ERROR_WAIT;
        cnt     <= cnt + 1'b1;
        if (cnt[RX_WAIT_BITS]) begin
          rx_en <= 1'b1;
          cnt   <= '0;
        end
      end else if (!tx_en) begin
        cnt <= cnt + 1'b1;
        if (cnt[TX_WAIT_BITS]) tx_en <= 1'b1;
      end else begin
        stat_op <= ERROR_OK;
      end
    end
  end
  assign link_up = (stat_op == ERROR_OK);

  // clear into the transceiver clock domains
  logic [1:0] clr_tx, clr_rx;
  always_ff @(posedge tlk_clk)
    if (reset) clr_tx <= 2'b11; else clr_tx <= {clr_tx[0], clear_sys};
  always_ff @(posedge tlk_rx_clk)
    if (reset) clr_rx <= 2'b11; else clr_rx <= {clr_rx[0], clear_sys};

  // ------------------------------------------------------------ sender
  logic        txf_full, txf_empty, txf_wr;
  logic [15:0] txf_wdata, txf_rdata;
  logic        resync_d;
  logic [2:0]  resync_left;

  assign int_read_out = tx_en && !txf_full && resync_left == 3'd0 &&
                        !(ctrl_resync_in && !resync_d);

  always_comb begin
    txf_wr    = 1'b0;
    txf_wdata = int_data_in.data;
    if ((ctrl_resync_in && !resync_d) || resync_left != 3'd0) begin
      txf_wr    = !txf_full;
      txf_wdata = 16'h007F;
    end else if (int_read_out && int_dataready_in) begin
      txf_wr = 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      resync_d    <= 1'b0;
      resync_left <= '0;
    end else begin
      resync_d <= ctrl_resync_in;
      if (ctrl_resync_in && !resync_d) resync_left <= txf_full ? 3'd4 : 3'd3;
      else if (resync_left != 3'd0 && !txf_full) resync_left <= resync_left - 1'b1;
    end
  end

  trbnet_async_fifo #(.WIDTH(16), .AW(FIFO_AW)) u_txf (
    .wr_clk (clk),     .wr_reset (clear_sys), .wr_en (txf_wr), .wr_data (txf_wdata),
    .full   (txf_full),
    .rd_clk (tlk_clk), .rd_reset (clr_tx[1]), .rd_en (!txf_empty), .rd_data (txf_rdata),
    .empty  (txf_empty)
  );

  always_ff @(posedge tlk_clk) begin
    if (clr_tx[1]) begin
      tlk_txd_out   <= '0;
      tlk_tx_en_out <= 1'b0;
    end else begin
      tlk_txd_out   <= txf_empty ? 16'h0000 : txf_rdata;
      tlk_tx_en_out <= !txf_empty;
    end
  end

  // ---------------------------------------------------------- receiver
  logic        rxf_full, rxf_empty;
  logic [15:0] rxf_rdata;
  logic [1:0]  rx_num;
  logic [1:0]  resync_cnt;

  trbnet_async_fifo #(.WIDTH(16), .AW(FIFO_AW)) u_rxf (
    .wr_clk (tlk_rx_clk), .wr_reset (clr_rx[1]),
    .wr_en  (tlk_rx_dv_in && !tlk_rx_er_in), .wr_data (tlk_rxd_in),
    .full   (rxf_full),
    .rd_clk (clk), .rd_reset (clear_sys), .rd_en (!rxf_empty), .rd_data (rxf_rdata),
    .empty  (rxf_empty)
  );

  always_ff @(posedge clk) begin
    if (clear_sys && clear_cnt == 8'd0) begin
      rx_num            <= '0;
      resync_cnt        <= '0;
      int_data_out      <= '0;
      int_dataready_out <= 1'b0;
      stat_resync_out   <= 1'b0;
      resync_seen       <= 1'b0;
    end else begin
      int_dataready_out <= 1'b0;
      stat_resync_out   <= 1'b0;
      resync_seen       <= 1'b0;
      if (!rxf_empty && clear_cnt == 8'd0) begin
        if (rxf_rdata == 16'h007F && rx_num == 2'd0) begin
          resync_cnt <= resync_cnt + 1'b1;
          if (resync_cnt == 2'd3) begin
            rx_num          <= '0;
            resync_cnt      <= '0;
            stat_resync_out <= 1'b1;
            resync_seen     <= 1'b1;
          end
        end else begin
          resync_cnt <= '0;
          if (rx_en) begin
            int_data_out.data <= rxf_rdata;
            int_data_out.num  <= rx_num;
            int_dataready_out <= 1'b1;
            rx_num            <= rx_num + 1'b1;
          end
        end
      end
    end
  end

endmodule
