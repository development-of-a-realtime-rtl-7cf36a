// trbnet_api: application interface of one channel.
//
// Hides the protocol from the application. To the application it looks
// like two FIFOs plus a few control lines:
//  * Sending: the application writes the three data words of each packet
//    (packet numbers 1, 2, 3) into the send FIFO and raises send. The API
//    then sends a header (F1 own address, F2 target address, F3 sequence
//    number and data type), one DAT packet per three words in the FIFO,
//    and, once send is low again and the FIFO is empty, a termination
//    carrying the error pattern. With short_transfer set when send rises
//    only the termination is sent.
//  * Receiving: packets of the incoming path are written into the receive
//    FIFO as their three data words, with the packet type on typ_out.
// API_TYPE selects the role:
//  * active (1): may start a transfer on the init path whenever the channel
//    is free, then locks it (run_out high) until the whole reply, including
//    its termination, has been read by the application. Header, data and
//    termination packets of the reply are all handed on, so the application
//    sees the source of every merged reply part. The sequence number counts
//    up after each finished session.
//  * passive (0): receives on the init path. The header is checked: a
//    target equal to my_address_in, FFFF, or another broadcast FFxx whose
//    cleared bits are all marked "don't care" in BROADCAST_BITMASK is
//    accepted, and so is a short transfer (no header). Accepted data and the
//    termination go to the application, which must answer with send;
//    the reply carries bit 0 (endpoint reached) in its error pattern, the
//    original sequence number and data type. A transfer for another
//    address is dropped and answered automatically with a bare termination.
//    The header itself is not handed on; its data type and sequence number
//    are shown on dtype_out and seqnr_out.
// Network side: int_* word ports to the output buffer (sending path) and
// from the input buffer (receiving path). Sent words go through a secure
// buffer, one cycle. Behaviour follows the document; the F3 layout, the
// broadcast rule's exact form and start-on-rising-edge of send are this
// design's reading of it.
module trbnet_api
  import trbnet_pkg::*;
#(
  parameter logic [3:0] CHANNEL           = 4'd0,
  parameter bit         API_TYPE          = 1'b0,   // 1 active, 0 passive
  parameter logic [2:0] FIFO_TO_INT_DEPTH = 3'd6,
  parameter logic [2:0] FIFO_TO_APL_DEPTH = 3'd6,
  parameter logic [7:0] BROADCAST_BITMASK = 8'hFF
) (
  input  logic        clk,
  input  logic        reset,
  // application: transmitter
  input  logic [15:0] apl_data_in,
  input  logic [1:0]  apl_packet_num_in,
  input  logic        apl_dataready_in,
  output logic        apl_read_out,
  input  logic        apl_short_transfer_in,
  input  logic        apl_send_in,
  input  logic [3:0]  apl_dtype_in,
  input  logic [31:0] apl_error_pattern_in,
  input  logic [15:0] apl_target_address_in,
  // application: receiver
  output logic [15:0] apl_data_out,
  output logic [1:0]  apl_packet_num_out,
  output logic [2:0]  apl_typ_out,
  output logic        apl_dataready_out,
  input  logic        apl_read_in,
  output logic        apl_run_out,
  output logic [7:0]  apl_seqnr_out,
  output logic [3:0]  apl_dtype_out,
  input  logic [15:0] my_address_in,
  // network: to the output buffer of the sending path
  output word_t       int_data_out,
  output logic        int_dataready_out,
  input  logic        int_read_in,
  // network: from the input buffer of the receiving path
  input  word_t       int_data_in,
  input  logic        int_dataready_in,
  output logic        int_read_out,
  // status
  output logic [15:0] dropped_transfers
);
  localparam logic SEND_PATH = API_TYPE ? PATH_INIT : PATH_REPLY;
  localparam int   TI_WORDS  = 4 * fifo_packets(FIFO_TO_INT_DEPTH);
  localparam int   TA_WORDS  = 4 * fifo_packets(FIFO_TO_APL_DEPTH);

  typedef enum logic [2:0] {TX_IDLE, TX_HDR, TX_DATA, TX_TRM, TX_WAIT} tx_state_e;
  tx_state_e tx_state;

  // --------------------------------------------------------- send FIFO
  logic [15:0] ti_head;
  logic        ti_empty, ti_full, ti_rd, ti_ovf;
  logic [$clog2(TI_WORDS):0] ti_count;

  assign apl_read_out = !ti_full;

  trbnet_fifo #(.WIDTH(16), .DEPTH(TI_WORDS)) u_to_int (
    .clk, .reset,
    .wr_en   (apl_dataready_in && !ti_full),
    .wr_data (apl_data_in),
    .rd_en   (ti_rd),
    .rd_data (ti_head),
    .empty   (ti_empty),
    .full    (ti_full),
    .count   (ti_count),
    .overflow(ti_ovf)
  );

  // ------------------------------------------------------ receive FIFO
  logic [20:0] ta_head, ta_wdata;
  logic        ta_empty, ta_full, ta_wr, ta_ovf;
  logic [$clog2(TA_WORDS):0] ta_count;

  trbnet_fifo #(.WIDTH(21), .DEPTH(TA_WORDS)) u_to_apl (
    .clk, .reset,
    .wr_en   (ta_wr),
    .wr_data (ta_wdata),
    .rd_en   (apl_read_in),
    .rd_data (ta_head),
    .empty   (ta_empty),
    .full    (ta_full),
    .count   (ta_count),
    .overflow(ta_ovf)
  );

  assign apl_typ_out        = ta_head[20:18];
  assign apl_packet_num_out = ta_head[17:16];
  assign apl_data_out       = ta_head[15:0];
  assign apl_dataready_out  = !ta_empty;

  // -------------------------------------------------------- receive side
  logic [2:0]  rx_type;
  logic        rx_got_hdr;
  logic        rx_addressed;
  logic [15:0] rx_source;
  logic [7:0]  rx_seqnr;
  logic [3:0]  rx_dtype;
  logic        reply_allowed;   // passive: init transfer complete, addressed
  logic        auto_reply;      // passive: answer a foreign transfer
  logic [2:0]  cur_rx_type;
  logic        rx_take;
  logic        keep;
  logic        target_match;

  assign int_read_out = !ta_full && (!API_TYPE || tx_state == TX_WAIT);
  assign rx_take      = int_dataready_in && int_read_out;
  assign cur_rx_type  = (int_data_in.num == 2'd0) ? int_data_in.data[2:0] : rx_type;

  always_comb begin
    logic [15:0] t;
    t = int_data_in.data;
    target_match = (t == my_address_in) || (t == BROADCAST_ALL) ||
                   (t[15:8] == 8'hFF && ((t[7:0] | BROADCAST_BITMASK) == 8'hFF));
  end

  always_comb begin
    if (API_TYPE) keep = 1'b1;
    else case (cur_rx_type)
      TYPE_DAT: keep = rx_addressed;
      TYPE_TRM: keep = rx_addressed || !rx_got_hdr;
      default:  keep = 1'b0;
    endcase
  end

  assign ta_wr    = rx_take && int_data_in.num != 2'd0 && keep;
  assign ta_wdata = {cur_rx_type, int_data_in.num, int_data_in.data};

  // -------------------------------------------------------- send side
  logic [1:0]  widx;
  logic        send_d;
  logic        start;
  logic [3:0]  dtype_q;
  logic [15:0] target_q;
  logic [31:0] err_q;
  logic [7:0]  seqnr;
  word_t       tx_word;
  logic        tx_valid, tx_read, tx_take;
  logic [17:0] sb_out;
  logic        session_done;    // active: last reply word read by application

  // active: a rising edge of send opens a session; passive: send high
  // while an answer is due starts the reply
  assign start = apl_send_in && tx_state == TX_IDLE &&
                 (API_TYPE ? (!send_d && !apl_run_out) : reply_allowed);

  assign session_done = API_TYPE && tx_state == TX_WAIT && apl_read_in && !ta_empty &&
                        ta_head[20:18] == TYPE_TRM && ta_head[17:16] == 2'd3;

  always_comb begin
    logic [63:0] p;
    logic [7:0]  sq;
    logic [3:0]  dt;
    sq = API_TYPE ? seqnr : rx_seqnr;
    dt = API_TYPE ? dtype_q : rx_dtype;
    tx_valid = 1'b0;
    ti_rd    = 1'b0;
    p        = '0;
    case (tx_state)
      TX_HDR: begin
        p = {word0(CHANNEL, SEND_PATH, TYPE_HDR), my_address_in,
             API_TYPE ? target_q : rx_source, f3_seq(sq, dt)};
        tx_valid = 1'b1;
      end
      TX_TRM: begin
        p = {word0(CHANNEL, SEND_PATH, TYPE_TRM), err_q, f3_seq(sq, dt)};
        tx_valid = 1'b1;
      end
      default: ;
    endcase
    tx_word.num  = widx;
    tx_word.data = p[63 - 16*widx -: 16];
    if (tx_state == TX_DATA) begin
      if (widx == 2'd0) begin
        tx_word.data = word0(CHANNEL, SEND_PATH, TYPE_DAT);
        tx_valid     = ti_count >= 3;
      end else begin
        tx_word.data = ti_head;
        tx_valid     = !ti_empty;
        ti_rd        = tx_read;
      end
    end
  end

  assign tx_take = tx_valid && tx_read;

  always_ff @(posedge clk) begin
    if (reset) begin
      tx_state      <= TX_IDLE;
      widx          <= '0;
      send_d        <= 1'b0;
      dtype_q       <= '0;
      target_q      <= '0;
      err_q         <= '0;
      seqnr         <= '0;
      apl_run_out   <= 1'b0;
      rx_type       <= '0;
      rx_got_hdr    <= 1'b0;
      rx_addressed  <= 1'b0;
      rx_source     <= 16'hFFFF;
      rx_seqnr      <= '0;
      rx_dtype      <= '0;
      reply_allowed <= 1'b0;
      auto_reply    <= 1'b0;
      dropped_transfers <= '0;
    end else begin
      send_d <= apl_send_in;

      // ---------------- receive
      if (rx_take) begin
        if (int_data_in.num == 2'd0) rx_type <= int_data_in.data[2:0];
        if (!API_TYPE) begin
          if (cur_rx_type == TYPE_HDR) begin
            rx_got_hdr <= 1'b1;
            case (int_data_in.num)
              2'd1: rx_source    <= int_data_in.data;
              2'd2: rx_addressed <= target_match;
              2'd3: begin
                rx_seqnr <= int_data_in.data[11:4];
                rx_dtype <= int_data_in.data[3:0];
              end
              default: ;
            endcase
          end
          if (cur_rx_type == TYPE_TRM && int_data_in.num == 2'd3) begin
            if (!rx_got_hdr) begin
              rx_seqnr     <= int_data_in.data[11:4];
              rx_dtype     <= int_data_in.data[3:0];
              rx_source    <= 16'hFFFF;
            end
            if (rx_addressed || !rx_got_hdr) reply_allowed <= 1'b1;
            else begin
              auto_reply        <= 1'b1;
              dropped_transfers <= dropped_transfers + 1'b1;
            end
            rx_got_hdr <= 1'b0;
          end
        end
      end

      // ---------------- run flag
      if (API_TYPE) begin
        if (start) apl_run_out <= 1'b1;
      end else begin
        if (rx_take) apl_run_out <= 1'b1;
      end

      // ---------------- send
      if (start) begin
        dtype_q  <= apl_dtype_in;
        target_q <= apl_target_address_in;
        widx     <= '0;
        tx_state <= apl_short_transfer_in ? TX_TRM : TX_HDR;
        err_q    <= apl_error_pattern_in |
                    (API_TYPE ? 32'd0 : (32'd1 << ERR_ENDPOINT_REACHED));
      end else if (tx_state == TX_IDLE && auto_reply) begin
        auto_reply <= 1'b0;
        widx       <= '0;
        err_q      <= '0;
        tx_state   <= TX_TRM;
      end

      if (tx_state == TX_DATA && widx == 2'd0 && !(ti_count >= 3) &&
          !apl_send_in && ti_empty) begin
        tx_state <= TX_TRM;
        err_q    <= apl_error_pattern_in |
                    (API_TYPE ? 32'd0 : (32'd1 << ERR_ENDPOINT_REACHED));
      end

      if (tx_take) begin
        widx <= widx + 1'b1;
        if (widx == 2'd3) begin
          case (tx_state)
            TX_HDR:  tx_state <= TX_DATA;
            TX_TRM: begin
              if (API_TYPE) tx_state <= TX_WAIT;
              else begin
                tx_state      <= TX_IDLE;
                reply_allowed <= 1'b0;
                rx_addressed  <= 1'b0;
                          apl_run_out   <= 1'b0;
              end
            end
            default: ;
          endcase
        end
      end

      if (session_done) begin
        tx_state    <= TX_IDLE;
        apl_run_out <= 1'b0;
        seqnr       <= seqnr + 1'b1;
      end
    end
  end

  assign apl_seqnr_out = API_TYPE ? seqnr : rx_seqnr;
  assign apl_dtype_out = API_TYPE ? dtype_q : rx_dtype;

  trbnet_sbuf #(.WIDTH(18), .SECURE_MODE(2)) u_sbuf (
    .clk, .reset,
    .in_data       (tx_word),
    .in_dataready  (tx_valid),
    .in_read       (tx_read),
    .out_data      (sb_out),
    .out_dataready (int_dataready_out),
    .out_read      (int_read_in)
  );
  assign int_data_out = word_t'(sb_out);

endmodule
