// trbnet_obuf: output buffer of one channel path.
//
// Passes packets from the API or hub logic towards the multiplexer and runs
// the sender half of the link handshake:
//  * Data is sent in buffers. After BUF-1 packets, or right after a
//    termination, the buffer inserts an EOB packet carrying the number of
//    packets in the buffer (F2) and their CRC-16 (F3). BUF is the receiver's
//    buffer size, learnt from the size code in its ACK packets.
//  * At most two buffers may be unacknowledged; with two outstanding, the
//    buffer stops taking data until an ACK arrives (ack_received, from the
//    input buffer of the same path). Before the first ACK the receiver's
//    size is unknown and nothing is sent. Size code 7 (endless buffer)
//    never blocks.
//  * When its own input buffer has emptied a buffer (send_ack), it sends an
//    ACK carrying its own buffer size code MY_DEPTH. When link_up rises it
//    forgets all outstanding buffers and sends one ACK so that the other
//    side learns the size.
// Generated packets are sent only between packets, ACK first. With
// USE_ACKNOWLEDGE off (the trigger channel) data passes freely and no EOB
// or ACK is made. Output through a secure buffer (1 cycle).
// Behaviour follows the document; ACK-before-EOB priority, the start-up ACK
// and the exact EOB moment are this design's choices.
module trbnet_obuf
  import trbnet_pkg::*;
#(
  parameter logic [3:0] CHANNEL         = 4'd0,
  parameter logic       PATH            = 1'b0,
  parameter logic [2:0] MY_DEPTH        = 3'd6,
  parameter bit         USE_ACKNOWLEDGE = 1'b1,
  parameter bit         USE_CHECKSUM    = 1'b1
) (
  input  logic        clk,
  input  logic        reset,
  input  logic        link_up,
  // from API or hub logic
  input  word_t       int_data_in,
  input  logic        int_dataready_in,
  output logic        int_read_out,
  // to the multiplexer
  output word_t       med_data_out,
  output logic        med_dataready_out,
  input  logic        med_read_in,
  // from the input buffer of the same path
  input  logic        ack_received,
  input  logic [2:0]  ack_bufcode,
  input  logic        send_ack,
  // status
  output logic [1:0]  outstanding,
  output logic        stalled,       // data waiting, blocked by the handshake
  output logic [15:0] eob_sent
);
  logic [2:0]  peer_code;
  logic [15:0] pk_cnt;
  logic [15:0] crc;
  logic [3:0]  ack_pend;
  logic        eob_pend;
  logic        gen_active;
  logic [1:0]  gen_idx;
  logic [63:0] gen_pkt;
  logic        in_packet;
  logic        link_up_d;
  logic [2:0]  cur_type;

  int unsigned peer_buf;
  assign peer_buf = buf_packets(peer_code);

  logic credit_ok;
  assign credit_ok = !USE_ACKNOWLEDGE ||
                     (peer_code == 3'd7) ||
                     (peer_code != 3'd0 && outstanding < 2'd2);

  logic  at_boundary, start_ack, start_eob, pass;
  word_t sb_in;
  logic  sb_in_ready, sb_in_read, take;
  logic [17:0] sb_out;

  assign at_boundary = !in_packet && !gen_active;
  assign start_ack   = at_boundary && ack_pend != 0;
  assign start_eob   = at_boundary && ack_pend == 0 && eob_pend;
  assign pass        = in_packet ||
                       (at_boundary && ack_pend == 0 && !eob_pend && credit_ok &&
                        int_dataready_in && int_data_in.num == 2'd0);
  assign stalled     = at_boundary && int_dataready_in && !credit_ok;

  always_comb begin
    sb_in       = int_data_in;
    sb_in_ready = pass && int_dataready_in;
    if (gen_active) begin
      sb_in.num   = gen_idx;
      sb_in.data  = gen_pkt[63 - 16*gen_idx -: 16];
      sb_in_ready = 1'b1;
    end
  end

  assign take         = sb_in_ready && sb_in_read;
  assign int_read_out = pass && sb_in_read;
  logic [2:0] gen_type_q;   // type of the data packet being passed
  assign cur_type     = (int_data_in.num == 2'd0) ? int_data_in.data[2:0] : gen_type_q;

  always_ff @(posedge clk) begin
    if (reset) begin
      peer_code   <= 3'd0;
      outstanding <= 2'd0;
      pk_cnt      <= '0;
      crc         <= '0;
      ack_pend    <= '0;
      eob_pend    <= 1'b0;
      gen_active  <= 1'b0;
      gen_idx     <= '0;
      gen_pkt     <= '0;
      in_packet   <= 1'b0;
      link_up_d   <= 1'b0;
      gen_type_q  <= '0;
      eob_sent    <= '0;
    end else begin
      logic [3:0] ack_next;
      logic [1:0] out_next;
      link_up_d <= link_up;
      ack_next = ack_pend;
      out_next = outstanding;
      if (USE_ACKNOWLEDGE && send_ack) ack_next = ack_next + 1'b1;
      if (USE_ACKNOWLEDGE && link_up && !link_up_d) ack_next = ack_next + 1'b1;
      if (ack_received) begin
        peer_code <= ack_bufcode;
        if (out_next != 0) out_next = out_next - 1'b1;
      end

      // start a generated packet
      if (start_ack) begin
        gen_active <= 1'b1;
        gen_idx    <= 2'd0;
        gen_pkt    <= {word0(CHANNEL, PATH, TYPE_ACK), 16'h0000, {13'd0, MY_DEPTH}, 16'h0000};
        ack_next   = ack_next - 1'b1;
      end else if (start_eob) begin
        gen_active <= 1'b1;
        gen_idx    <= 2'd0;
        gen_pkt    <= {word0(CHANNEL, PATH, TYPE_EOB), 16'h0000, pk_cnt,
                       USE_CHECKSUM ? crc : 16'h0000};
        eob_pend   <= 1'b0;
        pk_cnt     <= '0;
        crc        <= '0;
        out_next   = (peer_code == 3'd7) ? out_next : out_next + 1'b1;
        eob_sent   <= eob_sent + 1'b1;
      end

      if (take) begin
        if (gen_active) begin
          gen_idx <= gen_idx + 1'b1;
          if (gen_idx == 2'd3) gen_active <= 1'b0;
        end else begin
          if (int_data_in.num == 2'd0) gen_type_q <= int_data_in.data[2:0];
          if (USE_ACKNOWLEDGE) crc <= crc16_next(crc, int_data_in.data);
          in_packet <= (int_data_in.num != 2'd3);
          if (int_data_in.num == 2'd3 && USE_ACKNOWLEDGE) begin
            pk_cnt <= pk_cnt + 1'b1;
            if (cur_type == TYPE_TRM ||
                (peer_code != 3'd7 && int'(pk_cnt) + 2 >= int'(peer_buf)))
              eob_pend <= 1'b1;
          end
        end
      end

      if (USE_ACKNOWLEDGE && link_up && !link_up_d) out_next = 2'd0;
      ack_pend    <= ack_next;
      outstanding <= out_next;
    end
  end

  trbnet_sbuf #(.WIDTH(18), .SECURE_MODE(2)) u_sbuf (
    .clk, .reset,
    .in_data       (sb_in),
    .in_dataready  (sb_in_ready),
    .in_read       (sb_in_read),
    .out_data      (sb_out),
    .out_dataready (med_dataready_out),
    .out_read      (med_read_in)
  );
  assign med_data_out = word_t'(sb_out);

endmodule
