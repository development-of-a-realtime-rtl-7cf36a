// trbnet_ibuf: input buffer of one channel path.
//
// Words from the demultiplexer are gathered into 64-bit packets and stored
// in a packet FIFO big enough for two transmit buffers (depth from the 3-bit
// DEPTH code: 2, 4, 8, ... packets per buffer, 127 for code 6). It always
// accepts data; the sender's flow control guarantees room.
// Link-layer packets are handled here and never reach the consumer:
//  * ACK packets are not stored; they pulse ack_received with the buffer
//    size code from F2 for the output buffer of the same path.
//  * EOB packets are stored in order. When the consumer has read everything
//    before one, it is removed and eob_consumed pulses, which makes the
//    output buffer send an ACK: the sender may then fill the buffer again.
// The buffer recomputes the CRC-16 of every packet since the last EOB and
// counts them; an EOB with a different checksum or count sets bit 3
// (checksum error) or bit 2 (word missing) in the error pattern of the
// transfer's termination. Because the sender closes a buffer with an EOB
// right after a termination, a termination is held back until its EOB has
// arrived and been checked (only when USE_ACKNOWLEDGE is set). Errors found
// in earlier buffers of the same transfer are remembered and added to its
// termination as well.
// Output: a word port (data, packet number, dataready, read) through a
// secure buffer. Latency from the last word of a packet to its first word
// on the output: 2 cycles with SECURE_MODE 2.
// Behaviour follows the document; packet-wide FIFO entries, the held
// termination and the count check are this design's implementation.
module trbnet_ibuf
  import trbnet_pkg::*;
#(
  parameter logic [2:0] DEPTH           = 3'd6,
  parameter bit         USE_ACKNOWLEDGE = 1'b1,
  parameter bit         USE_CHECKSUM    = 1'b1,
  parameter int         SECURE_MODE     = 2
) (
  input  logic        clk,
  input  logic        reset,
  // from the demultiplexer
  input  word_t       med_data_in,
  input  logic        med_dataready_in,
  output logic        med_read_out,
  // to API or hub logic
  output word_t       int_data_out,
  output logic        int_dataready_out,
  input  logic        int_read_in,
  // to the output buffer of the same path
  output logic        ack_received,
  output logic [2:0]  ack_bufcode,
  output logic        eob_consumed,
  // status
  output logic [15:0] crc_errors,
  output logic        overflow
);
  localparam int FP = fifo_packets(DEPTH);

  // ------------------------------------------------------------ write side
  logic [47:0]  pk;          // words 0..2 of the packet being received
  logic [2:0]   rx_type;
  logic [15:0]  crc;
  logic [15:0]  pk_count;
  logic [63:0]  held_trm;
  logic         held_valid;
  logic [63:0]  eob_store;
  logic         eob_pending;
  logic         wr_en;
  logic [63:0]  wr_data;
  logic [63:0]  pkt;
  logic         pkt_done;
  logic [2:0]   cur_type;
  logic         counts;      // this word is covered by the checksum
  logic         sticky_crc;     // errors of earlier buffers of this transfer
  logic         sticky_missing;

  assign med_read_out = 1'b1;
  assign pkt      = {pk, med_data_in.data};
  assign pkt_done = med_dataready_in && med_data_in.num == 2'd3;
  assign cur_type = (med_data_in.num == 2'd0) ? med_data_in.data[2:0] : rx_type;
  assign counts   = med_dataready_in && cur_type != TYPE_EOB && cur_type != TYPE_ACK;

  trbnet_crc16 u_crc (
    .clk, .reset,
    .clear   (pkt_done && cur_type == TYPE_EOB),
    .enable  (counts),
    .data_in (med_data_in.data),
    .crc
  );

  always_comb begin
    wr_en   = 1'b0;
    wr_data = pkt;
    if (eob_pending) begin
      wr_en   = 1'b1;
      wr_data = eob_store;
    end else if (pkt_done) begin
      case (cur_type)
        TYPE_ACK: wr_en = 1'b0;
        TYPE_EOB: begin
          wr_en = 1'b1;
          if (held_valid) begin
            wr_data = held_trm;
            if ((USE_CHECKSUM && pkt[15:0] != crc) || sticky_crc)
              wr_data[16+ERR_CHECKSUM] = 1'b1;
            if (pkt[31:16] != pk_count || sticky_missing)
              wr_data[16+ERR_WORD_MISSING] = 1'b1;
          end
        end
        TYPE_TRM: wr_en = !USE_ACKNOWLEDGE;
        default:  wr_en = 1'b1;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      pk           <= '0;
      rx_type      <= '0;
      pk_count     <= '0;
      held_trm     <= '0;
      held_valid   <= 1'b0;
      eob_store    <= '0;
      eob_pending  <= 1'b0;
      ack_received <= 1'b0;
      ack_bufcode  <= '0;
      crc_errors   <= '0;
      sticky_crc     <= 1'b0;
      sticky_missing <= 1'b0;
    end else begin
      ack_received <= 1'b0;
      eob_pending  <= 1'b0;
      if (med_dataready_in) begin
        case (med_data_in.num)
          2'd0: begin pk[47:32] <= med_data_in.data; rx_type <= med_data_in.data[2:0]; end
          2'd1: pk[31:16] <= med_data_in.data;
          2'd2: pk[15:0]  <= med_data_in.data;
          default: ;
        endcase
      end
      if (pkt_done) begin
        case (cur_type)
          TYPE_ACK: begin
            ack_received <= 1'b1;
            ack_bufcode  <= pkt[18:16];
          end
          TYPE_EOB: begin
            pk_count <= '0;
            if (USE_CHECKSUM && pkt[15:0] != crc) begin
              crc_errors <= crc_errors + 1'b1;
              if (!held_valid) sticky_crc <= 1'b1;
            end
            if (pkt[31:16] != pk_count && !held_valid) sticky_missing <= 1'b1;
            if (held_valid) begin
              sticky_crc     <= 1'b0;
              sticky_missing <= 1'b0;
              held_valid  <= 1'b0;
              eob_store   <= pkt;
              eob_pending <= 1'b1;
            end
          end
          TYPE_TRM: begin
            pk_count <= pk_count + 1'b1;
            if (USE_ACKNOWLEDGE) begin
              held_trm   <= pkt;
              held_valid <= 1'b1;
            end
          end
          default: pk_count <= pk_count + 1'b1;
        endcase
      end
    end
  end

  // ------------------------------------------------------------- the FIFO
  logic [63:0] head;
  logic        f_empty, f_full, f_rd;
  logic [$clog2(FP):0] f_count;

  trbnet_fifo #(.WIDTH(64), .DEPTH(FP)) u_fifo (
    .clk, .reset,
    .wr_en, .wr_data,
    .rd_en    (f_rd),
    .rd_data  (head),
    .empty    (f_empty),
    .full     (f_full),
    .count    (f_count),
    .overflow
  );

  // ------------------------------------------------------------- read side
  logic [1:0] rd_idx;
  logic       head_is_eob;
  word_t      o_word;
  logic       o_ready, o_read;
  logic [17:0] sb_out;

  assign head_is_eob = !f_empty && head[50:48] == TYPE_EOB;
  assign o_word.num  = rd_idx;
  assign o_word.data = head[63 - 16*rd_idx -: 16];
  assign o_ready     = !f_empty && !head_is_eob;
  assign f_rd        = head_is_eob || (o_ready && o_read && rd_idx == 2'd3);

  always_ff @(posedge clk) begin
    if (reset) begin
      rd_idx       <= '0;
      eob_consumed <= 1'b0;
    end else begin
      eob_consumed <= head_is_eob && USE_ACKNOWLEDGE;
      if (o_ready && o_read) rd_idx <= rd_idx + 1'b1;
    end
  end

  trbnet_sbuf #(.WIDTH(18), .SECURE_MODE(SECURE_MODE)) u_sbuf (
    .clk, .reset,
    .in_data       (o_word),
    .in_dataready  (o_ready),
    .in_read       (o_read),
    .out_data      (sb_out),
    .out_dataready (int_dataready_out),
    .out_read      (int_read_in)
  );
  assign int_data_out = word_t'(sb_out);

endmodule
