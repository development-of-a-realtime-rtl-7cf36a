// trbnet_addresses: network address assignment by unique ID.
//
// Every node is identified before it has an address by a 72-bit unique ID:
// 64 bits from the board's temperature sensor (uid_in) plus an 8-bit
// ENDPOINT_ID that tells apart several endpoints on one board. A central
// address master sends network administration commands (data type F) as a
// broadcast; this block decodes them from the packets the register
// interface hands on (pkt_in = F1,F2,F3 of one packet, pkt_valid) and
// prepares the answer packets:
//   READUID        1 packet: F1 {READUID, xx}
//     answer       2 packets: {UID, endpoint id}, uid[63:32] /
//                             uid[31:0], board info
//   SETADDR        2 packets: {SETADDR, endpoint id}, uid[63:32] /
//                             uid[31:0], new address
//     answer       if ID and endpoint id match: my_address takes the new
//                  address; 1 packet {ACKADDR, endpoint id}, board info, 0.
//                  Otherwise no answer.
// The commands and the 72-bit ID follow the document; command codes, field
// order and the 16-bit board info field are this design's, since the
// document's table of them is only partly legible.
// start clears the packet counter at the beginning of each transfer.
// reply_pkts/reply_count are valid from the cycle after the last command
// packet until the next start.
module trbnet_addresses
  import trbnet_pkg::*;
#(
  parameter logic [15:0] INIT_ADDRESS = 16'hFFFF,
  parameter logic [7:0]  ENDPOINT_ID  = 8'h00,
  parameter logic [15:0] BOARD_INFO   = 16'h0000
) (
  input  logic        clk,
  input  logic        reset,
  input  logic [63:0] uid_in,
  input  logic        start,
  input  logic [47:0] pkt_in,
  input  logic        pkt_valid,
  output logic [15:0] my_address,
  output logic [47:0] reply_pkts [2],
  output logic [1:0]  reply_count,
  output logic        unknown_cmd
);
  logic       second;     // next packet is the second of a SETADDR
  logic [7:0] cmd;
  logic [7:0] eid;
  logic [31:0] uid_hi;

  always_ff @(posedge clk) begin
    if (reset) begin
      my_address  <= INIT_ADDRESS;
      second      <= 1'b0;
      cmd         <= '0;
      eid         <= '0;
      uid_hi      <= '0;
      reply_count <= '0;
      unknown_cmd <= 1'b0;
      reply_pkts[0] <= '0;
      reply_pkts[1] <= '0;
    end else begin
      if (start) begin
        second      <= 1'b0;
        reply_count <= '0;
        unknown_cmd <= 1'b0;
      end else if (pkt_valid) begin
        if (!second) begin
          cmd    <= pkt_in[47:40];
          eid    <= pkt_in[39:32];
          uid_hi <= pkt_in[31:0];
          case (pkt_in[47:40])
            CMD_READUID: begin
              reply_pkts[0] <= {CMD_UID, ENDPOINT_ID, uid_in[63:32]};
              reply_pkts[1] <= {uid_in[31:0], BOARD_INFO};
              reply_count   <= 2'd2;
            end
            CMD_SETADDR: second <= 1'b1;
            default: unknown_cmd <= 1'b1;
          endcase
        end else begin
          second <= 1'b0;
          if (cmd == CMD_SETADDR && eid == ENDPOINT_ID &&
              {uid_hi, pkt_in[47:16]} == uid_in) begin
            my_address    <= pkt_in[15:0];
            reply_pkts[0] <= {CMD_ACKADDR, ENDPOINT_ID, BOARD_INFO, 16'h0000};
            reply_count   <= 2'd1;
          end
        end
      end
    end
  end

endmodule
