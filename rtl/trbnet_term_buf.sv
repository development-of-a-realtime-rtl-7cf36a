// trbnet_term_buf: terminates a channel an endpoint does not use.
//
// Connected to the internal side of a channel's IOBuf in place of an API.
// Everything arriving on the init path is read and dropped; when an init
// termination has been read, a reply consisting only of a termination is
// sent back (error pattern zero, F3 = the init termination's F3, so the
// sequence number matches). Packets arriving on the reply path are dropped
// as well, and nothing is ever sent on the init path. This keeps the
// network from waiting for an answer that would never come.
// Ports: init_in_* from the IBuf of the init path, reply_out_* to the OBuf
// of the reply path, reply_in_* from the IBuf of the reply path.
// Behaviour follows the document's terminating buffer; copying F3 is this
// design's choice.
module trbnet_term_buf
  import trbnet_pkg::*;
#(
  parameter logic [3:0] CHANNEL = 4'd0
) (
  input  logic   clk,
  input  logic   reset,
  input  word_t  init_in,
  input  logic   init_in_dataready,
  output logic   init_in_read,
  output word_t  reply_out,
  output logic   reply_out_dataready,
  input  logic   reply_out_read,
  input  word_t  reply_in,
  input  logic   reply_in_dataready,
  output logic   reply_in_read,
  output logic [15:0] terminated
);
  logic        is_trm;     // current init packet is a termination
  logic        sending;
  logic [1:0]  idx;
  logic [15:0] f3;
  logic [63:0] trm;

  assign trm                 = {word0(CHANNEL, PATH_REPLY, TYPE_TRM), 32'd0, f3};
  assign init_in_read        = !sending;
  assign reply_in_read       = 1'b1;
  assign reply_out.num       = idx;
  assign reply_out.data      = trm[63 - 16*idx -: 16];
  assign reply_out_dataready = sending;

  always_ff @(posedge clk) begin
    if (reset) begin
      is_trm     <= 1'b0;
      sending    <= 1'b0;
      idx        <= '0;
      f3         <= '0;
      terminated <= '0;
    end else if (sending) begin
      if (reply_out_read) begin
        idx <= idx + 1'b1;
        if (idx == 2'd3) begin
          sending    <= 1'b0;
          terminated <= terminated + 1'b1;
        end
      end
    end else if (init_in_dataready) begin
      case (init_in.num)
        2'd0: is_trm <= init_in.data[2:0] == TYPE_TRM;
        2'd3: if (is_trm) begin
          f3      <= init_in.data;
          sending <= 1'b1;
          idx     <= '0;
        end
        default: ;
      endcase
    end
  end

endmodule
