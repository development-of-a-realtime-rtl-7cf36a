// trbnet_io_multiplexer: merges the channels onto one link and splits them
// again.
//
// Every channel has an init and a reply path, so there are 2*NCH internal
// ports; port index = 2*channel + path. Towards the medium, a priority
// arbiter picks the lowest-numbered port (highest-priority channel, init
// before reply) that offers a packet, with round-robin slots so that low
// priority channels are still served under load. The choice is held for
// the four words of one packet, so channels switch only between packets and
// a trigger waits at most one packet. The output goes through a secure
// buffer (one register stage).
// From the medium, the first word of each packet names its channel and path;
// that word and the next three are sent to the matching internal port.
// Packets for channels this node does not have (for example the link
// resynchronisation word 007F) are dropped. Input buffers must always
// accept data, so med_read_out is tied high and the demultiplexer output is
// one register stage with no back-pressure; a word an input buffer does not
// read is counted on lost_words.
// Behaviour follows the document; the register stage on the demultiplexer
// output and the RR_RATIO default are this design's choices.
module trbnet_io_multiplexer
  import trbnet_pkg::*;
#(
  parameter int NCH      = 4,
  parameter int RR_RATIO = 4
) (
  input  logic         clk,
  input  logic         reset,
  // medium side
  input  word_t        med_data_in,
  input  logic         med_dataready_in,
  output logic         med_read_out,
  output word_t        med_data_out,
  output logic         med_dataready_out,
  input  logic         med_read_in,
  // internal side, one port per channel and path
  output word_t        int_data_out      [2*NCH],
  output logic [2*NCH-1:0] int_dataready_out,
  input  logic [2*NCH-1:0] int_read_in,
  input  word_t        int_data_in       [2*NCH],
  input  logic [2*NCH-1:0] int_dataready_in,
  output logic [2*NCH-1:0] int_read_out,
  output logic [15:0]  lost_words,
  output logic [15:0]  rr_decisions
);
  localparam int NP = 2 * NCH;
  localparam int IW = $clog2(NP);

  // ------------------------------------------------------------ demux
  logic [IW-1:0] rx_target;
  logic          rx_valid;    // current packet goes to a real port
  logic [IW-1:0] cur_target;
  logic          cur_valid;
  word_t         rx_word;
  logic [NP-1:0] rx_ready;

  assign med_read_out = 1'b1;

  always_comb begin
    cur_target = rx_target;
    cur_valid  = rx_valid;
    if (med_data_in.num == 2'd0) begin
      cur_target = IW'({med_data_in.data[7:4], med_data_in.data[3]});
      cur_valid  = (int'(med_data_in.data[7:4]) < NCH);
    end
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      rx_target  <= '0;
      rx_valid   <= 1'b0;
      rx_ready   <= '0;
      rx_word    <= '0;
      lost_words <= '0;
    end else begin
      rx_ready <= '0;
      if (med_dataready_in) begin
        rx_target <= cur_target;
        rx_valid  <= cur_valid;
        rx_word   <= med_data_in;
        if (cur_valid) rx_ready[cur_target] <= 1'b1;
      end
      if (|(rx_ready & ~int_read_in)) lost_words <= lost_words + 1'b1;
    end
  end

  always_comb begin
    for (int i = 0; i < NP; i++) int_data_out[i] = rx_word;
    int_dataready_out = rx_ready;
  end

  // -------------------------------------------------------------- mux
  logic [NP-1:0] grant;
  logic          rr_slot;
  logic          locked;
  logic [IW-1:0] sel;
  logic [IW-1:0] cur;
  logic          sb_in_read;
  word_t         sb_in_data;
  logic          sb_in_ready;
  logic          take;
  logic          start;
  logic [17:0]   sb_out;

  always_comb begin
    cur = sel;
    if (!locked) begin
      cur = '0;
      for (int i = NP - 1; i >= 0; i--)
        if (grant[i]) cur = IW'(i);
    end
  end

  assign sb_in_data  = int_data_in[cur];
  assign sb_in_ready = int_dataready_in[cur] && (locked || (|grant));
  assign take        = sb_in_ready && sb_in_read;
  assign start       = take && !locked;

  always_comb begin
    int_read_out = '0;
    int_read_out[cur] = sb_in_read && (locked || (|grant));
  end

  trbnet_priority_arbiter #(.N(NP), .RR_RATIO(RR_RATIO)) u_arb (
    .clk, .reset,
    .req     (int_dataready_in & {NP{!locked}}),
    .advance (start),
    .grant,
    .rr_slot
  );

  always_ff @(posedge clk) begin
    if (reset) begin
      locked       <= 1'b0;
      sel          <= '0;
      rr_decisions <= '0;
    end else begin
      if (start && rr_slot) rr_decisions <= rr_decisions + 1'b1;
      if (take) begin
        if (sb_in_data.num == 2'd3) locked <= 1'b0;
        else begin
          locked <= 1'b1;
          sel    <= cur;
        end
      end
    end
  end

  trbnet_sbuf #(.WIDTH(18), .SECURE_MODE(2)) u_sbuf (
    .clk, .reset,
    .in_data       (sb_in_data),
    .in_dataready  (sb_in_ready),
    .in_read       (sb_in_read),
    .out_data      (sb_out),
    .out_dataready (med_dataready_out),
    .out_read      (med_read_in)
  );
  assign med_data_out = word_t'(sb_out);

endmodule
