// trbnet_med_lvds: slow parallel LVDS media interface.
//
// Sends the 16-bit words of the multiplexer over an 8-bit parallel link
// (high byte first) with the control lines CARRIER (byte valid), PARITY
// (even: parity bit = XOR of the data bits), FIRST (high byte of packet
// word 0) and the transfer clock. The transfer clock is the system clock
// divided by CLK_DIV (25 MHz at 100 MHz, one byte per period: 200 Mbit/s);
// the sender changes the lines on its falling edge. The receiver works with
// oversampling: all inputs pass two flip-flops in the system clock domain
// and the lines are sampled when a rising edge of the synchronised transfer
// clock is seen. No clock of the far side is used directly, so both ends
// may run from their own 100 MHz oscillators.
// The receiver numbers the words itself: FIRST sets the word counter to 0,
// so a lost word only damages one packet. A byte with bad parity is dropped
// and counted. Four consecutive words 007F, each sent with FIRST set, are
// the resynchronisation sequence: the word counter is cleared and
// stat_resync_out pulses. A 007F with FIRST would be a packet of the
// unused type 7, so packet contents can never be taken for it, while a
// data word 007F (FIRST low) passes untouched. A rising edge of
// ctrl_resync_in sends that sequence.
// There is no flow control on the link (READY is used on fast links only):
// received words are offered on int_data_out for one cycle; the connected
// multiplexer always reads. int_read_out is high when the next word can be
// sent.
// Link state (stat_op, table of media states): ERROR_NC while no transfer
// clock edge has been seen for NC_TIMEOUT cycles, ERROR_WAIT for
// WAIT_CYCLES after edges appear, then ERROR_OK; link_up = (stat_op == OK).
// Line set, parity, first-word flag, slow oversampling mode, 200 Mbit/s
// and the 007F sequence follow the document; byte order, clock phases,
// dropping of bad bytes, marking resync words with FIRST and the timeouts
// are this design's.
module trbnet_med_lvds
  import trbnet_pkg::*;
#(
  parameter int CLK_DIV     = 4,
  parameter int NC_TIMEOUT  = 64,
  parameter int WAIT_CYCLES = 256
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
  // link
  output logic [7:0]  lvds_data_out,
  output logic        lvds_carrier_out,
  output logic        lvds_parity_out,
  output logic        lvds_first_out,
  output logic        lvds_clk_out,
  input  logic [7:0]  lvds_data_in,
  input  logic        lvds_carrier_in,
  input  logic        lvds_parity_in,
  input  logic        lvds_first_in,
  input  logic        lvds_clk_in,
  // control and status
  input  logic        ctrl_resync_in,
  output logic [2:0]  stat_op,
  output logic        link_up,
  output logic        stat_resync_out,
  output logic [15:0] stat_parity_errors
);
  localparam int DW = (CLK_DIV > 1) ? $clog2(CLK_DIV) : 1;

  // ------------------------------------------------------------ sender
  logic [DW-1:0] phase;
  logic          byte_hi_next;      // next byte slot is the low byte
  logic [15:0]   tx_word;
  logic          tx_first;
  logic          tx_busy;           // a word is being sent
  logic [2:0]    resync_left;
  logic          resync_d;

  // a new word is taken when the high byte slot starts and nothing is due
  logic slot;
  assign slot         = (phase == DW'(0));
  assign int_read_out = slot && !byte_hi_next && resync_left == 3'd0 &&
                        !(ctrl_resync_in && !resync_d);

  always_ff @(posedge clk) begin
    if (reset) begin
      phase            <= '0;
      byte_hi_next     <= 1'b0;
      tx_word          <= '0;
      tx_first         <= 1'b0;
      tx_busy          <= 1'b0;
      resync_left      <= '0;
      resync_d         <= 1'b0;
      lvds_data_out    <= '0;
      lvds_carrier_out <= 1'b0;
      lvds_parity_out  <= 1'b0;
      lvds_first_out   <= 1'b0;
      lvds_clk_out     <= 1'b0;
    end else begin
      resync_d <= ctrl_resync_in;
      phase    <= (int'(phase) == CLK_DIV - 1) ? '0 : phase + 1'b1;
      if (int'(phase) == CLK_DIV / 2) lvds_clk_out <= 1'b1;
      if (slot) begin
        lvds_clk_out <= 1'b0;
        if (byte_hi_next) begin
          // second half of the current word
          lvds_data_out    <= tx_word[7:0];
          lvds_parity_out  <= ^tx_word[7:0];
          lvds_carrier_out <= 1'b1;
          lvds_first_out   <= 1'b0;
          byte_hi_next     <= 1'b0;
        end else begin
          logic [15:0] w;
          logic        f, v;
          v = 1'b0; w = '0; f = 1'b0;
          if (ctrl_resync_in && !resync_d) begin
            v = 1'b1; w = 16'h007F; f = 1'b1; resync_left <= 3'd3;
          end else if (resync_left != 3'd0) begin
            v = 1'b1; w = 16'h007F; f = 1'b1; resync_left <= resync_left - 1'b1;
          end else if (int_dataready_in) begin
            v = 1'b1; w = int_data_in.data; f = (int_data_in.num == 2'd0);
          end
          tx_word          <= w;
          tx_first         <= f;
          tx_busy          <= v;
          byte_hi_next     <= v;
          lvds_data_out    <= w[15:8];
          lvds_parity_out  <= ^w[15:8];
          lvds_carrier_out <= v;
          lvds_first_out   <= f;
        end
      end
    end
  end

  // ---------------------------------------------------------- receiver
  logic [7:0] s1_data, s2_data;
  logic [3:0] s1_ctl, s2_ctl;        // {clk, carrier, parity, first}
  logic       clk_prev;
  logic       got_hi, hi_first, hi_bad;
  logic [7:0] hi_byte;
  logic [1:0] rx_num;
  logic [1:0] resync_cnt;
  logic [15:0] idle_cnt;
  logic [15:0] wait_cnt;

  logic edge_seen;
  assign edge_seen = s2_ctl[3] && !clk_prev;

  always_ff @(posedge clk) begin
    if (reset) begin
      s1_data <= '0; s2_data <= '0; s1_ctl <= '0; s2_ctl <= '0;
      clk_prev           <= 1'b0;
      got_hi             <= 1'b0;
      hi_first           <= 1'b0;
      hi_bad             <= 1'b0;
      hi_byte            <= '0;
      rx_num             <= '0;
      resync_cnt         <= '0;
      int_data_out       <= '0;
      int_dataready_out  <= 1'b0;
      stat_resync_out    <= 1'b0;
      stat_parity_errors <= '0;
      idle_cnt           <= '0;
      wait_cnt           <= '0;
      stat_op            <= ERROR_NC;
    end else begin
      s1_data <= lvds_data_in;
      s1_ctl  <= {lvds_clk_in, lvds_carrier_in, lvds_parity_in, lvds_first_in};
      s2_data <= s1_data;
      s2_ctl  <= s1_ctl;
      clk_prev <= s2_ctl[3];
      int_dataready_out <= 1'b0;
      stat_resync_out   <= 1'b0;

      // link state
      if (edge_seen) idle_cnt <= '0;
      else if (int'(idle_cnt) < NC_TIMEOUT) idle_cnt <= idle_cnt + 1'b1;
      if (int'(idle_cnt) >= NC_TIMEOUT) begin
        stat_op  <= ERROR_NC;
        wait_cnt <= '0;
      end else if (int'(wait_cnt) < WAIT_CYCLES) begin
        stat_op  <= ERROR_WAIT;
        wait_cnt <= wait_cnt + 1'b1;
      end else begin
        stat_op <= ERROR_OK;
      end

      if (edge_seen) begin
        logic bad;
        bad = (^s2_data) != s2_ctl[1];
        if (!s2_ctl[2]) begin
          got_hi <= 1'b0;
        end else if (!got_hi || s2_ctl[0]) begin
          // high byte (a FIRST flag always starts a new word)
          got_hi   <= 1'b1;
          hi_byte  <= s2_data;
          hi_first <= s2_ctl[0];
          hi_bad   <= bad;
          if (bad) stat_parity_errors <= stat_parity_errors + 1'b1;
        end else begin
          logic [15:0] w;
          logic [1:0]  n;
          got_hi <= 1'b0;
          w = {hi_byte, s2_data};
          n = hi_first ? 2'd0 : rx_num;
          if (bad) stat_parity_errors <= stat_parity_errors + 1'b1;
          if (w == 16'h007F && hi_first) begin
            resync_cnt <= resync_cnt + 1'b1;
            if (resync_cnt == 2'd3) begin
              rx_num          <= '0;
              stat_resync_out <= 1'b1;
              resync_cnt      <= '0;
            end
          end else begin
            resync_cnt <= '0;
            if (!bad && !hi_bad) begin
              int_data_out.data <= w;
              int_data_out.num  <= n;
              int_dataready_out <= 1'b1;
            end
            rx_num <= n + 1'b1;
          end
        end
      end
    end
  end
  assign link_up = (stat_op == ERROR_OK);

endmodule
