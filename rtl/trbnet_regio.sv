// trbnet_regio: register access through the slow control channel.
//
// Sits behind a passive API (normally channel 3) as its application and
// answers register requests:
//   data type 8  read        each packet F1 = address; answer one packet
//                            F1 = address, F2/F3 = data bits 31..16/15..0
//   data type 9  write       each packet F1 = address, F2/F3 = data
//   data type A  read mult.  F1 = address, F3 = count; answered by count
//                            packets read from the same address (a FIFO
//                            behind the data port, for example)
//   data type B  write mult. like write, several packets to one address
//   data type F  network administration, handed to trbnet_addresses
// Address map (32-bit registers):
//   0x00..        common status registers   (inputs, read only)
//   0x20..        common control registers  (outputs, read/write)
//   0x40..0x42    read-only board information: compilation time,
//                 compilation version, hardware version
//   0x80..        user status registers     (inputs)
//   0xC0..        user control registers    (outputs)
//   0x100..FFFF   external data port: dat_read_enable_out or
//                 dat_write_enable_out pulse for one cycle with
//                 dat_addr_out/dat_data_out; the user logic answers with
//                 dat_ack_in (and dat_data_in for reads) within
//                 DATA_TIMEOUT cycles, or dat_unknown_in.
// Any other address, a write to a read-only register, a data port timeout
// or an unknown data type sets bit 4 ("don't understand") in the reply's
// error pattern. Each written control register pulses its bit in
// ctrl_strobe_out / common_ctrl_strobe_out.
// After the request's termination has been read, all answer packets are in
// the API's send FIFO and send is pulsed; the API adds header and
// termination. The answer FIFO must hold all answer packets of one request
// (2^FIFO_TO_INT_DEPTH+1 packets in the API).
// Register ranges, data types and the network address handling follow the
// document; numbers of registers, packet layout of requests and answers and
// the data port handshake are this design's.
module trbnet_regio
  import trbnet_pkg::*;
#(
  parameter int            NUM_COMMON_STAT = 2,
  parameter int            NUM_COMMON_CTRL = 2,
  parameter int            NUM_STAT_REGS   = 4,
  parameter int            NUM_CTRL_REGS   = 4,
  parameter logic [31:0]   COMPILE_TIME    = 32'h0000_0000,
  parameter logic [31:0]   COMPILE_VERSION = 32'h0000_0001,
  parameter logic [31:0]   HARDWARE_VERSION = 32'h0001_0000,
  parameter logic [15:0]   INIT_ADDRESS    = 16'hFFFF,
  parameter logic [7:0]    ENDPOINT_ID     = 8'h00,
  parameter logic [15:0]   BOARD_INFO      = 16'h0000,
  parameter int            DATA_TIMEOUT    = 16
) (
  input  logic        clk,
  input  logic        reset,
  // to the passive API (application side)
  output logic [15:0] apl_data_out,
  output logic [1:0]  apl_packet_num_out,
  output logic        apl_dataready_out,
  input  logic        apl_read_in,
  output logic        apl_short_transfer_out,
  output logic        apl_send_out,
  output logic [3:0]  apl_dtype_out,
  output logic [31:0] apl_error_pattern_out,
  output logic [15:0] apl_target_address_out,
  input  logic [15:0] apl_data_in,
  input  logic [1:0]  apl_packet_num_in,
  input  logic [2:0]  apl_typ_in,
  input  logic        apl_dataready_in,
  output logic        apl_read_out,
  input  logic        apl_run_in,
  input  logic [3:0]  apl_dtype_in,
  // registers
  input  logic [31:0] common_stat_reg_in [NUM_COMMON_STAT],
  output logic [31:0] common_ctrl_reg_out [NUM_COMMON_CTRL],
  output logic [NUM_COMMON_CTRL-1:0] common_ctrl_strobe_out,
  input  logic [31:0] stat_reg_in [NUM_STAT_REGS],
  output logic [31:0] ctrl_reg_out [NUM_CTRL_REGS],
  output logic [NUM_CTRL_REGS-1:0] ctrl_strobe_out,
  // external data port
  output logic [15:0] dat_addr_out,
  output logic        dat_read_enable_out,
  output logic        dat_write_enable_out,
  output logic [31:0] dat_data_out,
  input  logic [31:0] dat_data_in,
  input  logic        dat_ack_in,
  input  logic        dat_unknown_in,
  // addressing
  input  logic [63:0] uid_in,
  output logic [15:0] my_address_out,
  output logic [15:0] stat_requests
);
  typedef enum logic [2:0] {R_RX, R_EXEC, R_DATA, R_OUT, R_ADM, R_SEND, R_WAIT} rstate_e;
  rstate_e state;

  logic [15:0] pk [1:3];      // F1..F3 of the packet being handled
  logic [7:0]  remaining;     // reads still to do for data type A
  logic [31:0] rdata;
  logic [1:0]  oidx;          // word of the answer packet being written
  logic        dont_understand;
  logic [4:0]  tmo;
  logic [1:0]  adm_idx;
  logic        adm_start;

  // network administration
  logic [47:0] adm_reply [2];
  logic [1:0]  adm_count;
  logic        adm_unknown;
  logic        adm_valid;
  assign adm_valid = (state == R_EXEC) && apl_dtype_in == DTYPE_NET_ADMIN;

  trbnet_addresses #(
    .INIT_ADDRESS(INIT_ADDRESS), .ENDPOINT_ID(ENDPOINT_ID), .BOARD_INFO(BOARD_INFO)
  ) u_addr (
    .clk, .reset,
    .uid_in,
    .start       (adm_start),
    .pkt_in      ({pk[1], pk[2], pk[3]}),
    .pkt_valid   (adm_valid),
    .my_address  (my_address_out),
    .reply_pkts  (adm_reply),
    .reply_count (adm_count),
    .unknown_cmd (adm_unknown)
  );

  // --------------------------------------------------- register read mux
  logic [15:0] addr;
  logic        rd_ok, wr_ok, is_ext;
  logic [31:0] rd_val;
  assign addr   = pk[1];
  assign is_ext = addr >= 16'h0100;
  always_comb begin
    rd_ok  = 1'b0;
    wr_ok  = 1'b0;
    rd_val = '0;
    if (addr < 16'h0020) begin
      if (int'(addr) < NUM_COMMON_STAT) begin
        rd_ok = 1'b1; rd_val = common_stat_reg_in[int'(addr[4:0])];
      end
    end else if (addr < 16'h0040) begin
      if (int'(addr) - 32 < NUM_COMMON_CTRL) begin
        rd_ok = 1'b1; wr_ok = 1'b1; rd_val = common_ctrl_reg_out[int'(addr[4:0])];
      end
    end else if (addr < 16'h0050) begin
      rd_ok = addr <= 16'h0042;
      case (addr[1:0])
        2'd0:    rd_val = COMPILE_TIME;
        2'd1:    rd_val = COMPILE_VERSION;
        default: rd_val = HARDWARE_VERSION;
      endcase
    end else if (addr >= 16'h0080 && addr < 16'h00C0) begin
      if (int'(addr) - 128 < NUM_STAT_REGS) begin
        rd_ok = 1'b1; rd_val = stat_reg_in[int'(addr[5:0])];
      end
    end else if (addr >= 16'h00C0 && addr < 16'h0100) begin
      if (int'(addr) - 192 < NUM_CTRL_REGS) begin
        rd_ok = 1'b1; wr_ok = 1'b1; rd_val = ctrl_reg_out[int'(addr[5:0])];
      end
    end
  end

  logic is_read, is_write;
  assign is_read  = apl_dtype_in == DTYPE_REG_READ || apl_dtype_in == DTYPE_REG_READ_MULT;
  assign is_write = apl_dtype_in == DTYPE_REG_WRITE || apl_dtype_in == DTYPE_REG_WRITE_MULT;

  // --------------------------------------------------- API side outputs
  logic [47:0] opkt;
  assign opkt = (state == R_ADM) ? adm_reply[adm_idx[0]] : {addr, rdata};
  always_comb begin
    apl_data_out       = opkt[47 - 16*(int'(oidx) - 1) -: 16];
    apl_packet_num_out = oidx;
    apl_dataready_out  = (state == R_OUT || state == R_ADM) && oidx != 2'd0;
  end
  assign apl_read_out           = (state == R_RX);
  assign apl_short_transfer_out = 1'b0;
  assign apl_dtype_out          = apl_dtype_in;
  assign apl_target_address_out = 16'h0000;
  assign apl_error_pattern_out  = {27'd0, dont_understand, 4'd0};
  assign adm_start              = (state == R_WAIT) && !apl_run_in && !apl_send_out;

  always_ff @(posedge clk) begin
    if (reset) begin
      state                  <= R_RX;
      pk[1] <= '0; pk[2] <= '0; pk[3] <= '0;
      remaining              <= '0;
      rdata                  <= '0;
      oidx                   <= '0;
      dont_understand        <= 1'b0;
      tmo                    <= '0;
      adm_idx                <= '0;
      apl_send_out           <= 1'b0;
      dat_addr_out           <= '0;
      dat_data_out           <= '0;
      dat_read_enable_out    <= 1'b0;
      dat_write_enable_out   <= 1'b0;
      common_ctrl_strobe_out <= '0;
      ctrl_strobe_out        <= '0;
      stat_requests          <= '0;
      for (int i = 0; i < NUM_COMMON_CTRL; i++) common_ctrl_reg_out[i] <= '0;
      for (int i = 0; i < NUM_CTRL_REGS; i++)   ctrl_reg_out[i]        <= '0;
    end else begin
      dat_read_enable_out    <= 1'b0;
      dat_write_enable_out   <= 1'b0;
      common_ctrl_strobe_out <= '0;
      ctrl_strobe_out        <= '0;
      apl_send_out           <= 1'b0;
      case (state)
        R_RX: begin
          if (apl_dataready_in) begin
            if (apl_packet_num_in != 2'd0) pk[apl_packet_num_in] <= apl_data_in;
            if (apl_packet_num_in == 2'd3) begin
              if (apl_typ_in == TYPE_TRM) begin
                adm_idx <= '0;
                oidx    <= 2'd1;
                state   <= (apl_dtype_in == DTYPE_NET_ADMIN && adm_count != 2'd0) ? R_ADM : R_SEND;
                if (apl_dtype_in == DTYPE_NET_ADMIN && adm_unknown) dont_understand <= 1'b1;
              end else if (apl_typ_in == TYPE_DAT) begin
                state     <= R_EXEC;
                remaining <= (apl_dtype_in == DTYPE_REG_READ_MULT) ? apl_data_in[7:0] : 8'd1;
              end
            end
          end
        end
        R_EXEC: begin
          oidx <= 2'd1;
          if (apl_dtype_in == DTYPE_NET_ADMIN) begin
            state <= R_RX;
          end else if (!(is_read || is_write)) begin
            dont_understand <= 1'b1;
            state <= R_RX;
          end else if (is_read && remaining == 8'd0) begin
            state <= R_RX;
          end else if (is_ext) begin
            dat_addr_out         <= addr;
            dat_data_out         <= {pk[2], pk[3]};
            dat_read_enable_out  <= is_read;
            dat_write_enable_out <= is_write;
            tmo   <= '0;
            state <= R_DATA;
          end else if (is_read) begin
            if (!rd_ok) dont_understand <= 1'b1;
            rdata <= rd_val;
            state <= R_OUT;
          end else begin
            if (!wr_ok) dont_understand <= 1'b1;
            else if (addr < 16'h0040) begin
              common_ctrl_reg_out[int'(addr[4:0])]    <= {pk[2], pk[3]};
              common_ctrl_strobe_out[int'(addr[4:0])] <= 1'b1;
            end else begin
              ctrl_reg_out[int'(addr[5:0])]    <= {pk[2], pk[3]};
              ctrl_strobe_out[int'(addr[5:0])] <= 1'b1;
            end
            state <= R_RX;
          end
        end
        R_DATA: begin
          tmo <= tmo + 1'b1;
          if (dat_ack_in || dat_unknown_in || int'(tmo) >= DATA_TIMEOUT) begin
            if (!dat_ack_in) dont_understand <= 1'b1;
            rdata <= dat_ack_in ? dat_data_in : 32'd0;
            state <= is_read ? R_OUT : R_RX;
          end
        end
        R_OUT: begin
          if (apl_read_in) begin
            oidx <= oidx + 1'b1;
            if (oidx == 2'd3) begin
              oidx      <= '0;
              remaining <= remaining - 1'b1;
              state     <= R_EXEC;
            end
          end
        end
        R_ADM: begin
          if (apl_read_in) begin
            oidx <= oidx + 1'b1;
            if (oidx == 2'd3) begin
              oidx    <= 2'd1;
              adm_idx <= adm_idx + 1'b1;
              if (adm_idx + 1'b1 == adm_count) state <= R_SEND;
            end
          end
        end
        R_SEND: begin
          apl_send_out  <= 1'b1;
          stat_requests <= stat_requests + 1'b1;
          state         <= R_WAIT;
        end
        R_WAIT: begin
          if (!apl_run_in && !apl_send_out) begin
            dont_understand <= 1'b0;
            state           <= R_RX;
          end
        end
        default: state <= R_RX;
      endcase
    end
  end

endmodule
