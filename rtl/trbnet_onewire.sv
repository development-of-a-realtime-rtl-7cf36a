// trbnet_onewire: 1-wire master reading a DS18S20 temperature sensor.
//
// Reads the sensor's 64-bit ROM code once (it is the first part of the
// node's unique ID) and then the temperature every PERIOD_US microseconds.
// Only one device on the bus is supported. Sequence:
//   reset/presence, READ ROM (33h), read 64 bits   -> uid_out, uid_valid
//     (uid_valid only if the ROM's CRC-8 matches; otherwise retried)
//   reset, SKIP ROM (CCh), CONVERT T (44h), wait CONV_US
//   reset, SKIP ROM, READ SCRATCHPAD (BEh), read 16 bits -> temperature_out
//   wait PERIOD_US, repeat the temperature part
// Bus timing in microseconds (CLK_MHZ clock cycles each): reset pulse 480,
// presence sampled 70 after release, slot 70 with 6 low for a 1 or read,
// 60 low for a 0, read data sampled at 15. Bits go LSB first.
// Pin: onewire_drive_low_out = 1 pulls the open-drain line low; the line
// level comes back on onewire_in (pulled up outside).
// The two operations (unique ID and temperature) follow the document; the
// bus timings are the sensor's standard ones; periods are this design's.
module trbnet_onewire #(
  parameter int CLK_MHZ   = 100,
  parameter int CONV_US   = 750000,
  parameter int PERIOD_US = 1000000
) (
  input  logic        clk,
  input  logic        reset,
  input  logic        onewire_in,
  output logic        onewire_drive_low_out,
  output logic [63:0] uid_out,
  output logic        uid_valid,
  output logic [15:0] temperature_out,
  output logic        temp_valid,
  output logic        stat_presence,
  output logic [7:0]  stat_crc_errors
);
  typedef enum logic [1:0] {OP_RESET, OP_WRITE, OP_READ, OP_WAIT} op_e;

  // step table
  logic [3:0]  step;
  op_e         op;
  logic [7:0]  op_byte;
  logic [6:0]  op_bits;
  logic [31:0] op_wait;
  always_comb begin
    op = OP_RESET; op_byte = '0; op_bits = 7'd8; op_wait = '0;
    case (step)
      4'd0:  op = OP_RESET;
      4'd1:  begin op = OP_WRITE; op_byte = 8'h33; end
      4'd2:  begin op = OP_READ;  op_bits = 7'd64; end
      4'd3:  op = OP_RESET;
      4'd4:  begin op = OP_WRITE; op_byte = 8'hCC; end
      4'd5:  begin op = OP_WRITE; op_byte = 8'h44; end
      4'd6:  begin op = OP_WAIT;  op_wait = 32'(CONV_US); end
      4'd7:  op = OP_RESET;
      4'd8:  begin op = OP_WRITE; op_byte = 8'hCC; end
      4'd9:  begin op = OP_WRITE; op_byte = 8'hBE; end
      4'd10: begin op = OP_READ;  op_bits = 7'd16; end
      default: begin op = OP_WAIT; op_wait = 32'(PERIOD_US); end
    endcase
  end

  // microsecond tick
  logic [15:0] pre;
  logic        tick;
  assign tick = (int'(pre) == CLK_MHZ - 1);

  logic [31:0] t;        // microseconds within the current slot or wait
  logic [6:0]  bitn;     // bit within the current operation
  logic [63:0] shreg;
  logic [1:0]  in_s;     // synchroniser

  // Dallas CRC-8 (x^8 + x^5 + x^4 + 1) over the first 56 ROM bits
  function automatic logic [7:0] crc8(input logic [55:0] d);
    logic [7:0] c;
    c = '0;
    for (int i = 0; i < 56; i++) begin
      logic fb;
      fb = c[0] ^ d[i];
      c  = c >> 1;
      if (fb) c = c ^ 8'h8C;
    end
    return c;
  endfunction

  always_ff @(posedge clk) begin
    if (reset) begin
      step            <= '0;
      pre             <= '0;
      t               <= '0;
      bitn            <= '0;
      shreg           <= '0;
      in_s            <= 2'b11;
      onewire_drive_low_out <= 1'b0;
      uid_out         <= '0;
      uid_valid       <= 1'b0;
      temperature_out <= '0;
      temp_valid      <= 1'b0;
      stat_presence   <= 1'b0;
      stat_crc_errors <= '0;
    end else begin
      in_s <= {in_s[0], onewire_in};
      pre  <= tick ? '0 : pre + 1'b1;
      if (tick) begin
        t <= t + 1'b1;
        case (op)
          OP_RESET: begin
            onewire_drive_low_out <= (t < 32'd479);
            if (t == 32'd550) stat_presence <= !in_s[1];
            if (t == 32'd960) begin
              t    <= '0;
              step <= stat_presence ? step + 1'b1 : step;
            end
          end
          OP_WRITE: begin
            onewire_drive_low_out <= op_byte[bitn[2:0]] ? (t < 32'd5) : (t < 32'd59);
            if (t == 32'd70) begin
              t    <= '0;
              bitn <= bitn + 1'b1;
              if (bitn == op_bits - 1'b1) begin bitn <= '0; step <= step + 1'b1; end
            end
          end
          OP_READ: begin
            onewire_drive_low_out <= (t < 32'd5);
            if (t == 32'd15) shreg <= {in_s[1], shreg[63:1]};
            if (t == 32'd70) begin
              t    <= '0;
              bitn <= bitn + 1'b1;
              if (bitn == op_bits - 1'b1) begin
                bitn <= '0;
                if (step == 4'd2) begin
                  if (crc8(shreg[55:0]) == shreg[63:56]) begin
                    uid_out   <= shreg;
                    uid_valid <= 1'b1;
                    step      <= step + 1'b1;
                  end else begin
                    stat_crc_errors <= stat_crc_errors + 1'b1;
                    step            <= '0;
                  end
                end else begin
                  temperature_out <= shreg[63:48];
                  temp_valid      <= 1'b1;
                  step            <= step + 1'b1;
                end
              end
            end
          end
          default: begin   // OP_WAIT
            onewire_drive_low_out <= 1'b0;
            if (t >= op_wait) begin
              t    <= '0;
              step <= (step == 4'd6) ? 4'd7 : 4'd3;
            end
          end
        endcase
      end
    end
  end

endmodule
