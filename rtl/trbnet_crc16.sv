// trbnet_crc16: running IBM CRC-16 over 16-bit words.
//
// Both buffers of a link keep one: the output buffer sends the value in each
// end-of-buffer packet, the input buffer recomputes it from what arrived and
// compares. Generator x^16 + x^15 + x^2 + 1 as the document gives; bit order
// (MSB first), the start value 0000 and the per-buffer restart are this
// design's choices. With clear and enable high together the register restarts
// from the word being added. crc is registered: it includes every word
// accepted up to the previous clock edge.
module trbnet_crc16
  import trbnet_pkg::*;
(
  input  logic        clk,
  input  logic        reset,
  input  logic        clear,
  input  logic        enable,
  input  logic [15:0] data_in,
  output logic [15:0] crc
);
  always_ff @(posedge clk) begin
    if (reset) crc <= 16'h0000;
    else if (enable) crc <= crc16_next(clear ? 16'h0000 : crc, data_in);
    else if (clear)  crc <= 16'h0000;
  end
endmodule
