// trbnet_sbuf: secure buffer for the free-running handshake.
//
// Inside TrbNet a word moves when dataready and read are both high in the
// same cycle; the receiver may drop read at any time. A plain output
// register cannot know in time whether its word was taken, so this buffer
// offers three ways to hand data on, chosen by SECURE_MODE:
//   0  combinational: input passed straight through, read passed back.
//   1  one register that accepts a new word only every second cycle, so the
//      receiver always has a cycle to take it (half rate).
//   2  full secure buffer: a registered output stage plus a second stage
//      that catches one more word when the receiver stalls. in_read then
//      depends on registers only (high unless the second stage is full), so
//      the sender can rely on it and full rate is kept.
// The three modes follow the document; the exact register arrangement of
// mode 2 (a two-entry skid buffer) is this design's own.
// Ports: in_* from the sender, out_* to the receiver. Latency 0 (mode 0) or
// 1 cycle (modes 1, 2). Synchronous active-high reset.
module trbnet_sbuf #(
  parameter int WIDTH       = 18,
  parameter int SECURE_MODE = 2
) (
  input  logic             clk,
  input  logic             reset,
  input  logic [WIDTH-1:0] in_data,
  input  logic             in_dataready,
  output logic             in_read,
  output logic [WIDTH-1:0] out_data,
  output logic             out_dataready,
  input  logic             out_read
);

  if (SECURE_MODE == 0) begin : g_comb
    assign out_data      = in_data;
    assign out_dataready = in_dataready;
    assign in_read       = out_read;

  end else if (SECURE_MODE == 1) begin : g_half
    logic [WIDTH-1:0] r_data;
    logic             r_full;
    logic             r_wait;   // one cycle pause after a load
    assign in_read       = !r_full && !r_wait;
    assign out_data      = r_data;
    assign out_dataready = r_full;
    always_ff @(posedge clk) begin
      if (reset) begin
        r_full <= 1'b0;
        r_wait <= 1'b0;
        r_data <= '0;
      end else begin
        r_wait <= 1'b0;
        if (r_full && out_read) r_full <= 1'b0;
        if (in_dataready && in_read) begin
          r_data <= in_data;
          r_full <= 1'b1;
          r_wait <= 1'b1;
        end
      end
    end

  end else begin : g_full
    logic [WIDTH-1:0] s1_data, s2_data;
    logic             s1_full, s2_full;
    assign in_read       = !s2_full;
    assign out_data      = s1_data;
    assign out_dataready = s1_full;
    always_ff @(posedge clk) begin
      if (reset) begin
        s1_full <= 1'b0;
        s2_full <= 1'b0;
        s1_data <= '0;
        s2_data <= '0;
      end else begin
        logic take_in, give_out;
        take_in  = in_dataready && in_read;
        give_out = s1_full && out_read;
        if (give_out || !s1_full) begin
          // stage 1 is free after this cycle: refill from stage 2 or input
          if (s2_full) begin
            s1_data <= s2_data;
            s1_full <= 1'b1;
            if (take_in) s2_data <= in_data;
            else         s2_full <= 1'b0;
          end else if (take_in) begin
            s1_data <= in_data;
            s1_full <= 1'b1;
          end else begin
            s1_full <= 1'b0;
          end
        end else if (take_in) begin
          // stage 1 holds and the receiver stalls: park the word
          s2_data <= in_data;
          s2_full <= 1'b1;
        end
      end
    end
  end

endmodule
