// trbnet_priority_arbiter: fixed-priority arbiter with round-robin slots.
//
// Request 0 has the highest priority. Normally the lowest-numbered active
// request wins. To keep a busy high-priority source from starving the
// others, every RR_RATIO-th decision is instead made round robin: the first
// active request after the one the previous round-robin slot served. RR_RATIO = 0 disables the round
// robin slots. grant is combinational from req and the stored state (one-hot,
// zero when no request); the state advances on a cycle with advance high,
// which the user raises when the granted source has been served. The two
// arbiter kinds and a configurable ratio follow the document; the ratio value
// is this design's choice.
module trbnet_priority_arbiter #(
  parameter int N        = 8,
  parameter int RR_RATIO = 4
) (
  input  logic         clk,
  input  logic         reset,
  input  logic [N-1:0] req,
  input  logic         advance,
  output logic [N-1:0] grant,
  output logic         rr_slot    // this decision is a round-robin one
);
  localparam int IW = (N > 1) ? $clog2(N) : 1;
  localparam int CW = (RR_RATIO > 1) ? $clog2(RR_RATIO) : 1;

  logic [IW-1:0] last;
  logic [CW-1:0] cnt;

  assign rr_slot = (RR_RATIO > 0) && (cnt == CW'(RR_RATIO - 1));

  always_comb begin
    grant = '0;
    if (rr_slot) begin
      for (int k = N; k >= 1; k--)
        if (req[(int'(last) + k) % N]) grant = N'(1) << ((int'(last) + k) % N);
    end else begin
      for (int i = N - 1; i >= 0; i--)
        if (req[i]) grant = N'(1) << i;
    end
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      last <= '0;
      cnt  <= '0;
    end else if (advance && |grant) begin
      if (rr_slot)
        for (int i = 0; i < N; i++)
          if (grant[i]) last <= IW'(i);
      if (RR_RATIO > 0) cnt <= rr_slot ? '0 : cnt + 1'b1;
    end
  end
endmodule
