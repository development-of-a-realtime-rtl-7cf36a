// trbnet_async_fifo: dual-clock FIFO for clock domain crossing.
//
// Write side in wr_clk, read side in rd_clk. Read and write pointers are
// Gray coded and passed to the other domain through two flip-flops, so
// full and empty are safe (possibly late, never wrong). Show-ahead read:
// rd_data is valid while !empty; rd_en takes it. A write when full is
// dropped. clear resets both sides; it must be synchronous to both clocks
// or held for several cycles of each.
// The use of one dual-ported FIFO per direction between the FPGA clock and
// the transceiver clocks follows the document; the Gray pointer scheme is
// this design's.
module trbnet_async_fifo #(
  parameter int WIDTH = 16,
  parameter int AW    = 4
) (
  input  logic             wr_clk,
  input  logic             wr_reset,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  output logic             full,
  input  logic             rd_clk,
  input  logic             rd_reset,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             empty
);
  logic [WIDTH-1:0] mem [2**AW];
  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] wq1, wq2;   // write pointer in read domain
  logic [AW:0] rq1, rq2;   // read pointer in write domain

  function automatic logic [AW:0] b2g(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  assign full  = (wgray == {~rq2[AW:AW-1], rq2[AW-2:0]});
  assign empty = (rgray == wq2);
  assign rd_data = mem[rbin[AW-1:0]];

  always_ff @(posedge wr_clk) begin
    if (wr_reset) begin
      wbin <= '0; wgray <= '0; rq1 <= '0; rq2 <= '0;
      for (int i = 0; i < 2**AW; i++) mem[i] <= '0;
    end else begin
      rq1 <= rgray;
      rq2 <= rq1;
      if (wr_en && !full) begin
        mem[wbin[AW-1:0]] <= wr_data;
        wbin  <= wbin + 1'b1;
        wgray <= b2g(wbin + 1'b1);
      end
    end
  end

  always_ff @(posedge rd_clk) begin
    if (rd_reset) begin
      rbin <= '0; rgray <= '0; wq1 <= '0; wq2 <= '0;
    end else begin
      wq1 <= wgray;
      wq2 <= wq1;
      if (rd_en && !empty) begin
        rbin  <= rbin + 1'b1;
        rgray <= b2g(rbin + 1'b1);
      end
    end
  end

endmodule
