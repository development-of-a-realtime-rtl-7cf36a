// tb_trbnet_async_fifo: dual-clock FIFO with unrelated clocks.
//
// Write clock 10 ns, read clock 7 ns; random writes and reads. Checked:
// every written word comes out once and in order, nothing is written while
// full (the writer respects full), and clear empties the FIFO.
module tb_trbnet_async_fifo;
  logic wclk = 0, rclk = 0, wreset = 1, rreset = 1;
  always #5 wclk = ~wclk;
  always #3.5 rclk = ~rclk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  logic wr_en, rd_en, full, empty;
  logic [15:0] wr_data, rd_data;
  trbnet_async_fifo #(.WIDTH(16), .AW(3)) dut (
    .wr_clk(wclk), .wr_reset(wreset), .wr_en, .wr_data, .full,
    .rd_clk(rclk), .rd_reset(rreset), .rd_en, .rd_data, .empty);
  int nw = 0, nr = 0, errs = 0;
  logic go = 0;
  always @(posedge wclk) begin
    if (wreset || !go) begin wr_en <= 0; wr_data <= 0; end
    else begin
      if (wr_en && !full) begin nw++; wr_data <= wr_data + 1'b1; end
      wr_en <= ($urandom % 3) != 0 && nw < 3000;
    end
  end
  always @(posedge rclk) begin
    if (rreset) rd_en <= 0;
    else begin
      if (rd_en && !empty) begin
        if (rd_data != 16'(nr)) errs++;
        nr++;
      end
      rd_en <= ($urandom % 2) != 0;
    end
  end
  initial begin #500000; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
  initial begin
    repeat (3) @(posedge wclk);
    wreset <= 0; rreset <= 0;
    repeat (3) @(posedge wclk);
    go <= 1;
    while (nr < 3000) @(posedge rclk);
    check(errs == 0, "all words in order");
    check(nw == 3000 && nr == 3000, "no loss, no duplicates");
    go <= 0;
    repeat (10) @(posedge wclk);
    check(empty, "empty after draining");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
