// tb_trbnet_sbuf: random producer and consumer around one secure buffer.
//
// The producer offers an incrementing count whenever it likes (random
// dataready, held until read); the consumer reads at random. Checked: every
// value arrives once and in order, in_read is never low for two cycles in
// a row while the output is read every cycle, and at least 1000 words pass.
module tb_trbnet_sbuf;
  logic clk = 0, reset = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  logic [17:0] in_data, out_data;
  logic in_rdy, in_rd, out_rdy, out_rd;
  trbnet_sbuf #(.WIDTH(18), .SECURE_MODE(2)) dut (
    .clk, .reset, .in_data, .in_dataready(in_rdy), .in_read(in_rd),
    .out_data, .out_dataready(out_rdy), .out_read(out_rd));
  int sent = 0, recv = 0, order_err = 0;
  always @(posedge clk) begin
    if (reset) begin
      in_rdy <= 0; in_data <= 0; out_rd <= 0;
    end else begin
      if (in_rdy && in_rd) begin sent++; in_data <= in_data + 1'b1; end
      if (!(in_rdy && !in_rd)) in_rdy <= ($urandom % 4) != 0;
      out_rd <= ($urandom % 3) != 0;
      if (out_rdy && out_rd) begin
        if (out_data != 18'(recv)) order_err++;
        recv++;
      end
    end
  end
  initial begin #200000; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
  initial begin
    repeat (3) @(posedge clk);
    reset = 0;
    repeat (5000) @(posedge clk);
    check(order_err == 0, "data in order, none lost or doubled");
    check(recv > 1000, $sformatf("%0d words passed", recv));
    check(sent - recv >= 0 && sent - recv <= 2, "at most two words held");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
