// tb_trbnet_fifo: random writes and reads against a queue model.
//
// A small FIFO (DEPTH 8) is written and read at random, also while full or
// empty. Checked: read data equals the model's head, empty/full/count agree
// with the model, a write while full sets overflow and is dropped.
module tb_trbnet_fifo;
  logic clk = 0, reset = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, errs = 0, ovf_seen = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  logic wr_en, rd_en, empty, full, overflow;
  logic [15:0] wr_data, rd_data;
  logic [3:0] count;
  trbnet_fifo #(.WIDTH(16), .DEPTH(8)) dut (.clk, .reset, .wr_en, .wr_data, .rd_en,
    .rd_data, .empty, .full, .count, .overflow);
  logic [15:0] q [$];
  initial begin #100000; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
  initial begin
    wr_en = 0; rd_en = 0; wr_data = 0;
    repeat (3) @(posedge clk);
    reset = 0;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      if (empty != (q.size() == 0) || full != (q.size() == 8) || int'(count) != q.size()) errs++;
      if (q.size() > 0 && rd_data != q[0]) errs++;
      wr_en = ($urandom % 100) < ((i / 500) % 2 ? 70 : 30);
      rd_en = ($urandom % 100) < ((i / 500) % 2 ? 30 : 70) && q.size() > 0;
      wr_data = 16'($urandom);
      begin
        bit was_full;
        was_full = (q.size() == 8);
        @(posedge clk);
        #1;
        if (overflow) ovf_seen++;
        if (rd_en) void'(q.pop_front());
        if (wr_en && !was_full) q.push_back(wr_data);
      end
    end
    check(errs == 0, $sformatf("model mismatches: %0d", errs));
    check(ovf_seen > 0, "overflow flagged on writes to a full FIFO");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
