// tb_trbnet_crc16: CRC-16 (polynomial 8005h, start 0, MSB first).
//
// Checked: the ASCII words "12345678" give 95FDh (the same value the
// standard CRC-16/BUYPASS gives for these eight bytes); clear restarts the
// sum; a clear together with enable starts a new sum with that word;
// random words against a bitwise model.
module tb_trbnet_crc16;
  logic clk = 0, reset = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  logic clear, enable;
  logic [15:0] data_in, crc;
  trbnet_crc16 dut (.clk, .reset, .clear, .enable, .data_in, .crc);
  function automatic logic [15:0] model(input logic [15:0] c, input logic [15:0] w);
    for (int i = 15; i >= 0; i--)
      if (c[15] ^ w[i]) c = {c[14:0], 1'b0} ^ 16'h8005;
      else              c = {c[14:0], 1'b0};
    return c;
  endfunction
  task automatic feed(input logic [15:0] w, input bit clr);
    @(negedge clk);
    data_in = w; enable = 1; clear = clr;
    @(negedge clk);
    enable = 0; clear = 0;
  endtask
  initial begin #100000; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
  initial begin
    logic [15:0] m;
    clear <= 0; enable <= 0; data_in <= 0;
    repeat (3) @(posedge clk);
    reset <= 0;
    @(posedge clk);
    feed(16'h3132, 0); feed(16'h3334, 0); feed(16'h3536, 0); feed(16'h3738, 0);
    @(posedge clk);
    check(crc == 16'h95FD, $sformatf("check value %h", crc));
    clear <= 1; @(posedge clk); clear <= 0; @(posedge clk);
    check(crc == 16'h0000, "clear");
    feed(16'h1234, 0);
    feed(16'h3132, 1); feed(16'h3334, 0); feed(16'h3536, 0); feed(16'h3738, 0);
    @(posedge clk);
    check(crc == 16'h95FD, "clear with enable starts a new sum");
    clear <= 1; @(posedge clk); clear <= 0;
    m = 0;
    for (int i = 0; i < 200; i++) begin
      logic [15:0] w;
      w = 16'($urandom);
      m = model(m, w);
      feed(w, 0);
    end
    @(posedge clk);
    check(crc == m, $sformatf("random words match the model %h %h", crc, m));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
