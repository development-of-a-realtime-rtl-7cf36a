// tb_ds18s20_model: behavioural model of a DS18S20 1-wire sensor.
//
// Watches the master's open-drain drive (master_low) and pulls the line
// itself through slave_low. A low phase longer than 400 us is a reset: the
// model answers with a presence pulse (30 us after release, 100 us long).
// Afterwards it takes command bytes LSB first (a short low phase is a 1):
// 33h sends the 64-bit ROM, CCh is skipped, 44h starts nothing visible,
// BEh sends the 16-bit TEMP. While sending, a 0 bit is answered by holding
// the line low for 30 us from the start of the master's slot.
// Time is counted in clock cycles, CYC_PER_US per microsecond.
module tb_ds18s20_model #(
  parameter int          CYC_PER_US = 10,
  parameter logic [63:0] ROM        = 64'h0,
  parameter logic [15:0] TEMP       = 16'h0032
) (
  input  logic clk,
  input  logic master_low,
  output logic slave_low
);
  int          t;
  logic        sending;
  logic [63:0] sh;
  int          nbits, got;
  logic [7:0]  cmd;
  initial begin
    slave_low = 1'b0;
    sending = 1'b0;
    nbits = 0; got = 0; cmd = '0; sh = '0;
    forever begin
      @(posedge clk iff master_low);
      t = 0;
      if (sending) begin
        if (!sh[0]) slave_low = 1'b1;
        while (master_low) begin @(posedge clk); t++; end
        while (t < 30 * CYC_PER_US) begin @(posedge clk); t++; end
        slave_low = 1'b0;
        sh = sh >> 1;
        nbits--;
        if (nbits == 0) sending = 1'b0;
      end else begin
        while (master_low) begin @(posedge clk); t++; end
        if (t > 400 * CYC_PER_US) begin
          repeat (30 * CYC_PER_US) @(posedge clk);
          slave_low = 1'b1;
          repeat (100 * CYC_PER_US) @(posedge clk);
          slave_low = 1'b0;
          got = 0;
          sending = 1'b0;
        end else begin
          cmd = {(t < 15 * CYC_PER_US), cmd[7:1]};
          got++;
          if (got == 8) begin
            got = 0;
            if (cmd == 8'h33) begin sending = 1'b1; sh = ROM; nbits = 64; end
            if (cmd == 8'hBE) begin sending = 1'b1; sh = {48'd0, TEMP}; nbits = 16; end
          end
        end
      end
    end
  end
endmodule
