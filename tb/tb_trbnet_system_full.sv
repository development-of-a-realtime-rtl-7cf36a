// tb_trbnet_system_full: the end-to-end test of tb_trbnet_system on the
// network with all its default parameters (two front-end boards, largest
// buffers, 100 MHz sensor timing).
//
// Same steps and checks as tb_trbnet_system. Because the buffers hold 127
// packets each, the readout step uses RP = 600 packets per board and a slow
// reader, so the output buffers still have to wait for acknowledgements.
module tb_trbnet_system_full;
  import trbnet_pkg::*;
  localparam int N_FEE = 2;
  localparam int RP    = 600;     // data packets per board on channel 1
  localparam int CYC_PER_US = 100;
  localparam longint WATCHDOG = 20_000_000;

  logic clk = 0, reset = 1;
  always #5 clk = ~clk;
  logic tlk_clk = 0, tlk_rx_clk = 0;
  always #4 tlk_clk = ~tlk_clk;
  always #4 tlk_rx_clk = ~tlk_rx_clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------------------------------------------------- DUT ports
  logic [15:0] cts_din [4];   logic [1:0] cts_pnin [4];
  logic [3:0]  cts_drin, cts_rdout, cts_short, cts_send, cts_rdin, cts_drout, cts_run;
  logic [3:0]  cts_dtype [4]; logic [15:0] cts_tgt [4];
  logic [15:0] cts_dout [4];  logic [1:0] cts_pnout [4]; logic [2:0] cts_typ [4];
  logic [7:0]  cts_seq [4];
  logic [15:0] f_din [N_FEE][2]; logic [1:0] f_pnin [N_FEE][2];
  logic [1:0]  f_drin [N_FEE], f_rdout [N_FEE], f_short [N_FEE], f_send [N_FEE];
  logic [31:0] f_err [N_FEE][2];
  logic [15:0] f_dout [N_FEE][2]; logic [1:0] f_pnout [N_FEE][2]; logic [2:0] f_typ [N_FEE][2];
  logic [1:0]  f_drout [N_FEE], f_rdin [N_FEE], f_run [N_FEE];
  logic [7:0]  f_seq [N_FEE][2]; logic [3:0] f_dto [N_FEE][2];
  logic [31:0] f_stat [N_FEE][4], f_ctrl [N_FEE][4];
  logic [N_FEE-1:0] ow_in, ow_low, ow_slave;
  logic [15:0] f_addr [N_FEE];
  logic [15:0] txd; logic tx_en, tx_er, tlk_en, tlk_lo, tlk_prbs;
  logic [N_FEE+1:0] hub_link; logic cts_link; logic [3:0] cts_stalled;
  logic [15:0] rrd, sess [4], mtrm [4], hres [4], psw [4], perr, freq [N_FEE];

  trbnet_system dut (
    .clk, .reset,
    .cts_data_in(cts_din), .cts_packet_num_in(cts_pnin), .cts_dataready_in(cts_drin),
    .cts_read_out(cts_rdout), .cts_short_transfer_in(cts_short), .cts_send_in(cts_send),
    .cts_dtype_in(cts_dtype), .cts_target_address_in(cts_tgt),
    .cts_data_out(cts_dout), .cts_packet_num_out(cts_pnout), .cts_typ_out(cts_typ),
    .cts_dataready_out(cts_drout), .cts_read_in(cts_rdin), .cts_run_out(cts_run),
    .cts_seqnr_out(cts_seq), .cts_resync_in(1'b0),
    .fee_data_in(f_din), .fee_packet_num_in(f_pnin), .fee_dataready_in(f_drin),
    .fee_read_out(f_rdout), .fee_short_transfer_in(f_short), .fee_send_in(f_send),
    .fee_error_pattern_in(f_err), .fee_data_out(f_dout), .fee_packet_num_out(f_pnout),
    .fee_typ_out(f_typ), .fee_dataready_out(f_drout), .fee_read_in(f_rdin),
    .fee_run_out(f_run), .fee_seqnr_out(f_seq), .fee_dtype_out(f_dto),
    .fee_stat_reg_in(f_stat), .fee_ctrl_reg_out(f_ctrl),
    .fee_onewire_in(ow_in), .fee_onewire_drive_low_out(ow_low), .fee_address_out(f_addr),
    .tlk_clk, .tlk_txd_out(txd), .tlk_tx_en_out(tx_en), .tlk_tx_er_out(tx_er),
    .tlk_rx_clk, .tlk_rxd_in(16'h0), .tlk_rx_dv_in(1'b0), .tlk_rx_er_in(1'b1),
    .tlk_enable_out(tlk_en), .tlk_loopen_out(tlk_lo), .tlk_prbsen_out(tlk_prbs),
    .sfp_los_in(1'b1),
    .stat_hub_link_up(hub_link), .stat_cts_link_up(cts_link), .stat_cts_stalled(cts_stalled),
    .stat_cts_rr_decisions(rrd), .stat_hub_sessions(sess), .stat_hub_merged_trms(mtrm),
    .stat_hub_hdr_resends(hres), .stat_hub_port_switches(psw), .stat_parity_errors(perr),
    .stat_fee_requests(freq)
  );

  // -------------------------------------------------------- sensors
  function automatic logic [7:0] crc8(input logic [55:0] d);
    logic [7:0] c;
    c = '0;
    for (int i = 0; i < 56; i++) begin
      logic fb;
      fb = c[0] ^ d[i];
      c = c >> 1;
      if (fb) c = c ^ 8'h8C;
    end
    return c;
  endfunction
  localparam logic [55:0] SER0 = 56'h00_0801_2345_6710;
  localparam logic [55:0] SER1 = 56'h00_0801_89AB_CD10;
  localparam logic [63:0] ROM0 = {crc8(SER0), SER0};
  localparam logic [63:0] ROM1 = {crc8(SER1), SER1};
  logic [63:0] rom [N_FEE];
  assign rom[0] = ROM0;
  assign rom[1] = ROM1;
  tb_ds18s20_model #(.CYC_PER_US(CYC_PER_US), .ROM(ROM0), .TEMP(16'h0031)) u_s0 (
    .clk, .master_low(ow_low[0]), .slave_low(ow_slave[0]));
  tb_ds18s20_model #(.CYC_PER_US(CYC_PER_US), .ROM(ROM1), .TEMP(16'h0032)) u_s1 (
    .clk, .master_low(ow_low[1]), .slave_low(ow_slave[1]));
  always_comb ow_in = ~(ow_low | ow_slave);

  // --------------------------------------------- front-end applications
  int fee_rx [N_FEE][2];
  logic [15:0] fee_log [N_FEE][2][16];
  for (genvar e = 0; e < N_FEE; e++) begin : g_app
    for (genvar c = 0; c < 2; c++) begin : g_c
      initial begin
        f_rdin[e][c] <= 1'b0; f_drin[e][c] <= 1'b0; f_send[e][c] <= 1'b0;
        f_short[e][c] <= 1'b0; f_din[e][c] <= '0; f_pnin[e][c] <= '0;
        f_err[e][c] <= 32'h0001_0000 << (4 * c + e);
        fee_rx[e][c] = 0;
        @(negedge reset);
        forever begin
          bit done;
          done = 0;
          f_rdin[e][c] <= 1'b1;
          while (!done) begin
            @(posedge clk);
            if (f_drout[e][c]) begin
              if (f_typ[e][c] == TYPE_DAT) begin
                fee_log[e][c][fee_rx[e][c] % 16] = f_dout[e][c];
                fee_rx[e][c]++;
              end
              if (f_typ[e][c] == TYPE_TRM && f_pnout[e][c] == 2'd3) done = 1;
            end
          end
          f_rdin[e][c] <= 1'b0;
          // send is raised first so that the answer may be longer than
          // the send FIFO
          f_send[e][c] <= 1'b1;
          if (c == 0) f_short[e][c] <= 1'b1;
          else begin
            for (int k = 0; k < RP; k++)
              for (int w = 1; w <= 3; w++) begin
                f_din[e][c] <= {4'(e), 12'(k * 3 + w)};
                f_pnin[e][c] <= 2'(w);
                f_drin[e][c] <= 1'b1;
                @(posedge clk);
                while (!f_rdout[e][c]) @(posedge clk);
              end
            f_drin[e][c] <= 1'b0;
          end
          @(posedge clk);
          f_send[e][c] <= 1'b0;
          f_short[e][c] <= 1'b0;
        end
      end
    end
  end

  // --------------------------------------------------- CTS application
  // Sends npk packets (from pk), then reads the whole reply; slow: one
  // word read every 8 cycles.
  task automatic session(input int c, input logic [47:0] pk [$], input bit short_t,
                         input logic [15:0] target, input logic [3:0] dtype,
                         input bit slow, output logic [15:0] got [$],
                         output logic [2:0] typs [$]);
    int n;
    got = {};
    typs = {};
    while (cts_run[c]) @(posedge clk);
    for (int k = 0; k < pk.size(); k++)
      for (int w = 1; w <= 3; w++) begin
        cts_din[c] <= pk[k][47 - 16 * (w - 1) -: 16];
        cts_pnin[c] <= 2'(w);
        cts_drin[c] <= 1'b1;
        @(posedge clk);
        while (!cts_rdout[c]) @(posedge clk);
      end
    cts_drin[c] <= 1'b0;
    cts_tgt[c] <= target;
    cts_dtype[c] <= dtype;
    cts_short[c] <= short_t;
    cts_send[c] <= 1'b1;
    @(posedge clk);
    cts_send[c] <= 1'b0;
    cts_short[c] <= 1'b0;
    n = 0;
    forever begin
      cts_rdin[c] <= !slow || (n % 8 == 0);
      @(posedge clk);
      n++;
      if (cts_drout[c] && cts_rdin[c]) begin
        got.push_back(cts_dout[c]);
        typs.push_back(cts_typ[c]);
        if (cts_typ[c] == TYPE_TRM && cts_pnout[c] == 2'd3) break;
      end
    end
    cts_rdin[c] <= 1'b0;
    @(posedge clk);
  endtask

  // trm error pattern of a finished reply
  function automatic logic [31:0] trm_err(input logic [15:0] got [$]);
    return {got[got.size() - 3], got[got.size() - 2]};
  endfunction

  // --------------------------------------------- mechanism counters
  int stall_cycles = 0;
  always @(posedge clk)
    if (dut.g_fee[0].f_stalled != 0 || dut.g_fee[1].f_stalled != 0 || cts_stalled != 0)
      stall_cycles++;

  initial begin
    #(WATCHDOG * 10);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  // -------------------------------------------------------------- main
  initial begin
    logic [15:0] got [$];
    logic [2:0]  typs [$];
    logic [47:0] pk [$];
    for (int c = 0; c < 4; c++) begin
      cts_din[c] <= '0; cts_pnin[c] <= '0; cts_dtype[c] <= '0; cts_tgt[c] <= '0;
    end
    cts_drin <= '0; cts_short <= '0; cts_send <= '0; cts_rdin <= '0;
    for (int e = 0; e < N_FEE; e++)
      for (int r = 0; r < 4; r++) f_stat[e][r] <= 32'hC0DE_0000 + 32'(16 * e + r);
    repeat (5) @(posedge clk);
    reset = 0;

    // 1. links and sensors
    while (!(cts_link && hub_link[N_FEE:0] == '1)) @(posedge clk);
    check(hub_link[N_FEE + 1] == 1'b0, "unconnected optical port is down");
    while (!(dut.g_fee[0].uid_valid && dut.g_fee[1].uid_valid)) @(posedge clk);
    check(dut.g_fee[0].uid == ROM0 && dut.g_fee[1].uid == ROM1, "unique IDs read");

    // 2. trigger
    pk = {};
    session(0, pk, 1, 16'hFFFF, 4'h1, 0, got, typs);
    check(got.size() == 3 && typs[0] == TYPE_TRM, "trigger reply is one termination");
    check(trm_err(got) == 32'h0003_0001,
          $sformatf("trigger error pattern %h", trm_err(got)));

    // 3. data readout with triggers running in parallel
    pk = {48'hAAAA_0001_0002, 48'hAAAA_0003_0004};
    fork
      begin
        session(1, pk, 0, 16'hFFFF, 4'h2, 1, got, typs);
      end
      begin
        logic [15:0] g2 [$];
        logic [2:0]  t2 [$];
        logic [47:0] p2 [$];
        p2 = {};
        repeat (20) @(posedge clk);
        for (int i = 0; i < 4; i++) begin
          session(0, p2, 1, 16'hFFFF, 4'h1, 0, g2, t2);
          check(g2.size() == 3 && trm_err(g2) == 32'h0003_0001, "trigger during readout");
        end
      end
    join
    begin
      int next_k [N_FEE];
      int cur, ndat;
      bit ok;
      ok = 1; cur = -1; ndat = 0;
      for (int e = 0; e < N_FEE; e++) next_k[e] = 1;
      for (int i = 0; i < got.size(); i++) begin
        if (typs[i] == TYPE_HDR && i % 3 == 0) cur = int'(got[i]);
        if (typs[i] == TYPE_DAT) begin
          ndat++;
          if (cur != 16'hFFFF) ok = 0;   // sources have no address yet
          if (got[i][15:12] >= N_FEE) ok = 0;
          else begin
            if (got[i][11:0] != 12'(next_k[got[i][15:12]])) ok = 0;
            next_k[got[i][15:12]]++;
          end
        end
      end
      check(ndat == 3 * RP * N_FEE, $sformatf("readout data words %0d", ndat));
      check(ok, "readout data in order and behind headers");
      check(trm_err(got) == 32'h0030_0001, $sformatf("readout error pattern %h", trm_err(got)));
      for (int e = 0; e < N_FEE; e++)
        check(fee_rx[e][1] == 6 && fee_log[e][1][0] == 16'hAAAA &&
              fee_log[e][1][5] == 16'h0004, $sformatf("board %0d got the init data", e));
    end

    // 4. terminated channel
    pk = {48'h1111_2222_3333};
    session(2, pk, 0, 16'hFFFF, 4'h3, 0, got, typs);
    check(got.size() == 3 && trm_err(got) == 32'h0, "channel 2 answered by terminating buffers");

    // 5. addresses
    pk = {{CMD_READUID, 8'h00, 32'h0}};
    session(3, pk, 0, 16'hFFFF, DTYPE_NET_ADMIN, 0, got, typs);
    begin
      // packets of both boards may be interleaved by the hub
      logic [47:0] d [$];
      int found;
      d = {};
      found = 0;
      for (int i = 0; i + 2 < got.size(); i += 3)
        if (typs[i] == TYPE_DAT) d.push_back({got[i], got[i + 1], got[i + 2]});
      for (int e = 0; e < N_FEE; e++) begin
        bit a, b;
        a = 0; b = 0;
        foreach (d[k]) begin
          if (d[k] == {CMD_UID, 8'h00, rom[e][63:32]}) a = 1;
          if (d[k] == {rom[e][31:0], 16'h0101}) b = 1;
        end
        if (a && b) found++;
      end
      check(d.size() == 4 && found == 2, $sformatf("READUID returned %0d known IDs", found));
    end
    for (int e = 0; e < N_FEE; e++) begin
      pk = {};
      pk.push_back({CMD_SETADDR, 8'h00, rom[e][63:32]});
      pk.push_back({rom[e][31:0], 16'h0200 + 16'(e)});
      session(3, pk, 0, 16'hFFFF, DTYPE_NET_ADMIN, 0, got, typs);
      check(f_addr[e] == 16'h0200 + 16'(e), $sformatf("board %0d got its address", e));
      if (f_addr[e] != 16'h0200 + 16'(e))
        for (int i = 0; i < got.size(); i++) $display("  %0d typ %0d %h", i, typs[i], got[i]);
    end

    // 6. registers
    pk = {48'h00C1_DEAD_BEEF};
    session(3, pk, 0, 16'h0200, DTYPE_REG_WRITE, 0, got, typs);
    check(f_ctrl[0][1] == 32'hDEAD_BEEF && f_ctrl[1][1] == 32'h0, "addressed register write");
    check(trm_err(got)[0] == 1'b1 && trm_err(got)[4] == 1'b0, "write acknowledged");
    pk = {48'h0080_0000_0000, 48'h0041_0000_0000, 48'h0000_0000_0000};
    session(3, pk, 0, 16'h0201, DTYPE_REG_READ, 0, got, typs);
    begin
      logic [47:0] d [$];
      d = {};
      for (int i = 0; i + 2 < got.size(); i += 3)
        if (typs[i] == TYPE_DAT) d.push_back({got[i], got[i + 1], got[i + 2]});
      check(d.size() == 3, $sformatf("three read answers, got %0d", d.size()));
      if (d.size() == 3) begin
        check(d[0] == {16'h0080, 32'hC0DE_0010}, $sformatf("user status read %h", d[0]));
        check(d[1] == {16'h0041, 32'h0000_0001}, "version register read");
        check(d[2][2:0] == ERROR_OK, "link state register read");
      end
    end
    pk = {48'h0060_0000_0000};
    session(3, pk, 0, 16'h0200, DTYPE_REG_READ, 0, got, typs);
    check(trm_err(got)[ERR_DONT_UNDERSTAND] == 1'b1, "unknown address: don't understand");

    // mechanism counters
    $display("stall=%0d hdr_resend=%0d switches=%0d merged=%0d rr=%0d requests=%0d/%0d",
             stall_cycles, hres[1], psw[1], mtrm[0] + mtrm[1], rrd, freq[0], freq[1]);
    check(stall_cycles > 0, "EOB/ACK stalls happened");
    check(hres[1] > 0, "header resends happened");
    check(psw[1] > 0, "port switches happened");
    check(mtrm[0] >= 5 && mtrm[1] >= 1 && mtrm[2] >= 1 && mtrm[3] >= 1, "merged terminations");
    check(rrd > 0, "round robin decisions happened");
    check(dut.g_fee[0].u_ep.g_ch[2].g_term.term_cnt > 0, "terminating buffer answered");
    check(freq[0] > 0 && freq[1] > 0, "register requests handled");
    check(perr == 0, "no parity errors");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
