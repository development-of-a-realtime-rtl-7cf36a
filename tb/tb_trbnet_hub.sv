// tb_trbnet_hub: hub with one active endpoint and two passive endpoints.
//
// Port 0 of a three-port hub carries an active endpoint (the initiator);
// ports 1 and 2 carry passive endpoints whose applications answer every
// transfer with a fixed number of data packets. Small input buffers (code 1:
// two packets per buffer) make the EOB/ACK handshake stall the senders.
// Checked: the init data reaches both passive endpoints unchanged; the
// merged reply holds a header for each endpoint before its data, all data
// words in order per endpoint, and one merged termination with the
// endpoint-reached bit; a broadcast short transfer on the trigger channel
// is answered with one merged termination; the channel lock stops a second
// session until the first one is read.
module tb_trbnet_hub;
  import trbnet_pkg::*;

  localparam int NCH = 4;
  localparam int M   = 3;

  logic clk = 0, reset = 1;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ------------------------------------------------------------ links
  word_t        h_in [M], h_out [M];
  logic [M-1:0] h_in_rdy, h_in_rd, h_out_rdy, h_out_rd;
  logic [M-1:0] port_en [NCH];
  logic [NCH-1:0] locked;
  logic [M-1:0] busy [NCH];
  logic [15:0]  sess [NCH], mtrm [NCH], hres [NCH], psw [NCH];

  trbnet_hub #(.NCH(NCH), .MII_NUMBER(M), .IBUF_DEPTH(3'd1)) dut (
    .clk, .reset,
    .link_up     ({M{!reset}}),
    .port_enable (port_en),
    .med_data_in (h_in), .med_dataready_in (h_in_rdy), .med_read_out (h_in_rd),
    .med_data_out(h_out), .med_dataready_out(h_out_rdy), .med_read_in (h_out_rd),
    .stat_locked (locked), .stat_busy_ports(busy), .stat_sessions(sess),
    .stat_merged_trms(mtrm), .stat_hdr_resends(hres), .stat_port_switches(psw)
  );
  initial for (int c = 0; c < NCH; c++) port_en[c] = '1;

  // endpoint application signals, [endpoint][channel]
  logic [15:0] a_din   [M][NCH];
  logic [1:0]  a_pnin  [M][NCH];
  logic [NCH-1:0] a_drin [M], a_rdout [M], a_short [M], a_send [M];
  logic [3:0]  a_dtype [M][NCH];
  logic [31:0] a_err   [M][NCH];
  logic [15:0] a_tgt   [M][NCH];
  logic [15:0] a_dout  [M][NCH];
  logic [1:0]  a_pnout [M][NCH];
  logic [2:0]  a_typ   [M][NCH];
  logic [NCH-1:0] a_drout [M], a_rdin [M], a_run [M];
  logic [7:0]  a_seq   [M][NCH];
  logic [3:0]  a_dto   [M][NCH];

  for (genvar e = 0; e < M; e++) begin : g_ep
    logic [NCH-1:0] st;
    logic [15:0] crc, lost, rrd;
    trbnet_endpoint #(
      .NCH(NCH), .API_TYPE(e == 0 ? 4'b1111 : 4'b0000), .IBUF_DEPTH(3'd1),
      .API_FIFO_DEPTH(3'd3)
    ) u_ep (
      .clk, .reset, .link_up(!reset),
      .med_data_in (h_out[e]), .med_dataready_in (h_out_rdy[e]), .med_read_out (h_out_rd[e]),
      .med_data_out(h_in[e]),  .med_dataready_out(h_in_rdy[e]),  .med_read_in  (h_in_rd[e]),
      .apl_data_in(a_din[e]), .apl_packet_num_in(a_pnin[e]), .apl_dataready_in(a_drin[e]),
      .apl_read_out(a_rdout[e]), .apl_short_transfer_in(a_short[e]), .apl_send_in(a_send[e]),
      .apl_dtype_in(a_dtype[e]), .apl_error_pattern_in(a_err[e]),
      .apl_target_address_in(a_tgt[e]),
      .apl_data_out(a_dout[e]), .apl_packet_num_out(a_pnout[e]), .apl_typ_out(a_typ[e]),
      .apl_dataready_out(a_drout[e]), .apl_read_in(a_rdin[e]), .apl_run_out(a_run[e]),
      .apl_seqnr_out(a_seq[e]), .apl_dtype_out(a_dto[e]),
      .my_address_in(16'h0100 + 16'(e)),
      .stat_stalled(st), .stat_crc_errors(crc), .stat_lost_words(lost), .stat_rr_decisions(rrd)
    );
  end

  // ------------------------------------------------ passive applications
  // Each passive endpoint answers with REPLY_PKTS[e] data packets whose
  // words are {e, channel, index}.
  int reply_pkts [M] = '{0, 5, 3};
  int rx_words   [M][NCH];
  logic [15:0] rx_log [M][NCH][64];
  int sent_replies [M];
  int stall_cycles = 0;

  for (genvar e = 1; e < M; e++) begin : g_fee
    for (genvar c = 0; c < NCH; c++) begin : g_c
      initial begin
        a_rdin[e][c] <= 1'b0;
        a_drin[e][c] <= 1'b0;
        a_send[e][c] <= 1'b0;
        a_short[e][c] <= 1'b0;
        a_din[e][c] <= '0;
        a_pnin[e][c] <= '0;
        a_dtype[e][c] <= '0;
        a_err[e][c] <= 32'h0000_1000 << e;   // distinct per endpoint
        a_tgt[e][c] <= '0;
        rx_words[e][c] = 0;
        @(negedge reset);
        forever begin
          // read the incoming transfer up to its termination
          bit done;
          done = 0;
          a_rdin[e][c] <= 1'b1;
          while (!done) begin
            @(posedge clk);
            if (a_drout[e][c]) begin
              if (a_typ[e][c] == TYPE_DAT) begin
                rx_log[e][c][rx_words[e][c] % 64] = a_dout[e][c];
                rx_words[e][c]++;
              end
              if (a_typ[e][c] == TYPE_TRM && a_pnout[e][c] == 2'd3) done = 1;
            end
          end
          a_rdin[e][c] <= 1'b0;
          // answer: data only on channel 1, short transfer elsewhere
          if (c != 1) a_short[e][c] <= 1'b1;
          else begin
            for (int k = 0; k < reply_pkts[e]; k++)
              for (int w = 1; w <= 3; w++) begin
                a_din[e][c] <= {4'(e), 4'(c), 8'(k * 3 + w)};
                a_pnin[e][c] <= 2'(w);
                a_drin[e][c] <= 1'b1;
                @(posedge clk);
                while (!a_rdout[e][c]) @(posedge clk);
              end
            a_drin[e][c] <= 1'b0;
          end
          a_send[e][c] <= 1'b1;
          @(posedge clk);
          a_send[e][c] <= 1'b0;
          a_short[e][c] <= 1'b0;
          sent_replies[e]++;
        end
      end
    end
  end

  // ------------------------------------------------- active application
  task automatic session(input int c, input int npk, input bit short_t,
                         input logic [15:0] target, output logic [15:0] got [$],
                         output logic [2:0] typs [$]);
    got = {};
    typs = {};
    for (int k = 0; k < npk; k++)
      for (int w = 1; w <= 3; w++) begin
        a_din[0][c] <= 16'hA000 + 16'(k * 3 + w);
        a_pnin[0][c] <= 2'(w);
        a_drin[0][c] <= 1'b1;
        @(posedge clk);
        while (!a_rdout[0][c]) @(posedge clk);
      end
    a_drin[0][c] <= 1'b0;
    a_tgt[0][c] <= target;
    a_dtype[0][c] <= 4'h5;
    a_short[0][c] <= short_t;
    a_send[0][c] <= 1'b1;
    @(posedge clk);
    a_send[0][c] <= 1'b0;
    a_short[0][c] <= 1'b0;
    a_rdin[0][c] <= 1'b1;
    forever begin
      @(posedge clk);
      if (a_drout[0][c]) begin
        got.push_back(a_dout[0][c]);
        typs.push_back(a_typ[0][c]);
        if (a_typ[0][c] == TYPE_TRM && a_pnout[0][c] == 2'd3) break;
      end
    end
    a_rdin[0][c] <= 1'b0;
  endtask

  always @(posedge clk) if (g_ep[0].st != 0 || g_ep[1].st != 0) stall_cycles++;

  initial begin
    logic [15:0] got [$];
    logic [2:0]  typs [$];
    for (int c = 0; c < NCH; c++) begin
      a_rdin[0][c] <= 0; a_drin[0][c] = 0; a_send[0][c] = 0; a_short[0][c] = 0;
      a_din[0][c] <= 0; a_pnin[0][c] = 0; a_dtype[0][c] = 0; a_err[0][c] = 0; a_tgt[0][c] = 0;
    end
    repeat (5) @(posedge clk);
    reset = 0;
    repeat (20) @(posedge clk);

    // ---- data session on channel 1, broadcast, 4 packets out
    session(1, 4, 0, 16'hFFFF, got, typs);
    begin
      int exp_words, idx, e_seen;
      bit  ok_order;
      // expected: per endpoint: HDR(3 words) [DATs] ; merged TRM(3 words)
      exp_words = 0;
      for (int e = 1; e < M; e++) exp_words += 3 + 3 * reply_pkts[e];
      exp_words += 3;
      // every header resent after a port switch adds one packet
      check(got.size() == exp_words + 3 * int'(hres[1]),
            $sformatf("merged reply length %0d, expected %0d + resent headers",
                      got.size(), exp_words));
      // check per-endpoint data order, each data run preceded by its header
      ok_order = 1;
      begin
        int next_k [M];
        int cur_src;
        cur_src = -1;
        for (int e = 0; e < M; e++) next_k[e] = 1;
        for (int i = 0; i < got.size(); i++) begin
          if (typs[i] == TYPE_HDR && (i % 3) == 0) cur_src = int'(got[i]) - 16'h0100;
          if (typs[i] == TYPE_DAT) begin
            if (cur_src < 1 || cur_src >= M) ok_order = 0;
            else begin
              if (got[i] != {4'(cur_src), 4'd1, 8'(next_k[cur_src])}) ok_order = 0;
              next_k[cur_src]++;
            end
          end
        end
        for (int e = 1; e < M; e++)
          check(next_k[e] == 1 + 3 * reply_pkts[e],
                $sformatf("all data words of endpoint %0d arrived", e));
      end
      check(ok_order, "reply data tagged by the right header and in order");
      idx = got.size() - 3;
      check(typs[idx] == TYPE_TRM, "merged termination last");
      check(got[idx + 1][ERR_ENDPOINT_REACHED] == 1'b1, "endpoint reached bit set");
      check(got[idx] == 16'h0000 && got[idx + 1][15:12] == 4'b0110,
            $sformatf("error patterns ORed: %h %h", got[idx], got[idx + 1]));
      check(got[idx + 2][3:0] == 4'h5, "merged termination carries the data type");
      e_seen = 0;
      for (int e = 1; e < M; e++) begin
        bit ok;
        ok = (rx_words[e][1] == 12);
        for (int k = 0; k < 12 && ok; k++)
          if (rx_log[e][1][k] != 16'hA000 + 16'(k + 1)) ok = 0;
        check(ok, $sformatf("endpoint %0d received the init data", e));
      end
    end

    // ---- trigger channel: broadcast short transfer
    session(0, 0, 1, 16'hFFFF, got, typs);
    check(got.size() == 3 && typs[0] == TYPE_TRM, "trigger answered by one merged termination");
    @(posedge clk);
    check(a_seq[1][0] == 8'd0 && a_seq[0][0] == 8'd1, "sequence numbers follow the session");

    // ---- addressed transfer on channel 2: only endpoint 2 (0x0102) answers with bit 0
    session(2, 1, 0, 16'h0102, got, typs);
    check(got.size() == 3 && typs[0] == TYPE_TRM, "short replies merged on channel 2");
    check(rx_words[1][2] == 0 && rx_words[2][2] == 3, "only the addressed endpoint got data");
    check(got[1][ERR_ENDPOINT_REACHED], "addressed endpoint reached");

    // ---- second data session to see the handshake again
    begin
      int h0;
      h0 = int'(hres[1]);
      session(1, 2, 0, 16'hFFFF, got, typs);
      check(got.size() == 3 * (2 + reply_pkts[1] + reply_pkts[2] + int'(hres[1]) - h0) + 3,
            "second data session");
    end
    check(sess[1] == 2 && mtrm[1] == 2, "hub counted two sessions on channel 1");
    check(stall_cycles > 0, "EOB/ACK handshake stalled a sender");
    $display("hub: sessions=%0d merged=%0d hdr_resends=%0d switches=%0d stalls=%0d",
             sess[1], mtrm[1], hres[1], psw[1], stall_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog locked=%b busy0=%b", locked, busy[0]);
    for (int e = 0; e < M; e++) $display("ep%0d run=%b", e, a_run[e]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
