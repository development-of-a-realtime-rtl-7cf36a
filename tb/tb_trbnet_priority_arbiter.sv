// tb_trbnet_priority_arbiter: priority decisions with round-robin slots.
//
// Four requesters, RR_RATIO 4. With all requests high, requester 0 must win
// the three priority decisions out of four (and its round-robin turn), and the round-robin slots must serve 1, 2, 3
// in turn. Also checked: the grant is one-hot and only to a requester, no
// grant without requests, and with random requests every requester that
// keeps asking is served (no starvation).
module tb_trbnet_priority_arbiter;
  logic clk = 0, reset = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  logic [3:0] req, grant;
  logic advance, rr_slot;
  trbnet_priority_arbiter #(.N(4), .RR_RATIO(4)) dut (.clk, .reset, .req, .advance, .grant, .rr_slot);
  int wins [4];
  int bad = 0, rr_seen = 0;
  logic [3:0] rr_seq [$];
  initial begin #200000; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
  initial begin
    req <= 0; advance <= 0;
    repeat (3) @(posedge clk);
    reset <= 0;
    @(posedge clk);
    #1 check(grant == 0, "no grant without request");
    req <= 4'hF; advance <= 1;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      if (!$onehot(grant)) bad++;
      for (int k = 0; k < 4; k++) if (grant[k]) wins[k]++;
      if (rr_slot) begin rr_seen++; if (rr_seq.size() < 6) rr_seq.push_back(grant); end
    end
    check(bad == 0, "one-hot grant");
    // 300 priority decisions plus every fourth round-robin slot
    check(wins[0] == 325, $sformatf("priority wins %0d of 400", wins[0]));
    check(wins[1] == 25 && wins[2] == 25 && wins[3] == 25, "round robin serves all");
    check(rr_seen == 100, "every fourth decision is round robin");
    check(rr_seq.size() == 6 && rr_seq[0] != rr_seq[1] && rr_seq[1] != rr_seq[2],
          "round robin rotates");
    for (int k = 0; k < 4; k++) wins[k] = 0;
    bad = 0;
    for (int i = 0; i < 2000; i++) begin
      @(posedge clk);
      req <= 4'($urandom) | 4'b1000;
      advance <= $urandom % 2;
      @(negedge clk);
      if (grant != 0 && ((grant & req) != grant || !$onehot(grant))) bad++;
      for (int k = 0; k < 4; k++) if (grant[k] && advance) wins[k]++;
    end
    check(bad == 0, "grant only to requesters");
    check(wins[3] > 50, "low priority requester not starved");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
