// Testbench for k_arbiter. With both buffers always able to send, the
// alternating priority must give the pattern "hot, then K uniform flits" on
// the crossbar input link, i.e. a hot share of 1/(K+1); a lone candidate must
// always be chosen; K = 0 must give hot flits strict priority. A lost output
// arbitration (no transfer) must leave the counter alone.
module tb_k_arbiter;
  logic clk = 0, rst_n = 0;
  int   checks = 0, failures = 0;

  logic hc2, uc2, sh2, su2, xh2, xu2;
  logic hc0, uc0, sh0, su0, xh0, xu0;

  k_arbiter #(.K(2)) dut2 (.clk, .rst_n, .hot_cand(hc2), .uni_cand(uc2),
    .sel_hot(sh2), .sel_uni(su2), .xfer_hot(xh2), .xfer_uni(xu2));
  k_arbiter #(.K(0)) dut0 (.clk, .rst_n, .hot_cand(hc0), .uni_cand(uc0),
    .sel_hot(sh0), .sel_uni(su0), .xfer_hot(xh0), .xfer_uni(xu0));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Independent reference: number of uniform flits since the last hot flit.
  int uni_since_hot = 1000;

  initial begin
    int hot_cnt = 0, total = 0;
    {hc2, uc2, xh2, xu2, hc0, uc0, xh0, xu0} = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // 1) both candidates every cycle, every choice transfers: pattern H U U H U U
    for (int i = 0; i < 30; i++) begin
      hc2 = 1; uc2 = 1; #1;
      check(sh2 ^ su2, "exactly one selected");
      check(sh2 == (i % 3 == 0), "H U U pattern");
      xh2 = sh2; xu2 = su2;
      hot_cnt += sh2; total++;
      @(posedge clk); #1;
      xh2 = 0; xu2 = 0;
    end
    check(hot_cnt * 3 == total, "hot share 1/(K+1)");
    // 2) random candidates and random lost arbitration, against the reference
    uni_since_hot = 2;  // state after the pattern above: 30 cycles end with U U
    for (int i = 0; i < 3000; i++) begin
      bit lose;
      hc2 = $urandom % 2; uc2 = $urandom % 2; lose = ($urandom % 4 == 0);
      #1;
      if (hc2 && uc2)      check(sh2 == (uni_since_hot >= 2) && su2 == !sh2, "priority by K");
      else if (hc2)        check(sh2 && !su2, "lone hot chosen");
      else if (uc2)        check(su2 && !sh2, "lone uniform chosen");
      else                 check(!sh2 && !su2, "nothing chosen");
      xh2 = sh2 && !lose; xu2 = su2 && !lose;
      @(posedge clk); #1;
      if (xh2) uni_since_hot = 0;
      else if (xu2) uni_since_hot++;
      xh2 = 0; xu2 = 0;
    end
    // 3) K = 0: hot strictly first
    for (int i = 0; i < 20; i++) begin
      hc0 = 1; uc0 = 1; #1;
      check(sh0 && !su0, "K=0 hot priority");
      xh0 = sh0; xu0 = su0;
      @(posedge clk); #1;
      xh0 = 0; xu0 = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
