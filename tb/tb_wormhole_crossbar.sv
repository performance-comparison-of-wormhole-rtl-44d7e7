// Directed testbench for wormhole_crossbar (ROUTE_BIT = 1).
// Checks routing by the destination bit, reservation of an output virtual
// channel until the tail flit, interleaving of a hot and a uniform message on
// one output link, round-robin resolution of two inputs asking for one output,
// and blocking by a low ready line of the next stage.
module tb_wormhole_crossbar;
  import wh_pkg::*;
  logic      clk = 0, rst_n = 0;
  flit_t     hot_flit [2], uni_flit [2];
  logic      hot_valid [2], uni_valid [2];
  logic      hot_cand [2], uni_cand [2];
  logic      sel_hot [2], sel_uni [2];
  logic      hot_pop [2], uni_pop [2];
  link_t     out_link [2];
  link_rdy_t out_rdy [2];
  int        checks = 0, failures = 0;

  wormhole_crossbar #(.ROUTE_BIT(1)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic flit_t mk(bit hot, bit head, bit tail, int data);
    flit_t f;
    f.hot = hot; f.head = head; f.tail = tail; f.data = FLIT_DATA_W'(data);
    return f;
  endfunction

  task automatic idle();
    for (int i = 0; i < 2; i++) begin
      hot_valid[i] = 0; uni_valid[i] = 0; sel_hot[i] = 0; sel_uni[i] = 0;
      hot_flit[i] = '0; uni_flit[i] = '0;
      out_rdy[i] = '{hot_rdy: 1'b1, uni_rdy: 1'b1};
    end
  endtask

  // Simple arbiter stand-in: take the uniform buffer when it can go,
  // otherwise the hot latch (the K rule is tested elsewhere).
  task automatic choose();
    #1;
    for (int i = 0; i < 2; i++) begin
      sel_uni[i] = uni_cand[i];
      sel_hot[i] = hot_cand[i] && !uni_cand[i];
    end
    #1;
  endtask

  task automatic tick();
    @(posedge clk); #1;
    for (int i = 0; i < 2; i++) begin sel_hot[i] = 0; sel_uni[i] = 0; end
  endtask

  initial begin
    int wins0;
    idle();
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1; #1;

    // 1) uniform head from input 0 to destination 2 (bit 1 = 1) -> output 1
    uni_valid[0] = 1; uni_flit[0] = mk(0, 1, 0, 2);
    choose();
    check(uni_cand[0] && uni_pop[0], "head can go");
    check(out_link[1].valid && out_link[1].flit == uni_flit[0], "routed to output 1");
    check(!out_link[0].valid, "output 0 idle");
    tick();
    // 2) second uniform head from input 1 to output 1: channel is held
    uni_valid[1] = 1; uni_flit[1] = mk(0, 1, 1, 3);
    uni_flit[0] = mk(0, 0, 0, 16'h1234);
    #1;
    check(!uni_cand[1], "held uniform channel blocks a new head");
    check(uni_cand[0], "body flit follows its path");
    // 3) hot head from input 1 to output 1 may use the hot channel, but the
    //    link carries one flit per cycle: conflict with input 0's body flit
    uni_valid[1] = 0;
    hot_valid[1] = 1; hot_flit[1] = mk(1, 1, 0, 2);
    choose();
    check(hot_cand[1], "hot channel free despite uniform worm");
    check(sel_uni[0] && sel_hot[1], "both inputs want output 1");
    check(hot_pop[1] ^ uni_pop[0], "only one wins the output link");
    wins0 = uni_pop[0];
    check(out_link[1].valid && out_link[1].flit == (wins0 ? uni_flit[0] : hot_flit[1]), "winner flit on link");
    tick();
    // next conflict goes the other way (round robin)
    if (!wins0) hot_flit[1] = mk(1, 0, 0, 16'h0aaa);
    choose();
    check(uni_pop[0] == !wins0 && hot_pop[1] == wins0, "round robin alternates");
    tick();
    if (wins0) hot_flit[1] = mk(1, 0, 0, 16'h0aaa);
    // 4) downstream hot channel not ready blocks only the hot flit
    out_rdy[1].hot_rdy = 0;
    choose();
    check(!hot_cand[1], "hot blocked by next stage");
    check(uni_cand[0] && uni_pop[0], "uniform not blocked");
    tick();
    out_rdy[1].hot_rdy = 1;
    // 5) tail releases the uniform channel
    uni_flit[0] = mk(0, 0, 1, 16'h1235);
    hot_valid[1] = 0;
    choose();
    check(uni_pop[0] && out_link[1].flit.tail, "tail sent");
    tick();
    uni_valid[0] = 0;
    uni_valid[1] = 1; uni_flit[1] = mk(0, 1, 1, 3);
    choose();
    check(uni_cand[1] && uni_pop[1] && out_link[1].valid, "channel free after tail");
    tick();
    uni_valid[1] = 0;
    // 6) hot worm still holds the hot channel: another hot head is blocked
    hot_valid[0] = 1; hot_flit[0] = mk(1, 1, 0, 2);
    #1;
    check(!hot_cand[0], "held hot channel blocks new hot head");
    // 7) same input, body flit of the hot worm uses its stored path even if its
    //    data bit would point elsewhere
    hot_valid[0] = 0;
    hot_valid[1] = 1; hot_flit[1] = mk(1, 0, 1, 16'h0000);
    choose();
    check(hot_pop[1] && out_link[1].valid && !out_link[0].valid, "body follows stored path");
    tick();
    hot_valid[1] = 0;
    // 8) parallel transfers to different outputs in one cycle
    uni_valid[0] = 1; uni_flit[0] = mk(0, 1, 1, 0);
    hot_valid[1] = 1; hot_flit[1] = mk(1, 1, 1, 2);
    choose();
    check(uni_pop[0] && hot_pop[1], "two flits cross in one cycle");
    check(out_link[0].flit == uni_flit[0] && out_link[1].flit == hot_flit[1], "both routed");
    tick();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
