// Testbench for uniform_queue at its default depth (200 flits).
// Random pushes and pops are checked against a queue model: order, occupancy
// count, ready while full, and that a full queue accepts a flit in the cycle
// its front flit leaves. Also checks the one-cycle write-to-read latency.
module tb_uniform_queue;
  import wh_pkg::*;
  localparam int unsigned DEPTH = 200;

  logic  clk = 0, rst_n = 0;
  logic  push = 0, pop = 0;
  flit_t in_flit = '0, out_flit;
  logic  in_ready, out_valid;
  logic [$clog2(DEPTH+1)-1:0] count;
  int    checks = 0, failures = 0;
  flit_t model [$];

  uniform_queue #(.DEPTH(DEPTH)) dut (.*);

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

  task automatic step(input bit do_push, input bit do_pop);
    push = do_push; pop = do_pop;
    in_flit = flit_t'($urandom);
    #1;
    if (do_push) check(in_ready, "in_ready when pushing");
    @(posedge clk);
    if (do_pop && model.size() > 0) void'(model.pop_front());
    if (do_push) model.push_back(in_flit);
    #1;
    push = 0; pop = 0;
    check(int'(count) == model.size(), "count");
    check(out_valid == (model.size() != 0), "out_valid");
    if (model.size() != 0) check(out_flit == model[0], "front flit");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    #1;
    check(!out_valid && count == 0, "empty after reset");
    // latency: written in one cycle, visible in the next
    step(1, 0);
    check(out_valid, "one-cycle latency");
    step(0, 1);
    // fill completely
    for (int i = 0; i < DEPTH; i++) step(1, 0);
    #1;
    check(!in_ready, "not ready when full");
    check(int'(count) == DEPTH, "full count");
    // full queue with simultaneous pop accepts a push
    pop = 1; #1;
    check(in_ready, "flow-through ready when full and popping");
    pop = 0;
    for (int i = 0; i < 10; i++) step(1, 1);
    // drain
    for (int i = 0; i < DEPTH; i++) step(0, 1);
    check(count == 0, "drained");
    // random traffic
    for (int i = 0; i < 3000; i++) begin
      bit p, q;
      p = ($urandom % 3 != 0) && (model.size() < DEPTH);
      q = ($urandom % 2 == 0) && (model.size() > 0);
      step(p, q);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
