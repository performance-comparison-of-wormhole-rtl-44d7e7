// Testbench for source_queue (DEPTH = 16). A processor model writes random
// flits of both classes; the network side raises each class's ready line at
// random. Checks: flits leave in write order, a front flit only leaves when
// the ready line of its class is high, a blocked hot front flit holds back the
// uniform flits behind it, the fill level, and processor stall when full.
module tb_source_queue;
  import wh_pkg::*;
  localparam int unsigned DEPTH = 16;
  logic      clk = 0, rst_n = 0;
  logic      proc_valid = 0;
  flit_t     proc_flit = '0;
  logic      proc_ready;
  link_t     net_link;
  link_rdy_t net_rdy = '0;
  logic [$clog2(DEPTH+1)-1:0] level;
  int        checks = 0, failures = 0;
  flit_t     model [$];
  int        stalls = 0;

  source_queue #(.DEPTH(DEPTH)) dut (.*);

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

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    @(posedge clk) #1;
    for (int i = 0; i < 4000; i++) begin
      bit exp_send;
      // network readiness: long hot stalls in the middle of the run
      net_rdy.uni_rdy = ($urandom % 100) < 40;
      net_rdy.hot_rdy = (i > 1000 && i < 1500) ? 1'b0 : (($urandom % 100) < 40);
      proc_valid = ($urandom % 100) < 45;
      proc_flit  = flit_t'($urandom);
      #1;
      exp_send = model.size() > 0 &&
                 (model[0].hot ? net_rdy.hot_rdy : net_rdy.uni_rdy);
      check(net_link.valid == exp_send, "send only when the class is ready");
      if (exp_send) check(net_link.flit == model[0], "order kept");
      check(proc_ready == (model.size() < DEPTH || exp_send), "processor ready");
      check(int'(level) == model.size(), "fill level");
      if (proc_valid && !proc_ready) stalls++;
      @(posedge clk);
      if (exp_send) void'(model.pop_front());
      if (proc_valid && proc_ready) model.push_back(proc_flit);
      #1;
    end
    check(stalls > 0, "processor stalled by a full queue");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
