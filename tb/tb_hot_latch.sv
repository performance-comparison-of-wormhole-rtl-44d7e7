// Testbench for hot_latch: fill, hold, refill in the cycle it empties, and
// ready behaviour, checked against a one-entry model.
module tb_hot_latch;
  import wh_pkg::*;
  logic  clk = 0, rst_n = 0;
  logic  push = 0, pop = 0;
  flit_t in_flit = '0, out_flit;
  logic  in_ready, out_valid;
  int    checks = 0, failures = 0;
  bit    m_valid = 0;
  flit_t m_flit;

  hot_latch dut (.*);

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
    #1 check(!out_valid && in_ready, "empty and ready after reset");
    for (int i = 0; i < 2000; i++) begin
      bit p, q;
      q = m_valid && ($urandom % 2 == 0);
      p = ($urandom % 3 != 0) && (!m_valid || q);
      pop = q; push = p;
      in_flit = flit_t'($urandom);
      in_flit.hot = 1'b1;
      #1;
      check(in_ready == (!m_valid || q), "in_ready");
      @(posedge clk);
      if (p) begin m_valid = 1; m_flit = in_flit; end
      else if (q) m_valid = 0;
      #1;
      push = 0; pop = 0;
      check(out_valid == m_valid, "out_valid");
      if (m_valid) check(out_flit == m_flit, "stored flit");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
