// Testbench for mcube_network at reduced size (N = 16, C = 8, K = 2).
// Every source sends random uniform messages (20 flits, random destination)
// and hot messages (4 flits, to destination 0); the memory side lowers its
// ready lines at random. A checker at each output verifies that every message
// arrives at the output its head names, that its flits are in order, unbroken
// within their class and of the right length, and that every message sent is
// delivered once. It also checks the unloaded latency of one flit per stage.
module tb_mcube_network;
  import wh_pkg::*;
  localparam int unsigned N  = 16;
  localparam int unsigned S  = $clog2(N);
  localparam int unsigned C  = 8;
  localparam int unsigned FU = 20;
  localparam int unsigned FH = 4;

  logic      clk = 0, rst_n = 0;
  link_t     in_link [N];
  link_rdy_t in_rdy [N];
  link_t     out_link [N];
  link_rdy_t out_rdy [N];
  int        checks = 0, failures = 0;

  mcube_network #(.N(N), .C(C), .K(2)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- sources ----
  flit_t src_q [N][$];
  int    sent_msgs = 0, recv_msgs = 0;
  bit    gen_on = 0;
  int    rdy_pct = 80;

  function automatic flit_t mk(bit hot, bit head, bit tail, logic [FLIT_DATA_W-1:0] d);
    flit_t f;
    f.hot = hot; f.head = head; f.tail = tail; f.data = d;
    return f;
  endfunction

  task automatic add_msg(int src, int dst, bit hot);
    int len = hot ? FH : FU;
    for (int k = 0; k < len; k++)
      src_q[src].push_back(mk(hot, k == 0, k == len - 1,
                              (k == 0) ? FLIT_DATA_W'(dst) : FLIT_DATA_W'((src << 5) | k)));
    sent_msgs++;
  endtask

  // ---- checker state per output and class ----
  bit in_msg [N][2];
  int cur_src [N][2];
  int next_idx [N][2];

  always @(negedge clk) if (rst_n) begin
    for (int y = 0; y < N; y++) if (out_link[y].valid) begin
      flit_t f;
      int c;
      f = out_link[y].flit;
      c = int'(f.hot);
      check(f.hot ? out_rdy[y].hot_rdy : out_rdy[y].uni_rdy, "flit only when ready");
      if (f.head) begin
        check(!in_msg[y][c], "head while message open");
        check(int'(f.data) == y, "delivered to its destination");
        in_msg[y][c] = !f.tail;
        next_idx[y][c] = 1;
        cur_src[y][c] = -1;
        if (f.tail) recv_msgs++;
      end else begin
        int s, k;
        s = int'(f.data) >> 5;
        k = int'(f.data) & 31;
        check(in_msg[y][c], "body flit inside a message");
        if (cur_src[y][c] < 0) cur_src[y][c] = s;
        check(s == cur_src[y][c], "flits of one message not interleaved");
        check(k == next_idx[y][c], "flit order");
        next_idx[y][c]++;
        if (f.tail) begin
          check(k + 1 == (c ? FH : FU), "message length");
          in_msg[y][c] = 0;
          recv_msgs++;
        end
      end
    end
  end

  // drive inputs and memory-side ready lines
  always @(posedge clk) begin
    #1;
    for (int y = 0; y < N; y++) begin
      out_rdy[y].hot_rdy = ($urandom % 100) < rdy_pct;
      out_rdy[y].uni_rdy = ($urandom % 100) < rdy_pct;
    end
    if (gen_on)
      for (int x = 0; x < N; x++)
        if (src_q[x].size() < 40 && ($urandom % 100) < 4) begin
          if ($urandom % 4 == 0) add_msg(x, 0, 1);
          else add_msg(x, $urandom % N, 0);
        end
    #1;
    for (int x = 0; x < N; x++) begin
      in_link[x] = '0;
      if (rst_n && src_q[x].size() > 0) begin
        flit_t f;
        f = src_q[x][0];
        if (f.hot ? in_rdy[x].hot_rdy : in_rdy[x].uni_rdy) begin
          in_link[x].valid = 1;
          in_link[x].flit  = f;
          void'(src_q[x].pop_front());
        end
      end
    end
  end

  int full_seen = 0;
  always @(negedge clk) if (rst_n)
    for (int x = 0; x < N; x++) if (!in_rdy[x].uni_rdy) full_seen++;

  initial begin
    int t0, lat;
    for (int x = 0; x < N; x++) begin in_link[x] = '0; out_rdy[x] = '{1'b1, 1'b1}; end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // unloaded latency: one hot flit from source 5 to destination 9
    rdy_pct = 100;
    @(posedge clk);
    add_msg(5, 9, 1);
    t0 = $time;
    lat = 0;
    while (!out_link[9].valid) begin @(negedge clk); lat++; if (lat > 50) break; end
    check(lat == S + 1, $sformatf("unloaded latency %0d half-cycles+ (expected %0d)", lat, S + 1));
    repeat (20) @(posedge clk);
    // random load with memory stalls
    rdy_pct = 80;
    gen_on = 1;
    repeat (3000) @(posedge clk);
    gen_on = 0;
    rdy_pct = 100;
    for (int i = 0; i < 20000 && recv_msgs < sent_msgs; i++) @(posedge clk);
    check(recv_msgs == sent_msgs, $sformatf("all delivered: sent %0d received %0d", sent_msgs, recv_msgs));
    check(full_seen > 0, "input queues filled up (backpressure reached the sources)");
    $display("messages %0d, cycles with a full first-stage queue %0d", sent_msgs, full_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
