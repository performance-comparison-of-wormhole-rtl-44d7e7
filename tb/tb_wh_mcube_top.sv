// End-to-end testbench for wh_mcube_top at reduced size: N = 32 processors
// and memories (5 stages), C = 20 flit uniform queues, K = 2, 64-flit source
// queues.
//
// Workload: a temporary hot-spot. Every processor produces uniform messages of
// FU = 20 flits to random memories at a load of LAMBDA = 0.5 flits per cycle,
// and sends one hot message of FH = 4 flits to memory 0 at a time drawn from a
// normal distribution (mean MU, deviation SIGMA; the mean is scaled down from
// 4000 to fit the run). Memories stall a class now and then. A processor model
// keeps the messages it cannot write yet, so nothing is lost.
//
// Checks: unloaded latency of log2(N)+1 cycles, every message delivered once,
// intact and to the memory its head names. Counted mechanisms (each must occur):
// a full uniform queue (saturation tree), a hot flit held in its latch, the
// K rule giving a hot flit priority, the K rule giving a uniform flit priority,
// two inputs of a switch contending for one output, a head flit waiting for a
// held output channel, a processor stalled by its full source queue, and a
// memory stall. It prints the hot-spot phase length and the mean delay of
// uniform messages before, during and after the hot-spot.
module tb_wh_mcube_top;
  import wh_pkg::*;
  localparam int unsigned N         = 32;
  localparam int unsigned S         = $clog2(N);
  localparam int unsigned C         = 20;
  localparam int unsigned SRC_DEPTH = 64;
  localparam int unsigned FU        = 20;
  localparam int unsigned FH        = 4;
  localparam real         LAMBDA    = 0.5;
  localparam int          MU        = 800;
  localparam int          SIGMA     = 50;
  localparam int          GEN_END   = 2000;

  logic      clk = 0, rst_n = 0;
  logic      proc_valid [N];
  flit_t     proc_flit  [N];
  logic      proc_ready [N];
  logic [$clog2(SRC_DEPTH+1)-1:0] src_level [N];
  link_t     mem_link   [N];
  link_rdy_t mem_rdy    [N];
  int        checks = 0, failures = 0;
  int        cycle = 0;

  wh_mcube_top #(.N(N), .C(C), .K(2), .SRC_DEPTH(SRC_DEPTH)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at cycle %0d", what, cycle); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- processors ----------------
  flit_t backlog [N][$];
  int    gen_time [N][N][2][$];  // [src][dst][class] generation cycles, in order
  int    hot_time [N];
  int    sent_msgs = 0, recv_msgs = 0;
  bit    gen_on = 0;
  int    mem_stall_pct = 0;

  function automatic flit_t mk(bit hot, bit head, bit tail, logic [FLIT_DATA_W-1:0] d);
    flit_t f;
    f.hot = hot; f.head = head; f.tail = tail; f.data = d;
    return f;
  endfunction

  task automatic add_msg(int src, int dst, bit hot);
    int len = hot ? FH : FU;
    for (int k = 0; k < len; k++)
      backlog[src].push_back(mk(hot, k == 0, k == len - 1,
                                (k == 0) ? FLIT_DATA_W'(dst) : FLIT_DATA_W'((src << 5) | k)));
    gen_time[src][dst][hot].push_back(cycle);
    sent_msgs++;
  endtask

  // approximately normal: sum of 12 uniform numbers in [0,1)
  function automatic int normal_time(int mu, int sigma);
    real z = 0.0;
    for (int i = 0; i < 12; i++) z += real'($urandom % 10000) / 10000.0;
    return mu + int'((z - 6.0) * real'(sigma));
  endfunction

  // ---------------- statistics ----------------
  int first_hot_inject = -1, last_hot_deliver = -1;
  longint uni_delay_sum [3];
  int     uni_delay_n [3];
  int     uhot_delay_sum = 0, uhot_n = 0;

  // ---------------- output checker ----------------
  bit in_msg [N][2];
  int cur_src [N][2];
  int next_idx [N][2];

  always @(negedge clk) if (rst_n) begin
    for (int y = 0; y < N; y++) if (mem_link[y].valid) begin
      flit_t f;
      int c, s, k;
      f = mem_link[y].flit;
      c = int'(f.hot);
      check(f.hot ? mem_rdy[y].hot_rdy : mem_rdy[y].uni_rdy, "flit only when memory ready");
      if (f.head) begin
        check(!in_msg[y][c], "head while message open");
        check(int'(f.data) == y, "delivered to its destination");
        in_msg[y][c] = 1;
        next_idx[y][c] = 1;
        cur_src[y][c] = -1;
      end else begin
        s = int'(f.data) >> 5;
        k = int'(f.data) & 31;
        check(in_msg[y][c], "body flit inside a message");
        if (cur_src[y][c] < 0) cur_src[y][c] = s;
        check(s == cur_src[y][c], "flits of one message not interleaved");
        check(k == next_idx[y][c], "flit order");
        next_idx[y][c]++;
        if (f.tail) begin
          int t0, d, ph;
          check(k + 1 == (c != 0 ? FH : FU), "message length");
          in_msg[y][c] = 0;
          recv_msgs++;
          if (gen_time[s][y][c].size() == 0) begin
            check(0, "message delivered twice");
          end else begin
            t0 = gen_time[s][y][c].pop_front();
            d  = cycle - t0;
            if (c != 0) last_hot_deliver = cycle;
            else if (y == 0) begin uhot_delay_sum += d; uhot_n++; end
            else begin
              ph = (t0 < MU - 3 * SIGMA) ? 0 : (first_hot_inject >= 0 && last_hot_deliver >= 0 &&
                    hots_left == 0) ? 2 : 1;
              uni_delay_sum[ph] += longint'(d); uni_delay_n[ph]++;
            end
          end
        end
      end
    end
  end

  int hots_left = N;
  always @(negedge clk) if (rst_n)
    for (int y = 0; y < 1; y++)
      if (mem_link[0].valid && mem_link[0].flit.hot && mem_link[0].flit.tail) hots_left--;

  // ---------------- drive processors and memories ----------------
  always @(posedge clk) begin
    #1;
    for (int y = 0; y < N; y++) begin
      mem_rdy[y].hot_rdy = ($urandom % 100) >= mem_stall_pct;
      mem_rdy[y].uni_rdy = ($urandom % 100) >= mem_stall_pct;
    end
    if (gen_on) begin
      for (int x = 0; x < N; x++) begin
        if (real'($urandom % 100000) / 100000.0 < LAMBDA / real'(FU))
          add_msg(x, $urandom % N, 0);
        if (cycle == hot_time[x]) add_msg(x, 0, 1);
      end
    end
    #1;
    for (int x = 0; x < N; x++) begin
      proc_valid[x] = rst_n && backlog[x].size() > 0;
      proc_flit[x]  = proc_valid[x] ? backlog[x][0] : '0;
    end
    #1;
    for (int x = 0; x < N; x++) begin
      if (proc_valid[x] && !proc_ready[x]) n_src_stall++;
      if (proc_valid[x] && proc_ready[x]) begin
        if (proc_flit[x].hot && proc_flit[x].head && first_hot_inject < 0) first_hot_inject = cycle;
        void'(backlog[x].pop_front());
      end
    end
  end

  // ---------------- mechanism counters ----------------
  int n_uq_full = 0, n_hot_wait = 0, n_k_hot = 0, n_k_uni = 0;
  int n_conflict = 0, n_vc_held = 0, n_src_stall = 0, n_mem_stall = 0;

  for (genvar p = 0; p < S; p++) begin : g_mon_stage
    for (genvar j = 0; j < N / 2; j++) begin : g_mon_box
      for (genvar q = 0; q < 2; q++) begin : g_mon_port
        always @(negedge clk) if (rst_n) begin
          if (!dut.u_net.g_stage[p].g_box[j].u_sw.in_rdy[q].uni_rdy) n_uq_full++;
          if (dut.u_net.g_stage[p].g_box[j].u_sw.hot_valid[q] &&
              !dut.u_net.g_stage[p].g_box[j].u_sw.hot_cand[q]) n_hot_wait++;
          if (dut.u_net.g_stage[p].g_box[j].u_sw.hot_cand[q] &&
              dut.u_net.g_stage[p].g_box[j].u_sw.uni_cand[q]) begin
            if (dut.u_net.g_stage[p].g_box[j].u_sw.sel_hot[q]) n_k_hot++;
            else n_k_uni++;
          end
          if (dut.u_net.g_stage[p].g_box[j].u_sw.uni_valid[q] &&
              dut.u_net.g_stage[p].g_box[j].u_sw.uni_flit[q].head &&
              dut.u_net.g_stage[p].g_box[j].u_sw.u_xbar.busy_q
                [dut.u_net.g_stage[p].g_box[j].u_sw.u_xbar.uni_out[q]][0]) n_vc_held++;
        end
      end
      always @(negedge clk) if (rst_n)
        if (dut.u_net.g_stage[p].g_box[j].u_sw.u_xbar.req[0] &&
            dut.u_net.g_stage[p].g_box[j].u_sw.u_xbar.req[1] &&
            dut.u_net.g_stage[p].g_box[j].u_sw.u_xbar.req_out[0] ==
            dut.u_net.g_stage[p].g_box[j].u_sw.u_xbar.req_out[1]) n_conflict++;
    end
  end

  always @(negedge clk) if (rst_n)
    for (int y = 0; y < N; y++)
      if (!mem_rdy[y].hot_rdy || !mem_rdy[y].uni_rdy) n_mem_stall++;

  initial begin
    int lat;
    for (int x = 0; x < N; x++) begin
      proc_valid[x] = 0; proc_flit[x] = '0; mem_rdy[x] = '{1'b1, 1'b1};
      hot_time[x] = normal_time(MU, SIGMA);
    end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // unloaded latency: processor 7 writes a one-flit uniform message to memory 21
    @(posedge clk);
    add_msg(7, 21, 0);
    backlog[7].delete();
    backlog[7].push_back(mk(0, 1, 1, 16'(21)));
    lat = 0;
    while (!mem_link[21].valid && lat < 100) begin @(negedge clk); lat++; end
    check(lat == S + 2, $sformatf("unloaded latency %0d cycles (expected %0d)", lat - 1, S + 1));
    // the one-flit message closes immediately: account for it by hand
    @(posedge clk);
    sent_msgs--; void'(gen_time[7][21][0].pop_front());
    in_msg[21][0] = 0;
    repeat (10) @(posedge clk);
    // hot-spot workload
    mem_stall_pct = 2;
    gen_on = 1;
    while (cycle < GEN_END) @(posedge clk);
    gen_on = 0;
    mem_stall_pct = 0;
    for (int i = 0; i < 40000 && recv_msgs < sent_msgs; i++) @(posedge clk);
    check(recv_msgs == sent_msgs, $sformatf("all delivered: sent %0d received %0d", sent_msgs, recv_msgs));
    check(hots_left == 0, "every hot message delivered");
    $display("hot-spot phase: first hot injection at %0d, last hot delivery at %0d, length %0d cycles",
             first_hot_inject, last_hot_deliver, last_hot_deliver - first_hot_inject);
    for (int ph = 0; ph < 3; ph++)
      $display("uniform messages %s: %0d, mean delay %0d cycles",
               ph == 0 ? "before the hot-spot" : ph == 1 ? "during the hot-spot" : "after the hot messages",
               uni_delay_n[ph], uni_delay_n[ph] ? uni_delay_sum[ph] / uni_delay_n[ph] : 0);
    $display("uniform-hot messages: %0d, mean delay %0d cycles", uhot_n, uhot_n ? uhot_delay_sum / uhot_n : 0);
    $display("mechanisms: queue full %0d, hot held %0d, K->hot %0d, K->uniform %0d, output conflict %0d, channel held %0d, source stall %0d, memory stall %0d",
             n_uq_full, n_hot_wait, n_k_hot, n_k_uni, n_conflict, n_vc_held, n_src_stall, n_mem_stall);
    check(n_uq_full > 0,   "saturation: a uniform queue filled");
    check(n_hot_wait > 0,  "a hot flit waited in its latch");
    check(n_k_hot > 0,     "K rule gave a hot flit priority");
    check(n_k_uni > 0,     "K rule gave a uniform flit priority");
    check(n_conflict > 0,  "output contention");
    check(n_vc_held > 0,   "head waited for a held channel");
    check(n_src_stall > 0, "processor stalled by a full source queue");
    check(n_mem_stall > 0, "memory stall");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
