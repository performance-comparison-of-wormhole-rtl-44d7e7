// 2x2 crossbar with wormhole path holding for two virtual channels.
//
// Each input port offers at most one flit per cycle, taken either from its hot
// latch or from its uniform queue (the choice is made by the input's K-counter
// arbiter). Each output port drives one inter-stage link that carries at most
// one flit per cycle, of either class. The crossbar:
//   * routes a head flit by bit ROUTE_BIT of its destination (0 = upper output
//     0, 1 = lower output 1), as in a multistage cube network stage;
//   * reserves the output's virtual channel of the head flit's class for that
//     message until its tail flit has passed (wormhole routing), so the hot and
//     the uniform message on one link may interleave flit by flit, but two
//     messages of one class never do;
//   * reports, per input buffer, whether its front flit could advance now
//     (`hot_cand`, `uni_cand`): its output virtual channel is free (head flit)
//     or already held by its message (body flit), and the next stage is ready
//     for its class;
//   * resolves the case of both inputs selecting the same output in one cycle
//     with a round-robin pointer per output; the losing input sends nothing
//     in that cycle.
// Routing by destination bit, wormhole switching and the one-flit-per-link
// rule follow the network description. The per-class path reservation and
// the round-robin output arbitration are this design's own choices, since the
// description leaves output conflicts open.
//
// Timing: candidates, grants and output links are combinational from the
// buffer fronts, the downstream ready lines and the path registers; the path
// registers and round-robin pointers update on the rising clock edge.
module wormhole_crossbar
  import wh_pkg::*;
#(
  parameter int unsigned ROUTE_BIT = 0
) (
  input  logic      clk,
  input  logic      rst_n,
  // front flits of the input buffers
  input  flit_t     hot_flit  [2],
  input  logic      hot_valid [2],
  input  flit_t     uni_flit  [2],
  input  logic      uni_valid [2],
  // eligibility to and choice from the per-input arbiters
  output logic      hot_cand  [2],
  output logic      uni_cand  [2],
  input  logic      sel_hot   [2],
  input  logic      sel_uni   [2],
  // buffer read strobes (the flit crossed the switch)
  output logic      hot_pop   [2],
  output logic      uni_pop   [2],
  // output links and the next stage's ready lines
  output link_t     out_link  [2],
  input  link_rdy_t out_rdy   [2]
);
  // Path state per input and class: output held by the message in progress.
  logic       route_q [2][2];   // [input][vc]
  // Output virtual channel reserved by a message whose tail has not passed.
  logic       busy_q  [2][2];   // [output][vc]
  logic       rr_q    [2];      // [output] input that wins the next conflict

  function automatic logic vc_ready(input link_rdy_t r, input logic hot);
    return hot ? r.hot_rdy : r.uni_rdy;
  endfunction

  logic  hot_out [2], uni_out [2];
  logic  req [2], req_out [2];
  flit_t req_flit [2];
  logic  grant [2];

  always_comb begin
    for (int i = 0; i < 2; i++) begin
      hot_out[i]  = hot_flit[i].head ? hot_flit[i].data[ROUTE_BIT] : route_q[i][VC_HOT];
      uni_out[i]  = uni_flit[i].head ? uni_flit[i].data[ROUTE_BIT] : route_q[i][VC_UNI];
      hot_cand[i] = hot_valid[i]
                    && (!hot_flit[i].head || !busy_q[hot_out[i]][VC_HOT])
                    && vc_ready(out_rdy[hot_out[i]], 1'b1);
      uni_cand[i] = uni_valid[i]
                    && (!uni_flit[i].head || !busy_q[uni_out[i]][VC_UNI])
                    && vc_ready(out_rdy[uni_out[i]], 1'b0);
    end
  end

  always_comb begin
    for (int i = 0; i < 2; i++) begin
      req[i]      = sel_hot[i] || sel_uni[i];
      req_out[i]  = sel_hot[i] ? hot_out[i] : uni_out[i];
      req_flit[i] = sel_hot[i] ? hot_flit[i] : uni_flit[i];
    end
    // Output conflict: both inputs want the same output.
    if (req[0] && req[1] && (req_out[0] == req_out[1])) begin
      grant[0] = (rr_q[req_out[0]] == 1'b0);
      grant[1] = (rr_q[req_out[0]] == 1'b1);
    end else begin
      grant[0] = req[0];
      grant[1] = req[1];
    end
    for (int o = 0; o < 2; o++) out_link[o] = '0;
    for (int i = 0; i < 2; i++) begin
      hot_pop[i] = grant[i] && sel_hot[i];
      uni_pop[i] = grant[i] && sel_uni[i];
      if (grant[i]) begin
        out_link[req_out[i]].valid = 1'b1;
        out_link[req_out[i]].flit  = req_flit[i];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      route_q <= '{default: '0};
      busy_q  <= '{default: '0};
      rr_q    <= '{default: '0};
    end else begin
      if (req[0] && req[1] && (req_out[0] == req_out[1]))
        rr_q[req_out[0]] <= ~rr_q[req_out[0]];
      for (int i = 0; i < 2; i++) begin
        if (grant[i]) begin
          if (req_flit[i].head) route_q[i][req_flit[i].hot] <= req_out[i];
          // Reserve on a head flit, release on the tail flit.
          busy_q[req_out[i]][req_flit[i].hot] <= !req_flit[i].tail;
        end
      end
    end
  end

  // A body flit always finds its path reserved.
  for (genvar i = 0; i < 2; i++) begin : g_chk
    a_body_on_path: assert property (@(posedge clk) disable iff (!rst_n)
      grant[i] && !req_flit[i].head |-> busy_q[req_out[i]][req_flit[i].hot]);
    a_one_sel: assert property (@(posedge clk) disable iff (!rst_n) !(sel_hot[i] && sel_uni[i]));
  end
  a_one_per_link: assert property (@(posedge clk) disable iff (!rst_n)
    !(grant[0] && grant[1] && req_out[0] == req_out[1]));

endmodule
