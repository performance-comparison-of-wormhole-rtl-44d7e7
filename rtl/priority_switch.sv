// 2x2 wormhole-routing priority switch box.
//
// Every input port has a uniform flit queue (C flits) and, in parallel, a
// one-flit hot latch; the two form the port's two virtual channels. Arriving
// flits are steered by their class mark: hot flits into the latch, uniform
// flits into the queue. An alternating-priority arbiter with a K-counter at
// each input port decides which of the two buffers uses the port's crossbar
// input link in a cycle, so at most two flits cross the switch per cycle, one
// per input port. The crossbar routes head flits by destination bit ROUTE_BIT
// and holds each output virtual channel for one message until its tail.
// Hot and uniform flits share the inter-stage links; the backward direction
// has one ready line per class. This structure, C = 200 and K = 2 follow the
// switch description; see the crossbar and arbiter headers for the choices
// made where it is silent.
//
// Interface: `in_link[p]`/`in_rdy[p]` connect to the previous stage (or the
// source queue), `out_link[p]`/`out_rdy[p]` to the next stage (or the memory
// module). A sender may drive a flit only when the ready line of its class is
// high. Port 0 is the upper port, port 1 the lower one.
// Timing: a flit written into a buffer can leave in the next cycle, giving one
// cycle per stage without contention. Ready lines are combinational from the
// next stage's ready lines.
module priority_switch
  import wh_pkg::*;
#(
  parameter int unsigned C         = 200,
  parameter int unsigned K         = 2,
  parameter int unsigned ROUTE_BIT = 0
) (
  input  logic      clk,
  input  logic      rst_n,
  input  link_t     in_link  [2],
  output link_rdy_t in_rdy   [2],
  output link_t     out_link [2],
  input  link_rdy_t out_rdy  [2]
);
  flit_t hot_flit [2], uni_flit [2];
  logic  hot_valid [2], uni_valid [2];
  logic  hot_cand [2], uni_cand [2];
  logic  sel_hot [2], sel_uni [2];
  logic  hot_pop [2], uni_pop [2];
  logic  hot_in_rdy [2], uni_in_rdy [2];

  for (genvar p = 0; p < 2; p++) begin : g_port
    uniform_queue #(.DEPTH(C)) u_uq (
      .clk, .rst_n,
      .push     (in_link[p].valid && !in_link[p].flit.hot),
      .in_flit  (in_link[p].flit),
      .in_ready (uni_in_rdy[p]),
      .pop      (uni_pop[p]),
      .out_flit (uni_flit[p]),
      .out_valid(uni_valid[p]),
      .count    ()
    );

    hot_latch u_hl (
      .clk, .rst_n,
      .push     (in_link[p].valid && in_link[p].flit.hot),
      .in_flit  (in_link[p].flit),
      .in_ready (hot_in_rdy[p]),
      .pop      (hot_pop[p]),
      .out_flit (hot_flit[p]),
      .out_valid(hot_valid[p])
    );

    k_arbiter #(.K(K)) u_karb (
      .clk, .rst_n,
      .hot_cand (hot_cand[p]),
      .uni_cand (uni_cand[p]),
      .sel_hot  (sel_hot[p]),
      .sel_uni  (sel_uni[p]),
      .xfer_hot (hot_pop[p]),
      .xfer_uni (uni_pop[p])
    );

    assign in_rdy[p].hot_rdy = hot_in_rdy[p];
    assign in_rdy[p].uni_rdy = uni_in_rdy[p];
  end

  wormhole_crossbar #(.ROUTE_BIT(ROUTE_BIT)) u_xbar (
    .clk, .rst_n,
    .hot_flit, .hot_valid, .uni_flit, .uni_valid,
    .hot_cand, .uni_cand, .sel_hot, .sel_uni,
    .hot_pop, .uni_pop,
    .out_link, .out_rdy
  );

endmodule
