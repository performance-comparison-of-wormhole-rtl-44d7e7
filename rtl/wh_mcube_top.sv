// Shared-memory multiprocessor interconnect: N source queues in front of an
// N x N wormhole-routing multistage cube network of 2x2 priority switches.
//
// Processor x writes marked flits into its source queue; the queue injects
// them into network input x; network output y leads to memory module y. The
// processors and memory modules are outside this design: their sides are the
// ports below. Defaults are the evaluated configuration: N = 1024, C = 200
// flit uniform queues, K = 2. SRC_DEPTH is this design's own choice.
//
// Interface (all arrays indexed by processor / memory number):
//   proc_valid/proc_flit/proc_ready  flit write into the source queue
//   src_level                        flits waiting in each source queue
//   mem_link/mem_rdy                 network outputs; a memory module lowers the
//                                    ready line of a class to stall it
// Timing: one cycle in the source queue plus one per stage for an unblocked
// flit, i.e. log2(N)+1 cycles from write to output.
module wh_mcube_top
  import wh_pkg::*;
#(
  parameter int unsigned N         = 1024,
  parameter int unsigned C         = 200,
  parameter int unsigned K         = 2,
  parameter int unsigned SRC_DEPTH = 256
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      proc_valid [N],
  input  flit_t     proc_flit  [N],
  output logic      proc_ready [N],
  output logic [$clog2(SRC_DEPTH+1)-1:0] src_level [N],
  output link_t     mem_link   [N],
  input  link_rdy_t mem_rdy    [N]
);
  link_t     net_in  [N];
  link_rdy_t net_rdy [N];

  for (genvar x = 0; x < N; x++) begin : g_src
    source_queue #(.DEPTH(SRC_DEPTH)) u_sq (
      .clk, .rst_n,
      .proc_valid(proc_valid[x]),
      .proc_flit (proc_flit[x]),
      .proc_ready(proc_ready[x]),
      .net_link  (net_in[x]),
      .net_rdy   (net_rdy[x]),
      .level     (src_level[x])
    );
  end

  mcube_network #(.N(N), .C(C), .K(K)) u_net (
    .clk, .rst_n,
    .in_link (net_in),
    .in_rdy  (net_rdy),
    .out_link(mem_link),
    .out_rdy (mem_rdy)
  );

endmodule
