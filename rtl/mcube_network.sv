// N x N multistage cube network built from 2x2 priority switches.
//
// The network has s = log2(N) stages of N/2 switch boxes; consecutive stages
// are joined by N links. Links keep their label from stage to stage. The
// stage at position p (p = 0 next to the processors) pairs the two links whose
// labels differ only in bit b = s-1-p: its box j takes link `lo` (bit b = 0)
// on its upper port and link `lo | 2^b` on its lower port, and hands a head
// flit to the output link whose bit b equals bit b of the destination. After
// the last stage the link label equals the destination, so every source
// reaches every destination over a unique path. A 1024 x 1024 network
// (s = 10) with C = 200 and K = 2 is the evaluated configuration and the
// default here. The topology follows the network description (generalized
// cube form of the multistage cube); the link-label convention is this design's
// own.
//
// Interface: `in_link[x]`/`in_rdy[x]` is the input of processor x, and
// `out_link[y]`/`out_rdy[y]` the output to memory module y. A sender must
// hold a flit of a class back while that class's ready line is low.
// Timing: one cycle per stage for an unblocked flit. The ready lines form a
// combinational path from the memory side through all stages to the inputs.
module mcube_network
  import wh_pkg::*;
#(
  parameter int unsigned N = 1024,
  parameter int unsigned C = 200,
  parameter int unsigned K = 2
) (
  input  logic      clk,
  input  logic      rst_n,
  input  link_t     in_link  [N],
  output link_rdy_t in_rdy   [N],
  output link_t     out_link [N],
  input  link_rdy_t out_rdy  [N]
);
  localparam int unsigned S = $clog2(N);

  // Links between stages: g_lnk[p] are the inputs of stage p; g_lnk[S] the
  // network outputs. Separate scopes per stage keep each level its own signal.
  for (genvar p = 0; p <= S; p++) begin : g_lnk
    link_t     lnk [N];
    link_rdy_t rdy [N];
  end

  for (genvar x = 0; x < N; x++) begin : g_io
    assign g_lnk[0].lnk[x] = in_link[x];
    assign in_rdy[x]       = g_lnk[0].rdy[x];
    assign out_link[x]     = g_lnk[S].lnk[x];
    assign g_lnk[S].rdy[x] = out_rdy[x];
  end

  for (genvar p = 0; p < S; p++) begin : g_stage
    localparam int unsigned B = S - 1 - p;
    for (genvar j = 0; j < N / 2; j++) begin : g_box
      localparam int unsigned LO = ((j >> B) << (B + 1)) | (j & ((1 << B) - 1));
      localparam int unsigned HI = LO | (1 << B);
      link_t     sw_in  [2];
      link_rdy_t sw_irdy[2];
      link_t     sw_out [2];
      link_rdy_t sw_ordy[2];

      assign sw_in[0]          = g_lnk[p].lnk[LO];
      assign sw_in[1]          = g_lnk[p].lnk[HI];
      assign g_lnk[p].rdy[LO]  = sw_irdy[0];
      assign g_lnk[p].rdy[HI]  = sw_irdy[1];
      assign g_lnk[p+1].lnk[LO] = sw_out[0];
      assign g_lnk[p+1].lnk[HI] = sw_out[1];
      assign sw_ordy[0]        = g_lnk[p+1].rdy[LO];
      assign sw_ordy[1]        = g_lnk[p+1].rdy[HI];

      priority_switch #(.C(C), .K(K), .ROUTE_BIT(B)) u_sw (
        .clk, .rst_n,
        .in_link (sw_in),
        .in_rdy  (sw_irdy),
        .out_link(sw_out),
        .out_rdy (sw_ordy)
      );
    end
  end

endmodule
