// Alternating transfer priority arbiter with K-counter (one per switch input port).
//
// The uniform queue and the hot latch of an input port compete for the one
// crossbar input link of that port. The K-counter counts the uniform flits sent
// since the last hot flit. A hot flit has priority over a uniform flit only
// when at least K uniform flits have followed the last hot flit; otherwise the
// uniform flit goes first. When only one of the two buffers can send, it is
// chosen regardless of the counter. K = 0 gives hot flits strict priority and a
// very large K gives uniform flits strict priority; in between a share of the
// link is kept for each class. This rule and K = 2 follow the switch
// description.
//
// Design choices: a buffer counts as a candidate when it holds a flit that can
// advance this cycle (downstream ready, output virtual channel available); the
// counter only moves on an actual transfer (`xfer_hot` / `xfer_uni`), so a
// choice that loses output arbitration leaves it unchanged; the counter
// saturates at K and starts at K after reset.
//
// Timing: `sel_hot`/`sel_uni` are combinational from the candidate inputs and
// the counter register.
module k_arbiter #(
  parameter int unsigned K = 2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic hot_cand,   // hot latch has a flit that can advance
  input  logic uni_cand,   // uniform queue has a flit that can advance
  output logic sel_hot,    // offer the hot flit to the crossbar
  output logic sel_uni,    // offer the uniform flit to the crossbar
  input  logic xfer_hot,   // the hot flit crossed the switch this cycle
  input  logic xfer_uni    // the uniform flit crossed the switch this cycle
);
  localparam int unsigned CW = (K > 0) ? $clog2(K + 1) : 1;

  logic [CW-1:0] kcnt;
  logic          hot_first;

  assign hot_first = (kcnt >= CW'(K));
  assign sel_hot   = hot_cand && (hot_first || !uni_cand);
  assign sel_uni   = uni_cand && !sel_hot;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      kcnt <= CW'(K);
    end else if (xfer_hot) begin
      kcnt <= '0;
    end else if (xfer_uni && !hot_first) begin
      kcnt <= kcnt + 1'b1;
    end
  end

  a_one_xfer: assert property (@(posedge clk) disable iff (!rst_n) !(xfer_hot && xfer_uni));
  a_xfer_sel: assert property (@(posedge clk) disable iff (!rst_n)
                               (xfer_hot |-> sel_hot) and (xfer_uni |-> sel_uni));

endmodule
