// Hot flit latch: the one-flit buffer for hot flits at each switch input port.
//
// It sits in parallel with the uniform queue and forms the second virtual
// channel of the port. Only hot flits are written into it. It can be refilled
// in the cycle in which its flit leaves: `in_ready` is high when the latch is
// empty or is being emptied (`pop`) in the current cycle, so a hot message
// streams through a chain of latches at one flit per cycle. The one-flit size
// follows the switch description; the flow-through ready is this design's own
// choice.
//
// Timing: push and pop take effect on the rising clock edge; the stored flit
// is visible from the cycle after the push.
module hot_latch
  import wh_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  push,
  input  flit_t in_flit,
  output logic  in_ready,
  input  logic  pop,
  output flit_t out_flit,
  output logic  out_valid
);
  assign in_ready = !out_valid || pop;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_flit  <= '0;
    end else begin
      if (push) begin
        out_valid <= 1'b1;
        out_flit  <= in_flit;
      end else if (pop) begin
        out_valid <= 1'b0;
      end
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) push |-> in_ready);
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) pop |-> out_valid);
  a_hot_only:     assert property (@(posedge clk) disable iff (!rst_n) push |-> in_flit.hot);

endmodule
