// Source queue: the per-processor queue in front of a network input.
//
// A processor writes the flits of its messages, already marked hot or uniform,
// into this queue; the queue feeds them in order to the network input link.
// When the network input cannot take the front flit (the ready line of its
// class is low), the flits wait here, so no message is lost while a saturation
// tree blocks the input. The processor must stop writing while `proc_ready` is
// low. The queue itself is named by the network description; its depth
// (DEPTH, default 256 flits) and the single FIFO shared by both classes are this
// design's own choices.
//
// Timing: a flit written in cycle t is offered to the network from cycle t+1.
// `proc_ready` depends combinationally on the network ready lines (a full queue
// accepts a flit in the cycle its front flit leaves).
module source_queue
  import wh_pkg::*;
#(
  parameter int unsigned DEPTH = 256
) (
  input  logic      clk,
  input  logic      rst_n,
  // processor side
  input  logic      proc_valid,
  input  flit_t     proc_flit,
  output logic      proc_ready,
  // network side
  output link_t     net_link,
  input  link_rdy_t net_rdy,
  output logic [$clog2(DEPTH+1)-1:0] level  // flits waiting
);
  flit_t front;
  logic  front_valid;
  logic  send;

  assign send = front_valid && (front.hot ? net_rdy.hot_rdy : net_rdy.uni_rdy);
  assign net_link.valid = send;
  assign net_link.flit  = front;

  uniform_queue #(.DEPTH(DEPTH)) u_q (
    .clk, .rst_n,
    .push     (proc_valid && proc_ready),
    .in_flit  (proc_flit),
    .in_ready (proc_ready),
    .pop      (send),
    .out_flit (front),
    .out_valid(front_valid),
    .count    (level)
  );

endmodule
