// Shared types for the wormhole-routing priority switch network.
//
// A message is a sequence of flits. The first flit (head) carries the
// destination address in the low bits of its data field; the last flit (tail)
// carries the end-of-message mark. A one-flit message has both marks set. The
// `hot` bit is the message class mark that the source attaches before the
// message enters the network: hot flits travel through the one-flit hot latches,
// uniform flits through the uniform queues. Both classes share one physical
// link per switch port; the receiver returns one ready line per class, the
// register-transfer form of the two handshake lines per port.
//
// The flit data width is this design's own choice; the class mark, the head
// destination and the end-of-message mark follow the network description.
package wh_pkg;

  localparam int unsigned FLIT_DATA_W = 16;  // payload bits per flit

  typedef struct packed {
    logic                   hot;   // message class: 1 = hot, 0 = uniform
    logic                   head;  // first flit; data holds the destination
    logic                   tail;  // last flit (end of message)
    logic [FLIT_DATA_W-1:0] data;  // destination (head) or payload
  } flit_t;

  // Forward half of an inter-stage link: at most one flit per network cycle.
  typedef struct packed {
    logic  valid;
    flit_t flit;
  } link_t;

  // Backward half of a link: one ready line per virtual channel (class).
  typedef struct packed {
    logic hot_rdy;
    logic uni_rdy;
  } link_rdy_t;

  // Index of the two virtual channels in per-class arrays.
  typedef enum logic {VC_UNI = 1'b0, VC_HOT = 1'b1} vc_e;

endpackage
