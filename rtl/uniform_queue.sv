// Uniform flit queue: the FIFO flit buffer at each switch input port.
//
// Holds up to DEPTH flits (C = 200 in the evaluated networks) in arrival order
// and presents the oldest flit at its output. A flit written in one network
// cycle can leave in the next one. `in_ready` is high when there is room, or
// when the queue is full but its head flit leaves in this same cycle, so a full
// queue that drains by one flit per cycle also accepts one per cycle; this makes
// `in_ready` combinationally dependent on `pop`. The queue size follows the
// network description; the flow-through ready and the circular-buffer
// organisation are this design's own choices. The same module serves as the
// processor-side source queue.
//
// Timing: push and pop are sampled on the rising clock edge; `out_flit` and
// `out_valid` come from registers and the memory array (asynchronous read).
module uniform_queue
  import wh_pkg::*;
#(
  parameter int unsigned DEPTH = 200
) (
  input  logic  clk,
  input  logic  rst_n,
  // write side
  input  logic  push,      // write in_flit; only allowed while in_ready
  input  flit_t in_flit,
  output logic  in_ready,
  // read side
  input  logic  pop,       // remove out_flit; only allowed while out_valid
  output flit_t out_flit,
  output logic  out_valid,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  flit_t         mem [DEPTH];
  logic [AW-1:0] rd_ptr, wr_ptr;

  function automatic logic [AW-1:0] next_ptr(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  assign out_valid = (count != 0);
  assign out_flit  = mem[rd_ptr];
  assign in_ready  = (count < ($clog2(DEPTH+1))'(DEPTH)) || pop;

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr] <= in_flit;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (push) wr_ptr <= next_ptr(wr_ptr);
      if (pop)  rd_ptr <= next_ptr(rd_ptr);
      count <= count + ($bits(count))'(push) - ($bits(count))'(pop);
    end
  end

  // Handshake rules of the queue.
  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) push |-> in_ready);
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) pop |-> out_valid);

endmodule
