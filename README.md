# Wormhole-routing multistage cube network with hot-flit priority switches

When many processors of a shared-memory machine address the same memory module
at about the same time (a shared variable, a barrier, a lock), the flits bound
for that "hot" module pile up in the last switch stage, then in the stage before
it, until a tree of full buffers reaches back to the processors. Every other
message whose path crosses that saturation tree is stuck behind hot flits, so
the whole network slows down, long after the hot messages themselves are gone.

This RTL builds a wormhole-routing multistage cube network whose 2x2 switch
boxes keep the two kinds of traffic apart. Messages are marked *hot* or
*uniform* by their source. Each switch input has two buffers: a large FIFO for
uniform flits and a single-flit latch for hot flits. Because a hot message can
occupy at most one flit of storage per switch input, it cannot fill the uniform
queues. Uniform traffic keeps moving past a saturated hot path. A small counter
per input (the K rule) decides which buffer uses the input's crossbar link in a
given cycle. It sets how the link bandwidth is split between the two classes.

The default configuration is a 1024 x 1024 network (10 stages of 512 switches),
with 200-flit uniform queues and K = 2.

## Structure

```
wh_mcube_top            N source queues + the network
 ├─ source_queue  x N   per-processor flit FIFO in front of a network input
 │   └─ uniform_queue
 └─ mcube_network       log2(N) stages of N/2 switches
     └─ priority_switch x (N/2)·log2(N)
         ├─ uniform_queue x 2   C-flit FIFO per input (uniform flits)
         ├─ hot_latch     x 2   1-flit latch per input (hot flits)
         ├─ k_arbiter     x 2   K-counter priority per input
         └─ wormhole_crossbar   2x2 routing, channel holding, output arbitration
wh_pkg                  flit and link types
```

The processors and memory modules are not part of the RTL. The processor side
of the top level is a write port into each source queue. The memory side is one
output link per memory module, with one ready line per class.

## Flits, links and the two virtual channels

A flit (`wh_pkg::flit_t`, 19 bits) holds:

| field  | bits | meaning                                            |
|--------|------|----------------------------------------------------|
| `hot`  | 1    | message class, set by the source                   |
| `head` | 1    | first flit; `data` holds the destination address   |
| `tail` | 1    | last flit (end of message)                         |
| `data` | 16   | destination (head flit) or payload                 |

A message has exactly one head flit. A one-flit message sets both `head` and `tail`.

Each inter-stage link carries at most one flit per cycle (`link_t`: `valid` +
flit). Hot and uniform flits share the same wires. The receiver returns two
ready lines (`link_rdy_t`): `hot_rdy` when its hot latch can take a flit, and
`uni_rdy` when its uniform queue can. A sender drives a flit only if the ready
line of that flit's class is high. Nothing is ever dropped: a full buffer pushes
back to the previous stage, and in the end to the source queue and the
processor.

A buffer that is full but is sending its flit in the current cycle reports
ready. A chain of one-flit hot latches therefore still streams one flit per
cycle. The price is a combinational ready path from the memory side back
through all stages to the source queues. A faster implementation would
register these lines and add a slot of slack per buffer.

## Topology and routing

The network uses the generalized-cube form of the multistage cube. The N links
between two stages are labelled 0..N-1, and a link keeps its label through the
network. The stage at position `p` (0 at the processors, `s = log2 N` stages)
works on address bit `b = s-1-p`. Its box `j` joins the two links whose labels
differ only in bit `b`:

- `lo` is `j` with a 0 inserted at bit position `b`;
- `hi` is `lo | 2^b`;
- the upper port (0) is link `lo` and the lower port (1) is link `hi`, on both
  the input side and the output side.

A head flit leaves on the port equal to bit `b` of its destination. After the
last stage, the label of the link equals the destination. There is one path per
source and destination pair. Uniform traffic to random destinations spreads over
the whole network. Hot traffic to one module converges into a binary tree rooted
at that output.

## Inside a priority switch

In each cycle, the following happens at each of the two input ports:

1. **Candidates.** The front flit of the hot latch and the front flit of the
   uniform queue are each a *candidate* if they can advance in this cycle:
   - the next stage is ready for their class;
   - for a head flit, the output's channel of that class is free;
   - for a body flit, the path was already set up by its head.
2. **K rule** (`k_arbiter`). If both buffers are candidates, the hot flit wins
   only when at least K uniform flits have crossed since the last hot flit.
   Otherwise the uniform flit wins. If only one buffer is a candidate, it goes.
   The counter is cleared by each hot transfer and counts uniform transfers up
   to K.
   - With both buffers backlogged, the port's link carries one hot flit, then K
     uniform flits, and so on. The hot share of the link is 1/(K+1).
   - K = 0 gives hot flits strict priority.
   - A very large K gives uniform flits strict priority.
   - K = 2 is the default. It keeps the saturation tree's effect short while
     delaying the hot messages only moderately.
3. **Crossbar** (`wormhole_crossbar`). The chosen flit goes to its output.
   - If both inputs chose the same output, a round-robin pointer for that output
     picks one, and the other input waits a cycle.
   - A head flit that is not also a tail reserves the output's channel of its
     class. The tail flit releases it.
   - A hot message and a uniform message can interleave flit by flit on one
     link, but two messages of the same class never can.

At most two flits cross a switch per cycle, one per input port. A flit written
into a buffer can leave in the next cycle, so an unblocked flit takes one cycle
per stage. From a processor write to the memory output, an unblocked flit takes
`log2(N) + 1` cycles: 11 cycles in the default network.

### Why a one-flit hot latch is enough

A hot message can hold at most one flit of storage at each switch input on its
path. The saturation tree of hot messages therefore fills only hot latches, and
the uniform queues stay available to other traffic. Because the two classes
share the link, hot flits still get a guaranteed share of it. This share comes
from the K rule, so the hot messages keep draining instead of starving behind
uniform traffic.

## Parameters

| parameter   | default | where                              | origin                    |
|-------------|---------|------------------------------------|---------------------------|
| `N`         | 1024    | `mcube_network`, `wh_mcube_top`    | evaluated network size    |
| `C`         | 200     | `priority_switch` and up           | evaluated queue length    |
| `K`         | 2       | `k_arbiter` and up                 | evaluated priority value  |
| `SRC_DEPTH` | 256     | `source_queue`, `wh_mcube_top`     | own choice                |
| `ROUTE_BIT` | 0       | `wormhole_crossbar`, `priority_switch` | set per stage by the network |
| `FLIT_DATA_W` | 16    | `wh_pkg`                           | own choice (≥ log2 N)     |

`N` must be a power of two, with `log2(N) <= 16`. Switches are 2x2 only.

## Choices made here, beyond the architecture

- **Flit format.** There is one head flit with the destination in the data
  field, and 16 payload bits per flit.
- **Handshake.** The handshake is `valid` plus one ready line per class. The
  architecture uses a bidirectional handshake wire per class and port instead;
  electrically they do the same job.
- **Flow-through ready.** This is described above.
- **Candidates in the K rule.** A buffer counts as present for the K rule only
  if its flit can actually advance. A blocked buffer therefore never takes the
  link from the other one.
- **K-counter details.** The counter starts at K after reset, so the first
  contention goes to the hot flit. It moves only on real transfers.
- **Output conflicts.** Two inputs that want the same output are resolved
  round-robin.
- **Source queues.** Each is a single FIFO shared by both classes, holding 256
  flits. When it is full, it stalls the processor (`proc_ready` low). The
  processor model must then hold its messages: the network itself loses nothing.
- **Reset.** The reset is synchronous and active-low (`rst_n`). All buffers are
  empty after reset, and all channels are free.

## Simulation

The testbenches are self-checking. Each prints one line `TB_RESULT checks=N
failures=M`, and each has a watchdog. To build and run any testbench with plain
Verilator, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl +libext+.sv \
    rtl/wh_pkg.sv tb/tb_wh_mcube_top.sv --top-module tb_wh_mcube_top -Mdir obj
./obj/Vtb_wh_mcube_top
```

| testbench               | size                 | what it shows |
|-------------------------|----------------------|---------------|
| `tb_uniform_queue`      | 200 flits            | FIFO order, count, full/flow-through ready, one-cycle latency, random traffic against a model |
| `tb_hot_latch`          | 1 flit               | hold and same-cycle refill against a model |
| `tb_k_arbiter`          | K = 2 and K = 0      | H U U pattern (hot share 1/(K+1)), lone-candidate rule, counter unchanged on lost arbitration, strict priority at K = 0 |
| `tb_wormhole_crossbar`  | one stage            | routing bit, channel held until tail, hot/uniform interleave, round-robin conflicts, per-class blocking |
| `tb_priority_switch`    | C = 200, K = 2       | one-cycle latency, exact 1/3 hot share on a saturated output, hot flits passing at full rate beside a full uniform queue, random traffic with integrity checks |
| `tb_mcube_network`      | N = 16, C = 8        | latency `log2 N + 1`, random hot/uniform traffic with memory stalls, every message delivered once and intact |
| `tb_source_queue`       | 16 flits             | order, per-class readiness, head-of-line hold, processor stall |
| `tb_wh_mcube_top`       | N = 32, C = 20       | temporary hot-spot workload (see below) |

`tb_wh_mcube_top` runs the temporary hot-spot scenario at reduced size:

- Every processor generates uniform messages of 20 flits at 0.5 flits per cycle.
- Every processor also sends one 4-flit hot message to memory 0, at a time drawn
  from a normal distribution: mean 800 cycles (scaled down from 4000),
  deviation 50.
- The memories stall a class now and then.

The testbench counts each mechanism and fails if one never happened:

- a full uniform queue (the saturation tree);
- a hot flit held in its latch;
- a K decision for a hot flit, and a K decision for a uniform flit;
- output contention;
- a head flit waiting for a held channel;
- a stalled processor;
- a memory stall.

It prints the hot-spot phase length and the mean uniform-message delay before,
during and after the hot-spot. These numbers come from a 32-port network with
short queues. They show the mechanisms at work, not the performance of the
1024-port network.

The largest configuration simulated is the 32-port network of
`tb_wh_mcube_top`. The 1024-port default (5120 switch instances) elaborates
and lints in about 3 minutes with about 7 GB of memory. A Verilator simulation
model of it, however, comes to roughly 800 generated C++ files of about 5 MB
each, and a single one of them takes minutes to compile. No testbench therefore
runs the network at its default size.

## How far to trust it

- **Derived from the architecture:** the switch organisation (uniform queue plus
  hot latch per input, shared links and crossbar, one K-counter per input), the
  K rule, wormhole switching, the multistage cube topology, backpressure with
  source queues, and the sizes N = 1024, C = 200 and K = 2.
- **Chosen here:** everything listed under "Choices made here". Of these, the
  flow-through ready path and the round-robin output arbitration affect
  performance numbers the most.
- **Not built:** the processors and the memory modules. The traffic that the
  processors produce is modelled in the testbenches.
- **Not verified:** the synthesized size of the full 1024-port network, and
  simulation at 1024 ports. The top-level testbench runs only at reduced size,
  as described above. The network is built the same way at every size, from a
  generate loop over stages and boxes.
