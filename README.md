# RoShaQ: a network-on-chip router with shared buffer queues

A conventional mesh router gives each input port its own buffer. Under real
traffic only a few inputs are busy at any time, so most of that buffer space
sits idle while the busy ports stall. This router keeps a small input queue per
port and adds a pool of **shared queues** that any input can borrow. A packet
whose output is free skips the shared queues entirely and goes straight to the
output, so latency at low load stays minimal. A packet whose output is busy is
moved into a shared queue, which frees its input queue for the packets behind
it. The shared queue then competes for the output by itself.

The output direction is chosen by **weighted XY (wXY) routing**. Each direction
gets a weight from the link bandwidth still available and the distance left to
the destination. The packet leaves on the direction with the largest weight.

The RTL is a single five-port router (Local, North, East, South, West) in
synthesizable SystemVerilog-2017. It is written to be tiled into a 2-D mesh.

## Packets, flits and ports

Packets are wormhole packets of one or more flits. A flit (`roshaq_pkg::flit_t`)
has 34 bits:

| bits  | field | meaning                                     |
|-------|-------|---------------------------------------------|
| 33    | head  | first flit of a packet                      |
| 32    | tail  | last flit of a packet (a one-flit packet sets both) |
| 31:0  | data  | payload; in a head flit, see below          |

Head flit: `data[3:0]` is the destination x, `data[7:4]` the destination y and
`data[11:8]` the bandwidth the packet asks for (b_p). The router does not look
at the other bits or at body flits.

Port numbers (`port_e`): 0 Local, 1 North, 2 East, 3 South, 4 West. North is
decreasing y and East is increasing x. Every port has a valid/ready channel in
and out, and a flit moves on a cycle where both are high. Inputs are ready while
their input queue has room.

Other inputs of the router:
- `my_x`, `my_y`: the router's own coordinates.
- `bw_avail[0..3]`: the bandwidth still free on the North, East, South and West
  output links (4 bits each). How a system measures or reserves this bandwidth
  is outside the router. Any monitor that drives these inputs will do.

## How a packet gets through

```
           +-------------+      output crossbar (10 -> 5)
 in[p] --->| input queue |---+-------------------------------+---> out[0..4]
           |  + wXY RC   |   |                               ^
           +-------------+   | shared-queue crossbar (5->5)  |
              (x5)           +-----> shared queue k ---------+
                                         (x5)
      SQA: shared-queue allocator      OPA: output port allocator
```

1. **Route and request (one cycle).** When a head flit reaches the front of
   its input queue, `wxy_route` picks its output in that same cycle. The input
   then asks for that output at the OPA and for a shared queue at the SQA.
2. **Bypass.** If the OPA grants the output, the input becomes BUSY_OUT. Its
   flits cross the output crossbar, one per cycle that the output is ready.
3. **Park.** If only the SQA grants, the input becomes BUSY_SQ. Its flits
   cross the shared-queue crossbar into the granted shared queue.
4. **Both grants.** If both grants come in the same cycle, the output wins.
   The SQA then does not commit its grant, so the shared queue stays free.
5. **No grant.** The input goes to WAIT and requests again every cycle. The
   output port it chose stays fixed, even if the bandwidth inputs change.
6. A shared queue with a head flit at its front asks the OPA for the output
   its packets are tagged with. Once granted, it streams the packet out.

An output port or a shared queue stays assigned to one packet until that
packet's tail flit has passed, so wormhole packets never interleave. The three
states of every queue (idle, wait, busy) are visible as `state_o` on
`input_port` and `shared_queue`.

### Shared-queue write rule

A shared queue may take a packet only if it has room and:

- it is empty, or
- it already holds packets for the **same output port**.

It must also not be in the middle of receiving another input's packet. Because
all packets in a queue go to one output, the queue needs no routing logic: a
single port tag per queue is enough. The tag is set when a packet is granted
to the queue.

### Allocation

- **OPA** (`op_allocator`): one round-robin arbiter per output, choosing among
  10 requesters (5 input queues and 5 shared queues). Only an idle output
  arbitrates. The winner owns the output from the next cycle until the cycle
  after its tail flit leaves.
- **SQA** (`sq_allocator`): a separable allocator. Each requesting input picks
  the lowest-numbered shared queue it may write. Each shared queue then grants
  one of the inputs that picked it, in round-robin order. An input that loses
  tries again in the next cycle.

Round-robin order ensures that no requester starves.

## Weighted XY routing

With (x, y) the router's position, (x_d, y_d) the destination and b_d the free
bandwidth towards direction d:

```
w_d = 0                      if b_d < b_p
w_d = b_d * dist_d + B_MAX   else if d points towards the destination
w_d = b_d                    otherwise
```

Here dist_d is |x_d - x| for East and West and |y_d - y| for North and South.
B_MAX is the largest bandwidth value (15).

What follows from this:
- A productive direction with enough bandwidth always beats an unproductive
  one.
- Among productive directions, the one with more free bandwidth and more
  distance left wins.
- If every productive link lacks bandwidth, the packet may detour through an
  unproductive direction that has enough. So the routing is non-minimal. Its
  effect on livelock was not examined.

The bandwidth check comes **first**: a link without enough bandwidth weighs
zero even if it points at the destination. The opposite order would let a
saturated productive link always win, which defeats the point of the weights.

Rules this design adds:
- A packet addressed to this router goes to Local.
- Equal weights are resolved in the order E, W, N, S, i.e. X before Y.
- If all four weights are zero, the packet takes the plain XY direction and
  waits there.

The weight adders and 4x4-bit multipliers are replicated in each of the five
input ports. Their widths follow `COORD_W` and `BW_W`.

## Timing

Without contention:

| event                                   | cycle |
|-----------------------------------------|-------|
| head flit accepted at an input          | t     |
| route + OPA/SQA arbitration             | t+1   |
| head flit on the output (bypass)        | t+2   |
| following flits                         | one per cycle |
| via a shared queue: written             | t+2   |
| shared queue requests the output        | t+3   |
| head flit on the output                 | t+4 (at the earliest) |

After a tail flit leaves, its output is idle for one cycle before a new
packet can use it. So a packet parked behind an n-flit packet appears n+1
cycles after that packet's head. The end-to-end testbench checks both
latencies and this gap.

## Modules

| file | role |
|------|------|
| `roshaq_pkg.sv`    | port enum, flit struct, header field accessors, widths |
| `roshaq_router.sv` | top: five input ports, shared queues, SQA, OPA, two crossbars |
| `input_port.sv`    | input queue, wXY route unit, idle/wait/busy state machine |
| `shared_queue.sv`  | queue + output-port tag + request/send state |
| `sq_allocator.sv`  | shared-queue allocator with write rule and write locks |
| `op_allocator.sv`  | per-output round-robin allocation and output busy/owner state |
| `crossbar.sv`      | multiplexer crossbar, used for both switches |
| `wxy_route.sv`     | combinational weighted XY route computation |
| `rr_arbiter.sv`    | round-robin arbiter with commit-controlled pointer |
| `flit_fifo.sv`     | circular-buffer FIFO with first-word fall-through |

Parameters of `roshaq_router`:
- `IQ_DEPTH` = 4: input queue depth in flits.
- `NSQ` = 5: number of shared queues.
- `SQ_DEPTH` = 4: shared queue depth in flits.

Flit, coordinate and bandwidth widths are set in `roshaq_pkg`. Immediate
assertions check the handshake rules:
- no write to a full queue and no read from an empty one;
- one-hot grants;
- no grant without a request;
- no packet for another port joins a tagged queue;
- every packet starts with a head flit.

## What is fixed by the design and what is chosen here

Taken from the design description:
- five ports;
- an input queue per port and a pool of shared queues;
- the bypass of the shared queues when the output is granted;
- the output taking precedence when both grants arrive;
- the two-condition shared-queue write rule;
- round-robin arbitration in both allocators;
- routing logic only at the input queues;
- idle/wait/busy queue states;
- the two crossbars;
- the wXY weight equations.

Chosen here, because the description leaves them open:
- flit format and widths;
- queue depths (4) and the number of shared queues (5);
- the valid/ready link handshake;
- the separable SQA with lowest-index choice;
- the one idle cycle between packets on an output;
- the tie-break and all-zero fall-back of wXY;
- bandwidth supplied as router inputs.

Departures:
- **Look-ahead routing.** The original scheme computes the next router's
  output port one hop early. Here the route is computed at the current router,
  in parallel with allocation. wXY needs the free bandwidth of this router's own
  links, which an upstream router does not have. The head flit still spends a
  single cycle on route plus arbitration.
- **8 ports.** An 8-port variant is mentioned, but the weights only define
  four mesh directions plus Local. Only the 5-port router is built.
- **Network interface and processors** are not part of the RTL. The Local
  port is where a network interface would attach.
- **Size.** The reference FPGA result for the router is 627 LUTs, 322 slices,
  4464 gates and a 23.21 ns critical path. This RTL with 34-bit flits and
  ten 4-flit queues maps to about 4300 LUTs, 240 flip-flops and 60 LUT-RAM
  blocks in a generic Xilinx flow. The reference configuration (flit width,
  depths) is unknown, so the two numbers are not comparable; shrink `DATA_W`
  and the depths to approach it.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog.

| testbench | checks |
|-----------|--------|
| `tb_flit_fifo`     | random push/pop against a queue model; flags; fall-through timing |
| `tb_rr_arbiter`    | strict rotation; random requests against a pointer model; uncommitted grants |
| `tb_crossbar`      | random selects and data |
| `tb_wxy_route`     | hand-worked cases (detour, fall-back, weight value); 20,000 random cases against an integer model |
| `tb_input_port`    | request timing, wait-state port hold, both paths, both-grant precedence, backpressure |
| `tb_shared_queue`  | tagging, request per packet, send/hold, order |
| `tb_sq_allocator`  | grants, chosen queue, tags and locks against a model; write rule on every grant |
| `tb_op_allocator`  | grants, busy and owner against a model; no starvation |
| `tb_roshaq_router` | end to end at default parameters (see below) |

`tb_roshaq_router` first checks the bypass latency and the shared-queue path
with two directed packets. It then runs 40 random phases of about 6000
packets, varying:
- router position;
- link bandwidths, including near-zero bandwidth;
- input rate;
- output readiness;
- packet length (1 to 4 flits).

Each packet's expected output comes from an independent wXY model in the
testbench. Every flit is checked for:
- the right output;
- contiguity within its packet;
- order;
- exactly-once delivery.

The testbench counts how often each mechanism occurs and fails if any never
does:
- bypass;
- shared-queue write;
- joining a non-empty shared queue;
- both grants in one cycle;
- wait;
- output stall;
- input backpressure;
- full shared queue;
- adaptive (non-XY) route;
- XY fall-back;
- local delivery.

`tb_roshaq_mesh` puts 16 routers into a 4 x 4 mesh, the multicore setting
the router is meant for. The link bandwidths are chosen so that wXY reduces to
X-then-Y routing, which keeps the wormhole mesh free of deadlock. East/West is
set to 15 and North/South to 4, with b_p = 1. The test checks:
- the zero-load head latency, which must be exactly 2 cycles per router
  traversed;
- under uniform random traffic, that each packet arrives exactly once, at the
  right node, in order and contiguous;
- that no flit leaves the mesh edge.

Measured head latency, in cycles, for packets of 1 to 4 flits:

| offered load (packets/node/cycle) | in network | including source queue |
|-----------------------------------|-----------:|-----------------------:|
| 0.02 | 7.7  | 8.7   |
| 0.05 | 8.3  | 9.4   |
| 0.10 | 9.7  | 11.1  |
| 0.15 | 12.9 | 14.8  |
| 0.20 | 20.0 | 25.7  |
| 0.25 | 30.4 | 272   |

The network saturates between 0.20 and 0.25 packets per node per cycle.

Run it with Verilator 5:

```
verilator --binary --timing --assert -Wall -Wno-fatal \
  --top-module tb_roshaq_router -y rtl -y tb +libext+.sv \
  rtl/roshaq_pkg.sv tb/tb_roshaq_router.sv
./obj_dir/Vtb_roshaq_router
```

Replace the top module and file for any other testbench. The simulator has two
states, so all state that is read is reset (`rst_n` is synchronous and active
low). The full run takes well under a second.

Not verified:
- deadlock and livelock in a mesh when wXY actually adapts (non-minimal
  detours);
- timing closure on an FPGA.
