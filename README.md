# Logic-layer network-on-chip for processors with stacked DRAM

When DRAM is stacked directly on top of a multi-core processor, each core
sits under its own slice of main memory (a *rank*). Most of a core's traffic
can then go straight up to the rank above it. But any core may still address
any rank. This design is the interconnect on the processor's logic layer
that serves both kinds of traffic:

* a 4 x 4 mesh of virtual-channel wormhole routers carries requests and
  responses between cores and remote ranks;
* a **logic-layer network interface (LLNI)** at every node joins the node's
  processor (an AXI master) and the controller of the rank above it (an AXI
  slave) to the node's router.

The LLNI gives requests for the node's own rank a direct path from the
processor side to the memory side, so that local accesses never enter the
network. Remote requests are packetised and sent through the mesh. Responses
from different ranks can overtake each other in the mesh, so the interface
gives every request a per-ID **sequence number**. A **reorder buffer** then
puts the responses back into the order AXI requires before the processor
sees them.

All of it is synthesizable SystemVerilog in `rtl/`. Processors, memory
controllers and the DRAM are outside the design: the top module brings out
one AXI slave port and one AXI master port per node.

## Platform at a glance

| item | value |
|---|---|
| mesh | 4 x 4, node `n = y*4 + x`, x grows East, y grows South |
| router | 5 ports (N, E, S, W, Local), XY routing, wormhole switching |
| virtual channels | 2 per input port: VC 0 requests, VC 1 responses |
| VC buffer | 5 flits |
| flit | 32-bit payload + head, tail and VC sideband bits |
| flow control | credits, one per flit per VC |
| NI queues | 8 entries each (AXI AR/AW/W/R/B, packet queue per VC, request-information FIFOs) |
| reorder buffer | 6 slots x 8 words = 48 words per node |
| outstanding transactions | at most 6 per node |
| AXI subset | ID 4 bits, address 32 bits, burst length 1..8 beats (INCR), data 32 bits |
| address map | bits [30:27] select the node whose 128 MB rank holds the address (16 x 128 MB = 2 GB) |

The top module is `noc_platform` (parameters `MESH_X`, `MESH_Y`, both 4). Its
ports are per-node arrays:

* `s_ar/s_aw/s_w/s_r/s_b` with their valid/ready bits: the processor side.
  The NI is the AXI slave here.
* `m_ar/m_aw/m_w/m_r/m_b` with their valid/ready bits: the memory side. The
  NI is the AXI master here.
* `ev_rob_store` and `ev_rob_release`: one-cycle strobes, one per node. They
  fire when a response is parked in, or released from, the reorder buffer.

The shared types (`flit_t`, `header_t`, the AXI channel structs) and all
sizes are in `rtl/noc_pkg.sv`.

## Packets

Every packet starts with a one-flit header:

| bits | field | meaning |
|---|---|---|
| 31:30 | kind | 00 read request, 01 write request, 10 read response, 11 write response |
| 29:28 / 27:26 | dst_x / dst_y | destination node |
| 25:24 / 23:22 | src_x / src_y | source node (where the response goes) |
| 21:18 | id | AXI transaction ID |
| 17:14 | seq | sequence number within that ID |
| 13:10 | len | AXI burst length minus one |
| 9:2 | reserved | zero |
| 1:0 | resp | AXI response code (write responses) |

The four packet kinds:

* read request: header, address (2 flits);
* write request: header, address, then `len+1` data flits;
* read response: header, then `len+1` data flits;
* write response: the header alone, with head and tail set on the same flit.

Bit 31 of the header (the top bit of `kind`) separates requests from
responses. Two things depend on it:

* the packetizer picks the VC from it;
* at the receiving NI, the detector uses it to steer the packet either to the
  memory side or to the processor side.

## The router (`router`)

Each of the five input channels (`input_channel`) holds two VC FIFOs, one
per message class, and a routing unit (`xy_route`). The routing unit
computes the output port from the header's destination. Once a VC wins an
output VC it stays *active* until its tail flit leaves.

* **VC allocation** (`vc_allocator`):
  * A waiting header flit asks for the output VC of its own class on its
    output port. Requests stay on VC 0 and responses on VC 1 at every hop.
  * Each of the 10 output VCs has a round-robin arbiter.
  * A granted output VC is *busy* until the switch allocator reports that the
    packet's tail has passed. This is what makes the switching wormhole:
    packets never interleave within a VC.
* **Switch allocation** (`switch_allocator`):
  * Allocation is separable and input-first. Each input first picks one of
    its active VCs that has a credit for its output VC. Each output then picks
    one of the inputs that chose it. Both stages are round robin.
  * The allocator also keeps the credit counters of all output VCs. They
    start at 5, or at 8 on the Local port, where the downstream buffer is the
    NI's packet queue.
* **Crossbar** (`crossbar`): a 5 x 5 multiplexer with a register on every
  output. This register is the link register.
* **Credits**: an input channel returns one credit per flit popped, on that
  flit's VC, one cycle after the pop.

Timing with no contention:

* A header written into an input buffer at clock edge *e* gets its output VC
  at edge *e+1*.
* It leaves on the output link at edge *e+2*.
* Body flits follow at one per cycle.

Adjacent routers are joined in `noc_platform`. Router ports at the edge of
the mesh are tied off.

## The logic-layer network interface (`network_interface`)

```
processor (AXI master)                          stacked-DRAM controller (AXI slave)
   |  AR AW W          ^ R B                         ^ AR AW W         | R B
   v                   |                             |                 v
proc_axi_queue   proc_depacketizer          mem_depacketizer     mem_axi_queue
   |                   ^                       ^    | req. info        |
   |             reorder_unit                  |    v                  |
   +------------------> packetizer <-----------+----+------------------+
                  |  VC0 requests / VC1 responses |  local channel
                  v                               v
          router Local input        detector <--- packet_queue <--- router Local output
```

### Forward path: packetizer

The packetizer (`packetizer`) has two independent builders.

* **Request builder**:
  * It takes a read or a write from the processor queue, alternating when
    both wait. It does so only while the reorder unit reports `can_issue`.
  * In the same cycle it takes a sequence number for the transaction ID from
    the reorder unit. It also decodes the destination node from the address
    (`addr_decoder`).
  * It then sends the header, the address and, for a write, the data beats
    straight from the W queue. The last beat carries the tail.
* **Response builder**:
  * It pairs the head of the memory's R or B queue with the entry at the head
    of the matching request-information FIFO (see *Memory side* below).
  * It sends the response back to the source recorded there, carrying the
    original ID and sequence number.

A packet whose destination is the node itself goes to the **local channel**:
a direct flit path into the node's own detector. The local channel never
touches the router. All other packets share the injection link:

* requests go on VC 0 and responses on VC 1;
* the two builders are interleaved flit by flit, round robin;
* a flit is sent only while there is a credit for its VC.

The link output is registered.

### Reverse path: packet queue and detector

* The **packet queue** (`packet_queue`) is the buffer behind the router's
  Local output: one 8-flit FIFO per VC, credit controlled. A request stuck in
  front of a busy memory therefore never blocks a response behind it.
* The **detector** (`detector`) has four sources: the two VC heads, the
  local request channel and the local response channel. It has two targets:
  * the memory-side depacketizer, which receives requests;
  * the reorder unit, which receives responses.

  The kind bit of each header selects the target. A free target picks a
  source round robin and stays locked to it until the tail, so packets reach
  each target whole.

### Memory side

* The **memory-side depacketizer** (`mem_depacketizer`) turns a request
  packet back into AXI:
  * the header goes to its control register;
  * the address flit becomes an AR or AW;
  * the data flits become W beats, with WLAST on the tail.
* When it issues AR or AW, it also stores the request's source node, ID,
  sequence number and length in a read- or write-information FIFO. The
  controller is assumed to answer reads in read order and writes in write
  order. So the head of each FIFO always describes the next response, and the
  packetizer can address it.
* A flit is accepted only when the AXI channel it feeds accepts it (and,
  for an address flit, when the information FIFO has room). Memory
  back-pressure therefore reaches the network as withheld credits.
* R and B from the controller wait in `mem_axi_queue`.

### Processor side

The **processor-side depacketizer** (`proc_depacketizer`) turns a read
response into R beats: the ID comes from the header and RLAST from the tail.
It turns a write response into a single B beat.

## Sequence numbers and the reorder buffer (`reorder_unit`)

This is the part that needs the most care.

### The problem

AXI lets responses with different IDs return in any order. Responses with
the same ID must return in request order. In this system a processor may
send two reads with the same ID to two different ranks. Which response
arrives first depends on:

* distance;
* congestion;
* the memory timing of each rank;
* whether one of them took the local channel.

### Numbering

* The reorder unit keeps a 4-bit counter `next_seq[id]` for each of the 16
  IDs.
* Each request the packetizer builds carries the current value, and the
  counter then increments.
* The response packet carries the same number back.
* A second table, `expected[id]`, holds the number of the next response the
  processor may see for each ID.

Reads and writes share the numbering of an ID. The two kinds leave the
interface on separate AXI channels, so the shared numbering also orders reads
against writes of the same ID. This is stricter than AXI requires, but
simple.

### Pass or park

For every response header that arrives from the detector:

* **In order** (`seq == expected[id]`): the packet passes straight through to
  the processor-side depacketizer, flit by flit.
* **Out of order**: the packet is written, header and data, into a free slot
  of the reorder buffer. There are 6 slots of 8 words each (48 words), and a
  slot holds one burst.
* **Release**: when no packet is passing, the unit looks for a parked packet
  whose number is now expected for its ID. If it finds one, it replays that
  packet from the slot and frees the slot. Releases take priority over new
  arrivals, so a packet that has become due is never overtaken.
* Delivering a tail flit increments `expected[id]`.

### Why the buffer can never overflow

The unit counts outstanding transactions. It drops `can_issue` once 6 are in
flight, and the packetizer then stops taking requests.

* At most 6 responses can be on their way.
* An out-of-order response always has an earlier one of the same ID still
  missing.
* So at most 5 responses can ever need parking, and there are 6 slots.

This has two consequences:

* The reorder unit can accept every response at once. The response VC always
  drains, which is what keeps the request/response protocol free of
  deadlock.
* The 4-bit sequence numbers cannot wrap onto a number still in use.

The limit of 6 is the same figure as the buffer size: 6 outstanding bursts of
8.

### Observed behaviour

In the full 16-node test (120 transactions per node per phase) about 8% of
all responses were parked and released again. The limit stalled the request
builder for about 13,000 node-cycles.

## Deadlock freedom in short

* **Mesh routing**: XY routing is deadlock-free on a mesh within each VC.
* **Message classes**: requests and responses never share a VC, a packet
  queue FIFO or a detector target.
* **Responses always drain**:
  * response packets are always consumed: by the reorder unit (see above),
    and then by the processor, which must accept R and B;
  * requests may wait for memory, and memory may wait for the response VC;
  * but the response VC never waits for requests.
* **Local traffic**: local requests and responses use the same detector
  targets as network traffic. Their sources are separate, so a local packet
  never waits behind a network packet of the other class.

## Parameters

All sizes are package parameters in `noc_pkg`. The router and the NI take
their node coordinates as module parameters.

| parameter | default | meaning |
|---|---|---|
| `FLIT_W` | 32 | flit payload width |
| `NUM_VC` | 2 | VCs per port (the design relies on exactly 2 classes) |
| `VC_DEPTH` | 5 | router VC buffer depth |
| `NI_Q_DEPTH` | 8 | depth of every NI queue and FIFO |
| `ROB_SLOTS` | 6 | reorder slots, which is also the outstanding limit |
| `MAX_BURST` | 8 | words per reorder slot, the longest burst |
| `ID_W`, `SEQ_W`, `LEN_W` | 4, 4, 4 | AXI ID, sequence number and length widths |
| `RANK_BITS` | 27 | bytes per rank = 2^27 (128 MB) |
| `MESH_X`, `MESH_Y` | 4, 4 | mesh size (top-level parameters; coordinates are 2 bits, so at most 4 x 4) |

The synthesized 4 x 4 platform comes to roughly 60k cells and 12.5k
flip-flop bits. Its memories add 84k bits: the VC buffers, the NI queues and
the reorder buffers. These figures are from generic coarse synthesis, not a
cell library.

## Where this design makes its own choices

The reference design gives the block structure of the router and of the
network interface, and the main sizes. This implementation adds the
following on its own account:

* **Header and packet format**: the header layout, the packet formats and
  the sideband bits.
* **Pipelines**: the router pipeline (VC allocation, then switch allocation
  and traversal, then a registered output) and all state machines.
* **VC per class**: the fixed VC per message class. Request = VC 0 and
  response = VC 1 at every hop, so VC allocation never changes a packet's
  class.
* **Routing responses back**: the request-information FIFOs on the memory
  side. They require a controller that answers in order within reads and
  within writes.
* **Reorder buffer**:
  * the slot organisation;
  * the outstanding limit of 6;
  * sequence numbers shared by reads and writes of one ID.
* **Address map**: node = address bits [30:27]; bit 31 is ignored.
* **Local traffic**: "local" means the node's own rank, reached over the
  direct channel. A request from the processor to the rank above it never
  enters the mesh.
* **Reset**: active-low and asynchronous. It clears all control state and
  leaves storage arrays uninitialised.
* **Not built**: the processors, the DRAM controllers, the stacked DRAM, its
  peripheral logic and the through-silicon vias. These are outside the RTL.
  The testbenches use behavioural models of the processor and the memory.

## Verification

Every module has a self-checking testbench in `tb/` (`tb_<module>.sv`). Each
one prints `TB_RESULT checks=<n> failures=<n>` and has a watchdog.

| testbench | what it does |
|---|---|
| `tb_xy_route`, `tb_addr_decoder` | every destination or address, against an independent reference |
| `tb_crossbar` | random selections against a model of the registered output |
| `tb_vc_allocator` | contention for one output VC, ownership until release, independent VCs |
| `tb_switch_allocator` | credit exhaustion and return, round-robin fairness, one grant per input, tail release |
| `tb_input_channel` | VC requests with the XY port, per-VC order, credits per VC |
| `tb_router` | all five inputs loaded with random packets under random credit return; checks XY output, per-VC order, no interleaving, credit balance |
| `tb_proc_axi_queue`, `tb_mem_axi_queue`, `tb_packet_queue` | random push/pop against queue models, fill to full, credit balance |
| `tb_detector` | four random sources, checks steering by kind, whole packets, per-source order |
| `tb_reorder_unit` | responses of two IDs out of order under back-pressure; checks order, the outstanding limit and the park/release counts |
| `tb_mem_depacketizer`, `tb_proc_depacketizer` | random packet streams against the expected AXI beats and information entries |
| `tb_packetizer` | random AXI traffic, local and remote, random credits; checks every header field, flit and channel |
| `tb_network_interface` | one NI with a behavioural processor and memory; the testbench plays the network, returns responses with random delays (out of order) and injects requests from other nodes |
| `tb_noc_platform` | the full 4 x 4 platform at default parameters, see below |

`tb_noc_platform` connects a behavioural processor (`tb_traffic_gen`) and a
behavioural rank (`axi_mem_model`) to every node. It then runs four phases:

* uniform random traffic;
* non-uniform traffic, with 70% of requests to the node's own rank;
* each of these with a planar-DRAM latency (20 cycles) and with a stacked-DRAM
  latency (14 cycles, about a third lower).

Finally every processor reads back all it wrote. The testbench checks every
data beat and response. It also counts nine mechanisms and fails if any of
them never occurs:

* the local channel;
* injection into the mesh;
* parking in the reorder buffer;
* release from the reorder buffer;
* the outstanding-limit stall;
* credit stalls;
* switch conflicts;
* VC allocation waits;
* memory back-pressure.

A typical run at full load:

| phase | average latency (cycles, request to last response beat) |
|---|---|
| uniform, planar | 244 |
| uniform, stacked | 190 |
| non-uniform, planar | 159 |
| non-uniform, stacked | 127 |

Every processor issues back to back, so these are figures near saturation.
They show the expected ordering: local-heavy traffic and faster memory both
cut latency.

### Simulating with Verilator

Use Verilator 5 with timing support. Build and run from the repository
root:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
    rtl/noc_pkg.sv tb/tb_pkg.sv tb/tb_noc_platform.sv \
    --top-module tb_noc_platform -Mdir obj_top
./obj_top/Vtb_noc_platform
```

Any unit testbench builds the same way. Replace `tb_noc_platform` with, for
example, `tb_reorder_unit`. Verilator finds the other modules through `-Irtl
-Itb` by file name. The full platform test runs in about a second.

For lint, run `verilator --lint-only -Wall -Irtl rtl/noc_pkg.sv
rtl/noc_platform.sv`. The remaining warnings are explained in the opening
comment of the module concerned. Most are fields of the header or of an AXI
beat that a given block does not need.

## Limits

* **Burst types**: only INCR bursts of up to 8 beats, and no AXI
  sizes, locks or caches.
* **Memory controller ordering**: the memory controller must answer reads in
  read order and writes in write order. A controller that reorders would
  need the ID and sequence number carried through the memory side instead of
  the information FIFOs.
* **Mesh size**: coordinates are 2 bits, so the mesh is at most 4 x 4
  unless `XW`/`YW` grow. The address map uses bits [30:27] for up to 16
  nodes.
* **Performance figures**: the behavioural memory has a fixed latency
  with no bank, row or refresh timing. The latencies above compare the
  configurations with each other and are not absolute figures for a real
  DRAM.
