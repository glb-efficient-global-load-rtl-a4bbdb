# GLB: congestion-aware arbitration for a mesh network-on-chip

This is synthesizable SystemVerilog for a 5x5 mesh network-on-chip that uses **Global
Load Balancing (GLB)**. It follows the method described in "GLB - Efficient Global Load
Balancing Method for Moderating Congestion in On-Chip Networks". In most congestion-aware
networks, congestion only affects the *routing* decision. GLB also uses it in the
*arbitration* decision. Every packet carries a small record of how congested the region
it came through was. When packets compete for an output port, the one from the more
congested region goes first. Congested areas therefore empty faster, and their load
spreads into the quieter parts of the mesh.

The RTL covers the whole network side of the system:

- the router, with input buffers, routing, VC reservation, switch allocation, crossbar
  and congestion logic;
- the 5x5 mesh;
- the network interfaces for processors and memories;
- a system top, `glb_soc`, with ten processor nodes and fifteen memory nodes.

The processors, the DDR2 memory controllers and the DRAMs are not part of the RTL. Their
channels are ports of `glb_soc`.

## How congestion is measured and carried

Congestion is measured and carried at three levels.

**1. Port flag.** An input port is *congested* when its two VC buffers together hold
more than `THRESHOLD` flits. The default threshold is 2 of the port's 10 buffer cells.
Each port's flag goes to the neighbour that feeds it, which uses it for routing.

**2. Congestion Condition (CC, 2 bits).** Each router reduces its state to two 2-bit
codes. The same four bands are used for both:

| fraction f            | code |
|-----------------------|------|
| 0 <= f <= 1/4         | 00   |
| 1/4 < f <= 1/2        | 01   |
| 1/2 < f <= 3/4        | 10   |
| 3/4 < f <= 1          | 11   |

- *Own CC*: f = congested input ports / connected input ports. The local port counts as
  an input port. Edge routers divide by their smaller port count. This code goes to all
  four neighbours.
- *Neighbour CC*: f = congested neighbours / connected neighbours. A neighbour counts as
  congested when the own CC it sends is non-zero.

`glb_cc_quant` computes the bands without division. It compares `4*count` against
`total`, `2*total` and `3*total`.

**3. Congestion Status (CS, 4 bits, in the packet).** A router's *local congestion
value* is `{own CC, neighbour CC}`. The head flit of every packet has a 4-bit CS field.
It is set to 0 at the source. When the head flit crosses a router's crossbar, the field
is rewritten as

    CS_new = floor((CS_carried + local_value) / 2)

Local and path history therefore have equal weight. The influence of a router fades by
half at each later hop. The CS value is a running summary of the region the packet has
come from, not only of its last hop.

Example: a packet arrives with CS = 12 at a router whose local value is 0. It leaves
with CS = 6. The next router sees 6, and if that router's local value is 10 (own CC 10,
neighbours 10), the packet leaves it with CS = 8.

## Arbitration: the GLB input selection

This is the core of the method and the least obvious part of the RTL.

When several flits want the same output port, each requester gets the priority

    prio = CS + W

- CS is the Congestion Status that arrived in the packet's head flit. Body and tail
  flits use the value stored when their head flit left.
- W is a waiting count, kept per input VC.

The requester with the highest `prio` wins. On a tie, the lowest port index wins
(`glb_input_sel`).

The waiting count W prevents starvation. A VC that requests and loses adds 1 to W. W
returns to 0 when the packet's tail flit is granted, so the next packet in that buffer
starts fresh. W is 4 bits and saturates. `prio` is 5 bits and saturates at 31. Take a
packet with CS 0 that keeps losing to a stream with CS 15. After at most 15 losses its
priority ties with the stream, and because it is tested first it then wins (checked in
`tb_glb_switch_alloc`).

The switch allocator (`glb_switch_alloc`) is separable and uses the same priority in
both stages:

1. **Per input port:** pick one of the two VCs.
2. **Per output port:** pick one of the input ports whose chosen VC wants that output.

A VC that loses in either stage is counted as defeated.

**VC reservation (`glb_vc_alloc`).** A packet never changes VC: VC 0 carries requests
and VC 1 carries responses, which keeps request/response dependencies from deadlocking.
The allocator only has to give output VC *(o, v)* to one packet at a time, as wormhole
switching requires:

- A head flit may compete only when that output VC is free.
- When the head flit wins, the VC is reserved for its input port until the tail passes.
- One-flit packets reserve nothing.

Requests also need a credit for the downstream buffer.

## Routing: Dynamic XY

`glb_route_dyxy` is minimal and adaptive, with no extra virtual channels:

- If the destination differs in only one coordinate, the packet goes in that direction.
- If both X and Y are productive, it goes in Y only when the X neighbour's input port is
  flagged congested and the Y neighbour's is not. Otherwise it goes in X.
- At the destination, it goes to the local port.

The route is computed while the head flit waits at the front of its buffer. It is
frozen when the head flit is granted.

## Router timing and flit format

Ports are numbered 0 local, 1 north, 2 east, 3 south, 4 west. Y grows to the north, and
node `n = y*5 + x`, so node 0 is the south-west corner. Each input port has 2 VCs of 5
flits. Flits are 32 bits wide, plus three side-band bits: head, tail and VC.

A flit takes two cycles per hop when nothing blocks it:

- **Cycle 1:** it is written into the input buffer.
- **Cycle 2:** routing, VC reservation, switch allocation and the crossbar all act on
  the buffer heads, and the winner goes into the output register.

Flow control uses credits:

- Every output VC has a counter that starts at 5.
- A credit pulse goes upstream the cycle after a flit leaves an input buffer.
- The local ports use the same scheme with the network interfaces.

Head flit layout (bits of the 32-bit data word):

| bits  | field                                    |
|-------|------------------------------------------|
| 31:28 | Congestion Status                        |
| 27:25 | destination x                            |
| 24:22 | destination y                            |
| 21:19 | source x                                 |
| 18:16 | source y                                 |
| 15    | write                                    |
| 14:12 | burst length - 1 (1..8 words)            |
| 11:0  | tag                                      |

Packets:

| packet         | flits on the network                          | VC |
|----------------|-----------------------------------------------|----|
| read request   | head + address (2 flits)                      | 0  |
| write request  | head + address + 1..8 data words              | 0  |
| read response  | head + 1..8 data words                        | 1  |
| write response | head only (1 flit)                            | 1  |

## Network interfaces and the system

**`glb_master_ni`** sits at each processor node.

- It takes one request at a time on a simple valid/ready interface: memory coordinates,
  address, write bit and burst length, with write data on a separate stream. It turns
  each request into a packet.
- Memories may answer reads out of order. The interface therefore has a 48-word reorder
  buffer, split into 6 slots of 8 words (the maximum burst).
- A read is accepted only when the next slot is free. The slot number goes out as the
  packet tag and comes back in the response.
- Slots are allocated and retired in issue order, so read data returns to the processor
  in the order the reads were issued. Each burst ends with `rlast`.
- With 8-word slots, at most 6 reads can be outstanding, whatever their length.
- Write responses are counted and returned on `bvalid`/`bready`.

**`glb_slave_ni`** sits at each memory node.

- It buffers request flits and serves one request at a time.
- It issues a command (`mem_cmd_*`) and passes write data to the memory controller.
- It sends the response packet back to the requester: the header alone for a write, the
  header followed by the read words for a read.
- While it has no credit for VC 1, it holds `mem_rready` low.

**`glb_soc`** places the processors in rows 1 and 3 and the memories in rows 0, 2 and 4.
Processor ports `p_*[i]` and memory ports `m_*[j]` are numbered row by row from the
south.

## Module hierarchy

```
glb_soc                       system top (5x5, 10 processors, 15 memories)
├── glb_mesh                  routers and links
│   └── glb_router  x25
│       ├── glb_fifo  x10     VC input buffers
│       ├── glb_congestion    flags, CC codes, local value  (uses glb_cc_quant x2)
│       ├── glb_route_dyxy x10
│       ├── glb_switch_alloc  (uses glb_input_sel x10)
│       ├── glb_vc_alloc
│       └── glb_crossbar      includes the CS update
├── glb_master_ni x10         (uses nothing else)
└── glb_slave_ni  x15         (uses glb_fifo)
glb_pkg                       shared types, field positions, header helpers
```

`glb_mesh` also works on its own as a network with bare local ports, with flits and
credits in and out. Its parameters are `MESH_X`, `MESH_Y` and `THRESHOLD`. `glb_soc`
adds `ROB_WORDS` and `MAX_BURST`.

## Simulating

Each testbench in `tb/` is self-checking. It prints `TB_RESULT checks=N failures=M` and
stops itself with a watchdog if something hangs. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb rtl/glb_pkg.sv tb/tb_glb_soc.sv --top-module tb_glb_soc
./obj_dir/Vtb_glb_soc
```

Replace `tb_glb_soc` with any other testbench name. The full 5x5 system takes about a
minute and a half to compile and well under a second to simulate.

| testbench             | what it establishes |
|-----------------------|---------------------|
| `tb_glb_soc`          | Full system at default size. 3000 reads and writes (uniform, then 70% to a memory one hop away). Read data checked against memory contents, including read-back of written data. In-order read return, every write answered, network drains. Requires congestion flags, adaptive routes, priority overrides, grants after waiting, credit and VC-reservation stalls, a full reorder buffer and out-of-order responses to each occur. |
| `tb_glb_soc_load`     | Full system, request-rate sweep: uniform traffic at 0.10 to 0.65 and local-heavy traffic at 0.10 to 0.80 of a processor's injection capacity, 400 requests per point. Same data checks. Prints average latency per point. |
| `tb_glb_mesh`         | Mesh alone with behavioural interfaces. 4000 packets. Delivery, payload integrity, drain, the same mechanism counts. |
| `tb_glb_router`       | 2-cycle hop latency, CS update, credit exhaustion and recovery, the higher-CS packet winning over a lower port index, DyXY detour, congestion flag and CC codes. |
| `tb_glb_switch_alloc` | Both allocation stages and the waiting counters against a cycle model. Starvation bound. |
| others                | One per block: exhaustive (quantiser, routing) or random against a reference model. |

Average request-to-response latencies seen in `tb_glb_soc` are about 70 cycles
(uniform) and 60 cycles (local-heavy). The processor models keep up to 6 requests
outstanding. The 6-cycle memory latency stands for the DRAM's tRP-tRCD-tCL of 2-2-2.

In `tb_glb_soc_load`, a processor attempts a new request in a cycle with probability
rate / 4.25. The 4.25 is the average request length in flits. The sweep gives about 34
to 60 cycles (uniform) and 30 to 55 cycles (local-heavy). Latency rises with the rate
and then levels off. It levels off because the processor models present one request at
a time and the reorder buffer caps outstanding reads at 6, so the offered load cannot
really reach the nominal rate. These numbers describe this RTL with these behavioural
processors and memories. They are not a reproduction of published results.

## Where this RTL departs from, or goes beyond, the published method

Taken from the method:

- the 5x5 mesh and the processor/memory placement;
- 5-port routers with 2 VCs of 5 flits and 32-bit flits;
- request and response VCs, wormhole switching and DyXY routing;
- the thresholded-occupancy flag and the four CC bands;
- the 4-bit CS field built from `{own CC, neighbour CC}` and averaged 50-50;
- the `max(C + W)` input selection with ageing of defeated packets;
- the packet formats;
- the 48-word reorder buffer and the limit of 6 outstanding reads.

Choices made here where the method leaves the detail open:

- The threshold value (2 flits per port, summed over both VCs).
- The rule that a neighbour is congested when its CC is non-zero.
- Mapping a fraction of 0 to code 00.
- The bit order of the local value.
- Rounding the average down.
- The tie rule: lowest index, and X first in routing.
- The width and saturation of W. W resets on the tail grant.
- W counts losses only: a VC that waits without requesting (no credit, or output VC
  reserved by another packet) does not age. The published description ages the defeated
  packets; a looser reading would age every waiting packet every round.
- The separable two-stage allocator.
- Single-cycle allocation with credit flow control.
- The flit side-band bits and the head-flit field layout.
- Slot-based reordering.
- The simplified processor and memory-controller interfaces.

Not provided:

- **AXI.** The processor side is a plain request / write-data / read-data /
  write-response interface, not AMBA AXI. There are no AXI IDs or channel ordering rules
  beyond in-order reads.
- **The original reordering scheme.** The published interface has its own dynamic
  reordering mechanism. It is not reproduced here; a simple slot-per-read reorder buffer
  of the same size is used instead.
- **Round-robin arbitration.** The routers could alternatively use round-robin
  arbitration, but only the priority (GLB) arbiter is built.
- **Processors, DDR2 controllers and DRAMs.** They appear in the testbenches only as
  behavioural models.

Known limitation: minimal adaptive routing without virtual-channel restrictions is not
deadlock-free in general. Deadlocks can still occur within one message class, even
though the separate request and response VCs rule out protocol deadlock. None occurred
at the loads tested, but the design has no mechanism that prevents them.
