# H-SMBFT: a two-level fat-tree network-on-chip for 64 nodes

H-SMBFT (Hybrid Scalable-Minimized-Butterfly-Fat-Tree) is an indirect
network-on-chip topology. It cuts the number of router levels, links and
hops of a butterfly fat tree by mixing two ideas:

* **the bottom level of SMBFT**: every level-1 router concentrates four
  nodes, and the four routers of a group are fully connected by sibling
  links, so traffic inside a group of 16 nodes never leaves level 1;
* **the upper level of BFT**: each level-1 router has a single parent link,
  and the parents are spread so that every level-2 router has exactly one
  child in each group.

For 64 nodes this gives two levels: 16 eight-port level-1 routers and four
four-port level-2 routers, joined by 64 node links, 24 sibling links and 16
up/down links. No packet crosses more than four routers. This repository
holds a synthesizable SystemVerilog model of that network, built from a
credit-based virtual-channel wormhole router (8 VCs, 16-flit buffers per VC,
32-bit flits, five pipeline stages), together with self-checking
testbenches for Verilator.

## Topology

Level-1 router *i* (0..15) serves nodes 4i..4i+3. It belongs to group
g = i/4. Its three siblings are the other routers of the group:

| sibling          | router                   | port |
|------------------|--------------------------|------|
| right            | 4g + (i+1) mod 4         | 4    |
| next (cross)     | 4g + (i+2) mod 4         | 5    |
| left             | 4g + (i+3) mod 4         | 6    |
| parent           | level-2 router (i mod 4) | 7    |

Ports 0-3 are the four local nodes. Level-2 router *j* is therefore the
parent of routers j, j+4, j+8 and j+12; its port *k* leads to the child in
group *k*, i.e. router 4k+j.

```
level 2        L2R0            L2R1            L2R2            L2R3
                | \ \ \         ...
level 1   [R0 R1 R2 R3]   [R4 R5 R6 R7]   [R8 R9 R10 R11]   [R12 R13 R14 R15]
           (each bracket: four routers, every pair joined by a sibling link)
L2Rj children: Rj, R(4+j), R(8+j), R(12+j)
```

Sibling wiring is symmetric: router *i*'s right output enters its right
sibling's *left* input, the next output enters the cross sibling's *next*
input, and the left output enters the left sibling's *right* input.
Credits flow the opposite way on the same pairs.

The level-2 routers have four ports, one per group. In a larger tree they
would gain a fifth, parent, port; at 64 nodes they are the top level, so
that port does not exist.

## Routing

Routing is deterministic, shortest-path and computed in every router from
the 6-bit destination node d (module `route_compute`):

* at level-1 router *i*: if d/4 = i, leave on local port d mod 4; if the
  destination router is in the same group, take the sibling port for
  ((d/4) - i) mod 4 = 1, 2, 3 (right, next, left); otherwise go up (port 7);
* at a level-2 router: leave on port d/16, the destination's group.

A packet for another group therefore goes *up first*: it reaches the router
of the destination group that has the same position as the source router,
and takes one sibling hop from there if needed. Path lengths in routers
crossed, seen from node 0:

| destination nodes                    | routers | path                 |
|--------------------------------------|---------|----------------------|
| 1-3                                  | 1       | R0                   |
| 4-15                                 | 2       | R0, sibling          |
| 16-19, 32-35, 48-51                  | 3       | R0, L2R0, R4/R8/R12  |
| all others                           | 4       | R0, L2R0, Rx, sibling|

The alternative "sibling first, then up" is just as short. Up-first was
chosen because it leaves a simple dependency order: a flit arriving on a
sibling input can only be ejected, a flit arriving from a parent can only
go to a node or a sibling, and level-2 routers only send down. The channel
dependency graph has no cycle, so the network cannot deadlock as long as
nodes keep consuming flits. Any free VC may be used for any packet.

## The router (`vc_router`)

One module serves both levels (`LEVEL` = 1 with 8 ports, `LEVEL` = 2 with 4
ports). Its position in the level comes in on the constant `router_id`
input. Each input port has `NUM_VC` = 8 FIFOs (`input_buffer`) of
`BUF_DEPTH` = 16 flits. Each input VC is in one of three states: idle,
waiting for a downstream VC, or active.

Five pipeline stages:

| cycle | stage | what happens                                                                         |
|-------|-------|--------------------------------------------------------------------------------------|
| t     | BW    | the flit on the input link is written into the FIFO of the VC in its sideband         |
| t+1   | RC    | a head flit at the front of an idle VC computes its output port                       |
| t+2   | VA    | per output, a round-robin arbiter over all waiting input VCs hands the winner the lowest free downstream VC |
| t+3   | SA    | each input picks one ready VC (round-robin), then each output picks one input (round-robin); the winner is popped, a credit goes upstream |
| t+4   | ST    | the crossbar moves the winner into the output register                                |
| t+5   |       | the flit is on the output link, which is the next router's BW cycle                   |

So a head flit needs exactly five cycles per router, and a packet crossing
*n* routers reaches its destination link 5n cycles after injection (checked
by the testbenches for n = 1..4). Body and tail flits skip RC and VA and
follow one per cycle. A VC is "ready" for SA when it is active, holds a flit
and its downstream VC has a credit. The downstream VC stays reserved from VA
until the tail flit wins SA; the input VC then returns to idle and may start
on the next packet in the following cycle.

**Credits.** Every output keeps one counter per downstream VC, reset to
`BUF_DEPTH`. It drops when a flit wins SA for that VC and rises when the
downstream buffer returns a credit. The credit loop takes about five cycles,
well inside 16 slots, so a single packet streams at one flit per cycle.
Assertions check that a counter never exceeds `BUF_DEPTH`, that no FIFO is
pushed when full or popped when empty, and that an idle VC only ever sees a
head flit at its front.

The SA stage is a separable input-first allocator: an input whose chosen VC
loses at the output does not retry another VC in the same cycle. This keeps
the logic small at the price of some throughput under heavy load.

## Links, flits and the node interface

All links, node links included, carry the same two structs (package
`hsmbft_pkg`):

* `flit_t` (38 bits): `valid`, `ftype` (head, body, tail, head+tail), `vc`
  (3 bits), `data` (32 bits);
* `credit_t` (4 bits): `valid` and the VC whose buffer freed a slot.

A head flit's payload is `{gen_time[19:0], src[5:0], dest[5:0]}`. The
generation time lets the receiving node compute the packet latency as
"now minus gen_time" (modulo 2^20). Body and tail payloads are free.

`hsmbft_noc` exposes per node `node_in_flit` / `node_in_credit` (injection)
and `node_out_flit` / `node_out_credit` (ejection). A node must:

* start with 16 credits for each of the 8 VCs and send a flit only on a VC
  with a credit;
* keep a VC for one packet from head to tail (flits of different packets may
  be interleaved on different VCs);
* offer 16 flit slots per VC on ejection and return one credit per flit it
  consumes. It must consume eventually, or the network backs up.

Everything is synchronous to one clock with a synchronous, active-high
reset. Outputs are registered; node inputs are written straight into FIFOs.

## Files

| file                | content                                                                         |
|---------------------|---------------------------------------------------------------------------------|
| `rtl/hsmbft_pkg.sv` | sizes, flit and credit types, head layout, sibling/parent functions              |
| `rtl/hsmbft_noc.sv` | top: 16 level-1 and 4 level-2 routers wired as above, 64 node ports              |
| `rtl/vc_router.sv`  | the five-stage VC router                                                         |
| `rtl/route_compute.sv` | routing function                                                              |
| `rtl/input_buffer.sv`  | per-VC flit FIFO                                                              |
| `rtl/rr_arbiter.sv` | round-robin arbiter used by both allocators                                      |
| `rtl/crossbar.sv`   | output multiplexers                                                              |
| `tb/tb_*.sv`        | one self-checking testbench per module                                           |

## Simulation

Every testbench ends with `TB_RESULT checks=N failures=M` and has a cycle
watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/hsmbft_pkg.sv tb/tb_hsmbft_noc.sv \
          --top-module tb_hsmbft_noc -Mdir obj_noc
obj_noc/Vtb_hsmbft_noc
```

Replace `hsmbft_noc` by `vc_router`, `route_compute`, `input_buffer`,
`rr_arbiter` or `crossbar` for the unit tests. Building the full network
produces a large C++ model and takes a few minutes; the run itself takes
seconds.

* `tb_hsmbft_noc` runs the whole network at its default sizes. It has
  traffic sources and sinks on all 64 nodes. First it sends single packets
  from node 0 over 1, 2, 3 and 4 routers and checks 5, 10, 15 and 20 cycles
  of latency. Then it runs five synthetic patterns with every node injecting
  at once: uniform random, hotspot (20 % of packets to four hot nodes),
  transpose, shuffle and neighbour (the last three on an 8x8 arrangement of
  node numbers). One packet in three is 150 flits long. A final phase uses
  slow sinks to push back-pressure through the whole network. Every packet is
  checked for destination, source, order, length and time stamp. The test
  also counts, and requires, paths of each length, traffic on sibling, up
  and down links, switch conflicts, VC-allocation waits, credit stalls and
  150-flit packets. It prints the average head latency per pattern. These
  are saturation-style bursts, not the steady injection-rate sweeps used to
  compare topologies, so the numbers are not comparable with such studies.
* `tb_hsmbft_dvopd` runs the dual video object plane decoder workload: 32
  cores placed four per router on R0-R7, and every edge of its core graph
  sending one 16-flit packet per 16 MB/s of bandwidth. All 578 packets must
  arrive intact; the average head latency is printed.
* `tb_vc_router` drives a single level-1 router (router 5) from eight
  sources into eight back-pressuring sinks. It checks routing, flit
  integrity, one packet per VC at a time, no buffer overflow, 5-cycle head
  latency, and one-per-cycle body flits.
* `tb_route_compute` checks every router/destination pair and walks every
  node pair through the network.
* `tb_input_buffer`, `tb_rr_arbiter` and `tb_crossbar` compare against
  reference models.

## Design choices and limits

The topology, port counts, router counts, link counts, VC count, buffer
depth, flit width, the 150-flit packet length used in testing and the
five-stage router depth follow the published H-SMBFT configuration. The
following are this implementation's own choices:

* credit-based VC wormhole flow control, the split of the five stages
  (BW/RC/VA/SA/ST), the separable round-robin allocators and
  lowest-free-VC selection;
* up-first shortest-path routing computed in each router (the original
  evaluation used table-based source routing for mapped applications);
* the flit sideband, the head-flit layout and the port numbering;
* links are plain wires between registers. The physical link classes (node,
  sibling and up/down links of different lengths) have no logic of their own
  and are not modelled;
* the network size is fixed at 64 nodes. The parent rule (i mod 4) only
  yields a complete tree at this size; a larger network needs a new parent
  rule, a third level and fifth ports on the level-2 routers;
* processing elements and network interfaces are not part of the RTL. The
  testbenches contain behavioural traffic sources and sinks instead.

**Changing sizes.** `BUF_DEPTH` is a parameter of `hsmbft_noc` and
`vc_router`. `NUM_VC` and `FLIT_W` live in `hsmbft_pkg`. The head layout
needs `FLIT_W` of at least 13 bits, and the testbenches assume 32-bit flits
for their {id, sequence} payloads. Resizing the network means rewriting
`route_compute`, the wiring in `hsmbft_noc` and the constants in the package.
