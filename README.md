# A table-routed wormhole network-on-chip for small multiprocessors

A multiprocessor system-on-chip needs its processors to exchange messages
without a shared bus becoming the bottleneck. This design gives every
processor its own small router and connects the routers as a torus: a ring
(one dimension) or a grid whose rows and columns wrap around (two
dimensions). Messages travel as *worms* of 32-bit flits. The header flit
carries the destination. Each router looks the destination up in a small
routing table to pick the next hop, and the body follows the header
hop by hop. Routes live in tables, not in logic. Changing the topology or
moving a task to another processor only means rewriting table entries, and
the tables can be rewritten while the network runs.

The RTL follows the router of the paper "Integrated Modeling and Generation
of a Reconfigurable Network-On-Chip". It keeps that router's structure, flit
size, buffer sizes and link rate. Where the paper leaves a detail open, this
design makes its own choice, and each such choice is listed under
[Departures and open points](#departures-and-open-points).

## The network as built

`noc_top` holds the two configurations the paper evaluates, side by side:

| instance  | topology             | router | nodes |
|-----------|----------------------|--------|-------|
| `u_ring`  | 1 x 4 ring (1D torus)| 1D     | 4     |
| `u_torus` | 2 x 2 2D torus       | 2D     | 4     |

Both networks share the clock and reset and are otherwise independent. For
each node the top has two processor links: `*_pin_*` (processor to network)
and `*_pout_*` (network to processor). It also has a routing-table write
strobe per router (`ring_cfg_we[n]`, `tor_cfg_we[n]`) and a shared entry
address and value (`cfg_addr`, `cfg_route`). The processors are not part of
the RTL. The testbenches drive these links from a behavioural processor model.

Both networks are built by `noc_torus` (ROWS x COLS routers; ROWS = 1 gives a
ring of 1D routers). Node `n = y*COLS + x` sits at column x, row y. Every ring
is **unidirectional**. The X output of node (x,y) feeds node (x+1 mod COLS, y),
and the Y output feeds node (x, y+1 mod ROWS). So a 2D router has three inputs
(X, Y, processor) and three outputs (X, Y, processor), and a 1D router has two
of each.

## Flits and worms

```
 31  30  29                                             0
+---+---+------------------------------------------------+
| T | H |                payload (30 bits)               |
+---+---+------------------------------------------------+
 H=1,T=0 header   H=0,T=0 body   H=0,T=1 tail   H=1,T=1 one-flit message
 header payload[3:0] = destination node
```

A worm is a header, any number of body flits and a tail. A message of a
single word is one flit with both bits set. The hardware reads only the
control bits and, in headers, the destination field. Everything else is free
for software. That leaves 30 payload bits per 32-bit flit, which is where
the 30/32 factor of the bandwidth figures below comes from.

## Links: the handshake

Every link (router to router, and processor to or from router) carries
`req`, `vc` (router links only) and a flit forwards, and `ack` backwards.
Router-to-router links also carry `nack` backwards. The sender raises `req`
with the flit and holds both until the receiver answers with a one-cycle
pulse. It then drops `req` for at least one cycle:

```
cycle     0      1      2      3      4      5
req     __/‾‾‾‾‾‾‾‾‾‾‾‾\______/‾‾‾‾‾‾‾‾‾‾‾‾\______
ack     _________/‾‾‾‾\_____________/‾‾‾‾\______
data      < flit A      >      < flit B      >
```

A flit therefore costs exactly **3 cycles per link**, the rate the paper
gives. At 100 MHz that is 32 bit x 100 MHz / 3 x 30/32 = 1 Gbit/s of payload
per link.

The receiver reads the flit in the cycle in which `ack` is high, while the
sender still holds it. `nack` means "not now". The flit's target buffer in
the receiving router is full, or another worm owns it. The sender drops
`req`, keeps the flit, and may offer a flit of its *other* virtual channel
instead. In the cycle after a `nack` the receiver ignores the input, which
gives the sender a clean clock edge to change its offer. Processor inputs are
never refused. Their request simply waits. Assertions in `input_controller`,
`router_out_ctrl` and `proc_out_ctrl` check the handshake rules: hold until
answered, drop after the answer, never ack and nack together.

## Inside a router (`noc_router`)

```
  X in ─┐                             ┌─ VC0 ─┐
  Y in ─┼─> input_controller ──write──┤  VC1 ─┴─ router_out_ctrl ─> X out
  P in ─┘        │                    ├─ VC0 ─┐
           routing_table              │  VC1 ─┴─ router_out_ctrl ─> Y out
                                      └─ output buffer ─ proc_out_ctrl ─> P out
```

* **input_controller**: the single input controller. In each cycle it may
  grant one input. Router inputs always win over the processor input, because
  software on the processor side is slow. The router inputs share by round
  robin. An input is granted only if its flit can be taken now:
  * there is room in the target buffer;
  * for a header, the target virtual channel is not owned by another worm;
  * for a body or tail flit, the route its header stored for this input and
    link channel is used.

  The controller is a two-stage pipeline. In the *grant* cycle it raises
  `ack`, looks up the route and reserves the buffer. In the *read* cycle it
  writes the flit. Grants and reads overlap, so one flit per cycle can enter
  the router. That is what three inputs running at 3 cycles per flit need.
  A header makes its target buffer owned by its stream (input, link channel)
  and the tail releases it, so worms never interleave inside one buffer.
* **vc_fifo**: the buffers. Each router output has two virtual channels
  (VC0 and VC1), and there is one output buffer towards the processor. All
  hold `VC_DEPTH` / `OBUF_DEPTH` = 2 flits by default, which is the size the
  paper synthesised. Buffer size is the area/speed knob.
* **router_out_ctrl**: one per router output. It copies the head flit of a
  non-empty channel into its output register, takes turns between the two
  channels, and pops the flit only when it is acked. After a `nack` it tries
  the other channel first.
* **proc_out_ctrl**: delivers flits from the output buffer to the processor.
  The processor receives in a blocking way and may take as long as it likes.
  The output buffer keeps the routing channels moving meanwhile.

**Latency.** With nothing in the way, a flit's request at a router input
leads to its request at that router's output 3 cycles later: grant, read,
load the output register. From a processor's request to the delivery request
at the destination, a message therefore takes 3 x (hops + 1) cycles: 6 cycles
to a neighbour, 12 cycles three hops round the ring.

## Routing tables and virtual channels

This is the subtle part of the design. A torus ring is a cycle of buffers, so
wormhole routing on it can deadlock: every worm in the ring waits for a
buffer held by the next. The two virtual channels per output break the cycle
with a "dateline" rule that depends only on where the packet is and where it
is going. That is why the rule fits in the routing table:

* within the current ring, a packet uses **VC0 while it still has to cross
  the wrap-around link** (destination coordinate below the current one);
* it uses **VC1 once no wrap-around is ahead** (destination coordinate above
  the current one).

VC0 chains therefore always end at the wrap-around link, and VC1 chains never
reach it. Neither class of buffers can form a cycle. Between dimensions the
reset tables route X first, then Y. Y channels never wait for X channels, so
the 2D network is also free of cyclic waits.

Each `routing_table` has one entry per node, `{eject, dir, vc}`:

* `eject`: deliver to the local processor;
* `dir`: X (0) or Y (1);
* `vc`: virtual channel.

At reset each table is filled from `noc_pkg::torus_route` for the router's
own coordinates. An entry is rewritten with `cfg_we`/`cfg_addr`/`cfg_route`
and takes effect the next cycle. Each router input has its own read port, so
headers on all inputs are routed in the same cycle.

A rewritten table is trusted as it is. Routes written by hand must keep the
same properties: they must reach the destination, and their channel choices
must not close a cycle. The end-to-end test rewrites two tables of the 2x2
torus so that traffic from node 0 to node 3 goes Y first, checks that it
does, and restores them. Rewrite an entry only while no traffic it affects is
in flight. A worm already on its way keeps its route, but a later message from
the same source to the same destination could take a shorter path and
overtake it.

The `nack` on router links matters here too. One link carries both virtual
channels. If a flit blocked in VC0 could hold the link, a VC1 worm behind it
could never finish. That can happen when both worms turn into the same Y
channel, or both eject to the same processor. The `nack` lets the VC1 flit
pass.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `noc_top` | `RING_NODES` | 4 | nodes of the 1D ring |
| `noc_top` | `TOR_ROWS`, `TOR_COLS` | 2, 2 | size of the 2D torus |
| all network levels | `VC_DEPTH` | 2 | flits per virtual channel |
| all network levels | `OBUF_DEPTH` | 2 | flits in the processor output buffer |
| `noc_router` | `NDIM` | 2 | 1 = ring router, 2 = torus router |
| `noc_router`, `routing_table` | `ROWS`, `COLS`, `MY_X`, `MY_Y` | 2, 2, 0, 0 | network size and own position (reset routes) |
| `noc_pkg` | `ADDR_W` | 4 | destination field width, so at most 16 nodes |

## Files

`rtl/`, bottom up:

* `noc_pkg.sv`: flit, link and route types, default routing function;
* `vc_fifo.sv`: buffers;
* `routing_table.sv`: routing tables;
* `input_controller.sv`: input controller;
* `router_out_ctrl.sv`: router output controller;
* `proc_out_ctrl.sv`: processor output controller;
* `noc_router.sv`: the router;
* `noc_torus.sv`: a torus or ring of routers;
* `noc_top.sv`: the two evaluated networks.

`tb/` has one self-checking testbench per module, `tb_<module>.sv`. It has
two helpers:

* `router_harness.sv`: a router with modelled neighbours;
* `proc_model.sv`: behavioural processor that sends worms and checks every
  delivered one. Checks cover destination, in-order delivery per source,
  length and no interleaving.

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and stops itself
after a fixed number of cycles if something hangs.

## Simulating

With Verilator 5:

```
verilator --binary --timing -Irtl -y rtl -y tb rtl/noc_pkg.sv tb/tb_noc_top.sv \
          --top-module tb_noc_top -Mdir obj_top
./obj_top/Vtb_noc_top
```

Replace `tb_noc_top` with any other testbench name to run it. `tb_noc_top`
runs the whole design at its default sizes and takes well under a second. It:

* measures single-message latencies on both networks;
* sends bursts of 1000 messages on the ring;
* reconfigures and restores routes;
* runs random all-to-all traffic with slow receivers.

It counts each mechanism of the design and fails if one never occurs:

* refused flits;
* both virtual channels;
* wrap-around links;
* X-to-Y turns;
* ejection;
* router-versus-processor and round-robin conflicts;
* full virtual channels and full output buffers;
* multi-flit worms;
* table rewrites.

`tb_noc_torus` runs heavier random traffic on a 3x4 torus, a 1x5 ring and a
1x2 ring.

Measured with the processor model offering flits as fast as the link takes
them:

| case | cycles |
|---|---|
| ring, node 0 to 1 (1 hop) | 6 |
| ring, node 0 to 3 (3 hops) | 12 |
| torus, node 0 to 1 (1 hop) | 6 |
| torus, node 0 to 3 (2 hops) | 9 |
| ring, 1000 one-flit messages 0 to 1 | 3003 |
| ring, 1000 one-flit messages 0 to 3 | 3009 |

The paper's system-level numbers are 105 to 111 cycles for one packet and
46226 cycles for 1000 packets. They include the processor software's
handshakes (about 17 cycles per message), which lie outside this RTL.

## Departures and open points

These points follow from this design's own choices, not from the paper:

* **nack on router links.** The paper describes a two-way handshake and says
  that flow control is not supported. With two virtual channels sharing one
  link, a plain req/ack lets a blocked worm in one channel stop the other
  channel for good. The extra `nack` wire fixes this; without it, random
  traffic deadlocks.
* **Grant and read are pipelined** in the input controller. The paper's
  controller steps through them as separate states. Pipelining lets three
  inputs run at full rate.
* **Worms from different inputs interleave** in the input controller. The
  paper's controller state machine appears to stay with one input until that
  input's worm is finished. This one picks a new input every cycle, so a
  slow worm cannot hold up the other inputs. Ownership of the target buffers
  keeps each worm whole.
* **Virtual channels.** The 1D router has two virtual channels on its one
  router output. The 2D router has two per output, four in all. The paper
  says the 1D router has fewer channels, while its 1D input controller uses
  two channel sizes. The channel rule (VC0 before the wrap-around link, VC1
  after) is this design's own.
* **Chosen details.** The flit encoding, destination field, unidirectional
  rings, node numbering, X-then-Y reset routes, the table write port and the
  asynchronous active-low reset are all chosen here.
* **Buffer size is set at build time.** It is a parameter. There are no
  run-time size inputs.
* **Processor side.** The processors and the memory-mapped registers through
  which software drives the processor links are not included. Their register
  map is not specified. The processor links are plain req/ack ports.
* **Torus 0-to-3 latency.** In the 2x2 torus, node 0 to node 3 is two hops
  (9 cycles here). The paper reports the same total for its A-to-D and A-to-B
  cases on that network, which this numbering does not reproduce.
* **Synthesis.** Clock rate and FPGA area were not measured. The paper gives
  253 and 674 slices for the 1D and 2D routers, and 104 MHz and 85 MHz for
  the 1D and 2D networks.
