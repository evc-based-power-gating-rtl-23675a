# Power-gated mesh NoC with express virtual channels

Power-gating the routers of a network-on-chip saves leakage, but a packet
that meets a sleeping router has to wait for it to wake up, and every router
on its way may add that wait again. This design lets packets jump over
routers instead. Every router sits on *virtual bypass paths*, each three hops
long, in every direction. A packet with at least three hops to go in its
current dimension is sent on such a path. It is stored again only at the end
of the path, the *sink*. The two routers it crosses in between do not need
their buffers powered, and they may stay asleep. Only the buffers (virtual
channels) are gated. Route computation, the allocators, the crossbar and a
one-flit *EVC latch* per input port stay powered, so a sleeping router can
still forward express traffic.

The RTL is a parameterised 8x8 mesh (`evc_noc`) of identical five-port
routers (`evc_router`). It uses X-Y dimension-order routing, three virtual
networks (VNs) and 128-bit flits.

## Files

| file | content |
|---|---|
| `rtl/evc_pkg.sv` | constants, flit/link structs, power-state enum, event vector |
| `rtl/evc_noc.sv` | the mesh: neighbour wiring and 3-hop source/sink wiring |
| `rtl/evc_router.sv` | router: RC+VA, SA, crossbar, output registers, handshakes |
| `rtl/input_port.sv` | VCs of one input, EVC latch, direct link |
| `rtl/pg_ctrl.sv` | power control unit (idle detection, sleep, wake-up) |
| `rtl/route_compute.sv` | X-Y routing and the bypass decision |
| `rtl/starvation_ctrl.sv` | starvation detection and freeze hold for one output |
| `rtl/flit_fifo.sv` | first-word fall-through VC buffer |
| `rtl/rr_arbiter.sv` | round-robin arbiter |
| `tb/tb_*.sv` | self-checking testbenches, one per module |
| `tb/evc_noc_tester.sv` | end-to-end traffic, scoreboard and mechanism counters |

## Flits and virtual channels

A flit (`flit_t`) carries:

- the type (head, body, tail, head+tail) and the VN;
- the source and destination coordinates;
- 128 data bits;
- three bits used only by the power and bypass logic:
  - `express`: the flit travels on a bypass path;
  - `ehops`: how many intermediate routers are still to be crossed (2 at the source);
  - `to_latch`: a normal flit sent into the EVC latch of a router that is not powered.

Each input port has one normal VC (N-VC) and one express VC (E-VC) per VN.
VC index = `kind*3 + vn`. VN0 (control) VCs hold 1 flit, and the data VCs
hold 5 flits (`CTRL_DEPTH`, `DATA_DEPTH`). A downstream VC is given to a new
packet once the previous packet's tail has left it. Packets in one VC queue
behind each other.

## Pipeline

A flit that is buffered in a router goes through four stages:

1. Buffer write.
2. Route computation and VC allocation in the same cycle.
3. Switch allocation.
4. Switch traversal into the output register, which drives the link.

A flit written in cycle *t* is on the output link in cycle *t+3*. Allocation
is round-robin. VC allocation has one arbiter per downstream VC, shared by
all input VCs of that VN. Switch allocation has one arbiter per output,
over all 30 input VCs.

N-VC credits go back to the upstream neighbour. E-VC credits go from the
sink straight back to the source of the bypass path. Both are registered.

## Express paths

`route_compute` picks the output port by X-Y order. It marks the packet
express when three or more hops remain in the dimension it is travelling,
and the neighbour has not asked it to stop (see *Starvation*). The source
then needs:

- a free E-VC at the sink, three hops away;
- PG_EVC de-asserted by the sink;
- a credit on that E-VC.

It raises WU_EVC to the sink while it has such a packet. This wakes the
sink, not the two routers in between.

At each intermediate router the express flit does not touch the VCs:

- **Latch path.** The flit is held for one cycle in the EVC latch of its
  input port. It then takes the opposite output with the highest priority,
  ahead of any local switch grant. A flit already switched to that output
  waits one cycle in the switch-traversal register.
- **Direct link.** If the latch is busy with a normal flit (next section),
  the express flit crosses through a direct link. It reaches the output
  register in the cycle it arrives.

`ehops` is decremented at every intermediate router. At the sink
(`ehops == 0`) the flit is written into the E-VC and treated as a normal
local flit from there on. It may start a new bypass path.

## Sending into a sleeping router

A router that is idle or asleep asserts **PG** to its neighbours. A
neighbour with a normal flit for it raises **WU**. While PG is still
asserted, the neighbour may send one normal flit at a time marked
`to_latch`. The flit is held in the EVC latch of the receiving input port,
which is powered all the time. The receiver treats the held flit as the
front of the matching N-VC, so it goes through routing and allocation like
a buffered flit. When it leaves, a one-bit *latch token* goes back to the
sender, which may then send the next one. Once PG drops, the normal path
with N-VC credits is used again.

## Power states and timing (`pg_ctrl`)

| state | VCs | PG | PG_EVC | left when |
|---|---|---|---|---|
| ACTIVE | on | 0 | 0 | router empty (no flit in VCs, latches, switch or output registers) |
| IDLE | on | 1 | 1 | `T_IDLE_DETECT` (8) empty cycles -> SLEEP; any WU/WU_EVC or new flit -> ACTIVE |
| SLEEP | off | 1 | 1 | WU or WU_EVC -> WAKEUP |
| WAKEUP | charging | drops | drops | `T_WAKEUP` (8) cycles -> ACTIVE |

During wake-up, PG_EVC drops `T_WAKEUP - MARGIN_EVC` (2) cycles after the
request. PG drops `T_WAKEUP - MARGIN` (4) cycles after the request. The
counting starts with the request cycle as cycle 0, so the router is fully
charged in cycle 9.

A flit launched by a source three hops away, right after PG_EVC drops,
reaches the sink just as its VCs are charged. The same holds for a
neighbour's flit sent after PG drops. The input port checks with an
assertion that no VC is written while unpowered. The margins are
parameters: `MARGIN_EVC = 6`, `MARGIN = 4`, `T_WAKEUP = 8`.

Local injection also counts as a wake-up request. Injection is accepted
only while the VCs are powered.

## Starvation

A router whose outputs are full of express traffic can starve its own
flits. Each output has a `starvation_ctrl`. It counts consecutive cycles in
which a local flit waits for the output while an express flit holds it.
When the count reaches `STARVE_TH` (8), it records the waiting VCs and
raises two requests:

- **`freeze_out`** goes to the downstream neighbour. That neighbour asserts
  PG_EVC toward the opposite side, so the bypass path that would cross this
  router stops sending.
- **`stop_out`** goes to the upstream neighbour, which is the source of the
  other path crossing this router. That neighbour stops giving E-VCs in this
  direction and routes such packets on the normal path.

Both requests are held until every recorded VC has sent a tail and no
switched flit waits. The detection rule and threshold are this design's own.

## Interfaces

`evc_noc` has per-node arrays, indexed `y*MESH_X + x`:

- **Injection:** `inj_valid`, `inj_flit` and `inj_ready`. A flit is taken on
  the clock edge when valid and ready are both high.
- **Ejection:** `ej_valid` and `ej_flit`. They are valid for one cycle and
  are not back-pressured.
- **Status:**
  - `pstate` gives each router's power state.
  - `ev` gives each router's event pulses: express launch, latch bypass,
    direct-link bypass, normal flit held in a latch, express flit stored at
    the sink, starvation detected, sleep, wake-up.

Routers on the mesh edge see their missing neighbours as permanently gated
with no traffic. Reset is asynchronous and active low. After reset, every
router is ACTIVE and falls asleep once idle.

## Where this design makes its own choices

The document fixes the following, and the RTL follows it:

- the mesh size and routing;
- the VN, VC and buffer organisation;
- three-hop bypass paths starting at every router in every direction;
- the EVC latch and direct link;
- gating of only the VC buffers;
- the PG/PG_EVC and WU/WU_EVC handshakes and their margins;
- the worked wake-up timing (PG_EVC low 2 cycles after the request, fully charged at cycle 9);
- the freeze-based starvation handling.

This design chose the following itself:

- the exact pipeline split and round-robin allocation;
- when a VC may be reused;
- dedicated source-to-sink wires for E-VC credits;
- the one-flit latch token for sending into a gated router;
- the flit header encoding (`ehops`, `to_latch`);
- the starvation detection rule and `STARVE_TH`;
- treating injection as a wake-up request.

Not modelled:

- the power switch itself (the `sleep` output of `pg_ctrl` is where it
  would connect);
- the network interfaces, cores, caches and memory controllers;
- any power or energy accounting (the `ev` and `pstate` outputs allow
  counting the events).

## Simulation

Every testbench prints `TB_RESULT checks=<n> failures=<m>` and stops itself.
Example for the router test:

    verilator --binary --timing --assert -Wno-fatal \
      rtl/evc_pkg.sv rtl/rr_arbiter.sv rtl/flit_fifo.sv rtl/pg_ctrl.sv \
      rtl/route_compute.sv rtl/starvation_ctrl.sv rtl/input_port.sv \
      rtl/evc_router.sv tb/tb_evc_router.sv --top-module tb_evc_router
    ./obj_dir/Vtb_evc_router

### End-to-end tests

The end-to-end tests add `rtl/evc_noc.sv` and `tb/evc_noc_tester.sv`.
`tb_evc_noc` runs a 4x4 mesh. It builds in under two minutes and runs in
a few seconds, checking 1106 packets. `tb_evc_noc_full` runs the default
8x8 mesh with no parameter overrides. Its C++ model takes about eight
minutes to compile on four cores and about 16 s to run, checking 4228
packets. Both run these phases:

1. All routers fall asleep.
2. Two packets follow the wake-up example. Node 0 sends to node 3, and
   node 1 sends to node 3 one cycle later.
3. Uniform-random, transpose and bit-complement traffic, at 1.5 % injection
   for 1500 cycles each. Bit-complement maps (x,y) to (N-1-x,N-1-y).
4. A hot row that forces starvation. Express traffic from the first two
   nodes of row 1 crosses the third node, which sends to its east
   neighbour.

A scoreboard checks that every packet arrives once, in order and unchanged.
The test fails if any of the eight mechanisms above never happened. The
same check fails if no express flit ever crossed a router that was not
ACTIVE.
