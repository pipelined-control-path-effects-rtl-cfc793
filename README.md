# Wormhole-switched mesh NoC router with ID-tag routing and a short control path

This is a synthesizable SystemVerilog model of a 2D-mesh network-on-chip. Each
router has five ports (East, North, West, South, Local), uses static XY routing
and switches 39-bit flits. It has two distinctive features:

* **Messages are identified on every link by a small ID-tag, not by the
  header.** Only the header flit carries an address. Every later flit of the
  message finds its way through a per-port routing table indexed by its 4-bit
  ID-tag. Each output port renames tags so that up to 16 messages can be
  interleaved flit by flit on one link.
* **The control path is short, and its length can be chosen.** The control
  path is the routing request followed by arbitration. In the default router
  (`CTRL_PIPE=1`) the routing engine moves the flit into a data register while
  it routes it, so a single stream crosses a port at one flit every 2 cycles.
  The alternative (`CTRL_PIPE=2`) leaves the flit in the input queue during
  routing and arbitration and manages one flit every 3 cycles. Both need the
  same 4 cycles per hop. The first is about 1.5x faster under load for one
  extra flit register per input port.

Link-level flow control uses one full flag per link, so no flit is ever
dropped.

## Flit and message format

| bits    | field  | meaning                                        |
|---------|--------|------------------------------------------------|
| 38..36  | type   | `001` header, `010` data body, `011` tail      |
| 35..32  | id-tag | local message tag on the current link (0..15)  |
| 31..0   | data   | payload, or the addresses in a header          |

A header's data word holds eight 4-bit fields. From bit 31 down they are
`Xs Ys Zs Xt Yt Zt ext1 ext2`, where s marks the source and t the target.
Routing uses only `Xt` (bits 19..16) and `Yt` (bits 15..12). The Z
coordinates are reserved for a 3D or hierarchical network. The Z and ext
fields are carried through unchanged. A message is one packet: a header, any
number of body flits, then a tail. The tail releases the path. The type codes
are this implementation's choice.

## How a message finds its way: routing tables and ID slot tables

This is the least conventional part of the design, and it spans two modules.

**Input side (`route_engine` / `route_engine_buf`).** Each input port has a
routing table with one 3-bit output-port entry per ID-tag. Suppose a header
with tag `h` reaches the head of the port. The engine computes the XY
direction: East or West until the column matches, then North or South, then
Local. It uses that direction and also writes it into entry `h`. A body or
tail flit with tag `h` simply reads entry `h`. So flits of different messages
can be mixed in the same queue and each one still follows its own header.

**Output side (`mim`, multiplexor with ID management).** Each output has an
ID slot table of 16 entries `{valid, input port, old tag}`. When the arbiter
switches a flit from input `p` with tag `h` onto this output:

* **header:** the lowest free slot `j` is claimed with `(p, h)`, and the
  header leaves with tag `j`;
* **body:** the slot holding `(p, h)` is looked up, and the flit leaves with
  that slot's number;
* **tail:** it is looked up the same way, and then the slot is freed.

Tags are therefore unique per link, not per network. Example: messages enter
a router on West with tag 1, on East with tag 0 and on Local with tag 0, and
all three go South in that order. On the South link they become tags 0, 1 and
2. The next router's North-port routing table learns their directions under
those new tags. If all 16 slots of an output are taken, a header waiting for
that output is held back (`blk` to the arbiter) until a tail frees a slot.
Body and tail flits are never held back for this reason, because their slot
already exists.

## One hop, cycle by cycle

A flit is on the incoming link in cycle 0. Both variants put it on the
outgoing link in cycle 4:

| cycle | `CTRL_PIPE=2` (RE)                                | `CTRL_PIPE=1` (REB)                               |
|-------|---------------------------------------------------|---------------------------------------------------|
| 0     | flit on input link, written into the queue        | same                                              |
| 1     | flit at queue head; direction computed, registered | flit at queue head; moved into REB register with its direction |
| 2     | direction held (routing phase)                    | REB holds flit + direction (routing phase)        |
| 3     | `rr` to arbiter, grant, pop queue, MIM registers flit | `rr` to arbiter, grant, next head loaded into REB, MIM registers flit |
| 4     | flit on output link                               | flit on output link                               |

The difference shows in the next flit of the same stream. With the RE, that
flit reaches the queue head only in cycle 4 and is granted in cycle 6, so the
stream moves one flit every 3 cycles. The REB loads the next flit at the
grant edge of cycle 3, and that flit is granted in cycle 5, so the stream
moves one flit every 2 cycles. The arbiter's grant is combinational: it
selects the MIM input and acknowledges the input port in the same cycle. The
grant unit (`grant_unit`) turns that acknowledge into the queue or REB read
enable.

## Link-level congestion control

Each link carries a flit, a write enable `ew` (the sending MIM's output
register) and a full flag `ff` going back. An arbiter grants nothing while
the `ff` of its output link is high. A grant becomes a flit on the link one
cycle later, so the queue raises `ff` in two cases:

* it holds 2 flits;
* it holds 1 flit and another is on the link in this cycle.

With this rule, a 2-deep queue can never overflow, whatever the reader does.
An assertion in `fifo_queue` checks this. The rule raises the flag one cycle
earlier than "both registers full". This costs nothing for a single stream:
the transpose rates below match the published ones.

At the mesh edges, links are tied off: no flit enters, and `ff` is held high.

## Arbitration and crossbar

Each output arbiter serves its requesting inputs round-robin. The search
starts after the last input it granted, so competing messages share a link
flit by flit. The crossbar (inside `noc_router`, mask `noc_pkg::CONN`) has only the
connections that XY routing can use:

| output | inputs        |
|--------|---------------|
| East   | West, Local   |
| West   | East, Local   |
| North  | East, West, South, Local |
| South  | East, North, West, Local |
| Local  | East, North, West, South |

All five outputs can switch a flit in the same cycle.

## The mesh

`noc_mesh` places `MESH_X x MESH_Y` routers (4x4 by default). Node `(x, y)` is
index `y*MESH_X + x`, and `y` grows towards North. The Local port of each
router is brought out as arrays:

* `inj_flit/inj_ew/inj_ff`: into the router, for the tile's network
  interface;
* `ej_flit/ej_ew/ej_ff`: out of the router.

A tile may write a flit in cycle t+1 if it saw `inj_ff` low at the clock edge
ending cycle t, exactly as a neighbouring router does. The tiles themselves
(processor, memory, DMA, network interface) are not part of this RTL.

## Measured behaviour (transpose traffic, 4x4)

The test is the classic transpose pattern. Tile `(i,j)` sends one message of
N flits to `(j,i)` for the six pairs below the diagonal. Three of them share
the links into and out of node (0,0), two share links at node (1,1), and
pair 6, (3,2)->(2,3), runs alone. The table gives N divided by the latency of
the last flit, at N = 4000:

| pair | route          | `CTRL_PIPE=1` | published | `CTRL_PIPE=2` | published |
|------|----------------|---------------|-----------|---------------|-----------|
| 1    | (1,0)->(0,1)   | 0.250 fpc     | 0.259     | 0.167         | 0.166     |
| 2    | (2,0)->(0,2)   | 0.167         | 0.249     | 0.111         | 0.166     |
| 3    | (3,0)->(0,3)   | 0.167         | 0.166     | 0.111         | 0.111     |
| 4    | (2,1)->(1,2)   | 0.250         | 0.247     | 0.167         | 0.166     |
| 5    | (3,1)->(1,3)   | 0.250         | 0.249     | 0.167         | 0.166     |
| 6    | (3,2)->(2,3)   | 0.499         | 0.497     | 0.333         | 0.332     |

The latencies grow linearly with N: about 16000 / 24000 / 8000 cycles for
pairs 1 / 3 / 6 at N = 4000 with the 1-cycle router. Pair 2 is the one
difference. Here, pairs 2 and 3 enter node (1,0) through the same port and
split that port's half of the link evenly, so both finish together. In the
published results, pair 2 kept pace with pair 1. That outcome depends on
details of the original arbiter that are not known. A priority pointer
rotating every cycle was also tried and matched worse.

The price of the faster router is the REB's 39-bit data register, one per
input port. A generic synthesis of this RTL gives 92 flip-flops for one REB
against 54 for one RE. The ID slot tables in the MIMs remain the largest
part of the router. The original gate-level comparison found the same
ordering, with about 6.5% more router area for the faster variant.

At 1 GHz, one flit per 2 cycles is 2 GB/s per link with 4-byte payloads. With
five ports switching in parallel, that is 10 GB/s per router.

## Departures from the original design and choices made here

* Flit type codes, reset behaviour (asynchronous, active low, all tables
  cleared) and round-robin arbitration order are this implementation's.
* The full flag also rises when one flit is stored and one is on the link
  (see above). The original timing shows the flag only with both registers
  full.
* The routing and ID slot tables have 16 entries, one per value of the 4-bit
  tag. The original text speaks of 15 slots, but its slot-table example
  numbers them 0 to 15.
* Holding back headers when an output's slot table is full is this
  implementation's rule. The original does not say what happens then.
* The grant unit is an AND-OR of the port's request with the arbiters'
  acknowledges. Only its role is known from the original.
* The 2-cycle routing engine's three states (route, wait, request) and the
  REB's request one cycle after loading reproduce the published timing
  diagrams. The exact insides of those engines are not known.
* Pair 2 of the transpose test shares bandwidth differently from the
  published results (see above).

## Files

| file | content |
|------|---------|
| `rtl/noc_pkg.sv` | flit struct, type and port enums, crossbar mask, XY routing function |
| `rtl/fifo_queue.sv` | 2-deep input queue with full flag |
| `rtl/route_engine.sv` | RE: routing engine of the 2-cycle router |
| `rtl/route_engine_buf.sv` | REB: routing engine with data buffer (1-cycle router) |
| `rtl/grant_unit.sv` | G: acknowledge to read enable |
| `rtl/arbiter.sv` | per-output round-robin arbiter |
| `rtl/mim.sv` | output multiplexor with ID slot table and link register |
| `rtl/noc_router.sv` | five-port router with its XY-restricted crossbar, `CTRL_PIPE` = 1 or 2 |
| `rtl/noc_mesh.sv` | top: `MESH_X x MESH_Y` mesh with Local ports brought out |
| `tb/tb_*.sv` | self-checking testbenches, one per module |
| `tb/tb_tile_model.sv` | traffic source/sink standing in for a tile |
| `tb/tb_transpose_driver.sv` | transpose workload at N = 250 ... 4000 |
| `tb/tb_noc_mesh_full.sv` | transpose workload on the default mesh |
| `tb/tb_transpose_ctrl2.sv` | same on the 2-cycle-router mesh |
| `tb/tb_noc_mesh.sv` | both meshes end to end, slot exhaustion, stalls, mechanism counters |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops by itself;
each has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/noc_pkg.sv tb/tb_noc_mesh_full.sv --top-module tb_noc_mesh_full
./obj_dir/Vtb_noc_mesh_full
```

Substitute any other `tb/tb_*.sv` to test a single module. The full
transpose sweep runs in about a second once built. To change the mesh size
or control path, set the `noc_mesh` parameters `MESH_X`, `MESH_Y` and
`CTRL_PIPE`. Coordinates are 4 bits wide, so a mesh can be at most 16x16.
`fifo_queue` has a `DEPTH` parameter, but `noc_router` instantiates it
with 2. The table modules have an `N_ID` parameter. Keep it at 16 or less,
because the ID-tag field is 4 bits.
