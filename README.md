# Buffer-less deflection router for 2D and 3D mesh networks on chip

A router in a network on chip usually spends much of its area and power on
input buffers. This design removes them. Every flit that enters a router in one
cycle leaves it in the next cycle. If two flits want the same output port, one of
them is sent out through some other free port (it is *deflected*) and finds its way
from there. The only buffer left is a small queue where the local node waits to
inject.

The router descends from the single-stage, input-queued router of an
FPGA-oriented NoC generator. Its FIFOs are replaced by one pipeline register per
input. Its allocator is replaced by one that ejects, arbitrates, deflects and
injects in a single cycle. The design was extended from five ports (2D mesh) to
seven ports by adding UP and DOWN. This RTL builds the seven-port router and a
configurable `MESH_SIZE x MESH_SIZE x TIERS` mesh of them. Each position of a tier
can be a 3D router or a 2D router. The default is a 4 x 4 x 4 mesh in which every
router is 3D, with 64-bit payloads.

## Ports, coordinates and flits

| port | name  | neighbour     |
|------|-------|---------------|
| 0    | LOCAL | the node (inject / eject) |
| 1    | WEST  | x - 1 |
| 2    | SOUTH | y - 1 |
| 3    | EAST  | x + 1 |
| 4    | NORTH | y + 1 |
| 5    | UP    | z + 1 (3D routers only) |
| 6    | DOWN  | z - 1 (3D routers only) |

Router addresses are `z*MESH_SIZE^2 + y*MESH_SIZE + x`. A flit is
`{valid, tail, dest, vc, data}` (MSB first). With 64 routers that is
1 + 1 + 6 + 1 + 64 = 73 bits. A 16-router 2D mesh has 71-bit flits. The routers
look only at `valid` and `dest`. There is a single virtual channel, so `vc` is
always 0. `tail` is carried but not interpreted: each flit is routed on its own,
and the flits of one packet may arrive out of order.

`ROUTER3D_MASK` holds one bit per position of a tier (bit `x + y*MESH_SIZE`).
Every tier uses the same mask. Vertical links exist only where the bit is set.

## Routing tables

Every input port of every router, the local one included, has its own look-up
table with one entry per router of the network. Each entry gives the output port
toward that destination. All seven tables of a router hold the same contents,
which depend only on the router's position. `routing_table` computes them at
elaboration time:

* **Destination on this tier:** x first (EAST or WEST), then y (NORTH or SOUTH).
* **Destination on another tier:** travel to the nearest 3D router of the
  current tier, x then y. The distance is Manhattan distance, and a tie goes to
  the lowest position index. At that router, take UP or DOWN.
* **Destination is this router:** LOCAL.

When every router is 3D, this reduces to z first, then x, then y. The tables are
read combinationally, as a distributed RAM would be. A deflected flit needs no
special handling: its new router's table already holds the right port.

## One router cycle

`router3d` registers each arriving flit together with the port its table
returned (`input_port`). In the next cycle it does the following, all in
combinational logic:

1. **Eject and static arbitration, in parallel** (`eject_unit`,
   `static_output_arbiter`).
   * **Ejection.** Flits addressed to this node compete for the single ejection
     port. A round-robin pointer picks one, and the pointer then moves past the
     winner.
   * **Static arbitration.** Each network output goes to one of the flits whose
     productive direction it is. The priority is fixed, lowest input index first
     (WEST, SOUTH, EAST, NORTH, UP, DOWN). Giving every productive request the
     port it wants whenever nobody else wants it keeps the number of needless
     deflections low.
2. **Deflection** (`deflection_unit`). The losers of step 1 include flits that
   lost the ejection. They go into a 6 x 6 matrix of `grant_cell`s:
   * A losing flit travels along its row.
   * A free, existing network port travels down its column.
   * Where the two meet, the port is granted, and neither signal goes on.

   All losers are placed in one pass. The result is the same as handing out free
   ports greedily: the first loser gets the lowest free port, the next loser the
   next one, and so on. A mesh router has as many outgoing links as incoming
   ones, so there is always a port for every loser. An assertion checks this.
3. **Late injection** (`inject_unit`). If any network port is still free, the
   head of the injection queue leaves through it. It takes its productive port if
   that port is free, otherwise the lowest free port. A new flit therefore never
   displaces a flit already in the network.
4. **Switch** (`switch_encoder`). Each input's one-hot grant is encoded as
   `{dequeue, port}`, and one multiplexer per output picks its flit. Only the
   header takes part in allocation; the payload moves only through these
   multiplexers.

`allocator` wires steps 1–3 together and reports events for each cycle:
* flits deflected;
* an ejection refused;
* an injection, and whether it went to its productive port;
* an injection stalled.

Links that do not exist are never offered to deflection or injection. These are
links at the mesh edge, the UP/DOWN links of 2D routers, and the top and bottom
tiers. With `TIERS = 1` the router therefore behaves as the five-port 2D router.
It has the same area as the seven-port router, because two ports sit unused.

## Injection queue and credits

`injection_queue` is an 8-entry circular FIFO held in a memory array. It is the
only flow control in the network: the routers have no back-pressure between
them. Each flit taken by the router returns a one-cycle `inj_credit` pulse to the
node. The testbenches use the rule of the original evaluation setup: a node
pushes only while more than three slots are free.

## Timing

* One hop costs one cycle. A flit on `link_in` in cycle t is registered, then
  leaves on `link_out` in cycle t+1. A flit in a router's input register is
  ejected on `ej_flit` in the same cycle.
* A flit pushed at clock edge e is at the queue head after e. If a port is free
  it is injected in that cycle.
* On an empty network, the time from the push edge to the cycle in which
  `ej_flit` shows the flit equals the hop count. `tb_noc_mesh3d` checks this.

## Measured behaviour

These results come from simulating this RTL with the testbenches below. Traffic
is generated at every node. Throughput is accepted flits per node per cycle, and
latency runs from push to ejection, queueing included.

| network | traffic | saturation throughput | latency at 10% load |
|---------|---------|-----------------------|---------------------|
| 4x4x4, all 3D (default) | uniform | 0.534 | 4.0 |
| 8x8 | uniform | 0.316 | 5.8 |
| 4x4x3, ten 3D routers per tier | uniform | 0.478 | 3.9 |
| 4x4 | uniform | 0.52 | 2.8 |
| 4x4 | transpose | 0.50 | 4.0 |
| 4x4 | bit complement | 0.46 | 4.5 |

The published evaluation of the design reports about 0.52 for the 4x4x4 mesh
against 0.30 for the 8x8 mesh, and 0.52 for the 3D router in its comparison
table. Its latency figures use a different measurement window and are not
directly comparable.

## What is interpretation rather than specification

The source description gives the structure above but leaves the following open.
This RTL settles them as shown:

* **Arbitration orders.** Static priority is lowest input first. The round-robin
  pointer moves to the input after the winner. A deflected or injected flit takes
  the lowest free port.
* **Deflection matrix layout.** Requests enter at the matrix edge rather than on
  its diagonal. The matching found is of the same kind, without a wrap-around
  path.
* **The local input in allocation.** The source sizes the static arbiter as
  7 x 7. Here the local flit is served only by the late-injection stage, which
  also fixes its lowest priority.
* **Tie-break for the nearest 3D router.** The lowest position index wins.
* **Flit field order, queue depth and reset.** The order is
  `{valid, tail, dest, vc, data}`. The queue depth of 8 comes from the generator
  configuration the router starts from. Reset is synchronous and active low.
* **Livelock.** There is no age or priority field, and none is described. With
  fixed priorities an adversarial pattern could in principle circulate a flit
  for a long time. Every test drains completely.
* **Not built.** An alternative allocator built as a three-stage permutation
  network (stated to perform the same) is not included.
* **Area and power.** The evaluated results depend on FPGA mapping and are not
  reproduced.

## Files

| file | content |
|------|---------|
| `rtl/noc_pkg.sv` | port enum, port count |
| `rtl/routing_table.sv` | per-port routing look-up table |
| `rtl/input_port.sv` | table look-up + flit/port pipeline registers |
| `rtl/eject_unit.sv` | round-robin ejection |
| `rtl/static_output_arbiter.sv` | fixed-priority productive-port arbiter |
| `rtl/grant_cell.sv`, `rtl/deflection_unit.sv` | deflection matrix |
| `rtl/inject_unit.sv` | late injection |
| `rtl/allocator.sv` | the allocation stages |
| `rtl/switch_encoder.sv` | encoders + output multiplexers |
| `rtl/injection_queue.sv` | node injection FIFO with credits |
| `rtl/router3d.sv` | the seven-port router |
| `rtl/noc_mesh3d.sv` | the mesh (top) |

Each block has a self-checking testbench, `tb/tb_<block>.sv`, which prints
`TB_RESULT checks=N failures=M`. `tb/tb_noc_mesh3d.sv` runs the default network
end to end: zero-load latency, uniform, transpose and complement traffic, drain,
and a scoreboard for every flit. `tb/tb_workloads.sv`, with
`tb/traffic_harness.sv`, sweeps the injection rate on the networks in the table
above.

## Simulating

With Verilator 5, from the top folder:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/noc_pkg.sv tb/tb_noc_mesh3d.sv --top-module tb_noc_mesh3d -Mdir obj
./obj/Vtb_noc_mesh3d
```

Replace `tb_noc_mesh3d` with any other testbench name. The package must be
listed first; the other files are found through `-y`.

## Changing the network

Set the `noc_mesh3d` parameters:
* `MESH_SIZE`, for a square tier;
* `TIERS`;
* `ROUTER3D_MASK`, for the 3D positions, for example `16'b1001_0110_0110_1111`
  for ten 3D routers per tier;
* `DATA_W`;
* `INJ_DEPTH`.

The address width, the flit width and every routing table follow from these. A
mask with no 3D router is meaningful only when `TIERS = 1`.
