# Adapt-NoC: a network-on-chip whose topology can change at run time

A chiplet-based manycore runs several applications side by side. Each application has its own
traffic pattern:
- CPU applications send little traffic, mostly between cores.
- GPU applications flood the memory controllers.
- Mixed CPU/GPU applications do both.

A single fixed mesh suits none of them well. This design lets a region of the chip (a
*subNoC*) take the topology that suits the application running in it: mesh, concentrated mesh,
torus, or a mesh for requests with a tree for replies. It can also change that topology while
the rest of the chip keeps running.

The system is an 8x8 grid of routers, made of four 4x4 chiplets that sit on an active silicon
interposer. The chiplets hold the usual mesh links. The interposer adds two things:
- long wires that span each row and each column (the *adaptable links*);
- at every router, a small switch that can put traffic onto those wires.

A topology is then a set-up: which router ports use which wire, where the wires are cut, and
what each router's route table says.

## Contents

| file | block |
|---|---|
| `rtl/adapt_noc_pkg.sv` | sizes, flit / credit / configuration types, reset route tables |
| `rtl/adapt_noc.sv` | top: routers, network interfaces, mesh wiring, row and column channels, configuration controller |
| `rtl/adaptable_router.sv` | one node: chiplet router + interposer switch + link controller + power gating |
| `rtl/vc_input_unit.sv` | virtual-channel buffers of one input, with optional bypass |
| `rtl/route_unit.sv` | table-driven route computation with dateline classes |
| `rtl/switch_allocator.sv` | combined VC and switch allocation for the 7 inputs |
| `rtl/output_unit.sv` | output VC state, credit counters, output register |
| `rtl/link_controller.sv` | active link set-up and route tables of a router; drives its link switches |
| `rtl/power_gating_ctrl.sv` | per-port power and crossbar power, 12-cycle wake-up |
| `rtl/adaptable_link.sv` | the segmented channels of one row or column |
| `rtl/network_interface.sv` | core / memory-controller side of a node |
| `rtl/subnoc_config_ctrl.sv` | run-time re-configuration of a rectangular region |
| `tb/adapt_noc_tb_pkg.sv` | set-up words for torus, tree, cmesh and mesh subNoCs (what system software would compute) |
| `tb/tb_*.sv` | one self-checking testbench per block, `tb_adapt_noc` for the whole network |

## The adaptable router

Each node combines two switches:
- a conventional 5-port virtual-channel router on the chiplet (+X, -X, +Y, -Y and the network
  interface, NI);
- a 2x2 switch in the interposer. Its IX port sits on the row channels and its IY port on the
  column channels.

Together they form a router of radix up to 7. Inputs and outputs are numbered 0..6:
+X, -X, +Y, -Y, NI, IX, IY.

The parts are joined so that the chiplet router's allocator stays 5x5 in structure:

* **3:1 injection mux.** NI, IX and IY share the chiplet crossbar's injection input. At most one
  of the three enters the chiplet crossbar per cycle.
* **5:1 mux toward the interposer.** One chiplet input per cycle can leave through the interposer
  switch. Each interposer output (IX or IY) takes the IX buffer, the IY buffer or this 5:1 line.
  IX/IY-to-IX/IY traffic never touches the chiplet crossbar. So a router whose five chiplet ports
  and crossbar are powered off can still forward traffic on the interposer.
* **2:1 input mux and output demux per direction.** Each of +X, -X, +Y and -Y uses either its
  mesh link or an adaptable-link channel, as the link set-up says.
* **Bypass.** The NI, IX and IY buffers pass a flit straight to allocation in its arrival cycle
  when its VC is empty.
* **Link controller (LC)** holds the active set-up and route tables. It drives the on/off bits of
  the link switches this router owns.
* **Power-gating controller (PG)** switches ports and the crossbar.

**Flow control.** There are 2 virtual networks (request, reply), each with 2 VCs. Each VC buffers
4 flits. Data is 128 bits. Flow control is credit based: one credit per slot, returned one cycle
after the flit leaves the buffer.

**Timing.**

| path | latency |
|---|---|
| through the chiplet router | 2 cycles: buffer write, then route + allocation + crossbar into the output register |
| into a bypassed NI / IX / IY buffer | 1 cycle |
| adaptable-link segment | 0 cycles: a switch that is on acts as a repeater, so an express or wrap-around link of any length costs the same as a neighbour link |

On an idle 8x8 mesh a packet therefore needs 5 cycles from core to core over one hop, and 2 more
per extra hop.

**Allocation.** Allocation is one combined VC + switch step with a rotating priority over the 28
input VCs. A request is granted when all of these are free: its input, its output, the 3:1 mux
(if it needs it), the 5:1 mux (if it needs it) and a powered crossbar (if it needs it). It must
also find a free output VC with a credit in its virtual network and dateline class. A packet keeps
its output VC from head to tail.

## Adaptable links

Every row and every column has `NUM_TRACKS` = 4 one-way channels. A channel is one long wire past
all 8 routers of its row. Between neighbouring routers each channel has a link switch, owned by
the router on the lower-coordinate side. A switch that is off cuts the wire. A channel therefore
falls into independent segments, and each segment can be:
- a neighbour link;
- an express link over several routers;
- a wrap-around link.

Two unrelated links can use the same channel in different parts of the row.

Each router has three sender taps and three receiver taps on its row channels: +X, -X and IX.
On the column channels it has +Y, -Y and IY. Each tap attaches to at most one channel.

On a segment:
- the flit of the one enabled sender reaches every receiver tap;
- the receiver's credits flow back to the sender.

`adaptable_link` models the tri-state wire by its logic function: the OR of the enabled drivers of
each segment. Its `conflict` output flags a receiver tap that more than one sender reaches. A valid set-up
never has one, and the top-level testbench checks that. Four channels per direction correspond to
two bi-directional 128-bit links per tile side.

## Routing and the four topologies

Routing is dimension order (X, then Y). It is driven by tables, so the same router serves every
topology. For each virtual network there are:
- `xt[dst_x]`, giving the output port toward a destination column and whether that hop crosses
  the dateline;
- `yt[dst_y]`, the same per destination row;
- a 4-entry `ct` table, indexed by the low destination bits, for delivery inside a 2x2
  concentration block.

An entry of NI in `xt` or `yt` means "this dimension is finished". A packet at its destination
is ejected.

The set-ups in `tb/adapt_noc_tb_pkg.sv` build a 4x4 subNoC of each kind.

* **Mesh.** The reset state: every port powered, mesh links, plain XY tables.
* **Torus.** In each row and each column, channel 0 carries the +direction wrap-around (last
  router to first) and channel 1 the -direction wrap-around. Each hop takes the shorter way. To
  avoid deadlock the torus uses dateline VC classes:
  - a packet starts a dimension in class 0;
  - it moves to class 1 on the hop marked as crossing the dateline;
  - it returns to class 0 when it turns into Y.

  In a torus virtual network, VC allocation respects the class. Elsewhere either VC may be used.
* **Mesh + tree.** Requests (virtual network 0) use the mesh. Replies (virtual network 1) leave
  the memory-controller node at the corner of the subNoC:
  - in one hop they reach the three routers of its row and the three of its column, over express
    segments;
  - the bottom-row routers forward them in one hop to the rest of their column.

  Every node is within two hops of the memory controller, so replies are spread over many links.
* **Concentrated mesh.** Each 2x2 block has one concentrating router D. Its neighbours B and C
  reach D through D's interposer switch, and the diagonal router A goes through C. The four D
  routers form a 2x2 mesh over express segments on channels 2 and 3. A, B and C keep only their
  NI and interposer ports powered. Their chiplet crossbars are off.

A set-up word per router (`router_cfg_t`) holds the powered ports, the taps and switches, and the
route tables. It is computed by system software and written into the configuration controller.

## Changing a subNoC at run time

`subnoc_config_ctrl` re-configures one rectangle x0..x1, y0..y1 while the rest of the network
keeps running.

1. **Drain.** The NIs of the region stop starting packets. Packets already started are
   finished. The phase ends once every router and NI in the region has been empty for two
   consecutive cycles. No packet can then be caught by a set-up change.
2. **Power.** Router by router, in row order, the new power set-up is committed.
   - A router whose ports are switched on needs 12 cycles to wake. With the commit handshake this
     costs 13 controller cycles.
   - A router that only switches ports off costs 2 cycles. A port is switched off only once it
     holds no flits.
3. **Link.** Router by router, the new link set-up and route tables are committed. Each takes
   effect 2 cycles after its commit, which costs 3 controller cycles per router.
4. **Release.** The hold is released and `done` pulses.

The cycles of each phase are reported on `drain_cycles`, `pwr_cycles` and `link_cycles`. For
example, a 4x8 region costs:
- 32 x 3 = 96 link cycles;
- between 64 power cycles (no router wakes) and 416 (all wake).

Packets from outside the region are not held, so a set-up must not route them through the region
while it changes.

## How closely this follows the published design

**Taken from the design:**
- the 8x8 grid of four 4x4 chiplets;
- the router structure: 5x5 chiplet router, 2x2 interposer switch, 3:1 and 5:1 muxes, bypassed
  NI and interposer-switch VCs, link controller and power gating;
- the 2-stage router pipeline;
- 2 VCs per virtual network with 4 flits each, and 128-bit links;
- adaptable links segmented by switches that each router's link controller drives;
- dimension-order routing, with the dateline for the torus;
- the four topologies;
- the drain / power-on (12 cycles per router) / link set-up (2 cycles per router) sequence.

**Choices of this design**, where the published description gives a function but no detail:
- the flit sideband (head/tail, VC, dateline bit, coordinates next to the 128 data bits) and the
  credit protocol;
- the combined rotating-priority allocator;
- routing at the buffer head rather than one hop ahead;
- the route-table format, including the `ct` table for the concentrated mesh;
- the tap arrangement and the 4 channels per row and column;
- the exact link assignments of the torus, tree and cmesh set-ups;
- the network interface;
- the configuration table and the row-order walk;
- the two-cycle empty test for the drain;
- the 1-cycle commit handshake per router.

**Departures and limits:**
- The published overhead of about 250 cycles to power and link a 32-core region assumes fewer
  routers being woken than the worst case here. This controller visits routers one after another,
  and 32 woken routers cost 416 + 96 cycles.
- Cores, GPUs, memory controllers and caches are outside the design. They attach to the
  flit-wide `tx_*` / `rx_*` ports of each node.
- The link switches and interposer wiring are physical structures. Only their logic function is
  modelled.

## Simulating

Every block has a self-checking testbench that prints `TB_RESULT checks=N failures=M`. Each has a
watchdog. With verilator 5:

```
verilator --binary --timing --assert -j 8 rtl/adapt_noc_pkg.sv tb/adapt_noc_tb_pkg.sv \
    tb/tb_adapt_noc.sv -y rtl -y tb --top-module tb_adapt_noc -o sim
./obj_dir/sim
```

Substitute any `tb_<block>` for `tb_adapt_noc`. The full-size network takes a few minutes to
compile and about a second to run.

`tb_adapt_noc` runs the whole 8x8 network at its default size:
1. It measures zero-load mesh latencies, then runs random all-to-all packets.
2. While one quarter keeps running mesh traffic, it turns the other three quarters into a torus,
   a mesh + tree and a concentrated mesh.
3. It checks the cycle cost of every phase, and that each packet reaches the right node whole and
   in order.
4. It checks that a torus wrap-around costs one hop and that tree replies are as fast as two mesh
   hops.
5. It turns the concentrated mesh back into a mesh, which wakes its gated ports.

It counts each mechanism and fails if one never occurs. The mechanisms are:
- buffer bypass;
- the 3:1 mux;
- the 5:1 mux;
- dateline crossings;
- injection held for a drain;
- gated ports;
- wake-ups;
- completed re-configurations.

**What each unit testbench checks:**

| testbench | checks |
|---|---|
| `tb_route_unit` | against an independent route model |
| `tb_vc_input_unit` | buffering, bypass and credits |
| `tb_switch_allocator` | every resource constraint and VC class rule |
| `tb_output_unit` | credits and VC ownership |
| `tb_link_controller` | 2-cycle set-up timing |
| `tb_power_gating_ctrl` | 12-cycle wake-up timing and drain-before-off |
| `tb_adaptable_link` | random switch and tap set-ups against a segment model |
| `tb_network_interface` | packets, VC choice, hold and ejection order |
| `tb_subnoc_config_ctrl` | phase order and cycle counts, with behavioural routers |
| `tb_adaptable_router` | pipeline and bypass latencies, the muxes, crossbar-off forwarding and random traffic on one router |

Sizes are package parameters in `adapt_noc_pkg`:
- `MESH_X`, `MESH_Y`;
- `NUM_VCS` (through `NUM_VNETS` and `VCS_PER_VNET`);
- `BUF_DEPTH`, `DATA_W`, `NUM_TRACKS`;
- `WAKE_CYCLES`, `LINK_SETUP_CYCLES`.

The top's `NX` / `NY` parameters may be set smaller than the grid for a smaller network.
