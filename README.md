# Clustered 3D Networks-on-Chip with a pipelined inter-layer bus

This design is synthesizable SystemVerilog for two 3D network-on-chip topologies. Both connect 64 nodes stacked in 4 layers of 16.

A 3D chip links its layers with through-silicon vias (TSVs). TSVs take area and are a yield risk, so the aim is to use fewer vertical channels without losing much performance. Two ideas do this:

1. **Clustering.** Four nodes form a cluster. All traffic between layers goes through one vertical channel per cluster column, instead of one channel per node. In the 64-node system this gives 4 vertical channels instead of 16.
2. **A pipelined, bidirectional inter-layer bus.** Each vertical channel is a chain of *transfer stages*, one per layer, rather than a single shared bus. Each stage decides locally what to forward:
   - Weight-based arbitration gives each flow a share that matches how many layers feed it.
   - A non-blocking scheme lets a packet for the next layer overtake a packet for a farther layer (or the reverse) when the other one is stuck.

Two cluster topologies use this bus:

- **CIT (cluster-based intra-layer topology).** Each cluster has one 9-port router. Four ports go to the cluster's nodes, four to neighbouring cluster routers in a 2×2 mesh, and one to the bus.
- **CMIT (cluster-based mesh intra-layer topology).** Each node has its own 6-port router in a 4×4 mesh. Each 2×2 group of routers also connects to a 5-port *cluster router*, which is the group's only way onto the bus.

The top module `noc3d_top` holds both networks side by side. Each has its own node ports, and they share the clocks.

## Flit format

Flits are 32 bits wide. Every flit carries two framing bits:

| bits | meaning |
|---|---|
| 31 | EOM: last flit of the packet |
| 30 | BOM: first flit (header) of the packet |

A packet may be a single flit, with both bits set. The header flit also carries the destination:

| bits | CIT header | CMIT header |
|---|---|---|
| 29:28 | destination layer | destination layer |
| 27 | cluster column | node column (27:26) |
| 26 | cluster row | |
| 25:24 | node (IP) index inside the cluster | node row (25:24) |
| 23:0 | payload | payload |

Body flits carry 30 bits of payload. Network elements look only at the header and the framing bits. `noc_pkg` defines the field positions and helper functions (`make_flit`, `make_flit_cmit`, `hdr_layer`, ...).

## The pipeline bus

`pipeline_bus` chains `LAYERS` transfer stages. Each link between two adjacent stages has:

- an upward flit link and a downward flit link (flit plus valid);
- for each direction, two credit-return wires: one for the receiver's single-hop buffer and one for its multi-hop buffer.

Each stage has its own host port to the router of its layer. The ends of the chain are closed.

### Transfer stage (`transfer_stage`)

A stage has three inputs: flits from the layer below, flits from the layer above, and flits from its own host (router). Its parts:

- **D1, D2 (demultiplexers).** Each arriving bus flit is checked against the stage's layer. A packet for this layer goes into the **SH buffer** (single hop, towards the host). Any other packet goes into the **MH buffer** (multi hop, continues in the same direction). There is one SH and one MH buffer per direction, each 6 flits.
- **M1, M2 (weighted arbiters).** These feed the upward and downward TS units. Each picks between two inputs:
  - the MH buffer of that direction. Its weight is the number of layers that can send through it: the layers below for the upward path, the layers above for the downward path.
  - upward or downward packets from the host. Its weight is 1.
  Each layer upstream thus gets an equal share of the channel when it is saturated.
- **M3 (weighted arbiter).** This merges the two SH buffers into the host output. The weights are the number of layers above and below.
- **TS units.** There is one for the upward path and one for the downward path (see below).
- **Host FIFOs.** `bisync_fifo`, 8 flits deep, in each direction. They let every layer's router run on its own clock while the bus runs on the bus clock.

All arbiters (`wb_arbiter`) work per packet: once a packet is granted, its input keeps the output until EOM. Inside one turn an input may send as many packets as its weight. An input with nothing to send gives up its turn, so no bandwidth is lost. Flow control between stages uses credits. A stage only sends a flit when the receiver's SH or MH buffer (whichever the flit will enter) has room.

Timing: a flit that enters a stage from the bus can leave on the next segment two bus cycles later. The path from a host at layer 0 to the host at layer 3 with no other traffic takes about 13 bus cycles, including both clock-domain crossings.

### TS unit (`ts_unit`)

The TS unit is the non-blocking part. It holds up to 6 flits in a small linked-list buffer, which can hold several packets at once. It sorts each packet by what it needs at the next stage:

- **SH packets** end at the next layer and need space in that stage's SH buffer.
- **MH packets** go further and need space in its MH buffer.

The unit keeps a credit counter for each of the two downstream buffers. Their *stress* (capacity minus credits) says how full each one is.

When no packet is being sent, the unit picks the next one:

1. It drops a path that has no credit.
2. Of the paths left, the one with lower stress wins. On a tie, SH wins.
3. Within that type, the packet with the highest age wins. Packets of that type that were not chosen age by one, which prevents starvation.

The chosen packet is then sent flit by flit to its end (wormhole), one flit per cycle while credit lasts.

So a packet for the next layer can pass a packet that waits for a full MH buffer, and the reverse. The TS unit pulses `nb_event` each time it picks one type while the other type has packets waiting for credit. These pulses are brought out of the networks as the `nb_event` ports.

## CIT network (`cit_noc`)

- 4 layers. Each layer is a 2×2 mesh of `cit_router`s, and each router serves 4 nodes.
- Node number: `n = ((z*2 + cy)*2 + cx)*4 + ip`.
- There is one pipeline bus per cluster position (4 buses). Router port 4 of every layer at that position connects to the bus host port of its layer.
- Routing is dimension order: X first, then Y, then the bus if the layer differs, then the node port.

## CMIT network (`cmit_noc`)

- 4 layers of 4×4 `cmit_router`s. Node number: `n = (z*4 + y)*4 + x`.
- A router sends a packet along X, then Y. Once both match:
  - a packet for another layer goes out of the router's cluster port;
  - a packet for this layer goes to the router's node port.
- Each 2×2 group has a `cmit_cluster_router` (index `z*4 + (y/2)*2 + x/2`). Its ports 0–3 connect to the group's routers and its port 4 to the bus. It sends a packet for another layer to the bus. A packet arriving from the bus goes straight to the router of its destination node, picked by the low bits of the destination column and row.

## Routers

All three routers wrap one switch (`noc_switch`) with their own route function. The switch has:

- one 5-flit input FIFO per port;
- the route of a packet looked up from its header and held until EOM;
- a packet round-robin arbiter per output (`wb_arbiter` with weights of 1);
- a registered output.

An idle router passes a flit in two cycles. Links use valid/ready handshakes.

## Clocks and reset

- `clk` / `rst_n`: bus clock and reset for all transfer stages.
- `rclk[l]` / `rrst_n[l]`: clock and reset of layer `l`. All routers of that layer and the router side of its host FIFOs use them.

The layer clocks may differ from each other and from the bus clock. The testbenches use 10, 8, 12 and 10 ns for the layers and 10 ns for the bus. The described system runs everything at 1 GHz; the design has no fixed clock rate, and latencies here are given in cycles. Resets are active low. Release them while the clocks run.

## Files

| file | contents |
|---|---|
| `rtl/noc_pkg.sv` | flit format, header helpers, port numbers |
| `rtl/sync_fifo.sv` | single-clock FIFO (router input buffers, bus buffers) |
| `rtl/bisync_fifo.sv` | dual-clock FIFO with Gray-code pointers |
| `rtl/wb_arbiter.sv` | weighted packet round-robin arbiter |
| `rtl/ts_unit.sv` | TS unit |
| `rtl/transfer_stage.sv` | one bus stage |
| `rtl/pipeline_bus.sv` | chain of stages |
| `rtl/noc_switch.sv` | generic wormhole switch |
| `rtl/cit_router.sv`, `rtl/cmit_router.sv`, `rtl/cmit_cluster_router.sv` | the three routers |
| `rtl/cit_noc.sv`, `rtl/cmit_noc.sv` | the two 64-node networks |
| `rtl/noc3d_top.sv` | top: both networks |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/noc_traffic.sv` | traffic generator, memory model and checker for the network tests |

## Simulation

Every testbench prints `TB_RESULT checks=N failures=M` at the end. For example, with Verilator 5:

```
verilator --binary --timing --top-module tb_noc3d_top \
  rtl/noc_pkg.sv rtl/sync_fifo.sv rtl/bisync_fifo.sv rtl/wb_arbiter.sv \
  rtl/ts_unit.sv rtl/transfer_stage.sv rtl/pipeline_bus.sv rtl/noc_switch.sv \
  rtl/cit_router.sv rtl/cmit_router.sv rtl/cmit_cluster_router.sv \
  rtl/cit_noc.sv rtl/cmit_noc.sv rtl/noc3d_top.sv \
  tb/noc_traffic.sv tb/tb_noc3d_top.sv
obj_dir/Vtb_noc3d_top
```

For a smaller test, give only the files the module needs. For example, `tb_ts_unit` needs `noc_pkg`, `sync_fifo` and `ts_unit`. The full design takes several minutes to compile at the default optimisation level. Adding `-O0` makes it faster.

What the tests check:

- `tb_bisync_fifo`: random writes and reads on unrelated clocks. Checks order and data, full and empty, and that nothing overflows.
- `tb_wb_arbiter`: with all inputs saturated and weights 3:1:2, the packet shares come out 3:1:2. A reference model checks every grant. It covers holding a grant until EOM and passing the turn on when only some inputs request.
- `tb_ts_unit`: random SH/MH packets against a model of the next stage's buffers. Checks that no flit goes out without credit, that packets are not interleaved, and the 1-cycle latency. A directed case blocks the SH path and checks that a later MH packet overtakes the waiting SH packets and that `nb_event` fires.
- `tb_transfer_stage`: one stage with random traffic on all three inputs and random credit return. Checks the 2-cycle forwarding latency.
- `tb_pipeline_bus`: 4 stages with random traffic between all layers. Checks:
  - equal shares at the top layer when the three lower layers saturate it (333/333/333);
  - throughput of one flit per cycle;
  - the idle latency.
- `tb_cit_router`, `tb_cmit_router`, `tb_cmit_cluster_router`: random packets against a reference route function. Checks the two-cycle hop and equal round-robin shares.
- `tb_cit_noc`, `tb_cmit_noc`, `tb_noc3d_top`: the full 64-node networks run three traffic phases:
  - uniform;
  - non-uniform, with 70% of requests inside the own cluster;
  - hotspot, with four memories each getting 20% of requests.

  In each network, 16 processors (one per cluster) send read and write requests to 48 memories. The memories answer with bursts. The checks:
  - every packet reaches the right node, whole and in order;
  - every request gets its response;
  - each mechanism happens at least once: delivery inside a cluster, delivery across a layer, single-hop and multi-hop bus packets, upward and downward traffic, back-pressure, source stalls and non-blocking overtakes.

  A typical run moves 9600 packets per network with about 30 overtakes per network.

## Differences from the described architecture

- **No virtual channels.** The described routers have two virtual channels per input, one for requests and one for responses. Here the routers and the bus use one channel per link.
  - Routing deadlock cannot occur: each layer uses dimension-order routing, and each bus stage keeps separate SH and MH buffers.
  - Message-dependency deadlock can occur, because requests and responses share the channels. To avoid it, a node must accept an incoming request without waiting until it can inject the response. The testbench memories do this: they queue responses without limit.
- **Handshakes.** Router links use valid/ready. The bus segments use credits.
- **Stress.** The TS unit measures stress from its credit counters, which count the free space of the next stage's buffers. There is no separate stress signal.
- **Bus clock.** The whole bus runs on one clock. The clock-domain crossing happens only at the host FIFOs of each stage.
- **Node placement.** In the testbenches, one node per cluster is a processor and the other three are memories. The described trace set-up instead puts all 16 processors in the top layer. Placement exists only in the testbench; the network does not care what a node is.
- **Not built:** the processors, memories, caches and network interfaces of the evaluated system, and the TSVs themselves (in RTL a vertical link is plain wires). The networks bring the node ports out so that these can be attached.
- **Size limits.** The header gives one bit to each cluster coordinate. So CIT holds at most 2×2 clusters per layer, and both networks at most 4 layers. Larger sizes, such as a 3×3-cluster layer, need wider header fields in `noc_pkg`. `cit_noc` stops elaboration if the parameters do not fit.
- **Evaluation.** Application traces and power/area figures are not reproduced. The tests run short synthetic traffic only.
