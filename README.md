# A configurable virtual-channel NoC for register-driven FPGA emulation

This is a network-on-chip meant to be emulated cycle by cycle on an FPGA under software
control. The network is a 2D mesh of virtual-channel (VC) routers with up to five ports, 5x5 by
default. Its clock does not come from an oscillator. It comes from a register bit that a
soft processor toggles. In each emulation cycle, the software does four things:

1. It reads the flits that left the network at every node.
2. It decides which new flits to inject. This is where its traffic generators and packet
   source queues live.
3. It writes those flits into registers.
4. It pulses the emulation clock once.

The hardware is therefore a plain synchronous network plus a register file. Traffic
generation, latency bookkeeping and statistics all stay in software, where they are easy
to change.

The baseline configuration:

- 5x5 mesh with XY dimension-order routing.
- 2 VCs per port, each with an 8-flit buffer.
- 32-bit flits and 5-flit packets.
- Single-stage router and one-cycle links.
- Credit-based flow control.

Most of these settings are parameters.

```
 software ──reg bus──> noc_wrapper ── emu_clk = CTRL[0] ──> noc_mesh (KX x KY routers)
                        IN_DATA/IN_VALID  ──────────────> local input port of each router
                        OUT_DATA/OUT_STATUS <──────────── local output port of each router
                        IN_STATUS  <──────────────────── local VC FIFO occupancy
```

## Flits and packets

A packet is a head flit, zero or more body flits, and a tail flit. A one-flit packet uses
a combined head+tail type. Every flit has its type and a VC identifier (VCID) in its top
bits. A head flit also carries its routing information:

| bits    | head flit                     | body / tail flit |
|---------|-------------------------------|------------------|
| [31:30] | type: 01 head, 11 head+tail   | 00 body, 10 tail |
| [29:28] | VCID                          | VCID             |
| [27:25] | CNOP (output port at the router it is entering) | payload |
| [24:22] | source X                      | payload          |
| [21:19] | source Y                      | payload          |
| [18:16] | destination X                 | payload          |
| [15:13] | destination Y                 | payload          |
| [12:0]  | payload                       | payload          |

Notes on the fields:

- **Width.** 32 bits is the smallest width that holds the head's routing fields. The
  router and mesh accept a wider `W`; the extra bits above 31 are payload.
- **Coordinates.** They are 3 bits each, so meshes up to 8x8.
- **Ports.** The numbering is local 0, east 1 (+X), west 2, north 3 (+Y), south 4.
- **Shared definitions.** All of this is in `rtl/noc_pkg.sv`.

The VCID is not a property of the packet. Each router rewrites it to the output VC the
packet was given there. The next router uses it to pick the FIFO the flit goes into.

## Router: one cycle of allocation, one cycle of link

`rtl/router.sv` has up to five ports. Each input port has an **input unit**:

- V FIFOs of DEPTH flits, plus two registers per VC:
  - R: the output port of the packet at the front.
  - O: the output VC it was given.
- A next-hop route computation, described in the next section.

Each output port has an **output unit**, which holds the idle/active state and a credit
counter for every downstream VC. It also has a **delay unit**. Shared by all ports are:

- a VC allocator;
- a switch allocator;
- a crossbar.

All of the following happens in one clock cycle, to the flit at the front of a VC FIFO:

1. **Route.** For a head flit the output port is read straight from its CNOP field. For
   later flits it comes from R.
2. **VC allocation.** This step is for head flits only. The input VC asks for an idle
   output VC on that port.
3. **Switch allocation.** Any flit whose input VC holds an output VC can request the
   switch if that output VC has a credit. A head flit may also request it in the same
   cycle its VC request is granted. Each input port can send one flit per cycle, and each
   output port can take one.
4. **Crossbar.** The winning flit is popped and crosses the crossbar. On the way, its
   VCID is set to the output VC and, for a head, its CNOP is replaced by the port it
   needs at the next router.

So VC allocation feeds switch allocation combinationally. The critical path runs: input
unit → VC allocator → input unit → switch allocator → crossbar.

The crossbar output then passes through the delay unit. The delay unit is a shift
register of `DELAY = (PIPE_STAGES - 1) + LINK_DELAY` stages; its last stage is the link
register. With the defaults (`PIPE_STAGES = 1`, `LINK_DELAY = 1`), the timing is:

| cycle | what happens |
|-------|--------------|
| t     | flit at the front of a FIFO; allocated and switched |
| t+1   | flit on the link |
| t+2   | flit at the front of the next router's FIFO |

That is **two cycles per router**. A packet crossing H hops reaches the destination's
local output `2*(H+1)` cycles after it was injected. Its tail follows `length-1` cycles
later.

Deeper router pipelines and longer links are emulated only by adding delay stages.
Allocation itself stays in one cycle. Extra pipeline stages therefore model the latency
of a deeper router, not its internal hazards.

### Lookahead routing

Routing is XY dimension order: first move along X until the column matches, then along Y,
then eject at the local port.

The route is computed one hop ahead. A head flit arrives already knowing which output it
needs here (its CNOP). While it is being switched, `rtl/route_nrc.sv` works out the port
for the next router:

1. Take the coordinates of the neighbour on the chosen output port.
2. Apply XY routing from there to the destination.
3. Write the result into the outgoing CNOP.

This takes route computation off the router's critical path. At injection, the network
wrapper fills in the first CNOP, so software only supplies the destination.

### VC allocation in two levels

`rtl/vc_allocator.sv` is a separable allocator.

**Level 1 (per input VC).** Each input VC that holds a head flit without an output VC
has a V:1 arbiter. It picks one idle output VC on its requested output port.

**Level 2 (per output VC).** Each output VC has a PV:1 arbiter. It picks one input VC
among all those that chose it.

A level-1 pointer moves only when its choice also wins at level 2, so a refused request
keeps its turn. A VC granted in cycle t becomes active in the output unit at the next
clock edge. The input VC's O register is loaded on the same edge.

The PV:1 arbiters are the largest logic in the router (10 request lines for 5 ports x 2
VCs). Each one is built as a **hierarchical arbiter** (`rtl/hier_arbiter.sv`):

- V arbiters of P lines each, one per input VC number, arbitrate across the input ports.
- A V:1 arbiter then picks among them.

For the default router, that is two 5-line arbiters and one 2-line arbiter. The
priority this produces: under fixed priority, all requests from VC 0 rank above those
from VC 1. Within each VC number, lower port numbers win. Under round robin, both levels
rotate. An inner arbiter's pointer only moves when its group wins at the top.

### Switch allocation and the crossbar

`rtl/switch_allocator.sv` also works in two levels:

- A V:1 arbiter per input port picks which of its VCs competes this cycle.
- A P:1 arbiter per output port picks among the input ports whose chosen VC wants that
  output.

An input port that loses at level 2 gets nothing in that cycle, and its level-1 pointer
stays where it was.

`rtl/crossbar.sv` is two levels of multiplexers:

1. Per output: pick the VC inside the winning input port.
2. Pick the input port.

Every arbiter (`rtl/arbiter.sv`) is either fixed priority, with line 0 highest, or
round robin. Round robin starts its search one line after the line it last served. This
is chosen separately for the VC allocator (`VA_RR`) and the switch allocator (`SA_RR`).

### Credits and output VC state

Each output unit keeps a credit counter per downstream VC. The counter starts at DEPTH,
goes down when a flit leaves on that VC, and goes up when the downstream input unit
returns a credit. That credit is sent one cycle after the flit is popped from the
downstream FIFO.

A VC with zero credits cannot request the switch. As a result, a FIFO can never
overflow; assertions check this in the FIFO and in the output unit.

An output VC becomes active when allocated. It becomes idle again when the tail of its
packet wins the switch. From then on, a new packet may use it, and that packet's flits
queue behind the old ones in the downstream FIFO.

The local port uses the same protocol in both directions:

- **Injection.** The local input FIFO returns credits, and `local_count` exposes its
  occupancy.
- **Ejection.** Whatever sits at the local output must return one credit per ejected
  flit.

## The mesh

`rtl/noc_mesh.sv` places KX x KY routers:

- Node `n = y*KX + x`, with (0,0) at the south-west corner.
- Neighbours are joined by a flit link and a credit link in each direction.
- Ports that would lead off the mesh are not built. The router's `PORT_EN` mask leaves
  out their input unit, output unit and delay unit, so corner routers have three ports
  and edge routers four. The allocators and the crossbar keep five-port indexing, and the
  missing request lines are tied to zero, which synthesis removes. XY routing never
  selects a missing port.

Each node's local port is brought out as injection and ejection signals.

## Register interface (`rtl/noc_wrapper.sv`, the top level)

The top module wraps the mesh in word registers on a simple bus. The bus signals are
`reg_addr` (12-bit word address), `reg_wr`, `reg_wdata` and `reg_rdata`; reads are
combinational.

| address       | name       | meaning |
|---------------|------------|---------|
| 0x800         | CTRL       | bit 0: emulation clock level; bit 1: network reset (1 after reset) |
| 0x801         | CONFIG     | read only: {DEPTH, V, KY, KX}, one byte each |
| 16n + 0       | IN_DATA    | flit to inject at node n |
| 16n + 1       | IN_VALID   | bit 0: inject IN_DATA at the next emulation clock edge |
| 16n + 2       | OUT_DATA   | flit ejected at node n |
| 16n + 3       | OUT_STATUS | bit 0: OUT_DATA holds a flit from the last emulation cycle |
| 16n + 4       | IN_STATUS  | occupancy of node n's local VC FIFOs, 4 bits per VC, VC 0 lowest |

The network clock is `CTRL[0]`, so each write of 1 after a 0 advances the network by
one cycle. Software runs each emulation cycle in this order:

1. Read OUT_STATUS and, where it is set, OUT_DATA.
2. Read IN_STATUS for nodes that have a flit to send. Skip a node whose chosen VC FIFO is
   full.
3. Write IN_DATA (with VCID set, and for a head the destination) and IN_VALID.
4. Write CTRL = 1, then CTRL = 0.

Writing CTRL = 0 clears every IN_VALID, so each flit is injected exactly once.

Two further behaviours:

- **Credits at the local output.** Every ejected flit is treated as consumed, and its
  credit is returned at once.
- **Network reset.** The network is held in reset while `CTRL[1]` is set. Software clears
  it to start and can set it again to empty the network.

## Parameters

| parameter     | default | where | meaning |
|---------------|---------|-------|---------|
| `KX`, `KY`    | 5, 5    | noc_wrapper, noc_mesh | mesh size, up to 8x8 |
| `V`           | 2       | all   | VCs per port (up to 4) |
| `DEPTH`       | 8       | all   | flits per VC FIFO (up to 15 behind the wrapper's 4-bit status fields) |
| `PIPE_STAGES` | 1       | router and up | emulated router pipeline depth |
| `LINK_DELAY`  | 1       | router and up | link latency in cycles |
| `VA_RR`, `SA_RR` | 1    | router and up | 1 round robin, 0 fixed priority |
| `W`           | 32      | router, mesh | flit width (the wrapper uses 32) |
| `PORT_EN`     | all 5   | router | ports built (bit 0 local, 1 east, 2 west, 3 north, 4 south); set per position by the mesh |

## Simulating

Each testbench in `tb/` checks itself and ends with a line
`TB_RESULT checks=<n> failures=<n>`. Build and run one with Verilator 5, from the folder
that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl \
    rtl/noc_pkg.sv tb/noc_wrapper_tb.sv --top-module noc_wrapper_tb -o sim
./obj_dir/sim
```

Replace `noc_wrapper_tb` with any other testbench name. The full-size build takes about
two minutes; the run takes about two seconds.

| testbench | what it shows |
|-----------|---------------|
| `arbiter_tb`, `hier_arbiter_tb` | fixed-priority truth table; round robin against a pointer model; no starvation |
| `vc_fifo_tb`, `delay_unit_tb`, `crossbar_tb`, `route_nrc_tb` | against queue, shift-register, mux and routing models |
| `output_unit_tb` | VC idle/active state and credit counting |
| `vc_allocator_tb`, `switch_allocator_tb` | exact grants under fixed priority; fairness under round robin |
| `input_unit_tb` | demultiplexing by VCID, R/O registers, VCID/CNOP rewrite, credit timing |
| `router_tb` | one router with credit-limited neighbours, 600 packets; 2-cycle hop |
| `noc_mesh_tb` | 4x3 mesh, 3000 packets; zero-load latency of 12 cycles over 5 hops |
| `noc_sizes_tb` | 2x2, 3x3, 4x4 and 5x5 meshes side by side (harness `tb/mesh_traffic.sv`), uniform random at three loads |
| `noc_wrapper_tb` | full 5x5 design at its defaults, driven only through registers |

`noc_wrapper_tb` works as follows:

- It first sends one packet corner to corner (8 hops). It expects the tail to be readable
  22 emulation cycles after the head was written.
- It then runs seven workloads of 1000 packets each and checks that every packet arrives
  once, in order, at the right node.
- It counts full-FIFO holds, VC and switch conflicts, and credit stalls. It fails if any
  of them never occurred.
- It tests the network reset.

Results of one run (accepted throughput in flits per node per cycle, from injection of
the first packet until the last tail is read):

| workload | packet | offered | avg. latency | throughput |
|----------|--------|---------|--------------|------------|
| bit-complement | 5 flits | 40% | 26.1 | 33.7% |
| uniform random | 5 flits | 60% | 28.1 | 47.4% |
| transpose      | 5 flits | 30% | 34.4 | 24.7% |
| bit-reversal   | 5 flits | 30% | 17.5 | 26.8% |
| shuffle        | 5 flits | 30% | 13.6 | 29.9% |
| uniform random | 1 flit  | 30% | 8.9  | 27.0% |
| uniform random | 8 flits | 30% | 22.1 | 29.2% |

Notes on these runs:

- **Finite runs.** Each run is short and includes the time to drain the network, so the
  throughputs are lower bounds and not saturation points.
- **Node-number patterns.** Bit-reversal and shuffle act on the 5-bit node number, taken
  modulo 25. Some nodes therefore send to themselves, which explains the low latencies.
- **Latency.** It is counted from when the head was handed to the network, so it excludes
  time spent in the source queue.

`noc_sizes_tb` applies uniform random traffic with 5-flit packets to meshes of every
size from 2x2 to 5x5. Average packet latency in cycles:

| mesh | 10% offered | 25% offered | 40% offered |
|------|-------------|-------------|-------------|
| 2x2  | 8.4  | 9.4  | 10.5 |
| 3x3  | 10.3 | 11.2 | 13.6 |
| 4x4  | 11.9 | 13.5 | 16.2 |
| 5x5  | 13.5 | 16.1 | 18.6 |

Latency grows with both size and load. At low load it is close to `2*(hops+1) + 4`, and
it rises as the load approaches the point where the central links saturate.

## Departures from the original design, and limits

- **Topology.** Only the mesh is built. The original platform also offers a 2D torus.
  Its wrap-around routing and deadlock avoidance are not specified, so it is left out.
- **Port count.** A router has at most the five mesh ports; `PORT_EN` selects a subset.
  The original allows any number of ports. Routers with more than five ports would need
  a topology other than the mesh.
- **Pipeline depth.** It is emulated only with delay registers, as described above.
- **Flit layout, register map and bus.** The field order and widths, the register
  addresses and bit layouts, and the simple register bus are this design's. The original
  attaches the registers to the soft processor's system bus.
- **Software-side parts.** The automatic IN_VALID clear, the CNOP fill-in at injection,
  the immediate credit return at the local output and the reset bit are all this
  design's choices.
- **Emulation clock.** It is a register output used as a clock, as in the original. For
  an FPGA build, route it through a global clock buffer.
- **Not included.** The processor, its bus, memories and peripherals, and the software
  traffic generators and receptors are not part of this RTL. The testbench
  `noc_wrapper_tb` plays the part of the software.
