# Bufferless deflection NoC with two-mode (loop-back) links

A bufferless deflection router has no flit buffers. Every flit that enters the
router in a cycle must leave it in the next cycle. When two flits want the same
output port, one of them is *deflected*: it leaves through a port that moves it
away from its destination. At high load these extra hops cost latency and
throughput.

This design adds one small mechanism to such a network. The link between two
neighbouring routers gets a second operating mode. Usually the two routers
**exchange** flits over the full-duplex link, as in any mesh. But if neither
router is sending a flit *productively* over that link, the link switches to
**loop-back**. Each router's outgoing flit is then fed straight back into its own
input port. A deflected flit loses one cycle but stays where it is, instead of
being sent one hop further from its destination.

Loop-back never overfills a router. Closing any set of links leaves every router
with exactly as many incoming flits as it has output ports. The hardware cost is
two things. Each router output carries a one-bit flag, and each router input has
a flit-wide two-input multiplexer in front of it.

## The flit-deflection rule

Each router output port carries a productivity flag `p`:

* `p = 1`: the port holds a flit, and this port brings that flit one hop closer
  to its destination.
* `p = 0`: the port is empty, or the flit on it is being deflected.

A link is in loop-back mode exactly when **both** of its `p` flags are 0;
otherwise it exchanges. So a productive flit is never held back. A deflected
flit still leaves its router in one case only: when the router on the other
side of the link is sending a productive flit. Both ends of a link see the
same two flags, so they always agree on the mode without any handshake.
`two_mode_link` asserts this.

## Router

`deflection_router` is a single-cycle router with five ports: North, East,
South, West and the local core. Its only storage is one register per network
input. Each cycle, working on the registered flits:

1. **Eject.** Of the flits addressed to this router, the oldest one goes to the
   local core (at most one per cycle). Other local flits stay in the network
   and are deflected; they usually loop back and try again the next cycle.
2. **Inject.** If a slot is now empty, the core's waiting flit enters it
   (valid/ready handshake; `inj_ready` means a slot is free). Its age is
   cleared.
3. **Port allocation and switching.** Every flit is given an output port. The
   `ARCH` parameter selects one of two schemes:
   * **BLESS** (`bless_allocator` + `switch_fabric`). Flits are served one
     after another, oldest first. Each takes a free productive port if one is
     left, else the lowest free port. A full 4x4 crossbar then moves them. The
     oldest flit always moves productively, so no flit can circulate forever.
   * **CHIPPER** (`chipper_permnet` built from four `chipper_arbiter_block`s).
     There are two stages of 2x2 arbiter blocks. Stage 1 (N/E and S/W pairs)
     steers each flit toward the half of the outputs holding its productive
     port: the Y pair (N/S) or the X pair (E/W). Stage 2 picks the port itself.
     In each block, a random bit decides which flit chooses first. Each router
     has a 16-bit LFSR that supplies these bits. This is cheaper than BLESS,
     but it deflects more.
4. **Outputs.** Every outgoing flit's age is incremented (saturating). The
   `p` flag of each port is recomputed from the flit's destination.

A flit has 0, 1 or 2 productive ports: 0 when it has arrived, 1 when it
already lies on the row or column of its destination, 2 otherwise.
`route_compute` gives them.

Timing: the router registers `in_flits` on the rising edge. All other outputs
(`out_flits`, `out_p`, `ej_*`, `inj_ready`) are combinational. The path runs
from those registers through a link controller to the neighbour's input
registers, so one hop costs one clock cycle. Reset is synchronous and
active-low, and it empties the input registers.

## The network

`noc_mesh` is an `MESH_X x MESH_Y` mesh (8x8 by default). Node
`n = y*MESH_X + x` is at column `x` (growing East) and row `y` (growing South).
Ports are numbered N=0, E=1, S=2, W=3. Each pair of neighbours shares a
`two_mode_link` made of two `link_controller`s. A port on the mesh boundary has
no neighbour. Its `link_controller` always loops back, so a flit deflected off
the edge simply stays in the router.

Parameters:

| parameter      | default      | meaning |
|----------------|--------------|---------|
| `MESH_X`, `MESH_Y` | 8, 8     | mesh size (at most 8 each with `COORD_W = 3`) |
| `ARCH`         | `ARCH_BLESS` | `ARCH_BLESS` or `ARCH_CHIPPER` router allocation |
| `LINK_CTRL_EN` | 1            | 0 replaces the two-mode links with ordinary always-exchanging links (for comparison) |

Per-node ports: `inj_valid/inj_flit/inj_ready` (core to network),
`ej_valid/ej_flit` (network to core, always accepted), and status outputs:
`port_valid`, `port_p` (per output port) and `port_loopback` (per link
end). The flit format is in `noc_pkg`. It has a valid bit, 3-bit destination
and source coordinates, a 12-bit age and a 32-bit payload. The widths are
this design's own choice.

## Measured behaviour

The method was originally evaluated on an 8x8 mesh with uniform random
traffic and Poisson injection. The workload testbenches repeat that
experiment with this RTL. They run two meshes side by side under the same
traffic, one with two-mode links and one with fixed links, and sweep the
injection rate. Injection is Bernoulli with the given rate per node per cycle.
The misrouting ratio counts non-productive link traversals against all link
traversals; loop-backs are not counted as traversals.

| routers | links    | saturation throughput (flits/node/cycle) | misrouting ratio at 0.05 / at saturation |
|---------|----------|------------------------------------------|------------------------------------------|
| BLESS   | fixed    | 0.329 | 0.011 / 0.249 |
| BLESS   | two-mode | 0.344 (+4.6%) | 0.001 / 0.229 |
| CHIPPER | fixed    | 0.256 | 0.021 / 0.304 |
| CHIPPER | two-mode | 0.286 (+11.7%) | 0.002 / 0.270 |

The published saturation throughputs are 0.327 / 0.351 for BLESS (+7%) and
0.242 / 0.271 for CHIPPER (+12%). The throughputs and the direction of every
effect agree. At low load, loop-back removes almost all misrouting, as
published. At saturation, this RTL reduces misrouting by only 8-11%, where
reductions of 57% (BLESS) and 51% (CHIPPER) were reported. The cause of the
gap is not known. Likely suspects are the exact definition of a "hop", how the
mesh boundary is treated, and details of the allocators that were not
specified (see below).

## Choices made in this implementation

These points were not fixed by the method's description; they are this
design's own:

* Flit format and widths, port numbering and coordinate orientation.
* Age is a per-flit saturating counter, cleared on injection and incremented
  on every router traversal, loop-backs included. It drives BLESS's
  oldest-first order. Ties go to the lower input port.
* The eject stage takes the oldest local flit. The inject stage uses the
  lowest free slot.
* BLESS port preference: among two productive ports, and among free ports
  when deflecting, the lower-numbered port wins.
* CHIPPER wiring: the pairing of ports in the permutation network, the
  preference of a flit that wants both outputs of a block, and the LFSR as
  the source of random priority. The original CHIPPER "golden packet"
  livelock-freedom scheme is not part of this model: priorities are purely
  random.
* Boundary ports loop back permanently.
* The core always accepts an ejected flit.
* Reset is synchronous and active-low.

## Files and simulation

RTL (`rtl/`), leaf first:

* `noc_pkg.sv`: flit type, enums and widths.
* `route_compute.sv`: finds a flit's productive ports.
* `eject_stage.sv`, `inject_stage.sv`: the eject and inject stages.
* `bless_allocator.sv`, `switch_fabric.sv`: BLESS allocation and the 4x4 crossbar.
* `chipper_arbiter_block.sv`, `chipper_permnet.sv`: CHIPPER allocation.
* `link_controller.sv`, `two_mode_link.sv`: the two-mode links.
* `deflection_router.sv`: the router.
* `noc_mesh.sv`: the top level.

Testbenches (`tb/`): every RTL module has a self-checking `tb_<module>.sv`.
`noc_traffic.sv` is a behavioural model of all the local cores. It generates
traffic, keeps a scoreboard of delivered flits and counts hops, loop-backs and
deflections. `tb_noc_mesh` runs the default 8x8 BLESS mesh at low load, then
overload, then drains it. It checks that every flit arrives exactly once, at
the right node, with its source intact. It also checks that no flit is faster
than one cycle per hop, and that each mechanism occurred. `tb_noc_workload_bless` and
`tb_noc_workload_chipper` (through `noc_workload_bench.sv`) run the injection
sweep above. Each prints `TB_RESULT checks=N failures=M`.

With plain Verilator, for example:

```
verilator --binary --timing --assert -y rtl -y tb --top-module tb_noc_mesh \
    rtl/noc_pkg.sv tb/tb_noc_mesh.sv
./obj_dir/Vtb_noc_mesh
```

`-y` lets Verilator find every other module by its file name. `tb_noc_mesh`
takes about a minute to build and a second to run. Each workload testbench
holds two full meshes and takes several minutes to build. To change the
network, override the `noc_mesh` parameters. For mesh sides above 8, widen
`COORD_W` in `noc_pkg`.
