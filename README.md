# Mixed mesh network-on-chip with straight-only routers

A mesh network-on-chip spends most of its area in two places: the router
crossbar and the channel buffers. This design cuts both by building half of
the routers in a mesh as **straight-only routers**. Such a router can inject a
flit from its core in any direction, eject a flit addressed to its core, and
pass a flit straight on (west to east, north to south and so on). It cannot
turn a flit from one direction into another. Its crossbar therefore shrinks
from five 4-to-1 multiplexers to four 2-to-1 multiplexers and one 4-to-1
multiplexer. The grant-to-select logic shrinks from 4x2 decoders to OR gates.
Its north, east, south and west buffers hold 8 flits instead of 16.

A mesh built only of straight-only routers cannot deliver to every node,
because flits never turn. The mesh here (`noc_mesh_mixed`) therefore mixes
them with **conventional routers**: full 5x5 crossbar, 16-flit buffers on
every port. The conventional routers make every turn.

## Parts

| module | role |
|---|---|
| `noc_mesh_mixed` | top: `MESH_X` x `MESH_Y` mesh, conventional routers in even columns, straight-only routers in odd columns |
| `noc_router_conv` | conventional five-port router |
| `noc_router_prop` | straight-only five-port router |
| `flit_fifo` | channel buffer (infifo / outfifo), valid/ready on both sides |
| `xy_route` | route computation for a head flit |
| `rr_arbiter` | round-robin arbiter, one per router output |
| `sel_decoder` | conventional 4x2 decoder: grant lines to a 4x1 multiplexer select |
| `or_select` | OR-gate replacement for the decoder in the straight-only router |
| `crossbar_conv` | five 4x1 multiplexers |
| `crossbar_prop` | four 2x1 multiplexers and one 4x1 multiplexer |
| `noc_pkg` | port numbering (`P_LOCAL`=0, `P_NORTH`=1, `P_EAST`=2, `P_SOUTH`=3, `P_WEST`=4) |

## Flits and links

A packet is a single flit of `FLIT_W` bits (8 by default). The destination
column is in bits `[COORD_W-1:0]` and the destination row in bits
`[2*COORD_W-1:COORD_W]` (`COORD_W` = 2 for a 4x4 mesh). The remaining bits
are payload that the network does not interpret. Columns (`x`) grow eastward
and rows (`y`) grow southward. Node `n` is at `x = n % MESH_X`,
`y = n / MESH_X`.

Every link is a `valid`/`flit`/`ready` triple. A flit moves at a clock edge
where both `valid` and `ready` are high. Each node has an injection port
(`inj_*`) into the router's local infifo and an ejection port (`ej_*`) out of
its local outfifo. The reset `rst_n` is synchronous and active low. It
empties all buffers and resets the arbiters.

A core must not send a flit to its own node. Neither crossbar has a path
from a port back to the same port, so such a flit would stay in the local
buffer.

## Router pipeline

Both routers use the same pipeline:

1. An arriving flit is written into the input port's infifo.
2. The next cycle, the infifo's head flit is routed. Each output's arbiter
   picks one of the requesting inputs, but only if that output's outfifo has
   room. The grant drives the crossbar select, and the flit moves into the
   outfifo at the clock edge.
3. The next cycle, the outfifo head is offered on the link.

An unblocked flit leaves a router two clock edges after it was accepted. So
a path through `R` routers takes `2R` edges from injection to `ej_valid`.
Each input moves at most one flit per cycle, and each output accepts at most
one.

**Conventional router.** The output port is computed by `xy_route` for
every input. For each output, a 4-input round-robin arbiter chooses among
the other four ports. `sel_decoder` converts the grant into the 2-bit select
of that output's 4x1 multiplexer. The multiplexer's inputs are the four
other ports in ascending order. Every buffer holds `DEPTH` = 16 flits.

**Straight-only router.** Only the local input is routed by `xy_route`. A
flit on a direction input goes to the local output if it is addressed to
this node. Otherwise it continues out of the opposite port, whatever its
destination. Each direction output has a 2-input arbiter that chooses
between the flit going straight through and the local input. The local
input's grant line is the select of that output's 2x1 multiplexer. The local
output has a 4-input arbiter over the four direction inputs. Its 2-bit select
is made by two OR gates: `sel[0] = g1 | g3` and `sel[1] = g2 | g3`. This
works because the grant is one-hot. Direction buffers hold `DIR_DEPTH` = 8
flits and local buffers `LOCAL_DEPTH` = 16.

## Routing in the mixed mesh

Turns may only happen in even (conventional) columns, so plain X-then-Y
routing does not work when the destination column is odd. `xy_route` (with
`MIXED = 1`, as the mesh uses) defines a **turn column**
`T = dst_x & ~1`. That is the destination column if it is even, and the
column just west of it if it is odd. At each hop:

1. at the destination: eject;
2. in the destination row: move along X toward the destination column;
3. in the turn column: move along Y toward the destination row;
4. otherwise: move along X toward the turn column.

A packet therefore has at most two turns: X to Y in column `T`, and Y to X
in the destination row when the destination column is `T + 1`. Both turns
are in even columns. A flit that a straight-only router receives is always
already travelling in the direction it must keep, so passing it straight on
is correct.

The cost is a small detour. A flit between two nodes of the same odd column
steps west, travels along Y, and steps back east. Column 0 must be
conventional, which this placement guarantees for any mesh size.
`tb_xy_route` walks every source/destination pair of a 4x4 mesh and checks
this property.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `noc_mesh_mixed` | `MESH_X`, `MESH_Y` | 4, 4 | mesh size; both must be at most `2**COORD_W` |
| | `FLIT_W` | 8 | flit width, at least `2*COORD_W` |
| | `COORD_W` | 2 | bits per coordinate in the flit |
| `noc_router_conv` | `DEPTH` | 16 | every infifo and outfifo |
| `noc_router_prop` | `DIR_DEPTH`, `LOCAL_DEPTH` | 8, 16 | direction and local buffers |
| routers | `X`, `Y`, `MIXED` | | position in the mesh and routing rule |

Larger meshes need larger `COORD_W`: 3 for 8x8, 4 for 16x16, 5 for 32x32.
At 16x16 the address fills the whole 8-bit flit. At 32x32 it does not fit,
and `FLIT_W` must be raised to at least 10.

## Size

Coarse synthesis of the default configuration (word-level cells, not FPGA
LUTs) gives:

| | cells | flip-flop bits | memory bits |
|---|---|---|---|
| `noc_router_conv` | 595 | 140 | 1280 |
| `noc_router_prop` | 396 | 112 | 768 |
| `noc_mesh_mixed` 4x4 | 7394 | 1792 | 13312 |

## Testbenches

Each module has a self-checking testbench `tb/tb_<module>.sv`. Each one
prints `TB_RESULT checks=N failures=M` and has a watchdog:

- `tb_flit_fifo`: random traffic against a queue model; full at exactly
  8 words.
- `tb_xy_route`: exhaustive against a reference, plus a hop-by-hop walk of
  every pair.
- `tb_rr_arbiter`: random requests against a round-robin model.
- `tb_sel_decoder`, `tb_or_select`, `tb_crossbar_conv`, `tb_crossbar_prop`:
  exhaustive or swept selects.
- `tb_noc_router_conv` and `tb_noc_router_prop`, each with a scoreboard of
  flit order per input/output pair. They check:
  - the two-edge latency;
  - the buffering of a blocked output: 32 flits for the conventional router;
    16 straight and 24 from local for the straight-only router;
  - fair sharing of one output between two inputs;
  - random traffic with back-pressure.
- `tb_noc_mesh_mixed`: the whole 4x4 mesh at its default parameters. It
  checks:
  - the corner-to-corner latency (7 routers, 14 edges);
  - one flit for every ordered pair of nodes, each with its exact latency;
  - 6000 cycles of uniform random traffic with ejection back-pressure;
  - arbitration contention: two neighbours send to one node at once, and
    the second flit must come out one cycle later.

  It counts, and requires to be non-zero:
  - turns X to Y and Y to X;
  - straight passes through straight-only routers;
  - injection and ejection at straight-only routers;
  - injection stalls;
  - ejection stalls;
  - contention events.
- `tb_noc_mesh_8x8` (with `tb/mesh_size_run.sv`): the same test on an 8x8
  mesh. It uses `COORD_W = 3` and a 12-bit flit so that the payload can
  carry the source node number.

To run one with plain Verilator from the project root:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/noc_pkg.sv tb/tb_noc_mesh_mixed.sv --top-module tb_noc_mesh_mixed
./obj_dir/Vtb_noc_mesh_mixed
```

The simulator runs in two states, so every register that is read is
reset.

## Where this design makes its own choices

The router parts, the multiplexer counts, the OR-gate select, the 8-flit and
16-flit buffers and mixing the two router kinds half and half follow the
published architecture this RTL implements. The following are this implementation's own
choices:

- **Placement of the two kinds.** Whole columns alternate. A checkerboard
  would also give half of each, but then some routes need a turn where there
  is no conventional router.
- **Routing rule.** The turn-column rule above. Plain X-Y routing cannot
  turn in odd columns.
- **Inputs of the 2x1 multiplexers.** Each sees the straight-through input
  and the local input.
- **Protocol and pipeline.** Single-flit packets, the flit layout,
  valid/ready links, the two-stage pipeline and round-robin arbitration.
- **Decoder.** `sel_decoder` is written as a priority case, and the OR-gate
  wiring in `or_select` is inferred.
- **Mesh edges.** Links on the edge of the mesh are tied off. The routing
  never uses them.

Not covered:

- **Delay and LUT counts.** These depend on the FPGA flow and are not
  reproduced.
- **A buffer-less router variant.** It is not built, because nothing fixes
  its structure.
- **Meshes of 16x16 and 32x32.** They elaborate by parameter but have not
  been simulated.
