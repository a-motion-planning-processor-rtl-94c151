# A motion-planning processor in SystemVerilog

This is a hardware implementation of **probabilistic roadmap (PRM)
planning** for a rigid robot among fixed obstacles.

A PRM planner works in two phases:

1. **Build a roadmap.** Scatter random robot poses (configurations) through
   the workspace. Keep the ones where the robot touches no obstacle. Join
   each kept pose to its nearest neighbours wherever the straight motion
   between them is also collision-free.
2. **Answer queries.** Attach a start pose and a goal pose to the roadmap,
   then search the roadmap graph for a route between them.

Almost all of the time goes into one question: *does the robot, placed at
pose q, intersect any obstacle?* The design is built around answering that
question quickly, with many triangle-intersection circuits working in
parallel. Everything else is small control logic that keeps those circuits
busy.

A host computer drives the processor over a serial line:

- it sends the robot and obstacle models as triangles;
- it asks for a roadmap, a path, or a single collision check;
- it reads back the answers.

## Contents

- [Data formats](#data-formats)
- [Block structure](#block-structure)
- [The collision detector](#the-collision-detector)
  - [Transform stage](#transform-stage)
  - [Parallel comparison](#parallel-comparison)
  - [Triangle-triangle test (`tri_tri_isect`)](#triangle-triangle-test-tri_tri_isect)
- [Roadmap building](#roadmap-building)
  - [Node generation](#node-generation)
  - [Node connection](#node-connection)
- [Query](#query)
- [Host protocol](#host-protocol)
- [Parameters](#parameters)
- [Where this implementation makes its own choices](#where-this-implementation-makes-its-own-choices)
- [Capacity against the reference workloads](#capacity-against-the-reference-workloads)
- [Verification](#verification)
- [Simulating](#simulating)
- [Known limitations](#known-limitations)

## Data formats

The shared package `mpp_pkg` defines the number format and the structs
below.

**Numbers.** All coordinates are signed 32-bit fixed point with 16
fraction bits (Q16.16), in the type `fx_t`.

**Triangles.** A triangle is a packed struct `tri_t` of 288 bits:

| Field | Contents |
|---|---|
| `v0`, `v1`, `v2` | the three vertices |
| each vertex | `x`, `y`, `z`, each an `fx_t` |

**Configurations.** A configuration `cfg_t` describes one robot pose in 126
bits:

| Field | Width | Meaning |
|---|---|---|
| `x`, `y`, `z` | 32 bits each | position |
| `a`, `b`, `c` | 10 bits each | rotation angles |

- Angle units are 2π/1024, so the full 10-bit range is one turn.
- The rotation is R = Rz(c)·Ry(b)·Rx(a).
- A robot vertex v is placed at R·v + (x, y, z).

Robot triangles are stored relative to the robot's own origin. Obstacle
triangles are stored in world coordinates.

## Block structure

```
              serial in/out
                   |
      uart_rx / uart_tx
                   |
               host_io ----------------------------+
              /   |    \                           |
  roadmap_builder |   query                        | model loading
   |  node_generation (N_RAND x rand_node_gen)     |
   |  node_buffer                                  |
   |  node_connection                              |
   |     edge_finder (N_CLOSEST x find_closest)    |
   |     N_CLOSEST*N_LP x local_planner            |
   |     feas_arbiter                              |
   |  edge_buffer                                  |
   |                 |                             |
   +---------> feas_arbiter (builder, query, host) |
                     |                             v
              collision_detector <------------- tri_mem banks
                 transform_unit (trig_lut, fx_mul) -> tri_fifo
                 N_CD x collision_circuit (tri_tri_isect)
```

**The feasibility port.** Every block that needs a collision answer uses
the same pair of handshakes:

- a request: `fq_valid`, `fq_cfg`, `fq_ready`;
- an answer: `fr_valid`, `fr_collide`.

Round-robin arbiters (`feas_arbiter`) merge several requesters onto one
checker. Each arbiter keeps one request in flight and routes the answer back
to its owner.

The collision detector is the only feasibility checker here. It could be
replaced by a different feasibility test with the same port, for example
an energy threshold.

## The collision detector

A collision check takes a configuration and answers "collides" or "free".
It runs in two overlapping stages.

### Transform stage

`transform_unit` turns the configuration into world-space robot triangles
and pushes them into a FIFO (`tri_fifo`). The steps are:

1. **Sine and cosine.** Three sine/cosine tables (`trig_lut`) each take a
   10-bit angle and return 32-bit Q16.16 values after 2 cycles.
   - Each table holds one quarter of a wave and uses symmetry for the
     rest.
   - The table is computed at elaboration time from `$sin`.
2. **Rotation matrix.** Two pipelined multiplier stages (`fx_mul`, 32×32 to
   64 bits, 2-cycle latency) form the nine matrix entries.
3. **Streaming.** One robot triangle is read per cycle. Its three vertices
   are rotated and translated by 27 multipliers.
4. **Back-pressure.** The stage counts the triangles still in its pipeline
   and stops issuing reads before the FIFO could overflow.

If the FIFO never fills, a job of n triangles takes n + 9 cycles from start
to done.

### Parallel comparison

The obstacle triangles are spread round-robin over `N_CD` banks: triangle j
goes to bank j mod N_CD. Each bank has its own `collision_circuit`, which
walks through the bank and feeds pairs to its `tri_tri_isect`.

For each robot triangle at the head of the FIFO:

1. The triangle is broadcast to all circuits at once.
2. When every circuit has finished its bank, the triangle is popped and the
   next one starts.
3. On the first hit anywhere, the answer is "collides". The FIFO is
   flushed and the transform and all circuits are cancelled, so no time is
   spent on the rest of the pairs.

Per robot triangle, the time is about (obstacle triangles / N_CD) × (5 to 7
cycles). More circuits therefore shorten each check almost proportionally,
as long as the banks stay well filled.

### Triangle-triangle test (`tri_tri_isect`)

This is the classic division-free test for whether two triangles
intersect. It is the part most worth understanding before changing
anything.

**Steps.**

1. **Planes.** Compute both plane normals as edge cross products.
2. **Signed distances.** Compute the signed distance (times |n|) of each
   vertex of one triangle from the other triangle's plane.
3. **Half-space rejection.** If all three vertices of either triangle lie
   strictly on one side of the other's plane, the triangles cannot meet.
   This answers most pairs at cycle 4.
4. **Coplanar case.** If every distance is zero, the triangles are
   coplanar:
   - project both onto the axis plane where they have the largest area;
   - run a 2-D test: edge-against-edge crossings, plus a vertex-inside test
     each way.
5. **General case.** The two planes meet in a line L, and each triangle
   cuts L in an interval:
   - project onto the coordinate axis where L is longest;
   - form each interval from the "lone" vertex (the one on its own side of
     the plane);
   - test whether the intervals overlap.

**No division.** An interval end is naturally a fraction. The comparison
is done after multiplying out all denominators, and the denominators' signs
are taken into account. As a result every quantity is an exact integer:

| Quantity | Width (bits) |
|---|---|
| normals | 68 |
| distances | 104 |
| final interval products | 461 |

There is no rounding anywhere, so the answer is exactly right for the
fixed-point vertices it is given.

**Latency.**

| Case | Cycles |
|---|---|
| half-space rejection | 4 |
| coplanar | 5 |
| general | 6 |

A synchronous `flush` input (`cancel` on the circuit) returns it to idle.

**Touching.** Triangles that only touch, at a vertex or along an edge,
count as intersecting.

**Robot inside an obstacle.** The test is surface-against-surface. A robot
completely inside a closed obstacle, or an obstacle completely inside the
robot, is not detected. With the reference shapes this cannot happen:

- the robot is 48×24×24;
- obstacles are 48×48×16;
- neither fits inside the other in any orientation.

## Roadmap building

`roadmap_builder` runs two phases one after the other. Both phases share a
node buffer (configurations) and an edge buffer (pairs of node indices).

### Node generation

`N_RAND` random generators (`rand_node_gen`) each produce one complete
random configuration per clock:

- each generator has six xorshift32 generators, one per degree of freedom;
- positions are scaled into [0, BOX);
- angles take the whole 10-bit range.

A batch of N_RAND candidates is captured and checked one by one:

- a free candidate is written to the node buffer;
- a colliding one is dropped and counted.

When the batch is used up, a new batch is drawn. This repeats until the
requested number of nodes is stored.

### Node connection

The nodes are processed in groups of `N_CLOSEST`.

1. **Find neighbours.** `edge_finder` gives each `find_closest` circuit its
   own node, then streams the whole node buffer past all circuits in one
   pass.
   - Each circuit keeps a sorted list of its K nearest nodes.
   - Distance is squared Euclidean distance between positions.
   - A circuit skips its own node.
2. **Check edges.** Each circuit hands its K candidate edges to its `N_LP`
   local planners. All planners run concurrently and share the collision
   detector through an arbiter.
3. **Local planning.** A `local_planner` checks the LP_STEPS − 1 equally
   spaced points strictly between the two end nodes:
   - angles move the short way round the circle;
   - the first colliding point rejects the edge;
   - with LP_STEPS = 8 the spacing is a shift, not a division.
4. **Store.** A free edge (node, neighbour) goes into the edge buffer.

An edge found from both of its ends is stored twice.

## Query

`query` does four things:

1. **Find the nearest nodes.** Two `find_closest` circuits compare the
   start and the goal with every node in one pass.
2. **Connect start and goal.** Two local planners, one per side, try that
   side's nearest nodes in order. The first node with a free straight line
   becomes that side's connection node.
3. **Search.** A breadth-first search runs from the start's connection
   node, treating edges as undirected.
   - Each node taken off the queue causes one full scan of the edge list,
     at one edge per cycle.
   - Parent pointers are recorded during the search.
4. **Return the path.** The path is rebuilt from the goal side using the
   parent pointers. It can be read out start-first through `path_raddr`.

If neither side connects, or the goal is not reachable, `found` is 0.

## Host protocol

The serial line runs at 8 data bits, no parity, 1 stop bit (8N1), with
`CLKS_PER_BIT` clocks per bit. The default of 434 gives 115200 baud at
50 MHz. The receiver recovers from broken frames.

Multi-byte fields are sent most significant byte first. A configuration is
sent as 16 bytes, with the 126-bit `cfg_t` in the low bits.

| Command | Payload | Action | Answer |
|---|---|---|---|
| `01` | 36-byte triangle | append an obstacle triangle | none |
| `02` | 36-byte triangle | append a robot triangle | none |
| `03` | none | forget all triangles | none |
| `04` | n (1 byte) | build a roadmap of n nodes | see below |
| `05` | configuration | single collision check | `85`, then 1 = collides or 0 = free |
| `06` | start and goal configurations | path query | see below |

**Answer to `04`:** the byte `84`, then the node count (1 byte), then the
edge count (2 bytes). After that come the configurations of both end nodes
of every edge, 32 bytes per edge.

**Answer to `06`:** the byte `86`, then found (1 byte), then the path
length (1 byte). After that come the configurations of the path's nodes,
16 bytes each.

Unknown command bytes are ignored. Triangles may be loaded only while no
check is running (an assertion enforces this).

## Parameters

Parameters of `mpp_top`; the submodules have matching parameters.

| Parameter | Default | Meaning |
|---|---|---|
| `N_CD` | 25 | parallel collision circuits, one obstacle bank each |
| `BANK_DEPTH` | 256 | triangles per bank, so 6400 obstacle triangles in total |
| `ROBOT_DEPTH` | 256 | robot triangles |
| `FIFO_DEPTH` | 16 | transformed-triangle FIFO |
| `N_RAND` | 10 | random configuration generators |
| `N_CLOSEST` | 10 | closest-finding circuits |
| `K` | 5 | neighbours per node |
| `N_LP` | 1 | local planners per closest-finding circuit |
| `LP_STEPS` | 8 | intervals per edge (7 checked points) |
| `MAX_NODES` | 100 | node buffer size (edge buffer is MAX_NODES × K) |
| `BOX` | 240 | side of the cube in which positions are drawn |
| `CLKS_PER_BIT` | 434 | serial bit time in clocks |

## Where this implementation makes its own choices

**Taken from the original architecture:**

- the five-part structure: I/O, model memory, roadmap builder, query, and
  a feasibility checker;
- a transform stage feeding a FIFO that decouples it from the
  intersection circuits;
- parallel collision circuits sharing one robot triangle and stopping at
  the first hit;
- the three-case triangle test;
- 288-bit triangles read one per clock;
- 32-bit fixed point;
- sine/cosine tables with a 10-bit input, 32-bit output and 2-cycle
  latency;
- 2-cycle multipliers;
- N_RAND, K, N_CLOSEST and N_LP, and the up to 25 circuits;
- the reference environment sizes.

**Chosen here:**

- Q16.16 scaling, the rotation order and the angle units.
- Exact full-width arithmetic in the intersection test. The original used
  32-bit values throughout and does not say how it handled wider
  products.
- How obstacle triangles are split over the banks.
- The FIFO and robot memory depths.
- The random generator type (xorshift32).
- The neighbour metric: positions only.
- The number of intermediate points on an edge.
- The arbitration between requesters.
- Breadth-first search for queries.
- The whole serial command set and the 115200 baud rate.
- Storing duplicate edges.
- No on-chip store of per-configuration check results: each answer goes
  straight back to whoever asked.
- Seven interior points per edge. The original leaves the number of
  points open.
- The original fitted triangles in four 72-bit memory blocks. Here each
  bank is one 288-bit-wide array with the same one-triangle-per-clock
  read.

## Capacity against the reference workloads

The reference test scenes are:

- a 240³ box;
- 5, 10, 15 or 20 obstacle blocks of 48×48×16, each made of 12 triangles;
- a 48×24×24 robot, also 12 triangles.

At default size these need at most 240 of the 6400 obstacle slots and 12
of the 256 robot slots. Generating 100 nodes fills the 100-node buffer
exactly. A roadmap of 100 nodes has at most 500 edges, which matches the
edge buffer.

A model of 86,016 triangles, the capacity of a whole large FPGA, would need
`BANK_DEPTH` ≥ 3441 at 25 circuits.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`, and each has a watchdog. Independent
references are:

| Block | Reference |
|---|---|
| triangle test | floating-point edge-crosses-triangle reference (2-D test for coplanar pairs), on random general, coplanar, far-apart and near-full-range pairs |
| transform | floating-point rotation to within 1/256 |
| collision detector | random box worlds, robot turned by multiples of 90°, against an exact box-overlap reference |
| roadmap blocks | a wall-shaped feasibility model (`tb_feas_model`), with brute-force nearest-neighbour and edge lists compared as multisets |
| query | breadth-first hop counts |

**End-to-end tests.** `tb_mpp_top` drives the complete processor only
through its serial pins. It uses a short bit time, 4 circuits and a small
FIFO, and runs:

- box robot and 3 obstacles;
- 40 collision checks;
- a 30-node roadmap;
- 6 queries.

Results are compared with an exact separating-axis test of the rotated
robot box against each obstacle. The test also counts each mechanism and
fails if one never happens:

- FIFO back-pressure;
- early stop;
- node and edge rejection;
- arbiter contention;
- a broken serial frame;
- both check answers;
- found and not-found paths.

`tb_mpp_top_full` runs the processor with every parameter at its default,
including the 115200-baud line. It uses one obstacle, 4 checks, a 4-node
roadmap and 2 queries, and takes about 5 minutes under Verilator.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/mpp_pkg.sv tb/tb_geom_pkg.sv tb/tb_mpp_top.sv --top-module tb_mpp_top
./obj_dir/Vtb_mpp_top
```

Replace the testbench name to run any other test.

## Known limitations

- **Robot inside an obstacle.** This is not detected (see the triangle
  test). It is harmless for the reference shapes.
- **Synthesis size.** The exact-arithmetic intersection test is large:
  roughly a few hundred wide multipliers per circuit. At 25 circuits this is
  far bigger than the original 32-bit datapath. Narrowing it would need
  rounding and a margin.
- **One check at a time.** Roadmap building and queries send one
  collision check at a time through a single detector, so parallelism is
  inside each check, not across checks.
- **Duplicate edges.** These waste edge-buffer space and serial bandwidth.
- **Query search speed.** Each breadth-first step scans the whole edge
  list, so a query costs O(nodes × edges) cycles in the worst case.
