# A dedicated ray traversal engine

Ray tracing on a GPU spends most of its time walking an acceleration tree
and testing rays against triangles. That work is irregular: each ray takes
its own path through the tree, so wide SIMD shader cores run it with poor
utilisation and poor memory locality. This design moves the walk into a
small fixed-function engine that sits beside the shader cores. The shaders
hand it packets of four rays and get back, for every ray, the closest
triangle hit (distance, triangle ID and barycentric coordinates). Inside,
the engine keeps up to 64 such packets ("threads", 256 rays) in flight and
interleaves them cycle by cycle in two deep pipelines, so that the latency
of every pipeline and every cache miss is hidden behind other threads.

A second idea sits on top of that: the tree is cut into *treelets*,
regions small enough to fit in the node cache. When a thread walks out of
the treelet it is in, it is stopped and put in that treelet's queue. A
scheduler then serves one treelet at a time, so threads that need the same
nodes come through together and the node cache is reused instead of
thrashed.

Everything is RTL written in SystemVerilog-2017; there are no vendor
macros. The scene (tree and triangles) lives in external memory, which the
engine reads through its own caches.

## Block structure

```
             ray packets            results
                 |                     ^
                 v                     |
          +----------------------------------+       +------------------+
          | io_unit: thread allocation,      |<----->| ray_state_buffer |
          | 64 treelet queues, lazy scheduler|       | rays + hits      |
          +----------------------------------+       +------------------+
             | dispatch      ^ park / finish              ^      ^
             v               |                            |      |
          +----------------------------------+  leaves  +------------------+
          | traversal_unit (14-cycle loop)   |--------->| geometry_unit    |
          |                                  |<---------| (36 cycles)      |
          +----------------------------------+  return  +------------------+
             |        ^ pop / push                          |
             |        |                                     |
             |   +-------------+                            |
             |   | trav_stack  |                            |
             |   +-------------+                            |
             v                                              v
        +----------------+                          +----------------+
        | node cache     |                          | vertex cache   |
        | 32 kB, 4-way   |                          | 32 kB, 4-way   |
        +----------------+                          +----------------+
                  \                                   /
                   +--------- mem_arbiter -----------+
                                  |
                        L2 cache, 1 MB, 4-way, 100 cycles (optional)
                                  |
                         external memory port (64-byte lines)
```

`rte_top` wires these together. The files:

| file | block |
|---|---|
| `rtl/rte_pkg.sv` | shared types: fixed-point word, rays, hits, B-KD nodes, work items, packets, counters; treelet function |
| `rtl/rte_top.sv` | the engine |
| `rtl/io_unit.sv` | thread allocation, treelet queues, lazy scheduler, result output |
| `rtl/traversal_unit.sv` | tree walk |
| `rtl/geometry_unit.sv` | ray-triangle test and ray transformation |
| `rtl/fx_divider.sv` | pipelined fixed-point divider used by the geometry unit |
| `rtl/trav_stack.sv` | per-thread traversal stacks |
| `rtl/ray_state_buffer.sv` | per-ray origin/direction (world and object space) and closest hit |
| `rtl/ro_cache.sv` | read-only set-associative cache, used for node, vertex and L2 caches |
| `rtl/mem_arbiter.sv` | shares one line-fill port between the two L1 caches |
| `rtl/sync_fifo.sv` | small FIFO (geometry unit's leaf queue) |

## Numbers and data formats

All geometry is **Q16.16 signed fixed point** (32 bits, `fx_t`), with
saturating add and multiply so that a very large distance clamps instead of
wrapping. This keeps the datapaths small; its price is range and precision:
scenes should be scaled to coordinates of a few thousand units, and
directions should not be so short that their reciprocals overflow.

**Ray** (`ray_t`, 288 bits): origin, direction and the component-wise
reciprocal of the direction. The shaders supply all three for world-space
rays; the engine computes the reciprocal itself after a transformation.

**Packet** (`ray_packet_t`): a 32-bit tag, four rays, and four maximum
distances. **Result** (`ray_result_t`): the tag and four hit records
(`t`, triangle ID, `u`, `v`). A ray with no hit returns `t` equal to its
maximum distance and triangle ID `32'hFFFF_FFFF`.

**Tree.** The acceleration structure is a two-level *B-KD tree*. Each inner
node splits along one axis and stores, for each of its two children, a
`[lo, hi]` slab along that axis (the child's extent, which may overlap the
other child's). A node is 32 bytes (`bkd_node_t`):

| word | inner node | leaf |
|---|---|---|
| 0 (header) | bit 31 = 0, bits 29:28 = axis | bit 31 = 1, bit 30 = transformation leaf |
| 1 | child 0 address | address of three geometry rows |
| 2 | child 1 address | triangle ID, or subtree root for a transformation leaf |
| 3..6 | lo0, hi0, lo1, hi1 | unused |

A leaf holds a single triangle, or an instance: a transformation and the
root of a bottom-level tree. Bit 31 of a node address marks nodes of a
bottom-level tree; it tells the engine to use the object-space copy of the
rays. Memory addresses are therefore 31 bits (2 GB) of byte address.

**Geometry rows.** Every leaf points to three 16-byte rows `(m0, m1, m2, m3)`.
For an instance they are the top three rows of the affine object-from-world
matrix. For a triangle they are the affine map that takes the triangle to
the unit triangle (0,0,0), (1,0,0), (0,1,0); the host computes it when it
builds the scene. With this form the triangle test and the transformation
are both "three 4-element dot products", so one datapath does both.

## A thread's life

1. **Allocation.** The IO unit accepts a packet when a thread is free,
   writes the rays and maximum distances into the ray state buffer
   (resetting the hits), clears the thread's stack and puts the thread in the
   queue of the root's treelet with the item *(root, near = 0,
   far = tmax)*.
2. **Dispatch.** The scheduler sends the head of the active treelet queue to
   the traversal unit.
3. **Traversal loop.** The thread circulates in the traversal unit, one
   node per 14-cycle round, pushing and popping its stack.
4. **Leaf.** A leaf leaves the loop for the geometry unit. After a
   triangle test the thread comes back and pops its stack; after a
   transformation it comes back and enters the bottom-level tree at the
   subtree root, with object-space rays. When the bottom-level walk pops
   back to an item pushed at top level, the world rays are used again,
   because the level is part of every node address.
5. **Treelet boundary.** When the next node lies in another treelet, the
   thread is parked: its item goes back to the IO unit into that treelet's
   queue.
6. **Finish.** When a pop finds the stack empty, the thread's rays are done.
   The IO unit returns the tag and hits and frees the thread.

### The traversal loop

The traversal unit is the heart of the engine and the hardest part to read.
It is a ring of 14 pipeline stages; every stage may hold a different thread,
and threads never wait for one another except for a node cache miss.

* **A, select.** One thread enters per cycle. Priority goes to a thread
  recirculating from the end of the ring, then to a thread returning from
  the geometry unit, then to a new dispatch from the IO unit. Since a
  recirculating thread always wins, a thread stays in the ring until it
  leaves it.
* **B, resolve.** If the thread's previous outcome was "pop", its stack is
  read now (the stack is read combinationally, one read port); an empty
  stack finishes the thread. Every ray's far value is clipped to its
  current closest hit, which is how earlier triangle hits cut off later
  subtrees. If the node belongs to a different treelet than the one the
  thread was dispatched in, the thread is parked. Otherwise the node is
  requested from the node cache.
* **C, planes.** With the node in hand, for each of the four rays and both
  children the unit computes the distances to the child's two bounding
  planes along the split axis: `(plane - origin) * reciprocal`, ordered by
  the sign of the direction.
* **D, decide.** Each child's distance interval is intersected with each
  ray's current `[near, far]`. For a leaf, the thread goes to the geometry
  unit. Otherwise: no ray hits any child, pop; rays hit one child, go
  there; rays hit both, go to the closer one and push the farther one
  (address plus its per-ray intervals, 36 bytes) onto the stack. "Closer"
  is the child with the smallest entry distance over the rays that hit it.
  Rays that miss a child get an empty interval for it and are carried along
  inactive.
* **Delay stages** pad the ring to `TRAV_LATENCY` cycles.

The stack therefore takes at most one read (in B) and one write (in D) per
cycle, from two different threads.

### The geometry unit

Leaves arrive at most one per cycle and queue in a FIFO. For the leaf at
the head, the unit issues the three row reads to the vertex cache and waits
until all three rows are back. Then the four rays pass through the
dot-product stage two cycles each: origin (with w = 1) in the first,
direction (w = 0) in the second, so a thread occupies the stage for 8
cycles. For a triangle, `t = -Oz / Dz`, `u = Ox + t Dx`, `v = Oy + t Dy`;
the ray hits when `t >= 0`, `t` is below its current hit, `u >= 0`,
`v >= 0` and `u + v <= 1`, and only rays whose interval is not empty are
tested. For an instance, the transformed ray and three reciprocals (from
three 16-stage pipelined dividers) are written as the object-space ray.
Delay stages make every thread return exactly `GEOM_LATENCY` = 36 cycles
after its first ray entered the dot-product stage.

## Treelets and the lazy scheduler

A treelet is an aligned 32 kB region of node memory, the size of the node
cache: `treelet = (address[30:0] >> 15) mod 64`. The builder of the tree
should place each subtree that belongs together into one region; a scene
with more than 64 regions still works, the regions just share queues.

The IO unit keeps one FIFO of thread numbers per treelet, as linked lists
through a 64-entry "next" table, so the 64 queues together cost 64 entries.
With each thread it keeps the item to resume with. The scheduler is lazy:
it keeps serving the active queue until that queue is empty, and only then
switches to the treelet with the largest queue (lowest number on a tie).
Queue sizes are kept in counters, so the choice is one comparison tree.
One queue operation happens per cycle, in the priority park > dispatch >
new packet. Results go out in the order the threads finish.

Setting `NUM_TREELETS = 1` turns treelet sorting off: every node is in the
single treelet and threads are never parked.

## Memory hierarchy

`ro_cache` is one module for all three caches. It is read only,
set-associative with round-robin replacement per set, 64-byte lines, and
blocking: one miss at a time, and the request port stays closed until the
line has been filled. A hit answers after `HIT_LATENCY` cycles (1 for the
L1s, 100 for the L2). After reset the cache sweeps its valid bits clear,
one set per cycle, before taking its first request (128 cycles for an L1,
4096 for the L2).

The node cache returns 256-bit nodes and the vertex cache 128-bit rows.
Their misses meet in `mem_arbiter`, which grants the line-fill port round
robin and routes the returning line to the cache that asked for it. With
`USE_L2 = 1` that port goes to the 1 MB 4-way L2; with `USE_L2 = 0` it is the
engine's memory port directly. The memory port carries one request at a
time: `mem_req_valid/ready/addr` and, any number of cycles later,
`mem_resp_valid/data` with the 64-byte line.

## Parameters of `rte_top`

| parameter | default | meaning |
|---|---|---|
| `THREADS` | 64 | threads of four rays in flight |
| `STACK_DEPTH` | 32 | stack entries per thread |
| `NUM_TREELETS` | 64 | treelet queues (1 = no treelets) |
| `TREELET_SHIFT` | 15 | log2 of the treelet region size |
| `L1_BYTES`, `L1_WAYS` | 32768, 4 | node and vertex cache |
| `USE_L2` | 1 | include the L2 |
| `L2_BYTES`, `L2_WAYS`, `L2_LATENCY` | 1048576, 4, 100 | L2 cache |
| `TRAV_LATENCY` | 14 | traversal ring length |
| `GEOM_LATENCY` | 36 | geometry unit latency |
| `ROOT_ADDR` | 0 | address of the top-level root node |

`busy` is high while any thread is in use; `stack_overflow` is a sticky flag
raised when a push found a full stack (the push is dropped, so results of
that thread may then be wrong). `stats` brings out event counters: cache
hits and misses at every level, inner and leaf visits, pushes and pops,
parks, stall cycles, triangle tests, hits found, transformations, queue
switches and the summed queue sizes at switches, packets in and out.

## Where this design departs from the original proposal

The engine follows a published proposal for a traversal engine attached to
a GPU. The thread organisation, the 14- and 36-cycle latencies, the 2-cycle
per ray geometry unit with its three row fetches, the stack size and
access rule, the cache sizes and associativity, the L2 and its latency, the
two-level B-KD tree and the lazy treelet scheduler are taken from it. The
following are this design's own, or differ:

* **Number format.** The proposal does not state one; Q16.16 fixed point is
  used here throughout.
* **Stack capacity.** The proposal's block diagram labels the stack 32 kB,
  but its text asks for 36-byte items, depth 32 and 64 threads, which is
  72 kB. This design follows the text.
* **No stack spilling.** Overflow raises a flag; spilling to memory was
  only mentioned as an option.
* **IO unit.** The proposal leaves the IO unit open and keeps ray and treelet
  queues in main memory. Here packets and results use valid/ready ports, and
  the treelet queues hold thread numbers on chip, so at most 64 packets are
  in flight and a parked thread keeps its thread slot.
* **Threads, not single rays, cross treelets.** The proposal describes rays
  being parked and queued one by one. Here the four rays of a thread are
  parked and queued together, with one stack per thread, so the rays of a
  thread stay together even when they would head for different treelets.
* **Memory width without L2.** The proposal has the L1 caches use 128-bit
  accesses when there is no L2. Here every level moves 64-byte lines.
* **Blocking caches with round-robin replacement**, one outstanding miss
  per cache and per memory port. The proposal gives no miss handling.
* **Triangle storage** as an affine map to the unit triangle instead of
  three vertices, so that one datapath serves both leaf kinds.
* **Closer child** chosen by smallest entry distance, and **far values
  clipped** to the closest hit at every node; not specified by the proposal.
* **Treelet mapping** by address region, with 64 queues.
* **Shaders and main memory** are outside the engine. The testbenches model
  memory with a 600-cycle latency, the figure the proposal assumes.

## Simulation

Every block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=<n> failures=<n>` at the end:

| testbench | checks |
|---|---|
| `tb_rte_top` | whole engine at default parameters with a 600-cycle memory model: 160 packets on a random two-level scene, each hit compared with a brute-force reference; every mechanism (pushes, pops, stalls, parks, queue switches, transformations, hits and misses at all caches, back-pressure) must occur |
| `tb_rte_ao` | ambient-occlusion workload at default parameters: 16 short occlusion rays per pixel from each primary hit, in four packets, checked against the reference |
| `tb_rte_configs` | the same end-to-end test with `USE_L2 = 0` and `NUM_TREELETS = 1`: no thread is parked, the L2 counters stay zero |
| `tb_traversal_unit` | traversal decisions and the 14-cycle loop against a software walk |
| `tb_geometry_unit` | triangle tests, transformations and the 36-cycle / 8-cycle timing |
| `tb_io_unit` | allocation, FIFO order per treelet, lazy switching to the largest queue |
| `tb_trav_stack` | push/pop/clear per thread against a model, overflow |
| `tb_ray_state_buffer` | all read and write ports against a model |
| `tb_ro_cache` | node and vertex cache configurations: data, hit/miss, latency |
| `tb_l2_cache` | the L2 configuration, 100-cycle hits |
| `tb_mem_arbiter` | routing of lines, one request outstanding, round robin |

The scene for the top-level test is generated in SystemVerilog by
`tb/rte_scene_pkg.sv` (a class that builds the tree, the rows and a
reference tracer); `tb/main_memory_model.sv` is the memory model.

With Verilator 5:

```
verilator --binary --timing -Wno-fatal -y rtl -y tb \
    rtl/rte_pkg.sv tb/rte_scene_pkg.sv tb/tb_rte_top.sv \
    --top-module tb_rte_top -Mdir obj_rte_top
./obj_rte_top/Vtb_rte_top
```

Replace `tb_rte_top` by any testbench name; `rtl/rte_pkg.sv` must always
come first, and `tb/rte_scene_pkg.sv` is needed by the top-level and
traversal/geometry testbenches. The full-size top-level test builds in
about a minute and runs in seconds.

## How far to trust it

The blocks are checked one by one against independent models, and the
whole engine against a brute-force tracer on random scenes, including
instancing, treelet parking and all cache levels. It has not been
synthesised to a target library, so the claim that the proposal's clock
rate would be reached is untested; the ring and pipeline depths match the
proposal's latencies, but the logic per stage (for example the
four-ray plane computation in stage C) has not been balanced for speed.
The fixed-point format limits the scene range, and ties between equally
distant triangles may resolve to either triangle.
