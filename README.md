# Barnes-Hut force evaluation on Fifer-style CGRA processing elements

Barnes-Hut computes the gravitational pull on each of N bodies. It walks an
octree and replaces whole far-away cells by their centre of mass. Each body's
walk is independent of the others, so the problem is embarrassingly parallel.
It is still slow on ordinary machines, for two reasons. The walks jump around
memory. And a recursive walk needs a stack whose size varies. This RTL
implements the hardware side of a design that removes both problems on a
coarse-grained reconfigurable array (CGRA):

* The octree is flattened into a **slim octree**. This is an array in
  pre-order in which every cell carries a single *skip* index. A walk is then
  one index that either steps by one (descend) or jumps to `skip` (use the
  cell and step over its subtree). The whole state of one body's walk fits in
  a fixed-size record, the **ING** (Index, Node, Gradient).
* A **pool** of INGs circulates round a loop of queues on one processing
  element (PE). A *management* stage feeds the loop and retires finished
  INGs. A *decoupled reference machine* (DRM) fetches each ING's tree cell
  ahead of use. A *compute* stage does one walk step. A 16-entry
  **sorter** then releases INGs smallest-node-first, so the pool stays
  close together in the tree and neighbouring INGs reuse the same cells.
* The management and compute stages share the PE. A greedy scheduler
  switches between them.
* Four PEs split the bodies between them.

## The slim octree and the ING

Cells are stored in pre-order. Each inner cell is followed directly by all
cells below it. Its `skip` field is the index just past that subtree. The
root's skip is therefore the length of the array, `tree_len`, and a walk is
finished when its node index reaches `tree_len`.

```
index :  0    1    2    3    4    5    6    7
cell  :  A    b4   B    b1   b5   C    b3   b2      (A, B, C inner; bN leaf of body N)
skip  :  8    -    5    -    -    8    -    -
```

For a body far from B, the walk is 0 (A, open) → 1 (leaf 4) → 2 (B, used) →
5 (C, open) → 6 → 7 → 8 (done).

Types (`bh_pkg`), all values signed fixed point **Q16.16**:

| type          | fields                                                                 |
|---------------|------------------------------------------------------------------------|
| `ing_t`       | `index` (32), `node` (32), `gradient` (3 × Q16.16), 160 bits           |
| `tree_node_t` | `is_leaf`, `skip` (32), `mass`, `com` (3 ×), `size` (edge length), 193 bits |
| `vec3_t`      | `x`, `y`, `z`                                                          |

A leaf is a cell holding one body: `com` is the body position and `mass` its
mass. Host software builds the array and orders the bodies along the tree
(Morton order), so that consecutive bodies follow similar walks. The test
package `tb/bh_tb_pkg.sv` shows how. The hardware only reads the array.

## One walk step (`bh_compute`)

For an ING, the cell at `ING.node` and the position `p` of body `ING.index`:

| case                                   | gradient                     | next node   |
|----------------------------------------|------------------------------|-------------|
| leaf                                   | `+= m·d / (|d|²+ε²)^1.5`     | `node + 1`  |
| inner and far: `size² < θ²·|d|²`       | `+= m·d / (|d|²+ε²)^1.5`     | `skip`      |
| inner and near                         | unchanged                    | `node + 1`  |

Here `d = com − p`, θ = 0.5 (`THETA2` = 0.25), ε = 1/16 (`SOFT2` = 1/256), and
G = 1. The softening term keeps the body's own leaf from contributing and
keeps the divisor non-zero.

The datapath is two register stages, and it accepts one ING per cycle:

* **A:** differences, `|d|²` (Q32.32), and the opening test. The test is done
  without a square root by comparing `size²·2¹⁶` with `THETA2·|d|²`. This
  stage also picks the next node index.
* **B:** `r = isqrt(|d|² + ε²)`, then `f = m / r³` as an unsigned Q.48
  fraction (a 128-bit division), then `gradient += (f·d) >> 48`. All results
  are truncated.

The stage only moves while the scheduler enables it. Whatever it holds stays
in place while the other stage runs.

## The sorter and its release rule (`bh_sorter`)

This is the part that needs the most care. The sorter holds up to 16 INGs in
a register array kept in ascending `node` order, with equal keys in arrival
order. Stage 1 registers an incoming ING. In stage 2, one cycle removes the
head and inserts the staged ING at its place. The insertion position is the
number of held keys that are ≤ its node. This gives one ING per cycle in and
out.

The sorter feeds the queue to the management stage. It releases its head only
when that queue has space **and** either

* the queue is **empty**, so the management stage must not starve, or
* the sorter is **full**, so holding more is impossible.

Otherwise it keeps filling, which widens the window it sorts over. Without
the "queue empty" clause, the design deadlocks near the end of a pool: once
fewer than 16 INGs remain, the sorter can never fill, nothing is released,
and nothing new arrives. `evt_pop_full` and `evt_pop_empty` show which clause
caused each release. Both clauses fire in the tests.

## The PE loop (`bh_pe`)

```
        ┌──────────── q_sm (POOL_SIZE) ◄─────── sorter ◄──────┐
        ▼                                                     │
   bh_manage ── q_md (POOL_SIZE) ─► node DRM ─ q_nb (4) ─► body DRM ─ q_dc (POOL_SIZE) ─► bh_compute
        │                               │                      │
     ret_* (final INGs)          node memory port        body memory port
```

* **`bh_manage`** starts pools of `pool_size` INGs (run-time input; 0 or
  anything above `POOL_SIZE` means `POOL_SIZE` = 256). Each ING starts at
  node 0 with a zero gradient. After that, the stage takes each ING from
  `q_sm`. If its node has reached `tree_len`, the ING is retired on `ret_*`.
  Otherwise it is sent to the node DRM. The next pool starts only after the
  whole current pool has retired, so all INGs of a pool begin on the root
  together and share its fetches.
* **DRMs** (`bh_drm`): the first fetches the cell at `ING.node`. The second
  fetches the position of body `ING.index`. Each keeps up to 8 requests in
  flight and carries the ING alongside as a tag.
* **Queues** (`bh_fifo`): the three queues that can hold a large part of the
  pool are `POOL_SIZE` deep. A pool never has more INGs than that, so no
  queue in the loop can fill up and block it.
* **Scheduling** (`bh_sched`): only the management and compute stages are
  time-multiplexed. The DRMs, the sorter and the queues run every cycle. The
  scheduler keeps the running stage until it cannot progress. It then
  switches to the stage whose input queue (`q_sm` or `q_dc`) holds more. A
  switch costs 1 + `SWITCH_CYCLES` (2) idle cycles.

### Memory ports

Each PE has two identical request/response ports (`node_*`, `body_*`):

* `req_valid`/`req_ready`/`req_addr` form a standard handshake. The address
  is a word index into the tree array or the body array.
* `rsp_valid`/`rsp_data` return the words in request order, any number of
  cycles later. A response cannot be refused. The DRM reserves room for every
  request it issues.

In a complete system these ports would go through a per-PE cache to a shared
last-level cache and then to DRAM. None of those are part of this RTL.

## The array (`bh_fifer_top`)

`NUM_PE` = 4 PEs. In the cycle after `start` (with `num_bodies`, `tree_len`
and `pool_size`), PE *p* is given bodies `[N·p/4, N·(p+1)/4)`, and the PEs
start one cycle later. They share nothing inside this RTL. Each brings out
its two memory ports, its result stream (`ret_valid`/`ret_ing`/`ret_ready`,
one final ING per body) and its event pulses (`evt`, type `pe_evt_t`).
`done` is high when every PE has finished.

## Parameters

| parameter       | default | where                 | meaning                                   |
|-----------------|---------|-----------------------|-------------------------------------------|
| `NUM_PE`        | 4       | top                   | processing elements                       |
| `POOL_SIZE`     | 256     | top, PE, manage       | maximum pool; depth of the pool queues    |
| `SORT_ENTRIES`  | 16      | top, PE, sorter       | sorter capacity                           |
| `DRM_MAX_OUT`   | 8       | top, PE, DRM          | fetches in flight per DRM                 |
| `SWITCH_CYCLES` | 2       | top, PE, scheduler    | idle cycles after a stage switch          |
| `THETA2`        | 0.25    | PE, compute           | opening angle squared (Q16.16)            |
| `SOFT2`         | 1/256   | PE, compute           | softening length squared (Q16.16)         |
| `LINK_DEPTH`    | 4       | PE                    | queue between the two DRMs                |

At the defaults, one PE holds about 207 kbit of queue storage and the array
about 829 kbit. Almost all of it is in the three pool queues.

## Where this departs from the original design

* **Number format.** The original works in 32-bit floating point. Here every
  value is Q16.16 fixed point, and the force uses an integer square root and
  a 128-bit division. Coordinates must stay within ±32768 units. Precision is
  about 2⁻¹⁶ per force term.
* **Compute stage as fixed logic.** The original maps the compute kernel onto
  the PE's mesh of switches and ALUs, switched by stored configurations. That
  fabric is not built. The kernel is a dedicated pipeline, and
  "configuration" here only decides which stage may run.
* **Two DRMs.** The kernel needs both the tree cell and the body's position.
  The second fetch is a second DRM.
* **Choices of this design:** the opening test, θ, the softening, the stage
  switch cost, DRM depth, queue depths, pool-by-pool refill, the memory
  handshake and the even split of bodies over PEs.
* **Not built:** the per-PE and shared caches, the external memory, the
  inter-PE links (unused when both stages run on one PE) and the general
  switch/ALU fabric.

## Verification

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`.

| testbench            | what it shows                                                          |
|----------------------|------------------------------------------------------------------------|
| `tb_bh_fifo`         | random traffic against a reference queue, push+pop on a full queue      |
| `tb_bh_drm`          | in-order tags and data with memory latency and stalls; 1 word/cycle     |
| `tb_bh_compute`      | next node and gradient against double precision; latency of 2 cycles    |
| `tb_bh_sorter`       | smallest-first order, stable ties, release rule, both release causes, 1/cycle |
| `tb_bh_manage`       | pool creation and limits, forward/retire decisions, every body once     |
| `tb_bh_sched`        | cycle-exact against a reference of the greedy rule                      |
| `tb_bh_pe`           | 150 bodies, 5 pools, all gradients correct, every mechanism seen        |
| `tb_bh_fifer_top`    | default sizes: 1024 bodies (pool 256), then 2100 bodies (pool 64)        |
| `tb_bh_pool_sweep`   | one PE, 1500 bodies, pool sizes 8 to 256, cycles per pool size          |
| `tb_bh_array_large`  | four PEs, 8192 bodies, the largest scene simulated                      |

The PE and array benches generate their scenes themselves, with `bh_tb_pkg`:

* Bodies are drawn from a Plummer sphere of scale radius 4, truncated at 30
  units, with total mass 16.
* Bodies are sorted along a Morton curve, and the slim octree is built
  without recursion.
* Each retired ING is compared with a reference walk. The reference makes
  the same opening decision in exact integer arithmetic and computes the
  force in double precision. The tolerance is 3·2⁻¹⁶ per force term plus
  10⁻⁴ of the summed force magnitudes.

The memory is `tb/bh_mem_model.sv`. It has a fixed latency and refuses a
random share of requests.

Each bench also counts how often each mechanism happened and fails if one
never did. The mechanisms are: stage switches, pool starts, retirements,
leaf/skip/descend steps, both sorter release causes and memory stalls.

Run a testbench with Verilator 5, for example the full array:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/bh_pkg.sv rtl/bh_fifo.sv rtl/bh_drm.sv rtl/bh_sorter.sv rtl/bh_compute.sv \
  rtl/bh_manage.sv rtl/bh_sched.sv rtl/bh_pe.sv rtl/bh_fifer_top.sv \
  tb/bh_tb_pkg.sv tb/bh_mem_model.sv tb/tb_bh_fifer_top.sv --top-module tb_bh_fifer_top
./obj_dir/Vtb_bh_fifer_top
```

A unit bench needs only `bh_pkg.sv`, the block, the blocks below it and its
own file.

Cycle counts measured at the default sizes:

* Four PEs, memory latencies of 6 and 9 cycles:
  * 1024 bodies take 269k cycles.
  * 2100 bodies with a pool of 64 take 823k cycles.
  * 8192 bodies take 4.51M cycles.
* One PE, 1500 bodies, memory latency 20 cycles:

  | pool size | 8     | 16    | 32    | 64    | 128   | 256   |
  |-----------|-------|-------|-------|-------|-------|-------|
  | cycles    | 6.91M | 4.97M | 2.91M | 2.43M | 2.36M | 2.33M |

  Small pools lose time to stage switches and to a loop that is not kept
  full. The memory model has no cache, so the penalty of very large pools
  (cache thrashing) cannot appear here.

The evaluation scenes of the original work are not simulated here: 262,144
bodies on four PEs, and 100,000 bodies on one PE. The design can hold them:
indices are 32 bits, and the tree and bodies live in external memory. Pools
larger than 256 need `POOL_SIZE` raised.
