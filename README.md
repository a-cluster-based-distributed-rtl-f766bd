# Cluster-based distributed memory CGRA

A coarse-grained reconfigurable array (CGRA) usually has one global memory.
Only a few boundary tiles can reach it, or every access has to go through an
arbiter shared by a whole row or column. Inner tiles then spend mesh links
and time relaying data. This design gives each small group of tiles its own
memory instead. The 6x6 array is cut into clusters of four tiles (2x2). Each
cluster has a local memory unit with one bank per tile, so all four tiles can
load or store in the same cycle without touching the mesh.

A variable that tiles in several clusters need is replicated in those
clusters' memory units. A small central coherence controller keeps the
copies equal. When a tile stores to a replicated variable, the controller
invalidates the other copies one cycle later and overwrites them with the
new value the cycle after that.

The RTL follows the architecture published as *A Cluster-Based Distributed
Memory Architecture for CGRAs*. That publication gives the organisation: the
6x6 mesh, clusters of four, one bank per tile, 16 KB per memory unit, the
tile's component list and the controller's two-cycle invalidate/synchronise
pipeline. Much of the detail is this implementation's own: data width,
instruction set, configuration format, arbitration, the stall protocol and
all host interfaces. The section *What is taken from the architecture and
what is chosen here* lists the two apart.

## Array organisation

```
 cluster 0        cluster 1        cluster 2
+--------+       +--------+       +--------+
| T  T   |       | T  T   |       | T  T   |      T = tile, mesh links between
|  Mem0  |       |  Mem1  |       |  Mem2  |          all neighbouring tiles
| T  T   |       | T  T   |       | T  T   |
+--------+       +--------+       +--------+
   ... clusters 3..5, 6..8 ...
 Mem0..Mem8 <--> coherence controller (notifications in, invalidate/sync out)
```

- **Tiles.** There are `ROWS x COLS` tiles (6x6). Tile `(r, c)` has index
  `r*COLS + c`. Each tile sends one 32-bit word per cycle to each of its N, E,
  S and W neighbours. Links at the array edge read zero.
- **Clusters.** Clusters are `CL_R x CL_C` rectangles (2x2). Tile `(r, c)`
  belongs to cluster `(r/CL_R)*(COLS/CL_C) + c/CL_C`. It uses port
  `(r mod CL_R)*CL_C + c mod CL_C` of that cluster's memory unit.
- **Other cluster sizes.** The evaluated sizes 1, 2 and 6 are reached with
  `CL_R x CL_C` = 1x1, 1x2 and 2x3. The number of banks follows the cluster
  size.
- **Stall.** All tiles run in lockstep. If any memory request in the array is
  refused in a cycle, the global `stall` goes high. Every tile then repeats
  its current configuration word, and nothing in any tile changes.

## The tile

Each tile holds:

- a control memory of 16 configuration words;
- one function unit;
- eight 32-bit registers;
- a 6x12 crossbar;
- four bypass buffers, one per outgoing direction.

While `run` is high, a context counter steps through words `0 .. ii-1` and
wraps. `ii` is the initiation interval of the modulo-scheduled loop.

Configuration word (`cgra_pkg::cfg_word_t`, 76 bits, most significant field
first):

| field   | bits | meaning |
|---------|------|---------|
| `op`    | 5    | operation (`fu_op_e`) |
| `src_a` | 3    | register that supplies operand A |
| `src_b` | 3    | register that supplies operand B |
| `b_imm` | 1    | operand B is the sign-extended immediate instead |
| `imm`   | 16   | immediate; also the address offset of loads and stores |
| `route` | 12 x 4 | for each crossbar output: enable bit and 3-bit input select |

Crossbar inputs and outputs:

- **Inputs 0..5:** N, E, S, W link, the registered function-unit result
  (`fu_q`) and the load data.
- **Outputs 0..3:** load the N/E/S/W bypass buffers. These registers are the
  tile's outgoing links.
- **Outputs 4..11:** load registers r0..r7.
- **Disabled output:** its target keeps its value. A value can therefore
  wait in a bypass buffer, or pass through a tile in one cycle per hop,
  without using the function unit.

Operations:

- `add`, `sub`, `mul`, `and`, `or`, `xor`, `shl`, `lshr`, `ashr`;
- `icmp` `eq`, `ne`, `slt`, `ult`, `sle`, `ule`, which return 1 or 0;
- `mov`, which passes operand A;
- `load`, from address `A + imm`;
- `store` of B, to address `A + imm`.

Timing:

- Every register in a tile (`fu_q`, r0..r7, the bypass buffers) is written at
  the end of an executed cycle.
- A result computed in cycle t can be routed in cycle t+1 and used as an
  operand in cycle t+2.
- A load executed in cycle t delivers its data on crossbar input 5 in the
  next executed cycle. Load data that arrives while the array is stalled is
  held in the tile, so it is still there when the tile resumes.

## The memory unit and the stall protocol

This is the part that needs the most care.

**Banks.** Each memory unit (`memory_unit`) has `NP` = cluster-size banks.
Word address `a` (12 bits for 16 KB of 32-bit words) lives in bank `a mod NP`
at row `a / NP`. Consecutive words are therefore in different banks. Each
bank is a single-port RAM with a one-cycle read (`memory_bank`).

**Who gets a bank.** In a cycle, each bank goes to at most one agent, in this
order of priority:

1. the synchronisation write from the coherence controller;
2. the host port;
3. the tile ports, chosen by a round-robin `bank_arbiter`.

**Extra arbiter rules.** The arbiter also enforces two rules:

- Only one store to a replicated variable is granted per cycle. Its
  notification must also fit in the notification queue.
- A load of the word that the controller is invalidating in this cluster in
  that cycle is refused. It is granted after the synchronisation write, so
  it reads the new value.

**Served-once rule.** `tile_ready[p]` is high when port `p` either has no
request, is granted, or was already served earlier in the current stall. The
top ORs `req & ~ready` over every port of every cluster to form `stall`.
While `stall` is high, the memory unit marks ports it serves and does not
serve them again. Each request is performed exactly once, however long the
array waits for the others.

**Returning load data.** Load data appears on `tile_rdata[p]` the cycle after
the access. It stays there until the port's next access.

**Cost of a conflict.** A four-way conflict on one bank costs three stall
cycles. Accesses to four different banks cost none. The end-to-end test
checks both cases.

## Coherence

Two parts keep replicated variables consistent: the coherence module inside
each memory unit, and the central coherence controller.

**Where copies live.** All copies of a replicated variable use the same word
addresses in every cluster that holds one.

**Variable table.** The host describes each variable once through the
`var_*` port of the top: entry index, base word address, size in words, and
a mask of the clusters that hold a copy.

- **Controller.** It keeps the whole entry in its global state table, plus a
  MESI-like state per cluster.
- **Coherence modules.** Each cluster's module only records whether that
  cluster holds one of several copies.

**Coherence module.** It checks every tile address against its table. A
performed store that hits a replicated range is queued, as (address, data),
in a 4-entry FIFO. The head of the FIFO is offered to the controller as a
write notification. While the FIFO is full, further replicated stores are
refused, which stalls the array.

**Controller pipeline.** The controller accepts one notification per cycle,
choosing round robin among the clusters. Each notification then goes through
two fixed stages:

```
cycle t     notification of cluster w accepted (notif_ready[w])
cycle t+1   stage 1: find the variable; state[w] <- M, other holders <- I;
            inv_valid[k] = 1 for every other holder k, inv_addr = address
cycle t+2   stage 2: sync_valid[k] = 1 for the same clusters,
            sync_addr/sync_data = address and new value (written into their banks);
            at the end of the cycle all holders <- S
```

**Special cases.**

- A variable with one holder starts, and after a write stays, exclusive or
  modified. No traffic is sent.
- A notification that matches no variable is dropped.
- Notifications from different clusters in the same cycle are serialised,
  one per cycle, so a burst of N takes N+2 cycles.

**What the hardware does not guarantee.** Ordering between the writer's
store and a remote read of the same word is left to the compiler's schedule,
as in the original architecture. The hardware only holds a remote load
during the invalidation cycle of that exact word.

## Programming and running

1. Hold `rst_n` low, then release it. This clears all registers, control
   memories and tables. The data memories are not cleared.
2. Write the configuration words of each tile through `cfg_we`, `cfg_tile`,
   `cfg_addr` and `cfg_data`.
3. Write the variable table through `var_*`. Entries with size 0 are unused.
4. Preload data through `host_*` with `run` low. `host_cluster` selects the
   memory unit. Replicas are loaded separately into each holder. Host reads
   return `host_rdata` one cycle later.
5. Set `ii` and raise `run`. Lowering `run` stops the array and resets the
   context counters to 0. Registers keep their values.
6. `dbg_idx` and `dbg_state` show the per-cluster state of one table entry.

## Parameters (`cgra_top`)

| parameter   | default | meaning |
|-------------|---------|---------|
| `ROWS`, `COLS` | 6, 6 | array size (published prototype) |
| `CL_R`, `CL_C` | 2, 2 | cluster shape; cluster size = banks per memory unit = `CL_R*CL_C` |
| `MEM_BYTES` | 16384 | bytes per memory unit (published configuration); the word count must be a power of two |
| `CM_DEPTH`  | 16 | configuration words per tile, i.e. largest `ii` (own choice) |
| `NVAR`      | 16 | variable-table entries (own choice) |

The data width (32), address width of a tile request (16), immediate width
(16) and register count are in `cgra_pkg`.

## Files

| file | contents |
|------|----------|
| `rtl/cgra_pkg.sv` | shared types: operations, configuration word, memory request, coherence states |
| `rtl/cgra_top.sv` | the array, clusters, global stall and controller |
| `rtl/cgra_tile.sv` | tile; uses `control_memory`, `function_unit`, `crossbar` |
| `rtl/memory_unit.sv` | cluster memory; uses `memory_bank`, `bank_arbiter`, `coherence_module` |
| `rtl/coherence_controller.sv` | global state table and the two-stage pipeline |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_gemm.sv`, `tb/tb_reduce_sum.sv`, `tb/tb_cgra_cluster_sizes.sv` | kernel and configuration tests on the whole array |

## Simulation

Each testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. Each also has a watchdog that counts a failure if it runs too
long. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/cgra_pkg.sv tb/tb_cgra_top.sv -o sim
obj_dir/sim
```

Verilator finds the other modules by name in `rtl/` and `tb/`. Only the
package has to be listed, and it must come first. To run another testbench,
replace `tb_cgra_top` with its name.

| testbench | what it checks |
|-----------|----------------|
| `tb_function_unit` | Every operation on corner and random operands, against its own model. |
| `tb_crossbar` | Random selects, including out-of-range ones. |
| `tb_control_memory` | Wrap at `ii` for several intervals, hold under stall, restart. |
| `tb_cgra_tile` | Random programs, random neighbour inputs and random stalls. A cycle-level reference model is compared on every link and on the memory request every cycle. |
| `tb_memory_bank` | Random traffic against a reference array. |
| `tb_bank_arbiter` | No double grants; busy banks skipped; work conserving; no starvation; four banks in parallel. |
| `tb_coherence_module` | Range lookup; notification order through the FIFO; full flag. |
| `tb_memory_unit` | Host access; parallel access without stall; a four-way conflict takes exactly three stall cycles; random batches; notifications; a load held during invalidation returns the synchronised value. |
| `tb_coherence_controller` | Initial states; invalidate exactly one cycle and synchronise exactly two cycles after acceptance; M/I then S; single holder; miss; three simultaneous writers served one per cycle. |
| `tb_cgra_top` | The full default configuration (see below). |
| `tb_gemm`, `tb_reduce_sum` | Benchmark kernels on the default array (see *Benchmark kernels*). |
| `tb_cgra_cluster_sizes` | The same kind of kernel on three 6x6 arrays built with cluster sizes 1, 2 and 6 (1x1, 1x2, 2x3; the 2x3 case uses six banks with a non-power-of-two interleave). Checks results, a replicated variable and the number of synchronisations. Helper: `tb/cluster_size_run.sv`. |

`tb_cgra_top` runs the full default configuration: 6x6 tiles, 2x2 clusters,
16 KB units, nothing overridden. All 36 tiles run a six-context loop for 100
iterations. Each iteration loads a word, multiplies it by 3, sends the
product east over the mesh, stores it locally and stores the product
received from the west neighbour. The four tiles of cluster 0 are given
addresses in one bank, so they stall the array every iteration. Two output
arrays are replicated over three clusters each and written in the same
cycles.

The test reads back every result and every replica and compares them with
values computed in the testbench. It requires that each of these happened:
stalls, fully parallel cluster accesses, mesh transfers, notifications,
simultaneous notifications, invalidations and synchronisations. It also
requires the run to take exactly `N*II` cycles plus the stall cycles. It
finishes in well under a minute.

## Benchmark kernels

Two kernels from the published benchmark suite are mapped by hand onto the
default array. Both run in simulation and are checked word for word.

**`tb_gemm`: gemm, C = A x B with 42x42 matrices of words.**

- **Size.** Three 42x42 word matrices are 21168 bytes, the benchmark's size.
- **Data.** A and B are read-only and replicated in every memory unit. No
  coherence traffic results, because nothing writes them.
- **Work split.** Each tile computes one column of C.
- **The loop.** It is one 14-context loop with no host help between rows.
  There are no branches:
  - `keep = (bptr < 1722)` is 1 except at the last `k` of a row;
  - the accumulator is multiplied by `keep`;
  - the B pointer steps by `+42 - 1764*(1 - keep)`;
  - the C pointer advances by `1 - keep`.

  The full context schedule is in the testbench header.
- **Passes.** Pass 1 covers columns 0..35. Pass 2 covers columns 36..41.
- **Stalls.** The four tiles of a cluster read the same A word in the same
  cycle, so the array stalls at least three cycles per iteration. A pass
  takes 31752 cycles: 1764 x 14 plus 7056 stall cycles.

**`tb_reduce_sum`: reduce-sum over 1008 words (4 KB).**

1. Every tile sums its local slice.
2. All 36 tiles store their partial sums, in the same executed cycle, into
   one 36-word variable replicated in all nine clusters. This gives 36
   notifications, which the controller serialises.
3. After the synchronisation traffic has drained, every cluster holds every
   partial sum. One tile then adds them from its own local copy.

The test checks every copy, the total, the three stall cycles of phase 2 and
the exact cycle count of phase 1.

## What is taken from the architecture and what is chosen here

From the published architecture:

- the 6x6 mesh of tiles;
- clusters of four tiles sharing one memory unit;
- as many banks per memory unit as tiles per cluster;
- 16 KB per memory unit;
- a memory unit made of data memory, arbiter and coherence module;
- a tile made of function unit, control memory, 6x12 crossbar, eight
  registers and four bypass buffers;
- a central controller with a global table of modified/exclusive/shared/
  invalid states, which on a write notification invalidates the other
  copies in its first cycle and synchronises them with the new value in its
  second.

Chosen here, because the architecture leaves them open:

- 32-bit data;
- the operation set. LLVM-IR-like integer operations, without division,
  floating point or `select`;
- the configuration word and a control-memory depth of 16;
- which crossbar input and output connects to what. Bypass buffers are
  registers, and each hop takes one cycle;
- word interleaving across banks;
- round-robin arbitration, and the priority of synchronisation writes;
- the global stall with its served-once rule. The original relies on
  compiler-scheduled, conflict-free accesses; the stall keeps the hardware
  correct when a schedule does conflict;
- same-address replication and the per-cluster range table;
- the notification FIFO (depth 4) and one notification per cycle, round
  robin;
- the return to shared after synchronisation;
- zero at the array edges;
- the host, configuration and debug ports.

Not modelled:

- the SRAM macros of a physical implementation, which are plain arrays here;
- timing closure and area. The published prototype reached 800 MHz in 22 nm.

## Capacity against the published benchmark suite

The published evaluation uses ten kernels: gemm, 2mm, trVecAccum, gemver,
reduce-sum, fft, viterbi, floyd, levmarq and gcn. For each it gives the
number of operation nodes, variables and bytes.

| resource | default | largest need (kernel) |
|----------|---------|------------------------|
| total memory, 9 units x 16 KB | 147456 B | 55720 B (gcn) |
| variables per kernel | 16 table entries | 11 (gcn) |
| operation nodes | 576 slots (36 tiles x 16 contexts) | 168 (gemver), so II >= 5 |

gcn does not fit in one unit, so its data must be spread over at least four
clusters. Whether a given mapping's routing and per-cluster share fit is up
to the compiler, which is not part of this RTL.

The published evaluation also has a configuration in which the nine units share 64 KB
in total. That configuration cannot hold gcn. `MEM_BYTES` must give a
power-of-two word count, so the nearest setting is 8 KB per unit.
