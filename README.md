# Programmable-logic engine for task-parallel multifrontal LU factorization

The multifrontal method factors a large sparse matrix by walking an
elimination tree bottom-up. Each tree node becomes a small dense *frontal
matrix*, assembled from a piece of the original matrix plus the
*contribution matrices* of the node's children (the *extend-add*). The
frontal matrix is then factored in three steps:

| step  | operation                          | runs on                        |
|-------|------------------------------------|--------------------------------|
| PANEL | `F11 = L11 U11`, `F21 = F21 U11^-1` | CPU (irregular control flow)   |
| TRSM  | `F12 = L11^-1 F12`                  | systolic array                 |
| GEMM  | `U = F22 - F21 F12` (the contribution passed to the parent) | systolic array |

This RTL is the programmable-logic (PL) half of a tightly coupled CPU-FPGA
system for this workload. The processor side (ARM cores) builds the task graph
at run time, runs PANEL and submits the other tasks. This block does the rest:

* several **execution units**, each built around an 8x8 systolic array that
  can do both GEMM and TRSM;
* several **Extend Add units** that assemble frontal matrices, 16 additions
  per cycle;
* an **on-chip buffer** that keeps every frontal, original and contribution
  matrix, so computational tasks never touch DRAM. Only the DRAM-read and
  DRAM-write tasks, done by DMA, move data off chip;
* a **page-table buffer manager** that stores each matrix as a linked list
  of pages. A hardware encoder hands out idle pages in a single cycle;
* a **ready-task FIFO** with an **Immediate Successor** bypass. A task whose
  only predecessor has just finished is sent straight into that unit's local
  task buffer, and it runs next while its input is still hot.

The default parameters give the main configuration: 8 systolic-array units,
7 Extend Add units and one buffer manager (`mf_pl_top`).

## The TRSM/GEMM systolic array

`systolic_array` is an N x N grid (N = 8) of `sa_pe`. It is output-stationary:
PE(i,j) holds `acc[i][j]`. Each cycle it does `acc -= west * north`, passes
`west` to the east and sends one value south. The feeder skews the inputs.
Element k of row i enters at pass cycle i+k, and element k of column j
enters at cycle k+j. So `A[i][k]` and `B[k][j]` meet in PE(i,j) at cycle
i+j+k, and a pass is complete after 3N-2 cycles.

**GEMM.** The accumulators start as C. A enters from the west and B from the
north. After one pass, `acc = C - A*B`. More passes keep subtracting, so K can
be any multiple of N.

**TRSM.** The accumulators start as B. From the west comes the *strictly lower*
part of a unit-lower-triangular L; nothing comes from the north. Row i's
result `X[i][:]` is final once the rows above it have passed down their
results. Each PE has a MUX in front of its south register:

* normally it forwards the value from the north, which is the classical
  pattern;
* at step i, PE(i,j) sends its **own accumulator** instead.

Row i thus passes its finished result to the rows below, and they subtract
`L[r][i] * X[i][j]`. This is forward substitution running through the same
array. A control bit steers the MUX and runs down each column beside the
data. It is delayed **two** registers per PE, while data is delayed one. A
single token that enters the top of column j at pass cycle j therefore
reaches row i at cycle 2i+j, which is exactly step i of that row.
GEMM sends no token, so the mode switch is just whether tokens are sent.

L is unit lower triangular (the L of an LU factorization without a stored
diagonal), so TRSM needs no division.

## Execution units and tasks

A task is an `mf_pkg::task_t`. Pages are named by their page-table entry.

| op        | fields used                                       | effect |
|-----------|---------------------------------------------------|--------|
| `OP_GEMM` | `c_head`, `a_head`, `b_head`, `k_tiles`           | `C -= sum_k A_k B_k`, where A_k and B_k are the k-th pages of the lists starting at `a_head` and `b_head` |
| `OP_TRSM` | as GEMM, plus `l_page`                            | `C = L^-1 (C - sum_k A_k B_k)`: one block row of a blocked TRSM (`k_tiles = 0` for the first block row) |
| `OP_EA`   | `c_head` (frontal tile), `a_head` (contribution tile), `row_map`, `col_map` | `F[row_map[r]][col_map[c]] += Ctb[r][c]` for every valid map entry |

`sa_engine` reads C and then, for each of the `k_tiles` pairs, reads an A page
and a B page. While reading, it follows each page's Next Entry, which the
buffer returns with the data. It runs one pass per pair, plus a triangular
pass for TRSM, and then writes C back. Without buffer contention, a task
takes `1 + 2 + k_tiles*(4 + 3N-2) + [TRSM: 2 + 3N-2] + 1` cycles before
`done_valid` rises.

`extend_add` reads the frontal tile and the contribution tile. It adds 16
elements per beat (two contribution rows), 4 beats per tile, and writes the
frontal tile back. Its row and column maps must be one-to-one, and an
assertion checks this. A contribution matrix that spans several frontal
tiles is split into several tasks by the controller.

Every unit finishes with a completion message (`done_valid/done_ready/done_tag`).
The top grants these messages one per cycle, round-robin, on
`done_valid/done_unit/done_tag`. The controller takes them in one at a time.

## Buffer, pages and the page table

`pl_buffer` is a single-port memory that is one page wide. One page holds
one 8x8 tile, row-major, so a unit moves a whole tile per access. Reads
return one cycle after the grant.

`buffer_manager` holds one page-table entry per page:
`{status, page_addr, next}`. A list ends at an entry that points to itself.

* **alloc** (`alloc_valid/alloc_ready`): `idle_page_encoder` picks the
  lowest-numbered idle page in the same cycle. With `alloc_link` set, the
  new page is appended after `alloc_prev`. `alloc_ready` is low when every
  page is in use.
* **free** (`free_valid/free_ready`): given the head of a list, the manager
  walks the list and clears one Status bit per cycle.
* **lookup**: `buffer_arbiter` translates the granted entry to its Page
  Address before it accesses the buffer.

`buffer_arbiter` shares the one buffer port round-robin among the host/DMA
port (requester 0), the systolic-array units and the Extend Add units. A
unit holds `br_req` until `br_gnt`.

Because pages are linked lists, a matrix never needs contiguous space, and
freeing cannot fragment the buffer. The layout the units rely on is one list
per block row for A operands and one list per block column for B operands.
The controller chooses this when it allocates.

## Task dispatch and Immediate Successor

`task_dispatcher` contains a `ready_task_fifo`, and each unit gets a two-slot
task buffer:

* a normal task leaves the FIFO for the lowest-numbered unit that is idle
  and has an empty buffer. One task moves per cycle, in FIFO order;
* an **Immediate Successor** is submitted with `sub_imm = 1` and
  `sub_unit = U`. It bypasses the FIFO and lands in U's priority slot. U
  always takes its priority slot first, so the bypassed task runs ahead of
  any normal task already waiting there.

The top uses two dispatchers: one for TRSM & GEMM over the systolic units
(units `0..NUM_SA-1`) and one for extend-add over the Extend Add units
(units `NUM_SA..NUM_SA+NUM_EA-1`). `sub_task.op` selects which one gets a task.

## Top-level ports (`mf_pl_top`)

| group | signals | use |
|-------|---------|-----|
| pages | `alloc_*`, `free_*`, `free_count` | page allocation and freeing, done by the processor-side controller |
| host buffer port | `hb_*` | DMA DRAM-read/DRAM-write and PANEL data; whole-tile access by entry |
| tasks | `sub_valid/ready`, `sub_task`, `sub_imm`, `sub_unit` | task submission |
| completion | `done_valid/ready`, `done_unit`, `done_tag` | completion messages to the controller |

The processor, its caches, the memory controller, the DMA engine, the AXI
interconnect and DRAM are outside this RTL. Their side of the design becomes
these plain ports. The controller's scheduling policy is also outside the
RTL: it generates the task graph, releases dependencies, and applies the
*Throttle* window, which limits how many dependencies are released at a time.

## Parameters

| parameter | default | where | meaning |
|-----------|---------|-------|---------|
| `SA_N` | 8 | `mf_pkg` | systolic array edge and page tile edge |
| `EA_LANES` | 16 | `mf_pkg` | Extend Add additions per cycle |
| `DATA_W` | 32 | `mf_pkg` | element width |
| `NUM_PAGES` | 256 | `mf_pkg` | buffer pages (64 KiB of elements) |
| `NUM_SA` | 8 | `mf_pl_top` | systolic-array execution units |
| `NUM_EA` | 7 | `mf_pl_top` | Extend Add units (0 = extend-add on the processor) |
| `FIFO_DEPTH` | 16 | `mf_pl_top` | depth of each ready-task FIFO |

The published design has 8x8 arrays, 16 additions per cycle, and 8 arrays
plus 7 Extend Add units in its main configuration. An alternative puts 9
arrays and no Extend Add units in the fabric, with the extend-add done on
the CPU. `NUM_SA = 9, NUM_EA = 0` builds that variant. Without Extend Add
units, the top refuses extend-add tasks (`sub_ready` stays low for them).

## Where this RTL departs from the published design

* **Arithmetic.** Elements are 32-bit two's-complement integers that wrap on
  overflow. The published accelerator uses floating point. Integers keep the
  unit-lower-triangular solves exact and the tests bit-exact. Changing to a
  floating-point type means replacing the multiply and subtract in `sa_pe`
  and the adders in `extend_add`.
* **Sizes that are not published**, chosen here: the page size (one 8x8
  tile), the buffer size (256 pages), the FIFO depth (16), the two-slot task
  buffer and every handshake.
* **Task form.** Extend-add works on one contribution tile into one frontal
  tile. TRSM is one block row of a blocked solve. Splitting frontal matrices
  into such tasks is left to the controller.
* **Page table storage.** The page table is a register array next to the
  buffer rather than stored in it. Entry i starts mapped to page i. A
  256-entry table costs about 5.9 K flip-flops. The published buffer manager
  is much smaller (under 500 flip-flops), which suggests that its table
  lives in the buffer memory and that only the encoder and control logic are
  in fabric.

## Simulation

Each block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/mf_pkg.sv tb/tb_mf_pl_top.sv \
          --top-module tb_mf_pl_top -Mdir obj_top && obj_top/Vtb_mf_pl_top
```

`tb_mf_pl_top` runs the top at its default configuration. The testbench plays
the processor, and the run takes one frontal matrix of 4x4 tiles, with a
2-tile pivot block, through these steps:

1. page allocation;
2. DMA-style writes of the original matrix and of two children's
   contributions;
3. eight extend-add tasks;
4. PANEL results written by the host;
5. a blocked TRSM, whose second block row goes in as an Immediate Successor
   on the first row's unit;
6. GEMM updates of the contribution block, with K = 2 tiles;
7. read-back and freeing.

A stress phase then submits 40 GEMM tasks to overflow the FIFO, and a final
phase exhausts the page table. Every result is compared with a software
model. The test also counts each mechanism and fails if any never occurs:
linked allocation, freeing, exhaustion, extend-add, TRSM, GEMM, a unit
switching between TRSM and GEMM, the bypass, FIFO backpressure, buffer
contention and simultaneous completions. It takes well under a minute to
build and a fraction of a second to run.

`tb_task_graph` runs a whole elimination tree of six supernodes: leaves 1-3
under node 5, and leaf 4 and node 5 under the root 6. It follows the
data-centric task graph, node by node:

* DRAM read of the original matrix;
* extend-add of each child's contribution;
* PANEL;
* TRSM;
* GEMM, sent as an Immediate Successor on the TRSM's unit;
* DRAM write.

Contributions flow from children to parents through the buffer, and each
child's pages are freed once its parent has consumed them.

`tb_mf_pl_top_cpu_ea` runs the second configuration (9 systolic units and
no Extend Add units). It runs 30 GEMM tasks spread over all nine units and a
blocked TRSM with an Immediate Successor, and it checks that an extend-add
task is refused.

`tb_page_mem` is a testbench-only model of a unit's buffer port, with random
grant delays. The unit-level tests use it.
