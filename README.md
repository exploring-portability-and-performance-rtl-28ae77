# Needleman-Wunsch wavefront accelerator

This is a SystemVerilog implementation of the "version 5" architecture of a
Needleman-Wunsch sequence-alignment kernel for an FPGA that shares system
memory with a CPU. It is the single-work-item, diagonal-wavefront design of
the Rodinia benchmark port. Published results rank it the fastest kernel on a
Xeon + Arria 10 package. The accelerator reads a score matrix from shared
memory and fills in the substitution matrix. It computes `PAR` matrix elements
per clock. Its only on-chip storage is a few shift registers. Every access to
memory is one contiguous line.

The defaults are the best configuration reported for that platform:
`PAR = 32` columns per chunk and `BSIZE = 2048` rows per block.

## What is computed

For two sequences of length `n`, the substitution matrix `subst` is
`(n+1) x (n+1)` 32-bit signed integers. The host initialises its first row and
its first column (normally `-i*gap`). The score matrix `score` has the same
shape and holds the similarity of each residue pair. Each interior element is

```
subst[i][j] = max(subst[i-1][j]   - gap,
                  subst[i][j-1]   - gap,
                  subst[i-1][j-1] + score[i][j])
```

`nw_cell` is exactly this expression. Arithmetic wraps like a C `int`.

## How the matrix is swept

The dependency runs left to right and top to bottom. Only elements on the same
anti-diagonal are independent. The design traverses the matrix as follows:

* **1D blocks.** The rows are cut into blocks of `BSIZE` rows. Blocks are
  processed one after another.
* **Chunks.** Each block is cut into chunks of `PAR` columns. A chunk is
  `BSIZE` rows by `PAR` columns.
* **Diagonal sweep.** There are `PAR` processing elements (PEs), one per
  column of the chunk. In step `T`, PE `k` computes row `T-k` of its column.
  The PEs therefore stand on an anti-diagonal of the chunk. Each step advances
  every PE by one row.
* **Wrap-around.** PE 0 leaves a chunk after `BSIZE` steps. It then starts on
  the next chunk at once, while PEs 1..PAR-1 are still finishing the old one.
  Apart from block boundaries the pipeline never drains.

So one input "packet" enters per step. Packet `T = c*BSIZE + r` is row `r` of
chunk `c`. A block of `C = ceil(n/PAR)` chunks takes `C*BSIZE` steps, plus
`PAR` bubble steps at the end to empty the pipeline.

### Where each neighbour comes from

This is the core of the design (`nw_compute`, `nw_pe`).

| neighbour of PE k, row i | k > 0 | k = 0, chunk > 0 | k = 0, chunk 0 |
|---|---|---|---|
| left `subst[i][j-1]` | `out_q` of PE k-1 | column hand-over line | packet (`subst[i][0]` from memory) |
| top-left `subst[i-1][j-1]` | `up_q` of PE k-1 | column hand-over line | previous packet's left value, or the corner value on the block's first row |
| top `subst[i-1][j]` | own `out_q` | own `out_q` | own `out_q` |
| top on the block's first row | row above the block, read from memory | same | same |

Each PE keeps two registers: `out_q`, its last result, and `up_q`, the top
value it used for that result. PE k-1 is one row ahead of PE k. Its `out_q` is
therefore PE k's left neighbour, and its `up_q` is PE k's top-left neighbour.
No copy of the previous row is needed.

**Column hand-over (`column_sr`).** PE `PAR-1` computes row `r` of chunk `c`.
PE 0 needs that value for row `r` of chunk `c+1`, exactly `BSIZE-PAR` steps
later. A delay line of that depth carries the pair (`out_q`, `up_q`) between
them. Its size depends on `BSIZE` and `PAR`. At the defaults it holds
2016 x 64 bits. It is built as a circular buffer in one RAM, not as a chain of
registers. The RAM is read synchronously, one step ahead, from the entry that
the next step overwrites. It therefore maps onto a simple dual-port block RAM.

### Staircases

Memory is read and written a whole row of a chunk at a time, `PAR` consecutive
words. The PEs, however, work on `PAR` different rows at once. Two staircase
shift-register arrays (`staircase_sr`) convert between the two orders:

* **Read staircase.** Lane `k` is delayed `k` steps. The score (and top-row)
  values of one row enter together. Value `k` reaches PE `k` exactly when the
  wavefront gets there.
* **Write staircase.** Lane `k` is delayed `PAR-1-k` steps. The results of one
  row leave PE `k` at different steps, and the staircase lines them up into one
  aligned row.

A row leaves the datapath exactly `PAR` steps after its packet entered. A
`PAR`-deep delay line carries the row's write address and mask alongside.

Only the triangle of registers that is actually used is built,
`PAR*(PAR-1)/2` per staircase. The original OpenCL kernel declared a full
`PAR x PAR` array and left half of it unused.

## Memory traffic

`nw_load_unit` turns each packet into one to four line reads of `PAR` words,
always issued in this order:

| read | address | when |
|---|---|---|
| corner | `subst[R0-1][0]` | first row of chunk 0 of a block |
| top row | `subst[R0-1][c0 .. c0+PAR-1]` | first row of every chunk |
| left column | `subst[i][0]` (word 0 used) | every row of chunk 0 |
| score row | `score[i][c0 .. c0+PAR-1]` | every row, always last |

Here `R0 = 1 + b*BSIZE` is the block's first row, `i = R0 + r` and
`c0 = 1 + c*PAR`.

* The read kind travels as a 2-bit tag. Responses must return in request order
  and are always accepted.
* A descriptor FIFO holds the flags, write address and mask of each packet.
  The score response completes the packet.
* A credit counter allows at most `RD_DEPTH` packets between the score read
  and consumption by the datapath. Every response therefore has room, and the
  response channel needs no backpressure.

`nw_store_unit` buffers aligned rows and writes each one as a masked line.

The matrix size does not have to divide evenly:

* Columns past `n` in the last chunk are masked off.
* Rows past `n` in the last block are read at row `n` and marked not live.
  They are computed but never written.
* A line can run up to `PAR-1` words past the last column. Both buffers must
  therefore be readable that far past their end.

### Between blocks

The first row of block `b+1` reads the last row of block `b` from memory.
`nw_controller` therefore runs each block in four phases:

1. start the reads;
2. wait until `C*BSIZE` packets have been consumed;
3. issue `PAR` bubble steps;
4. wait until the store buffer is empty.

Only then does the next block start. A write counts as complete when the
memory accepts it. The memory must order later reads after it.

## Interface (`nw_v5_kernel`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `start` | in | 1 | pulse: latch `cfg_*` and run |
| `cfg_n` | in | 32 | sequence length `n` |
| `cfg_gap` | in | 32 | gap penalty |
| `cfg_subst_base`, `cfg_score_base` | in | 32 | word address of element [0][0]; row pitch is `n+1` words |
| `busy`, `done` | out | 1 | running; one-cycle pulse when the matrix is complete |
| `rd_req_valid/ready/addr/tag` | out/in | 1/1/32/2 | line read request |
| `rd_rsp_valid/data/tag` | in | 1/32*PAR/2 | in-order read response |
| `wr_valid/ready/addr/data/mask` | out/in | 1/1/32/32*PAR/PAR | masked line write |
| `ev_step`, `ev_stall`, `ev_bubble`, `ev_credit_wait` | out | 1 | per-cycle activity flags for performance counters |

Throughput is one step (`PAR` elements) per clock once the packet queue is
full. Rows of chunk 0 cost two reads each, and the first row of every chunk
costs one extra read. With a port that accepts one read per clock, a block
therefore takes about `C*BSIZE + BSIZE + C + PAR` cycles plus the memory
latency. Write backpressure appears as `ev_stall`.

The chunk-0 term is large when a block has only a few chunks. With
`PAR = 64`, `BSIZE = 8192` and `n = 300` (5 chunks), the extra left-column
reads add about 20% to the run time. With many chunks per block the term
vanishes. A memory port that returns two lines per cycle would remove it.

## Parameters and sizes

| parameter | default | range |
|---|---|---|
| `PAR` | 32 | the evaluated values were 8, 16, 32 and 64 |
| `BSIZE` | 2048 | 256 to 8192 were evaluated; must be `>= PAR` |
| `RD_DEPTH` | 8 | packets in flight; must cover the read latency for full rate |
| `WR_DEPTH` | 4 | rows buffered before the write port |

At the defaults, the on-chip state is:

* read staircase: 496 x 65 bits;
* write staircase: 496 x 32 bits;
* column line: 2016 x 64 bits of RAM;
* PEs: 32 x 64 bits;
* packet and descriptor FIFOs: 8 entries each.

Shared memory holds `2*(n+1)^2` words plus padding. With 32-bit word
addresses this limits `n` to about 46,000. Every parameter pair of the
published design-space sweep (`PAR` 8-64 x `BSIZE` 256-8192) is a legal
setting.

## Departures from the reference kernel

The published kernel is OpenCL compiled by a vendor tool. Its generated
hardware is not public, so the following are choices made for this RTL:

* **Memory port.** The line read port with tag and in-order responses, the
  masked write port and all valid/ready handshakes are this design's own.
* **Exit condition.** The loop bounds (chunks per block, number of blocks) are
  derived from `n` in hardware. The reference computes its exit condition on
  the host.
* **Block sequencing.** The pipeline drains between blocks. This keeps the
  read of a block's last row safe from the writes still in flight. How the
  original overlaps blocks is not known.
* **Staircases.** Only the exact triangle of staircase registers is built; the
  original used a half-empty square array.
* **Column hand-over.** This delay line is a RAM circular buffer.
* **Partial chunks and blocks.** Ragged last chunks and blocks are handled by
  masking.
* **Activity outputs.** The `ev_*` outputs are an addition.
* **Address arithmetic.** Read addresses are computed with combinational
  32-bit multipliers (`row * (n+1)`). This is simple and correct, but a design
  aiming at the reported clock rates would derive the addresses incrementally
  or pipeline them.
* **Host side.** Explicit copies versus shared virtual memory differ only on
  the host. The kernel always works on shared memory.

Not included:

* the CPU;
* the vendor interface logic between the CPU/memory and the kernel (a QPI
  link and two PCIe links);
* the memory itself;
* the NDRange baselines (kernel versions 0 to 3), which are only points of
  comparison.

## Files

* `rtl/nw_pkg.sv`: types, defaults, read-kind enum
* `rtl/nw_cell.sv`: the recurrence
* `rtl/nw_pe.sv`: one processing element
* `rtl/staircase_sr.sv`: triangular shift-register array
* `rtl/column_sr.sv`: chunk-to-chunk hand-over line
* `rtl/nw_compute.sv`: wavefront datapath
* `rtl/nw_load_unit.sv`, `rtl/nw_store_unit.sv`: memory side
* `rtl/sync_fifo.sv`: FIFO used by the load and store units
* `rtl/nw_controller.sv`: block sequencing
* `rtl/nw_v5_kernel.sv`: top level
* `tb/nw_sweep_point.sv`: one design-space point for the sweep test
* `tb/shared_mem_model.sv`: behavioural shared memory with random stalls and
  latency, used by the system tests

## Verification

Every module has a self-checking testbench `tb/tb_<module>.sv` that prints
`TB_RESULT checks=N failures=M`.

* `tb_nw_v5_kernel` runs the full system at `PAR=4, BSIZE=8` on six matrix
  sizes (1 to 40), with and without memory stalls. It checks:
  * every matrix element against a software model;
  * that no word outside the matrix is written;
  * the cycle count with an ideal memory;
  * that each mechanism occurs at least once: stall, read backpressure, full
    read queue, flush bubble, column hand-over, left/top/corner reads, masked
    write and padding row.
* `tb_nw_v5_full` runs the default configuration (`PAR=32, BSIZE=2048`) on
  `n = 2100`: two blocks of 66 chunks, about 300k cycles. It checks all
  4.4 million elements and the cycle bounds.

* `tb_nw_v5_sweep` runs seven points of the published design space in
  parallel with `n = 300`: `PAR` 8, 16, 32 and 64 with `BSIZE` 256, 2048
  and 8192. Each point checks its whole matrix, its step count
  (`blocks * (chunks*BSIZE + PAR)`) and its cycle count. The helper
  `tb/nw_sweep_point.sv` holds one point.

To run a test with plain Verilator:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/nw_pkg.sv tb/tb_nw_v5_kernel.sv --top-module tb_nw_v5_kernel
./obj_dir/Vtb_nw_v5_kernel
```

Other parameters are set with `-G` or by editing the testbench's localparams.
The memory model's `stall_pct` and `max_lat` control how hostile the memory
is.

### What the tests do not cover

* Timing closure and resource use on a real FPGA.
* Out-of-order memory responses, which the load unit does not support.
* Overflow of the 32-bit scores.
