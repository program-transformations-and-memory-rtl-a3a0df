# Double-buffered vector-sum accelerator for DDR memory

An accelerator that computes `c[i] = a[i] + b[i]` over vectors held in
external DDR SDRAM, built so that the DDR port stays busy with long bursts
instead of row changes.

## The problem it solves

A DDR SDRAM gives one word per cycle only while successive accesses hit the
same open row. The obvious loop, which reads `a[i]`, reads `b[i]` and writes
`c[i]` for every `i`, jumps between three arrays, so almost every access pays
a precharge and an activate. This design restructures the loop the way a
source-to-source compiler would before high-level synthesis:

* **Tiling.** The vectors are cut into tiles of `BLOCK` elements (8192 by
  default). A whole tile of `a` is read as one burst, then a whole tile of
  `b`, then computed on chip, then `c` is written back as one burst.
* **Process decomposition.** The work is split into five concurrent
  processes: `Load0`, `Load1`, `Compute`, `Store0`, `Store1`.
* **Double buffering.** There are two sets of on-chip buffers
  (`a_tmp`, `b_tmp`, `c_tmp`). Even tiles use set 0, odd tiles set 1. While
  `Compute` works on one set, the DDR port fills or drains the other.
* **Size-1 FIFO synchronisation.** The processes share no state. They only
  pass tokens through one-entry FIFOs.

With the default sizes, the design moves 3n DDR words in about 1.01 x 3n
cycles. Row changes happen only at burst boundaries.

## How a run proceeds: the DDR ring and its rounds

This is the least obvious part of the design.

**Burst order.** A token circulates on a ring
`Load0 -> Load1 -> Store0 -> Store1 -> Load0`. Only the process holding the
token may start a DDR burst. This fixes the global order of bursts, so no two
streams ever interleave on the DDR pins. An assertion in the top checks that
at most one process requests the port in any cycle.

**Stores lag one round.** The stores run one round behind the loads. In round
`r`, the DDR sees:

1. Load0: `a`, then `b`, of tile `2r`;
2. Load1: `a`, then `b`, of tile `2r+1`;
3. Store0: `c` of tile `2r-2`;
4. Store1: `c` of tile `2r-1`.

This is a coarse-grain software pipeline. Computation of tiles `2r` and
`2r+1` overlaps the stores of the previous pair and the loads of the next.

**Rounds without a tile.** Every DDR process runs `ceil(NT/2)+1` rounds,
where `NT = n/BLOCK`. A round whose tile does not exist only passes the token
on. This covers round 0 of the stores, the last round of the loads, and
Load1/Store1 when `NT` is odd.

Example with 5 tiles (`-` = token passed without a burst):

| round | Load0 | Load1 | Store0 | Store1 |
|-------|-------|-------|--------|--------|
| 0     | t0    | t1    | -      | -      |
| 1     | t2    | t3    | t0     | t1     |
| 2     | t4    | -     | t2     | t3     |
| 3     | -     | -     | t4     | -      |

**When the token moves.** A load passes the ring token as soon as its last
read *request* is accepted, not when the data arrive. The next burst
therefore starts while read data are still in flight, and the port sees
requests back to back. A store passes the token with its last accepted
write.

### Tokens

| FIFO (depth 1)        | from -> to          | preloaded | meaning                        |
|-----------------------|---------------------|-----------|--------------------------------|
| ring                  | ST1->LD0, LD0->LD1, LD1->ST0, ST0->ST1 | ST1->LD0 only | your turn on DDR |
| loaded[k]             | Load k -> Compute   | no        | a/b tile of set k is in        |
| computed[k]           | Compute -> Store k  | no        | c tile of set k is ready       |
| abfree[k]             | Compute -> Load k   | yes       | a/b buffers of set k reusable  |
| cfree[k]              | Store k -> Compute  | yes       | c buffer of set k reusable     |

The `abfree` and `cfree` tokens carry the anti-dependences: a buffer is not
overwritten before its previous contents have been consumed. Each complete
run leaves every FIFO as it was at reset, so runs can follow one another
without a reset. The FIFOs are also cleared at each start.

## Blocks

| file | role |
|------|------|
| `rtl/vsum_pkg.sv` | word and address types, DDR request/response structs, kernel enum |
| `rtl/vsum_accel.sv` | top: control, token FIFOs, six tile buffers, arbiter, the five processes |
| `rtl/load_proc.sv` | Load0/Load1 (`BUF_ID` 0/1): ring, a/b-free wait, a burst, b burst, tile-loaded |
| `rtl/compute_proc.sv` | Compute: tiles in order, one element per cycle, alternating sets |
| `rtl/store_proc.sv` | Store0/Store1: one round behind, c burst with two-entry read-ahead |
| `rtl/ddr_arbiter.sv` | shares the single DDR master port between the four DDR processes |
| `rtl/sync_fifo.sv` | synchronisation FIFO, depth 1 by default, optional preloaded tokens |
| `rtl/local_buffer.sv` | simple dual-port RAM with a one-cycle read |
| `tb/ddr_model.sv` | behavioural DDR SDRAM and controller (testbench only) |

**Arbiter.** The arbiter uses round robin with an *arbitration share*. A
master that has been granted keeps the port for up to `ARB_SHARE` accesses
while it keeps requesting. Read data return in order. An ID FIFO of
`MAX_OUT` entries records which master issued each outstanding read. When
the FIFO is full, further reads wait. With the ring, only one master
requests at a time in normal operation, so the arbiter mostly acts as a
multiplexer. The share only matters if the port is shared more freely.

## Interface and timing

Control:

* Drive `a_base`, `b_base` and `c_base` (22-bit *word* addresses) and `n`.
  `n` must be a multiple of `BLOCK`.
* Pulse `start` while `busy` is low. The inputs are sampled in that cycle.
* `done` pulses once, when the last `c` word has been accepted by DDR.
* `n = 0` completes at once.

DDR master port:

* It is a pipelined word master: `ddr_address`, `ddr_read`, `ddr_write` and
  `ddr_writedata` out; `ddr_waitrequest`, `ddr_readdata` and
  `ddr_readdatavalid` in.
* A request is taken in a cycle where `ddr_waitrequest` is low. The master
  holds a request until it is taken.
* Read data return in request order, at any latency.
* Reads and writes are never issued in the same cycle.

Throughput and latency:

* Each DDR process issues one request per cycle.
* `Compute` produces one element per cycle. A tile takes `BLOCK + 2` cycles
  once its tokens are present.
* The tile buffers have a one-cycle synchronous read.

Reset is asynchronous and active low. It covers all control state, not the
buffer contents.

## Parameters (top)

| parameter | default | notes |
|-----------|---------|-------|
| `BLOCK` | 8192 | tile size in words; power of two not required |
| `KERNEL` | `KERNEL_VSUM` | `KERNEL_COPY` turns the design into a tiled DMA copy `c[i] = a[i]`, with no `b` buffers |
| `ARB_SHARE` | 8192 | accesses per grant |
| `MAX_OUT` | 16 | outstanding reads |

Word width is 32 bits (C `int`) and word addresses are 22 bits (16 MB of
DDR). Both are set in `vsum_pkg`.

On-chip memory:

* Vector sum: 6 x `BLOCK` x 32 bits, which is 1,572,864 bits at the default.
* Copy kernel: 4 x `BLOCK` x 32 bits.

## What follows the reference design and what is this design's own

**Taken from the reference design:**

* the split into two loads, one compute and two stores;
* tiles alternating between two buffer sets;
* size-1 FIFOs as the only synchronisation;
* the DDR burst order `Load0, Load1, Store0(previous), Store1(previous)`;
* separate bursts for `a` and `b`;
* the 8K tile and 32-bit elements;
* the arbitration-share idea;
* pipelined DDR reads with an internal FIFO.

**Chosen here:**

* the port protocol and the start/done control;
* preloaded "free" tokens;
* rounds without a tile;
* passing the ring token at the last read request;
* the arbiter's round-robin order, share and read window;
* the store read-ahead queue;
* the one-cycle RAM read;
* requiring `n` to be a whole number of tiles.

**Points where the reference is ambiguous.** Its schedule text (load of set
0 at 4t, load of set 1 at 4t+2, stores at 4t+5 and 4t+7) and its pipeline
diagram do not give the same DDR order. This design follows the diagram's
ring. The text's rule that the previous store of a set finishes before the
compute of that set starts is enforced by the `cfree` token.

**Not included:**

* the DDR device and controller, the host CPU and its cache, which are
  external parts;
* the matrix-multiply accelerator of the same family, whose tile geometry
  and schedule are not specified well enough to build;
* the non-tiled "direct" baseline, so the speed-up over it is not
  reproduced. The bus efficiency is checked instead.

## Verification

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

* `tb_vsum_accel` runs two small instances end to end against the DDR
  model:
  * instance A is the vector sum with `BLOCK` 32, share 20, 4 outstanding
    reads and read latency 6;
  * instance B is the copy kernel with 20 % random DDR stalls.

  It runs 0, 1, 2, 5 and 8 tiles. It checks every result word, that inputs
  and guard words are untouched, and that the DDR burst sequence matches the
  round table above. For instance A it also bounds the cycle count. It
  counts row changes, stalls, compute/DDR overlap, token waits, empty
  rounds, share expiry, the outstanding-read limit and store-queue
  back-pressure. A mechanism that never happens is a failure.
* `tb_vsum_full` runs the default configuration on 40,960 elements (5
  tiles). This takes 124,360 cycles for 122,880 DDR words, and the
  simulation runs in seconds.
* `tb_vsum_blocks` runs thirteen vector-sum instances with `BLOCK` = 2,
  4, ..., 8192, plus the copy kernel at 1K and 8K tiles, on 32,768 elements
  each. Results:

  | BLOCK | 2 | 8 | 32 | 64 | 256 | 1024 | 8192 |
  |-------|---|---|----|----|-----|------|------|
  | cycles/element | 9.74 | 4.68 | 3.41 | 3.20 | 3.06 | 3.04 | 3.04 |

  Small tiles pay a fixed cost per tile: token handshakes, row changes and
  read latency. From about 1K words that cost is negligible, and the design
  runs at the 3 words/element the DDR port must carry. The copy kernel runs
  at 2.03 (1K) and 2.02 (8K) cycles/element against a floor of 2.
* The unit testbenches are `tb_sync_fifo`, `tb_local_buffer`,
  `tb_ddr_arbiter`, `tb_load_proc`, `tb_compute_proc` and `tb_store_proc`.

The DDR model is nominal:

* one open row per bank, 4 banks, 1 KB rows;
* a 3-cycle stall to change rows and a 4-cycle read latency;
* one word per cycle on row hits.

It is not a timing-accurate DDR-400 model.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert --timescale 1ns/1ps \
  -Irtl -Itb -y rtl -y tb +libext+.sv rtl/vsum_pkg.sv \
  tb/tb_vsum_accel.sv --top-module tb_vsum_accel -o sim
./obj_dir/sim
```

Replace `tb_vsum_accel` with any other testbench name. Testbenches draw
their data from `$urandom` or, in `tb_vsum_blocks`, from a fixed hash of the
index, and preload the DDR model through hierarchical references
(`ddr.mem[...]`). Add `--trace` and a `$dumpfile` call to look at waveforms.
