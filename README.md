# Blocked double-precision SpMxV engine

This is an FPGA datapath that computes `y = A x` in IEEE double precision for a
large sparse matrix `A` stored in external DRAM. The core idea is to avoid
random accesses to `x` altogether. The matrix is cut into 128 x 128 blocks.
Only the blocks that are dense enough to be worth it are sent to the hardware
(the rest is left to a host). For each such block, the matching 128-element
slice of `x` is streamed into a small on-chip cache, and the matrix entries of
the block are streamed past it. Each entry carries its row and column inside
the block in 7 bits each, so the cache is addressed directly by the entry and
the accumulator is addressed directly by the entry's row.

Several processing elements (PEs, five by default) share the work of one
block. Each PE has its own matrix stream, so the five DRAM channels that feed
matrix data work in parallel, while one vector stream is broadcast to all PEs.
Every PE accumulates its own partial sums for the current 128-row band of the
matrix (a *rowstrip*). When a rowstrip ends, the PEs output their partial sums
in lock-step and a tree of adders folds them into the final 128 values of `y`.
Rowstrips that contain no dense block come out as zeros, so `y` leaves the
engine complete and in order.

Arithmetic is fully pipelined: each PE can take one matrix entry per clock,
i.e. two floating-point operations per clock. The price is a long feedback
loop through the floating-point adder. That loop shapes the whole design and
is explained in detail below.

## Data layout

### Blocks and rowstrips

```
            column blocks  cb = 0 1 2 3 ...
rowstrip rs = 0           [D . . D ...]      D = dense block, sent to the engine
rowstrip rs = 1           [. . . . ...]      . = not sent
rowstrip rs = 2           [. D D . ...]
```

Blocks are sent in row-major order: all dense blocks of rowstrip 0 from left to
right, then those of rowstrip 1, and so on. A rowstrip with no dense block is
simply absent from the stream. The engine learns the total length of `y` from
the input `n_rowstrips` (in units of 128 rows) and inserts zero blocks for every
absent rowstrip, before, between and after the ones it sees.

### Matrix entry (96 bits, `mat_entry_t` in `spmv_pkg`)

| bits  | field      | meaning |
|-------|------------|---------|
| 63:0  | `value`    | matrix element, IEEE-754 double |
| 70:64 | `col`      | column inside the block (selects the `x` element) |
| 71    | `vbuf`     | which half of the vector cache holds this block's `x` |
| 78:72 | `row`      | row inside the block (selects the partial sum) |
| 79    | `pbuf`     | which half of the partial-sum storage this rowstrip uses |
| 80    | `eom`      | last entry for this PE (end of matrix) |
| 81    | `is_null`  | padding entry, travels through the pipeline but adds nothing |
| 95:82 | `rowstrip` | rowstrip index (14 bits, so up to 16384 x 128 = 2 M rows) |

The top takes 128-bit words per PE (as delivered by a pair of 64-bit DRAM
words) and uses bits 95:0. The `vbuf` and `pbuf` bits toggle at every new
column block and every new rowstrip, respectively. They are produced by the
off-line preprocessing; the hardware follows them rather than counting blocks.

### Vector and result streams

A vector block is 128 doubles sent as 32 beats of 4 (`xin[0..3]`, element
`4*beat + w` in lane `w`), with `xeod` on the last beat. The result leaves
as 32 rows of 4 doubles per rowstrip on `yout`, with `ylast` on the last row
of each rowstrip and `done` after the last rowstrip.

## Inside a processing element (`spmv_pe`)

```
 matrix entry ─┬─> vector_cache read (2) ─> fp64_mul (15) ─> isolation_queue ─┐
               │        ^ x blocks (ping-pong)                                │
               │                                                             v
               │     psum_storage read (3+1) ─> fp64_add (12) ─> psum_storage write
               │        ^                                         │
               │        └──────────── 16-cycle accumulate loop ───┘
               └─> tags (row, pbuf, rowstrip, eom, null) ride along both pipelines
```

### Upper pipeline: entries to products

An entry is accepted when its vector half is loaded, the FP units are out of
their start-up period, and there is guaranteed room for its product in the
isolation queue. Its column addresses the vector cache (2 cycles); the value
and the selected `x` enter the 15-stage multiplier. The entry's tag (row,
buffer bits, rowstrip, eom and null flags) travels in a delay line alongside.
Products land in the isolation queue.

### The isolation queue and the credit rule

The queue decouples the two pipelines: the upper one may run while the lower
one pauses (during a rowstrip change) and vice versa. The upper pipeline cannot
be stopped once an entry is in the multiplier, so admission is by credit: an
entry is admitted only if the queued products plus the products still in
flight, minus the one popping this cycle, stay below the queue depth. The
depth is 18 (15 multiplier + 2 cache read + 1), which is exactly enough for
the upper pipeline to stream at one entry per clock without a bubble.

### Lower pipeline: products into partial sums

When the queue pops, the product's row reads the current partial sum from the
partial-sum storage (registered memory read plus a 2-stage word multiplexer,
3 cycles, plus the pop cycle). The adder (12 stages) adds the product, and the
sum is written back to the same row. A null entry is popped like any other but
writes nothing.

### The read-after-write rule (the hardest part)

Read, add and write-back of one row take 16 cycles. If a second product for
the same row is popped less than 16 pops after the first, it reads the old sum
and the first contribution is lost. The hardware does **not** detect or stall
for this. Instead the matrix stream of every PE must be ordered so that two
entries of the same row (within the same rowstrip) are at least 16 entries
apart, counting null entries. The preprocessing interleaves rows to achieve
this and pads with null entries where it cannot (e.g. a block row with many
more entries than the rest). This is cheaper than a stall or a forwarding
network in the adder loop and keeps the adder busy on every clock.

Because the queue may hold products back while the lower pipeline is paused,
the spacing is counted in pops, not in clock cycles; pauses never bring two
entries closer. An assertion in `spmv_pe` (`a_no_raw_hazard`) checks the rule
in simulation and fires on a badly scheduled stream.

The testbench package `spmv_tb_pkg` contains a greedy scheduler that builds
such streams (pick the row that was used longest ago, otherwise insert a null)
and is a working reference for the preprocessing.

### Start-up

The floating-point units are held off for 33 cycles after reset
(`INIT_COUNT`); during this time the partial-sum storage is cleared. This
mirrors the power-up period of the vendor FP cores the design was meant for.

## Ping-pong buffers

### Vector cache (`vector_cache`)

Two halves of 128 doubles, stored as 64 rows x 4 doubles (32 rows per half).
While one half is read by the entries of the current block, the next block's
vector is written into the other. A half is released when the entry at the
head of the stream names the other half in its `vbuf` bit and the other half
is full: this means every entry of the old block has already read it. The
vector port's `xdata_ack` is high whenever a half is free. The cache stops the
matrix stream (`astop`) when an entry wants a half that is not loaded yet.

### Partial-sum storage (`psum_storage`) and the rowstrip controller (`psum_ctrl_fsm`)

Two halves of 128 partial sums, each 32 rows x 4 doubles in a simple
dual-port memory. The lower pipeline accumulates into the half named by the
entry's `pbuf` bit. When a product of a new rowstrip reaches the head of the
queue, the controller knows the old rowstrip is complete. It:

1. waits 16 cycles for the last sums of the old rowstrip to be written back
   (the adder loop drains);
2. raises `blk_rdy` and waits for `go` (all PEs ready, see below);
3. streams the old half out, 4 doubles per cycle for 32 cycles, clearing each
   row one cycle after it is read so the half is empty for its next use;
4. meanwhile the lower pipeline already accumulates the new rowstrip into the
   other half (the pop stalls only while the controller needs the memory
   ports, signalled as `clkout_busy`);
5. if the new rowstrip index is more than one above the old, emits the
   missing rowstrips as zero blocks; after the last entry (`eom`) it emits
   trailing zero blocks up to `n_rowstrips`.

Zero blocks also pass through `blk_rdy`/`go`, so all PEs stay in lock-step.

## Combining the PEs (`spmv_top`, `reduction_tree`)

Each PE sees only its share of each block, so each produces a partial result
for every rowstrip. A PE that has no entry in some rowstrip still outputs a
(zero) block for it. The top ANDs the `blk_rdy` of all PEs into a common `go`,
so the five partial blocks leave on the same cycles. The reduction tree adds
them lane by lane in `ceil(log2 N_PE)` levels of pipelined adders (3 levels,
36 cycles for 5 PEs); an odd operand is carried to the next level through a
delay line of matching length. The vector stream is accepted only when every
PE has a free half, so all PEs see the same vector blocks.

Throughput: up to one entry per PE per clock. Zero-block and drain periods
cost a few dozen cycles per rowstrip change, and null padding costs one slot
each. With a schedule that balances the PEs well, 85-90 % of the peak is
reachable, which is what the end-to-end test measures (about 0.89 entries
per PE per clock).

## Floating-point units (`fp64_mul`, `fp64_add`)

Both are written from scratch: a combinational IEEE-754 double operation
(round to nearest even) followed by a shift register of `LAT` stages (15 for
the multiplier, 12 for the adder), with `operation_nd`/`rdy` valid signals.
Denormal inputs and results are flushed to zero. Infinity and NaN are handled.
For a real FPGA build, these can be replaced by vendor cores of the same
latencies; the latency, not the internal structure, is what the rest of the
design depends on. Synthesis will put the whole operation before the first
register, so retiming is needed to reach a high clock rate.

## The embedded single-PE peripheral (`spmv_periph`)

Beside the multiplier, and not connected to it, the top also holds a small
system-on-chip version: one PE packaged as a slave on a 32-bit processor bus.
A soft processor and a DMA engine (not included) move every vector block,
matrix entry and result block between DRAM and three 256-word memory spaces
of the peripheral. It was built to prove the PE in a real system, not for
speed: each 64-bit value crosses the bus as two words.

Each memory space has an interface machine on the PE side:

- `vec_if` sends the 256 words of a vector block as 32 beats of 4 doubles;
- `mat_if` assembles 96-bit entries from three consecutive words, 85 per fill,
  and stops after the entry flagged end-of-matrix;
- `psum_if` stores each 4-double result row as 8 words and only lets the PE
  start a block (`go`) while the memory is free.

Each also has an `xfer_sync_fsm` that talks to the software:

```
 idle --(memory needs a transfer)--> interrupting --(ack bit set)--> transferring
   ^                                                                   |
   +-------------(done bit set and ack bit clear: xfer_done)-----------+
```

The interrupt is level-sensitive and is masked as soon as software
acknowledges, because the DMA transfer takes far longer than the interrupt
handler. Software must clear *done* before setting *ack*, and clear *ack*
before setting *done*; otherwise a done bit from the previous transfer could
end the next one early. Bus map: space 0 registers (0 interrupt status,
1 software state with the ack/done pairs, start bit 8, PE reset bit 9,
rowstrip count in bits 30:16, 2 debug counters), space 1 vector, space 2
matrix, space 3 results. `tb_spmv_periph` plays processor and DMA and runs a
384 x 256 matrix through it.

## Where this RTL departs from the original design

- **Queue depth 18**, not 17. With 17, one entry per clock is not sustained
  once the queue has to absorb the read pipeline of the cache as well.
- **Null entries** are marked by an explicit `is_null` bit (bit 81) rather
  than by a special value, so a genuine zero matrix value remains an ordinary
  entry.
- **Partial-sum read path** is 3 register stages plus the pop cycle (4 in
  total), which with the 12-cycle adder gives the 16-entry spacing rule.
- **`n_rowstrips` input**: the engine needs to know the length of `y` to emit
  trailing zero blocks.
- **Drain wait** of 16 cycles before a partial-sum half is streamed out.
- **`go` handshake** between PEs and the all-PE `xdata_ack`; the original
  describes lock-step operation without fixing these signals.
- **Flush to zero** for denormals in the FP units.
- **Peripheral bus side**: the vendor bus wrapper is not included; its user
  side is a plain one-access-per-cycle port, and the register bit positions
  are this design's own.
- **DRAM controllers are not included.** Their streams (`adata`/`avalid`/
  `aack` per PE, `xin`/`xvalid`/`xdata_ack`) are the top-level ports; a
  controller or a DMA engine must deliver the matrix entries in the scheduled
  order.
- The alternative accumulator organisation that the multiplier was compared
  with ("design A") is not part of this RTL. The embedded peripheral below
  uses the two-pipeline PE instead, with its 96-bit entry format.

## Files

| file | content |
|------|---------|
| `rtl/spmv_pkg.sv` | constants, entry and tag types |
| `rtl/spmv_top.sv` | N_PE elements, go handshake, reduction tree |
| `rtl/spmv_pe.sv` | one processing element |
| `rtl/vector_cache.sv` | ping-pong vector cache |
| `rtl/isolation_queue.sv` | product/tag FIFO between the pipelines |
| `rtl/psum_storage.sv` | ping-pong partial-sum memories |
| `rtl/psum_ctrl_fsm.sv` | rowstrip change, stream-out, zero blocks |
| `rtl/reduction_tree.sv` | adder tree over the PE outputs |
| `rtl/fp64_mul.sv`, `rtl/fp64_add.sv` | pipelined double-precision units |
| `rtl/spmv_periph.sv` | single-PE bus peripheral |
| `rtl/vec_if.sv`, `rtl/mat_if.sv`, `rtl/psum_if.sv` | its memory-space interfaces |
| `rtl/xfer_sync_fsm.sv` | its interrupt/acknowledge/done handshake |
| `tb/spmv_tb_pkg.sv` | random blocked-matrix generator, scheduler, reference |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and finishes by
itself. With Verilator 5:

```sh
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
    -y rtl -y tb rtl/spmv_pkg.sv tb/tb_spmv_top.sv --top-module tb_spmv_top
./obj_dir/Vtb_spmv_top
```

Replace `tb_spmv_top` by any other testbench name (`tb_spmv_pe`,
`tb_vector_cache`, ...). `tb_spmv_top` runs the full design at its default
parameters (5 PEs, 128 x 128 blocks): a random 1024 x 1024 matrix of 8
rowstrips x 8 column blocks with 10 dense blocks, some rowstrips empty, a
row-heavy block that forces null padding, and a tiny block that forces a
fast rowstrip change. It compares `y` exactly (the generator uses small
integers so every sum is exact) and counts each mechanism: matrix stalls on
a missing vector half, stalls on partial-sum stream-out, credit stalls,
start-up, zero blocks, vector back-pressure and waits for `go`. It takes about
ten seconds.

`tb_spmv_periph` runs the embedded peripheral the way its software would:
interrupt, status read, acknowledge, word-by-word transfers, done, with the
result blocks compared against the reference. `tb_spmv_pe` does the same as
`tb_spmv_top` for one element with several column blocks per
rowstrip; the FP testbenches compare against the simulator's own `real`
arithmetic on random and special operands.

## Changing it

- `N_PE` on `spmv_top` sets the number of PEs; the tree depth follows.
- `MULT_LAT`, `ADD_LAT`, `VEC_RD_LAT`, `PSUM_RD_LAT` in `spmv_pkg` set the
  pipeline lengths. The RAW spacing a schedule must respect is
  `ADD_LAT + PSUM_RD_LAT + 1`; the queue depth follows automatically.
- `ROWSTRIP_WIDTH` sets the largest matrix (2^width rowstrips).
- The block size 128 is built into the 7-bit row/column fields and the
  32 x 4 memory shape.
