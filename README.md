# Sparse matrix–vector multiply coprocessor for the Convey HC-1

This is synthesizable SystemVerilog for a coprocessor that computes
`y = A·x`, where `A` is a sparse double-precision matrix in a row-compressed
layout and `x` and `y` are dense vectors. It targets the four user FPGAs
("application engines", AEs) of a Convey HC-1. Each AE holds eight
processing elements (PEs), so the whole design has 32.

Each PE streams its own range of matrix rows from coprocessor memory. It
multiplies every non-zero by the matching element of `x` and adds up each row
with **one** pipelined floating-point adder. At best a PE takes one non-zero
per cycle, which is two flops per cycle (300 MFLOP/s at 150 MHz).

The hard part is the accumulator. Rows have any length, and a row's partial
sums are still moving through the adder pipeline when the next row starts.
The reduction circuit below handles this without stalling and without one
adder per row.

## Structure

```
spmv_top                       4 engines side by side, no links between them
└─ spmv_ae          (x4)       one FPGA
   ├─ matrix_cache             64 KB, shared by the 8 PEs, one segment per PE
   ├─ global_mem_ctrl          16 memory ports, serves one miss at a time
   └─ spmv_pe       (x8)
      ├─ block_shifter         4096-bit register, one (val, col) pair per cycle
      ├─ vector_cache          4 lines x 2048 doubles, direct-mapped, 16 banks
      ├─ spmv_mac
      │  ├─ fp_mul             IEEE double multiplier, 10 stages
      │  ├─ sync_fifo          product FIFO
      │  └─ reduction_circuit
      │     ├─ fp_add          IEEE double adder, 14 stages
      │     └─ set_tracker     live-value count for each row
      └─ sync_fifo             result FIFO (row, sum)
```

`spmv_pkg` holds the shared constants and types. It also holds the
`dp_add` and `dp_mul` functions that define the floating-point arithmetic.

## The reduction circuit (`reduction_circuit`, `set_tracker`)

Values arrive one per cycle. Each carries a *set* ID, which is its row
number. Sets arrive one after another, and their lengths are not known in
advance. The circuit has:

- one adder with a latency of `ADD_LAT`;
- `NBUF` buffers, each holding a value and its set;
- a small controller.

Each cycle the controller looks at three things: the new input, the value
leaving the adder, and the buffers. It applies the first of these rules that
matches:

| rule | adder is fed with | where the rest goes |
|---|---|---|
| R1 | adder output + a buffered value of the same set | input takes that buffer |
| R2 | two buffered values of the same set | input and adder output take the two freed buffers |
| R3 | input + adder output (same set) | – |
| R4 | input + a buffered value of the same set | adder output takes that buffer |
| R5 | input + 0 | adder output goes to a free buffer |

A set is **finished** when two things hold:

- Exactly one value of the set is still live.
- The set's last element has been seen. Here this is the row terminator, flagged `in_last`.

A finished value leaving the adder goes to the output and is not buffered or
added again.

**Counting live values.** `set_tracker` keeps three small counter memories,
indexed by the set ID modulo `TRK_DEPTH`:

- The first counts values that enter.
- The second counts additions that merge two values into one.
- The third counts values that have left.

The number of live values in a set is the first count minus the other two.
Keeping three memories means each has a single write port, even when all
three events hit the same set in one cycle.

**Cases the rule table does not cover.** This design handles them as
follows:

- **No free buffer for R5.** The input is refused (`in_ready` falls) for that
  cycle, and the adder output is added to 0 again. The original scheme treats
  this case as an error.
- **Adder output with no input.** The output is buffered if another value of
  its set is live and a buffer is free, so the two can meet under R1 or R2.
  Otherwise it goes round the adder again with +0.
- **Lone buffered value.** A buffered value may be the only live value of a
  closed set. It is sent straight to the output in a cycle with no other
  result (the "drain").
- **Set ID reuse.** A new set waits until its tracker slot is empty. This way
  two sets that are `TRK_DEPTH` apart never share counters.
- **Output back-pressure.** While `out_ready` is low, the whole circuit,
  adder included, holds still.

With four buffers and a 14-stage adder, the testbenches measure over 95% of
one value per cycle on random rows of 1 to 40 elements.

## Data layout in memory

The matrix is stored row by row. A pair with `val = 0.0` and `col = 0` ends a
row, so empty rows take one pair. The pairs are packed into **blocks of 42**.
A block fills 64 words (4096 bits):

| words | contents |
|---|---|
| 0 – 41 | the 42 values, in order |
| 42 – 62 | the 42 column numbers as 32-bit halves, the lower half first |
| 63 | unused |

Each PE owns a contiguous run of blocks starting at its `mat_base`. Padding
pairs after its last row are ignored. The testbench package has
`pack_pairs()`, which builds this layout.

`x` is an array of doubles at `vec_base`. Each result `y[r]` is written to
`res_base + 8·r`. All addresses are byte addresses of 48 bits. `mat_base`
and `vec_base` must be 128-byte aligned.

## Caches and the memory controller

**Matrix cache.** 512 rows × 1024 bits (64 KB), cut into eight 64-row
segments, one per PE.

- A segment holds 16 blocks (672 pairs).
- A PE reads one block (four rows, one per cycle) into its shifter each time
  the shifter runs empty.
- When the PE has read all 16 blocks of its segment, it asks for the next
  segment.
- Block reads from the eight PEs are arbitrated by fixed priority: PE 0 wins.

**Vector cache.** Each PE has its own. It is direct-mapped with 4 lines of
2048 doubles:

- line = `col[12:11]`
- tag = `col[31:13]`

It is split into 16 banks by the low four bits of the word address, so a
memory response can be written into any bank in any cycle. On a miss the PE
stops until the whole 16 KB line has arrived.

**Global memory controller.** Each AE has one, with three kinds of work:

- **Result writes** have priority. Each takes one cycle.
- **Cache misses** are served one at a time. Results wait until the current
  miss is complete.
- **Choosing the next job.** Between several PEs, the lowest-numbered PE wins.
  Within one PE, a vector miss goes before a matrix refill.

A miss is read 16 words per cycle:

- Word `k` goes to port `k mod 16` with tag `k`.
- Responses may return in any order. Each one is written straight into the
  right cache bank.
- If any port raises `stall`, no port issues in that cycle.

**Memory port protocol (this design's).** One set of signals per port:

- Request: `valid`, `we`, `addr`, `wdata` and `tag`.
- Response: `valid`, `data` and `tag`.
- `stall` from memory.

A request is taken in any cycle where its `valid` is high and no port
stalls. Writes get no response.

## Starting a run

Drive `row_start`, `mat_base` and `num_rows` for every PE, plus `vec_base` and
`res_base`, then pulse `start`. `start` also clears the vector caches.
`done` rises when every row of every PE has been written. Outputs named `ev_*`
pulse once per event:

- rules R1–R5, accumulator stall and drain;
- vector miss, matrix refill and result FIFO full;
- memory stall and result write.

They are meant for performance counters and testbenches.

## Where this departs from the original design, or fills gaps

- **Adder and multiplier.** The latencies (14 and 10), the number of buffers
  (4), the tracker depth (32 sets) and the counter width (8 bits) are this
  design's choices. The original gives no numbers for them.
- **FIFO depths.** The product FIFO holds 32 entries and the result FIFO 16.
  Both are this design's choices.
- **Floating-point arithmetic.** Both units round to nearest even and flush
  subnormals to zero. Each computes its result in the first stage and then
  only delays it through the remaining stages. The timing matches a deep
  pipeline, but the logic depth does not, so a real FPGA build would need
  vendor cores or a staged datapath.
- **End of a row.** The row terminator goes through the multiplier as
  `0 × (+0.0)` with an end-of-row flag. That is how the accumulator learns a
  row is complete, and why an empty row still yields `y[r] = +0.0`.
- **Workload per PE.** Each PE is given a first row, a matrix address and a
  number of rows. A different description of the same interface used a count
  of non-zeros instead of rows.
- **Result base address.** Results go to `res_base + 8·row`. The original
  forms the address from the row number and a base held in every PE, but
  does not make clear whether that base is shared with `x`. Here it is a
  separate port.
- **Block format and port interleave.** The block layout above and the
  mapping from word to port are choices of this design. The real HC-1
  interleaves addresses over its memory controllers in its own way.
- **No double buffering.** The shifter asks for its next block only once it
  is empty, so each block costs a few idle cycles. The matrix segment is not
  prefetched.
- **No overlap of misses.** This is a property of the original design, kept
  here: misses never overlap, and results wait for the current miss.
- **Vendor hardware not included.** The host interface, the dispatch
  processor, the crossbar and the memory controllers are not part of the
  RTL. Their signals are the top's ports. `tb/hc1_mem_model.sv` is a
  behavioural stand-in for the memory: random latency, out-of-order
  responses and random stalls.

## Measured rate on the benchmark matrices

`tb_spmv_workloads` runs the 32-PE design on random matrices. Each has the
same number of rows and non-zeros as a well-known benchmark matrix. The
memory model answers after 10 to 60 cycles and stalls 1% of the time. The
rates below come from that model and assume a 150 MHz clock. The published
column is the figure reported for the original 32-PE hardware on the real
matrices.

| matrix | rows | non-zeros | simulated GFLOP/s | published GFLOP/s |
|---|---|---|---|---|
| dw8192 | 8192 | 41 746 | 0.92 | 1.65 |
| t2d_q9 | 9801 | 87 025 | 0.36 | 2.48 |
| epb1 | 14 734 | 95 053 | 0.36 | 2.56 |
| raefsky1 | 3242 | 294 276 | 3.01 | 3.85 |
| psmigr_2 | 3140 | 540 022 | 3.20 | 3.94 |
| torso2 | 115 967 | 1 033 473 | 0.22 | 1.17 |

**Long rows.** Matrices with long rows come within about 20% of the
published rate.

**Short rows.** Matrices with short rows fall well behind, for three reasons:

- Two of this design's simplifications cost the most there:
  - the shifter is not double-buffered;
  - a PE stops on every vector miss until the whole 2048-word line is in.
- The random column band of the test matrices touches more vector lines than
  the real matrices' structure does.
- Vector misses are served one at a time, as in the original design.

## Simulating

Every testbench checks itself and ends by printing
`TB_RESULT checks=N failures=M`. To build and run one, for example the
complete design at full size (4 AEs × 8 PEs, about 1900 rows and 15 000
non-zeros, 65 000 cycles):

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/spmv_pkg.sv tb/tb_spmv_pkg.sv tb/hc1_mem_model.sv rtl/*.sv \
    tb/tb_spmv_top.sv --top-module tb_spmv_top -Mdir obj_top -o sim
./obj_top/sim
```

Replace `tb_spmv_top` with any other `tb/tb_*.sv`. What the testbenches cover:

- **Floating-point units.** `tb_fp_add` and `tb_fp_mul` check random and
  special operands against the simulator's own `real` arithmetic, and they
  check the latency.
- **`tb_reduction_circuit`.** Random rows against a reference sum. It checks:
  - that every rule, the stall and the drain occur;
  - that the input rate reaches at least 95% of one value per cycle.
- **PE and engine.** `tb_spmv_pe`, `tb_spmv_ae` and `tb_spmv_top` compare
  every `y[r]` in the memory model bit for bit with a sum computed in the
  testbench. Matrix and vector hold small integers, so every sum is exact in
  any order of addition. These testbenches check that every mechanism
  occurred:
  - each rule, accumulator stall and drain;
  - vector miss, matrix refill and result FIFO full;
  - memory stall and result write.
- **`tb_spmv_workloads`** runs six random matrices on the full 32-PE
  design, with the row counts and non-zero counts of six published benchmark
  matrices (8192 to 115 967 rows, up to about a million non-zeros). It checks
  every result and prints the cycle count and rate of each. This takes about
  1.5 minutes.

## Limits

- Row and column numbers are 32 bits; addresses are 48 bits.
- The accumulator adds a row's values in whatever order the pipeline brings
  them together, so with general data the result can differ from a
  left-to-right sum in the last bits. The order is deterministic for a given
  input stream and memory timing.
- Throughput drops sharply when the columns of `x` jump between lines. Each
  miss fetches 2048 doubles, and misses are served one at a time.
