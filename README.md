# GF(127) row-echelon accelerator with pivot reuse

LESS is a post-quantum signature scheme built on linear codes over GF(127). Most of
its signing time goes into one kernel: reducing a K x N generator matrix to reduced
row echelon form (RREF). The kernel is special in one way. The matrix it receives
has often just been produced by applying a monomial map (a column permutation
plus per-column scaling) to a matrix that was already in systematic form. So
many of its pivot columns are known in advance. A `was_pivot` bit vector marks
them. For those columns the reduction can skip scaling and elimination, up to a
configurable budget, `pvt_reuse_limit`.

This RTL implements that kernel as a bus peripheral. A host CPU writes the pivot
hints and the limit into registers. A DMA engine streams the matrix in, one 32-bit
word (four field elements) at a time. The core then reduces the matrix in place in
its own byte-wide memory. When it is done it raises an interrupt, and the DMA
streams the result back out. The result has to be bit-identical to the software
routine `generator_RREF_pivot_reuse` of the LESS reference code, including:
- the row order,
- the updated `was_pivot` vector,
- the output `is_pivot` vector,
- the error behaviour.

The default build is for the security-level-1 matrix (K = 126, N = 252).

## The algorithm the control unit executes

With `G` the K x N matrix, `was` the pivot hints and `limit` the reuse budget:

1. **Preprocessing** runs only when `limit != 0`. For each column `c` from K-1 down
   to 0 that has `was[c]` set, it finds the *last* row holding a non-zero in column
   `c` and swaps that row into row `c`. If the column is all zero, nothing happens.
2. **Pivot discovery**, for each pivot step `p = 0 .. K-1`. The search starts on the
   diagonal at `(p, p)`. It walks down the rows of the current column, then moves
   to the next column, again starting from row `p`. If it runs past column N-1
   without finding a non-zero, the run ends with the `error` flag set.
3. **Handle pivot**. The core sets `is_pivot[col]`. If the pivot row `r` differs
   from `p`, it clears `was[r]` and swaps rows `r` and `p`.
   - Note that `was[r]` is indexed by the *row* number. This matches the reference
     code exactly, even though `was` is a column vector.
   - If `was[col]` is set, fewer than `limit` pivots have been reused, and
     `col < K`, the pivot is **reused**: the core goes straight to the next step.
4. **Scaling**. The pivot row is multiplied by the inverse of the pivot, from the
   pivot column to the end of the row.
5. **Elimination**. Every other row `i` gets `row_i -= G[i][col] * row_p` over all
   N columns. Rows whose multiplier is 0 are processed too.

The testbenches carry an independent software model of these five steps. It is
written with plain `%` arithmetic, and every test compares the hardware against it.

## Hardware structure

```
            reg port (CPU)                  OBI slave port (DMA)
                 |                                   |
        rref_accel_reg_top                    periph_to_reg ---- rvalid flop
   WAS_PIVOT IS_PIVOT CTRL STATUS LIMIT              |
                 |                         rref_accel_data_reg_top (G)
                 +---------------+-------------------+
                                 |
                          rref_accel_synth  (control unit FSM)
          +-----------+----------+--------------+---------------+
        g_mem     fq_arith_unit  rref_pivot_regs  rref_row_op_regs
   4 x g_mem_simple  4 GF(127) lanes   was/is vectors    word buffers,
   + rotation        + inverse ROM                       scale/multiplier
```

| Module | Role |
|---|---|
| `less_top` | Peripheral wrapper. Provides the register port, the OBI data port and four interrupt lines `{IS_OUT_DONE, WAS_OUT_DONE, G_OUT_DONE, COMPUTE_DONE}`. |
| `rref_accel_synth` | The core: the FSM, its counters and the datapath wiring. |
| `g_mem`, `g_mem_simple` | Matrix memory. Four byte-wide synchronous banks, read latency 1. Any byte address can be accessed as a 4-byte word. |
| `fq_arith_unit` | Four parallel lanes computing `s*y mod 127` and `x - s*y mod 127`, plus a 128-entry inverse table. |
| `rref_pivot_regs` | The N-bit `was_pivot` and `is_pivot` vectors. Supports word load/read and single-bit set/clear/read. |
| `rref_row_op_regs` | Holding registers for the row swap (A/B), the elimination operand, the scaling factor and the multiplier. |
| `rref_accel_reg_top`, `rref_accel_data_reg_top`, `periph_to_reg` | Register file, G data port and OBI bridge. |
| `rref_accel_synth_pkg`, `less_bus_pkg` | Field arithmetic, the state enum, bus structs and register offsets. |

### Unaligned word access into a byte matrix

The matrix is stored row-major, one element per byte, at byte address `r*N + c`.
Because N is not a multiple of four in general, a row starts at an arbitrary byte
offset. So does the pivot column where scaling begins. The memory therefore
supports unaligned 4-byte words without extra cycles:
- Bank `b` holds the bytes whose address is `b mod 4`.
- For an access at byte address `A`, with offset `o = A mod 4` and word `A/4`, bank
  `b` is addressed at `A/4 + 1` when `b < o` and at `A/4` otherwise.
- Write byte `j` is routed to bank `(o + j) mod 4`, gated by its strobe. Bytes past
  the end of the matrix are never written.
- On the read side the registered offset rotates the four bank outputs back into
  order, and bytes past the end read as 0.

Row operations mask the lanes past column N-1 with byte strobes. A row operation
therefore never touches the next row, even though consecutive rows share words.

### Micro-phase schedule

Every row operation is an in-place read-modify-write stream over the single memory
port. It is sequenced inside its FSM state by a small counter, `mem_phase`:

| Operation | Cycles | Phases |
|---|---|---|
| Row swap | 6 per word | read A, read B (A captured), B captured, write A into B, write B into A, advance |
| Row scaling | 3 per word | read, wait, write `s * word` |
| Elimination multiplier | 3 per row | read `G[i][col]`, wait, capture (a pivot row costs 1 cycle) |
| Elimination | 5 per word | read row word, read pivot word (row word captured), wait, write `row - m*pivot`, advance |
| Single-element probe | 2 + 1 | two fetch cycles, then the next state tests byte 0 |

The schedule is fully deterministic, so the compute time depends only on the
data-dependent control flow. From the first PREPROCESS_INIT cycle to the first
WAIT_FOR_READBACK cycle it is:
- 1 cycle for PREPROCESS_INIT.
- Per column K-1..0: 1 cycle.
  - A column that is marked and searched (`limit != 0`) adds 3K for the row search.
  - It then adds `6*ceil(N/4) + 1` if a swap happens, or 1 if not.
- 1 cycle to leave preprocessing.
- Per pivot step:
  - 1 cycle for PIVOT_INIT.
  - 3 per probe, plus 1 for every failed probe.
  - `6*ceil(N/4)` if the rows are swapped.
  - 1 for the decision.
  - For a reused pivot: 1 more.
  - Otherwise: `3 + 3*ceil((N - col)/4)` for scaling, 1 for REDUCE_ROW_INIT, 1 for
    the pivot row, `(K-1)*(3 + 5*ceil(N/4))` for the other rows, and 2 to finish.

The testbenches check this count exactly on every run. With no reuse, the
126 x 252 matrix takes 5.03 M cycles. LESS-like inputs reuse many pivots and take
much less. The full-size test's LESS-like run reuses 102 of the 126 pivots.

Compute times measured in simulation, from the last input word to COMPUTE_DONE,
with unlimited reuse:

| K x N | Input | Pivots reused | Cycles |
|---|---|---|---|
| 126 x 252 | LESS-like | 102 of 126 | 2,486,125 |
| 126 x 252 | random dense | (random was_pivot) | 3,580,024 |
| 200 x 400 | LESS-like | 93 of 200 | 10,850,241 |
| 274 x 548 | LESS-like | 133 of 274 | 26,752,642 |

For comparison, the FPGA implementation of this architecture reported about
4.19 M, 15.4 M and 37.4 M cycles for the three sizes. Those figures time one whole
call of the driver routine on the processor, on the matrices of a real signing run.
They include moving the matrix in and out over the bus, so they are not directly
comparable with the compute-only numbers above. The
micro-phase schedule here is this design's own, so its cycle counts are not
expected to match the original's exactly.

## Host interface

Register port (`reg_req_t`/`reg_rsp_t`): always ready, answered in the same cycle.

| Offset | Name | Access | Meaning |
|---|---|---|---|
| 0x00 | WAS_PIVOT | write / read | Write: push the next 32 `was_pivot` bits into the core (bit `j` of word `w` is column `32w+j`). Read: pop the next updated word. |
| 0x04 | IS_PIVOT | read | Pop the next `is_pivot` word. |
| 0x08 | CTRL | write | bit 0 START, bit 1 START_READBACK. Each is a one-cycle pulse; nothing is stored. |
| 0x0C | STATUS | read | bit 0 ERROR, 1 COMPUTE_DONE, 2 G_OUT_DONE, 3 WAS_OUT_DONE, 4 IS_OUT_DONE |
| 0x10 | PIVOT_REUSE_LIMIT | write / read | Reuse budget. The core latches it at START. |

Any other offset answers `error = 1`.

OBI data port: every address reaches the single G register.
- A granted write pushes one matrix word (elements `4i .. 4i+3`, element `4i` in
  bits 7:0).
- A granted read pops one result word.
- `gnt` is combinational. `rvalid` and `rdata` follow one cycle later, so a DMA that
  holds `req` high moves one word per cycle in both directions.

A complete operation:
1. Write LIMIT.
2. Write CTRL = 1.
3. Stream `ceil(K*N/4)` G words over OBI and `ceil(N/32)` words to WAS_PIVOT. The two
   streams may interleave freely, and extra words are ignored.
4. Wait for interrupt 0 (COMPUTE_DONE). Check STATUS.ERROR.
5. Write CTRL = 2.
6. Read the G words over OBI, and the WAS_PIVOT and IS_PIVOT words over the register
   port, until interrupts 1-3 are all high.

Once all three streams are complete the core passes through a one-cycle DONE state
back to IDLE. START is accepted only in IDLE.

## Choices made where the description left room

- **All K rows get a pivot.** The last pivot step is processed like the others, so
  the result equals the reference routine.
- **Preprocessing with an all-zero column** performs no swap. A found flag is kept
  for this.
- **Output handshake.** Each output stream shows its current word, and a one-cycle
  read strobe advances it. done flags rise per stream.
- **ERROR** stays set until the next START.
- **Bus bridge and register file.** The register file and the OBI-to-register bridge
  are hand-written minimal equivalents of generated/library blocks, with the register
  set listed above. PIVOT_REUSE_LIMIT can also be read back.
- **Not included.** The surrounding microcontroller (CPU, DMA, interrupt controller,
  bus fabric) and the C driver are not part of this RTL. The testbenches model them
  at the bus level.

## Sizes

The core is parameterised by `K` and `N`. Memory depth, counter widths and the
number of pivot words follow from these two. One build serves one LESS security
level:

| Level | K x N | Elements | Default build |
|---|---|---|---|
| 1 | 126 x 252 | 31,752 | yes (default) |
| 3 | 200 x 400 | 80,000 | build with `K=200, N=400` |
| 5 | 274 x 548 | 150,152 | build with `K=274, N=548` |

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog.

- `tb_fq_arith_unit`: exhaustive scalar x element sweep, and the inverse of every
  element.
- `tb_g_mem_simple`, `tb_g_mem`: random aligned and unaligned reads and writes
  against a byte model. Read-first behaviour, latency 1 and end-of-matrix masking
  are checked.
- `tb_rref_pivot_regs`, `tb_rref_row_op_regs`, `tb_rref_accel_reg_top`,
  `tb_rref_accel_data_reg_top`, `tb_periph_to_reg`: cycle-by-cycle comparison with
  small models.
- `tb_rref_accel_synth`: three core sizes run side by side through
  `rref_core_harness`. The sizes are 4x8, 6x13 and 5x37: whole words, partial
  words, and two pivot words. Inputs cover:
  - LESS-like monomial inputs,
  - random matrices,
  - zero leading columns,
  - rank-deficient matrices.

  The test checks every output word, the error flag and the exact cycle count. It
  also requires each mechanism to occur: preprocessing swap, search swap, reuse,
  column skip, scaling and elimination, error.
- `tb_less_top`: the wrapper at 6 x 13, driven by `less_top_driver`, which plays the
  CPU and the DMA in parallel threads. On top of the core checks it covers:
  - back-to-back and gapped DMA transfers,
  - the one-word-per-cycle readback rate,
  - register error answers,
  - all four interrupt lines.
- `tb_less_top_full`: the wrapper at its default size (126 x 252). It runs one
  LESS-like operation with unlimited reuse and one random dense matrix, about 6 M
  cycles. Verilator simulates it in seconds.
- `tb_less_workloads`: one LESS-like call on wrappers built for 200 x 400 and
  274 x 548, the level-3 and level-5 sizes, side by side. It runs about 27 M cycles
  and takes under a minute.

Concurrent assertions in the RTL stay active in every run. They cover:
- valid row-swap operands and an in-range pivot in the core,
- at most one G strobe per cycle in the data register,
- the OBI handshake in the wrapper: exactly one response, one cycle after each grant.

To run a testbench with plain Verilator, from the directory that holds `rtl/` and
`tb/`:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_less_top_full \
  -y rtl -y tb +libext+.sv rtl/less_bus_pkg.sv rtl/rref_accel_synth_pkg.sv \
  tb/rref_ref_pkg.sv tb/tb_less_top_full.sv
./obj_dir/Vtb_less_top_full
```

Lint (`verilator --lint-only -Wall`) reports only unused-signal notes. These cover
bus fields this design does not need (byte strobes, the register-side error bit,
the data port's address) and the unused offset constants in the shared package.
Each module's opening comment explains its own case.
