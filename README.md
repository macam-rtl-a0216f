# MACAM: sparse and dense matrix-vector multiplication in ReRAM crossbars

A resistive (ReRAM) crossbar computes a dot product in one analog step. Every
cell holds one bit. A voltage is applied to each row, each column sums the
currents of its cells, and an ADC turns that sum into a number. The crossbar
works well on dense blocks of a matrix. Sparse matrices are the problem: most
cells would hold zeros and most of the work would be wasted.

This design makes each 128x128 crossbar *multifunctional*. The crossbar is
split into four 64x64 regions, and each region can be configured in one of
three ways:

* **dense MAC**: it holds a dense block of the matrix and multiplies it with
  part of the vector;
* **CAM**: it holds the column indexes of sparse non-zeros and searches them
  like a content-addressable memory;
* **sparse MAC**: it holds the values of those non-zeros and adds up one
  matrix row's products.

The matrix is split offline into dense blocks and a sparse remainder. The same
hardware then runs both parts, one after the other.

All arithmetic is floating point and exact. Products are summed without
rounding, and rounding to a machine format is left to the receiver.

The RTL is SystemVerilog (IEEE 1800-2017). It lints cleanly with Verilator 5
and elaborates with slang. It contains a behavioural model of the analog
crossbar and synthesizable logic for everything around it.

## Organisation

```
macam_top          NUM_PE (10) processing elements side by side
 └─ macam_pe       one PE
     ├─ macam_array  x NUM_ARRAYS (64)
     │    ├─ mf_subarray x 4      one 64x64 region of the crossbar (behavioural)
     │    ├─ delay_register        per-row delays; row counts in CAM mode
     │    ├─ match_buffer          which rows take part in the next pass
     │    └─ gathered-vector registers (one per row of the CAM region)
     ├─ input_buffer       vector elements (mantissa + exponent)
     ├─ exponent_file      matrix exponents (dense: per column, sparse: per entry)
     ├─ delay_unit         max exponent -> per-row delays
     ├─ row_driver x rows  delayed, bit-serial row inputs (helper)
     ├─ adc_pair x arrays  7-bit dense ADC and 5-bit sparse ADC
     ├─ shift_add x cols   bit-serial accumulation over slices and time steps
     ├─ output_buffer      column results of a pass
     ├─ merge_queue        adds partial results of the same output row
     ├─ config_file        region modes, block positions, MCSR bookkeeping
     └─ macam_controller   the sequence of stages of an operation
```

`macam_pkg` holds the shared constants, the region-mode enum
(`SUB_IDLE`, `SUB_DENSE`, `SUB_SPMAC`, `SUB_CAM`), the host write kinds and
the controller stages.

## Bit-slicing: where one number lives

A matrix mantissa is a two's-complement number of `NUM_ARRAYS` bits (64). It
is spread over the 64 arrays of a PE: bit *b* is stored in array *b*, at the
same region, row and column in each array. The region mode is therefore a
property of a region *position* (0..3) and applies to all 64 arrays at once.

When a column is read in one time step, each array gives a count of ones (the
column current). Each count is converted by that array's ADC. The shift-and-add
unit weighs array *b*'s count by 2^b, and gives the top slice, the sign bit, a
negative weight.

The vector enters bit-serially, one bit per row and step, most significant bit
first. The accumulator doubles every step and adds the weighted slice sum. The
first step, which carries the vector's sign bit, is subtracted. After all steps
the accumulator holds the exact signed sum of products.

## Floating point by delaying inputs

Matrix and vector elements each carry a signed exponent. Before summing
products with different exponents they must be aligned. Here the alignment is
done in time, not with shifters:

1. The delay unit takes the largest exponent *emax* among the rows that take
   part in the pass. It gives each row the delay *emax − e*.
2. A row with delay *d* starts its bit stream *d* steps later. During those
   steps it repeats the sign bit, which sign-extends the stream.
3. Every pass lasts `STEPS = XW + DMAX` steps (128). Each row's stream therefore
   equals `x · 2^(DMAX − d)`: rows with small exponents are automatically
   weighted down.
4. The result's exponent is the pass's *emax* minus `DMAX`, plus the matrix
   exponent where one is shared.

Rows whose exponent is more than `DMAX` below *emax* would lose every bit. The
delay unit flags such rows and does not drive them (`drop`).

**Dense regions.** Each column has one matrix exponent, so the mantissas of a
column are pre-aligned when they are written. The delays come from the vector
exponents only. Result exponent = column exponent + vmax − `DMAX`.

**Sparse regions.** Each stored entry has its own exponent. The delay is
computed from *p = matrix exponent + vector exponent* of every entry in the
pass. Result exponent = pmax − `DMAX`.

## Dense mode

A dense region holds a 64x64 block of the matrix, transposed onto the
crossbar:

* crossbar row *r* is multiplied by vector element `vcol + r`;
* column *c* produces a partial sum for output row `row_base + c`.

`vcol` and `row_base` are configuration registers of the position. One pass
produces 64 column results. The 7-bit ADC covers the 0..64 ones a column can
hold. Positions configured idle are skipped, and the `skip` event counts them.

## Sparse mode: MCSR, gather and row passes

The sparse remainder is stored in a modified CSR form (MCSR):

* **CAM region of array *j***: holds up to 64 non-zeros in row-major order.
  Each row holds the 32-bit column index of one non-zero as a key.
* **Delay register of array *j*** (unused in CAM mode): holds the *row count*
  at the first entry of every matrix row, i.e. how many consecutive entries
  belong to that row.
* **Values**: the value of CAM entry (*j*, *r*) sits in column *j*, row *r* of
  the sparse-MAC region. Like all mantissas it is bit-sliced over all arrays.

A key is stored as a pair of cells per bit (b, ~b), and a search line drives
the complement. A row matches when no cell conducts. A (0,0) pair matches
either value.

An operation on the sparse part has two phases.

**Gather.** A column counter walks the input buffer. For each element it
searches the global index `vec_base + k` in the CAM regions of all arrays at
once. Every matching row latches the element into its gathered-vector
register, so each stored non-zero gets its own vector operand. This costs one
cycle per vector element, whatever the number of non-zeros.

**Row passes.** For each CAM region *j* with entries, a row counter walks the
MCSR rows:

1. The row count at the current entry tells the match buffer which range of
   rows to activate.
2. The gathered operands drive those rows, delayed as above.
3. Column *j* of the sparse-MAC region gives the row's dot product.

The sparse ADC has 5 bits, so at most `SPMAX = 31` entries can take part in
one pass. A longer matrix row is cut into several passes (`split` event), and
the merge queue adds the partials. An empty matrix row is stored as one
padding entry with row count 0: it takes a slot but starts no pass (`pad`
event).

Bank 1 register *j* gives the output row id of the first MCSR row in region
*j*. Every row-count step advances the row id by one.

## Merge queue

Column results of dense passes and row results of sparse passes leave through
the output buffer, lowest column first, and enter the merge queue as
(row id, mantissa, exponent). The queue is fully associative by row id and has
16 entries:

* **hit**: an incoming partial whose row is already queued is added into that
  entry;
* **append**: otherwise it takes a free entry;
* **evict**: when all entries are taken, the oldest entry is sent out first.
  The receiver must add partials of the same row that arrive separately.

Additions stay exact when the exponents differ by at most 40: the queue aligns
to the smaller exponent, and a mantissa of 256 bits leaves room. Beyond 40,
the smaller value is shifted right onto the larger one and loses its low bits.

At the end of an operation the queue is flushed oldest first.

## Controller stages

`start` runs, in order:

1. **`GATHER`**, only if a CAM and a sparse-MAC position are configured.
2. For each region position, **`DSEL`/`DSETUP`/`DRUN`/`DOUT`**: select, load
   the delays, step `STEPS` times, then write the columns to the output
   buffer. Non-dense positions are skipped.
3. For each CAM region and MCSR row, **`SSEL`/`SROW`/`SSETUP`/`SRUN`/`SOUT`**.
   The match-buffer range is loaded combinationally in `SROW`.
4. **`FLUSH`** of the merge queue, then **`DONE`**: `done` pulses for one
   cycle.

Each pass costs `STEPS + 3` cycles plus the output-buffer drain. Writes are
allowed only while `busy` is low.

## Host interface

All PEs share one write bus, and `wr_pe` selects the target PE. The fields:

| `wr_kind`   | fields used                                         | effect |
|-------------|-----------------------------------------------------|--------|
| `WR_CFG`    | `wr_addr`, `wr_data`                                 | configuration register |
| `WR_VEC`    | `wr_addr` (buffer index), `wr_mant`, `wr_exp`        | vector element |
| `WR_DENSE`  | `wr_pos`, `wr_row`, `wr_col`, `wr_mant`              | one dense matrix element, bit-sliced over all arrays |
| `WR_DEXP`   | `wr_pos`, `wr_col`, `wr_exp`                         | dense column exponent |
| `WR_SPARSE` | `wr_arr`, `wr_row`, `wr_key`, `wr_mant`, `wr_exp`, `wr_cnt` | one MCSR entry: key, value, exponent, row count |

Configuration registers (`wr_addr[9:8]` is the bank):

| address   | meaning |
|-----------|---------|
| 0..3      | mode of region position 0..3 |
| 4..7      | dense position *p*: output row id of column 0 |
| 8..11     | dense position *p*: input-buffer index of row 0 |
| 12        | global vector index of input-buffer entry 0 |
| 13        | number of input-buffer entries the gather searches |
| 256 + *j* | output row id of the first MCSR row in CAM region *j* |
| 512 + *j* | number of entries stored in CAM region *j* (0 = unused) |

Outputs per PE:

* `busy`, `done`;
* `res_valid` with `res_row`, `res_mant` (256-bit signed) and `res_exp` (16-bit
  signed), worth `res_mant · 2^res_exp`;
* `ev`, eight event pulses: {gather search, merge-queue eviction, merge hit,
  padding entry, split row, skipped position, sparse pass, dense pass}.

Changing a region's mode between two operations is the mode switch. Rewrite
the mode registers, rewrite the data, and start again.

## Parameters

| parameter     | default | origin |
|---------------|---------|--------|
| `NUM_PE`      | 10      | as described for the accelerator |
| `NUM_ARRAYS`  | 64      | as described (also the mantissa width of the matrix) |
| `SUB_DIM`     | 64      | region size; crossbar 128x128 = four regions |
| `DENSE_BITS`  | 7       | own choice: full range of a 64-row column |
| `SPARSE_BITS` | 5       | own choice: the sparse ADC has fewer bits than the dense one |
| `XW`          | 64      | own choice: vector mantissa bits |
| `DMAX`        | 64      | own choice: largest delay (alignment window) |
| `VBUF_DEPTH`  | 256     | own choice |
| `MQ_DEPTH`    | 16      | own choice |
| `EXP_W`       | 16      | own choice: signed unbiased exponents |

## What follows the original description and what does not

These parts follow the original description:

* the PE's composition;
* the four-region multifunctional crossbar with dense, CAM and sparse-MAC modes;
* the bit-slices spread over the arrays of a PE;
* two ADC precisions;
* delay-based exponent alignment with a maximum-exponent unit;
* MCSR storage with row counts held in the delay registers;
* the gather by CAM search with a column counter;
* a row counter over the row counts;
* merging partial results by row id.

This design's own choices:

* the number format. Two's-complement mantissas and unbiased exponents are used
  instead of IEEE-754 words, and conversion is left to the host;
* the exact delayed-stream format and the `DMAX` window;
* the key encoding in the CAM;
* padding by row count 0;
* splitting of rows longer than the sparse ADC's range;
* the merge queue's depth, eviction and alignment rules;
* the register map and the host bus;
* the sequential (not overlapped) order of gather, dense and sparse stages.

Not built:

* the offline preprocessing that splits a matrix into dense blocks and sparse
  remainder and chooses the region modes. The host does this;
* workload balancing. It is an allocation rule: spread the sparse regions over
  the PEs instead of filling one PE with them. The host follows it when it
  chooses the layout. The hardware allows dense and sparse regions in the same
  PE;
* any host-side interconnect. Results of the same row from different PEs, or
  evicted from the merge queue, must be added by the receiver;
* the analog behaviour of the cells (noise, resistance spread, write energy and
  latency). The crossbar model is ideal and digital.

## Simulating

Each `rtl/` module has a self-checking testbench `tb/tb_<module>.sv`. It prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog. With plain
Verilator, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary -j 0 --top-module tb_macam_pe \
    rtl/macam_pkg.sv $(ls rtl/*.sv | grep -v macam_pkg) tb/tb_macam_pe.sv
./obj_dir/Vtb_macam_pe
```

The package must come first; the order of the other files does not matter.

End-to-end tests:

* **`tb_macam_top`**: two PEs at a small size (8 arrays, 8x8 regions, 8-bit
  mantissas). It runs two operations in which every region position of both PEs
  changes mode. Each output row is checked against the exact product. The test
  counts the dense passes, sparse passes, skipped positions, split rows,
  padding entries, merges, evictions, gather searches and mode switches, and
  fails if any of them never happens.
* **`tb_macam_top_ten`**: all ten PEs, each with 16 arrays of four 16x16
  regions, 16-bit mantissas, a delay window of 16 and a 3-bit sparse ADC. It
  runs one complete operation with a dense block and a sparse part in PE 0, a
  dense block in PE 9, and idle PEs in between.

**Largest simulated size:** 10 PEs × 16 arrays × four 16x16 regions. The
default size (10 PEs × 64 arrays × four 64x64 regions, 64-bit mantissas) lints
and elaborates. Its Verilator model, however, is a few hundred megabytes of C++
and takes far too long to compile. Every module is parameterised, and the
reduced tests set the parameters on the top module.

The tests use no files, no DPI and no waveform dumps. Random data comes from
`$urandom`, and the expected results are computed in the testbench with exact
integer arithmetic.
