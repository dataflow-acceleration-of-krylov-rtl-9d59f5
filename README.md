# Krylov subspace pipeline for banded sparse matrices

Many iterative methods need the vectors x, Ax, A²x, …, Aᵏx: power iteration
(PageRank, for example), Krylov solvers and matrix-exponential approximations.
Computing them as k separate sparse matrix-vector products (SpMV) reads the
whole matrix from external memory k times. SpMV does so little arithmetic per
byte that this memory traffic sets the run time.

When the nonzeros of A lie in a narrow band around the diagonal, the products
can overlap. Row j of Ax⁽ⁱ⁾ only uses elements of x⁽ⁱ⁾ near index j. So the
product for x⁽ⁱ⁺¹⁾ can start once the first half-band of x⁽ⁱ⁾ exists, long
before x⁽ⁱ⁾ is complete. This RTL builds a chain of K processing elements
(PEs), each computing one product. The matrix is streamed from memory once,
into the first PE. Each PE hands the matrix entries it has used, and the
vector it produces, to the next PE through small on-chip buffers. All K
products run at the same time, each a few band-widths behind the previous one.
The work therefore rises K-fold while the memory traffic stays that of one SpMV.

The defaults are the main configuration of the published architecture:
K = 80 sequential PEs (one matrix entry per cycle each), band window b = 128,
up to r = 64 entries per row, and single-precision values with fixed-point
accumulation.

## Structure

```
           rp/nz (CSR)       x0
  memory ──► csr_reader ──► PE0 ──► matrix_buffer ──► PE1 ──► … ──► PE(K-1) ──► output buffer ──► xk
                             │  └─► vector_buffer ──►  │                  │
                             └───────────┬─────────────┴──────────────────┘
                                         ▼  (each PE's result stream)
                                   combine_unit ──► comb   (USE_COMBINE only)
```

| module | role |
|---|---|
| `krylov_top` | the pipeline: CSR reader, K PEs, K-1 matrix buffers, K-1 vector buffers, output buffer, optional combine unit, optional export of every vector |
| `kss_pe` | one SpMV, p = 1: vector window, hazard check, multiply, accumulate, forward |
| `fixed_accumulator` | row sum of single-precision products in fixed point |
| `fp32_mul`, `fp32_to_fixed`, `fixed_to_fp32` | arithmetic helpers |
| `matrix_buffer`, `vector_buffer` | FIFOs between neighbouring PEs |
| `csr_reader` | CSR row pointers + nonzeros → entry stream with end-of-row flags |
| `combine_unit` | y = Σᵢ αᵢ x⁽ⁱ⁾ over the outputs of all PEs |
| `krylov_pkg` | `fp32_t`, `mat_elem_t`, `IDX_W` |

External memory and the host are not part of the RTL. The top's stream ports
(`rp_*`, `nz_*`, `x0_*`, `xk_*`, `comb_*`, `vec_*`) are where a memory
controller connects.

## The matrix stream

A matrix entry in flight is a `mat_elem_t` of 65 bits: the value (IEEE
single), the 32-bit column index, and a `last` flag marking the last stored
entry of its row. Entries come in row-major order. The order of entries within
a row does not matter.

`csr_reader` builds this stream from standard CSR arrays. It takes the n+1 row
pointers on one stream and the (value, column) pairs on another, and derives
each row length from two consecutive pointers. A row with no entries is sent
as a single entry (value 0, column i, last). Every row therefore closes and
produces an output element, and every PE sees the same number of rows. The
reader takes the next row pointer in the same cycle that ends the current row,
so it delivers one entry per cycle without gaps.

## Inside a processing element

A PE sees two input streams: matrix entries, and the elements x₀, x₁, … of
its input vector, in index order. It does not keep the whole vector. It holds
a *window* of W = `BAND` consecutive elements in a small memory, with x_j in
slot j mod W. Band here means that row i only has entries in columns
|i − j| ≤ (BAND−1)/2 = 63 (127 diagonals for the default).

Each cycle the PE looks at the matrix entry at the head of its input and takes
it only if all three of these hold:

1. **Operand present.** The column index must be below the number of vector
   elements received so far. Otherwise the previous PE has not yet produced
   that element. This is the data hazard between overlapped products, and the
   PE waits for it.
2. **Room downstream for the entry.** The next matrix buffer must be able to
   take the entry.
3. **Room downstream for the result.** For the last entry of a row, the next
   vector buffer (and the combine unit, if present) must be able to take y_i.

When it takes an entry, the PE multiplies value × x_col in single precision
and adds the product to the row sum. One cycle later the entry appears,
unchanged, on `m_out`. On the row's last entry the sum becomes y_i on
`y_valid`/`y_data` one cycle later, and `row` advances. `stall` is high in any
cycle where an entry is waiting but is not taken.

The window takes a new x_j only while j < row + W − (BAND−1)/2. Writing x_j
reuses the slot of x_{j−W}, and this rule guarantees that x_{j−W} lies left of
the band of the current row and of every later row. With W = 128 and
half-band 63, a PE can hold up to x_{row+64} while it needs up to x_{row+63}.
A full window therefore never blocks progress. An entry outside the band reads
a wrong element and gives a wrong result. The original design accepts the same
limitation; here a simulation assertion reports it.

## Flow control between PEs, and why the buffers are FIFOs

PE i+1 can start row j only after PE i has finished row j+63. This is the
earliest moment x⁽ⁱ⁺¹⁾_{j+63} exists. In steady state, PE i+1 therefore runs
about 64 rows behind PE i. The matrix buffer between them holds exactly the
entries of those rows: PE i has used them, PE i+1 has not yet.

Rows have different lengths, so this offset varies. Two fixes exist:

- Fix the delay between PEs at the worst case. This needs bigger buffers.
- Let the later PE wait whenever its operand is missing. This is what is built.

A single global stall wire that freezes every PE would deadlock here: PE i+1
would wait for data that the frozen PE i can no longer produce. So the waiting
stays local. A PE with a missing operand holds. Its input buffers fill while it
waits. A full buffer withdraws its ready and holds the producer. Holding
spreads upstream only as far as the buffers actually fill, and no entry or
element is ever dropped. The top's `stall` output is the OR of all PE stall
flags, as a status signal.

The buffer `in_ready` is a credit: it is high while at least two entries are
free. A PE registers its outputs, so it writes one cycle after it decides.
With this credit that write always has a free entry.

Sizing, and why it cannot deadlock:

- **Matrix buffer.** It must hold 64 rows of entries, or PE i cannot run far
  enough ahead to produce the operand PE i+1 waits for. The default depth is
  b·r = 8192 entries. That covers 64 rows of up to 127 entries, so any row
  length the band allows is safe. The minimum is (BAND/2)·r_max + 2.
- **Vector buffer.** Any depth works for correctness, because the window
  already holds what the next PE needs next. Its size (b = 128 words) only
  absorbs bursts.
- **Combine-unit windows.** Stage i must hold the lead of PE i over PE i+1, at
  least 64 elements, so they are BAND deep.

With always-ready streams a run takes about nnz + (K−1)·T_off cycles, where
T_off is the number of entries in about 64 rows. For nnz ≫ K·T_off that is
nearly K products in the time of one.

## Number formats

Values are IEEE single precision. `fp32_mul` rounds to nearest, ties to even,
and flushes subnormals to zero. Each product is converted to a 64-bit two's-
complement fixed-point number with 32 fraction bits (`ACC_W`, `ACC_FRAC`),
truncating, and added in one cycle. At the end of a row the sum is converted
back to single precision, again truncating. Fixed-point accumulation is what
the 80-PE configuration uses: a one-cycle adder closes the loop, so no
floating-point reduction tree is needed. The precise format is this
implementation's choice. The range is ±2³¹ and the resolution 2⁻³². The sum
wraps on overflow, so row sums must stay well inside the range. The
PageRank-like test data (row sums near one) does.

## Combine unit

`combine_unit` forms y = Σᵢ₌₁..K αᵢ x⁽ⁱ⁾ on chip, so the intermediate vectors
need not go to memory. PE i produces element j later than PE i−1 does, so the
unit keeps a chain of K windows of partial sums. Stage i adds αᵢ·x⁽ⁱ⁾_j to the
partial sum for j that stage i−1 stored, and stores the result for stage i+1.
The last window is the output queue. Its storage is K·b words, which is the
size the architecture calls for. Partial sums use the same fixed-point format
as the PEs. The unit is present only with `USE_COMBINE = 1`. The default is 0,
because power iteration only needs x⁽ᴷ⁾.

## Exporting every vector

If an application needs x⁽¹⁾…x⁽ᴷ⁾ themselves, set `EXPORT_VECTORS = 1`.
Each PE's result stream then also appears on `vec_valid[i]`/`vec_data[i]`,
one element per pulse, in index order. `vec_ready[i]` is a credit with the
same rule as the buffers: while it is low, PE i does not complete a row. The
pipeline then runs only as fast as memory can take K vectors, which gives up
much of its advantage. The default is 0.

## Using the top

Parameters, all with defaults: `K` (80), `BAND` (128), `R` (64),
`MBUF_DEPTH` (BAND·R), `VBUF_DEPTH` (BAND), `ACC_W` (64), `ACC_FRAC` (32),
`USE_COMBINE` (0), `EXPORT_VECTORS` (0).

A run goes like this:

1. Hold `enable` low for at least one cycle. This empties every buffer, window,
   counter and accumulator.
2. Set `n_rows`.
3. Raise `enable`.
4. Stream in the data:
   - n_rows+1 row pointers on `rp_*`
   - the nonzeros on `nz_*`
   - n_rows elements of x⁽⁰⁾ on `x0_*`
5. Take x⁽ᴷ⁾ from `xk_*`, and y from `comb_*` if the combine unit is present.

All streams are valid/ready with the usual rule: a transfer happens in a cycle
where both are high. `done` goes high once all n_rows results have left, and
stays high until `enable` falls. `pe_row[i]` shows each PE's progress. Reset
(`rst_n`) is asynchronous and active low.

Storage at the defaults:

- 79 matrix buffers × 8192 × 65 bits
- 80 vector and output buffers × 128 × 32 bits
- 80 PE windows × 128 × 32 bits

That is about 5.1 MiB in all. The architecture's own memory estimate for
this configuration is 5.0 MB. The buffers read their head combinationally
(first-word fall-through). For block-RAM mapping on an FPGA, register the read
instead.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops itself on a watchdog. Expected values
come from double-precision models in the testbench, built on the bit-level
float helpers in `tb_fp_pkg`, never from the RTL's own converters.

| testbench | what it shows |
|---|---|
| `tb_fp32_mul` | 200 000 random products and special cases, bit-exact against round-to-nearest-even |
| `tb_fixed_accumulator` | row sums bit-exact, result one cycle after the last product, clear |
| `tb_matrix_buffer`, `tb_vector_buffer` | order, level, credit never overflows, clear, full condition reached |
| `tb_csr_reader` | random CSR with empty rows at random rates, two runs |
| `tb_kss_pe` | one PE (BAND 16) against the row products with random back-pressure; hazards, full window and back-pressure all occur; with everything ready it takes one entry per cycle (1842 entries in 1851 cycles) |
| `tb_combine_unit` | 4 stages, bit-exact sums, full windows and output back-pressure |
| `tb_krylov_top` | K = 4, BAND 16, minimal matrix buffers, combine unit and vector export on; three runs with restarts; x⁽¹⁾…x⁽⁴⁾ and y against the reference; every mechanism (hazard, full matrix/vector buffer, full window, empty row, full combine window, output and export back-pressure, stall, restart) counted and required; the always-ready run must beat the overlap bound nnz + (K−1)·b² |
| `tb_krylov_full` | the top with every default (K = 80, b = 128, 8192-entry buffers): 1000 rows of band 127 with up to 5 entries per row, two runs; x⁽⁸⁰⁾ within 2·10⁻⁴ of the reference; the always-ready run takes about 19 800 cycles for 2 900 entries, against 80 × 2 900 for sequential products |

To run one with Verilator (5.x):

```
verilator --binary --timing --assert -Irtl -Itb rtl/krylov_pkg.sv tb/tb_fp_pkg.sv \
          tb/tb_krylov_top.sv --top-module tb_krylov_top -o sim
./obj_dir/sim
```

The full-size test takes a few minutes. Most of that time is the K·64-row
start-up of the pipeline, not the matrix itself. The same test with up to 31
entries per row (the shape of the first two benchmark problems, 1000 rows,
about 16 000 entries) also passes at full size, but it takes about nine
minutes of simulation.

## How far it follows the original architecture

These parts follow the architecture:

- the chain of K PEs with matrix and vector buffers between them
- the single pass over the matrix, with PEs forwarding used entries unchanged
- the PE's interface: matrix in and out, vector element with a validity bit,
  enable, row number, stall
- p = 1 and a window of w ≥ b
- stalling on a data hazard rather than fixed offsets
- buffer sizes taken from its memory model
- fixed-point accumulation of single-precision products
- the linear-combination post-processing unit and its K·b window
- the three output options: x⁽ᴷ⁾ only, post-processing on chip, or every
  vector sent to memory
- the defaults K = 80, b = 128, r = 64

These are choices of this implementation:

- all handshakes and the credit rule
- elastic FIFO buffers, with the global stall as a status OR rather than a
  freeze
- the entry format with its end-of-row flag, and the CSR reader
- the treatment of empty rows
- the fixed-point format and the rounding rules
- enable as a level that clears the pipeline
- the chained structure of the combine unit

Not built:

- the floating-point-accumulator PE variant (adder-tree reduction, used with
  K = 32)
- PEs with p > 1
- the memory controller, DRAM and host

Numerically, results differ from exact arithmetic by one single-precision
rounding per product and a truncation per row and per stage. Over 80 stages
the observed relative error stays below 2·10⁻⁴.
