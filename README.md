# Sparse linear algebra accelerators: supernodal Cholesky, FSpGEMM and a Sparse Tensor Core

Sparse matrix kernels are limited by irregular memory access, not by arithmetic.
This RTL implements three accelerators from the thesis *Reconfigurable
High-Performance Computing of Sparse Linear Algebra*. Each one turns an
irregular kernel into regular streams that a hardware pipeline can consume at
one vector per cycle.

* **Supernodal Cholesky engine (FSCHOL).** It factorizes a sparse symmetric
  positive-definite matrix supernode by supernode. Two processing elements
  (PEs) work on dense frontal matrices, VL = 128 single-precision lanes wide.
  They pass intermediate matrices to each other over FIFO channels, so the
  matrices do not go back to memory.
* **FSpGEMM.** A sparse times sparse matrix product C = A x B that uses
  Gustavson's row-by-row method. A is regrouped so that one read of a row of B
  serves up to N = 16 PEs at once. Each PE merges scaled B rows into its output
  row with a sort-and-accumulate loop over a double buffer. There are M = 6
  independent cores.
* **Sparse Tensor Core.** A lane-parallel SpGEMM unit made of three parts:
  - multiply-and-merge units (MMUs), built around an 8-record hardware merge
    sorter;
  - addition units (AUs), which add records that share an index;
  - a banked, set-associative read cache in front of 16 memory channels.

  The unit works in double precision.

The three engines stand side by side in `sparse_accel_top`. They share only the
clock and the reset.

All of the RTL is synthesizable SystemVerilog. The memories are modelled as
ports, and the testbenches behave as the memories.

## Supernodal Cholesky engine

### Jobs

The host orders the work (the elimination-tree schedule) and writes it as a
list of 64-bit job words, one list per PE. A job word is `fschol_pkg::job_t` and
holds the following fields:

| field | meaning |
|---|---|
| `up` | F_S has already been updated, so its data comes from a Q_F channel and not from memory |
| `last_c` | this is the last update of supernode S, so the PE factorizes afterwards |
| `f_rd` | read V_F from the channel fed by the other PE (otherwise from this PE's own FIFO) |
| `f_wr` | write the result to the channel towards the other PE (otherwise to this PE's own FIFO) |
| `u_rd` | add the extended update matrix of a child from Mem_U (otherwise add zero) |
| `d` | order of the frontal matrix |
| `t1` | number of columns of the supernode (t+1) |

A frontal matrix of order d is streamed row by row. Each row is ceil(d/VL)
vectors of VL words, and the unused lanes are zero.

### Update and the extension unit

An update reads V_F from one of three sources:

* Q_A (fresh data from memory);
* the other PE (`f_rd`);
* the PE's own FIFO, Q_F,PE.

It adds V_U and writes V_F + V_U either to a FIFO or, on the last update, into
the frontal RAM.

V_U is produced by the extension unit (`fschol_extend`). The update matrix U of
a child is smaller than the parent's frontal matrix. A Boolean pattern (one bit
per element of F_S, sent on Q_P) marks where U's entries belong. The unit
handles one lane per cycle:

* on a 1 bit, it takes the next word of Mem_U;
* on a 0 bit, it inserts a zero.

So an extended vector takes VL + 1 cycles. The unit is told how many pattern
vectors the job has, so it never reads into the next job.

### Factorize

After the last update, the PE eliminates the t+1 supernode columns in turn. For
each column k it does the following:

1. It computes the square root of the diagonal element (`fp_sqrt`).
2. It divides row k by that root in VL dividers (`fp_div`). Because F_S is
   symmetric, row k equals column k, so this gives column k of L.
3. It sends that column to Q_L.
4. For every row below k, it forms the outer-product term in VL multipliers
   (`fp_mul`) and subtracts it (`fp_add`).

After the last column, the trailing (d-t-1) x (d-t-1) block is the update
matrix U_S. It is copied into Mem_U one word per cycle, ready for the parent
supernode.

The PE masks lanes by column:
* L holds only columns k..d-1;
* the subtraction touches only columns > k.

### Storage

The storage sizes follow the thesis's storage table (VL=128, N=4, M=2):

| storage | size |
|---|---|
| frontal RAM (this design's addition) | (N+M)*VL rows x (N+M) vectors = 768 x 768 words |
| Q_F (one per direction) and Q_F,PE | (N+M)^2 * VL vectors |
| Mem_U | (N*VL)^2 = 512 x 512 words |
| Q_U | QU_DEPTH = 4 vectors |

So a job may have d <= 768 and d - (t+1) <= 512. An assertion checks this.

### Load, store and the top

`fschol_load` fetches the jobs one at a time. For each job it streams the
A vectors (if `up` = 0) and the pattern vectors (if `u_rd` = 1) into Q_A and Q_P.
It expects three regions of memory:
* job list;
* A vectors;
* pattern vectors.

Each region holds one item per address, and every read returns after one
cycle.

`fschol_store` writes each L vector to consecutive addresses from `l_base` as
soon as it arrives. It also counts the vectors written and the jobs done.

`fschol_top` holds two copies of load, PE and store, connected by the two
inter-PE Q_F channels.

### Timing

* An update moves one vector per cycle. When Q_U is involved, the extension
  unit sets the pace at VL + 1 cycles per vector.
* Column k of a factorization takes one cycle for the root, about ceil(d/VL)
  cycles to divide, and one cycle per remaining row vector to subtract.
* Copying U_S takes (d-t-1)^2 cycles.

## FSpGEMM

### CSV format and the load module

`fspgemm_load` groups the rows of A in blocks of N. Inside a block, the nonzeros
that share a column index k form one *CSV vector*. For each vector, the loader
does the following:

1. It reads the row pointer of B(k,:) once.
2. It sends each A nonzero to the PE of its row (row mod N).
3. It reads row k of B once and broadcasts it to every PE that has a nonzero in
   the vector.

The last nonzero of a row of A carries an end-of-row flag. The loader counts
the vectors and nonzeros it handles.

Data layout:
* A is a list of (value, row, column, end-of-row) records in CSV order;
* B is in CSR form (a row-pointer array plus column/value arrays).

### PE: sort-and-accumulate with a double buffer

`fspgemm_pe` holds the current partial row of C in one of two buffers. For
each (a, B row) pair it runs a single merge loop:

* it walks the buffer and a x B(k,:) in column order;
* it writes the smaller column to the other buffer;
* it adds the values when the two columns are equal.

The loop produces one element per cycle, and the buffers then swap. At the end
of a row of A, the row is final and is sent out as (value, row, column).

BUF_DEPTH = 1024 limits the nonzeros in one row of C. The thesis does not give
this size.

### Store and the cores

`fspgemm_store` serves the N PE output FIFOs round-robin and writes one
C element per cycle to consecutive addresses. Its output is therefore in
completion order, not in row order.

`fspgemm_core` is one load module, N PEs and one store module. `fspgemm_top`
holds M of them, each with its own memory ports. The host splits A among the
cores.

## Sparse Tensor Core

Records are (32-bit index, 64-bit value) pairs. The index KEY_MAX (all ones)
marks padding and the end of a list.

### Hardware merge sorter (`hms`)

The sorter merges two sorted streams, E = 8 records per vector, into one sorted
stream of E records per cycle. Each input goes through a small FIFO. A selector
takes the vector whose first key is smaller. The merge logic sorts that vector
together with the E records held back from the previous step, emits the lower
E records and keeps the upper E for the next step. The merge itself is a
bitonic merge network.

### MMU and AU

`stc_mmu` multiplies a B row (vector y) by the scalar x in E multipliers and
merges the result with a partial-result stream z in an HMS. The output is still
unreduced: equal indices stay next to each other.

`stc_au` compares each record with the previous one. It adds the values of
equal indices and emits the sum once the index changes.

Row-wise SpGEMM runs in two phases:
1. MMUs build partial products.
2. AUs reduce them.

Software schedules the phases on the lanes.

### Cache (`stc_cache_bank`)

Each bank is a 128-set, 16-way, 64-byte-line, LRU read cache in front of one
64-bit memory channel.

* A hit takes two cycles.
* A miss refills the line in eight beats and evicts the least recently used
  way.

The bank is blocking, so it serves one miss at a time. `stc_top` gives each of
the N = 16 lanes its own bank, MMU and AU.

## Floating point

The units are `fp_add`, `fp_mul`, `fp_div` and `fp_sqrt`. They are
combinational IEEE-754 units with parameters for exponent and mantissa width:
* binary32 for FSCHOL and FSpGEMM;
* binary64 for the Sparse Tensor Core.

They round to nearest even and flush subnormals to zero. Overflow gives
infinity. Division by zero gives infinity, and the square root of a negative
number gives NaN. They are bit-exact with a reference model that follows the
same rules. They are single-cycle, so a real implementation at speed would
pipeline them.

## Top level

`sparse_accel_top` brings out every port of the three engines under the
prefixes `chol_`, `spg_` and `stc_`. The parameters are the thesis's main
configuration:
* VL=128, N=4, M=2 for Cholesky;
* M=6, N=16 for FSpGEMM;
* 16 lanes and 128 sets x 16 ways for the tensor core.

Some state is cleared by an asynchronous active-low reset. Some modules
check their handshake rules with concurrent assertions, disabled during reset.
Lint tools report these assertions as a mixed synchronous/asynchronous use of
`rst_n` (SYNCASYNCNET). This is expected.

## Simulation

Every block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=<n> failures=<n>` and has a cycle watchdog. The
reference models are in these files:
* `tb/tb_fp_util.sv` (floating point);
* `tb/tb_spgemm_ref.sv`;
* `tb/tb_fschol_ref.sv`.

Each testbench compares the outputs bit for bit with a model written
separately from the RTL. Example:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
  rtl/fschol_pkg.sv rtl/fspgemm_pkg.sv rtl/stc_pkg.sv \
  tb/tb_fp_util.sv tb/tb_spgemm_ref.sv tb/tb_fschol_ref.sv \
  --top-module tb_sparse_accel_top tb/tb_sparse_accel_top.sv
./obj_dir/Vtb_sparse_accel_top
```

Replace the top module and file name to run any other testbench.

`tb_sparse_accel_top` runs the whole design at its default sizes:
* a two-PE Cholesky job forest with inter-PE passing, extension and
  factorization;
* SpGEMM on two of the cores;
* a merge, an accumulation and a cache eviction on one tensor-core lane.

It counts each mechanism and fails if any of them never happens. The block
testbenches use smaller parameters (for example VL=4 for the Cholesky PE) to
run faster.

## Departures from the thesis and open points

* **Column elimination.** Factorization eliminates every one of the t+1
  columns with its own outer product. The thesis's pseudo-code can be read as
  subtracting only the last column's product, which is correct only when
  t = 0.
* **Meaning of `f_rd`.** The job table says that `f_rd` selects the inter-PE
  channel, while the prose says the opposite. The job table is followed.
* **Frontal RAM and job size fields.** The frontal RAM and the `d`/`t1` job
  fields are this design's own. The thesis describes the PE's storage almost
  entirely as FIFOs.
* **Unspecified sizes.** Several sizes are this design's choice:
  - queue depths other than those in the storage table;
  - BUF_DEPTH;
  - the cache address width;
  - the memory layouts.
* **Merge feedback.** The HMS feeds back E records per step. One figure of
  the thesis describes feeding back E-1.
* **Not covered.** The host software (elimination-tree scheduling,
  conversion to CSV, phase scheduling on the tensor core) and the HBM devices
  are outside this RTL.
* **No pipelining.** The arithmetic is not pipelined. Clock rates such as the
  thesis's FPGA frequency or the 1 GHz ASIC target were not a design goal.
