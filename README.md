# Double-precision GEMM unit for a tightly coupled polymorphic processor

This design computes the BLAS level-3 kernel

    C <- alpha * A * B + beta * C        (A: m x k, B: k x n, C: m x n, IEEE-754 double)

as a custom computing unit (CCU) next to a general-purpose processor. The processor writes the call
arguments into exchange registers and pulses `start_op`. The unit then reads the matrices from the
shared system memory by itself, writes C back, and raises `end_op`. m, n and k may take any value,
including sizes that are not multiples of the block size. The library call's scaling factors
are supported as alpha in {-1, +1} and beta in {0, 1}.

The arithmetic is done on a linear array of processing elements (PEs), each built around one
pipelined double-precision multiply-add unit. The default configuration matches the published
prototype: 9 PEs, 72 x 64 result blocks, a 100 MHz clock and one 64-bit memory word per cycle. That
is 1.8 GFLOPS peak. The RTL sustains about 90 % of that once k is a few dozen, and 98 % for
300 x 300 matrices.

## The blocked algorithm

C is cut into blocks C' of SI x SJ words (72 x 64 by default). The last block row and block column
are cut short where the matrix ends. For each block:

1. C' is loaded from memory into the PEs. With beta = 0 the PE buffers are cleared instead, and
   nothing is read.
2. For kk = 0 ... k-1, one column of A' (SI words) is loaded. A' is the 72-row slice of A that
   matches the block. Then one row of B' (SJ words) is read. Every B element is broadcast to all
   PEs, and each PE does `C'(r, j) += A'(r, kk) * B'(kk, j)` for the rows it owns.
3. C' is written back.

Each row of a block lives in exactly one PE. Row r belongs to PE `r mod P` and is that PE's local
row `q = r / P`. P is the number of PEs, and i = SI / P = 8 is the number of rows per PE. A PE keeps
C'(q, j) at local address `j*i + q`. Each B element is held on the broadcast for i cycles, one per
local row. So in an iteration every PE does i*SJ = 512 multiply-adds, and the array does 9 * 512.

Memory traffic per block is k*(SI + SJ) words for A and B, plus 2*SI*SJ words to load and store C.

## Why the PEs need not wait

One iteration computes for i*SJ cycles. In that time the next column of A (SI = i*P words) and
the next row of B (SJ words) must arrive over the single memory port:

    i*SJ >= i*P + SJ                       512 >= 136 at the defaults         (1)

The spare cycles of all k iterations must also cover loading and storing a whole C block in the
background:

    k * (i*SJ - i*P - SJ) >= 2 * i*P*SJ    k >= 9216 / 376, i.e. k >= 25       (2)

When both hold, the run takes about

    T = m*k*n / P + 2*i*P*SJ + i*P  cycles                                   (3)

That is the compute time, plus filling the first block, plus emptying the last. For small k,
or small edge blocks, the PEs do wait, and the hardware handles that correctly. Equation (3) also
shows why the buffers should be no larger than (1) and (2) require: a bigger block only adds to
the fill and drain terms.

## Memory switching: two sets of every buffer

Each PE has two buffers, and each buffer has two sets:

* **A buffer, 2 x i words.** In each iteration, the exec unit fills the set the PEs are not
  reading with the next column of A'. The sets swap every iteration.
* **C buffer, 2 x i*SJ words.** One set holds the block being computed. The other set is first
  drained to memory by the store unit (the previous block), then refilled by the load unit (the
  next block). Blocks use the sets alternately. The store unit returns a set to the load unit
  with a `bank_free` pulse.

This is what lets communication and computation overlap. Loads, stores and the A/B stream of the
next iteration all share the gaps that condition (1) leaves in the memory schedule.

## The PE array and its command chain

This part has the most timing subtleties.

The controller does not drive the PEs in parallel. It sends one command word (`pe_cmd_t` in
`gemm_pkg`) into PE 0, and each PE registers it and hands it on. A command therefore reaches PE p
exactly p cycles after it enters the array. One word can carry, in the same cycle:

| field group | driven by | effect in the PE |
|---|---|---|
| `a_we, a_pe, a_bank, a_q, wdata` | exec unit | write one A element into PE `a_pe` |
| `c_we, c_zero, c_pe, c_bank, c_addr, wdata` | load unit | write (or clear) one C word in PE `c_pe` |
| `mac_v, mac_abank, mac_q, mac_cbank, mac_caddr, b` | exec unit | every PE: `C[caddr] += A[q] * b` |
| `r_v, r_pe, r_bank, r_addr` | store unit | PE `r_pe` reads one C word for the store path |

The three units drive disjoint fields. Their outputs are OR-combined into the word that enters
PE 0. A and C writes share `wdata`, and the memory multiplexer makes sure only one read answer
arrives per cycle.

The delay is the same for everything sent down the chain. So an A element written for iteration
kk+1 and a multiply-add that reads A for iteration kk stay in the order they were issued, in
every PE. The skew between PEs does not matter.

**Multiply-add timing.** A PE that sees a multiply-add in cycle t:

* reads A and C (registered RAM read, 1 cycle);
* runs the 11-cycle multiply-add;
* writes the sum back in cycle t + 12.

The C word must not be read again before then. The exec unit guarantees this by never issuing
fewer than 13 multiply-add slots per iteration, adding idle slots if needed. This only happens
for edge blocks with i*cols < 13; a full block issues 512 per iteration. After a block's last
multiply-add, the unit waits another 13 cycles before handing the block to the store unit.

**Read-data chain.** A store-unit read addressed to PE p is answered one cycle after PE p sees
it. The answer is inserted into a second chain (`pe_rd_t`) that runs from PE 0 towards the last
PE, one register per PE. A PE without an answer forwards its neighbour's. Every answer leaves the
last PE exactly P cycles after its read entered PE 0, whichever PE it came from. This lets the
store unit handle answers as a fixed-latency stream.

## Controller

    block scheduler -> load unit -> exec unit -> store unit
                          \            |            /
                           memory multiplexer -- system memory

Descriptors (`blk_desc_t`: addresses of A', B', C', rows, columns, rows per PE, C set, last-block
flag) pass down this pipeline with valid/ready handshakes. Each unit works on a different block.

* **Block scheduler.** Walks the blocks column band by column band. All address arithmetic is
  additions. SJ*ldb and SJ*ldc are built by SJ additions during a short setup phase after start.
  The rows per PE of an edge block, ceil(rows / P), come from comparisons with constants. An
  empty call (m = 0 or n = 0) ends at once.
* **Load unit.** Reads C' column by column, `c + col*ldc + row`, and scatters it into the free C
  set. With beta = 0 it writes zeros without reading memory. It waits for `bank_free` before using
  a set again.
* **Exec unit.** Its fetch side reads column kk of A' into the idle A set. It flips the sign of
  each word when alpha = -1. It then reads row kk of B' into a 2*SJ-word FIFO. The fetch side runs
  up to one iteration ahead of the compute side, and continues into the next block. The compute
  side issues `i_eff * cols` multiply-adds per iteration, with the padding rule above.
* **Store unit.** Issues C reads into the PE chain. It collects the answers, and their memory
  addresses, in two 32-entry FIFOs. It writes them out whenever it is granted the port. It only
  issues a read when the FIFO has room for the answer, which arrives P cycles later. Once every
  word of a set has been read out of the PEs, it raises `bank_free`. After the last block it signals done.
* **Memory multiplexer.** One access per cycle, with fixed priority: exec, then store, then load.
  The exec unit's stream is what keeps the PEs busy. The store unit frees the C set that the next
  block needs. Each read carries a tag, which is delayed by the read latency `RD_LAT`, so the data
  goes back to the unit that asked.

`gemm_controller` tracks the operation (idle / running / done). It ORs the three command words
together. `gemm_core` adds the PE array.

## CCU interface

| port | dir | width | use |
|---|---|---|---|
| `clk`, `reset` | in | 1 | clock, synchronous active-high reset |
| `start_op` | in | 1 | start pulse |
| `end_op` | out | 1 | operation complete; stays high until the next `start_op` |
| `xreg_addr` | out | 4 | exchange register being read |
| `xreg_rd_dbus` | in | 64 | its contents, one cycle after `xreg_addr` |
| `mem_rd_en`, `mem_rd_addr` | out | 1, 32 | read request (word address of a 64-bit word) |
| `mem_rd_data` | in | 64 | read data, `RD_LAT` cycles after the request |
| `mem_wr_en`, `mem_wr_addr`, `mem_wr_data` | out | 1, 32, 64 | write |

Exchange registers 0 to 10 hold a, b, c (word addresses), lda, ldb, ldc, m, n, k, alpha and beta.
The matrices are column-major, as in BLAS. alpha and beta are IEEE doubles: the unit uses only the
sign of alpha, and whether beta is zero. After `start_op`, `ccu_ctrl` reads the eleven registers
in 13 cycles and then starts the core.

## Floating-point multiply-add

`fp64_mac` is a 4-stage multiplier (`fp64_mul`) followed by a 7-stage adder (`fp64_add`), for 11
cycles of latency and one operation per cycle. The addend goes through a matching 4-cycle delay.
The product is rounded before the addition, so this is not a fused multiply-add. The
leading-zero count of the adder fits in one stage. On significand overflow, the final rounding
step bumps the exponent.

Numerical behaviour, which a user should know:

* Rounding is to nearest, ties to even.
* Zero is handled exactly. An exact zero sum is +0, unless both operands are -0.
* Subnormal inputs are read as zero, and results below the normal range are flushed to a signed
  zero.
* Overflow gives infinity. Infinities and NaNs get no special treatment, so results computed from
  them are not IEEE-conformant.

Because the product is rounded first and the sums are formed in a fixed order, results are
bit-for-bit equal to a software loop that does `c = c + round(alpha*a*b)` for kk = 0 ... k-1,
starting from beta*C. The testbenches compare against exactly that.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `NUM_PE` | 9 | PEs in the array (P) |
| `SI` | 72 | block rows; must be a multiple of `NUM_PE` (i = SI / NUM_PE) |
| `SJ` | 64 | block columns |
| `RD_LAT` | 1 | read latency of the system memory, in cycles |
| `MUL_STAGES`, `ADD_STAGES` | 4, 7 | pipeline depths, in `gemm_pkg` |

The published configurations with 1 to 8 PEs use (P, SI) = (1, 96), (2, 96), (3, 96), (4, 64),
(5, 80), (6, 96), (7, 112) and (8, 64), all with SJ = 64. Each one is a legal parameter set, and
all of them are simulated by `tb_table2_pe_sweep`. The number of PEs is fixed when the unit is built.
Changing it at run time means loading another configuration into the FPGA.

The field widths in `gemm_pkg` set the upper limits: 256 PEs, 64 Ki C words per PE and 256 rows
per PE.

## Files

`rtl/` holds one module or package per file:

* `gemm_pkg` has the shared types.
* The datapath is `fp64_mul`, `fp64_add`, `fp64_mac`, `dp_ram` (simple dual-port RAM with
  registered read), `sync_fifo` and `gemm_pe`.
* The controller is `block_scheduler`, `load_unit`, `exec_unit`, `store_unit`, `mem_mux` and
  `gemm_controller`.
* `gemm_core` is the controller plus the PE array.
* `ccu_ctrl` holds the parameter registers.
* The top level is `molen_ccu`.

`tb/` has one self-checking testbench per module, named `tb_<module>`. `pe_array_model` is a
behavioural PE array used by the exec-unit and controller tests. There are also two workload
tests at the default size:

* `tb_molen_ccu_full`:
  * m = 144, k = 40, n = 128: two block rows by two block columns, all conditions met.
  * m = 80, k = 17, n = 70 with alpha = -1: edge blocks in both directions.
* `tb_table2_square`: square products with n = 10, 20, 30, 50, 64, 100 and 300.
* `tb_table2_pe_sweep`: eight CCUs running side by side, one per smaller configuration (1 to 8
  PEs), each doing n = 10, 50 and 100. Results and rates are checked as above.

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and has a cycle watchdog.

`tb_molen_ccu` runs six calls at 3 PEs and 6 x 4 blocks. They cover odd sizes, leading dimensions
larger than the matrix, alpha = -1, beta = 0, 1 x 1 x 1 and an empty call. It also counts how
often each mechanism occurred, and fails if any one never did: A set switches, use of both C
sets, loads and stores overlapping computation, PE stalls, padding slots, edge blocks, port
contention, zero loads and alpha = -1. `tb_molen_ccu_lat3` repeats these calls with a memory that answers
three cycles after a read (`RD_LAT = 3`).

## Measured performance

At the default size, with `RD_LAT = 1`:

* **m = 144, k = 40, n = 128.** The run takes 91,327 cycles. Equation (3) predicts 91,208, and
  the pure compute time is 81,920. That is 89.7 % of peak, which equation (3) explains by the
  fill and drain of one block.
* **Square matrices.** The table compares the RTL at 100 MHz with published measurements of the
  original 9-PE hardware. The published numbers also include the software call overhead.

| n | RTL, MFLOPS | published, MFLOPS |
|---|---|---|
| 10 | 378.1 | 330.0 |
| 20 | 751.2 | 722.7 |
| 30 | 974.7 | 959.8 |
| 50 | 1240.1 | 1235.0 |
| 64 | 1274.6 | 1323.0 (for n = 60) |
| 100 | 1589.7 | 1533.7 |
| 300 | 1761.6 | 1758.0 |

The test requires at least 95 % of the published value for each n.

The smaller configurations (1 to 8 PEs, set by parameter overrides) give, for n = 100:

| PEs, SI | 1, 96 | 2, 96 | 3, 96 | 4, 64 | 5, 80 | 6, 96 | 7, 112 | 8, 64 |
|---|---|---|---|---|---|---|---|---|
| RTL, MFLOPS | 198.7 | 391.7 | 570.5 | 782.6 | 970.7 | 1049.5 | 1248.4 | 1475.2 |
| published | 198.7 | 394.7 | 576.8 | 765.3 | 969.6 | 1102.9 | 1246.8 | 1424.4 |

The 6-PE configuration falls behind at n = 100 because 100 rows split into a 96-row block and a
4-row edge block. The edge block computes for only 64 cycles per iteration, which is too short to
hide the store of the 96-row block before it and the load of the one after it. Condition (2) fails
for the edge block, and the PEs wait for memory for about 14,000 cycles. n = 500 and 1000 fit the
design: it needs 3n² words of memory, and the on-chip storage does not depend on n. They were not
simulated because of their length.

## Simulating

Use Verilator 5 with the package first, and let it find the other modules in `rtl/` and `tb/`:

    verilator --binary --timing --assert -y rtl -y tb rtl/gemm_pkg.sv \
              tb/tb_molen_ccu.sv --top-module tb_molen_ccu
    ./obj_dir/Vtb_molen_ccu

Replace `tb_molen_ccu` with any testbench name. Approximate times:

* Block tests: a few seconds.
* `tb_table2_square` and `tb_table2_pe_sweep`: about 5 s each.
* `tb_molen_ccu_full`: seconds.

The memory model in the top-level tests is a plain array, read one cycle after the request
(three in `tb_molen_ccu_lat3`). To try a slower memory, change `RD_LAT` and the model together.

## What is taken from the original design and what is not

The following come from the published design:

* The PE array with two double-buffered stores per PE.
* The unit split into scheduler, load, exec and store units, plus the memory multiplexer.
* Additions-only address arithmetic.
* The 11-cycle multiply-add with a 7-stage adder.
* The block sizes and number of PEs.
* The supported alpha and beta values.
* The performance equations.
* The CCU start/end protocol and parameter list.

The published design does not give the following, so they are choices made here:

* The internal interfaces: the command and read chains, the descriptors and the handshakes.
* The row-to-PE mapping and the local C layout.
* The B FIFO and the FIFO depths.
* The multiplexer priority.
* The padding rule that avoids read-after-write hazards in small edge blocks.
* Exchange-register order and timing, and the alpha/beta encoding.
* Column-major word addressing.
* Subnormals flushed to zero, no special handling of infinities and NaNs, and a non-fused
  multiply-add.

The processor, system memory, exchange-register file and run-time reconfiguration belong to the
surrounding platform, and are not part of this RTL. The testbenches contain simple behavioural
models of the memory and exchange registers.
