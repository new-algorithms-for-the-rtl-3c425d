# Matrix-chain accelerator on a linear systolic array

The product C = A1 · A2 · … · As of a series of rectangular matrices can cost very different
amounts of work depending on the order of the multiplications. Take ten matrices, 10×3 and 3×10
in turn. Left to right, every step multiplies a 10-row matrix and costs 300 multiply-adds: 2,700
in total. Split the series at the first 3-row matrix and the cost drops to 1,020. Split it at
every 3-row matrix and it drops to 831.

This RTL implements an accelerator that supports all three orders. A host loads the series into
the buffer memory of an **interface unit (IU)**. The IU decides where to split the series. It then
streams the matrices through a **linear systolic array of K processing elements (PEs)**, one
element per clock, and collects the result in its buffer. The architecture and the three orders
follow the paper "New Algorithms for the Multiplication of Series of Rectangular Matrices and
Their Parallel Implementations" (Wyrzykowski, Piech, Kanevski, Lepecha). Word widths, the control
encoding, the unloading scheme and all timing details are this implementation's own. They are
listed under "Own choices and departures" below.

```
 host ── IU (buffer memory, sequencer, token generator) ──► PE0 ─► PE1 ─► … ─► PE(K-1) ─┐
          ▲                                                                             │
          └─────────────────────────── results ─────────────────────────────────────────┘
```

## How one chain product runs on the array

The building block is a **chain product**, which multiplies consecutive matrices in one of two
directions.

**Left to right (LR).** PE *p* holds row *p* of the first matrix in its local memory. The next
matrix then flows through the array **column by column**. Every PE multiplies each arriving
element by the matching element of its resident row and adds the product to a running sum. When
the last element of a column has passed, the PE has formed one element of row *p* of the
product. It writes that element into its second memory bank, at the column's index. After the
whole matrix has passed, a SWAP makes the second bank resident. PE *p* now holds row *p* of
A1·A2, and the next matrix can follow straight away. Nothing is written back to the buffer
between the factors of a chain.

**Right to left (RL).** This is the mirror image. PE *p* holds **column** *p* of the last matrix.
The preceding matrices flow through **row by row**, from right to left, so each PE accumulates a
column of the product. The same PE hardware does both: either way it takes the dot product of a
streamed vector with a resident one. The IU alone decides whether that vector is a row or a
column.

**Passes.** With K PEs only K rows (or columns) can be resident at once. A product whose resident
side has N vectors is therefore done in L = ⌈N/K⌉ passes:

1. load K vectors;
2. stream every other matrix once;
3. unload the K result vectors;
4. repeat for the next K vectors.

The resident matrix is loaded once in total, and every streamed matrix passes L times. Counting
one multiply-add per PE per clock, the work of a product is

    T = Q_first + L · Σ Q_streamed          (Q = number of elements of a matrix)

This is the execution-time measure used throughout the paper.

**Tokens.** Every array slot carries one `token_t` (`mat_pkg.sv`), an opcode plus one data word:

| op     | who acts               | effect |
|--------|------------------------|--------|
| `LOAD` | PE `pe`                | resident bank word `k` := `data` |
| `MAC`  | every PE               | `acc := (first ? 0 : acc) + resident[k]·data`; when `last`, other bank word `v` := acc |
| `SWAP` | every PE               | exchange the roles of the two banks |
| `READ` | PE `pe`                | `data := resident[k]`; `tag` is the buffer address of this word |

Every PE forwards every token to its right neighbour one clock later, through its output register
R. The array is therefore a K-stage pipeline with a throughput of one token per clock. The IU
feeds PE 0. Tokens that leave PE K−1 come back to the IU, which writes each `READ` word to the
buffer address in its `tag`. Unloading thus uses the same pipeline and needs no extra wiring.
Token order is preserved, so the next pass can start loading while the last results are still
on their way out.

## Choosing the split points

`chain_ctrl` turns one command into a list of chain products. `min_search` supplies the split
points. The minimal matrices are found from the row counts N_i:

* **Natural order (`ALG_NATURAL`)**: one LR product over A1…As. Every matrix passes ⌈N1/K⌉ times.
* **Single minimum (`ALG_SINGLE_MIN`)**: Aj is the first matrix with the fewest rows. The steps
  are:
  * B1 = A1…A(j−1), right to left. The columns of A(j−1) are resident; A(j−1) has N_j columns.
  * B2 = Aj…As, left to right.
  * C = B1·B2.

  Most matrices now pass only ⌈Nj/K⌉ times.
* **All minima (`ALG_ALL_MIN`)**: a matrix counts as *minimal* when it needs as few passes as the
  best one, that is ⌈N_i/K⌉ = min ⌈N/K⌉. This forms the list L_min. Dropping every member whose
  left neighbour is also minimal gives L_fin = t1 < … < tr. The steps are:
  * C_j = A(tj)…A(t(j+1)−1), for j < r;
  * B2 = C_1…C_(r−1);
  * B3 = A(tr)…As;
  * B1 = A1…A(t1−1), right to left;
  * C = (B1·B2)·B3.

  The last step is done as one LR product with B1's rows resident.

A "product" of a single matrix (for example B1 = A1 when j = 2) is not run. The descriptor
simply names that matrix. Intermediate matrices are placed one after another in the buffer,
behind the inputs, and the space is reused by the next run. The host chooses the order.
Whichever order is chosen, the result is the same bit for bit, because the arithmetic is integer
arithmetic modulo 2^32 and is therefore exactly associative.

## Measured against the published execution times

`tb_matchain_full` runs the four 15-matrix series that the paper evaluates. The IU counts the
LOAD and MAC tokens it issues (`n_load + n_mac`). The table compares this count with the
published execution times for K = 10.

| series (N1 … M15) | natural order | single minimum | all minima (published / here) |
|---|---|---|---|
| 1: 20 40 40 60 80 20 100 60 20 50 40 20 60 40 60 50 | 65,600 | 65,600 | 66,600 / 65,800 |
| 2: 60 80 80 50 80 60 80 50 80 100 50 100 50 100 80 100 | 460,800 | 405,000 | 391,500 / 391,500 |
| 3: 100 100 100 100 40 80 20 60 20 80 20 40 100 20 100 100 | 542,000 | 145,600 | 147,200 / 147,200 |
| 4: 200 200 200 200 50 100 50 800 60 500 50 600 60 800 50 400 | 8,380,000 | 2,635,000 | 2,352,500 / 2,332,500 |

* **Natural order and single minimum** match the published values exactly. The same holds for
  every other K in the paper, checked with the pass model above.
* **All minima** matches for series 2 and 3. For series 4 this design is 20,000 steps lower. The
  last minimal matrix is A15 there, and the published count still charges for loading it as its
  own one-matrix product B3. This design skips that load. The published notes on that case say
  the load should indeed be free. For series 1 the published count is higher by exactly
  ⌈N_min/K⌉·N_min², at every K. It charges one more N_min×N_min matrix streamed through the array
  while B2 is formed than B2 = C_1…C_(r−1) needs.

Clock counts are slightly higher than step counts. They add unloading (one clock per result
word), one SWAP per streamed matrix and about K clocks of pipeline drain per product. For series
4 in natural order the run takes 8,460,297 clocks for 8,380,000 steps.

## The processing element

`pe.sv` contains the four parts of the paper's PE diagram:

* **local memory** (`pe_local_mem`): two banks of MAXD words, with asynchronous read and clocked
  write. One bank is resident; the other receives the vector being formed.
* **switch SW** (`pe_switch`): combinational. It decodes the incoming token and steers the input
  word, the memory word and the adder output.
* **multiplier M and adder A** (`pe_mac`): one multiply-add per clock into an accumulator that
  feeds back to the adder.
* **output register R**: holds the token passed to the next PE.

Everything a PE does with a token happens in the clock the token enters. The MAC reads the
resident bank and writes the other one, so reads and writes never collide.

## Interface unit and host protocol

`iu.sv` holds three parts:

* `iu_buffer`: 1 Mi × 32-bit words, one synchronous read port and one write port;
* `iu_executor`: runs one chain product (load, stream, swap, unload, drain);
* `chain_ctrl` with `min_search`: works out the products of a run.

The host side of `matchain_system`:

1. While `busy` is low, write the series row-major with `host_we/host_addr/host_wdata`. A1 goes
   at address 0 and each matrix directly after the previous one. Buffer accesses from the host
   are ignored while `busy` is high.
2. Set `s` (the number of matrices), `dims[0..s]` = N1 … Ns, Ms and `alg`. Pulse `start`.
3. Wait for the `done` pulse. `result` gives the base address, rows and columns of C.
4. Read C with `host_rd_en`. Data arrives one clock later on `host_rdata`.
5. `n_load`, `n_mac` and `n_cycles` report the step and clock counts of the run.

The executor's buffer read adds one clock between address and token. It issues exactly one token
per clock while busy, so the array is never starved inside a product.

## Parameters and limits

| parameter | default | meaning |
|---|---|---|
| `K` | 10 | number of PEs. The paper evaluates 2 … 60; 10 appears in all its tables. |
| `MAXS` | 15 | longest series (the evaluated series have 15 matrices) |
| `MAXD` | 800 | words per PE memory bank = largest matrix dimension (the largest evaluated) |
| `BUF_DEPTH` | 2^20 | buffer words. The largest evaluated series needs 457,000 words plus up to 110,000 for intermediates. |

The fixed widths in `mat_pkg` are:

* data: 32 bits;
* dimensions and PE word addresses: 10 bits, so up to 1023;
* PE index: 8 bits, so K ≤ 256;
* buffer address: 20 bits.

Matrices must chain (the columns of A_i equal the rows of A(i+1)). This is not checked.

## Own choices and departures

* **Number format.** 32-bit integers, wrapping. The paper does not fix a format. Floating point
  would need a different M and A and would make the three orders differ in rounding.
* **Unloading.** The paper leaves unloading out of its timing and does not describe it. Here,
  READ tokens travel through the array and the results return to the IU via the last PE.
* **Link direction.** The paper's system diagram shows links in both directions between
  neighbouring PEs. Only the left-to-right direction is used.
* **Pass count.** The pass count is always ⌈N/K⌉. One formula in the paper writes ⌊N/K⌋, and
  its interval for minimal matrices is written so that it would exclude N_min itself when N_min
  is a multiple of K. The ceiling form is the one that reproduces the published values, so that
  form is used.
* **Programs for the all-minima order.** The pseudo-code listings for this order disagree with
  its step-by-step definition, in the ranges of C_j, B3 and L_fin. The step-by-step definition is
  followed. It is also the one that reproduces the 831-operation example.
* **Choice of order.** The host chooses the order. The paper notes that the best order can be
  chosen per series, but no automatic selection is built.
* **Buffer placement.** The buffer memory sits inside the IU. The alternative of using host
  memory is not built.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and finishes. For example:

```
verilator --binary --timing --assert -Irtl rtl/mat_pkg.sv tb/tb_matchain_system.sv \
          --top-module tb_matchain_system -Mdir obj && obj/Vtb_matchain_system
```

(Add `-Wno-fatal` if your Verilator version turns lint warnings into errors.)

| testbench | what it covers |
|---|---|
| `tb_matchain_system` | End to end with K = 3. Covers all three orders on fixed and random series, the result against a reference product, the step count against a pass model, and a count of each mechanism: several passes, a single pass, RL products, one-matrix products and L_fin drops. |
| `tb_matchain_full` | Default parameters. Runs the four evaluated 15-matrix series in all orders and checks both products and step counts. About 20 s in Verilator. |
| `tb_iu`, `tb_iu_executor`, `tb_chain_ctrl`, `tb_min_search` | the interface unit and its parts |
| `tb_linear_array`, `tb_pe`, `tb_pe_switch`, `tb_pe_mac`, `tb_pe_local_mem` | the array and the PE parts |
| `tb_iu_buffer` | the buffer memory |

## Files

All files are in `rtl/`, one module or package per file:

* `mat_pkg.sv`: shared types and constants;
* `matchain_system.sv`: the top level, with the IU and the array;
* `iu.sv`, `iu_buffer.sv`, `iu_executor.sv`, `chain_ctrl.sv`, `min_search.sv`: the interface unit;
* `linear_array.sv`, `pe.sv`, `pe_switch.sv`, `pe_mac.sv`, `pe_local_mem.sv`: the array.

The testbenches are in `tb/`.
