# Hybrid ABFT/TMR integer matrix multiplier

An SRAM-based FPGA in a radiation environment can suffer upsets in its user memories and in the
configuration bits that define its logic. Triplicating a whole matrix multiplier (TMR) masks them,
but it triples the BlockRAMs and DSP multipliers, which are usually the scarce resources.
This design protects a matrix multiplier more cheaply with **algorithm-based fault tolerance (ABFT)**.
Checksums carried through the multiplication protect the datapath and all three matrix memories.
Only the small part that checksums cannot protect, the address generator and its state machine,
is triplicated and majority-voted. This mix is the *hybrid* configuration.

The RTL is parameterised; the defaults are 32-bit integers, 4 processing elements and three
128 x 128-word matrix memories (3 x 16384 x 32 = 1,572,864 memory bits).

The architecture follows the study of ABFT matrix multiplication on Virtex-5 FPGAs by Jacobs,
Cieslewski and George (NSF CHREC, University of Florida). The section "Limits and departures"
lists the choices made here where that description leaves them open.

## The checksum idea

For n x n matrices A and B, let `e` be the all-ones column vector of length n.

* **Column-checksum A.** A row holding the sums of A's columns is appended: `A_c = [A ; eᵀA]`, which
  is (n+1) x n.
* **Row-checksum B.** A column holding the sums of B's rows is appended: `B_r = [B , Be]`, which is
  n x (n+1).
* **Their product.** Because matrix multiplication is associative, the product is the *full
  checksum matrix*:

      A_c · B_r = [ C      Ce   ]        with C = A·B
                  [ eᵀC    eᵀCe ]

  Its last row equals the column sums of its first n rows. Its last column equals the row sums of
  its first n columns.

After the multiplication, the design recomputes the sum of rows 0..n-1 of every column of the
(n+1) x (n+1) result and compares it with the stored row n. The checksum column is included in
these checks. A mismatch means the result is wrong. An upset can hit a stored A, B or C word, a
multiplier, the adder tree or the accumulator; each leaves at least one column inconsistent.

All arithmetic is modulo 2^32, in the products, the sums and the checksums alike. The identity
above holds exactly in that ring, so a fault-free run never gives a false alarm, even when the
products overflow.

**The threshold.** A run reports an error when |recomputed sum − stored checksum| is greater than
the `threshold` input. Zero catches every integer mismatch. A larger value lets applications that
tolerate noise in the low-order bits, such as image processing, ignore small deviations.

**The error flag.** `error_found` is sticky: once set, it stays set until reset, through later
runs as well.

**Detection only.** Correcting a single bad element would be possible. It would need the faulty
row and column indices and a second pass over the column. This design does not do it.

## Datapath: inner-loop parallel multiplication

Each element of C is a dot product of a row of A and a column of B. The datapath (`mm_dot_engine`)
unrolls that inner loop over P processing elements:

    A row group (P words) ─┐   P multipliers   adder tree   accumulator
    B col group (P words) ─┴─> a[l]*b[l] ──> Σ (log2 P) ──> acc (+)= ──> C[i][j]

* It takes one group of P element pairs per cycle, so it finishes one element of C every
  ceil(n/P) cycles.
* When n is not a multiple of P, the lanes of the last group that lie past index n-1 are masked
  to zero.
* It has three register stages: products, tree sum and accumulator. The C write strobe appears
  3 cycles after the last group of an element.

### Memory banking

To feed P lanes per cycle, each matrix memory (`mm_matrix_ram`) is split into P banks. Each bank
is a simple dual-port RAM, which maps onto a BlockRAM.

| memory | bank of element (r,c) | why |
|---|---|---|
| A | c mod P | the P words `A[i][gP..gP+P-1]` of a row group lie in different banks |
| B | r mod P | the P words `B[gP..gP+P-1][j]` of a column group lie in different banks |
| C | c mod P | C is only accessed one word at a time, so any mapping works |

A read returns two things one cycle later. `rd_vec` is the whole aligned group that contains the
addressed element; `rd_word` is the element itself. So the same port serves both the P-wide reads
of the multiplication and the single-word reads of checksum generation, validation and the host.

### Where the checksums live

The checksums are stored in row n of A, in column n of B, and in row and column n of C, inside the
same memories as the data. A 128 x 128-word memory therefore holds data matrices up to
**127 x 127**. A full 128 x 128 data matrix would need 129 x 129 words per memory. That is more
than the 16384 words that fill 16 BlockRAMs per matrix, so it is not supported.

## A run, phase by phase

`mm_addr_gen` steps through four phases after `start`, with 6 idle drain cycles between phases.
The drain cycles let the last writes of one phase land before the next phase reads them.

| phase | what is read | what is written | cycles |
|---|---|---|---|
| GEN_A | A[0..n-1][j], for each column j < n | A[n][j] = column sum | n² |
| GEN_B | B[k][0..n-1], for each row k < n | B[k][n] = row sum | n² |
| MM | A[i][group] and B[group][j], for i, j ≤ n | C[i][j] | (n+1)²·ceil(n/P) |
| VAL | C[0..n][j], for each column j ≤ n | `error_found` if \|Σ − C[n][j]\| > threshold | (n+1)² |

`done` is high 2n² + (n+1)²·ceil(n/P) + (n+1)² + 4·6 + 1 cycles after the edge that samples
`start`. For n = 127 and P = 4 that is 572,955 cycles, of which 524,288 are multiplication. The
checksum work costs about 3n² cycles. Its share of a run falls as n grows or as P grows.

Checksum generation and validation share one extra accumulator, `abft_checksum_unit`. It has no
multiplier of its own, because the checksums are unweighted. The main multipliers are never used
for checksums, so a fault in the datapath cannot corrupt both a result and the checksum it is
checked against.

## The hybrid part: a triplicated controller

Checksums protect data, not control. For example, a faulty address counter could skip elements
or write results to the wrong place. The design therefore keeps all its control state in
`mm_addr_gen`, which holds the phase state machine and the loop counters.

With `TMR_CTRL = 1`, the default:

* Three copies of the controller run in lock step.
* All their outputs pass through a bitwise 2-of-3 voter (`tmr_voter`): read addresses, datapath
  tags, `busy`, `done` and `phase`.
* A fault in one copy is masked.
* `tmr_mismatch` shows that the copies disagree.

There is no resynchronisation of the copies. A copy that went astray stays out of step until the
next reset; it is still outvoted, but a second fault in another copy would then not be masked.

With `TMR_CTRL = 0`, a single controller is used. This is the plain "extra accumulator" ABFT
design, without TMR.

## Interface of `abft_mm_top`

| signal | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset, which clears `error_found` (memories are not cleared) |
| `start`, `n` | in | 1, log2 DIM | start a run on n x n matrices, 1 ≤ n ≤ DIM-1 (n = 0 finishes at once) |
| `threshold` | in | W | tolerated checksum difference |
| `busy`, `done` | out | 1 | run in progress; one-cycle end pulse |
| `error_found` | out | 1 | checksum mismatch seen; sticky until reset |
| `phase` | out | 3 | current phase (`abft_pkg::phase_e`) |
| `tmr_mismatch` | out | 1 | controller copies disagree |
| `host_we`, `host_wsel`, `host_wrow`, `host_wcol`, `host_wdata` | in | | write one word of A, B or C |
| `host_rsel`, `host_rrow`, `host_rcol` → `host_rdata` | in → out | | read one word; data follows one cycle later |

To use it:

1. Load A and B into rows and columns 0..n-1 through the host write port.
2. Pulse `start` with `n`.
3. Wait for `done`.
4. Check `error_found`, then read C[0..n-1][0..n-1].

The host read port is meant for use while `busy` is low. The host write port works at any time.
If the design writes the same memory in the same cycle, the host word is dropped. The testbenches
use writes during a run to model memory upsets.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `W` | 32 | data width (integer, modulo 2^W) |
| `DIM` | 128 | memory size per matrix, DIM x DIM words; power of two |
| `P` | 4 | processing elements; power of two, 2 ≤ P ≤ DIM |
| `TMR_CTRL` | 1 | triplicate and vote the controller |

`abft_pkg` holds the shared enums (`phase_e`, `mat_sel_e`), the defaults and `DRAIN_CYCLES`.

## Files

| file | content |
|---|---|
| `rtl/abft_pkg.sv` | shared types and constants |
| `rtl/abft_mm_top.sv` | top level: memories, datapath, checksum unit, triplicated controller |
| `rtl/mm_addr_gen.sv` | phase state machine and address generator |
| `rtl/mm_dot_engine.sv` | P multipliers, adder tree, accumulator |
| `rtl/abft_checksum_unit.sv` | checksum accumulator, threshold compare, sticky error flag |
| `rtl/mm_matrix_ram.sv` | P-bank matrix memory |
| `rtl/tmr_voter.sv` | 2-of-3 majority voter |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_abft_mm_top_full.sv` | one complete run at the default sizes (n = 127) |
| `tb/tb_abft_mm_pe_scaling.sv` | P = 2, 8, 16 side by side |

## Verification

Every testbench checks its block against values it computes itself. Each one ends by printing
`TB_RESULT checks=<n> failures=<m>`.

* **`tb_abft_mm_top`** runs at DIM = 16. It covers:
  * clean runs for n = 1, 3, 4, 7, 8 and 15, checking every C element, the generated checksums
    and the cycle count;
  * an upset word in A during the multiplication, which is detected;
  * an upset word in C after it was written, which is detected;
  * an upset in the adder-tree register of the datapath, which is detected;
  * an upset in the checksum accumulator while it generates A's checksums, which is detected;
  * a deviation of 3 in one element, tolerated at threshold 3 and detected at threshold 2;
  * an upset counter in one controller copy in the MM phase, and another in the GEN_A phase. Both
    are masked: correct results and no error.

  It counts each of these mechanisms and fails if one never happened.
* **`tb_abft_mm_top_full`** uses the default parameters. It loads random 127 x 127 matrices and
  checks the cycle count and all 128 x 128 results. A second run with one flipped bit in A must
  be detected.
* **`tb_abft_mm_pe_scaling`** checks results and cycle counts for 2, 8 and 16 processing
  elements. The 8-element instance is built with `TMR_CTRL = 0`.
* **The unit testbenches** compare against independent models:
  * `tb_mm_addr_gen` compares the sequencer cycle by cycle with a nested-loop model of the
    expected address stream;
  * the RAM, dot-engine, checksum-unit and voter testbenches compare with reference
    computations.

To run one with Verilator 5:

    verilator --binary --timing --assert -Irtl -y rtl --top-module tb_abft_mm_top \
        rtl/abft_pkg.sv tb/tb_abft_mm_top.sv
    ./obj_dir/Vtb_abft_mm_top

Replace the module name to run any other testbench. The full-size run takes about a second.

The controller-fault test writes straight into one copy's counter through a hierarchical
reference. Verilator therefore prints a MULTIDRIVEN warning for that build, and only for it.

## Limits and departures

* Data matrices are at most (DIM-1) x (DIM-1), that is 127 x 127, because the checksums share the
  memories (see above).
* Only the columns of the result are validated, not its rows. This is enough to detect an error,
  but not to locate the faulty row. One consequence: a fault while B's row checksums are being
  generated goes unnoticed. It corrupts only C's checksum column, which remains consistent with
  itself, and the data part of C is still correct. A fault while A's column checksums are being
  generated is detected.
* There is no error correction and no weighted checksums. Weighted checksums would need a
  multiplier in the checksum unit, and with an all-ones encoder an all-zero corrupted result
  still passes. The weighting is the obvious extension.
* The following are choices of this RTL, not fixed by the architecture: the pipeline depths, the
  loop orders, the 6-cycle drains, the host port, reset behaviour, the signed-magnitude threshold
  compare and the `tmr_mismatch` output.
* Not included: the serial single-MAC variant (P = 1), the shared-accumulator ABFT variant, the
  full-TMR variant, and the UART and fault-injection harness used to test the hardware on an FPGA.
* The RTL targets no particular FPGA. How the multipliers map onto DSP blocks is left to
  synthesis.
