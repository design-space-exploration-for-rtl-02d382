# Sparse matrix-matrix multiplier on a linear systolic array

This is synthesizable SystemVerilog for an FPGA accelerator that computes
C = A·B for square sparse matrices. It takes only the non-zero elements of
A and B, each with its row and column index. It follows the architecture in
*Design Space Exploration for Sparse Matrix-Matrix Multiplication on FPGAs*:

- a chain of P identical processing elements (PEs);
- one multiply-accumulate unit (MACC) per PE;
- double-buffered local stores for A and B;
- a block RAM per PE holding that PE's share of C.

The number of PEs, P, and the problem (block) size, N, are parameters. Trading
them against each other is the purpose of the design. The RTL fills in what
the original design leaves open: stream framing, flow control, result
ordering and pipelining. Those choices are listed in
[Where this implementation makes its own choices](#where-this-implementation-makes-its-own-choices).

## The idea: C as a sum of outer products

C = A·B = Σₖ A[:,k] · B[k,:]. The array works in **phases**. In phase k the
host sends the non-zero elements of column k of A and of row k of B. Every
product a(i,k)·b(k,j) is then added to C[i][j]. With sparse inputs only
nnz(A[:,k]) × nnz(B[k,:]) products exist, and only those are computed.

The columns of C are dealt out to the PEs **round-robin**: PE J owns every
column c with c mod P = J, and keeps rows 0..N-1 of those N/P columns in
its C_MEM. For example, in a 4×4 product with two PEs, PE0 owns columns 1
and 3 and PE1 owns columns 2 and 4 (1-based). So in phase k:

- each PE stores **all** of column k of A (at most N elements);
- each PE stores only the elements of row k of B that fall in **its own**
  columns (at most N/P elements);
- each PE multiplies every stored A element by every stored B element. A is
  the outer loop and B the inner loop, one MACC operation per cycle. Each
  result is added into C_MEM.

Within one phase each (row, column) pair occurs once. So no two operations of
a phase touch the same C word.

## Array structure

```
            A, A_ind, B, B_ind, phase_end, last  ──►
 host ──► PE0 ──► PE1 ──► ... ──► PE(P-1)
 host ◄── PE0 ◄── PE1 ◄── ... ◄── PE(P-1)
            ◄── C results (own words, then forwarded)
            grant ──► (orders the read-out)
```

Only PE0 is connected to the host (the off-chip memory). Each PE does the
following:

- It offers the beat at its input to its A_MEM and B_MEM.
- It registers the beat once and passes it to the next PE.
- It sends results toward PE0 through a C register. That register is loaded
  either from the PE's own C_MEM or from the next PE's C output.

Inside a PE (`spmm_pe`):

| part | module | size at defaults | role |
|---|---|---|---|
| control logic | `spmm_pe_ctrl` | — | bank bookkeeping, pair sequencing, read-out |
| A_MEM | `spmm_a_mem` | 2 banks × N entries (value, row) | column k of A, double-buffered |
| B_MEM | `spmm_b_mem` | 2 banks × N/P entries (value, local column) | owned part of row k of B |
| C_MEM | `spmm_c_mem` | N·N/P words | partial, then final, C of the owned columns |
| MACC | `spmm_macc` | one W×W multiplier, one adder | P = A·B + C on C_MEM words |

Word `a·(N/P) + l` of PE J's C_MEM holds C[a][l·P + J].

## Overlap, stalls and the global enable

A_MEM and B_MEM each have two banks. While bank `rb` is being computed,
bank `wb` is being loaded with the next phase. So the N cycles it takes to
load a dense column overlap the N²/P cycles of computing the previous phase.

The whole chain moves on one **global enable**: `en = &ready`. A PE pulls its
ready low only when a beat that carries something arrives for a bank that is
still full. Every pass register then holds, and the host sees
`in_ready = 0`. Dense inputs make this the normal case, because computing
(N²/P cycles per phase) is much slower than loading (N cycles). Very sparse
inputs rarely stall. `in_ready` depends on the beat offered, so the host must
not make its valid signals depend on `in_ready`. `en` is an AND over all P
PEs. At P = 64 that is a long combinational path, which is the price of a
fully shared stall.

## MACC pipeline and bypass

`spmm_macc` takes one operation per cycle and has two stages:

1. Issue the C_MEM read of the target word, and register a·b. The product
   is signed, shifted right by FRAC and kept to W bits.
2. Add the partial sum returned by C_MEM and write the result back.

C_MEM is a block RAM with read-before-write. If an operation reads the word
that the previous operation is writing in the same cycle, the RAM returns the
stale value. The MACC then uses the sum it has just written instead (the
**bypass**; `bypass_hit` marks it). This can only happen across a phase
boundary, where the last operation of phase k and the first of phase k+1
share a word. Sums wrap modulo 2^W; there is no saturation.

Before a PE reads out C_MEM, its controller waits until the MACC has drained.

## Host interface (`spmm_top`)

**Input, one beat per cycle.** A beat may carry:

- an A element: `in_a_valid`, `in_a`, `in_a_row`, `in_a_col`;
- a B element: `in_b_valid`, `in_b`, `in_b_row`, `in_b_col`;
- both, or neither.

`in_phase_end` marks the last beat of a phase. It may sit on a beat that
carries elements or on an otherwise empty beat. `in_last` together with
`in_phase_end` marks the final phase of the product. A beat is consumed at
the rising edge where `in_ready` is high. The A column index and the B row
index of one beat must both be k (an assertion checks this). A phase whose A
column or B row is empty can be sent as a single empty beat with
`in_phase_end`, or left out, as long as the last phase sent carries `in_last`.
Loading of the next product may start as soon as the last phase of the
current one has been sent.

**Output.** After the final phase, N·N words leave PE0 on `c_valid`/`c_data`,
one per cycle and without gaps, with `c_last` on the final word. The order is:

- PE0's words first, then PE1's, and so on;
- within PE J, word w is C[w div (N/P)][(w mod (N/P))·P + J].

There is no result backpressure: the host must take every word.

**Reset.** Reset is asynchronous and active low. After reset each PE clears
its C_MEM, which takes N·N/P cycles with `in_ready` low. Each C word is also
zeroed as it is read out, so back-to-back products need no further clearing.

**Observation.** `stall`, `phase_done[P]`, `bypass_hit[P]` and
`drain_active[P]` exist only for testing and monitoring.

## Timing

A phase with n_a elements of A, and n_b elements of B owned by PE J, keeps
PE J busy for n_a·n_b cycles. Even an empty phase takes one cycle. For dense
inputs the whole computation takes N + N³/P + P cycles plus a few cycles of
pipeline latency, followed by N² cycles of read-out. Measured, from the first
beat to the last result word:

| N=256, cycles | P=4 | P=8 | P=16 | P=32 | P=64 |
|---|---|---|---|---|---|
| dense | 4 260 103 | 2 162 951 | 1 114 375 | 590 087 | 327 943 |
| 70 % zeros | 473 666 | 294 171 | 203 547 | 153 257 | 124 449 |
| 80 % zeros | 253 993 | 175 579 | 135 193 | 112 506 | 99 658 |
| 90 % zeros | 116 138 | 97 856 | 87 650 | 82 401 | 79 495 |

Each figure includes the 65 536-cycle read-out.

With sparse inputs, adding PEs helps less and less. The per-PE share of B
shrinks towards zero or one element per phase, and the phase count and the
read-out stay fixed. That is why, for very sparse matrices, a small array
gives the best power-delay product.

## Blocking

A problem larger than the on-chip memory allows (N² words of C in all) is
split into b×b blocks, with the array built for N = b. For each N×N output
block (I, J), the host streams all phases k of the full problem. Each phase
is restricted to rows I·b… of A and columns J·b… of B, with block-local
indices. The array accumulates that block of C over all k and reads it out
once. This performs the (n/b)³ block products with (n/b)² read-outs. The
blocking schedule is the host's job; the RTL has no blocking controller.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `N` | 256 | problem or block size; any N divisible by P (need not be a power of two) |
| `W` | 16 | data width of A, B and C |
| `P` | 64 | number of PEs; the evaluated range is 4–64 |
| `FRAC` | 0 | fraction bits of the fixed-point format |

Defaults live in `spmm_pkg`. At the defaults, synthesis reports about 1.84
Mbit of memory: per PE, 2·256 A entries of 24 bits, 2·4 B entries of 18
bits, and 1024 C words of 16 bits.

Compared with the original resource table, the per-PE registers are the
3W + 4·log₂N data and index bits plus a handful of valid and framing bits. The
memories are 2N (A), 2N/P (B) and N²/P (C) entries. A and B entries also
carry their index.

## Where this implementation makes its own choices

These follow the original design:

- the linear chain with host access through PE0 only;
- A/B flowing one way and C the other;
- the A, A_ind, B, B_ind and C registers per PE;
- memory sizes of 2n, 2n/p and n²/p;
- double buffering so that the next phase loads while the current one
  computes;
- one MACC per PE computing P = A·B + C;
- round-robin column ownership;
- A outer, B inner pairing;
- 16-bit fixed-point data at N = 256.

These are choices made here:

- The `phase_end`/`last` framing and the valid bits on each link.
- The global AND-of-ready stall.
- Registered reads from A_MEM/B_MEM.
- The two-stage MACC with bypass.
- FRAC = 0 and wrap-around arithmetic.
- The default P = 64 (the original sweeps 4–64 and names no single default).
- Result order and the grant chain. The grant is raised two cycles early, so
  the read-out has no gaps.
- Clear-after-reset and clear-on-read of C_MEM.
- No backpressure on results.

## Files

- `rtl/spmm_pkg.sv`: default parameters and the read-out state type.
- `rtl/spmm_top.sv`: the array.
- `rtl/spmm_pe.sv`: one PE.
- `rtl/spmm_pe_ctrl.sv`, `rtl/spmm_a_mem.sv`, `rtl/spmm_b_mem.sv`,
  `rtl/spmm_c_mem.sv`, `rtl/spmm_macc.sv`: the parts of a PE.

Testbenches in `tb/` check themselves. Each prints
`TB_RESULT checks=N failures=M`.

| testbench | what it runs |
|---|---|
| `tb_spmm_a_mem`, `tb_spmm_b_mem`, `tb_spmm_c_mem`, `tb_spmm_macc`, `tb_spmm_pe_ctrl`, `tb_spmm_pe` | unit tests of each part |
| `tb_spmm_top` | N=16, P=4: dense (with a cycle-budget check), 70/80/90/50 % zeros, left-out empty phases, a crafted bypass case, back-to-back products; every mechanism (stall, bypass, empty phase, overlap, read-out) must occur |
| `tb_spmm_full` | the top at its defaults: one 90 %-sparse and one dense 256×256 product, checked word by word and against the cycle budget (a few seconds) |
| `tb_spmm_pe_sweep` | N=256 with P = 4, 8, 16, 32, 64 side by side, 0/70/80/90 % zeros (about a minute) |
| `tb_spmm_blocking` | a 768×768 product blocked into b = 96, 128, 192, 256, 384 on 32 PEs, 90 % and 70 % zeros (about 1.5 minutes) |
| `tb_spmm_blocking_dense` | a dense 384×384 product blocked into b = 96, 128, 192, 384 on 32 PEs, with a cycle-budget check (about 30 seconds) |

`tb_spmm_harness.sv` is the shared driver and checker used by the last three.
It waits for each block's read-out before streaming the next block; the array
itself would accept the next block's phases during the read-out.

To simulate with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_spmm_top \
    rtl/spmm_pkg.sv tb/tb_spmm_top.sv -o sim && ./obj_dir/sim
```

Replace `tb_spmm_top` with any testbench name. Lint with
`verilator --lint-only -Wall -Irtl rtl/spmm_pkg.sv rtl/spmm_top.sv`.

## Limits and trust

- All products in the testbenches are checked word for word against a
  reference model. That covers dense and 50–90 % sparse inputs, unblocked
  N = 8…256 and blocked N = 96…384, with P from 2 to 64.
- The dense blocked case is simulated at 384×384. At 768×768 it would take
  about 14 million cycles per block size, so it is not simulated.
- Timing closure, power and energy, which are what the original evaluation is
  about, are not addressed here.
- The all-PE ready AND and the C_MEM address computation (row × N/P +
  local column) feeding the block RAM are the likely critical paths.
- Arithmetic wraps modulo 2^W. A product with large values overflows
  silently, as any fixed W-bit accumulator would.
