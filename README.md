# Static-register-allocation data format converters

A data format converter takes a stream of words in one order and hands them on
in another. Examples are a matrix transposer between the row and column passes
of a 2-D transform, the reordering between two wavelet-filter stages, a zigzag
scanner in an image coder, and the bit interleaver of a radio transmitter. Such
a converter is a small bank of registers plus a controller. Its power is
dominated by how often registers change value.

Classic register-minimising schemes move a word from register to register
while it waits (forward-backward allocation, or shift chains). Each move is a
register transition that burns power. **Static register allocation (SRA)**
writes each word once into a register and leaves it there until it is read
out. Only new words cause transitions, and a word that leaves in the cycle it
arrives is bypassed and causes none. The register count stays at the
lifetime-analysis minimum. The cost is wider multiplexing: any register may
have to load from any input lane and drive any output lane. In return, no
register-to-register wiring and no tri-state buses are needed.

This repository holds synthesizable SystemVerilog for a family of SRA
converters. A single generic engine computes its register schedule at
elaboration time from nothing but the output order. There is also a folded
IIR filter whose delay line uses static allocation.

## The converters

| Module | Conversion | Words/cycle | Iteration | Registers | Latency | Writes per iteration |
|---|---|---|---|---|---|---|
| `sra1d_transposer` (N=16) | NxN transpose, serial | 1 | N² cycles | (N-1)² = 225 | (N-1)² | N²-1 = 255 |
| `sra2d_partransposer` (N=4) | NxN transpose, rows in / columns out | N | N cycles | N(N-1) = 12 | N-1 | N²-1 = 15 |
| `sra2d_dwt` | 1-D DWT (1,4)→(2,2)[8] | 4 | 4 cycles | 8 | 2 | 14 |
| `sra2d_zigzag` | 4x4 zigzag scan | 4 | 4 cycles | 8 | 2 | 15 |
| `sra_wimax_interleaver` (16-QAM) | IEEE 802.16 interleaver, NCBPS=192 | 4 bits | 48 cycles | 168 | 42 | – |
| `sra_wimax_interleaver` (QPSK) | same, NCBPS=96 | 2 bits | 48 cycles | 76 | 38 | – |
| `sra1d_iir` | y(n)=a·y(n-3)+b·y(n-5)+x(n), folded by 2 | 1 per 2 cycles | 2 cycles | 5 + accumulator | 1 | 2 |

"Writes per iteration" is the number of register transitions, which is the
figure SRA minimises. For the stream converters it equals the words per
iteration minus the bypassed words.

The transposers, the DWT converter, the zigzag scanner and the interleaver
are thin wrappers. Each computes its output order as a constant and hands it
to `sra_dfc_core`. `sra_dfc_top` places all of them side by side under one
clock and reset: the 16x16 transposer, the IIR filter, the DWT converter, the
zigzag scanner, the 4x4 par-transposer, and the interleaver in both modes. Each
converter's ports are brought out with a prefix (`t1_`, `iir_`, `dwt_`, `zz_`,
`pt_`, `il16_`, `ilq_`). The converters are independent and exchange no
signals.

## Describing a conversion

A converter is given by three numbers and one table:

* `LANES`: words entering and leaving per cycle.
* `CI`: cycles per iteration. An iteration is one block, such as a matrix or
  an OFDM symbol; blocks follow each other without gaps.
* `W`: word width.
* `OPERM`: for output position `j` of a block (output cycle `j / LANES`, lane
  `j % LANES`), the input position whose word goes there. Entry `j` sits at
  bits `[16*j +: 16]`.

Input position `x` arrives in cycle `x / LANES` of its block, on lane
`x % LANES`. The converter delays all outputs by the smallest latency `D`
that keeps it causal:

    D = max over j of ( OPERM[j] / LANES  -  j / LANES )

It uses `D * LANES` registers. For every converter here this equals the
minimum number of simultaneously live words from lifetime analysis.

## The allocation rules

`sra_dfc_core` runs the following rules in a constant function (`build()`)
when it is elaborated. The result is three small tables: a write code per
input lane and cycle, a read code per output lane and cycle, and a register
permutation `RHO`.

1. **Filling.** In the first `D` cycles after start-up, nothing has been read
   yet, so incoming words take registers in ascending order.
2. **Steady state inside an iteration.** From cycle `D` on, every cycle reads
   `LANES` words out and takes `LANES` words in. A word read in the same cycle
   it arrives is bypassed and takes no register. The registers freed by this
   cycle's reads go to this cycle's new words. The shorter-lived word gets the
   lower register index.
3. **Iteration boundary.** In the first `D` cycles of the next block, the
   outputs still read the previous block's words. The new words again take the
   registers freed in the same cycle. Where possible, a new word takes the
   register its counterpart (same input position) used one block earlier. The
   remaining words take the remaining freed registers in ascending order.

Rule 3 implies that block `k+1` uses block `k`'s assignment renamed by a
fixed permutation `RHO`. Logical register `r` of the first block becomes
physical register `RHO^k(r)` in block `k+1`. `RHO` splits into cycles, which
are groups of registers whose roles rotate among themselves. The allocation
period is the order of `RHO` times the iteration length:

* 16x16 transposer: `RHO` splits the 225 registers into seven groups of 30
  and one group of 15. The period is 2(N-1) = 30 matrices, which is
  2N²(N-1) = 7680 cycles. For the 4x4 transposer the groups have 6 and 3
  registers, and the period is 6 matrices.
* 4x4 par-transposer: three register pairs swap. The period is 2 matrices.
* DWT converter: two pairs swap. The period is 2 blocks (8 cycles).
* Zigzag scanner: `RHO` is the identity. Every block uses the same registers.
* Interleaver: `RHO` is not the identity, so the assignment rotates from
  symbol to symbol.

### Worked example: the 3x3 transposer

This is the default configuration of `sra_dfc_core`. The matrix enters row by
row as a11 a12 a13 a21 … a33 and leaves column by column. `D = 4`, so there
are 4 registers.

| Cycle | In | Written to | Out | Read from |
|---|---|---|---|---|
| 0 | a11 | R1 | – | – |
| 1 | a12 | R2 | – | – |
| 2 | a13 | R3 | – | – |
| 3 | a21 | R4 | – | – |
| 4 | a22 | R1 | a11 | R1 |
| 5 | a23 | R4 | a21 | R4 |
| 6 | a31 | – | a31 | bypass |
| 7 | a32 | R2 | a12 | R2 |
| 8 | a33 | R1 | a22 | R1 |
| 9 | b11 | R2 | a32 | R2 |
| 10 | b12 | R3 | a13 | R3 |
| … | | | | |

Each cycle writes at most one register and nothing ever moves. The second
matrix b starts with b11 in R2 where a11 used R1. The whole assignment has
moved one step along R1→R2→R3→R4→R1, and it returns to the start after 4
matrices (36 cycles).

For the 4x4 transposer the rules give the write sequence
R1 R2 R3 R4 R5 R6 R7 R8 R9 R1 R5 R9 – R2 R6 R1 in the first matrix and
R2 R3 R7 R5 R6 R4 R8 R9 R1 R2 R6 R1 – R3 R4 R2 in the second. This is the
published SRA allocation for that size. The 3x3 table above is the
published one too. `tb_sra_alloc_tables` checks both register by register,
along with the opening cycles of the 4x4 par-transposer, DWT converter and
zigzag scanner.

## Datapath and control

**Register bank.** There are `D*LANES` registers of `W` bits. Each register
loads from one input lane: through an input multiplexer when `LANES > 1`,
directly when `LANES = 1`. Each register has its own write enable. Each output
lane is a multiplexer over all registers plus the input lanes, which serve as
the bypass.

**Schedule counter.** `phase` counts the cycles of an iteration. The write and
read tables are indexed by `phase` and give logical register numbers.

**Pointer table.** `map[r]` holds the physical register that plays logical
register `r` in the current block. Write enables and output selects are the
table entries translated through `map`. At the last cycle of every block the
table is rewired in one step as `map[r] <= map[RHO[r]]`. This is a fixed
permutation of the pointer entries with no arithmetic. It has the same effect
as rotating each register group's control bits by one position per iteration
with barrel shifters. The pointer table costs `D*LANES*log2(D*LANES)`
flip-flops. It works for any `RHO`, including the long rotations of the
interleaver.

**Handshake and timing.**

* `in_valid` high advances the schedule by one cycle.
* With `in_valid` low, nothing is written and nothing advances (a stall).
* `out_data` is combinational from the registers and `in_data` in the same
  cycle.
* `out_valid` rises on the `D`-th advancing cycle after reset and then follows
  `in_valid`.
* `iter_last` marks the last input cycle of each block.
* `rst_n` is synchronous and active low. It clears `phase` and the pointer
  table. The data registers are not reset, because none is read before it is
  written.
* An assertion checks that no two lanes ever write the same register in one
  cycle.

## The individual converters

**Transposers.** Output position `j = c*N + r` carries input `r*N + c`. The
serial version (`LANES = 1`, `CI = N²`) has latency (N-1)². The first column
element a(N,1) is always bypassed. The par-transposer (`LANES = N`, `CI = N`)
takes a row per cycle and returns a column per cycle with latency N-1.

**DWT converter.** Two blocks of eight samples, w0…w7 and w0'…w7', arrive four
per cycle. They leave as rows {w0 w1 w0' w1'}, {w2 w3 w2' w3'} and so on, so
the next filter stage gets sample pairs of both blocks side by side. w0' and
w1' are bypassed.

**Zigzag scanner.** A 4x4 block d1…d16 arrives row by row. It leaves in the
order d1 d2 d5 d9 | d6 d3 d4 d7 | d10 d13 d14 d11 | d8 d12 d15 d16. This is
the anti-diagonal walk, four coefficients per cycle.

**WiMAX interleaver.** Bit `k` of a symbol goes to output position `j` by the
two standard stages:

    i = (NCBPS/16)·(k mod 16) + floor(k/16)
    j = s·floor(i/s) + (i + NCBPS − floor(16·i/NCBPS)) mod s,   s = max(NBPSC/2, 1)

The order is computed by a constant function from `NBPSC` and `NCBPS`. The
same module therefore serves QPSK (`NBPSC=2, NCBPS=96`) and 16-QAM (the
default, `NBPSC=4, NCBPS=192`). A memory interleaver stores a whole symbol and
needs 96 or 192 bits. The SRA version holds each bit only for its lifetime,
which needs 76 or 168 one-bit registers, with latencies of 38 and 42 cycles
instead of 48.

**Folded IIR filter.** One multiplier and one adder are shared over two
cycles per sample. In cycle 0 the filter forms `x(n) + b·y(n-5)`, and in
cycle 1 it adds `a·y(n-3)`. Each y(n) is written once into `hist[n mod 5]`.
That register is next overwritten by y(n+5), just after y(n)'s last use as
y(n-5). So a sample costs two register writes: the accumulator and one
history entry. The number format is signed two's complement. Coefficients
have `CFRAC = 14` fraction bits. Products are shifted right arithmetically
and truncated to `W` bits, and sums wrap. A sample is accepted when
`in_valid && in_ready`, and `in_ready` is high every second cycle. y(n) is
presented with `out_valid` in the next cycle.

## Where this design departs from the SRA reference design

* **Control unit.** The reference rotates per-group control bits with barrel
  shifters. Here a pointer table is permuted by fixed wiring. The behaviour is
  the same, and the area is different.
* **Stall input and reset.** The reference converters take a word every
  cycle. `in_valid` (stall) and the synchronous reset are additions.
* **Interleaver control.** The reference interleaver uses a single-iteration
  schedule to save iteration control. Its register count and latency are the
  same minimal values as here. This design applies the general rules, whose
  assignment rotates from symbol to symbol, and handles that with the pointer
  table.
* **Interleaver datapath.** The reference groups the registers into banks that
  share write signals and uses two-level output multiplexers. Here every
  register has its own write enable and every lane one wide multiplexer.
* **IIR filter.** The reference fold keeps three y registers with two
  transitions per iteration, following an external folding schedule. This
  filter uses its own two-cycle fold and a five-entry round-robin history. It
  keeps the static-allocation property, a single write per value, and also two
  writes per sample.
* **Default sizes.** The transposer defaults to 16x16, the par-transposer to
  4x4 and the interleaver to 16-QAM. The 3x3 and 4x4 transposers, the 16x16
  par-transposer and QPSK are parameter settings of the same modules, and all
  of them are simulated.
* **Power and area.** Figures for a 0.18 µm implementation are not reproduced
  by RTL simulation. The register-transition counts are reproduced: (N²-1),
  14, 15 and 15 per iteration.

## Simulating

Every testbench is self-checking. It ends with a line
`TB_RESULT checks=<n> failures=<m>` and has a watchdog. With Verilator 5:

    verilator --binary --timing -y rtl -y tb --top-module tb_sra_dfc_top tb/tb_sra_dfc_top.sv
    ./obj_dir/Vtb_sra_dfc_top

Replace the top module and file with any other `tb_*`:

| Testbench | What it runs |
|---|---|
| `tb_sra_dfc_top` | The whole top at default parameters, all converters at once, from the ports. |
| `tb_sra_alloc_tables` | 3x3 and 4x4 transposer, 4x4 par-transposer, DWT converter and zigzag scanner schedules compared with the published allocation tables; allocation periods (2(N-1) iterations for the transposers, 2 for the 3x3, 4x4 and 16x16 par-transposers and the DWT converter) and the R3/R5 exchange of the 3x3 par-transposer. |
| `tb_sra_dfc_schedule` | The top at default parameters, watched from inside: pointer-table rotations, allocation periods, and register writes per block. |
| `tb_sra1d_transposer` | 3x3, 4x4 and 16x16 with 16-bit words and 4x4 with 8-bit words, each for one full period plus two matrices. |
| `tb_sra2d_partransposer` | N = 3, 4, 5, 16. |
| `tb_sra2d_dwt`, `tb_sra2d_zigzag` | 100 blocks each. |
| `tb_sra_wimax_interleaver` | 16-QAM and QPSK. |
| `tb_sra_dfc_core` | 3x3 default and a 2-lane block reversal. |
| `tb_sra1d_iir` | Three coefficient sets against a bit-exact reference recursion. |

`tb_sra_dfc_top` runs in well under a second:

* The 16x16 transposer runs one full allocation period (30 matrices) and one
  more matrix.
* The DWT converter, zigzag scanner and par-transposer run 60 blocks each.
* Each interleaver runs 20 symbols.
* The IIR filter runs 500 samples.
* Every stream converter gets random stall cycles.

The stream checker is `tb/dfc_scoreboard.sv`. It compares every output word
with a reference order written from the definition of each conversion. It
also checks the exact latency, `out_valid`, and `iter_last`, and it counts
bypassed words. The top testbench counts a failure for any mechanism that
never happened:

* a converter that never stalled, never bypassed or never finished two blocks;
* a transposer that did not get through a full allocation period;
* an IIR filter that never refused a sample while busy.

`tb_sra_dfc_schedule` uses `tb/rot_monitor.sv` and `tb/write_counter.sv` to
check the allocation itself:

* The allocation periods must be exactly 30 blocks for the 16x16 transposer
  and 2 blocks for the par-transposer and the DWT converter.
* The zigzag pointer table must never move.
* Every block must have exactly 255, 14, 15 and 15 register writes for the
  transposer, DWT converter, zigzag scanner and par-transposer.
* The interleavers' counts are reported. With 191 writes per 16-QAM symbol
  and 95 per QPSK symbol, one bit per symbol is bypassed.

## Changing the design

A new reordering needs only a wrapper that builds `OPERM` as a constant
function and instantiates `sra_dfc_core` with `LANES` and `CI`. Latency,
register count, schedule and rotation follow automatically.

Elaboration cost grows with `CI·LANES·D·LANES`. The allocation runs inside the
tool, so very large converters, with thousands of words per block, take
noticeably longer to elaborate.
