# Wide-SIMD with a neighbourhood ring: reductions without reduction hardware

A wide SIMD processor has one control processor (CP) and hundreds of simple
processing elements (PEs) that execute the same instruction in lock-step, each
on its own private data memory. To stay scalable, the PEs are connected only by
a *neighbourhood network*: a ring in which every PE can read the operand of the
PE to its left or right, and nothing else. Anything that travels further moves
one PE per instruction.

Reduction — folding the elements of a vector into one value with an
associative operation (sum, product, min, max, and, or, xor) — looks like a bad
fit for such a ring: a binary reduction tree needs long-distance links. The
idea this design is built around is that no reduction hardware is needed at
all. When there are *many* vectors to reduce, the ring can be used as a
pipeline: each PE combines its own element with the partial result that
arrives from its right neighbour and passes the result on to the left, while
its neighbours are busy with other vectors. Finished results drop out of PE0
into the CP, one per step. The RTL here is the processor (CP, PEs, data
memories, ring); the reductions are programs, supplied with the test benches.

## Block structure

```
                       +-----------------------------------------------+
 prog_* ---> +------+  |  PE slot, broadcast every cycle               |
             |  CP  |--+------+--------+--------+-- ... --+            |
 host_* ---> | IMEM |         |        |        |         |            |
             | DMEM |      +-----+  +-----+  +-----+   +-------+        |
             +------+<-----| PE0 |<>| PE1 |<>| PE2 |...|PE N-1 |        |
                 ^  right  +-----+  +-----+  +-----+   +-------+        |
                 |          DMEM     DMEM     DMEM       DMEM           |
                 +------------------ left (PE N-1) ---------+           |
```

| Module (rtl/) | Role |
|---|---|
| `simd_pkg` | shared types: instruction slot, opcodes, operand-B sources, predicate selectors, ring modes |
| `simd_alu` | combinational 16-bit ALU used by CP and PEs |
| `simd_dmem` | single-port synchronous RAM; PE/CP data memory (512 x 16 = 1 KB) and CP program memory |
| `simd_pe` | one processing element: registers, two predicate flags, ALU, private DMEM, neighbour operand |
| `nbr_network` | the ring, with run-time configurable ends |
| `pe_array` | N_PE PEs plus the ring |
| `simd_cp` | control processor: fetch, branch, own ALU/registers/DMEM, issue of the PE slot |
| `wide_simd` | top level |

Default sizes: `N_PE = 128` PEs, 16-bit data, 512-word (1 KB) data memory per
PE and in the CP, 8 registers per PE and in the CP, 1024-word program memory.

## The instruction word

Each program word has two slots issued in the same cycle: a **CP slot**,
executed by the CP, and a **PE slot**, executed by every PE. This is how a
program says "all PEs shift left while the CP adds what arrives from PE0". A
slot is 28 bits:

| field | bits | meaning |
|---|---|---|
| `op` | 5 | operation (table below) |
| `rd`, `ra`, `rb` | 3 each | destination, operand A register, operand B register |
| `bsel` | 2 | operand B = own register `rb`, left neighbour, right neighbour, or immediate |
| `pred` | 2 | PE only: execute always, if P0, if P1, if P0 and P1 |
| `imm` | 10 | signed immediate; address offset for LD/ST; branch target |

| op | PE | CP |
|---|---|---|
| ADD SUB MUL MIN MAX AND OR XOR | `rd <- A op B` (MIN/MAX signed, MUL low 16 bits) | same |
| MOV | `rd <- B` | same |
| LD / ST | `rd <- DMEM[A+imm]` / `DMEM[A+imm] <- B` | same, on the CP's DMEM |
| CLT CLTU CGE CEQ CNE | predicate flag `P[rd[0]] <- (A cmp B)` | `rd <- 0/1` |
| PEID | `rd <- index of this PE` | no effect |
| BNZ BZ JMP | no effect | branch to `imm` if A != 0 / A == 0 / always |
| HALT | no effect | stop, raise `done` |
| NETCFG | no effect | ring mode `<- imm[1:0]`, boundary value `<- A` |

The encoding, register count and operation set are this implementation's own;
the design only fixes that a PE instruction does one memory or one arithmetic
operation, that any PE instruction can be predicated, that PEs address their
memories independently, and that a PE can read a neighbour's operand.

## What a neighbour reads

A PE does not export a fixed "output register". The value it offers to both
neighbours in a cycle is **its own operand B register, `rb` of the current PE
slot**, read the same way an own-register read would be (including
forwarding). Because all PEs execute the same slot, a slot such as

    MOV r4, right(r4)        ; bsel = right, rb = r4

makes every PE read its right neighbour's `r4` and write it into its own `r4`:
the whole vector shifts one PE to the left in one instruction. The CP reads
PE0's offered value with `bsel = right` (PE N-1's with `bsel = left`), so what
the CP sees also depends on the `rb` field of the PE slot in the same word. A
program that wants the CP to read PE0's `r2` while the PEs do nothing must
still put `rb = r2` in its PE slot (a NOP with `rb` set). The CP offers its own
`rb` of the CP slot to the ring when it sits inside it.

## The ring ends

`nbr_network` joins PE i to PE i-1 and PE i+1. Only the ends can be changed,
at run time with NETCFG:

| mode | PE0 reads on the left | PE N-1 reads on the right |
|---|---|---|
| `NET_RING_PE` (0) | PE N-1 | PE0 |
| `NET_RING_CP` (1) | CP operand | CP operand |
| `NET_BROKEN` (2) | boundary value | boundary value |

The CP always reads PE0 (right) and PE N-1 (left). Reset selects a broken ring
with boundary 0. The reduction programs use the broken ring with the boundary
set to the identity of the combine operation (0 for sum, 0x8000 for signed
max, ...), so the last PE can combine with "nothing" without a special case.

## Pipeline and timing

Four stages: **IF** (CP presents the PC to the program memory), **ID** (word
fetched), **EX** (CP executes its slot, every PE executes the PE slot, memory
accesses are issued, compares set flags), **WB** (register write; a load's
data arrives from the synchronous memory here). WB results are forwarded to EX,
and the neighbour value is forwarded too, so a dependent instruction,
including a load followed by its use, never waits: one word per cycle.

Branches resolve in EX; the two younger words are discarded, so a taken branch
costs 2 extra cycles and a not-taken one nothing. From the `start` pulse, a
program that executes `n` words with `t` taken branches raises `done` after
`n + 2t + 2` clock edges. A value moves one PE per instruction over the ring.

## The three reductions

The programs are generated by `tb/simd_asm_pkg.sv`. Data layout: element j of
vector k is word `k` of PE j's memory (vectors stored "in rows", one element
per PE, V_size <= N_PE); result k is written to word `k` of the CP's memory.
Cycle counts below are for summation and come from the program structure
(they are checked exactly by the test benches).

**Straightforward** (reference). For each vector: all PEs load their element,
then V_size words each shift the vector one PE left while the CP folds the
value arriving from PE0 into an accumulator. Only the CP does useful work.
`cycles = N_Vect (V_size + 6) + 5`.

**Pipelined.** PE j works on vector `k = i - (V_size-1-j)` at step i: it loads
its element of that vector and combines it with the partial result of its
right neighbour (`s <- v + right(s)`), which is the same vector one step
earlier. PEs switch on one by one from the right end (fill), then all V_size
PEs are busy on different vectors, then switch off one by one (drain); the
per-PE condition "this PE has started and has vectors left" is a single
unsigned compare `k < limit` into predicate P1, with `limit = 0` for PEs at or
beyond V_size. From step V_size on, the CP stores one finished result per step.
The fill and drain phases are loops of four words. When N_Vect > V_size the
steady state, where every PE is busy and the CP stores one result per step, is
unrolled eight times: 8 loads, 8 combines with CP stores, and loop control
folded into those words, 19 cycles per 8 vectors. With
`i = floor((N_Vect - V_size) / 8)`:
`cycles = 6 V_size + 6 N_Vect + 8` when i = 0, else
`6 V_size + 6 N_Vect + 7 - 29 i`.

**Diagonal access** (for N_Vect <= V_size). PE j starts at vector
`j mod N_Vect` (a mask when N_Vect is a power of two, otherwise predicated
repeated subtraction) and then walks its own column with wrap-around
(`addr + 1`, reset to 0 when it reaches N_Vect: a compare and a predicated
move, no modulo). Each step every PE combines its next element with its right
neighbour's partial, so partials travel left diagonally through the vectors.
While this runs, the CP stores the partial reaching it from PE0 for vectors
0..N_Vect-2. After N_Vect loads, PE u holds the combination of elements
`u .. u+N_Vect-1` of vector `(u-1) mod N_Vect`; the array then shifts left
V_size times and the CP folds each arriving chunk into result
`(u-1) mod N_Vect`. This shift phase is unrolled (result indices are then
constants): with up to 7 vectors the results live in CP registers and each
shift is one word; with more, each shift is a load, combine and store in the
CP memory (three words). With `m = 1` for a power-of-two N_Vect and
`m = 4 ceil(N_PE / N_Vect) - 2` otherwise:
`cycles = V_size + 10 N_Vect + m + 1` for N_Vect <= 7, else
`3 V_size + 8 N_Vect + m + 2`. The program is short for few vectors, which is
where the pipelined program is slow (it always pays for filling V_size PEs).

**Vectors longer than the array** (V_size > N_PE). Element e of a vector is
stored in PE `e mod N_PE`, ceil(V_size/N_PE) words per vector per PE. A
preliminary program (`gen_fold`) folds each PE's words of every vector into
one word, predicating only the last, partly filled row on the PE index; about
two words per element per PE plus five per vector. Any of the programs above
then finishes the job.

Measured at N_PE = V_size = 128, N_Vect = 100 (sum):

| program | this implementation | published figures for the original processor |
|---|---|---|
| straightforward | 13405 | 18814 |
| diagonal access | 1192 | 1377 |
| pipelined | 1376 | 786 |

Sweep over N_Vect at V_size = 128 (`tb_wide_simd_sweep`), cycles:

| N_Vect | 1 | 2 | 4 | 8 | 16 | 32 | 64 | 128 | 256 |
|---|---|---|---|---|---|---|---|---|---|
| straightforward | 139 | 273 | 541 | 1077 | 2149 | 4293 | 8581 | 17157 | 34309 |
| pipelined | 782 | 788 | 800 | 824 | 872 | 968 | 1160 | 1544 | 1847 |
| diagonal access | 142 | 150 | 170 | 451 | 515 | 643 | 899 | 1411 | - |
| pipelined, V_size = 65 | 404 | 410 | 422 | 446 | 494 | 590 | 782 | 962 | 1266 |

The published figures come from a different instruction set and compiler and
are listed only for orientation. Here the straightforward program is fully
unrolled (cheaper); the pipelined program pays for loop control and a
two-cycle branch penalty in each fill and drain step (6 cycles per step), so
its fixed cost is higher, but its steady state costs 19/8 = 2.4 cycles per
vector, the same growth as the published figures (compare N_Vect = 128 and
256); the diagonal program's shift phase is unrolled. Diagonal access needs
N_Vect <= V_size, hence no entry at 256.

**Image-processing use.** Two steps of an OLED-centre detection on a
120 x 45 8-bit image map onto these programs, with one image column per PE
(120 of the 128 PEs):

- Row projection: 45 row sums of 120 pixels, a reduction with N_Vect = 45 and
  V_size = 120. It takes 998 cycles pipelined and 732 cycles with diagonal
  access. The peak search over the projection, which runs on the CP, is not
  part of the test.
- Cumulative histogram: each PE holds the partial histogram of its column (64
  bins of 4 grey levels here; the bin count is this design's choice). The
  pipelined program merges the 120 partial histograms, 64 vectors of 120, in
  1112 cycles. A CP loop of 8 cycles per bin then forms the running sum, 516
  cycles. A cumulative intensity-area table would be a second CP loop of the
  same kind, which is not tested.

For comparison, the published figures for the whole of each step, including
the CP work, are 970 cycles (row projection) and 2540 cycles (cumulative
histogram and intensity area).

## Host interface and use

All loading happens while the processor is idle (`busy = 0`):

1. write program words with `prog_we`, `prog_addr`, `prog_data` (type `instr_t`);
2. write data with `host_en = host_we = 1`, `host_sel` = PE index
   (0..N_PE-1) or `N_PE` for the CP, `host_addr`, `host_wdata`;
3. pulse `start` for one cycle; execution starts at word 0;
4. wait for `done` (stays high until the next start);
5. read results with `host_en = 1, host_we = 0`; `host_rdata` is valid on the
   next cycle.

Registers, predicate flags, the pipeline and the ring mode reset with `rst_n`
(asynchronous, active low); memories are not reset.

## Simulation

Each test bench in `tb/` is self-checking and prints
`TB_RESULT checks=<n> failures=<n>`. With Verilator 5:

```
verilator --binary --timing -Irtl -Itb rtl/simd_pkg.sv tb/simd_asm_pkg.sv \
    rtl/*.sv tb/tb_wide_simd.sv --top-module tb_wide_simd -o sim
./obj_dir/sim
```

| test bench | what it covers |
|---|---|
| `tb_simd_dmem` | full-size memory: all addresses, read latency, write/idle do not disturb read data |
| `tb_simd_pe` | 6000 random back-to-back PE slots against an architectural model (forwarding, predication, neighbour and immediate operands, loads/stores), then all registers and memory |
| `tb_nbr_network` | 128-PE ring, random operands, all three end modes |
| `tb_pe_array` | 8 PEs: host access, one hop per cycle, left/right reads, CP-in-ring, broken ring, predication by PE index, per-PE addressing |
| `tb_simd_cp` | CP alone: loop, taken/not-taken branches, squashing, exact issue sequence to the PEs, cycle count, data memory, network configuration |
| `tb_wide_simd` | 16 PEs end to end: all three reductions with sum, max, min, xor, product, V_size < N_PE and N_Vect above and below V_size (including 45 vectors of 10 with max, which uses the unrolled steady state), vectors longer than the array (fold, then pipelined), plus a ring program; counts predicated-off instructions, taken branches, left/right/CP neighbour reads, and use of each ring mode |
| `tb_wide_simd_full` | default size (128 PEs): N_Vect = 100, V_size = 128 with all three reductions, V_size = 65 pipelined, a 45-row x 120-pixel row projection (pipelined and diagonal), and a 64-bin histogram merge of 120 partial histograms followed by a CP cumulative-sum loop |
| `tb_wide_simd_sweep` | default size: N_Vect = 1..256 at V_size = 128 (and 65), all three reductions (diagonal up to 128), results and cycle counts checked |

`tb/simd_asm_pkg.sv` is the assembler and the program generators;
`tb/simd_tb_util.svh` holds the host-side tasks and the reference reduction.

## Departures and limits

- The processor's instruction set, register file size, program memory, the
  two-slot word and the host interface are this design's own choices; only the
  architectural features listed above come from the design being reproduced.
- Direction of flow: the CP sits to the left of PE0 and partial results move
  left toward it, each PE reading its right neighbour. Both directions are
  available in hardware, so a program can equally run the other way.
- A dedicated pipelined adder tree is the hardware alternative the ring
  programs are compared against; it is not part of this design and is not
  included.
- Test programs keep loop counts and addresses in 10-bit immediates, so
  N_Vect and V_size up to 511.
- Cycle counts are those of this instruction set and these programs and differ
  from the published figures (see above). Only the pipelined steady state is
  unrolled; there is no zero-overhead loop support, so every other loop
  iteration pays two cycles for its taken branch.
