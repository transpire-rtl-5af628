# TRANSPIRE: a transprecision floating-point CGRA

TRANSPIRE is a small coarse-grain reconfigurable array (CGRA) for
ultra-low-power sensor nodes. It is built to run floating-point kernels
cheaply. It does not use full IEEE binary32 everywhere. Its processing
elements (PEs) compute in two reduced formats and pack several values into
each 32-bit word as SIMD:

| format      | sign | exponent | mantissa | lanes per 32-bit word |
|-------------|------|----------|----------|-----------------------|
| binary16alt | 1    | 8        | 7        | 2                     |
| binary8     | 1    | 5        | 2        | 4                     |

binary16alt has the dynamic range of binary32 with less precision. binary8
has the range of binary16. Eight PEs with four binary8 lanes each give up to
32 floating-point operations per cycle. The array runs programs that a
compiler has scheduled statically, cycle by cycle. There is no dynamic
scheduling, no cache and no instruction fetch from memory. Each PE runs a
short program from its own small instruction file.

This repository is synthesizable SystemVerilog for the whole accelerator: the
PE array, the DMA that loads programs, the context memory, and the banked
data memory (TCDM) with its interconnect. Every block has a self-checking
testbench. The host processor that drives the accelerator is not included.
Its connections are the top-level ports.

## System

```
 host ──ctx_we/addr/data──► context memory (4 KiB) ──► DMA ──context bus (broadcast, PE mask)──┐
 host ──start/ctx_base────► DMA                                                                 │
                                                                                                ▼
            ┌──────────── 4 x 2 PE array, mesh torus between output registers ────────────┐
            │  PE_00*  PE_01*  PE_02*  PE_03        * = tile with divide/square-root unit  │
            │  PE_10   PE_11   PE_12   PE_13                                               │
            └───────── 8 load/store ports ─────────────────────────────────────────────────┘
                              │                       host TCDM port (h_*)
                              ▼                               │
                 TCDM interconnect (9 masters -> 4 banks) ◄───┘
                              │
                 4 x tcdm_bank (2048 x 32 bit) = 32 KiB
```

`transpire_top` parameters: `N_ROWS=2`, `N_COLS=4`, `CTX_WORDS=1024`,
`N_BANKS=4` and `BANK_WORDS=2048`. These defaults are the architecture's
sizes.

To run a kernel, the host does three things:

1. It writes the input data into the TCDM through the `h_*` port. The port
   uses request/grant: hold `h_req` until `h_gnt`. Read data arrives on
   `h_rdata` with `h_rvalid` one cycle after the grant.
2. It writes the kernel's context records into the context memory through
   `ctx_we/ctx_waddr/ctx_wdata`.
3. It pulses `start` with `ctx_base`, the word address of the first record.

The DMA then copies instructions and constants into the PEs and starts the
array. `done` pulses when every PE has executed `EXIT`. `busy` is high from
`start` until `done`. The host port stays usable during a run. It then
competes with the PEs for the banks.

## How the array executes: lock-step, latencies and the global stall

This section explains the parts of the design that are hardest to follow.

**One instruction at a time per PE.** A PE holds one instruction for as many
cycles as its operation takes. It writes the result at the end of the last
cycle, then fetches the next instruction. The Instruction Synchronizer
(`pe_is`) counts these cycles. It raises fetch enable in the last cycle.

| operations                                    | cycles |
|-----------------------------------------------|--------|
| integer ALU, compares, MOV, jumps, NOP, EXIT  | 1      |
| binary32 FABS / FLT (shared mSFU operators)   | 1      |
| stores                                        | 1      |
| binary16alt / binary8 FADD, FSUB, FMUL (SIMD) | 2      |
| loads (request cycle, response cycle)         | 2      |
| FDIV, FSQRT (binary16alt, DS tiles only)      | 5      |

**The compiler owns the timing.** A value produced by a neighbour is read
from that neighbour's output register (OPR). Nothing checks that it is
ready. The schedule must place the read after the producer's last cycle. In
the compiler's data-flow graph, a 2-cycle operation counts as the operation
plus one dummy node. A 5-cycle operation counts as the operation plus four.
The same cycle counts are built into this hardware.

**The global stall keeps the schedule valid.** The only timing the compiler
cannot know is memory contention. Several PEs may address the same TCDM bank
in one cycle, and the interconnect grants one of them. A load/store unit
(`pe_lsu`) whose request is not granted raises `stall_req`. The OR of all
`stall_req` signals freezes every PE. Operand registers, iteration counters
and PCs all hold. So all PEs stay in their relative alignment.

A PE whose request was granted during such a stall remembers this (`served`)
and does not ask again. Its read data arrives while the array is frozen, and
the LSU keeps it in a buffer until the load retires. The run time is
therefore the sum of the latencies on the longest PE program plus the number
of stall cycles. The testbenches check this exactly.

**Conditional jumps are collective.** Compare instructions (`SLT`, `SLTU`,
`SEQ`, `FLT`) write a 1-bit condition register (CR) in their PE. All eight
CR bits go to every PE. `CJMP` carries two targets. It goes to `jt` if the
OR of all CR bits is 1 and to `jf` otherwise. One PE can therefore steer
the loop of all of them. `JMP` always goes to `jt`.

**Start and end.** `start` puts every PE at PC 0 and clears its CR and
synchronizer. A PE stops at `EXIT`. The array is done when all eight have
stopped.

## Instruction word (64 bits)

| bits    | field   | meaning |
|---------|---------|---------|
| 63:58   | op      | opcode (`opcode_e` in `transpire_pkg`) |
| 57      | wr_rrf  | write the result to RRF[rd] |
| 56:54   | rd      | destination register |
| 53      | wr_opr  | write the result to the output register (seen by neighbours) |
| 52:49   | src_a   | operand A selector |
| 48:45   | src_b   | operand B selector |
| 44:40   | crf     | CRF index: constant operand, or FAGU descriptor for LD/ST |
| 39:35   | jt      | jump target / CJMP true target |
| 34:30   | jf      | CJMP false target |
| 29:28   | fmt     | FP: 1 = 2 x binary16alt, 2 = 4 x binary8; LD/ST: 0 word, 1 half, 2 byte |
| 27:12   | ix0-ix3 | four selectors for the FAGU loop indices i, j, k, l |
| 11:0    | -       | zero |

Operand selectors: 0-7 read RRF[0..7]. 8 reads the PE's own OPR. 9-12 read
the OPR of the north, south, west and east neighbour. 13 reads CRF[crf].
14-15 read zero. The torus wraps at the edges. With two rows, north and
south are the same PE.

Stores write operand A. FDIV/FSQRT use the low 16 bits of their operands and
return the result in the low 16 bits. On a tile without a DS unit they
return 0. `tb/transpire_asm_pkg.sv` has the helper `ins()` that packs
instructions by field name.

## Addressing: the FAGU

The compiler rewrites every array access into one index form:
`Variable[(i+A)*(j+B)][(k+C)*(l+D)]`. A load or store names three
consecutive CRF entries starting at `crf`:

```
CRF[crf]   = base byte address
CRF[crf+1] = {D, C, B, A}            four signed 8-bit offsets
CRF[crf+2] = {SH[17:16], ROW[15:0]}  element-size shift, row length in elements
addr = base + ( ((i+A)*(j+B))*ROW + (k+C)*(l+D) ) << SH
```

`i, j, k, l` come from the selectors `ix0..ix3`, usually loop counters in
the RRF. An unused factor takes the zero selector with offset 1. For
example, `C[k][p]` over a row of 8 words is written as ix0 = k with offsets
A=0, B=1, C=p, D=1, ROW=8 and SH=2.

## Floating-point units

**mSFU** (`msfu`) holds two binary16alt slices and four binary8 slices
(`fp_addsub`, `fp_mul`). It also holds one binary32 absolute-value operator
and one binary32 less-than operator, shared by all slices. The
2-cycle operations register their operands at issue and compute in the
second cycle. The unit is not pipelined.

**DS unit** (`ds_unit`) does binary16alt divide and square root in 5 cycles
and sits on PE_00, PE_01 and PE_02. Both operations share one restoring
iteration datapath:

- Cycle 1 unpacks the operands and resolves special cases.
- Cycles 2-4 each produce three bits. Division yields the quotient
  `floor(ma*2^8/mb)` of the 8-bit significands. Square root yields the root
  `floor(sqrt(R*2^7))` of the exponent-adjusted radicand.
- Cycle 5 packs the result.

Numerical conventions in all units:

- Rounding is truncation (toward zero).
- Subnormal inputs count as zero, and results below the normal range flush
  to a signed zero.
- Overflow saturates to the largest finite value, as round-toward-zero does.
- Infinities follow IEEE rules.
- A NaN input, `inf-inf`, `0*inf`, `0/0` and the square root of a negative
  number give the quiet NaN `0x7FC0` (binary8: `0x7E`).
- Less-than is false when either operand is NaN, and `-0 < +0` is false.

## Loading a kernel: context records

The context memory holds records. Each record is a header word followed by
entries:

```
header: [31] last record   [18] 1 = CRF, 0 = IRF   [17:13] count
        [12:8] first register index   [7:0] PE mask (bit n = PE n, row-major)
entries: CRF -> one word each; IRF -> two words each (low half, then high half)
```

The DMA reads one word every two cycles. It puts each complete entry once on
the context bus, together with the mask. A program or constant shared by
several PEs is therefore sent once. A record with count 0 and the last bit
set ends the list. Each PE has 21 instruction slots and 20 constant slots.

## Memory system

The TCDM is four banks of 2048 x 32 bits. Words are interleaved: byte
address bits [3:2] select the bank, and bits [14:4] select the row.

The interconnect (`tcdm_interconnect`) has 9 masters: PE 0-7 and the host as
master 8. Each bank has a round-robin arbiter, so a waiting master is served
within 9 cycles. The grant comes in the request cycle. The response comes in
the next cycle. Byte enables support half-word and byte stores. Half-word
and byte loads are zero-extended.

## Files

`rtl/` holds one module or package per file:

| file | block |
|------|-------|
| `transpire_pkg.sv` | instruction word, opcodes, selectors, latencies, bus types |
| `transpire_top.sv` | system top |
| `pe_array.sv` | 4x2 array, torus, CR broadcast, global stall, done |
| `pe.sv` | processing element, including the OPR |
| `pe_controller.sv` | PC, jump target (JR), condition register (CR), EXIT |
| `pe_is.sv` | instruction synchronizer |
| `irf.sv`, `crf.sv`, `rrf.sv` | instruction, constant and regular register files |
| `pe_alu.sv` | integer ALU |
| `msfu.sv`, `fp_addsub.sv`, `fp_mul.sv` | mini-smallFloat unit and its slices |
| `ds_unit.sv` | divide/square-root unit |
| `pe_fagu.sv`, `pe_lsu.sv` | address generation, load/store unit |
| `tcdm_interconnect.sv`, `tcdm_bank.sv` | data memory |
| `context_memory.sv`, `dma_controller.sv` | configuration path |

`tb/` holds `tb_<block>.sv` for each block. It also holds `fp_ref_pkg.sv`,
the reference floating-point arithmetic built on `real`. Its results are
exact for the operand ranges the tests use. `transpire_asm_pkg.sv` holds
the instruction and record packing helpers.

## Simulating

Any testbench builds the same way with Verilator 5. For example, the
end-to-end test at full size:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb \
  tb/fp_ref_pkg.sv rtl/transpire_pkg.sv tb/transpire_asm_pkg.sv \
  tb/tb_transpire_top.sv --top-module tb_transpire_top
./obj_dir/Vtb_transpire_top
```

Each testbench prints `TB_RESULT checks=N failures=M` and has a cycle
watchdog. The end-to-end test `tb_transpire_top` runs as follows:

- It loads data and context through the host ports.
- Every PE computes `Z[p][k] = A[p] + B[p]*C[k][p]` over 16 iterations.
  PEs 0-3 use binary16alt SIMD and PEs 4-7 use binary8 SIMD. The loads come
  through 2-D FAGU addressing.
- Each PE then stores its west neighbour's OPR.
- PE_00 adds a divide and a square root.
- The host reads the TCDM while the array runs.
- The test checks every result against reference arithmetic.
- It checks that the run takes the longest schedule (180 cycles) plus the
  counted stall cycles.
- It checks that each mechanism occurred: stalls, loop jumps and the loop
  exit, multi-PE broadcast, DS operations, both SIMD formats, the torus read
  and host contention.

Six more system tests run small versions of typical kernels. They use one
program broadcast to the PEs, and check every result and the exact
run time:

- `tb_conv5x5` runs a 5x5 binary8 convolution, from a 12x12 input to an
  8x8 output. The four SIMD lanes carry four image tiles. Each PE computes
  one output row in three nested loops. It needs about 2600 scheduled
  cycles plus about 2900 stall cycles, because every PE loads its weights
  from the same bank.
- `tb_mean_covariance` computes the mean and covariance of 16 samples of
  16 binary16alt variables, the first step of a principal component
  analysis. It runs as two kernels. The host loads and starts them one
  after the other, since the whole program needs more than 21 instruction
  slots. The second kernel reads the means the first one stored.
- `tb_dwt` runs one level of a Haar wavelet transform in binary8 over 64
  words, with a stride of two in the FAGU input addresses.
- `tb_householder` normalises an 8-element binary16alt vector on each of
  the three DS tiles: a sum of squares, a square root, then one divide per
  element. The other five PEs exit at once.
- `tb_svm` runs the prediction stage of a linear support vector machine in
  binary8. It covers 32 test samples, four per PE, against 8 support
  vectors of 8 features.
- `tb_pca_projection` projects 16 binary16alt samples of 16 features onto
  4 principal components, as a matrix product on all eight PEs.

The other tests cover each block alone:

- binary8 add/sub/mul over all finite operand pairs.
- Random binary16alt operations and divide/square root, with stalls inserted.
- The interconnect: fairness, one grant per bank, and read data.
- The LSU under random grants and stalls.
- The PE: exact cycle counts with and without stalls.
- The array: torus wiring, CR broadcast and DS placement.

## Departures, choices and limits

The architecture fixes the following, and this RTL follows them:

- the block structure of the PE and the system;
- the 4x2 array, with DS units in the first three tiles;
- the memory sizes: IRF 21x64 bits, CRF 20x32 bits, 4 KiB context memory,
  and a 32 KiB TCDM in 4 banks;
- the mSFU slice counts and formats, and the operator latencies;
- truncation rounding in the DS unit;
- the two-target conditional jump on the OR of the CR bits;
- the FAGU index form.

This design chose the following itself:

- **Instruction encoding, operand selectors, FAGU descriptor layout and
  context record format.** None of these is specified by the architecture.
  Programs for another encoding need an assembler for this one.
- **Regular register file:** eight 32-bit registers. The size is given as
  "32x8 bits". Eight registers are used because each register must hold a
  full 32-bit SIMD word.
- **mSFU rounding and subnormals:** truncation and flush-to-zero in the add
  and multiply slices too. The architecture only states truncation for the
  DS unit.
- **DS unit:** scalar, on the low half of the operands. It uses its own
  radix-8 restoring algorithm. The original unit is derived from a larger
  divide/square-root design and is not described further.
- **Interconnect:** a single-stage crossbar with round-robin arbitration
  stands in for the logarithmic interconnect. Latency and bank mapping are
  choices.
- **Global stall on any ungranted memory request, and the host handshake**
  (one `start` for load and run, `done` pulse).
- **Execution order:** a PE executes one instruction at a time. The mSFU
  operators are described as non-blocking. Here that only means a new
  operation may be issued in the cycle after the previous one retires.
- **Memory contents:** the TCDM banks and the context memory are not reset,
  as SRAM macros are not. All registers are reset asynchronously (`rst_n`
  active low).

Not included:

- the host processor, its instruction cache and the SoC bus;
- the binary32 variant of the array used for comparison;
- the compiler: scheduling, binding and the assembler.

Memories are plain arrays. A silicon version would replace them with SRAM
macros.
