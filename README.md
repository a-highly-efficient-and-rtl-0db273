# DRAGON: a SIMD/VLIW many-core overlay in SystemVerilog

DRAGON is a grid of 144 small 64-bit processing elements (PEs). They all
execute the same instruction stream in lockstep, and each is wired directly to
its four neighbours. It is built for FPGA boards that carry high-bandwidth
memory, and it targets regular scientific kernels such as stencils: every PE
owns a piece of a grid, updates it with double-precision multiply-accumulates,
and swaps boundary values with its neighbours every iteration.

Three ideas make it efficient:

* **Two-slot VLIW words.** Each instruction word has two slots. One computes
  (integer ALU or FPU). The other moves data (local memory, neighbour
  buffers, broadcast memory). Communication can therefore hide behind
  arithmetic.
* **Direct operands from outside the PE.** An arithmetic instruction can take
  its second operand straight from a neighbour's input buffer or from the
  cluster's broadcast memory, without a load first.
* **A fused multiply-accumulate chain.** The FPU keeps an accumulator, so a
  stencil point of k terms costs k back-to-back instructions.

With those, a 5-point stencil keeps the FPUs busy nearly every cycle. The
included testbench measures 86–90 % of peak floating-point throughput in the
inner loop.

This repository holds synthesizable RTL for the whole overlay, a
self-checking testbench for every block, and an end-to-end testbench. That
testbench runs 2D Laplace and 5-point Jacobi stencils on 48×48, 96×96,
192×192 and 384×384 grids over all 144 PEs.

## Structure

```
dragon_top
├── sequencer                      controller front end
│   ├── axil_ctrl                  AXI-Lite registers (host interface)
│   ├── control_unit               boot / run FSM, PC, C-type instructions
│   │   └── loop_stack             7-level REPEAT/BNZ hardware stack
│   ├── instr_mem                  512 KiB IM: 8 banks x 4096 x 128-bit
│   └── im_dma                     AXI4 reader: program GM -> IM (boot)
├── data_dma  x9                   AXI4 master, GM bank <-> 16 BM banks
└── broadcast_cluster  x9          (3 x 3 grid)
    ├── bm_bank  x16               4096 x 64 broadcast memory, one per PE
    ├── bmc                        broadcast memory controller
    └── pe  x16                    (4 x 4 mesh)
        ├── regfile                256 x 64, 3 read / 2 write ports
        ├── alu64                  64-bit integer ALU
        ├── fpu_mac                double-precision FMA with accumulator
        ├── local_mem              4096 x 64 LM
        └── nbuf_fifo  x4          N / E / W / S input buffers (512 deep)
```

`dragon_pkg` holds the instruction format structs, the opcode and operand
codes, the AXI4 and AXI-Lite structs, and the register map.

The clusters tile into one 12×12 mesh of PEs. The mesh is open, not a torus.
Links that would leave it are brought out as the top's `mesh_*` ports, which
gives a host-side model or a second device a place to connect. If they are
unused, tie the inputs to 0. The high-bandwidth memory itself and the
PCIe/host shell are outside the RTL. Each cluster's data DMA has its own
1024-bit AXI4 master port (`m_axi_gm_*`), the instruction DMA has another
(`m_axi_im_*`), and the host talks to `s_axil_*` and receives `irq`.

## The instruction word

A VLIW word is 128 bits.

* **Slot 1** (bits 63:0) is the compute slot. It carries R-type and C-type
  instructions.
* **Slot 2** (bits 127:64) is the memory slot. It carries LM-type, BM-type
  and N-type instructions.

The sequencer sends the same word to every PE and every broadcast memory
controller in the same cycle. Fields are packed most-significant first:

| format | fields (MSB → LSB, widths) |
|---|---|
| R (slot 1) | opcode 6, Src1 8, mode 2, Lmaddr 12, BrOffset 4, Bmaddr 12, Src2 8, RDst/NDst 8, OPSrc 4 |
| LM: LD/ST (slot 2) | opcode 6, –, Lmaddr 12 [47:36], Src2 [19:12] for ST, RDst [11:4] for LD |
| BM: STBM (slot 2) | opcode 6, –, mode [49:48] (0: RF[Src2]; 1: LM[Lmaddr]; 2: the ALU/FPU result of the slot-1 instruction in the same word), Lmaddr 12, Bmaddr [31:20], Src2 [19:12] |
| BM: LDBM (slot 2) | opcode 6, Mask_load 8, mode 2 (bit 0: broadcast), Lmaddr 12, BrOffset 4, Bmaddr 12, –, data_count 12 |
| N (slot 2) | opcode 6, –, mode 2, Lmaddr 12, –, Src2 8, NDst 8 (one-hot), NSrc 4 (one-hot) |
| C (slot 1) | opcode `111111`, Function 6, then per function (below) |

**Opcodes.** NOP 0, LDIMM 1, ADD 2, SUB 3, AND 4, OR 5, XOR 6, SLL 7, SRL 8,
MUL 9 (32×32 → 64, unsigned), FADD 10, FSUB 11, FMUL 12, FMACCA 13, FMACCS 14,
LDBM 16, STBM 17, LD 18, ST 19, NSG 20, BFLUSH 21, NPASS 22, NST 23, C-type 63.

**Directions.** These are one-hot everywhere: N = bit 0, E = bit 1,
W = bit 2, S = bit 3. A word sent South lands in the South neighbour's
*North* buffer.

**Second operand of R-type instructions (OPSrc).**

| OPSrc | operand |
|---|---|
| 0 | RF[Src2] |
| 1 | 16-bit immediate {BrOffset, Bmaddr}, sign-extended |
| 2 | this PE's own BM bank at Bmaddr |
| 3 / 4 / 5 / 6 | head of the N / E / W / S input buffer (popped) |
| 7 | PE id |
| 8 | BM broadcast: bank BrOffset at Bmaddr, same word for every PE |

**R-type mode: where the result goes.**

| mode | destination |
|---|---|
| 0 | RF[RDst] |
| 1 | RF[RDst] and LM[Lmaddr] |
| 2 | scatter to the directions in NDst[3:0] |
| 3 | LM[Lmaddr] and scatter |

LDIMM spans both slots: slot 1 holds the upper 16 bits of the constant in
[35:20], and slot 2 holds the lower 48 bits in [47:0].

**N-type instructions.**

* NSG sends RF[Src2] to every direction set in NDst.
* NPASS forwards the head of the buffer selected by NSrc to the NDst
  directions.
* NST stores that head to LM[Lmaddr].
* BFLUSH empties the buffers selected by NSrc.

**C-type functions.**

| function | code | behaviour |
|---|---|---|
| REPEAT | 1 | Bits [51:32] hold the count n. The body that follows runs n times. Up to 7 loops can be nested. |
| BNZ | 2 | Closes the innermost loop. Always has one delay slot, which runs on every pass. |
| RDGMEM | 3 | GM → BM (see below) |
| WRGMEM | 4 | BM → GM (see below) |
| STOP | 5 | Ends the program and raises the interrupt. |

For RDGMEM and WRGMEM, slot 1 carries three fields:

* Burst Size in [51:44], holding the beat count minus 1;
* BMOffset in [43:32];
* the upper half of the GM byte offset in [31:0].

Slot 2 [31:0] carries the lower half of the GM byte offset. Each beat is 128
bytes, one 64-bit word for each of the 16 BM banks at the same BM address. A
single transfer must stay inside a 4 KB page, so at most 32 beats.

The testbench package `tb/dragon_asm_pkg.sv` has one encoder function per
format.

## PE pipeline and static scheduling

The PE has seven stages and no interlocks. The program, which is the same for
every PE, must respect the latencies below. A word enters Decode in cycle t:

| cycle | stage | what happens |
|---|---|---|
| t | Decode | Register-file and LM read addresses are applied. |
| t+1 | EX1 | Operands are valid. The OPSrc source is selected and buffer heads are popped. The ALU evaluates. The FPU unpacks. |
| t+2 | EX2 | FPU multiply |
| t+3 | EX3 | FPU add / accumulate |
| t+4 | Mem1 | LM write (mode 1/3, ST, NST) |
| t+5 | Mem2 | Scatter leaves on the neighbour links. The STBM write goes to the PE's bank. |
| t+6 | WB | Register-file write |

Consequences for the programmer:

* **Register results.** An instruction decoded at t+6 or later sees the
  result. Writes bypass to reads in the same cycle.
* **FMACCA / FMACCS** chain back to back: each accumulates onto the result of
  the previous FP instruction. FMUL starts a new chain (it adds zero), and
  every FP result also becomes the accumulator.
* **Neighbour data.** A value sent by NSG decoded at t is safe to pop by an
  instruction decoded at t+7 or later.
* **Buffers are FIFOs.** A receiver must pop in the order the sender sent.
* **LD after LDBM.** An LDBM of N words, decoded at t, writes LM from t+1 to
  t+N. Issue the next LDBM N+2 cycles later; a new LDBM replaces a running
  one.
* **Conflicts.** If both slots write LM, or both scatter, in the same cycle,
  slot 1 wins and the PE's sticky `error` is set. An overflowing or empty
  buffer sets it as well: a full buffer drops the word, and an empty one
  returns a stale head.

## Broadcast memory and its controller

Each cluster splits its broadcast memory (BM) into 16 banks of 4096×64, one
per PE.

* **DMA side.** The DMA reads or writes the same address in all 16 banks at
  once, as one 1024-bit beat.
* **PE side.** Each PE writes its own bank with STBM.
* **Reads through the BMC.** The broadcast memory controller (BMC) serves
  every bank read. It uses a two-stage multiplexer: stage 1 picks one bank
  by BrOffset, and stage 2 gives each PE either its own bank's word or the
  stage-1 word.
  * With an R-type operand, this gives OPSrc 2 (own bank) or OPSrc 8
    (broadcast) one cycle after decode.
  * With LDBM, it is a burst of data_count words into LM.
  * The Mask_load field limits the burst to PEs `first .. first+num-1`.
    `first` is the low nibble; `num` is the high nibble, with 0 meaning 16.
* **Priority.** A burst takes priority over operand reads of the banks. Do
  not use BM operands while an LDBM is running.

## Sequencer: boot, run, DMA, loops

The host (or a testbench) drives the AXI-Lite registers:

| offset | register |
|---|---|
| 0x00 | control: bit 0 start (write 1), bit 1 done (cleared on read), bit 2 idle, bit 3 ready |
| 0x04 / 0x08 / 0x0C | global interrupt enable / interrupt enable / interrupt status (write 1 to toggle) |
| 0x10 | program size in bytes |
| 0x18 | bit 0: reuse (skip boot) |
| 0x20 | 64-bit GM address of the program |
| 0x28 + 8k | 64-bit GM base address of cluster k's data |

`irq` = global enable & enable & status.

On start, the control unit first boots. The instruction DMA copies
ceil(size/128) lines into the IM, in bursts of at most 32 beats. If reuse is
set, the boot is skipped and the program already in the IM runs again on new
data.

It then fetches one VLIW word per cycle. The program counter is {12-bit line
pointer, 3-bit offset}, which selects one of the eight 128-bit words of an IM
line.

* **C-type words.** These are executed in the control unit. The PEs receive
  a NOP in their place.
* **RDGMEM / WRGMEM.** These send one command to all nine data DMAs. Each
  DMA adds its own cluster's base address. Issue then stops until every DMA
  is idle, so BM data is complete before the next instruction.
* **Loops.** A taken BNZ costs two cycles beyond the body: the BNZ word and
  the delay slot. The delay slot may hold useful work.
* **STOP** pulses done, sets the interrupt status and returns to idle.

## Floating point

`fpu_mac` implements IEEE-754 binary64 FADD, FSUB, FMUL, FMACCA (acc + a·b)
and FMACCS (acc − a·b). It has three stages: unpack, then multiply and
normalise, then select inputs, add and normalise.

* **Rounding** is truncation for every operation.
* **Guard bits.** The adder keeps three guard bits but no sticky bit, so a
  subtraction can be one unit in the last place away from exact truncation.
* **Special values.** Subnormals are flushed to zero. Overflow gives ±∞, and
  no NaNs are produced.

Results therefore differ from round-to-nearest software in the last bits. The
testbenches compare against a tolerance, or against a bit-exact truncating
model.

## Stencil workloads

`tb/tb_dragon_top.sv` runs the overlay at its default size. It acts as the
host: it generates the program, places it in a global-memory model, and
starts the overlay over AXI-Lite.

**Block mapping.** Each PE holds a B×B block of the grid. For B = 4 (48×48)
and B = 8 (96×96) the block lives in two register sets. For B = 16 (192×192)
and B = 32 (384×384) it does not fit in registers, so the program differs:

* both copies of the block live in LM;
* rows are loaded with LD in the memory slot into four rotating register sets,
  one row ahead of their first use;
* the last FMACCA of a point writes it to LM and to a scratch register
  (R-type mode 1), from which edge points are sent.

Both programs share the rest:

* The block's edge points are computed first.
* Each edge point is sent with NSG as soon as it is written back, while the
  compute slot goes on.
* Neighbour values are consumed directly as FIFO operands.
* The loop body holds two iterations, one per register set. It is closed by
  BNZ.
* Off the mesh edge, the testbench answers every outgoing word with a fixed
  boundary value.

Results go back through STBM and WRGMEM, and are compared with a
double-precision reference.

Efficiency of the inner loop (FLOP per cycle over 2 × 144 per cycle):

| run | loop efficiency | at 130 MHz |
|---|---|---|
| Laplace 48×48, 100 iterations | 86.2 % | 32.3 GFLOP/s |
| Jacobi 48×48, 100 iterations (and again with reuse) | 88.9 % | 33.3 GFLOP/s |
| Laplace 96×96, 20 iterations | 87.2 % | 32.7 GFLOP/s |
| Jacobi 192×192, 10 iterations | 89.6 % | 33.5 GFLOP/s |
| Laplace 384×384, 4 iterations | 87.4 % | 32.7 GFLOP/s |

Laplace needs 7 operations in 4 FP instructions per point, a ceiling of
87.5 %. Jacobi needs 9 operations in 5 instructions, a ceiling of 90 %. The
rest of the loss is the BNZ overhead.

Longer blocks amortise the BNZ better, so the larger grids come closest to
the ceiling.

## Simulating

Everything runs on plain Verilator 5. Three examples:

```
# one block, e.g. the PE
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb rtl/dragon_pkg.sv tb/dragon_asm_pkg.sv \
  rtl/*.sv tb/gm_model.sv tb/tb_pe.sv --top-module tb_pe -Mdir obj_pe -o sim
./obj_pe/sim

# the sequencer (booted program, reuse, interrupt)
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb rtl/dragon_pkg.sv tb/dragon_asm_pkg.sv \
  rtl/*.sv tb/gm_model.sv tb/tb_sequencer.sv --top-module tb_sequencer -Mdir obj_seq -o sim

# the full 144-PE overlay with the stencil workloads (compiles in about half
# a minute, runs in seconds)
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb rtl/dragon_pkg.sv tb/dragon_asm_pkg.sv \
  rtl/*.sv tb/gm_model.sv tb/tb_dragon_top.sv --top-module tb_dragon_top -Mdir obj_top -o sim -j 8
```

`rtl/dragon_pkg.sv` must come first (listing it again through `rtl/*.sv` only
gives a duplicate-package warning). `-Wno-fatal` keeps Verilator's width
warnings in the testbenches from stopping the build.

Every testbench:

* prints `TB_RESULT checks=N failures=M`;
* has a watchdog;
* initialises all the state it reads, so it also runs with random initial
  values (`+verilator+rand+reset+2`).

Helper files in `tb/`:

| file | contents |
|---|---|
| `gm_model.sv` | AXI4 memory with random stalls |
| `dragon_asm_pkg.sv` | instruction encoders |
| `axil_host.svh` | AXI-Lite host tasks |

## Departures and choices

**What the design takes from the source architecture:**

* 3×3 clusters of 4×4 PEs, one HBM port and DMA per cluster, a separate
  instruction DMA;
* the 128-bit two-slot VLIW word, the five instruction formats and their
  field widths, and the 28 instructions;
* 256 registers, 12-bit LM and BM addresses, 16 BM banks per cluster with a
  two-stage broadcast multiplexer, and the Mask_load semantics;
* a 7-stage PE pipeline with a 3-cycle FMA and truncation;
* a 512 KiB IM organised as 8 banks with line and offset pointers;
* boot with a reuse bypass, 7 loop levels, one NOP after BNZ, NOPs to the
  PEs on controller instructions, and STOP raising an interrupt;
* 1024-bit AXI4 with at most 32 beats per burst.

**This design's own choices, where the source gives no detail:**

* all numeric encodings (opcodes, functions, OPSrc and mode values) and the
  bit positions of the fields;
* which pipeline stage does what, and the no-interlock timing rules above;
* the 512-word input buffers, their drop-on-full behaviour and the sticky
  error flags;
* the AXI-Lite register map;
* stalling the program while data DMAs run, and one DMA command broadcast to
  all clusters;
* the open mesh with edge ports, and row-major PE ids;
* LDBM timing and priorities;
* the FPU's handling of subnormals, overflow and guard bits.

**Not built:**

* the FPGA shell (PCIe DMA, AXI interconnect, HBM controllers) and the host
  software;
* meshes of more than two dimensions and torus wrap-around, which the source
  mentions as possible but does not detail;
* a compiler or assembler beyond the testbench encoder functions.
