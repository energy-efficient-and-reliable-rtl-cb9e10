# MOUSE: inference inside nonvolatile memory, safe under power loss

MOUSE is an accelerator for devices that live on harvested energy: sensors
off the grid, or nanosatellites in low Earth orbit. Such devices lose power
often and without warning. MOUSE avoids the cost of saving state by
computing in the place where the state already sits. Almost all of it is
magnetic (MRAM) memory in the computational-RAM (CRAM) style. A CRAM
array can apply a Boolean gate to two of its own rows and put the result in
a third row. It does this in every selected column at once, so each column
acts as a one-bit SIMD lane. Next to the arrays there is only a small
controller. It fetches instructions that are themselves stored in the
arrays, broadcasts them, and checkpoints its program counter after every
instruction. Everything architectural is nonvolatile. After a power cut the
device re-activates its columns and repeats at most one instruction, and
every instruction is built so that repeating it is harmless.

This repository holds synthesizable SystemVerilog for the digital part of
that machine:

| Module | Role |
|---|---|
| `mouse_pkg` | field widths, opcodes, gate kinds, command bundle |
| `cram_array` | one array: cells, gates, read/write, sense amplifiers |
| `row_latch` | wordline latches (three rows open for a gate) |
| `column_decoder` | column bitmask register (CBR) and one-hot column enables |
| `array_bank` | all arrays, broadcast bus, read mux, peripheral window, host port |
| `instr_decoder` | 64-bit instruction decode |
| `branch_unit` | BR1/BR2 and beq / bge / beqz |
| `pc_checkpoint` | PC0/PC1 plus a parity bit: the commit mechanism |
| `memory_controller` | fetch / decode / broadcast sequencer, data register |
| `mouse_top` | controller plus array bank |

The analog parts are not in the RTL. These are the magnetic tunnel junction
(MTJ) cells, in both their STT and spin-Hall (SHE) variants, the voltage
sensing, the capacitor energy buffer, the switched-capacitor converters and
the radiation-hardened circuit style. Their logical effect is modelled where
it matters:
- The cells are modelled by the gate behaviour described below.
- Power loss arrives as the `pwr_good` input.
- The cold, hot, STT, SHE and radiation-hardened variants differ only in
  energy and analog margins. The logic and the clocked behaviour are the
  same for all of them.

## In-memory gates, and why repeating one is harmless

This is the part that most affects how programs are written.

A gate sends a current from the input cells through the output cell. The
output cell flips only if the current is large enough. The current depends
on the input cells' resistances, that is, on their values. The direction of
the current decides which way the output cell can flip, and it can flip
only that way. So the output row has to be **preset** with an ordinary
write first. `cram_array` models each gate like this, per active column:

| Gate | Preset | Update | Result when preset correctly |
|---|---|---|---|
| NAND | 0 | `out = out \| ~(a & b)` | `~(a & b)` |
| NOR  | 0 | `out = out \| ~(a \| b)` | `~(a \| b)` |
| NOT  | 0 | `out = out \| ~a` | `~a` |
| AND  | 1 | `out = out & (a & b)` | `a & b` |
| OR   | 1 | `out = out & (a \| b)` | `a \| b` |

With the wrong preset the output just keeps the preset value, as a real
cell would. Because the output can only move one way, running a gate a
second time leaves the row unchanged. This holds even if the first run was
cut off half way. That is what makes re-running an interrupted instruction
safe. Reads and writes are safe to repeat as long as no instruction reads
the register it writes, and no instruction does.

**Row parity rule.** Each column has two bitlines: one for even rows and one
for odd rows. The gate current enters on one bitline and leaves on the
other. So both inputs must have the same row parity, and the output must
have the other parity. The controller sends the input parity (taken from
`row1`). The array then classifies the latched rows by parity. A row set
that breaks the rule switches nothing and pulses `logic_err`. One
consequence: copying a value to a row of the same parity takes two NOTs.

**Example: XNOR**, the multiply of a binarized neural network, on rows 0
and 2 (both even):
```
WRITE_IMM row1 <- 0 ; WRITE_IMM row3 <- 1 ; WRITE_IMM row4 <- 0   (presets)
NAND 0,2 -> 1       ; OR 0,2 -> 3         ; NAND 1,3 -> 4          (row4 = XNOR)
```
The end-to-end testbench runs exactly this sequence across all 1,024 columns.

## Rows and columns

**Rows.** A gate needs up to three wordlines open together. The row decoder
still opens one row at a time. A latch on each wordline keeps it open until
the controller releases all of them (`row_latch`). This is modelled as three
latched row addresses. Reads and writes do not use the latches; they address
their row directly.

**Columns.** Column selection is one-hot. Each array has a 1,024-bit
nonvolatile column bitmask register (CBR), one bit per column. The active
column enables are a volatile copy of the CBR, made by an *activate*
(`column_decoder`). Writes and gate outputs change only active columns.
Reads return the whole row. On power loss the enables clear and the CBR
stays, so a restart only has to re-activate.

## Instruction set

Every instruction is 64 bits. The field widths are 5-bit opcode, 9-bit tile
(array) address, 10-bit rows and 20-bit branch offset. Bit positions and
opcode numbers are this implementation's choice:

```
Logic     : opc[63:59] tile[58:50] row1[49:40] row2[39:30] row3[29:20]
Memory/AC : opc[63:59] tile[58:50] row [49:40] imm[31:0]
BR write  : opc[63:59]                         imm[31:0]
Branch    : opc[63:59] offset[58:39]   (signed, in instructions, from the branch)
```

| Opcode | Name | Effect |
|---|---|---|
| 00 | NOP | nothing |
| 01 | READ | DR <- row |
| 02 | WRITE | row <- DR (active columns) |
| 03 | WRITE_IMM | row <- imm repeated 32 times (active columns) |
| 04-08 | NOT, AND, NAND, OR, NOR | gate; inputs row1 (and row2), output row3 |
| 09 | AC_REACT | activate columns from the CBR |
| 0A | AC_SET_DR | CBR <- DR, activate |
| 0B | AC_SET_IM | CBR <- imm repeated, activate |
| 0C/0D | BR1 <- DR / imm | low 32 bits |
| 0E/0F | BR2 <- DR / imm | |
| 10 | BEQ | branch if BR1 == BR2 |
| 11 | BGE | branch if BR1 >= BR2 (unsigned) |
| 12 | BEQZ | branch if BR1 == 0 |

Tile `9'h1FF` is the bulk address: every array executes the instruction.
There is no halt instruction. A program ends with a branch to itself, for
example `BEQ` with offset 0 after making BR1 equal to BR2. The data register
(DR) is 1,024 bits wide, one row, and carries rows between arrays.

## The instruction cycle and the commit point

Instructions run strictly one after another. Every instruction gets the same
worst-case time: 9 controller clocks.

```
FETCH   read instruction row {pc.tile, pc.row}
DECODE  take 64-bit slot pc.slot (16 instructions per row)
ACT1-3  latch row1, row2, row3 (gates only; idle otherwise)
EXEC    broadcast read / write / gate / column activation
RESOLVE DR <- read data; BR writes; branch target; release row latches
COMMIT  write the next PC into the *invalid* PC copy
FLIP    flip the parity bit -> instruction committed
```

The PC is `{tile, row, slot}`, 23 bits, counted as one number. A straight
program therefore runs on from one row into the next and from one array into
the next.

`pc_checkpoint` holds PC0, PC1 and a parity bit. Parity 0 means PC0 is
valid, and parity 1 means PC1 is valid. The valid copy is never written.
Flipping one bit is atomic, so FLIP is the single commit point. If power
drops anywhere before FLIP, the same instruction runs again. If it drops
after FLIP, the next instruction runs.

**Power loss.** `pwr_good` low clears, asynchronously, everything volatile:

- the sequencer state
- the instruction register
- the row latches
- the active column enables

The nonvolatile state keeps its value: the cells, every CBR, DR, BR1/BR2,
PC0/PC1 and the parity bit. When `pwr_good` rises, the controller spends one
clock (RESTART) broadcasting a re-activate to every array. It then fetches
from the valid PC.

## Memory map, peripherals and programming

- Tiles `0 .. N_ARRAYS-1` are CRAM arrays. The default is 509 arrays of
  1,024 x 1,024 cells, 63.6 MiB in total. Any array may hold instructions or
  data.
- Tiles `N_ARRAYS .. 9'h1FE` form the external window on `ext_*`. This is
  where the sensor's input buffer and the transmitter's output buffer
  belong. A read there returns `ext_rdata` one clock after `ext_rd`, exactly
  like an array. Input handling is ordinary software. For example, the
  testbench polls a valid word with `READ`, `BR1 <- DR`, `BEQZ`.
- The host port (`host_*`) writes and reads whole rows of one array. It
  loads the program and data before deployment and inspects results
  afterwards. Use it with `pwr_good` low. `nv_init`, also used with
  `pwr_good` low, clears the nonvolatile registers: PC, parity, DR, BR1/BR2
  and every CBR.

## Sizes and what fits

The memory needed by the evaluated workloads (instructions + data) is taken
from their published sizes. The built size is 509 x 128 KiB = 63.6 MiB.

| Workload | Needs | Fits |
|---|---|---|
| SVM MNIST, 8-bit | 4.5 + 30.0 MB | yes |
| SVM MNIST, binarized | 1.25 + 6.0 MB | yes |
| SVM HAR | 2.25 + 10.0 MB | yes |
| SVM ADULT | 0.25 + 0.5 MB | yes |
| BNN FINN (MNIST) | 3.15 + 1.71 MB | yes |
| BNN FP-BNN (MNIST) | 4.20 + 8.00 MB | yes |

The 23-bit PC reaches 2^23 instructions (64 MiB), so even the largest
program (4.5 MB) is fully addressable. The whole workloads are not
simulated, since they are hundreds of thousands of instructions of
compiled code. Two smaller pieces are simulated instead. The end-to-end
test runs one binarized layer step (XNOR over 1,024 columns) with real
sensor and transmitter traffic. `tb_bnn_workload` runs the core of a
binarized neuron, and `tb_svm_workload` the integer arithmetic of an SVM
kernel; both are described next.

## Compiling a binarized neuron into gates

A binarized layer needs, for each neuron, popcount(XNOR(x, w)) followed by a
threshold. `tb_bnn_workload` compiles that popcount into MOUSE instructions
and runs it bit-serially. Every column is one neuron with its own 16 input
bits and 16 weight bits. Three data arrays compute at once through the bulk
address, for 3,072 neurons in total.

The compiler keeps the parity rule simply: every value lives in an even row
and every temporary in an odd row. Two-gate-level forms then always have
inputs of one parity and an output of the other:

```
XNOR(a,b):    t1 = NAND(a,b)  t2 = OR(a,b)  p  = NAND(t1,t2)
half adder:   t1 = NAND(a,c)  t2 = OR(a,c)  s  = AND(t1,t2)   c' = NOT(t1)
```

Each gate is preceded by a write-immediate that presets its output row: 0
for NAND and NOT, 1 for AND and OR. Adding one XNOR bit into the 5-bit
counter takes a ripple of five half adders. The sums go into a second
counter row set, and the two sets swap roles for each input. One input bit
costs 46 instructions, and the whole kernel takes 744.

The program sits in array 0. Its columns are switched off with a zero
column mask (`AC_SET_IM` on tile 0 after an all-ones mask on the bulk
address), so the bulk instructions cannot overwrite it. While the kernel
runs, the testbench cuts power at random moments, roughly once every 600
clocks. It checks all 3,072 counters against its own popcount, that every
cut was followed by a restart, and that the interrupted instructions were
run a second time without changing the result.

## Compiling SVM arithmetic into gates

SVM inference is mostly the dot product of the input with each support
vector; a polynomial kernel then squares it. `tb_svm_workload` compiles both
steps with the same parity discipline. Each column holds one problem: three
pairs of 4-bit unsigned integers. Their dot product is 10 bits wide, and its
square is 20 bits wide.

```
partial product:  t  = NAND(a,b)   p  = NOT(t)
full adder:       t1 = NAND(a,b)   t2 = OR(a,b)    x  = AND(t1,t2)
                  t3 = NAND(x,c)   t4 = OR(x,c)    s  = AND(t3,t4)
                  c' = NAND(t1,t3)
```

Multiplication is shift-and-add. For each multiplier bit, the compiler forms
the partial products and adds them into a fresh accumulator row set with a
ripple of full adders. The squaring step first copies the dot product with
two NOTs, so that the multiplier reads two different row sets. A gate never
names the same row twice. For that reason missing addend bits, the first
carry-in and each new accumulator use separate rows cleared to zero. The
kernel compiles to 5,147 instructions and uses 385 data rows. It runs with
random power cuts, about one every 2,000 clocks. Every dot product and every
square is checked against the testbench's own arithmetic.

## Choices made here

These are decisions of this implementation where the architecture leaves the
point open:

- The cycle is nine controller clocks. The architecture fixes only that all
  instructions take the same worst-case time. At the published clock the
  whole 9-clock cycle corresponds to one 33 ns (modern MTJ) or 11 ns
  (projected MTJ) instruction slot.
- Opcode numbers and bit positions of the fields.
- The gate's output row is `row3`. NOT uses `row1` and `row3`.
- The switching directions of OR, NOR and NOT. NAND and AND follow the
  architecture.
- Immediates: only 32 bits are used, repeated across the 1,024-bit row
  (write-immediate and set-CBR-from-immediate). BR1/BR2 are 32 bits.
- Branch offsets are signed and relative to the branch. `bge` compares
  unsigned.
- A read with the bulk address does nothing. A gate whose rows break the
  parity rule does nothing and pulses `logic_err`. Unknown opcodes act as
  NOP.
- The CBR is cleared by `nv_init`, so no column is active until an AC
  instruction.
- Addresses and the existence of the peripheral window, the host
  programming port and the event outputs (`commit`, `restart`, `exec`,
  `br_taken`, `logic_err`).
- `N_ARRAYS = 509` fills the 9-bit tile space after the bulk address and two
  peripheral addresses. The architecture sizes the array count per workload.

## Simulating

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. With plain verilator:

```
verilator --binary --timing --assert -Irtl rtl/mouse_pkg.sv tb/tb_mouse_top.sv \
          --top-module tb_mouse_top -o sim && obj_dir/sim
```

Substitute any of `tb_instr_decoder`, `tb_row_latch`, `tb_column_decoder`,
`tb_cram_array`, `tb_pc_checkpoint`, `tb_branch_unit`,
`tb_memory_controller`, `tb_array_bank`, `tb_bnn_workload` or
`tb_svm_workload`.

`tb_mouse_top` runs the whole design with full-size arrays but only four of
them. The program polls the sensor, loads input and weights through DR,
activates all columns of all arrays with one bulk instruction, and computes
XNOR in memory. It then sends the row to the transmitter, writes through a
partial column mask, issues one parity-violating gate and branches both
ways. Power is cut twice during the run: once between EXEC and commit, which
forces a re-execution, and once during row activation. The testbench checks
the results against its own model and the 9-clock cycle. It also counts each
mechanism: restarts, re-executions, poll iterations, taken and not-taken
branches, bulk activation, masking, parity errors and peripheral accesses.
A mechanism that never happened counts as a failure.

**Size limit.** The largest configuration simulated is 32 arrays. At the
default 509 arrays, verilator lints the design in seconds. Building a
simulator is another matter: the build flattens every array instance into
one model, and 32 arrays already take about two minutes to build, so a
509-array simulator is not practical. Use a smaller `N_ARRAYS` for
simulation; the arrays themselves stay full size.

Synthesis notes: the arrays are plain `logic [COLS-1:0] mem [ROWS]` memories
with three asynchronous read ports for the gate inputs and output. They
stand in for the MRAM macro and are not meant to become flip-flops.
`pwr_good` is both an asynchronous clear of the volatile state and a
qualifier of commands. Lint reports this as a synchronous/asynchronous mix,
and it is intended: power loss must take effect at once, without a clock.
