# ROR1200 — a soft core that trades registers for cores

ROR1200 is a small SIMD processor in the OpenRISC 1200 style. Its main idea
is simple. Many image kernels need only a handful of registers. A
32-register file therefore holds several register sets, one per core. The
program says how many registers it needs. Before the run starts, the
register file is cut into that many equal shares. Each share is handed to
its own processing element (PE). All PEs then run the same instruction
stream in lock step on different pixels.

A program that needs 8 registers runs on 4 cores (32 / 8 = 4). One that
needs 16 runs on 2 cores, and one that needs all 32 runs on a single core.
Each PE has:

- an integer ALU;
- an HPRC unit that reads a neighbouring core's operand and combines it
  with its own in a second ALU. This is the "row shift" that lets a core
  see the pixel next to its own.
- a five-stage pipelined multiply-accumulate (MAC) unit with a 48-bit
  accumulator, used for convolution;
- a load/store unit.

This repository is synthesizable SystemVerilog (IEEE 1800-2017) for the
whole core. A self-checking testbench comes with every block.

## Block map

```
               host / PC side
   serial line ─┐    debug port (SPR read 0x4 / write 0x5)   data port
                │          │                                   │
          uart_loader   spr_dbg ── reconfig_ctrl (REGCNT → CCR, run FSM)
                │          │              │ lg_cores, core_rst │
                ▼          ▼              ▼                    ▼
              imem ──► ror1200_core ──────────────────────► dmem (4+1 ports)
                         ├─ instr_unit (PC, IR, hw_loop)
                         ├─ decoder
                         ├─ rrf  (32 x 32 bit, blocks 0:7 8:15 16:23 24:31)
                         ├─ hazard_ctrl, exc_unit
                         └─ pe[0..3]: alu, hprc, mac_unit, lsu
```

| file | role |
|---|---|
| `rtl/ror_pkg.sv` | constants, opcodes, decoded control word, event counters |
| `rtl/ror1200_top.sv` | top: debug port, reconfiguration, core, memories, serial loader |
| `rtl/ror1200_core.sv` | five-stage SIMD pipeline |
| `rtl/rrf.sv` | reconfigurable register file |
| `rtl/reconfig_ctrl.sv` | register-count SPR, core count register (CCR), run control |
| `rtl/spr_dbg.sv` | development (debug) interface to the SPRs |
| `rtl/instr_unit.sv`, `rtl/hw_loop.sv` | fetch, instruction register, zero-overhead repeat loop |
| `rtl/decoder.sv` | instruction decode |
| `rtl/hazard_ctrl.sv` | bypass and stall decisions |
| `rtl/exc_unit.sv` | exceptions |
| `rtl/pe.sv`, `rtl/alu.sv`, `rtl/hprc.sv`, `rtl/mac_unit.sv`, `rtl/lsu.sv` | one processing element |
| `rtl/imem.sv`, `rtl/dmem.sv` | instruction memory, shared data memory |
| `rtl/uart_loader.sv` | 8N1 serial receiver that writes a program image into `imem` |

## The reconfigurable register file

The 32 physical registers form four 8-register blocks: RRF1 = 0..7,
RRF2 = 8..15, RRF3 = 16..23 and RRF4 = 24..31. With `n` active cores, each
core owns `32/n` consecutive registers. Core `k` maps its register `r` to
physical register

    phys = k * (32/n) + (r mod 32/n)

With four cores, core 0 works in RRF1, core 1 in RRF2, and so on. Register 0
of every core reads as zero. The decoder checks each register field against
the share size `32/n`. A program that names a register outside its share
takes an exception. The same binary therefore runs on 1, 2 or 4 cores, as
long as it uses no more registers than the count it declared.

The host sees all 32 physical registers at SPR 1024..1055, whatever the
configuration.

### How the core count is chosen

`reconfig_ctrl` holds the register-count SPR (number 16). When `run` rises,
it computes the core count register (CCR, SPR 17):

| register count | cores | registers per core |
|---|---|---|
| 1 .. 8 | 4 | 8 |
| 9 .. 16 | 2 | 16 |
| 0, or 17 .. 32 and above | 1 | 32 |

Its states are IDLE → CONFIG (one cycle; CCR loaded while the cores are held
in reset) → RUN → DONE. The run reaches DONE on a halt instruction or an
exception. Lowering `run` returns the controller to IDLE. The register count
can only be changed in IDLE. Debug writes to the register file are dropped
while the cores run.

## The SIMD pipeline

The five stages are:

1. **Fetch.** PC and IR, with the hardware loop next to the PC.
2. **Decode.** Decode and register-file read for all cores.
3. **Execute.** Per PE: ALU, HPRC, MAC issue and address generation.
4. **Memory.** Per-core data memory access.
5. **Write back.** Result written into the RRF.

There is one fetch and one decode. Their control word goes to every PE, and
PEs beyond the core count do nothing. With no branches, the first
instruction retires in its fifth cycle, and N instructions take
`5 + (N − 1)` cycles. `tb_ror1200_core` checks this.

Control flow is scalar. `J`, `BEQZ` and `BNEZ` are resolved in decode on the
register value of core 0. One fetch slot is squashed for each taken jump or
branch. Data-dependent work per core must therefore be written without
branches, using `MIN`, `MAX`, `SLT` and `ABS`.

### Hazards

`hazard_ctrl` is one controller shared by all PEs, because they all run the
same instruction. It uses these rules:

- **Bypass.** An execute-stage operand is taken from the memory stage (if
  that instruction is not a load) or from write back, instead of the value
  read in decode.
- **Load-use stall.** The instruction in decode waits one cycle when it
  reads a register that a load in execute is writing.
- **MAC read stall.** `MACRC` waits until no MAC operation is in flight,
  including one leaving execute or, for `MACM`, the memory stage. It
  therefore always reads the finished sum.
- **MAC port stall.** A register MAC waits one cycle behind a `MACM`.
- **Branch stall.** A branch waits while its operand is still being
  computed in execute or loaded in the memory stage. Otherwise a value
  still in the memory stage reaches the branch over a bypass.

### Hardware loop

`REPEAT len, count` repeats the next `len` instructions `count` times. When
the last body instruction is fetched and passes remain, `hw_loop` sends the
fetch back to the start of the body. So the loop costs no cycles beyond the
`REPEAT` itself. There is one loop level, and the body must not contain
jumps.

### Exceptions

An exception ends the run. Three things raise one:

- an unknown opcode;
- a register index outside the core's share;
- a data address that is misaligned or beyond the data memory, in any
  active core.

The faulting instruction and all younger ones are squashed, and the
pipeline drains. EPCR (SPR 19) keeps the faulting instruction's address.
SPR 20 keeps the cause: 1 illegal, 2 register out of share, 3 data address.
There is no handler vector.

## The MAC unit

Each PE has a MAC with a 48-bit accumulator that accepts one operation per
cycle. Its stages are:

| stage | work |
|---|---|
| S1 | capture the operands; sign- or zero-extend them to 33 bits |
| S2 | two partial products, `a × b[15:0]` and `a × b[32:16]` |
| S3 | sum them into the full product |
| S4 | cut the product to 48 bits; negate it for multiply-subtract |
| S5 | `acc += addend` |

The instructions are `MAC` (signed), `MACU` (unsigned) and `MSB` (signed
multiply-subtract). They take both factors from registers and enter the MAC
from the execute stage.

`MACM rd, imm(ra)` feeds the MAC straight from the data memory. It computes
its address in execute, like a load. In the memory stage, the word read
there and the coefficient in `rd` enter the MAC, and no register is
written. A convolution tap is then one `MACM` plus, at most, the load of
the next coefficient. A register MAC directly behind a `MACM` would enter
the MAC unit in the same cycle. The hazard controller holds the register
MAC back one cycle to prevent this. `MACRC rd, fmt, shift` reads the accumulator and clears
it. It shifts the accumulator right by `shift` (0..63) and then returns 32
bits in one of three formats: truncated, saturated, or rounded to nearest
and then saturated. A MAC result is in the accumulator five cycles after
issue. The hazard controller keeps `MACRC` from reading it earlier.

## HPRC: neighbour access

`HPRC.f rd, ra, rb, dir` takes the value of `ra` held by the left
(`dir = 0`) or right (`dir = 1`) neighbour core. It combines that value with
this core's `rb` through a second ALU, using any ALU function `f`, and
writes the result into `rd`. Cores at the edge of the active set see zero
from the missing neighbour.

With `f = ADD` and `rb = r0`, the instruction is a plain row shift: all
cores execute it in the same cycle, so a whole row of values moves by one
core. With `SUB`, `MIN`, `MAX` or `ABS`, one instruction computes
differences or extremes of adjacent pixels. Each core thus does two 32-bit
operations per instruction. The values pass through the execute stage's
bypass network, so a freshly computed `ra` can be used straight away.

## Instruction set

The encoding is this design's own. Fields are opcode `[31:26]`, rd
`[25:21]`, ra `[20:16]`, rb `[15:11]` and imm16 `[15:0]`.

| opcode | mnemonic | effect (in every active core) |
|---|---|---|
| 00 | NOP | |
| 01 | ALU rd, ra, rb | function `[3:0]`: ADD SUB AND OR XOR SLL SRL SRA MUL ABS SLT SLTU MIN MAX MOVB MOVHI |
| 02–05 | ADDI / ANDI / ORI / XORI | ADDI sign-extends imm; the logic immediates are zero-extended |
| 06–08 | SLLI / SRLI / SRAI | shift by imm[4:0] |
| 09 | MOVHI rd, imm | rd = imm << 16 |
| 0A | LW rd, imm(ra) | word load, byte address ra + imm |
| 0B | SW rd, imm(ra) | word store of rd |
| 0C / 0D / 0E | MAC / MACU / MSB ra, rb | acc ± ra × rb |
| 0F | MACRC rd, fmt, shift | fmt = imm[1:0], shift = imm[9:4] |
| 10 | HPRC.f rd, ra, rb, dir | rd = (neighbour's ra) f rb; f = [3:0], dir = [4] |
| 11 | REPEAT len, count | len = [25:16], count = [15:0] |
| 12 | J target | |
| 13 / 14 | BEQZ / BNEZ ra, target | tested on core 0 |
| 15 | MFSPR rd, sel | sel 0: core id, 1: core count, 2: registers per core |
| 16 | MACM rd, imm(ra) | acc += mem[ra + imm] × rd (signed): the MAC is fed from memory |
| 3F | HALT | ends the run |

`MFSPR` is how one program finds its own slice of the data. For example,
core `k` of `n` handles output columns `k, k+n, k+2n, …`, which is what the
convolution program in `tb_ror1200_top` does. `tb/ror_asm_pkg.sv` has one
encoder function per instruction for writing test programs.

## Host interface

| SPR | meaning |
|---|---|
| 16 | register count of the application (read/write, idle only) |
| 17 | core count register, CCR (read) |
| 18 | status: bit 0 running, bit 1 done, bit 2 exception |
| 19 | EPCR, address of the faulting instruction |
| 20 | exception cause |
| 1024..1055 | physical registers 0..31 |

A debug access is a one-cycle strobe (`dbg_stb_i`) with `dbg_op_i` = 0x4
(read) or 0x5 (write), the SPR number and the data. The acknowledge, with
the read data, comes one cycle later.

The program reaches `imem` in one of two ways:

- over the serial line `uart_rxd`: 8N1, least significant byte of each word
  first, one word after another from address 0;
- one word per cycle on `prog_*`.

The default bit time, `CLKS_PER_BIT = 1302`, is 115200 baud at 150 MHz.
`uart_clear` restarts the serial load at address 0. Data goes in and out
through the `host_*` port of the data memory. The program memory can only be
written while the cores are not running.

A typical run goes like this:

1. Load the program and the data.
2. Write SPR 16.
3. Raise `run`.
4. Wait for `done`.
5. Read the results and SPR 18.
6. Lower `run`.

## Sizes and parameters

| parameter | default | note |
|---|---|---|
| `NCORES` | 4 | 32 registers / 8 per block |
| `IWORDS` | 1024 | instruction memory, words |
| `DWORDS` | 4096 | data memory, words, one port per core plus a host port |
| `CLKS_PER_BIT` | 1302 | serial bit time in clock cycles |
| accumulator | 48 bit | MAC |

Data memories are plain arrays with a combinational read, in the memory
stage. On an FPGA, the data memory maps to distributed RAM or needs a
registered-read rework for block RAM.

## What the tests show

`tb_ror1200_top` runs the design at its default size. It performs a 3×3
convolution of an 8×6 image:

| register count | cores | cycles | instructions |
|---|---|---|---|
| 8 | 4 | 360 | 269 |
| 16 | 2 | 701 | 525 |
| 32 | 1 | 1383 | 1037 |

With the kernel `5 0 0 / 0 0 0 / 0 0 5`, the first output is 5. Random
signed images and kernels are compared with a reference computed in the
testbench. The same run also checks:

- HPRC neighbour values, zero edges and a neighbour difference;
- debug reads of the register window;
- a program loaded over the serial line that hits an illegal opcode, giving
  EPCR 3 and cause 1.

The testbench also counts that every mechanism took place at least once:
MAC issue, MAC-read stall, load-use stall, branch stall, bypass, hardware
loop, flush, HPRC, debug access, exception and serial load.

The block testbenches check each unit against a reference model. Each one
has been shown to fail on a deliberately broken copy of its block. One
example is a MAC that adds instead of subtracting.

`tb_conv_workload` runs the two kernel sizes of the evaluation, 3×3 and
15×15, on a 66 × 18 pixel tile of a larger frame. Every output is checked
against a reference.

| kernel | cores | outputs | cycles | cycles per output per core |
|---|---|---|---|---|
| 3×3 | 4 | 1024 | 16,315 | 63.7 |
| 3×3 | 1 | 1024 | 65,227 | 63.7 |
| 15×15 | 4 | 208 | 60,838 | 1170 |
| 3×3, `MACM` | 4 | 1024 | 8,123 | 31.7 |
| 15×15, `MACM` | 4 | 208 | 24,230 | 466 |
| 3×3, `MACM`, 1024-pixel band | 2 | 1022 | 11,251 | 22.0 |

Four cores give exactly four times the single-core rate. The first three
rows use a hardware loop. It spends five instructions on each kernel tap:
two loads, two pointer updates and the MAC. The `MACM` rows use a fully
unrolled program with two instructions per tap: the memory-fed MAC, and
the load of a coefficient two taps ahead. The MAC unit itself takes one new
operation per cycle.

The last row convolves one full-width band of a 1024-pixel-wide frame: three
rows of 1024 pixels and one output row, 4094 of the 4096 data words. The
host writes the nine coefficients straight into each core's registers
through the register window. This takes 16 registers, so two cores run.
Each output is then nine `MACM`s, a read-out, a store and three loop
instructions.

A whole 1024 × 1024 frame (1 M words) does not fit the 4096-word data
memory, so the host has to feed it in bands or tiles.

### Sharing samples between cores

When n cores compute n neighbouring outputs of an M-tap filter, they need
only M + n − 1 samples between them, plus the M coefficients. That is
(2M + n − 1)/n words per output instead of 2M. `tb_fir_sharing` runs this
scheme. Each core loads its own first sample once. After each tap every
core takes its right neighbour's sample with one `HPRC.ADD`. The sample
that enters at the right edge is loaded by all cores at the same address
and masked to zero on every core but the last. The test counts the
distinct words read per output:

| taps M | cores n | words read per output | (2M + n − 1)/n | cycles per output |
|---|---|---|---|---|
| 3 | 4 | 2.25 | 2.25 | 7.8 |
| 15 | 4 | 8.25 | 8.25 | 28.8 |
| 15 | 2 | 15.5 | 15.5 | 57.6 |
| 15 | 1 | 30 | 30 | 115.1 |

The count is what one shared memory read, broadcast to all cores, would
fetch. The data memory built here has a port per core, so each core still
makes 2M reads per output.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/ror_pkg.sv tb/ror_asm_pkg.sv tb/tb_ror1200_top.sv --top-module tb_ror1200_top
./obj_dir/Vtb_ror1200_top
```

Every testbench ends with a line `TB_RESULT checks=<n> failures=<m>`. Each
has a watchdog. For a block test, replace the testbench file and top module,
for example `tb/tb_mac_unit.sv` and `tb_mac_unit`. The `ror_pkg.sv` and
`ror_asm_pkg.sv` files are only needed where they are imported.
The workload tests `tb_conv_workload` and `tb_fir_sharing` are built the same
way and use the top at its default size.

## Where this design departs from, or goes beyond, its source

The description gives the ideas, the register-file split, the debug command
codes, the SPR window, the five-stage pipeline, the MAC's 32×32 → 48-bit
five-stage form with round/saturate/truncate, and the repeat instruction.
The rest is filled in here:

- **Instruction encoding** is new. It is not OpenRISC's binary format.
- **SPR numbers** 16–20 are chosen here. Only the register window
  1024..1055 and the read/write commands are given.
- **HPRC.** The source defines the HPRC only as the left/right row shift.
  It draws a second ALU in the reconfigurable zone and counts "eight 32-bit
  operations per cycle" on four cores. The shift-then-ALU form here is
  this design's reading of that. The HPRC is ordinary logic: it is not
  swapped by partial reconfiguration of the FPGA.
- **Execution is in order.** The source mentions out-of-order execution
  for the HPRC. Here every instruction completes in order.
- **Register counts other than 8, 16 and 32** are rounded up to a whole
  share, as in the core-count table above.
- **Only the repeat instruction is built.** A separate "loop" instruction
  is mentioned without a definition.
- **Caches, MMUs and the Wishbone bus** of the OR1200 are replaced by
  directly connected memories. Partial reconfiguration of the FPGA
  (bitstreams, bus macros, ICAP) is not modelled: the "reconfiguration"
  here is the logical split of the register file and the core count.
- **Results** are read through the host data port. The serial transmit
  direction is not built.
- **The video input/output port** (4 × 12 bits) and the LUT-based
  synchronisation to a camera and monitor are not built. Their function is
  not described in detail.
- **Control flow** is decided on core 0. There are no per-core branches.
- **The data split in the source** places four 256-pixel quarters of a
  1024-pixel row in the four cores. The test program here interleaves
  columns instead (core k takes columns k, k+n, …). The hardware supports
  both.
- **Throughput.** The source reports 9 MAC cycles per 3×3 output and about
  1.8 ms for a 3×3 convolution of a 1024×1024 frame. The fastest test
  program here spends 22 cycles per output in each core, on two cores.
  Streaming a whole frame band by band at that rate takes about 11.5 M
  cycles, roughly 77 ms at 150 MHz, not counting transfers. The overhead
  per output is the MAC drain before the read-out, the store and the loop
  test. No attempt is made to match the reported numbers.
- **`MACM`** is this design's reading of the MAC data flow in the source,
  in which the MAC takes its data from memory after address generation.
  The form of the instruction is its own.
