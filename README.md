# FlexARM1 — a five-stage pipelined ARM-subset soft core

FlexARM1 is a small teaching processor for FPGAs. It runs a subset of the
32-bit ARM instruction set on a classic five-stage pipeline, keeps
instructions and data in separate memories (Harvard), reaches its I/O through
memory-mapped addresses, and has no hardware multiplier: programs multiply in
software. It was designed as a set of small, separately tested components
(ALU, register file, barrel shifter, instruction decoder, immediate unit,
control unit, data hazard unit, forwarding unit, I/O controller, ROM, RAM).
The test bed puts it on an FPGA board next to a VGA core that draws the
processor's registers on a monitor while programs run.

This repository is a SystemVerilog (IEEE 1800-2017) implementation of that
design. The original design was described at the level of its components and
their roles. Its pipeline contents, encodings, memory sizes, address map and
display layout were not published, so they are choices made here. They are
marked as such below and in each file's header comment.

## What the processor executes

Instructions use the standard ARM encodings, so code from an ARM assembler
runs unchanged as long as it stays inside this subset:

| class | forms | notes |
|---|---|---|
| data processing | all 16 opcodes (AND EOR SUB RSB ADD ADC SBC RSC TST TEQ CMP CMN ORR MOV BIC MVN), S bit | operand 2 is a rotated 8-bit immediate, Rm shifted by an immediate, or Rm shifted by Rs |
| load/store | LDR, STR, LDRB, STRB | `[Rn, #±imm12]` or `[Rn, ±Rm, shift #n]`; pre-indexed, no write-back |
| branch | B, BL | BL writes the return address to R14 |
| conditions | EQ NE CS CC MI PL VS VC HI LS GE LT GT LE AL | any instruction may be conditional; NV never executes |

**Not implemented**, by design of the original: coprocessor instructions, load/store
multiple, status-register access (MRS/MSR), and exception-generating instructions (SWI).
Multiply is left out too.
**Not implemented** because of choices made here: post-indexed and write-back
load/store forms, halfword and signed-byte transfers, SWP, BX, LDR into R15,
interrupts and processor modes. All of these decode as no-ops: they pass
through the pipeline and change nothing.

A data-processing instruction with R15 as its destination (`MOV pc, lr`) is a
jump. Reading R15 gives the instruction's own address + 8, as on ARM. (ARM
would give +12 when the instruction also shifts by a register; here it is
always +8.)

## The pipeline

```
        IF              ID                    EX                     MEM            WB
  PC -> ROM -> IF/ID -> decoder       -> ID/EX -> forward muxes -> EX/MEM -> I/O ctrl -> MEM/WB -> reg write
                        immediate unit           barrel shifter            RAM / ports
                        register file (3 rd)     ALU, flags
                        hazard unit              control unit (condition, redirect)
```

* **IF**: the instruction ROM reads synchronously, like FPGA block memory. So it is
  addressed with the *next* PC (PC + 4, PC when stalled, or the redirect target from
  EX), and its output register holds the instruction at the current PC. The first
  clock after reset only reads word 0, so execution starts one clock after release.
* **ID**: the decoder turns the instruction into a control word (`ctrl_t` in
  `flexarm_pkg`). The immediate unit builds the constant. The register file reads up
  to three registers in the same cycle: Rn; Rm; and either Rs (shift amount) or Rd
  (the data of a store). So even a register-shifted operation or a
  register-offset store takes one cycle.
* **EX**: forwarding multiplexers pick each operand's newest value. The barrel
  shifter prepares operand 2 and the ALU computes. The control unit checks the
  condition field against the NZCV flags. A failing instruction is squashed here, and
  its register, memory, flag and branch effects are all dropped. Flags are written at
  the end of EX. So the next instruction's condition check already sees them, and flags
  never cause a hazard. Loads and stores compute their address in the ALU (Rn ± offset).
  Branches compute their target the same way, from R15 (PC + 8) and the immediate.
* **MEM**: the I/O controller sends the access to the data RAM or to the I/O ports.
  The RAM also reads synchronously. It is given the address the ALU is computing in
  EX, so a load's word is ready in MEM. When a store in MEM and a load in EX hit the
  same word, the RAM returns the newly written word, so that pair needs no stall.
* **WB**: the load data or the EX result is written to the register file. BL writes
  its return address (PC + 4), which is carried alongside the target.

### Hazards and their cost

| situation | mechanism | cost |
|---|---|---|
| result used by the next instruction | forwarded from EX/MEM | 0 cycles |
| result used two instructions later | forwarded from MEM/WB | 0 cycles |
| result used three instructions later | register file write-through (a write in WB is visible to the read in ID in the same cycle) | 0 cycles |
| load result used by the next instruction | hazard unit stalls: PC and IF/ID hold, a bubble enters EX | 1 cycle |
| taken branch, or a data-processing write to R15 | redirect from EX; IF/ID and ID/EX are flushed | 2 cycles |
| instruction whose condition fails | squashed in EX | its own slot only |

The load-use stall is raised whether or not the load will pass its condition.
A redirect overrides a stall in the same cycle: the stalled instruction is
younger than the branch, so it is flushed anyway. Every other instruction
completes at one per clock.

### Flags and the shifter

The ALU shares one 33-bit adder among the eight arithmetic operations by
inverting its inputs. C is the adder carry, which for subtraction means "no
borrow", and V is the signed overflow. Logical operations take C from the
shifter and keep V. For a rotated immediate, the shifter carry is bit 31 of the
constant when the rotation is non-zero, and the old C otherwise.

The original design used a reduced barrel shifter and saved area by leaving out
the multiplier. How the shifter was reduced is not known. Here it is one 32-bit
shifter (LSL, LSR, ASR, ROR, RRX) with full ARM semantics: `LSR #0` and
`ASR #0` mean 32, `ROR #0` is RRX, and register amounts of 32 and above
behave as on ARM.

## Memory map and I/O

* Instruction side: `flexarm_rom`, `ROM_WORDS` (256) words starting at address 0. The
  ROM is written through the `prog_*` load port while `rst_n` is low; execution starts
  at 0 when reset is released.
* Data side, decoded by `flexarm_io`:

| address | target |
|---|---|
| bit 31 = 0 | data RAM, `RAM_WORDS` (128) words; the address wraps modulo the RAM size |
| `0x8000_0000` | output register, read/write, drives `led_out` |
| `0x8000_0004` | input port, read-only, returns `sw_in` |

Word accesses ignore address bits 1:0, so an unaligned word load is not
rotated as it would be on ARM. Byte stores write one lane. Byte loads
zero-extend. The RAM is not reset.

## The VGA register display

`flexarm_vga` produces 640x480 at 60 Hz: 800 x 525 pixel periods per frame,
16/96/48 pixels of horizontal front porch/sync/back porch, 10/2/33 lines
vertically, both syncs active low. A pixel lasts `PIX_DIV` clocks, so 2 gives
25 MHz from a 50 MHz clock. The picture has sixteen 30-line rows, one per
register R0..R15, each cut into 32 cells of 20 pixels with bit 31 on the left. A
cell is green for 1 and blue for 0, with a black line on its left and top edges.
The core reads the register file through a fourth, display-only read port. It
changes the register address once per 30 lines, so the display costs the
processor nothing. Row 15 shows R15 as the register file presents it: the
address + 8 of the instruction currently in ID. The original design had a VGA
core that showed internal registers, but its resolution and picture layout were
not given: everything in this paragraph is a choice made here.

## Files and hierarchy

```
flexarm1_up3            test-bed top: processor + VGA display
├── flexarm1            the processor (pipeline registers, muxes, PC, flags)
│   ├── flexarm_rom         instruction memory with load port
│   ├── flexarm_decoder     instruction -> ctrl_t
│   ├── flexarm_imm         immediate unit
│   ├── flexarm_regfile     R0..R14, three read ports + display port, R15 = PC + 8
│   ├── flexarm_hazard      load-use detection
│   ├── flexarm_forward     operand source selection
│   ├── flexarm_shifter     barrel shifter
│   ├── flexarm_alu         ALU and flags
│   ├── flexarm_control     condition check, stall/flush control
│   ├── flexarm_io          data-side decoder, output register, input port
│   └── flexarm_ram         data memory with byte enables
└── flexarm_vga         VGA timing and register picture
flexarm_pkg             opcodes, conditions, shift types, ctrl_t, flags_t, stat_t
```

Top-level ports of `flexarm1_up3`: `clk`, `rst_n` (asynchronous, active low),
`prog_we`/`prog_addr`/`prog_data` (ROM load), `sw_in`, `led_out`, `stat`, and
`vga_hs`, `vga_vs`, `vga_r`, `vga_g`, `vga_b`. `stat` is a `stat_t` of one-cycle
event strobes: retire, cond_fail, stall, flush, fwd_mem, fwd_wb, shift_by_reg and
io_access. They are for observation and testing; a board build can leave them
unconnected. Reset clears the PC, R0..R14, the flags and the output register.

## Simulating

Every `tb/tb_*.sv` is self-checking. It ends with a line
`TB_RESULT checks=N failures=M` and has a watchdog. The processor tests use
`tb/flexarm_tb_pkg.sv`, which holds a small instruction encoder and an
instruction-level reference model of the subset. The model was written
separately from the RTL: it shifts one bit at a time and does its arithmetic in
64-bit integers. To build and run one test with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb rtl/flexarm_pkg.sv tb/flexarm_tb_pkg.sv \
          tb/tb_flexarm1_up3.sv --top-module tb_flexarm1_up3
./obj_dir/Vtb_flexarm1_up3
```

* `tb_flexarm1_up3`: the whole design at its default sizes. A software
  shift-and-add multiply (200 x 173 = 34600) writes its result to the output port,
  bounces it through RAM and applies a register shift. Then one VGA frame is captured
  and decoded: R0..R14 must read back from the picture's colours, and the line and
  frame periods must be exact.
* `tb_flexarm1`: a directed program that checks the cycle costs above from the retire
  strobes. Then 40 random 150-instruction programs (all operand forms, byte/word
  loads and stores, conditional branches, I/O, unsupported encodings) are run, and
  registers, flags, RAM and the output port are compared with the reference model.
  It also checks that every pipeline mechanism occurred.
* `tb_forward_seq`: runs of 200 back-to-back dependent single-cycle
  data-processing instructions. They must go through EX at one per clock with no
  stall and match the reference model.
* One test per component: `tb_flexarm_alu`, `_shifter`, `_imm`, `_decoder`,
  `_regfile`, `_rom`, `_ram`, `_control`, `_hazard`, `_forward`, `_io` and `_vga`.

There is no assembler here. The tests build programs with the encoder
functions (`dp_imm`, `dp_rsi`, `dp_rsr`, `ls_imm`, `ls_reg`, `br`). A program
from an external ARM assembler can be loaded through `prog_*` in the same way.

## How far to trust it, and where it departs from the original

* The original FlexARM1 component list and roles are followed: the eleven components,
  the five-stage pipeline, forwarding and hazard detection, conditional execution, the
  load/store architecture, Harvard memories, memory-mapped I/O, no multiplier, and the
  VGA register display.
* Choices made here where the original was silent: the stage contents, the
  three-read-port register file with write-through, branch resolution in EX with a
  two-cycle penalty, the ROM load port, the memory sizes (256-word ROM and 128-word
  RAM; together 12288 bits, about the size of the original's reported memory use),
  the I/O address map, and the VGA timing and picture.
* `flexarm_rom` and `flexarm_ram` are written as registered-read memory arrays, so
  FPGA tools can map them onto block RAM. `flexarm_ram` reads the word being written
  in the same cycle with the new bytes (write-first). That is mux logic around the
  array, which FPGA tools build with a small bypass.
* The original reported FPGA figures (about 2100 logic elements, 55 MHz on a Cyclone
  device; an ALU of 175 logic elements with a 6.61 ns delay). This RTL has not been
  put through an FPGA flow, so these figures are not reproduced or claimed for it.
* `flexarm1` carries three assertions: R15 is never written through the register
  file, a load result is never forwarded from EX/MEM (the stall must have happened
  first), and the PC stays word aligned. Simulate with `--assert` to check them.
* Everything was verified in simulation only. The tests compare against an
  independent model of the subset and pass. Each test has also been shown to fail
  against a deliberately broken copy of its module.
