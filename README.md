# A micro-programmed 18-bit von Neumann machine

This is a small classical computer for teaching, built at the level of
registers, buses and gates. An 18-bit accumulator machine with a 10-bit address
space has no hard-wired instruction decoder. Instead, a micro-program in a
512-word control store opens the machine's 40 numbered *gates*. Each gate is
one data transfer, such as "IC onto the left adder bus" or "data bus into ACC".
Fetch, decode, effective-address calculation and execution of every machine
instruction are sequences of gate sets. To get a different instruction set, you
load a different micro-program; the hardware does not change.

The RTL follows a published description of the machine: its register set,
buses, gate numbering, clock-phase partition, micro-instruction formats and
memory sizes. Where that description is silent (reset, exact timing, a few
encodings and constant values), this design makes its own choices. They are
listed under [Design choices](#design-choices-and-departures).

## The machine at a glance

| Part | Size | Role |
|---|---|---|
| IC | 10 bits | instruction counter |
| IX | 10 bits | index register |
| SP | 10 bits | stack pointer |
| X | 18 bits | scratch register for the micro-program; can be loaded with the constants 10 and 18 |
| ACC | 18 bits | accumulator |
| MAR | 10 bits | memory address register |
| MBR | 18 bits | memory buffer register |
| OC | 6 bits | op-code of the current instruction (MBR bits 17..12) |
| II | 2 bits | bit 0: indexing flag (MBR bit 10); bit 1: indirection flag (MBR bit 11) |
| Data bus | 18 bits | most register-to-register traffic |
| Address bus | 10 bits | adder/shifter output into MAR |
| Left / right adder bus | 18 bits each | adder operands |
| Inverters | 2 | optionally complement each operand |
| Adder | 18 bits | the only arithmetic unit; no carry in, carry out not kept |
| Shifter | 18 bits | one place left or right, after the adder |
| Zero-detect flag | 1 bit | 1 if the last addition gave 0 |
| Main memory | 1024 x 18 | program, data and stack |
| Control store | 512 x 41 | micro-program |
| CSAR / CSBR | 9 / 41 bits | control-store address and buffer registers |
| START | 1 bit | set by the external start button, cleared by the micro-program |

Narrower values drive wider ones through their low bits, with the upper bits at
0. Wider values drive narrower ones with their low bits only. A 10-bit register
on the 18-bit data bus is zero-extended, and an 18-bit sum loaded into IC keeps
bits 9..0.

Apart from the bus widths, the machine has no notion of a word's meaning. Subtraction is
`a + ~b + 1`, using an inverter and the `+1` constant. AND, OR and XOR exist only
as micro-program loops (see below).

## Gates and the three-phase micro-cycle

Each micro-instruction takes one *micro-cycle* of three phases, P0, P1 and P2.
Every gate belongs to exactly one phase and can be open only then. The
partition orders the transfers, so no register is loaded from two places at
once within a micro-cycle:

* **P0, operand selection.** Sources go onto the adder buses, inverters are set,
  and MBR fields are copied to MAR, OC and II.
* **P1, transfer.** The adder result passes the shifter onto the data and address
  buses, and registers load from the buses.
* **P2, memory and control.** A memory read into MBR, a memory write from MBR,
  or START off.

| Gate | Phase | Micro-operation | | Gate | Phase | Micro-operation |
|---|---|---|---|---|---|---|
| G1 | P0 | alu-right = IC | | G21 | P1 | right shift |
| G2 | P0 | alu-left = IC | | G22 | P1 | data bus = shifter output |
| G3 | P0 | alu-right = IX | | G23 | P1 | address bus = shifter output |
| G4 | P0 | alu-left = IX | | G24 | P1 | data bus = MBR |
| G5 | P0 | alu-right = SP | | G25 | P1 | SP = data bus |
| G6 | P0 | alu-left = SP | | G26 | P1 | X = data bus |
| G7 | P0 | alu-right = X | | G27 | P1 | X = 18 |
| G8 | P0 | alu-left = X | | G28 | P1 | ACC = data bus |
| G9 | P0 | alu-right = ACC | | G29 | P1 | MAR = IC |
| G10 | P0 | alu-left = ACC | | G30 | P1 | IC = data bus |
| G11 | P0 | alu-right = -1 | | G31 | P1 | MAR = address bus |
| G12 | P0 | alu-left = 0 | | G32 | P1 | MBR = data bus |
| G13 | P0 | alu-right = 0 | | G33 | P1 | IX = data bus |
| G14 | P0 | alu-right = +1 | | G34 | P2 | MBR = mem[MAR] |
| G15 | P0 | alu-right = sign (bit 17 only) | | G35 | P2 | mem[MAR] = MBR |
| G16 | P0 | MAR = MBR | | G36 | P2 | START off (halt) |
| G17 | P0 | OC = MBR[17:12] | | G37 | P0 | invert left operand |
| G18 | P0 | II = MBR[11:10] | | G38 | P0 | invert right operand |
| G19 | P0 | alu-left = MBR | | G39 | P1 | X = 10 |
| G20 | P1 | left shift | | G40 | P1 | data bus = MAR |

Several gates on one bus or into one register are a micro-program error. The RTL
ORs the sources so that the result stays defined, and raises `bus_contention`
when it sees such a case on a bus.

### Timing in the RTL

Each phase is one period of the single system clock `clk`, so one micro-cycle
takes three clocks. A register whose gate is open loads at the clock edge that
ends its phase. The adder operands exist on the buses only in P0, but the result
is used in P1. The inverted operands are therefore held in an operand latch at
the end of P0, and the adder and shifter work from that latch during P1. The
result depends only on the operands selected in P0, even when P1 reloads one of
the source registers. `IC = IC + 1` in a single micro-cycle works this way.

The zero-detect flag changes only in micro-cycles that perform an addition,
meaning they open an operand or inverter gate. It takes the adder result (before
the shifter) at the end of P1, so a TEST in the following micro-cycle sees it.
Micro-cycles without an addition, including every TEST, leave it alone.

While START is low, the phase counter stands still and no gate opens. The whole
machine is then frozen and can be inspected.

## Micro-instructions and the sequencer

A control-store word is 41 bits; bit 0 selects the format.

**GATE (bit 0 = 1).** Bit *n* of the word opens gate G*n* during that gate's
phase.

**TEST (bit 0 = 0).** No gate opens. One bit of one register is compared with a
constant:

| Bits | Field |
|---|---|
| 1..9 | register select, one bit each: IC, IX, SP, X, ACC, MBR, MAR, OC, II |
| 10..14 | bit number (binary) |
| 15 | compare value |
| 16..25 | branch address (binary; CSAR uses bits 16..24) |
| 26 | select the zero-detect flag |
| 27..40 | unused |

If the selected bit equals the compare value, the next micro-instruction comes
from the branch address. Otherwise, the machine continues with the next word in
sequence, as it always does after a GATE word.

* A bit number beyond the register's width reads 0.
* A TEST that selects no register tests a 0. "No register, compare with 0" is
  therefore the unconditional `goto`.

CSAR counts ahead. Each time a word is fetched into CSBR, CSAR is incremented,
so while a micro-instruction executes, CSAR already holds the address of the
following one. For example, while the second fetch word (at address 2) runs,
CSAR reads 3. A taken TEST fetches from its branch address instead.

The sequencer (`micro_sequencer`) decides the next address in P2. At the edge
that ends P2, it loads CSBR with the word at that address and CSAR with that
address plus one, so micro-cycles follow each other without a gap. After reset,
and after any write to the control store, one extra clock fills CSBR first. Execution
starts at micro-address 0 after reset.

## The default instruction set and micro-program

Machine instructions are one word each:

| Bits | Field |
|---|---|
| 17..12 | op-code |
| 11 | indirection flag |
| 10 | indexing flag |
| 9..0 | address field |

Indexing adds IX to the address field, and indirection then replaces the result
with the low 10 bits of the memory word it points to. When both are set,
indexing comes first.

The published default instruction set has 39 instructions:

| Op-codes | Instructions |
|---|---|
| 0–6 | `nop` `add` `sub` `lda` `sta` `incr` `decr` |
| 7–12 | immediates: `addai` `subai` `addixi` `subixi` `addspi` `subspi` |
| 13–19 | register forms: `addar` `subar` `addixr` `subixr` `ldar` `ldixr` `ldicr` |
| 20–26 | `inva` `invix` `anda` `ora` `xora` `rsfta` `lsfta` |
| 27–31 | `jmp` `jaz` `janz` `jixz` `jixnz` |
| 32–37 | `call` `ret` `pusha` `popa` `zeroa` `ldai` |
| 63 | `hlt` |

These instructions exist only as micro-code. The micro-program is firmware, not
RTL, so it lives in the testbench package `tb/vn_microcode_pkg.sv`. That package
also has a small two-pass symbolic micro-assembler: gate masks named after the
micro-operations (`L_IC | R_1 | DB_ALU | IC_DB` means IC = IC + 1), plus
`T(reg, bit, cmp, label)` and `GO(label)`.

Its structure:

1. **Initialise.** IC and SP are set to 0.
2. **Fetch.** One micro-cycle does `MAR = IC` and reads memory. The next loads
   OC, II and MAR from MBR and increments IC.
3. **Effective address.** This is formed once, for every instruction, and left in
   MAR. Indexing moves MAR through the data bus into X, then adds IX to X and
   sends the sum over the address bus to MAR. Indirection reads memory, then
   copies MBR to MAR.
4. **Decode.** A binary tree of 63 TESTs on OC bits 5..0 reaches one of 64
   leaves. Each leaf jumps to a routine, or back to fetch for an op-code that has
   no routine.
5. **Execute, then jump back to fetch.** Conventions for the routines:
   * An immediate operand is MAR itself.
   * A register instruction takes the register number from MAR bits 1..0: 0 = ACC,
     1 = IC, 2 = IX, 3 = SP.
   * The stack grows down from the top of memory. `call` and `pusha` decrement SP
     and then write; `ret` and `popa` read and then increment SP.
   * `hlt` opens G36 and returns to fetch. Pressing start again resumes with the
     next instruction.
   * `anda`/`ora`/`xora` are bit-serial: X is loaded with 18 and counts down. Each
     step tests bit 17 of ACC and MBR and shifts ACC left, setting bit 0 from the
     result. It then shifts MBR left.

The micro-program fills 378 of the 512 control-store words. Its first part is
initialisation, fetch, indexing before indirection, the decode tree, and the
`add`, `sub` and `hlt` routines. That part follows the published sample. The
rest, and the conventions above, are this design's reconstruction, because the
published micro-program is incomplete. The register numbers 0 = ACC and 2 = IX
match the published sample program.

## Using the RTL

The top module is `vn_computer` (`rtl/vn_computer.sv`). Shared widths, gate
numbers, phases and field positions are in `rtl/vn_pkg.sv`.

1. **Reset.** Hold `rst_n` low. START is low afterwards, and the machine is
   stopped.
2. **Load the control store.** Write it through `us_we`, `us_addr` and
   `us_wdata`, one word per clock.
3. **Load main memory.** Write it through `ext_we`, `ext_addr` and `ext_wdata`.
   Read it back on `ext_rdata`. These ports own the memory only while the machine
   is stopped.
4. **Start.** Pulse `start_button` for one clock. The machine runs until a
   micro-instruction opens G36, then `running` falls.

The observation outputs (`regs`, the four buses, `alu_out`, `phase`, `csar`,
`csbr`, `gates`) show what a front-panel display of the machine would show.

Building and running the end-to-end test with plain Verilator:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb \
    rtl/vn_pkg.sv tb/vn_isa_pkg.sv tb/vn_microcode_pkg.sv tb/tb_vn_computer.sv \
    --top-module tb_vn_computer
./obj_dir/Vtb_vn_computer
```

Every other testbench builds the same way. Name the testbench as the top; only
`tb_vn_computer` needs the two testbench packages. Each testbench prints
`TB_RESULT checks=N failures=M` and stops itself. A watchdog ends a hung run
with a failure.

## Module map

| Module | Contents |
|---|---|
| `vn_computer` | top: control subsystem, datapath, main memory, load ports |
| `micro_sequencer` | CSAR, CSBR, TEST evaluation, phase-masked gate outputs |
| `micro_store` | 512 x 41 control store with a load port |
| `phase_clock` | P0/P1/P2 counter, held while stopped |
| `start_toggle` | START flip-flop: button sets it, G36 clears it |
| `vn_datapath` | all registers, buses, constants, inverters, adder, shifter, zero-detect, wired by G1..G40 |
| `gated_register` | register loaded from gated sources (IC, IX, SP, X, ACC, MAR, MBR, OC, II) |
| `gated_bus` | bus driven by gated sources (data, address, left, right) |
| `inverter`, `adder`, `shifter`, `zero_detect` | the arithmetic path |
| `main_memory` | 1024 x 18 memory, combinational read, clocked write |

## Verification

Every module has a self-checking testbench in `tb/`, each compared with a
model written separately from the RTL.

* **Top level: `tb_vn_computer`**, at the default sizes. It loads the
  micro-program and runs four things, checking memory (all 1024 words) and
  registers against an instruction-level reference model, `tb/vn_isa_pkg.sv`:
  * **Fibonacci sample.** The published program writes F1..F25 to locations
    50..74, with the return address 1 left at location 1023. Its machine code is
    also compared with the published memory dump. It runs 194 instructions in
    2953 micro-cycles.
  * **Published register display.** The published screen snapshot was taken
    during this run: the second fetch word is executing, IC = 3 (`sta 0()`),
    IX = 71, and ACC = 17711. The test finds that moment and compares every
    value shown: ACC, MBR, X, SP, all four buses, CSAR and CSBR. It also checks
    MAR, OC and II after the P0 gates have loaded them. All match, including
    X = 1023, which the indexing step of the preceding `add -1()` left behind.
  * **Directed program.** It uses every instruction, indexing combined with
    indirection, the stack, and every branch both taken and not taken.
  * **Twelve random programs.** Straight-line code with forward branches.
  * **Special micro-program.** It opens the two gates the default micro-program
    never uses (`x=10`, `alu-right=sign`) and tests a bit above a register's
    width.

  The top-level test also checks that every one of the 40 gates opens, that TESTs
  are taken and not taken, that the zero-detect flag toggles, that indexing,
  indirection and halt occur, that there is no bus contention, and that each run
  takes exactly three clocks per micro-cycle.
* **Datapath: `tb_vn_datapath`.** It drives random legal gate sets phase by phase
  against a register-transfer model.
* **Sequencer: `tb_micro_sequencer`.** It runs a random control store with START
  pauses and a reload.

## Design choices and departures

These points are not fixed by the published description:

* **Clocking.** There is a single clock with one period per phase, and an
  asynchronous active-low reset. All registers reset to 0; the two memories are
  not reset.
* **Operand latch.** The adder operands are latched at the end of P0. This latch
  is this design's addition (see [Timing in the RTL](#timing-in-the-rtl)).
* **When an addition counts.** An addition, for the zero-detect flag, is a
  micro-cycle that opens an operand or inverter gate.
* **The "sign" constant** is a word with only bit 17 set.
* **Shifts** fill the vacated bit with 0. Shifting left and right together passes
  the value unshifted, and an assertion fires.
* **Several gates on one bus** drive the OR of their sources. Start=off wins
  over the start button in the same clock.
* **OC and II** take MBR bits 17..12 and 11..10, as the instruction format
  requires. The general rule that narrow registers connect to the low bits of
  wider ones is not applied to these two.
* **CSAR is 9 bits** and uses the low 9 bits of the 10-bit TEST address field.
* **The zero-detect selector.** Besides the nine register-select bits, the TEST
  format's bit 26 selects the zero-detect flag.
* **The `goto` encoding** (a TEST selecting nothing, comparing with 0) is this
  design's.
* **Load and access ports.** The control-store load port and the external
  memory port exist so that a testbench or host can load the machine. In the
  original, a software simulator did the loading.
* **The default micro-program** beyond the published fragment is a
  reconstruction. So are the meaning of register numbers 1 and 3 and the exact
  behaviour of instructions whose effect is given only as a one-line
  description.
* **Not built as hardware:** the assembler, the micro-code translator and the
  terminal display. In the original system these are software.
