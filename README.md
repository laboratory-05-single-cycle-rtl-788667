# Instruction fetch for a 16-bit single-cycle MIPS, with a board test environment

A single-cycle MIPS processor executes one whole instruction per clock
cycle: fetch, decode, execute, memory access and write-back all happen
between two clock edges. This RTL is the first stage of a reduced, 16-bit
version of such a processor: the **Instruction Fetch (IF) unit**, which keeps
the program counter, reads the instruction it points at, and chooses the
next address (the next instruction in sequence, a branch target or a jump
target). Around it sits a small **test environment** that puts the unit on
an FPGA development board so it can be stepped by hand: one push button
advances the PC, another clears it, two switches play the roles of the Jump
and PCSrc control signals, and a four-digit seven-segment display shows
either the fetched instruction or the next sequential address.

The rest of the processor (register file, ALU, control unit, data memory)
is not part of this RTL; the IF unit's branch and jump inputs are driven by
constants and switches in its place.

## The 16-bit machine

Every data path is 16 bits wide. Instructions are 16 bits long, in three
formats:

| format | fields (bits, from MSB)                                              |
|--------|----------------------------------------------------------------------|
| R-type | opcode 3, rs 3, rt 3, rd 3, sa 1, function 3                         |
| I-type | opcode 3, rs 3, rt 3, address/immediate 7                            |
| J-type | opcode 3, target address 13                                          |

Three-bit register fields mean eight registers. Addresses count 16-bit
words, not bytes, so the next sequential address is PC + 1 where the 32-bit
MIPS uses PC + 4.

The instruction memory is a 256-word ROM. The PC stays 16 bits wide but
only its eight least significant bits address the ROM, so addresses 0x0100,
0x0200, ... read the same word as 0x0000.

## Choosing the next PC

This is the heart of the unit (`rtl/instr_fetch.sv`). Two 2:1 multiplexers
sit in series between the incrementer and the PC register:

```
                 pc_src                         jump
                   |                              |
 PC + 1  ------>[0  \                             |
                |    >--- seq_or_branch -->[0  \  |
 branch_addr -->[1  /                      |    >---- next_pc ---> PC
                                 jump_addr->[1  /
```

| jump | pc_src | next PC      |
|------|--------|--------------|
| 1    | x      | jump_addr    |
| 0    | 1      | branch_addr  |
| 0    | 0      | PC + 1       |

A jump therefore always wins over a branch. In a complete processor
`pc_src` would be "branch instruction AND ALU result zero" and `jump` would
come from the main decoder; here they come from switches.

**When the PC changes.** The PC is a rising-edge register with two
one-cycle control inputs:

* `pc_rst = 1` clears it to 0 at the next edge, whatever `pc_en` says;
* otherwise `pc_en = 1` loads `next_pc` at the next edge;
* otherwise it holds.

The ROM read is combinational, so `instruction` and `pc_plus1` are valid in
the same cycle as the PC they belong to, and are valid again one cycle after
every edge that changed the PC. That is what a single-cycle processor needs:
the instruction is decoded and executed in the cycle its address is in the
PC.

## Stepping by hand: the test environment

`rtl/test_env.sv` is the top level. Its ports are the board's pins:

| port     | dir | meaning                                                        |
|----------|-----|----------------------------------------------------------------|
| clk      | in  | board clock                                                    |
| btn[0]   | in  | push button: one step (writes the next address into the PC)    |
| btn[1]   | in  | push button: clear the PC                                      |
| sw[0]    | in  | Jump control                                                   |
| sw[1]    | in  | PCSrc control                                                  |
| sw[7]    | in  | display select: 0 = instruction, 1 = PC + 1                    |
| an[3:0]  | out | display digit enables, active low                              |
| cat[6:0] | out | display segments a (bit 0) to g (bit 6), active low            |

Switches sw[6:2] are not used. The jump target is the constant `JUMP_ADDR`
= 0x0000, which makes a jump a second way back to the first instruction.
The branch target is the constant `BRANCH_ADDR` = 0x0004, an address inside
the demonstration program.

A button is held for milliseconds and bounces, but the PC must advance by
exactly one per press. The **mono pulse generator** (`rtl/mpg.sv`) handles
that. A free-running counter gives a sampling tick every 2^CNT_W cycles
(65,536 by default, about 1.3 ms at 50 MHz). The buttons are sampled only
on that tick, so bounce shorter than one tick period is seen at most once.
The sample then passes through two registers, and the enable is high for
the one cycle where the sample has just risen. A press is guaranteed to be
seen if it lasts longer than one tick period. The enable pulse arrives two
cycles after the first tick that sees the button held.

The **display driver** (`rtl/ssd.sv`) shows a 16-bit value as four
hexadecimal digits, value[15:12] on the leftmost digit (an[3]). The digits
share the segment lines, so they are lit one at a time; the top two bits
of a free-running CNT_W-bit counter select the digit. Each digit is lit for
2^(CNT_W-2) cycles and the whole display refreshes every 2^CNT_W cycles.

Latency of one step, end to end: press → next sampling tick (up to
2^MPG_CNT_W cycles) → enable two cycles later → PC updated at the next edge
→ new instruction/PC + 1 on the display from the next digit period on.

## Demonstration program

The ROM contents are a parameter (`PROGRAM` on `test_env` and
`instr_fetch`, `CONTENTS` on `instr_rom`) of type `mips16_pkg::rom_t`, an
array of 256 16-bit words. The default, `mips16_pkg::DEMO_PROGRAM`, is ten
instructions built with the encoder functions of the package; all other
words are 0:

| addr | instruction         | code   |
|------|---------------------|--------|
| 0    | addi $1, $0, 5      | 0x2085 |
| 1    | addi $2, $0, 1      | 0x2101 |
| 2    | add  $3, $1, $2     | 0x0530 |
| 3    | sub  $4, $1, $2     | 0x0541 |
| 4    | sw   $3, 0($0)      | 0x6180 |
| 5    | lw   $5, 0($0)      | 0x4280 |
| 6    | beq  $3, $5, +2     | 0x8E82 |
| 7    | addi $1, $1, -1     | 0x24FF |
| 8    | sll  $6, $1, 1      | 0x046A |
| 9    | j    2              | 0xE002 |

The field layout is that of the formats above. The opcode and function
values (R-type 000, addi 001, lw 010, sw 011, beq 100, j 111; add 000,
sub 001, sll 010) are an illustrative choice of this RTL. The instruction
set of the 16-bit machine is left to whoever completes the processor, and
the fetch unit does not depend on it. To load your own program, pass
another `rom_t` value to `PROGRAM`.

## Files

| file                 | contents                                                         |
|----------------------|------------------------------------------------------------------|
| rtl/mips16_pkg.sv    | widths, `word_t`, `rom_t`, opcode/function enums, encoders, demo program |
| rtl/instr_rom.sv     | 256 × 16 ROM, combinational read                                 |
| rtl/instr_fetch.sv   | PC register, +1 incrementer, next-PC multiplexers, ROM instance  |
| rtl/mpg.sv           | mono pulse generator, N buttons (default 2), CNT_W = 16          |
| rtl/ssd.sv           | four-digit seven-segment driver, CNT_W = 16                      |
| rtl/test_env.sv      | top level: MPG + IF unit + display multiplexer + display driver  |
| tb/tb_*.sv           | one self-checking testbench per module                           |

Parameters of `test_env`: `BRANCH_ADDR` (0x0004), `JUMP_ADDR` (0x0000),
`PROGRAM` (demo program), `MPG_CNT_W` (16), `SSD_CNT_W` (16).

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and ends. With
Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing -Wno-fatal -y rtl rtl/mips16_pkg.sv tb/tb_test_env.sv \
          --top-module tb_test_env -Mdir obj_te
obj_te/Vtb_test_env
```

Replace `tb_test_env` with `tb_instr_fetch`, `tb_instr_rom`, `tb_mpg` or
`tb_ssd` for the unit tests. The package must be named first because the
other files import it. Lint with `verilator --lint-only -Wall -y rtl
rtl/mips16_pkg.sv rtl/test_env.sv`; the only warning is the unused
switches sw[6:2].

What the testbenches check:

* **tb_test_env** runs the top level with all parameters at their
  defaults. It presses buttons long enough for the pulse generator, reads
  the display pins over a full refresh with sw[7] = 0 and then 1, decodes
  the segments, and compares them with a PC model and the hand-assembled
  program. It covers sequential steps, a branch, a jump, Jump and PCSrc
  together (the jump must win), switches changed without a press (the PC
  must hold), running past the end of the program, and reset. It counts
  each of these and fails if one never happened. About 10^7 clock cycles;
  a few seconds.
* **tb_instr_fetch** drives 4000 cycles of random controls and random
  16-bit targets against a reference PC model. It uses a ROM pattern in
  which every word is different, so a wrong ROM address shows. PCs above
  255 show that only PC[7:0] addresses the ROM.
* **tb_instr_rom** reads all 256 addresses of the default contents and of
  an all-distinct pattern.
* **tb_mpg** (CNT_W = 4) presses two buttons independently, with random
  bounce on press and release. It checks one enable per press, one cycle
  wide, within one tick period plus three cycles of the button settling.
* **tb_ssd** (CNT_W = 4) checks, every cycle, that exactly one digit is
  lit, that its segments match the nibble, and that each digit stays lit
  for 2^(CNT_W-2) cycles. The expected segments come from its own table of
  lit segments.

## What follows the source description and what is this RTL's choice

Taken from the description of the 16-bit machine: 16-bit data paths; the
three instruction formats; the IF unit's parts (PC, incrementer, two
next-address multiplexers, ROM) and their order; the +1 incrementer; the
256-word ROM addressed by PC[7:0]; a rising-edge PC written only on an
enable from the pulse generator and cleared by a second one; the switch
roles sw[0] = Jump, sw[1] = PCSrc, sw[7] = display select; jump target
0x0000; a branch target inside the program.

Choices made here, where the description is silent:

* The PC clear is synchronous, clears to 0, and has priority over the write
  enable.
* The ROM read is combinational.
* The instruction encodings and the demonstration program are illustrative.
* Button assignment: btn[0] steps, btn[1] clears. The branch target is 0x0004.
* The pulse generator is a sampling tick plus an edge detector. It has no
  reset, so a stray pulse is possible in the first two cycles after
  power-up. Press the clear button once before use.
* The display driver uses active-low anodes and segments and a 16-bit scan
  counter, as on common Digilent boards.

Departures from the structure in the source description:

* The reference drawings of the fetch path are for the 32-bit MIPS (byte
  addresses, +4, 32-bit jump address built from PC[31:28] and the 26-bit
  target). This RTL is the 16-bit version: word addresses, +1, and 16-bit
  branch and jump addresses taken as inputs.
* The ROM is its own module (`instr_rom`) rather than being written inside
  the fetch unit. The hardware is the same.

Not included: the register file, ALU, ALU control, main control unit,
sign/zero extender, data memory, the branch-target adder and the
write-back multiplexers of the full single-cycle datapath. These parts
belong to the later stages of the processor. Their 16-bit encodings and
sizes are not defined here.
