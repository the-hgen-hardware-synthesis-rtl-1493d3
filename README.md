# SPAM2: a three-unit 8-bit VLIW processor in SystemVerilog

SPAM2 is a small load/store VLIW machine. It was defined as a worked example
for generating processor hardware from an instruction-set description. Every
44-bit instruction word holds up to five operations that run in the same
cycle:

* three arithmetic operations, one for each unit U1, U2 and U3;
* two transfers, one on each 8-bit data bus DB1 and DB2.

Each unit works only on its own 4 x 8-bit register file. The two buses are
the only path between the register files and the memories. The machine has no
branches: the program counter steps through the 256-word instruction memory.

The central design idea is resource sharing. Loads and stores have no
datapath of their own. A memory operation takes over both bus fields of the
word: DB2 carries the address from a register, and DB1 carries the data
between a register and the memory. This RTL builds SPAM2 that way, with the
storage sizes, encodings and operation timing of the architecture
description.

```
            DB2 (address bus) ───────────────┬──────────────┬──────────────┐
            DB1 (data bus)   ──────┬─────────┼────┬─────────┼────┬─────────┤
                                  │         │    │         │    │         │
                              ┌───┴─────────┴┐ ┌─┴─────────┴┐ ┌─┴─────────┴┐  ┌──────────────┐
   fetch: PC ──► IM ──► ir    │ U1 regfile   │ │ U2 regfile │ │ U3 regfile │  │ instr memory │
          │                   └──────┬───────┘ └─────┬──────┘ └─────┬──────┘  │ 256 x 44     │
          ▼                      ADD SUB      ADD SUB MUL       ADD MUL       ├──────────────┤
       decoder ──► identification codes of U1f U2f U3f DB1 DB2 DMf IM         │ data memory  │
                                                                              │ 32 x 8       │
                                                                              └──────────────┘
```

## The instruction word

Fields are listed from the most significant bit. The bits of each unit field
are OP[2] RA[2] RB[2] RC[2]. The bits of each bus field are SRC[5] DEST[5].

| field | bits    | operations (OP code)                             |
|-------|---------|--------------------------------------------------|
| U1    | [43:36] | ADD 0, SUB 1, NOP 3 (code 2 unused)               |
| U2    | [35:28] | ADD 0, SUB 1, MUL 2, NOP 3                        |
| U3    | [27:20] | ADD 0, MUL 1, NOP 3 (code 2 unused)               |
| DB1   | [19:10] | move, immediate move, nop; the data side of DM/IM operations    |
| DB2   | [9:0]   | move, immediate move, nop; the address side of DM/IM operations |

A unit operation computes `RC <- RA op RB`. All results are 8 bits wide, and
carries, borrows and the high byte of a product are dropped.

The SRC and DEST subfields of the buses name locations:

| code      | location                                              |
|-----------|-------------------------------------------------------|
| 0x00-0x03 | U1.R0-R3                                              |
| 0x04-0x07 | U2.R0-R3                                              |
| 0x08-0x0B | U3.R0-R3                                              |
| 0x0C      | data-memory data (DB1 only)                           |
| 0x0D      | data-memory address (DB2 DEST only)                   |
| 0x0E      | instruction-memory data (DB1 only)                    |
| 0x0F      | instruction-memory address (DB2 DEST only)            |
| SRC 0x10-0x1F | immediate `SRC[3:0]`, zero-extended               |
| DEST 0x1F | nothing (bus nop)                                     |

## Memory operations and the shared buses

There are four memory operations. Each one is written into both bus fields:

| operation         | DB1 SRC | DB1 DEST | DB2 SRC | DB2 DEST |
|-------------------|---------|----------|---------|----------|
| DM_ld REG <- DM[LOC]   | 0x0C    | REG      | LOC     | 0x0D     |
| DM_st DM[LOC] <- REG   | REG     | 0x0C     | LOC     | 0x0D     |
| IM_ld REG <- IM[LOC]   | 0x0E    | REG      | LOC     | 0x0F     |
| IM_st IM[LOC] <- REG   | REG     | 0x0E     | LOC     | 0x0F     |

`REG` and `LOC` are register codes. The value of register LOC, not the code,
is the address. The data memory uses the low 5 bits of that value, and the
instruction memory uses all 8.

The hardware needs no path of its own for these operations. `spam2_bus` is
the same multiplexer for every kind of transfer. It reads the location named
by SRC and steers the value to the location named by DEST. For a load, DB2
takes the LOC register to the memory address, and DB1 takes the memory's
combinational read data into REG, all in one cycle. For a store, DB1 takes
REG to the memory's write data.

The decoder (`spam2_decoder`) recognises a memory operation from the
pattern: DB2 DEST is an address code, and DB1 SRC or DEST is the matching
data code. It then raises the DMf or IM decode line and forces the DB1/DB2
move lines low. The bus fields no longer stand for moves, but the buses still
carry the values.

Each register file has one port per bus, and the port can either read or
write in a given cycle. This is why a bus cannot move a value between two
registers of the same file.

## Timing

| operation               | cycles | result readable              |
|-------------------------|--------|------------------------------|
| ADD, SUB, bus moves     | 1      | the next cycle               |
| DM_ld, DM_st            | 1      | the next cycle               |
| MUL (U2, U3)            | 1 issue slot | 4 cycles after issue, no bypass |
| IM_ld, IM_st            | 2      | the next instruction         |

**Multiply.** `spam2_mul_pipe` forms the product in the issue cycle. It then
delays the product and its destination register by `MUL_LATENCY - 1` stages.
A multiply issued in cycle t is written at the end of cycle t+3 and can be
read from cycle t+4. A read in between returns the old value, and nothing
stalls. A unit can issue a new multiply every cycle. The delayed result
reaches the register file through a write port of its own, so it never blocks
a later ADD or SUB of the same unit. Set `MUL_LATENCY = 1` for a
single-cycle multiplier.

**Instruction-memory port.** The instruction memory has one port. Every
cycle it is read at PC to fetch the next word. An IM_ld or IM_st in execution
takes the port for its data access, so in that cycle `spam2_fetch` loads an
all-nop bubble into the instruction register and holds PC. Each IM operation
therefore costs two cycles.

**Write priority.** Several writes can reach one register in the same cycle:
a bus move, a load, the unit's own result and a delayed product. The
priority, from highest to lowest, is DB2, DB1, the unit, then the delayed
multiply. The instruction set only forbids two bus writes to one register.

There is no other pipelining. The fetch register is the only stage ahead of
execution, and a load's data is used in the same cycle.

## Program rules (checked, not enforced)

A valid program must also obey these rules:

* no bus move within one register file;
* no two bus writes to the same register in one word;
* no unused encodings (U1 or U3 OP = 2, DEST codes other than registers or
  0x1F outside a memory operation, malformed memory patterns).

The decoder reports breaks of these rules on `violation` and `illegal`, and
`spam2_top` asserts that neither is raised while running. A field with an
unused encoding does nothing.

## Modules

| file | role |
|------|------|
| `rtl/spam2_pkg.sv`      | widths, sizes, instruction-word struct, op and location codes, decode structs |
| `rtl/spam2_decoder.sv`  | identification codes for all seven fields, precedence of memory operations, `illegal`/`violation` |
| `rtl/spam2_u1_unit.sv`, `spam2_u2_unit.sv`, `spam2_u3_unit.sv` | arithmetic units |
| `rtl/spam2_mul_pipe.sv` | multiplier with write-back after `MUL_LATENCY` cycles |
| `rtl/spam2_regfile.sv`  | 4 x 8 register file: 2 reads, unit write, delayed write, one read-or-write port per bus |
| `rtl/spam2_bus.sv`      | one data bus: source multiplexer, destination decode, register-file port requests |
| `rtl/spam2_dmem.sv`     | 32 x 8 data memory, asynchronous read, plus an observation read port |
| `rtl/spam2_imem.sv`     | 256 x 44 single-port instruction memory |
| `rtl/spam2_fetch.sv`    | PC, instruction register, IM bubble |
| `rtl/spam2_top.sv`      | the processor |

## Using the top level

`spam2_top` has one parameter, `MUL_LATENCY`, with a default of 4. Its ports:

* `clk`, and `rst` (synchronous, active high).
* `load_we`, `load_addr`, `load_data`: they write the instruction memory
  while `rst` is high, one word per clock. Execution starts at address 0 on
  the first edge after `rst` falls. That first cycle executes a nop while
  word 0 is fetched.
* `pc`, `ir_valid` (low for a bubble), `regs[3][4]` (all registers) and
  `dbg_dm_addr`/`dbg_dm_data`: they show the machine state.
* `illegal`, `violation`: flags for the word now executing.

Reset clears PC, the instruction register, the registers and the multiplier
pipeline. The memories are not reset.

## Simulation

Every testbench checks itself and ends by printing
`TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/spam2_pkg.sv tb/tb_spam2_top.sv --top-module tb_spam2_top
./obj_dir/Vtb_spam2_top
```

`tb_spam2_top` runs the processor at its default size, with no parameter
overrides. It has a cycle-level reference model of the instruction set. For
each of four runs, the model chooses a random valid word at the moment it is
about to execute it. This lets memory addresses come from registers whose
values the model knows: IM accesses stay in words 0xC0-0xFF, and the
180-word program sits below them.

The testbench then loads the program and compares PC and all 12 registers
with the model after every clock edge. At the end of a run it compares the
data memory and the instruction-memory data region. It also counts every
mechanism and fails if one never happened:

* each unit operation;
* moves, immediates and bus nops;
* the four memory operations and the IM bubbles;
* delayed multiply write-backs, and reads made before a product arrived;
* write-priority collisions.

The other testbenches check each module against models written
independently of the RTL:

| testbench | what it checks |
|-----------|----------------|
| `tb_spam2_decoder` | 20 000 biased random words, plus the worked example `U1_add U1.R1, U1.R2 -> U1.R3` (leading bits 00011011) |
| `tb_spam2_u1_unit`, `tb_spam2_u2_unit`, `tb_spam2_u3_unit` | results, and the multiply latency counted in cycles |
| `tb_spam2_regfile` | all ports and the write priority |
| `tb_spam2_bus` | all 1024 SRC/DEST pairs |
| `tb_spam2_dmem`, `tb_spam2_imem` | random reads and writes against a model array |
| `tb_spam2_fetch` | fetch, bubble and PC wrap |
| `tb_spam2_top_mul1` | the end-to-end test on a `MUL_LATENCY = 1` build |

## How closely this follows the architecture, and where it does not

These follow the architecture description directly:

* the field layout and all operation encodings;
* the location codes of the buses;
* the storage sizes;
* the 8-bit truncating arithmetic;
* the operation costs: one cycle, two for IM operations, and a multiply
  latency of 4;
* the instruction-set constraints;
* the split into decode logic, storage, functional units and their
  connections;
* the register-file port structure and the write order.

These are choices of this implementation:

* **Memory location codes.** The architecture description uses codes
  0x0C-0x0F for memory data and addresses. The generated Verilog model of the
  machine decodes memory enables from other DEST values. This RTL uses the
  description's codes.
* **Multiply latency.** The generated model multiplies in one cycle. This RTL
  applies the declared latency of 4 with no bypass. A program that never
  reads a product's register before the 4 cycles are up runs the same on
  both. `MUL_LATENCY = 1` restores the single-cycle behaviour.
* **IM port.** Sharing one IM port between fetch and data, with a one-cycle
  bubble, is how this RTL gets the two-cycle cost of IM operations. The
  generated model left the IM data path unconnected.
* **Load stalls.** The one-cycle stall cost declared for loads would matter
  only in a pipelined version. Nothing stalls here.
* **Widths.** IM_ld returns the low byte of the 44-bit word. IM_st writes
  the byte zero-extended. Immediates are zero-extended.
* **Additions.** The tri-state buses are replaced by multiplexers. Added
  here: the reset behaviour, the load and observation ports, the delayed
  write port of the register files, the treatment of unused encodings, and
  the assertions.
