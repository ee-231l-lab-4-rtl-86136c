# An 8-bit accumulator computer with a four-state control unit

This is a small teaching computer: one 8-bit accumulator (ACCA), one 8-bit index
register (X), a carry flag (C) and a zero flag (Z), a 256-byte address space, and 20
instructions. Every instruction is carried out by a Mealy state machine that walks through
at most four states (RESET, C1, C2, C3). In each state it raises a set of active-low
strobes that load, increment or gate the registers. The interesting part of the design
is that control unit: which strobes it raises, in which cycle, for which instruction. The
datapath around it is deliberately simple.

## The machine

```
            PROG_ADDR  X  PC  MAR
                 \     |   |   /
                  [ address MUX ]<-- MEM_SEL
                        |
                  addr [7:0] ----------------+
                        |                    |
                 [ decoder: addr == FF ? ]   |
                   ADDR_FF_n   ADDR_NOTFF_n  |
                      |             |        |
     in_sw --[tri]<---+ (READ)      +--> [ 256 x 8 RAM ] <-- ACCA (STORE)
               |                              |
               |           [tri] <------------+ (READ)
               v             v
      ========== read-data bus (8 bits) ==========
         |       |       |       |        |
       INST     MAR      PC      X       ALU <-- ACCA, X, ALU_CTL
                                          |
                                ACCA   C flag   Z flag
     ACCA --> output latch (STORE at address FF) --> out_port
```

- **Address space.** Addresses 0x00 to 0xFE are RAM. Address 0xFF is the I/O port:
  reading it returns the external input `in_sw`, and storing to it loads the
  output latch `out_port`. Every access to 0xFF goes to the port, including an
  instruction fetch: a program that runs into 0xFF executes the input byte as an
  opcode.
- **Address multiplexer (`addr_mux`).** Picks the memory address from one of four
  sources:
  - `MEM_SEL = 00`: PROG_ADDR, the external loader.
  - `01`: X.
  - `10`: PC.
  - `11`: MAR.
- **Decoder (`addr_decoder`).** Drives `ADDR_FF_n` low for address 0xFF and
  `ADDR_NOTFF_n` low for every other address. `ADDR_NOTFF_n` is the RAM chip select.
- **Read-data bus.** There is one shared 8-bit bus, driven by two active-low
  tri-state buffers (`tri_buf`):
  - RAM output, enabled by `READ_n | ADDR_NOTFF_n`.
  - External input, enabled by `READ_n | ADDR_FF_n`.

  The decoder makes sure that at most one buffer is on. An assertion in `computer`
  checks this. The bus feeds INST, MAR, PC (for jumps), X and the ALU.
- **Write path.** The RAM write data and the output latch both come straight from ACCA.
- **Registers.** PC and X are `count_reg` instances, each with a load strobe and an
  increment strobe. INST, MAR, ACCA, C, Z and the output latch are `load_reg`
  instances. All of them change only on the rising clock edge.
- **RAM (`memory`).** It reads asynchronously, so the word at the current address is on
  the bus in the same cycle. It writes on the clock edge.

## Instruction set

The opcode is the first byte. Instructions with an operand take a second byte, which is
either an address or an immediate value.

| Op | Mnemonic | Effect | C | Z | Cycles |
|----|----------|--------|---|---|--------|
| 00 | LDAA addr | ACCA = M[addr] | – | ✓ | 3 |
| 01 | LDAA #num | ACCA = num | – | ✓ | 2 |
| 02 | LDAA 0,X | ACCA = M[X] | – | ✓ | 2 |
| 03 | STAA addr | M[addr] = ACCA (Z from ACCA) | – | ✓ | 3 |
| 04 | ADDA addr | ACCA += M[addr] | carry out | ✓ | 3 |
| 05 | SUBA addr | ACCA -= M[addr] | borrow | ✓ | 3 |
| 06 | ANDA addr | ACCA &= M[addr] | – | ✓ | 3 |
| 07 | ORAA addr | ACCA \|= M[addr] | – | ✓ | 3 |
| 08 | CMPA addr | flags of ACCA − M[addr] | borrow | ✓ | 3 |
| 09 | LDX #num | X = num | – | ✓ | 2 |
| 0A | INX | X += 1 | – | ✓ | 2 |
| 0B | CPX #num | flags of X − num | borrow | ✓ | 2 |
| 0C | COMA | ACCA = ~ACCA | 1 | ✓ | 2 |
| 0D | INCA | ACCA += 1 | – | ✓ | 2 |
| 0E | LSLA | ACCA <<= 1 | old bit 7 | ✓ | 2 |
| 0F | LSRA | ACCA >>= 1 (0 in) | old bit 0 | ✓ | 2 |
| 10 | ASRA | ACCA >>= 1 (sign in) | old bit 0 | ✓ | 2 |
| 11 | JMP addr | PC = addr | – | – | 2 |
| 12 | JCS addr | if C: PC = addr | – | – | 2 |
| 13 | JEQ addr | if Z: PC = addr | – | – | 2 |

- "–" means the flag keeps its value.
- The cycle count includes the fetch cycle.
- Opcodes 0x14 to 0xFF are not defined. They run as two-cycle no-ops.
- After a subtraction, C is the borrow: C = 1 when the unsigned subtrahend is larger
  than the value it is taken from.

## The control unit

`control_unit` holds a two-bit state register. Its outputs are computed combinationally
from the state, INST and, for the conditional jumps, C and Z. That makes it a Mealy
machine. The strobes are active low and default to high (inactive). The defaults are
also `MEM_SEL = PC` and `ALU_CTL = LOAD`.

- **RESET.** The machine enters RESET on any clock edge where `resn` is low, and stays
  there while `resn` stays low. No strobe is active, and `MEM_SEL` selects PROG_ADDR so
  that an external loader can fill the RAM. It moves to C1 on the first edge with
  `resn` high.
- **C1 (fetch).** This state is the same for every instruction: `READ`, `INST_L` and
  `PC_I` are active, with `MEM_SEL = PC`. On the edge, the opcode goes into INST and the
  PC moves to the next byte.
- **C2 and C3 (execute).** These states depend on INST, as in the table below.

| Instruction | C2 | C3 |
|---|---|---|
| LDAA/STAA/ADDA/SUBA/ANDA/ORAA/CMPA addr | READ, MAR_L, PC_I; sel PC → C3 | sel MAR, then see below |
| LDAA #num | READ, ACCA_L, Z_L, PC_I; ALU LOAD | – |
| LDAA 0,X | sel X; READ, ACCA_L, Z_L; ALU LOAD | – |
| LDX #num | READ, X_L, Z_L, PC_I; ALU LOAD (Z of the byte) | – |
| INX | X_I, Z_L; ALU INX (Z of X+1) | – |
| CPX #num | READ, C_L, Z_L, PC_I; ALU CPX | – |
| COMA / LSLA / LSRA / ASRA | ACCA_L, C_L, Z_L; ALU COM/LSL/LSR/ASR | – |
| INCA | ACCA_L, Z_L; ALU INC | – |
| JMP | READ, PC_L | – |
| JCS / JEQ, taken | READ, PC_L | – |
| JCS / JEQ, not taken | PC_I (skips the address byte) | – |

In C3, each memory-reference instruction raises these strobes:

- **LDAA addr:** READ, ACCA_L, Z_L, with ALU LOAD.
- **STAA:** STORE and Z_L, with ALU TSTA. TSTA passes ACCA through so that Z can be
  taken from the stored value.
- **ADDA / SUBA:** READ, ACCA_L, C_L, Z_L, with ALU ADD or SUB.
- **ANDA / ORAA:** READ, ACCA_L, Z_L, with ALU AND or OR.
- **CMPA:** READ, C_L, Z_L, with ALU SUB. ACCA is not loaded.

Every execute cycle ends in C1. Three assertions in the control unit check the strobes:

- PC is never loaded and incremented in the same cycle.
- X is never loaded and incremented in the same cycle.
- READ and STORE are never active together.

A worked timeline follows: `LDAA 0xF5` at address 0, where M[0xF5] = 0x6B.

| Cycle | Strobes | After the edge |
|---|---|---|
| C1 | READ, INST_L, PC_I; addr = PC = 00 | INST = 00, PC = 01 |
| C2 | READ, MAR_L, PC_I; addr = PC = 01 | MAR = F5, PC = 02 |
| C3 | READ, ACCA_L, Z_L; addr = MAR = F5; ALU LOAD | ACCA = 6B, Z = 0 |

## ALU

`alu` is combinational. It takes ACCA, X and the bus, and produces a result for ACCA
plus a carry and a zero output for the flags. The control unit decides which of these
are actually stored. For example, CMPA is a SUB whose result is thrown away.

| Code | Op | Code | Op | Code | Op |
|---|---|---|---|---|---|
| 0 | LOAD (bus) | 5 | COM | A | TSTA (ACCA) |
| 1 | ADD | 6 | INC | B | CPX (X − bus) |
| 2 | SUB | 7 | LSL | C | INX (X + 1) |
| 3 | AND | 8 | LSR | | |
| 4 | OR | 9 | ASR | | |

## Reset and loading a program

While `resn` is low, two things happen:

- Every register (PC, X, MAR, INST, ACCA, C, Z, output latch) is cleared synchronously.
- The RAM can be written from outside. Put the address on `prog_addr` and the byte on
  `prog_data`, and pull `prog_we_n` low for one clock. The multiplexer routes
  `prog_addr` to the RAM because the control unit selects PROG_ADDR in RESET.

When `resn` goes high, the next edge starts the first fetch at address 0. The RAM is not
cleared by reset.

## Top-level ports (`computer`)

| Port | Dir | Width | Meaning |
|---|---|---|---|
| clk | in | 1 | clock; everything changes on the rising edge |
| resn | in | 1 | reset, active low |
| prog_addr, prog_data, prog_we_n | in | 8, 8, 1 | RAM loader, used only while resn is low |
| in_sw | in | 8 | external input, read at address 0xFF |
| out_port | out | 8 | output latch, written by a store to 0xFF |
| pc, acca, x, c_flag, z_flag | out | | programmer-visible state, for observation |
| state | out | 2 | control-unit state (0 RESET, 1 C1, 2 C2, 3 C3) |

## Design choices and departures

These choices are made here; the original description either leaves them open or is
inconsistent on them.

- **Opcode numbering.** The numbering follows the instruction-set table: LDAA addr is
  0x00, LDAA #num is 0x01, JMP is 0x11. Some worked examples in the original
  description use other numbers for these instructions, for illustration only.
- **Select and ALU codes.** `MEM_SEL` uses PC = 10 and MAR = 11, as in the original.
  PROG_ADDR = 00 and X = 01 were chosen here. `ALU_CTL` is 4 bits wide, and only
  LOAD = 0 comes from the original.
- **JMP.** In C2, JMP raises only READ and PC_L. One description of JMP also lists
  ACCA_L, but that would change ACCA, and a jump must leave ACCA alone.
- **JEQ.** JEQ tests Z.
- **Z updates.** Z_L is raised for every instruction whose definition says Z changes,
  including the loads and STAA. This holds even where a worked example lists fewer
  strobes.
- **Not-taken jumps.** A not-taken JCS or JEQ increments the PC past its address byte.
- **Carry.** The carry after a subtraction is the borrow. Shifts put the bit shifted out
  into C.
- **State register.** It is inside the control unit, not looped out through pins. The
  outputs are combinational (Mealy), so they are not registered.
- **Output enable.** No separate output-enable strobe is generated. The output latch is
  loaded by `STORE_n | ADDR_FF_n`.
- **RAM.** Reads are asynchronous and writes are synchronous. The loader path and the
  register clear on reset are this design's own.
- **Bus width.** The bus, the address and all registers are 8 bits wide. X is taken to
  be 8 bits wide like the other address sources.
- **Multiple drivers.** The read-data bus is a real tri-state net with two drivers.
  Synthesis tools that do not support internal tri-states will turn it into a
  multiplexer.

## Files

| File | Contents |
|---|---|
| `rtl/cu_pkg.sv` | shared types: widths, states, MEM_SEL codes, ALU codes, opcodes |
| `rtl/computer.sv` | top level, the whole computer |
| `rtl/control_unit.sv` | the state machine |
| `rtl/addr_mux.sv`, `rtl/addr_decoder.sv`, `rtl/tri_buf.sv` | address path and bus buffers |
| `rtl/alu.sv`, `rtl/count_reg.sv`, `rtl/load_reg.sv`, `rtl/memory.sv` | datapath |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_examples.sv` | cycle-by-cycle replay of three short programs and the JCS test |

## Simulating

Every testbench is self-checking. Each one ends by printing
`TB_RESULT checks=N failures=M`, and each has a watchdog that stops a hung run. With
Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/cu_pkg.sv tb/tb_computer.sv \
          --top-module tb_computer --Mdir obj_computer
./obj_computer/Vtb_computer
```

Replace `computer` with any other module name to run that module's testbench.
`-Irtl -Itb` lets Verilator find the submodules by file name.

## How it was verified

- **`tb_computer`** runs the full computer, with no parameters to set, against an
  instruction-level reference model written in the testbench.
  - The first program is directed. The next 200 are random: biased byte streams that
    include self-modifying stores, fetches from the I/O address and undefined opcodes.
  - At each return to C1, the testbench compares PC, ACCA, X, C, Z and the output
    latch with the model, along with the cycle count of the instruction. After each
    program it compares the RAM.
  - The testbench counts each mechanism and fails if any never happens. The mechanisms
    are: all 20 opcodes, JCS and JEQ both taken and not taken, input-port reads,
    output-port writes, carries from ADDA and from SUBA, an undefined opcode, and
    reset with program load.
- **`tb_control_unit`** checks every output of the control unit in every cycle. It
  covers every opcode with all four combinations of C and Z, plus reset during an
  instruction.
- **`tb_examples`** replays three short programs one clock at a time and checks INST,
  MAR, PC and ACCA after each edge:
  - LDAA addr.
  - LDAA #num.
  - JMP.

  It then runs JCS once with the carry set and once with it clear.
- **The datapath testbenches** test each module against a reference value computed
  independently. The decoder is tested exhaustively. The other modules get random
  inputs plus corner cases.
