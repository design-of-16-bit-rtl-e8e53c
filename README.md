# risc16 — a 16-bit multicycle RISC processor

risc16 is a small teaching-style processor built with as few functional
units as possible. It has a Harvard memory system: instructions and data are
held in separate memories, so fetching an instruction and reading data never
compete. Instructions are 24 bits wide and data is 16 bits. The core has
sixteen general-purpose registers, an ALU with eleven operations, and a
3-bit flag register (carry, zero, parity). It does not pipeline. A single
finite state machine moves each instruction through fetch, decode and one or
two execute phases, so an instruction takes 3 to 6 clock cycles.

## Instruction set

Every instruction is one 24-bit word:

```
 23    20 19    16 15    12 11     8 7          0
+--------+--------+--------+--------+------------+
| opcode |   Rz   |   Rx   |   Ry   |  (unused)  |   ALU operations
+--------+--------+--------+--------+------------+
| opcode |   Rz   |        16-bit value          |   MVI, LOAD, STORE, JUMP
+--------+--------+------------------------------+
```

| op | mnemonic | effect                               | cycles |
|----|----------|--------------------------------------|--------|
| 0  | HLT      | stop; the core stays halted until reset | –   |
| 1  | ADD      | Rz = Rx + Ry                         | 6 |
| 2  | SUB      | Rz = Rx − Ry                         | 6 |
| 3  | MUL      | Rz = low 16 bits of Rx × Ry          | 6 |
| 4  | AND      | Rz = Rx & Ry                         | 6 |
| 5  | OR       | Rz = Rx \| Ry                        | 6 |
| 6  | XOR      | Rz = Rx ^ Ry                         | 6 |
| 7  | NOT      | Rz = ~Rx                             | 6 |
| 8  | SHL      | Rz = Rx << 1                         | 6 |
| 9  | SHR      | Rz = Rx >> 1 (logical)               | 6 |
| a  | INC      | Rz = Rx + 1                          | 6 |
| b  | DEC      | Rz = Rx − 1                          | 6 |
| c  | MVI      | Rz = value                           | 5 |
| d  | LOAD     | Rz = DM[value]                       | 6 |
| e  | STORE    | DM[value] = Rz                       | 6 |
| f  | JUMP     | PC = PC + value (signed)             | 3 |

There are no conditional branches. JUMP is always taken, and its 16-bit
value is a two's complement offset from the address of the JUMP itself, so
`JUMP 0` loops on itself forever. The flags are written only when an ALU
result is written back (opcodes 1–b). MVI, LOAD, STORE and JUMP leave them
unchanged.

* **Z**: set when the result is zero.
* **P**: set when the result has an *even* number of ones. For example,
  000fH sets P and 0008H clears it.
* **C**: set by the carry out of ADD and INC, and by the borrow of SUB and
  DEC. For SHL and SHR it holds the bit shifted out. For MUL it is set when
  the full product does not fit in 16 bits. The logic operations clear it.

## The state machine

The control unit (`control_unit.sv`) is where the timing of the whole core
lives. It is a Moore machine: every control line is decoded from the present
state alone, and the state code is the state number.

```
S0 fetch ─► S1 decode ─┬─ MVI   ─► S2 (reg_wr, sel=IMM) ───────────────┐
                       ├─ LOAD  ─► S3 (mem_rd) ─► S4 (reg_wr, sel=MEM) ├─► S10 delay ─► S11 (pc_en) ─► S0
                       ├─ ALU   ─► S5 (read)   ─► S6 (reg_wr, sel=ALU) │
                       ├─ STORE ─► S7 (read)   ─► S8 (mem_wr) ──────────┘
                       ├─ JUMP  ─► S12 (jmp) ─► S0
                       └─ HLT   ─► S9 (stays)
```

Here is what happens to one instruction, cycle by cycle:

* **S0.** The program counter already holds this instruction's address, and
  the instruction memory output is combinational. At the end of S0 the
  instruction register captures the word.
* **S1.** The instruction register splits the word into fields. The register
  file reads Rx and Ry, and the opcode picks the next state.
* **S2 to S8.** These are the execute phases. A register write happens at the
  clock edge that ends S2, S4 or S6, and a memory write at the edge that ends
  S8. LOAD reads the data memory into its output register at the edge that
  ends S3, and S4 writes that value into Rz.
* **S10.** A one-cycle delay with no control line active.
* **S11.** pc_en rises, and the program counter steps by one at the edge that
  ends S11.
* **JUMP.** S10 and S11 are skipped. S12 raises jmp, and the program counter
  adds the offset at the edge that ends S12.

The instruction register has no load enable. It loads on every clock edge.
This is safe because the program counter only changes at the end of S11 or
S12, so the word it holds stays the same for the whole instruction.

## Datapath

```
PC ─► instruction memory ─► instruction register ─► opcode ─► control unit
                                    │  Rx, Ry ─► register file ─► ALU ─► flags C Z P
                                    │  Rz ────► register file write port
                                    │  immediate ─┐
                  data memory ◄─ address          ├─► write-back mux ─► register file
                  data memory ─► read register ───┘        ▲ ALU result
```

The instruction register zeroes any field the opcode does not use. For STORE
it sends Rz to the Rx read port, so the register to be stored appears on
`rx_value`, and `rx_value` is wired to the data memory's write data input.
The data memory address comes from the instruction's 16-bit field. The
write-back multiplexer uses select code 1 for the ALU result, 2 for the
immediate, 3 for the data memory read register, and 0 for "no write", which
outputs zero.

## Files

| file | contents |
|------|----------|
| `rtl/risc16_pkg.sv` | widths, opcode/state/select enums |
| `rtl/risc16.sv` | top level: all blocks wired together, host ports |
| `rtl/control_unit.sv` | the S0–S12 state machine |
| `rtl/program_counter.sv` | 16-bit PC, +1 / +offset |
| `rtl/instruction_memory.sv` | 2^IM_AW × 24-bit, combinational read, load port |
| `rtl/instruction_register.sv` | 24-bit IR and field decoder |
| `rtl/register_file.sv` | R0–R15, two read ports, one write port |
| `rtl/alu.sv` | 11 operations and the C/Z/P flag register |
| `rtl/wb_mux.sv` | register write-back multiplexer |
| `rtl/data_memory.sv` | 2^DM_AW × 16-bit, registered read on mem_rd, host port |

## Using the top level

`risc16` has two parameters, `IM_AW` and `DM_AW`. They set the address widths
of the instruction and data memories. Both default to 16 bits, which covers
the whole 16-bit address space (64K words each). The program counter is
always 16 bits wide. With a smaller `IM_AW`, only its low bits address the
instruction memory.

To run a program:

1. Hold `rst` high. Reset is synchronous and active high. It clears the
   program counter, the registers, the flags and the instruction register,
   and puts the control unit in S0.
2. While `rst` is high, write the program through `im_ld_we/im_ld_addr/im_ld_data`
   and any data through `dm_ld_we/dm_ld_addr/dm_ld_wdata`. Each port writes
   one word per clock.
3. Drop `rst`. The core fetches from address 0000H.
4. Wait for `halted`, which goes high when the core reaches S9 after a HLT.
   Then read the results through `dm_ld_addr/dm_ld_rdata`. That read port is
   combinational.

For observation, the core also brings out `pc`, `state`, `instruction` and
the three flags. The memories themselves are not reset.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

* `tb_control_unit` follows every opcode through the state machine. It
  checks each state, every control line, the cycle count per instruction,
  that HLT stays halted, and reset from the middle of an instruction.
* `tb_alu` compares all sixteen opcodes with an integer reference model,
  using corner and random operands. It checks the flags, and checks that they
  hold while `flag_en` is low.
* `tb_program_counter`, `tb_instruction_register`, `tb_register_file`,
  `tb_wb_mux`, `tb_instruction_memory` and `tb_data_memory` each compare
  their block with a reference model written in the testbench. The two
  memory testbenches use 256-word memories.
* `tb_trace_example` runs a reference program cycle by cycle at the default
  sizes. The program is MVI R1,5; LOAD R2,[4] with DM[4]=3; ADD; SUB; MUL;
  then HLT. The results must be 0008, 0002 and 000f, with the parity flag
  set after the MUL, and the program takes 29 cycles before the HLT.
* `tb_risc16` is the end-to-end test, at the default sizes. It runs twelve
  programs in lockstep with an instruction-level model of the ISA. After
  every instruction it compares the PC, all registers, the flags and the
  cycle count. After each program it compares the first 256 data words. It
  fails if any opcode, a forward jump, a backward jump, a halt, or any of
  the three flags never occurred.

Simulate with Verilator, for example:

```
verilator --binary --timing --assert -Irtl rtl/risc16_pkg.sv \
          $(ls rtl/*.sv | grep -v _pkg) \
          tb/tb_risc16.sv --top-module tb_risc16 -Mdir obj
./obj/Vtb_risc16
```

## Design choices and departures

The opcode table, field positions, register count and widths, state machine,
control levels and write-back select codes all follow the original
description of the processor and its simulation traces. The following points
are this implementation's own:

* **Jump semantics.** The source describes JUMP both as moving the PC "by
  the amount indicated by the offset" and as going to a "target address".
  This design uses the relative form, PC + signed offset, measured from the
  JUMP instruction itself.
* **STORE operand.** The source does not say which register STORE writes to
  memory. Here it stores Rz, the register in bits [19:16].
* **Carry definition.** The carry meaning for each operation, the one-bit
  shift distance, and when the flags are updated (on ALU write-back only)
  are not specified in the source.
* **Reset.** Reset is synchronous. It clears the registers and flags (the
  source leaves their reset values open).
* **Memories and host access.** Memory depths, the combinational
  instruction read, the registered data read, and the host load and read
  ports are additions. The source does not say how programs and data get
  into the memories.
* **Unused fields and no-write output.** Unused decoder fields and the
  "no write" select drive zero rather than high impedance.

The source gives a minimum clock period of 14.95 ns on an FPGA. This RTL has
not been timed against that figure.
