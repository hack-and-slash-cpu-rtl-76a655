# A minimal 8-bit accumulator CPU

This is a small teaching CPU, written to be built in a few sessions. It has:

- 8-bit data;
- one accumulator (ACC) and one general purpose register (B);
- two flags, zero (Z) and overflow (OV);
- 16-bit instructions with a 5-bit opcode, so room for 32 instructions, of which 24 are defined;
- a 256-word program ROM and a 256-byte data RAM.

A four-state machine runs every instruction in exactly four clock cycles: fetch, decode,
execute, write-back. Nothing overlaps: there is no pipeline, cache or interrupt. The design is
small enough to read in one sitting, so what needs care is the contract between its parts:

- which command the control unit sends to the data path in which cycle;
- when the flags change;
- what a jump sees.

## Block structure

```
             +--------------+   instr_addr   +-----------------+
             | control_unit |--------------->| inst_mem        |
             |  FSM, PC, IR |<---------------| 256 x 16 ROM    |
             |  decoder     |   instruction  +-----------------+
             +--------------+
        cmd, data_to_dpu |  ^ flags (Z bit 2, OV bit 0)
                         v  |
             +--------------+   ACC (write data)   +----------------+
             | dpu          |--------------------->| data_mem       |
             | ACC, B, ALU, |<---------------------| 256 x 8 RAM    |
             | Z, OV        |   read data          +----------------+
             +--------------+        address and write enable come from control_unit
```

| File | What it is |
|---|---|
| `rtl/cpu_pkg.sv` | Widths, opcode table, ALU operation codes, the data-path command struct `dpu_cmd_t` |
| `rtl/cpu_top.sv` | The whole CPU (top module) |
| `rtl/control_unit.sv` | Four-state sequencer with PC and instruction register |
| `rtl/instr_decoder.sv` | Opcode to instruction decoder (undefined opcodes decode as NOP) |
| `rtl/dpu.sv` | Data path: ACC, B, the two multiplexers, ALU, flags |
| `rtl/alu.sv` | 8-bit ALU |
| `rtl/mux4.sv` | 4-input multiplexer, used twice in the data path |
| `rtl/flag_unit.sv` | Z and OV registers |
| `rtl/data_mem.sv` | Data RAM, asynchronous read, write on clock edge, cleared by reset |
| `rtl/inst_mem.sv` | Program ROM, loaded from a hex file |
| `rtl/demo_program.hex` | The default program |

## Instruction format and instruction set

```
 15    13 12      8 7            0
+--------+---------+--------------+
| unused | opcode  |     data     |
+--------+---------+--------------+
```

`data` holds one of three things, depending on the instruction:

- a data memory address;
- an immediate value for B;
- a jump target in the program ROM.

The three top bits are ignored.

| Opcode | Mnemonic | Effect | Flags |
|---|---|---|---|
| 00000 | Add_A_B | ACC = ACC + B | Z, OV |
| 00001 | Add_A_Mem | ACC = ACC + M[data] | Z, OV |
| 00010 | Sub_A_B | ACC = ACC - B | Z, OV |
| 00011 | Sub_A_Mem | ACC = ACC - M[data] | Z, OV |
| 00100 | IncA | ACC = ACC + 1 | Z, OV |
| 00101 | DecA | ACC = ACC - 1 | Z, OV |
| 00110 | ShiftA_R | ACC = ACC >> 1 (logical) | Z |
| 00111 | ShiftA_L | ACC = ACC << 1 | Z |
| 01000 | And_A_B | ACC = ACC & B | Z |
| 01001 | OR_A_B | ACC = ACC \| B | Z |
| 01010 | XOR_A_B | ACC = ACC ^ B | Z |
| 01011 | Load_Mem_B | B = M[data] | – |
| 01100 | Store_A_Mem | M[data] = ACC | – |
| 01101 | Jmp | PC = data | – |
| 01110 | Jmp_Z | if Z: PC = data | – |
| 01111 | Jmp_OV | if OV: PC = data | – |
| 10000 / 10001 | SetZ / ClearZ | Z = 1 / Z = 0 | Z |
| 10010 / 10011 | SetOV / ClearOV | OV = 1 / OV = 0 | OV |
| 11000 | NOP | nothing | – |
| 11001 | HALT | stop; the CPU stays in write-back for good | – |
| 11010 | NegA | ACC = -ACC (two's complement) | Z |
| 11011 | LoadBControl | B = data (immediate) | – |
| others | – | treated as NOP | – |

There is no instruction that loads ACC directly. ACC is 0 after reset, so a program fills it
with `Add_A_Mem` or `LoadBControl` followed by `Add_A_B`. To clear it:

1. `Store_A_Mem x`;
2. `Load_Mem_B x`;
3. `XOR_A_B`.

The demo program uses all of these idioms.

## Timing: four cycles per instruction

| Cycle | State | What happens |
|---|---|---|
| 1 | FETCH | The ROM is read at PC. The word is loaded into IR at the clock edge. |
| 2 | DECODE | The decoder works on the IR opcode. Nothing is written. |
| 3 | EXECUTE | The control unit sends the instruction's command to the data path (see below). ACC, B and the flags change at the clock edge that ends this cycle. |
| 4 | WRITEBACK | `Store_A_Mem` writes ACC to memory, and the PC is updated (see below). |

In the EXECUTE cycle, instructions that read memory (`Add_A_Mem`, `Sub_A_Mem`, `Load_Mem_B`)
put `data` on the memory address. The RAM reads asynchronously, so the word reaches the data
path in the same cycle. `LoadBControl` puts `data` on `data_to_dpu`.

In the WRITEBACK cycle the new PC is:

- `data` for `Jmp`;
- `data` for `Jmp_Z` if Z = 1, and for `Jmp_OV` if OV = 1;
- PC + 1 in every other case.

`HALT` holds the PC and stays in WRITEBACK.

So the throughput is always one instruction per four cycles. The flags a conditional jump
tests were written by an earlier instruction, at the latest at the end of its own EXECUTE
cycle.

`halted` (a top-level port) is 1 from the WRITEBACK cycle of a HALT onward. The only way out
is reset. Reset is asynchronous and active high. It:

- puts the FSM in FETCH;
- clears PC, IR, ACC, B, Z and OV;
- clears all 256 data words.

## The data path

```
 data_cu ─┬───────────────┐           data_mem ─┬──────────────┐
          │               │                     │              │
   B ◄── mux4(B, data_cu, data_mem, ALU result)  │              │
   │                                            │              │
   └──► mux4(B, data_cu, data_mem, 8'd1) ──► ALU operand b      │
                                              ALU operand a = ACC
                                              ALU result ──► ACC (if acc_we), flags
```

The control unit steers all of this with one packed struct, `dpu_cmd_t` (in `cpu_pkg`):

- `alu_op`: the ALU operation;
- `opnd_sel`: what feeds ALU operand b;
- `b_sel`: what is loaded into B (`BSEL_HOLD` keeps it);
- `acc_we`: whether ACC is written;
- `z_op` and `ov_op`: hold, update, set or clear each flag.

When the data path is idle the command is `DPU_IDLE`: the ALU passes ACC through ("bypass A")
and nothing is written.

Increment and decrement have no ALU operations of their own: they are add and subtract with
the constant 1 selected as operand. The ALU also has a "bypass B" operation, which no
instruction uses. The B multiplexer's ALU-result input is wired, but no instruction selects it
either.

### Flags

- **Z** is the NOR of the eight bits of the value written into ACC, so it is 1 when that value
  is zero.
- **OV** is the signed overflow of the adder, from the sign bits of the operands (a, b) and of
  the result r:

      OV = (a7 & b7 & ~r7) | (~a7 & ~b7 & r7)

  For a subtraction, the sign of b is inverted before this formula is applied, because the
  adder then adds ~b.

Both flags are registers, because SetZ, ClearZ, SetOV and ClearOV must be able to write them.

- Every instruction that writes ACC updates Z.
- Only add, subtract, increment and decrement update OV. Logic operations, shifts and negation
  leave OV unchanged.
- Flags are unchanged by loads, stores, jumps and NOP.

The control unit receives the flags as a 3-bit bus, with Z at bit 2 and OV at bit 0. Bit 1 is
unused and reads 0.

## Memories

- **`data_mem`** has 256 words of 8 bits.
  - Reads are asynchronous.
  - A write happens at the rising clock edge when `we` is 1.
  - Reset clears every word, so the RAM is built from flip-flops rather than an inferred
    memory.
  - The write data is always ACC.
- **`inst_mem`** is a 256 x 16 ROM with asynchronous read.
  - At elaboration every word is filled with NOP and the last word (255) with HALT, so a
    program that runs off its end stops there.
  - The file named by the parameter `INIT_FILE` is then loaded over this fill, with
    `$readmemh`, from address 0.

The program file has one 16-bit hex word per line, and `//` comments are allowed. A word is
`opcode << 8 | data`, so for example:

- `1b05` is `LoadBControl 5`;
- `0c10` is `Store_A_Mem 0x10`;
- `1900` is `HALT`.

`cpu_top` passes its parameter `PROGRAM_FILE` (default `rtl/demo_program.hex`) on to the ROM.
The path is relative to the directory the simulator runs in.

The default program covers every defined opcode and one undefined opcode. It also covers:

- both outcomes of both conditional jumps;
- a count-down loop;
- an add overflow and a subtract overflow.

It ends by loading back into B the words it stored and not yet read, so the data memory contents are checked too. It halts after 54 instructions (216 cycles).

## Simulating

Each testbench in `tb/` checks itself. It ends by printing
`TB_RESULT checks=N failures=M`. Run from the directory that holds `rtl/` and `tb/`, for
example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb rtl/cpu_pkg.sv tb/tb_cpu_top.sv \
          --top-module tb_cpu_top -o sim && ./obj_dir/sim
```

| Testbench | What it checks |
|---|---|
| `tb_cpu_top` | Runs the default program at default parameters. A separate instruction-level model in the testbench executes the same file. After every four cycles it compares PC, ACC, B, Z and OV, and it checks when `halted` rises. It counts each mechanism (every opcode, jumps taken and not taken, Z and OV set by arithmetic, an undefined opcode) and fails if one never happens. |
| `tb_control_unit` | A random program with random flags. Checks the state order, the command in EXECUTE, memory address and write strobe, the next PC, and HALT. |
| `tb_dpu` | Random commands. Compares ACC, B and the flags with a register model. |
| `tb_alu`, `tb_mux4`, `tb_flag_unit`, `tb_instr_decoder` | Exhaustive or random comparison with independent reference expressions. |
| `tb_data_mem` | Random writes and reads, write enable, reset clearing. |
| `tb_inst_mem` | Loads `tb/imem_test.hex` and checks the NOP fill and the HALT at address 255. |

To run your own program, point `PROGRAM_FILE` at another hex file. The instruction-level model
in `tb_cpu_top` reads `rtl/demo_program.hex`; change that path as well.

## Design choices beyond the original description

The block structure, the four-state sequence, the instruction list, the first six and last
four opcodes, the flag formulas, the flag bit positions and the memory sizes follow the
original design. The following are choices made here:

- **Opcodes 00110 to 10011.** These were assigned in the order in which the instructions are
  listed.
- **Multiplexer select encodings** and the format of the command word.
- **Operation details.**
  - Shift right is logical. The requirements mention both arithmetic and logical shifts, but
    there is only one right-shift instruction.
  - Negation is two's complement.
- **Flag behaviour.**
  - Which instructions update OV.
  - OV for subtraction uses the inverted sign of b.
  - Z is registered and computed from the value written into ACC.
- **Control signals.**
  - The memory address of memory-reading instructions is driven in EXECUTE, and the store in
    WRITEBACK.
  - The immediate of `LoadBControl` travels on `data_to_dpu`.
- **Reset.** Every register uses an asynchronous reset.
- **Program loading.** The ROM is loaded from a file, and unused words are NOP.
- **Observation ports.** `halted`, `pc`, `acc`, `b_reg` and `flags` on `cpu_top` are additions.

The program ROM is read through `$readmemh`. Synthesis tools that do not read the file see only
the NOP/HALT fill.
