# Euclid: a 16-bit processor with vectored interrupts and port I/O

Euclid is a small 16-bit load/store processor. Its instruction set has 24 instructions. Every instruction is one 16-bit word, and most use two operands: the first register is both a source and the destination. The ISA itself defines three mechanisms that are not obvious:

- **Restricted control flow.** Conditional branches only go forward, at most 31 instructions. Direct jumps only reach targets in the current 4 KiB region. Anything else uses an idiom built from an inverted branch, `LUI`, `ORI` and `JR`.
- **Vectored interrupts.** A bank of eight interrupt address registers (IAR0–IAR7) holds the handler addresses. An 8-bit pending mask (IntStatus), a global enable (EI) and a saved PC (IPC) complete the scheme.
- **Port I/O.** Two 4-bit input ports and one 16-bit output port are reached by dedicated instructions (`GETPORT`, `SETPORT`), not through memory.

This repository is a synthesizable SystemVerilog implementation of that ISA. It is a simple multicycle machine with a unified 64 KiB memory. The ISA description fixes the instruction encodings and the visible state. It says nothing about the microarchitecture, so the sequencing, timing, reset behaviour and memory organisation described below are this implementation's own choices. The section "Decisions the ISA leaves open" lists them all.

## Programmer's model

| State | Width | Notes |
|---|---|---|
| `$ra`, `$g1`–`$g7` | 8 × 16 | Register code 0 is `$ra`. It is a normal writable register, not a zero register. `JAL` writes it. |
| PC | 16 | Byte address. Instructions are 2 bytes apart. Reset value 0. |
| IR | 16 | Current instruction. |
| IAR0–IAR7 | 8 × 16 | Handler address for each interrupt source. |
| IntStatus | 8 | One pending bit per interrupt source. |
| EI | 1 | Interrupt enable. 0 after reset. |
| IPC | 16 | PC saved when an interrupt is taken. |
| IN0, IN1 | 4 each | Input ports. Port numbers 000 and 001. |
| OUT0 | 16 | Output port register. Port number 011. |

Register conventions (software only): `$g2`/`$g3` hold arguments, `$g6` holds the return value, and `$g1`, `$g4`, `$g5`, `$g7` are temporaries.

## Instruction encoding

The opcode is in bits [15:11]. The three 3-bit fields are called A = [10:8], B = [7:5] and C = [4:2]. `imm8` = [7:0], `label5` = [4:0] and `addr11` = [10:0]. In the table, "PC" means the address of the *next* instruction (the instruction's own address + 2).

| Op | Mnemonic | Fields | Effect |
|---|---|---|---|
| 0 | `ADD rd, rs` | A=rd, B=rs | rd ← rd + rs |
| 1 | `SUB rd, rs` | A=rd, B=rs | rd ← rd − rs |
| 2 | `SL rd, imm` | A=rd, imm8 | rd ← rd << imm[3:0] |
| 3 | `SLT rt, rd, rs` | A=rd, B=rs, C=rt | rt ← (rd < rs) ? 1 : 0, signed |
| 4 | `BEQ rd, rs, n` | A, B, label5 | if rd == rs: PC ← PC + 2·n |
| 5 | `BNE rd, rs, n` | A, B, label5 | if rd != rs: PC ← PC + 2·n |
| 6 | `JAL target` | addr11 | $ra ← PC; PC ← {PC[15:12], addr11, 0} |
| 7 | `J target` | addr11 | PC ← {PC[15:12], addr11, 0} |
| 8 | `JR rd` | A=rd | PC ← rd |
| 9 | `ORI rd, imm` | A=rd, imm8 | rd ← rd \| zext(imm8) |
| 10 | `LUI rd, imm` | A=rd, imm8 | rd ← {imm8, 8'h00} |
| 11 | `SW rd, rs` | A=rd, B=rs | mem[rs] ← rd |
| 12 | `LW rd, rs` | A=rd, B=rs | rd ← mem[rs] |
| 13 | `ASSIGN iar, imm` | A=iar, imm8 | IAR[iar] ← {PC[15:8], imm8} |
| 14 | `TOGGLEI` | — | EI ← ~EI |
| 15 | `ENDI` | — | PC ← IPC; EI ← 1 |
| 16 | `GETPORT port, rd` | A=port, **B=rd** | rd ← port (inputs zero-extended) |
| 17 | `SETPORT port, rs` | A=port, **B=rs** | if port == 011: OUT0 ← rs |
| 18 | `ASSIGNR iar, rd` | A=iar, **B=rd** | IAR[iar] ← rd |
| 19 | `SR rd, imm` | A=rd, imm8 | rd ← rd >> imm[3:0], logical |
| 20 | `OR rd, rs` | A=rd, B=rs | rd ← rd \| rs |
| 21 | `AND rd, rs` | A=rd, B=rs | rd ← rd & rs |
| 22 | `ADDI rd, imm` | A=rd, imm8 | rd ← rd + sext(imm8) |
| 23 | `SUBI rd, imm` | A=rd, imm8 | rd ← rd − sext(imm8) |
| 24–31 | — | — | unused. Executed as no-ops. |

Three encodings are easy to get wrong:

- In `GETPORT`, `SETPORT` and `ASSIGNR`, the register is in field B, not field A. Field A holds the port or IAR number.
- `SLT` writes field C.
- The `J`/`JAL` field holds address bits [11:1]. For example, `JAL 0x0004` encodes as `0x3002`.

## Control flow, and how to reach far targets

The three branch and jump forms have different reach:

- **BEQ/BNE** add an *unsigned* instruction count (0–31) to the address of the next instruction. A label of 0 therefore falls through. Loops must be closed with `J`.
- **J/JAL** keep the top four bits of PC. They can only reach code in the same 4 KiB region.
- **JR** reaches any address. To build the address, `LUI` sets the high byte and clears the low byte, and `ORI` then fills in the low byte.

A conditional branch to a far label is therefore written with the condition inverted, so that it skips the three instructions of a register jump:

```
BNE  rd, rs, 3        ; was: BEQ rd, rs, far
LUI  $g2, hi(far)
ORI  $g2, lo(far)
JR   $g2
```

A label of 3 lands on the instruction after `JR`, which is what the branch rule gives. (A label of 2 would land on the `JR` itself.)

## Interrupts

The interrupt sources are eight request inputs, `irq[7:0]`. A one-cycle pulse on `irq[i]` sets IntStatus bit *i*. The bit stays set until the interrupt is taken, so a request that arrives while interrupts are disabled is not lost.

Interrupts are only taken between instructions. At each instruction boundary, if EI = 1 and any IntStatus bit is set:

1. the lowest-numbered set bit *i* is chosen (fixed priority);
2. IPC ← PC, the address of the instruction that would have run next;
3. PC ← IAR[*i*];
4. IntStatus bit *i* is cleared and EI is cleared.

This costs one clock cycle. Handlers do not nest, because EI stays 0 until the handler executes `ENDI`. `ENDI` restores PC from IPC and sets EI. No registers are saved automatically, so a handler must leave the interrupted code's registers alone or save them itself.

Handler addresses are installed in two ways:

- `ASSIGN iar, imm8` takes the high byte of the address from the current PC, so it only works for a handler in the same 256-byte page.
- `ASSIGNR iar, rd` takes a full 16-bit address from a register. Build that address with `LUI`/`ORI` first.

After reset, EI is 0 and all IARs are 0. A program installs its handlers and then executes `TOGGLEI` to enable interrupts.

## Microarchitecture and timing

```
euclid_system
├── euclid_cpu
│   ├── control_unit     sequencer + decoder (state_e, ctrl_t)
│   ├── regfile          8×16, 2 async read ports (fields A, B), 1 write port
│   ├── alu              add/sub/shift/slt/or/and/lui
│   ├── iar_file         8×16, read port driven by the interrupt number
│   ├── interrupt_ctrl   IntStatus, EI, IPC, priority select
│   └── io_ports         IN0/IN1 read mux, OUT0 register
└── memory               32 Ki × 16, one synchronous port, byte-addressed
```

One memory port serves both instruction fetch and `LW`/`SW`, so the machine is multicycle:

| State | Action | Next state |
|---|---|---|
| `S_FETCH` | If an interrupt is pending, take it and stay in `S_FETCH`. Otherwise drive PC to memory. | `S_LOADIR` |
| `S_LOADIR` | IR ← memory word; PC ← PC + 2. | `S_EXEC` |
| `S_EXEC` | Execute the whole instruction (`LW` only drives its address). | `S_FETCH`; `S_MEMWB` for `LW` |
| `S_MEMWB` | rd ← memory word (`LW` only). | `S_FETCH` |

Instructions take 3 cycles. `LW` takes 4. Taking an interrupt adds 1. During `S_EXEC`, PC already holds the address of the next instruction. That is why branch targets, the `JAL` link value and the `ASSIGN` page all come straight from the PC register.

Both register read ports are always addressed by fields A and B of IR. Operand *a* of the ALU is field A. Operand *b* is either field B or the 8-bit immediate: sign-extended for `ADDI`/`SUBI`, zero-extended for the shifts, `ORI` and `LUI`. The register written is field A, field B (`GETPORT`), field C (`SLT`) or `$ra` (`JAL`). The control word is the packed struct `ctrl_t` in `euclid_pkg`. `control_unit` produces it for every cycle.

The memory ignores address bit 0, for both fetch and `LW`/`SW`. Reads have one cycle of latency. The memory is not reset: a program must be in it before `rst_n` is released. The testbenches write `u_mem.mem` directly.

## Decisions the ISA leaves open

These follow the ISA's stated rules, but the details are this implementation's choices:

- Multicycle sequencing, cycle counts, and a single unified 64 KiB memory (parameter `MEM_ADDR_BITS = 15`, counted in words).
- Reset is asynchronous and active low. It clears PC, IR, all registers, all IARs, IntStatus, EI, IPC and OUT0.
- `SR` is a logical shift. `SLT` compares signed values. Arithmetic wraps, with no overflow detection.
- The shift amount is `imm[3:0]`, so the largest shift is 15.
- How interrupts are requested (`irq` pulse inputs), the fixed priority, and clearing EI on interrupt entry.
- `J`/`JAL` and `ASSIGN` take their high address bits from the already incremented PC. These differ from the instruction's own address only at a region or page boundary.
- `GETPORT` of port 011 reads back OUT0. Unused port numbers read 0. `SETPORT` to any port other than 011 is ignored.
- The ISA text restricts `ASSIGN` to IAR0 and IAR1 in one place but defines eight IARs and a 3-bit field. All eight are writable here.
- Opcodes 24–31 are no-ops.
- The sample call/return program ends at a label called `exit` that has no encoding. The testbench puts a jump-to-self there.

## Verification

Every block has a self-checking testbench in `tb/`. Each prints `TB_RESULT checks=N failures=M` and has a cycle watchdog.

| Testbench | What it checks |
|---|---|
| `regfile_tb`, `iar_file_tb` | reset values, then random reads and writes against a reference array |
| `alu_tb` | every operation on corner and random operands, computed independently with integers |
| `interrupt_ctrl_tb` | cycle-accurate model of IntStatus/EI/IPC under random requests, takes, TOGGLEI and ENDI |
| `io_ports_tb` | port decode, zero-extension, and that only port 011 writes OUT0 |
| `memory_tb` | full 32 Ki-word array, one-cycle read latency, address bit 0 ignored |
| `control_unit_tb` | for all 32 opcodes, both branch outcomes: state sequence, 3/4-cycle length, control word; interrupt take only in `S_FETCH` |
| `euclid_cpu_tb` | lockstep against an instruction-set model in the testbench: 40 episodes of random code filling all of memory, random interrupts. After every instruction it compares all registers, PC, IARs, EI, IPC, IntStatus and OUT0, plus the cycles per instruction. |
| `euclid_system_tb` | full-size system, see below |

`euclid_system_tb` runs at the default parameters in two parts:

1. **The sample call/return program.** It is loaded from its binary encoding. The test checks that it reaches its exit after 7 instructions (21 cycles) with `$ra = $g2 = 2`.
2. **A Euclid's-algorithm program.** It computes GCDs by repeated subtraction: for a table in memory, and for the two input ports (result written to OUT0). While it runs, the testbench pulses interrupt lines 2 and 5. Their handlers, one installed with `ASSIGN` and one with `ASSIGNR` at 0x1200, count the pulses in memory. The program finishes through the long-branch idiom, and then runs code that uses the shift and logic instructions.

The system test checks the results, the interrupt counts and the OUT0 values. It also fails if any of the following never happened: any of the 24 opcodes, an interrupt on either line, a taken or an untaken `BEQ` or `BNE`, or the long branch.

To run a testbench with Verilator, for example the system test:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/euclid_pkg.sv tb/euclid_asm_pkg.sv tb/euclid_system_tb.sv \
    --top-module euclid_system_tb
./obj_dir/Veuclid_system_tb
```

Replace `euclid_system_tb` with any other testbench name. `tb/euclid_asm_pkg.sv` provides the instruction encoders (`r_type`, `i_type`, `b_type`, `j_type`) used to write test programs. All testbenches finish in well under a second of simulation time.

## Changing the design

- **Memory size.** `MEM_ADDR_BITS` on `euclid_system` sets the memory size (2^N words). Up to 15 the memory covers the whole 16-bit address space; values above 15 are not supported.
- **Opcodes.** Opcodes and port numbers are in `rtl/euclid_pkg.sv`. A new instruction needs an entry in `opcode_e`, a case in `control_unit`'s `S_EXEC` decode, and, if it needs new datapath paths, a new `ctrl_t` field used in `euclid_cpu`.
- **Output ports.** Further output ports (the port field has room for them) go into `io_ports`.
- **Widths.** `regfile`, `iar_file`, `alu`, `interrupt_ctrl` and `io_ports` take width and size parameters. `euclid_cpu` itself is written for 16-bit words, as the instruction formats require.
