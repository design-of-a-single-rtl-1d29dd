# picoRISC-V: a single-cycle RISC-V CPU with memory-mapped I/O

This is a small RISC-V processor in which **every instruction completes in exactly one clock
cycle**. It runs *picoRISC-V*, an 11-instruction subset of RV32I that is still enough for real
programs: loops, subroutine calls and device drivers. The CPU is a Harvard machine. Instruction
memory and data memory sit on separate buses and are both read combinationally, so one clock
period covers fetch, decode, register read, ALU, memory access and write-back. An address decoder
on the data bus maps three I/O locations into the `lw`/`sw` address space. Through them a program
drives an SP0256 allophone speech-synthesizer chip by polling.

The design shows the textbook single-cycle organisation at its plainest. It has no pipeline,
no hazards and no multi-cycle control: the control unit is a pure decoder.

## The instruction subset

| instruction | format | semantics |
|---|---|---|
| `lw rd, imm(rs1)` | I | rd ← Mem[[rs1] + imm] |
| `sw rs2, imm(rs1)` | S | Mem[[rs1] + imm] ← [rs2] |
| `add/sub/and/or/slt rd, rs1, rs2` | R | rd ← [rs1] op [rs2] (`slt` is signed, result 0/1) |
| `addi rd, rs1, imm` | I | rd ← [rs1] + imm |
| `beq rs1, rs2, off` | B | if [rs1] = [rs2]: PC ← PC + off, else PC + 4 |
| `jal rd, off` | J | rd ← PC + 4; PC ← PC + off |
| `jalr rd, rs1, imm` | I | rd ← PC + 4; PC ← [rs1] + imm |

Encodings are the standard RV32I ones (opcode, funct3, funct7 in `rtl/picorv_pkg.sv`). The other
common control transfers need no hardware of their own:
- `j off` is `jal x0, off`.
- `jr rs1` is `jalr x0, rs1, 0`.
- `ret` is `jalr x0, x1, 0`.

There are 32 registers of 32 bits, and `x0` always reads 0.

## Immediate decoding

The subtle part of RISC-V decoding is the immediate. Five formats scatter the immediate bits over
`inst[31:7]`. The scattering is chosen so that each result bit comes from as few instruction
positions as possible, and so that `inst[31]` is always the sign bit. `imm_decode` builds the
32-bit operand from those 25 bits as selected by `imm_control`:

| format | result |
|---|---|
| I | `{21{i[31]}, i[30:20]}` |
| S | `{21{i[31]}, i[30:25], i[11:7]}` |
| B | `{20{i[31]}, i[7], i[30:25], i[11:8], 0}` |
| U | `{i[31:12], 12'b0}` |
| J | `{12{i[31]}, i[19:12], i[20], i[30:21], 0}` |

B and S differ only in result bits 11 and 0. The branch offset is always even, so B has no bit 0;
that slot in the instruction instead holds offset bit 11, whose normal place is taken by the sign.
The left shift of branch offsets therefore costs no shifter, only a different wire order. U is
decoded for completeness, but no picoRISC-V instruction selects it.

## One clock cycle, instruction by instruction

`datapath` holds the PC register and the register set (`gpr_set`: two combinational read ports
and one write port clocked on the rising edge). It also contains `imm_decode`, the `alu` and
three adders/selectors:

- **SrcB** is `[rs2]` (R-type, `beq`) or the immediate (`ALUSrc = 1`: `lw`, `sw`, `addi`,
  `jalr`). SrcA is always `[rs1]`.
- **Write-back** (`WD3`) is one of three values:
  - `PC+4` for `jal`/`jalr`;
  - `ReadData` for `lw` (`MemToReg`);
  - `ALUOut` for everything else.
- **Next PC** is one of three values:
  - `ALUOut` for `jalr`: the ALU adds `[rs1] + imm`;
  - `PC + imm` for `jal`, and for `beq` when the ALU's `Zero` flag is set (the ALU computes
    `[rs1] − [rs2]`);
  - `PC + 4` otherwise.
- The data memory address is always `ALUOut`, and its write data is always `[rs2]`.

Register `A1` is `inst[19:15]`, `A2` is `inst[24:20]` and `A3` is `inst[11:7]`, for every format.
A register written at the end of one cycle is read correctly by the next instruction, so nothing
needs forwarding.

The longest path is `lw`:

PC → instruction memory → register read → SrcB mux → ALU → data memory → write-back mux →
register setup

With illustrative delays (20 ns per memory access, 2 ns ALU, 1.5 ns register read) this sums to
about 44 ns, or roughly 22.7 MHz at one instruction per cycle. Every other instruction waits just
as long, and that is the price of the single-cycle scheme.

## Control unit

`control_unit` is combinational. From `opcode`, `funct3` and `funct7` it produces the control
word `ctrl_t`. From that word and `Zero` it also produces the two next-PC selects:

| instr | ALUSrc | ALUControl | MemWrite | MemToReg | RegWrite | BranchBeq | BranchJal | BranchJalr | ImmControl |
|---|---|---|---|---|---|---|---|---|---|
| lw   | 1 | add | 0 | 1 | 1 | 0 | 0 | 0 | I |
| sw   | 1 | add | 1 | – | 0 | 0 | 0 | 0 | S |
| add  | 0 | add | 0 | 0 | 1 | 0 | 0 | 0 | – |
| sub  | 0 | sub | 0 | 0 | 1 | 0 | 0 | 0 | – |
| slt  | 0 | slt | 0 | 0 | 1 | 0 | 0 | 0 | – |
| or   | 0 | or  | 0 | 0 | 1 | 0 | 0 | 0 | – |
| and  | 0 | and | 0 | 0 | 1 | 0 | 0 | 0 | – |
| addi | 1 | add | 0 | 0 | 1 | 0 | 0 | 0 | I |
| beq  | 0 | sub | 0 | – | 0 | 1 | 0 | 0 | B |
| jal  | – | –   | 0 | – | 1 | 0 | 1 | 0 | J |
| jalr | 1 | add | 0 | – | 1 | 0 | 0 | 1 | I |

The two next-PC selects are:
- `pc_src_target = BranchJal | (BranchBeq & Zero)`
- `pc_src_alu = BranchJalr`

Any encoding outside the subset is a no-operation: no register or memory write, and the PC
advances by 4. The enum codes of `ALUControl` and `ImmControl` are arbitrary (see the package).

## Memories

- **`instr_mem`**: word array, combinational read at byte address `PC` (`A[1:0]` ignored). It
  also has a load port (`prog_we`, `prog_addr` as a word address, `prog_wdata`) that writes one
  word per clock. Use the load port while the CPU is held in reset.
- **`data_mem`**: word array, combinational read, and a write at the rising edge when `WE = 1`.
  Only aligned words exist.

Both default to 1024 words (4 KiB). Addresses beyond the array wrap around.

## Memory-mapped I/O and the speech synthesizer

`addr_decoder` watches `Address` and `MemWrite` on the data bus:

| address | access | effect |
|---|---|---|
| `0xFFFF_FF00` | `sw` | `WriteData[5:0]` → pins A6:1 (allophone code) |
| `0xFFFF_FF04` | `sw` | `WriteData[0]` → pin ALD# |
| `0xFFFF_FF08` | `lw` | SBY in bit 0 of `ReadData` |

Addresses from `0xFFFF_FF00` upward belong to I/O, and the decoder handles them as follows:
- Stores there never reach the data memory.
- Loads there return the SBY word (at `0xFFFF_FF08`) or 0.
- Every other address goes to the data memory.

These addresses can be reached from `x0` with a negative 12-bit offset. For example, `0xF08`
sign-extends to `0xFFFF_FF08`. `sp0256_port` holds A6:1 and ALD# in registers. A6:1 resets to 0
and ALD# resets to 1 (inactive). Each register loads at the rising edge that ends its `sw`.

The chip reads A6:1 on a falling edge of ALD#, but only when SBY = 1. It then drops SBY while it
speaks. A driver therefore loops as follows:
1. Store 1 to ALD#.
2. Poll SBY until it reads 1.
3. Store the code to A6:1.
4. Store 0 to ALD#, which gives the falling edge.

That is busy-waiting. The SP0256 itself is outside this RTL, and its pins are top-level ports of
`picorv_system`. `tb/sp0256_model.sv` is a behavioural stand-in for simulation.

## Hierarchy and parameters

```
picorv_system  (IMEM_WORDS = 1024, DMEM_WORDS = 1024)
├── picorv_cpu (RESET_PC = 0)
│   ├── control_unit
│   └── datapath
│       ├── gpr_set (WIDTH = 32, NREGS = 32)
│       ├── imm_decode
│       └── alu (WIDTH = 32)
├── instr_mem (WORDS)
├── data_mem (WORDS)
├── addr_decoder (IO_BASE, A_ADDR, ALD_ADDR, SBY_ADDR)
└── sp0256_port
```

`picorv_pkg` holds the encodings and the `ctrl_t` struct. Reset is synchronous and active high.
It resets the PC and the I/O registers, but not the registers or the memories (as on most RISC-V
parts, their contents are undefined at power-up).

## Simulating

Each testbench is self-checking and ends with `TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb -Irtl -Itb \
    rtl/picorv_pkg.sv tb/rv_asm_pkg.sv tb/rv_ref_pkg.sv tb/tb_picorv_system.sv \
    --top-module tb_picorv_system -Mdir obj && ./obj/Vtb_picorv_system
```

Substitute any other testbench name. The testbench helper packages are:
- `tb/rv_asm_pkg.sv`: instruction encoders, so that test programs are written as
  `asm_addi(1, 0, 4)` and so on.
- `tb/rv_ref_pkg.sv`: an instruction-level reference interpreter.

| testbench | what it shows |
|---|---|
| `tb_picorv_system` | Full system at default sizes. It stores five allophone codes, calls `gcd(25,15)` with `jal`/`jalr`, computes `and`/`or`, then runs the polling speech driver against the SP0256 model. It checks the five codes arrive in order, plus the gcd/and/or results, that I/O stores miss the data memory, and that the PC advances every cycle. It counts each instruction kind, taken and not-taken branches, busy and ready polls, and the I/O writes, and fails if any count is zero. |
| `tb_program_examples` | Small programs on the full system: register summation, memory-cell increment, conditional assignment (both outcomes), and the raw word `0x00402583` (`lw x11,4(x0)`). Each checks its result and its exact cycle count. |
| `tb_picorv_cpu` | The CPU in lock step with the reference interpreter: the PC and every store must match on every cycle, which also proves CPI = 1. It runs the gcd program (24 cycles to halt) and 20 random 400-instruction programs. |
| `tb_datapath`, `tb_control_unit` | The datapath with hand-driven control, and the decoder against its own table. |
| `tb_imm_decode`, `tb_alu`, `tb_gpr_set`, `tb_instr_mem`, `tb_data_mem`, `tb_addr_decoder`, `tb_sp0256_port` | Unit tests with random and corner values against independent models. |

## What is specified and what is chosen here

These parts follow the RV32I / picoRISC-V definition and the intended organisation:
- the instruction set, its encodings and immediate formats;
- the 32×32 register set with hardwired `x0`;
- the combinational-read / clocked-write memories;
- the datapath connections;
- the combinational control unit driven by `Zero`;
- the I/O addresses and the bit lanes to the SP0256 pins.

These are this implementation's own decisions:
- **Control-word values.** The control unit's outputs per instruction are derived from the
  instruction semantics, as in the table above. So is `PC+4` write-back selected by the two jump
  signals, since no separate select signal exists.
- **Jump targets.** `jalr` computes its target in the ALU, and PC-relative targets use their own
  adder.
- **Sizes and loading.** Both memories have 1024 words. The instruction memory has a program-load
  port.
- **Reset.** Reset is synchronous; the PC starts at 0.
- **I/O window and registers.** The I/O window is the top 256 bytes, with reads of write-only
  locations returning 0. A6:1 and ALD# are held in registers. SBY is used without a
  synchronizer, so an asynchronous SBY would need a two-flop synchronizer added before
  `addr_decoder`.
- **Unknown instructions** execute as no-ops. The architecture does not define traps here.

Not modelled: the SP0256's sound generation (only its handshake, in the testbench model), and
interrupts. Polling is the only way to wait for the device.
