# RV32I single-cycle core

A 32-bit RISC-V processor in which every instruction takes exactly one clock
cycle. There are no pipeline registers. In each cycle the instruction at the
PC is fetched, decoded, given its operands and ALU operation, and given its
data-memory access if it has one. The result is then written back at the next
rising edge. Control stays trivial: one decoder, no stalls, no forwarding. The
price is a long critical path, because one cycle has to cover instruction
memory, register read, ALU, data memory and register write-back.

The RTL follows the single-cycle organisation published in *Implementation of
RISC-V Single Cycle Core* (PC, +4 adder, instruction memory, control unit,
32-entry register file, ALU with a zero flag). It completes that organisation
to the full RV32I base integer instruction set. That publication targets
RV32I and reports 32 MHz and 7.9 mW on Spartan-3E/Spartan-6 FPGAs, with 64 KiB
of instruction memory and 16 KiB of data memory. Those two sizes are the
defaults here. The clock and power numbers belong to that FPGA build and are
not reproduced or checked by this RTL.

## Datapath

```
          +-------+   +-----------+  instr[6:0],[14:12],[30]  +--------------+
   +----->|  PC   |-->| instr_mem |-------------------------->| control_unit |--> ctrl (struct)
   |      +-------+   +-----------+                           +--------------+
   |          |             | [19:15] [24:20] [11:7]
   |          |             v
   |          |       +-----------+ rdata1 -> mux3 (rs1 | PC | 0) ---------> A +-----+
   |          |       | reg_file  | rdata2 -> mux2 (rs2 | imm) -------------> B | alu |--> zero
   |          |       +-----------+          ^                                  +-----+
   |          |             ^          imm_gen                                   |result
   |          |             |                                                    v
   |          |             +--- mux3 (ALU result | load data | PC+4) <--- data_mem (addr = result,
   |          |                                                              wdata = rdata2)
   |   adder PC+4, adder PC+imm
   +--- mux3 (PC+4 | PC+imm | {result[31:1],0})
```

| Module            | Role |
|-------------------|------|
| `program_counter` | 32-bit PC register. Synchronous reset to 0. |
| `adder`           | Two instances: PC + 4, and PC + immediate (branch and `jal` target). |
| `instr_mem`       | Instruction RAM. Combinational fetch port and a clocked program-load port. |
| `control_unit`    | Decodes opcode `[6:0]`, funct3 `[14:12]` and bit 30 into one `ctrl_t` struct. |
| `reg_file`        | x0..x31. Two combinational read ports and one write port at the clock edge. x0 is hard-wired to zero. |
| `imm_gen`         | Builds the I, S, B, U and J immediates, sign-extended. |
| `mux2`, `mux3`    | ALU operand B. ALU operand A, write-back value and next PC. |
| `alu`             | add, sub, and, or, xor, slt, sltu, sll, srl, sra, plus the zero flag. |
| `data_mem`        | Byte-addressed data RAM with byte, half-word and word accesses. |
| `riscv_core`      | Top level that wires all of the above. |
| `riscv_pkg`       | Opcodes, ALU codes, mux select codes and the `ctrl_t` control struct. |

The following parts, and how they connect, are the published organisation:
PC, +4 adder, instruction memory, control unit fed by `[30,14:12]` and `[6:0]`,
register file with read ports on `[19:15]` and `[24:20]` and write port on
`[11:7]`, and ALU with result and zero outputs. Its block diagram writes the
ALU result straight back, so it only covers register-register instructions.

The rest is this implementation's own structure, added to cover all of
RV32I: the immediate generator, the operand multiplexers, the data memory,
the write-back multiplexer and the branch/jump next-PC selection.

## How each instruction class uses the datapath

| Class                  | ALU A | ALU B | ALU op          | Write-back | Next PC |
|------------------------|-------|-------|-----------------|------------|---------|
| R-type                 | rs1   | rs2   | funct3 / bit 30 | ALU        | PC+4 |
| I-type ALU             | rs1   | imm I | funct3 (bit 30 only for `srai`) | ALU | PC+4 |
| load                   | rs1   | imm I | add             | load data  | PC+4 |
| store                  | rs1   | imm S | add             | none       | PC+4 |
| `beq`/`bne`            | rs1   | rs2   | sub             | none       | PC+imm B if zero / not zero |
| `blt`/`bge`            | rs1   | rs2   | slt             | none       | PC+imm B if not zero / zero |
| `bltu`/`bgeu`          | rs1   | rs2   | sltu            | none       | PC+imm B if not zero / zero |
| `jal`                  | -     | -     | -               | PC+4       | PC+imm J |
| `jalr`                 | rs1   | imm I | add             | PC+4       | result with bit 0 cleared |
| `lui`                  | 0     | imm U | add             | ALU        | PC+4 |
| `auipc`                | PC    | imm U | add             | ALU        | PC+4 |
| fence, ecall, ebreak, CSR, unknown | - | - | -         | none       | PC+4, `illegal` = 1 |

**Branches use only the zero flag.** Every conditional branch becomes one ALU
operation plus a test of `zero`. For equality the ALU subtracts. For ordering
it computes slt or sltu, which gives 1 when the branch condition is
"less than". `bne`, `blt` and `bltu` are taken when the result is non-zero.
`beq`, `bge` and `bgeu` are taken when it is zero. So the ALU needs no
separate comparator outputs, and the decoder just sets a two-bit `branch`
field (`BR_IF_ZERO` or `BR_IF_NZERO`).

**ALU operation codes** (`alu_control[3:0]`): AND 0, OR 1, ADD 2, SLL 3,
SUB 4, SRL 5, SRA 6, XOR 7, SLT 8, SLTU 9. ADD = 2 and SUB = 4 match the
values the published simulation shows for `add` and `sub`. The other codes
are this implementation's choice.

## Timing and interface

- **One instruction per clock.** The PC, the register file and the data
  memory update at the rising edge. Everything between them is
  combinational: instruction fetch, decode, register read, immediate, ALU,
  data-memory read and multiplexers. So the core's cycle time is the sum of
  all of those delays.
- **Memories read combinationally.** Both memories are written at the clock
  edge. If an FPGA block RAM needs a registered read, the core as written does
  not map onto it directly. Such a core would need a different fetch/load
  scheme, which is not part of this design.
- **Reset** (`rst`) is synchronous and active-high. It sets the PC to 0 and
  clears x1..x31. While `rst` is high the core writes neither registers nor
  data memory. Memory contents are not cleared.
- **Program loading.** Drive `prog_we`, `prog_addr` (byte address) and
  `prog_data` to write one instruction word into instruction memory per
  clock. Do this while `rst` is high, then release reset. This port is this
  implementation's own addition.
- **Observation outputs**, all for the instruction currently executing:
  `pc`, `instr`, `alu_control`, `zero`, `reg_write`, `write_reg`,
  `write_data`, `mem_write` and `illegal`.

| Parameter of `riscv_core` | Default | Meaning |
|---------------------------|---------|---------|
| `IMEM_BYTES`              | 65536   | instruction memory size in bytes (power of two) |
| `DMEM_BYTES`              | 16384   | data memory size in bytes (power of two) |

## Departures and choices to know about

- **Single-cycle, not pipelined.** A five-stage pipeline with pipeline
  registers and a hazard unit is sometimes mentioned alongside this design,
  but only as a direction for later work. Nothing of it is implemented here.
- **Memory accesses must be naturally aligned.** Misaligned half-word or word
  accesses are not split or trapped. Addresses wrap to the memory size.
- **Unsupported instructions** (fence, ecall, ebreak, CSR) execute as no-ops
  and raise `illegal`. There are no exceptions, interrupts or CSRs.
- **Registers are cleared by reset.** The published simulation starts with
  non-zero values in some registers. Here a program sets its own values,
  for example with `addi` or `lui`.
- **Instruction memory is not cleared by reset.** The published block diagram
  draws a reset input on the instruction memory. Here reset does not touch
  the memory, because that would erase the loaded program.

## Verification

Every module has a self-checking testbench in `tb/` that compares it against
a reference model written independently in the testbench. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

- `tb_alu`: every operation on corner operands (0, 1, -1, 0x80000000,
  0x7FFFFFFF, 31), plus 3000 random cases. The reference is bit-serial
  shifts and two's-complement arithmetic.
- `tb_control_unit`: every RV32I instruction, encoded with `rv_asm_pkg`,
  compared with a hand-written control table. This includes `addi` with
  immediate bit 30 set, which must not become a subtraction.
- `tb_reg_file`: random writes and reads. Checks x0, write-after-edge
  visibility and reset.
- `tb_imm_gen`: random immediates for all five formats, round-tripped
  through the encoders.
- `tb_data_mem`: random aligned loads and stores of every size against a
  byte-array model.
- `tb_instr_mem`, `tb_program_counter`, `tb_adder`, `tb_mux2`, `tb_mux3`:
  directed and random checks of each.
- `tb_riscv_core`: runs the full-size core at its default parameters.
  - A program of about 730 instructions runs in lockstep with an
    instruction-set model written inside the testbench.
  - Every cycle the PC, the instruction, the register write-back and the
    memory write enable must match the model. At the end all 32 registers are
    compared, and the cycle count must equal the instruction count.
  - The program covers every RV32I operation, every branch both taken and not
    taken, a counted loop, a call and return, a write to x0, an unsupported
    instruction and 400 random ALU and memory instructions. Each of these 45
    mechanisms is counted, and one that never occurs is a failure.
- `tb_waveform_program`: runs the four-instruction sequence of the published
  simulation (`add x6,x8,x9; sub x7,x18,x19; or x5,x20,x21;
  xor x28,x22,x23`). Registers are first set to 0x18, 0x19 and 0x20..0x25.
  The test checks that the PC steps by 4 per clock, the register numbers and
  values read, the ALU codes (add 2, sub 4) and the written values 0x31,
  FFFFFFFF, 0x23 and 0x01.

## Simulating

With Verilator 5 (for example the core test):

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/riscv_pkg.sv tb/rv_asm_pkg.sv tb/tb_riscv_core.sv \
    --top-module tb_riscv_core -Mdir obj -o sim
./obj/sim
```

Use the same command for any other testbench: change the top module and the
file name. Verilator finds the other modules through `-Irtl`. The package
files must come first on the command line. Every testbench drives and
initialises everything it reads, so the results do not depend on
Verilator's random initial values.

To write programs for the core, `tb/rv_asm_pkg.sv` has encoder functions for
each RV32I format and common mnemonics (`addi`, `add`, `lui`, `b_type`,
`j_type`, ...). Load the words through the program port as
`tb_riscv_core` does.

## Changing the design

- To change the memory sizes, set `IMEM_BYTES`/`DMEM_BYTES`. Both must be
  powers of two, and at least 8 bytes.
- To add an ALU operation, extend `alu_op_e` in `riscv_pkg`, the `case` in
  `alu` and `arith_op` in `control_unit`.
- To add an instruction class, add a case to `control_unit`. Add an input to
  the relevant multiplexer if it needs a new operand or write-back source.
  The `ctrl_t` struct collects every control signal, so the new signal goes
  there.
