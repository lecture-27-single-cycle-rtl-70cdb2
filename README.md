# Single-cycle MIPS subset processor

A processor in which every instruction takes exactly one clock cycle. There
is no pipeline and no multi-step state machine: in one cycle the instruction
is fetched, its registers read, the ALU and the data memory do their work and
the result travels back to the register file, all as combinational logic.
The single rising clock edge that ends the cycle then updates everything that
holds state at once: the PC, the register file and the data memory. The clock
period must therefore cover the slowest instruction's path (a load:
instruction memory, register read, ALU, data memory, write-back multiplexer,
register file setup).

It runs six instructions of the MIPS instruction set, enough to show each
kind of datapath path: register arithmetic, an immediate, a load, a store and
a conditional branch.

| instruction          | register transfer                                    |
|----------------------|------------------------------------------------------|
| `addu rd, rs, rt`    | `R[rd] = R[rs] + R[rt]`                              |
| `subu rd, rs, rt`    | `R[rd] = R[rs] - R[rt]`                              |
| `ori rt, rs, imm16`  | `R[rt] = R[rs] \| ZeroExt(imm16)`                    |
| `lw rt, imm16(rs)`   | `R[rt] = Mem[R[rs] + SignExt(imm16)]`                |
| `sw rt, imm16(rs)`   | `Mem[R[rs] + SignExt(imm16)] = R[rt]`                |
| `beq rs, rt, imm16`  | `if (R[rs] == R[rt]) PC = PC + 4 + SignExt(imm16)*4` |

Every instruction that is not a branch taken ends with `PC = PC + 4`.

## Instruction formats

```
 31    26 25   21 20   16 15   11 10    6 5      0
+--------+-------+-------+-------+-------+--------+
|   op   |  rs   |  rt   |  rd   | shamt | funct  |   R-format: addu, subu
+--------+-------+-------+-------+-------+--------+
|   op   |  rs   |  rt   |     immediate (16)     |   I-format: ori, lw, sw, beq
+--------+-------+-------+------------------------+
```

Encodings are the standard MIPS ones: R-format `op = 0x00` with
`funct = 0x21` (addu) or `0x23` (subu); `ori 0x0d`, `lw 0x23`, `sw 0x2b`,
`beq 0x04`. `shamt` is ignored. Any other encoding is executed as a
no-operation: nothing is written and the PC advances by 4.

## The datapath

```
  PC --> instruction memory --> instr --> control --> control points
                                  |                       ^
                                  | rs -> Ra   busA ------+-----> ALU A
                                  | rt -> Rb   busB --+-> ALUSrc 0 --> ALU B
                                  | RegDst -> Rw      |   ALUSrc 1 <-- Extender(imm16, ExtOp)
                                  |  (1: rd, 0: rt)   |
                                  |                   +-> data memory Data In
                                  |
  ALU Result --> data memory Adr;  ALU Equal --> control
  MemtoReg: 0 = ALU Result, 1 = data memory out  --> busW --> register file
  nPC_sel:  0 = PC + 4, 1 = PC + 4 + SignExt(imm16)*4  --> PC
```

Blocks, from the fetch side to the write-back side:

- **Instruction fetch unit** (`ifetch`): the PC register, the next address
  logic and the instruction memory. The PC holds bits 31:2 only; bits 1:0 are
  always `00` because instructions are word aligned.
- **Next address logic** (`next_pc`): one adder forms `PC + 4`; "PC Ext"
  sign-extends `imm16` and multiplies it by four; a second adder adds the two;
  the `nPC_sel` multiplexer picks `PC + 4` (0) or the branch target (1).
- **Register file** (`regfile`): 32 registers of 32 bits. `Ra = rs` drives
  `busA`, `Rb = rt` drives `busB`, both combinationally. `Rw` comes from the
  `RegDst` multiplexer (1: `rd`, 0: `rt`). Writing happens on the clock edge
  when `RegWr` is set. Register 0 is never written and reads as zero.
- **Extender** (`extender`): zero extension for `ori`, sign extension for the
  `lw`/`sw` offsets, selected by `ExtOp`.
- **ALUSrc multiplexer**: the ALU's second operand is `busB` (0) or the
  extended immediate (1).
- **ALU** (`alu`): add, subtract or or, selected by `ALUctr`. It also outputs
  `Equal = (A == B)`, the branch condition. For `beq`, `ALUSrc` is 0, so
  `Equal` compares `R[rs]` and `R[rt]`.
- **Data memory** (`dmem`): addressed by the ALU result, written with `busB`
  when `MemWr` is set, read combinationally.
- **MemtoReg multiplexer**: `busW` is the ALU result (0) or the memory word
  (1).

All multiplexers are instances of one parameterised `mux2`, and both adders
of the next address logic are instances of `adder`.

## Control

`mips_control` is purely combinational. From `op`, `funct` and the `Equal`
condition coming back from the datapath it sets the control points of the
current cycle:

| instr | RegDst | RegWr | ExtOp | ALUSrc | ALUctr | MemWr | MemtoReg | nPC_sel |
|-------|--------|-------|-------|--------|--------|-------|----------|---------|
| addu  | 1 (rd) | 1     | –     | 0      | add    | 0     | 0        | 0       |
| subu  | 1 (rd) | 1     | –     | 0      | sub    | 0     | 0        | 0       |
| ori   | 0 (rt) | 1     | zero  | 1      | or     | 0     | 0        | 0       |
| lw    | 0 (rt) | 1     | sign  | 1      | add    | 0     | 1        | 0       |
| sw    | –      | 0     | sign  | 1      | add    | 1     | –        | 0       |
| beq   | –      | 0     | –     | 0      | sub    | 0     | –        | Equal   |

"–" entries are driven to 0. The control bundle is the packed struct
`mips_pkg::ctrl_t`; `ALUctr` is the enum `alu_op_e` (add 0, sub 1, or 2) and
`ExtOp` the enum `ext_op_e` (zero 0, sign 1). The table is derived from the
register transfers above; the binary encodings of `ALUctr` and `ExtOp` are
this design's own.

The branch decision is made in the control (`nPC_sel = beq AND Equal`),
so the datapath only reports the condition.

## Timing

- One clock, rising edge, for every storage element. There is one
  synchronous, active-high reset, which only sets the PC to 0. Registers and
  memories are not cleared.
- Within a cycle: the new PC appears after the edge, the instruction after
  the instruction memory access time, the control points after the control
  logic delay, `busA`/`busB` after the register file access time, the ALU
  result after the ALU delay, and for `lw` the memory word after the data
  memory access time. `busW`, `Rw`, `RegWr` and `MemWr` must be stable
  before the next rising edge, where the writes take place.
- CPI is exactly 1; a program of N executed instructions takes N cycles.

## Memories and addressing

Both memories are word wide (32 bits) and 256 words deep (1 KiB), set by
`IMEM_DEPTH` and `DMEM_DEPTH`. Addresses are byte addresses, but `lw`/`sw`
and instruction fetch only use word-aligned ones (multiples of 4), so the
word is selected by address bits `[9:2]` (in general `[log2(DEPTH)+1:2]`):
byte address `0x0` is word 0, `0x4` word 1, and so on. Bits 1:0 are
ignored, and so are bits above 9, so the address space wraps every 1 KiB.
Byte loads and stores are not supported; an assertion in `dmem` flags a
store to an address that is not a multiple of 4.

The instruction memory is read-only to the processor. It has a separate
load port (`load_we`, `load_adr`, `load_data`, written on the rising edge)
through which a program is placed, normally while `rst` is held.

## Register dump

A rising `dmp` input (seen at a clock edge) makes the register file print
all 32 registers to the simulator console, one `R[n] = value` line each.
This is a simulation aid; synthesis ignores it.

## Top-level interface (`mips_cpu`)

| port         | dir | width | meaning                                   |
|--------------|-----|-------|-------------------------------------------|
| `clk`        | in  | 1     | clock, rising edge                        |
| `rst`        | in  | 1     | synchronous reset, PC = 0                 |
| `load_we`    | in  | 1     | instruction memory load enable            |
| `load_adr`   | in  | 32    | byte address of the word to load          |
| `load_data`  | in  | 32    | instruction word to load                  |
| `dmp`        | in  | 1     | print the register file                   |
| `pc`         | out | 32    | current PC                                |
| `instr`      | out | 32    | instruction being executed                |
| `dmem_we`    | out | 1     | store in this cycle                       |
| `dmem_adr`   | out | 32    | data memory address (ALU result)          |
| `dmem_wdata` | out | 32    | store data (`busB`)                       |

To run a program: hold `rst`, write the words through the load port, release
`rst`. Execution starts at address 0. There is no halt instruction; a branch
to itself, `beq $0, $0, -1` (`0x1000ffff`), makes a convenient stop.

## Files

`rtl/`:

| file                | contents                                             |
|---------------------|------------------------------------------------------|
| `mips_pkg.sv`       | opcodes, funct codes, `alu_op_e`, `ext_op_e`, `rtype_t`, `ctrl_t` |
| `mips_cpu.sv`       | top: control plus datapath                           |
| `mips_control.sv`   | main control                                         |
| `mips_datapath.sv`  | the assembled datapath                               |
| `ifetch.sv`         | PC, next address logic, instruction memory           |
| `next_pc.sv`        | PC + 4 and branch target selection                   |
| `imem.sv`, `dmem.sv`| instruction and data memories                        |
| `regfile.sv`        | 32 x 32 register file                                |
| `register.sv`       | N-bit register with write enable (used for the PC)   |
| `alu.sv`, `extender.sv`, `mux2.sv`, `adder.sv` | datapath components       |

`tb/` has one self-checking testbench per module (`tb_<module>.sv`) and
`mips_asm_pkg.sv`, which holds instruction encoders, a random program
generator and an instruction-level reference model that executes one
instruction per call.

## Simulating

With Verilator 5, for example the end-to-end test:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_mips_cpu \
    -y rtl -y tb +libext+.sv rtl/mips_pkg.sv tb/mips_asm_pkg.sv tb/tb_mips_cpu.sv
./obj_dir/Vtb_mips_cpu +verilator+rand+reset+2
```

Replace `tb_mips_cpu` by any other testbench name to test one module. Each
testbench ends with a line `TB_RESULT checks=N failures=M` and has a
watchdog that fails it if it hangs. `+verilator+rand+reset+2` starts
un-initialised state at random values; the tests are written so that nothing
they read depends on it.

What the tests check:

- `tb_mips_cpu` runs the top at its default sizes. It loads six generated
  programs of up to 256 words each. Each program sets all registers, clears a
  32-word memory window, runs a short fixed sequence and then random
  instructions with forward branches, and ends in a branch to itself. Every
  cycle it compares the PC, the fetched instruction and the store port with
  the reference model, so CPI = 1 is checked cycle by cycle. At the end of
  each program it compares all registers and the memory window. It counts
  each instruction kind, taken and not-taken branches, dropped writes to
  register 0, negative sign-extended offsets and zero-extended immediates
  with bit 15 set, and fails if any count is zero.
- `tb_mips_datapath` drives the datapath from its own decode table, without
  the control module, and checks it the same way, including `Equal` on every
  `beq`.
- The component testbenches check their module against arithmetic written
  in the testbench: random and corner operands, every 16-bit immediate for
  the extender, a reference array for the register file and the memories,
  cycle-by-cycle PC sequences for the fetch unit.

## Where this design makes its own choices

These points are not fixed by the datapath as described, and were chosen
here:

- the opcode and funct numbers (standard MIPS), and the encodings of
  `ALUctr` and `ExtOp`;
- the whole control table, derived from the register transfers;
- `nPC_sel` formed in the control from `Equal`, rather than in the fetch
  unit;
- unknown instructions act as no-operations;
- a synchronous reset of the PC to 0 (the register building block carries a
  synchronous active-high reset), with no reset of the register file or
  memories;
- register 0 reads as zero by decoding its address; writes to it are dropped;
- the instruction memory has the same 256-word organisation as the data
  memory, and a load port;
- the register dump is taken at the clock edge after `dmp` rises;
- both memories are read combinationally (ideal memories) and written on
  the rising edge; address bits above 9 are ignored;
- the `Equal` condition comes from the ALU. A separate equality comparator
  on `busA`/`busB` would give the same result, because `ALUSrc` is 0 for
  `beq`.

Not built: jump instructions (the fetch unit is described as also serving
jumps, but no jump datapath is given), byte loads/stores, overflow traps for
signed arithmetic, and anything beyond the six instructions.
