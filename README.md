# A bus-based, microcoded RV32 processor

This processor is built around a single shared 32-bit bus. The instruction
register, the two ALU operand registers, the memory address register, the
register file and the memory all read from that bus, and four components can
write to it. Only one of them may write it in any cycle. Because every value
has to cross the bus, even a simple `ADD` takes several cycles: the operands
reach A and B one at a time, and then the result travels back. A microcode
controller sequences those cycles. Each microinstruction is one row of a
table. The row says which component drives the bus, which registers load from
it, what the ALU does, and which row comes next. This makes it easy to see why
multi-cycle CISC-style machines were microprogrammed. It is also a complete
small RISC-V machine that runs real programs.

The RTL implements the datapath, the microsequencer, the fetch microcode and
a microprogram for a subset of RV32 (early RISC-V encoding) that the ALU's
operations can carry out. It is written in synthesizable SystemVerilog and
has a self-checking testbench for every module.

## Datapath

```
            ldIR        ldA   ldB                 RegSel          ldMA
             |           |     |                    |              |
   +---------v--+   +----v-+ +-v----+   32,1,rd,rs1,rs2 -> [mux] -> addr    +--v--+
   |     IR     |   |  A   | |  B   |                 |                    | MA  |--addr--+
   +--+------+--+   +--+---+ +--+---+          +------v-------+            +-----+        |
      |      |         +-> ALU <-+  ALUOp      | register file|  RegWr          +----------v--+
  opcode  Immed Select      | zero?            | 32 GPRs, PC  |  enReg          |   memory    | MemWr
  (to     ImmSel  |         |                  | (reg 32), ...|                 |   busy? ----| enMem
  uCtrl)          |enImm    |enALU             +------+-------+                 +------+------+
                  v         v                         |                               |
  ================================ 32-bit bus ====================================================
```

| Component | Writes the bus when | Loads from the bus when |
|---|---|---|
| IR, A, B, MA (`ld_reg`) | never | `ldIR`, `ldA`, `ldB`, `ldMA` |
| Immediate extender (`imm_sel`) | `enImm` | – |
| ALU (`alu`) | `enALU` | – |
| Register file (`regfile`) | `enReg & !RegWr` | `enReg & RegWr` (write to `addr`) |
| Memory (`memory`) | `enMem & !MemWr` | `enMem & MemWr & !busy` (write to `MA`) |

Several load signals may be high in the same cycle. All of those registers
then take the same bus value, and `FETCH0` relies on this to copy the PC into
both A and MA. Loads happen at the rising clock edge. Reads from the register
file and the memory are combinational, from address to data. The ALU's zero
flag is always computed, even when the ALU is not driving the bus. Conditional
microbranches use it on its own, for example to compare two registers without
writing anything.

On chip the bus is not built from tri-state buffers. `bus.sv` gates each
source's word with its enable and ORs the results. The bus therefore reads 0
when nobody drives it. With exactly one driver, it behaves exactly like the
tri-state version. In `bus_riscv`, a concurrent assertion (`a_one_driver`)
fires if the microcode ever enables two drivers at once.

### Register file

There are 64 entries behind a 6-bit address. Entries 0–31 are the GPRs,
entry 32 is the PC, and entry 1 is RA, the return address register. The
other entries are available as special-purpose registers, but no microcode
uses them. The `RegSel` multiplexer (`reg_addr_sel`) chooses the address from
five sources:

* the constant 32 (PC);
* the constant 1 (RA);
* one of the three 5-bit specifier fields of IR, padded with a leading 0:
  `rd = IR[31:27]`, `rs1 = IR[26:22]` or `rs2 = IR[21:17]`.

x0 always reads 0 and ignores writes. Reset loads only the PC, with
`RESET_PC`. The other registers keep whatever they power up with.

### Memory and `busy`

The memory's address always comes from MA, so an access takes two steps:
first load MA, then read or write. The memory can take extra cycles, as it
would on a cache miss, and it raises `busy` until the access is finished.
This model stretches every access by a fixed `LATENCY` (default 1):

* From the first cycle `enMem` is high, `busy` stays at 1 for `LATENCY`
  cycles.
* In the following cycle `busy` is 0. Read data is valid then, and a write
  commits at the clock edge that ends that cycle.
* While `busy` is 1, the read data is 0. A write's data may change until the
  last cycle.

The counter restarts whenever `enMem` is low, and after every completed
access. The memory holds `WORDS` 32-bit words (default 4096, i.e. 16 KiB).
MA is a byte address, and only whole aligned words are accessed, using
MA[13:2] at the default size. Higher address bits wrap.

## Microsequencer

`ucode_ctrl` holds the 7-bit microprogram counter (uPC). The microcode ROM
turns the uPC into a `uinst_t` that carries every control signal, plus two
fields that pick the next uPC: a 3-bit microbranch and a Next State field.

| uBr | next uPC |
|---|---|
| `N`  | uPC + 1 |
| `J`  | Next State |
| `EZ` | Next State if ALU zero = 1, else uPC + 1 |
| `NZ` | Next State if ALU zero = 0, else uPC + 1 |
| `D`  | first state of the instruction in IR (`dispatch`) |
| `S`  | uPC again while `busy` = 1, else uPC + 1 |

Every memory access sits in an `S` state. While `busy` holds, the machine
repeats that state and keeps loading its destination register. The garbage
loaded during those cycles is overwritten in the final cycle by the valid
word. Reset puts the uPC at `FETCH0`.

## The microprogram

Every instruction begins with the same three fetch states and ends with a
`J FETCH0`:

| State | Transfer | Signals | uBr |
|---|---|---|---|
| FETCH0 | MA ← PC; A ← PC | RegSel=PC, enReg, ldA, ldMA | N |
| FETCH1 | IR ← Mem | enMem, ldIR | S |
| FETCH2 | PC ← A + 4 | INC_A_4, enALU, RegSel=PC, RegWr, enReg | D |
| NOP0 | – | – | J FETCH0 |

By the time an instruction's own microcode runs, PC already points to the
next instruction. Branch and jump targets are relative to the instruction's
own address, so their microcode first rebuilds that address with `A ← A − 4`.

| Instruction(s) | First state | Microcode after fetch | Cycles incl. fetch (L = LATENCY) |
|---|---|---|---|
| NOP (`ADDI x0,x0,0`) | 3 | – | 4 + L |
| ADD, SUB, SLT, SLTU | 4, 7, 10, 13 | A ← rs1; B ← rs2; rd ← A op B | 6 + L |
| ADDI, SLTI, SLTIU | 16, 19, 22 | A ← rs1; B ← ImmI; rd ← A op B | 6 + L |
| LW | 25 | A ← rs1; B ← ImmI; MA ← A+B; rd ← Mem (S); J | 8 + 2L |
| SW | 30 | A ← rs1; B ← ImmBs; MA ← A+B; Mem ← rs2 (S); J | 8 + 2L |
| LUI | 35 | rd ← ImmL | 4 + L |
| J | 36 | A ← PC; A ← A−4; B ← ImmJ; PC ← A+B | 7 + L |
| JAL | 40 | A ← PC; RA ← A; A ← A−4; B ← ImmJ; PC ← A+B | 8 + L |
| JALR | 45 | A ← rs1; B ← ImmI; B ← A+B; A ← PC; rd ← A; PC ← B | 9 + L |
| BEQ, BNE | 51, 55 | A ← rs1; B ← rs2; SUB with EZ / NZ → BRTAKEN0; J | 7 + L, taken 10 + L |
| BLT, BGE | 59, 63 | as above with SLT, NZ / EZ | same |
| BLTU, BGEU | 67, 71 | as above with SLTU, NZ / EZ | same |
| (taken branch) | 75 | A ← PC; A ← A−4; B ← ImmBr; PC ← A+B | – |
| anything else | 79 | `J ILLEGAL0`: the machine stops | – |

Some details of this microcode:

* JALR computes its target into B before it writes rd, so `JALR x1, x1, 0`
  works.
* A branch's comparison state does not drive the bus. Only the zero flag
  matters in that state.
* `ucode_rom.sv` builds each family of states from small helper functions,
  for example "register to A", "immediate to B" and "ALU to register rd".
  To add an instruction, reserve consecutive state numbers in
  `bus_riscv_pkg`, add rows in `ucode_rom`, and add its encoding in
  `dispatch`.

### Instruction encoding

This machine decodes the early RISC-V encoding, in which `rd` is the topmost
field:

| Format | Bits |
|---|---|
| R | `rd[31:27] rs1[26:22] rs2[21:17] funct10[16:7] opcode[6:0]` |
| I | `rd[31:27] rs1[26:22] imm12[21:10] funct3[9:7] opcode` |
| B (stores, branches) | `imm[11:7]@[31:27] rs1 rs2 imm[6:0]@[16:10] funct3 opcode` |
| L (LUI) | `rd[31:27] imm20[26:7] opcode` → `imm20 << 12` |
| J (J, JAL) | `offset25[31:7] opcode` |

The immediate extender sign-extends every immediate. Branch and jump offsets
count half-words, so BrType and JType are shifted left by one.

Opcodes:

| Instruction group | Opcode |
|---|---|
| LOAD | `0000011` |
| OP-IMM | `0010011` |
| STORE | `0100011` |
| OP | `0110011` |
| LUI | `0110111` |
| BRANCH | `1100011` |
| J | `1100111` |
| JALR | `1101011` |
| JAL | `1101111` |

Function codes:

* funct3 values follow RISC-V: ADD 000, SLT 010, SLTU 011, LW/SW 010, BEQ
  000, BNE 001, BLT 100, BGE 101, BLTU 110, BGEU 111.
* SUB is funct10 `1000000_000`.

## How far to trust it, and where it departs

The following parts follow the original bus-based design closely:

* the components and their connections;
* the control signals and their meaning (load signals, the enable rules of
  the register file and the memory, the RegSel sources 32/1/rd/rs1/rs2);
* the ten ALU operations and the zero flag;
* the five immediate types;
* the six microbranch rules;
* the fetch and NOP microcode.

The following are this implementation's own choices:

* **Microcode of every instruction except fetch and NOP.** Any correct
  microcode for this datapath is valid, and this is one of many.
* **The instruction subset.** The ALU has no logic or shift operations, so
  AND/OR/XOR, shifts, byte and half-word memory accesses, and the RV32 M
  extension are not implemented. They dispatch to `ILLEGAL0`. Adding them
  means adding ALU operations.
* **Bit layout, opcodes and offset scaling.** These follow the early RISC-V
  encoding, not today's RV32I.
* **All binary encodings** of RegSel, ALUOp, ImmSel and uBr, and the state
  numbering.
* **Memory size, latency behaviour and read data while busy.**
* **Reset.** It is asynchronous and active low. It sets uPC = FETCH0,
  PC = `RESET_PC` and IR/A/B/MA = 0.
* **x0 hard-wired to zero.**
* **Bus model.** The bus is an AND-OR multiplexer instead of tri-state
  wires.
* **No interrupt input.** The original datapath shows an interrupt-request
  line, but no behaviour is defined for it, so there is none here.

The end-to-end test compares the machine, instruction by instruction, with an
independent instruction-set model. It checks every register, the PC and every
memory word, and it checks cycle counts against the table above. Every module
also has a unit test.

## Parameters

| Module | Parameter | Default | Meaning |
|---|---|---|---|
| `bus_riscv` | `MEM_WORDS` | 4096 | memory size in 32-bit words |
| `bus_riscv` | `MEM_LATENCY` | 1 | busy cycles per memory access (0 = single-cycle memory) |
| `bus_riscv` | `RESET_PC` | 0 | PC after reset |
| `bus_riscv_pkg` | `XLEN` | 32 | bus and register width |

The 64-bit variant would need a 64-bit bus and registers plus extra ALU
operations. `XLEN` alone does not produce it, because the immediate extender
and the instruction fields are written for 32-bit words.

## Files

`rtl/bus_riscv_pkg.sv` holds the shared types, encodings and state numbers.
The top is `rtl/bus_riscv.sv`. Below it are:

* `ucode_ctrl`, which contains `ucode_rom` and `dispatch`;
* `ld_reg`, instantiated four times;
* `imm_sel`, `alu`, `reg_addr_sel`, `regfile`, `memory` and `bus`.

Each module has a testbench `tb/tb_<module>.sv`. Each testbench prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -y rtl rtl/bus_riscv_pkg.sv \
          tb/tb_bus_riscv.sv --top-module tb_bus_riscv -o sim
./obj_dir/sim
```

Replace `tb_bus_riscv` with any other testbench name to run a unit test.
The `-y rtl` option makes Verilator find each module in `rtl/<name>.sv`. The
package is named explicitly because it must be read first.

`tb_bus_riscv` does the following:

* writes its program directly into `dut.u_mem.mem` and sets the registers
  through `dut.u_rf.regs`;
* runs at the default parameters for about 650 cycles;
* reports how often each mechanism occurred: each microbranch kind in both
  outcomes, `busy` spins, each of the four bus drivers, and cycles that load
  two registers at once.

`tb_bus_riscv_lat3` runs the same program with `MEM_LATENCY = 3`, so each
fetch, load and store spins three times on `busy`.

To run your own program, place encoded words in `u_mem.mem` the same way,
starting at `RESET_PC`.
