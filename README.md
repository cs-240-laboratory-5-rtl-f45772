# HW: a 16-bit single-cycle teaching CPU

HW is a deliberately small load/store machine meant to show how an instruction
set becomes hardware. It has eight instructions, sixteen 16-bit registers, an
8-bit instruction address space and one 16-bit instruction format. Every
instruction finishes in one clock cycle: on each rising edge the PC, the
register file and the data memory all take their new values together. The RTL
here implements the whole machine: the CPU (program counter logic, control
unit, register file, ALU, data memory and the datapath multiplexers) and the
instruction memory with a path for loading a program into it by hand.

## Instruction set

| Instruction        | Effect                                   | Encoding [15:12] [11:8] [7:4] [3:0] |
|--------------------|------------------------------------------|-------------------------------------|
| `ADD Rs, Rt, Rd`   | R[d] = R[s] + R[t]                       | `0010` s t d                        |
| `SUB Rs, Rt, Rd`   | R[d] = R[s] - R[t]                       | `0011` s t d                        |
| `AND Rs, Rt, Rd`   | R[d] = R[s] & R[t]                       | `0100` s t d                        |
| `OR  Rs, Rt, Rd`   | R[d] = R[s] \| R[t]                      | `0101` s t d                        |
| `LW  Rt, off(Rs)`  | R[t] = M[R[s] + off]                     | `0000` s t off                      |
| `SW  Rt, off(Rs)`  | M[R[s] + off] = R[t]                     | `0001` s t off                      |
| `BEQ Rs, Rt, off`  | if R[s] == R[t]: PC = PC + 2 + 2*off     | `0111` s t off                      |
| `JMP off12`        | PC = 2*off12                             | `1000` off12                        |

* R0 always reads 0 and R1 always reads 1. Writes to them are dropped.
* The 4-bit `off` field is signed, from -8 to +7, and is sign-extended.
* The branch offset counts instructions from the *next* instruction. For
  example, `BEQ R3 R0 1` at address 6 continues at 10 when R3 is 0, and at 8
  otherwise.
* `JMP n` goes to instruction number n, which is byte address 2n. `JMP 3`
  continues at address 6. The PC has only 8 bits, so only the low 7 bits of
  the 12-bit offset matter.
* Opcodes `0110` and `1001` to `1111` are not defined. In this RTL they do
  nothing: the PC advances by 2 and no register or memory changes.

Instructions live at even byte addresses, starting at 0, where execution
begins after reset.

## The datapath, one instruction at a time

The CPU (`rtl/cpu.sv`) is a single-cycle datapath. The instruction word
arrives from instruction memory at address `pc`. Its four fields fan out as
follows:

* **[15:12] opcode**. This goes to the control unit.
* **[11:8] Rs**. This is read address 1 of the register file. Read Data 1 is
  always the ALU's A operand.
* **[7:4] Rt**. This is read address 2. Read Data 2 goes to two places: the
  ALU's B MUX, and the data memory's write data.
* **[3:0] Rd or offset**. This field has three uses:
  * It is the write address for arithmetic instructions.
  * Sign-extended to 16 bits, it is the other input of the ALU's B MUX.
  * Sign-extended to 8 bits, it feeds the branch adder.

One control line, **Mem**, does most of the work of the memory
instructions. It is 1 for both LW and SW, and it drives three 2-input
multiplexers at once:

| MUX                      | Mem = 0 (ADD, SUB, AND, OR, BEQ) | Mem = 1 (LW, SW)            |
|--------------------------|----------------------------------|-----------------------------|
| register write address   | Rd                               | Rt                          |
| ALU operand B            | Read Data 2 (value of Rt)        | sign-extended offset        |
| register write data      | ALU result                       | data memory Read Data       |

SW also selects Rt as the write address and memory data as the write-back
value. This does no harm, because SW does not assert **RegWrite**. Instead it
asserts **Mem Store**, which writes Read Data 2 into data memory at the
address the ALU computed (Rs + offset).

The control unit (`rtl/control_unit.sv`) produces these lines:

| Instr | Ainv Bneg Op1 Op0 | RegWrite | Mem | Mem Store | Branch | Jump |
|-------|-------------------|----------|-----|-----------|--------|------|
| ADD   | 0 0 1 0           | 1        | 0   | 0         | 0      | 0    |
| SUB   | 0 1 1 0           | 1        | 0   | 0         | 0      | 0    |
| AND   | 0 0 0 0           | 1        | 0   | 0         | 0      | 0    |
| OR    | 0 0 0 1           | 1        | 0   | 0         | 0      | 0    |
| LW    | 0 0 1 0           | 1        | 1   | 0         | 0      | 0    |
| SW    | 0 0 1 0           | 0        | 1   | 1         | 0      | 0    |
| BEQ   | 0 1 1 0           | 0        | 0   | 0         | 1      | 0    |
| JMP   | 0 0 0 0 (unused)  | 0        | 0   | 0         | 0      | 1    |

### The ALU

`rtl/alu.sv` takes a 4-bit control word {Ainv, Bneg, Op}:

* Ainv inverts A.
* Bneg inverts B and sets the adder's carry-in to 1. With Op = `10` (add),
  this computes A - B.
* Op `00` is AND, `01` is OR and `10` is add. `11` is not part of the ISA and
  gives 0.

The ALU has two flags:

* `zero` is 1 when the result is zero.
* `overflow` flags two's-complement overflow of an add or subtract. It is 0
  for AND and OR.

### Next PC: sequential, branch, jump

`rtl/instr_fetch.sv` holds the 8-bit PC, which reset clears asynchronously.
It computes three candidate addresses:

* The sequential address, `PC + 2`.
* The branch address, `PC + 2 + (sext8(off) << 1)`, from a second adder.
* The jump address, `{off12, 0}` cut to 8 bits.

BEQ makes the ALU subtract R[t] from R[s]. If the operands are equal, `zero`
is 1. A first MUX takes the branch address only when **Branch AND Zero**.
Branch is needed because other instructions can also produce a zero result. A
second MUX, selected by **Jump**, overrides everything with the jump address.
JMP does not use the ALU.

Because of this, the PC update depends combinationally on the register read,
the subtraction and the two adders. That path, register file → ALU → zero →
MUX → PC, is the critical path of the machine.

## The complete machine and loading a program

`rtl/hw_computer.sv` connects the CPU to the instruction memory
(`rtl/instr_mem.sv`). Instruction memory holds 256 bytes, which is 128
16-bit words. Address bit 0 is ignored.

An 8-bit MUX chooses the memory's address:

* `load = 0`: the address is the PC, and the CPU runs.
* `load = 1`: the address is `addr_in`, for loading.

While `wr = 1`, each rising clock edge writes `data_in` at that address.

To load and run a program:

1. Hold `reset = 1` and `load = 1`.
2. For each instruction, present its byte address on `addr_in` and its word
   on `data_in`, and clock once with `wr = 1`.
3. Drop `wr`, then `load`, then `reset`.
4. Clock the CPU. One instruction completes per cycle.

While reset is held, the PC and R2..R15 stay cleared and data-memory writes
are blocked. This means the CPU cannot disturb anything while it "executes"
whatever word the load address happens to show. Instruction memory keeps its
contents across reset.

The top's outputs make a run easy to observe, with no probing inside the
design:

* `pc` and `instruction`.
* Both register read ports (`rf1` = value of Rs, `rf2` = value of Rt).
* `alu_result`, `zero` and `overflow`.

## Files

| File                   | Contents |
|------------------------|----------|
| `rtl/hw_pkg.sv`        | widths, opcode enum, ALU control struct, control-line struct, field helpers |
| `rtl/hw_computer.sv`   | top: CPU, instruction memory, load-address MUX |
| `rtl/cpu.sv`           | single-cycle CPU |
| `rtl/instr_fetch.sv`   | PC, PC+2 adder, branch adder, branch and jump MUXes |
| `rtl/control_unit.sv`  | opcode decoder |
| `rtl/reg_file.sv`      | 16 x 16 register file, R0 = 0, R1 = 1 |
| `rtl/alu.sv`           | 16-bit ALU with zero and overflow |
| `rtl/data_mem.sv`      | data memory, 256 x 16 by default |
| `rtl/instr_mem.sv`     | instruction memory, 256 bytes as 128 x 16 |
| `rtl/sign_extend.sv`   | parameterised sign extension (4→8, 4→16) |
| `rtl/mux2.sv`          | parameterised 2-input MUX |

Parameters, all defaulting to the machine's own sizes:

| Module        | Parameter | Default | Meaning |
|---------------|-----------|---------|---------|
| `instr_mem`   | `BYTES`   | 256     | instruction memory size in bytes |
| `data_mem`    | `AW`      | 8       | data memory index width in words |
| `cpu`         | `DMEM_AW` | 8       | passed to `data_mem` |
| `alu`         | `W`       | 16      | data width |

## Design decisions beyond the ISA

The instruction set fixes the encodings, the register conventions, the
branch and jump arithmetic and the control table for ADD, SUB, AND, OR, BEQ
and JMP. The following were chosen for this implementation. Check them
before relying on the RTL for anything beyond the ISA itself:

* **Control for LW and SW.** Both use ALUOp `0010`, because the address is
  Rs + offset. LW writes Rt.
* **Data memory.** It holds 256 words of 16 bits and is word-addressed by the
  low 8 bits of the ALU result. Offsets in LW and SW are therefore counted in
  words. Reads are combinational and writes happen on the clock edge.
* **Instruction memory.** It is organised as 128 words with byte addresses,
  and bit 0 is ignored. Reads are combinational and writes are clocked.
* **JMP range.** Only offsets 0..127 are reachable. Higher bits of the 12-bit
  offset are dropped by the 8-bit PC.
* **Reset.** Reset is asynchronous and active high. It clears the PC and
  R2..R15 and blocks data-memory writes. Memories are not cleared.
* **Undefined opcodes and ALU operation `11`.** These do nothing, or give 0.
* **ALU internals.** The ALU is written as one behavioural adder plus AND and
  OR, not as a chain of 1-bit slices. The function is the same.
* **The load path.** The two banks of tri-state buffers that would share the
  memory address bus are modelled as one MUX.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

* `tb_alu`: random and corner operands for every control combination, plus
  signed-overflow corners.
* `tb_control_unit`: all 16 opcodes against the table above.
* `tb_reg_file`, `tb_data_mem`, `tb_instr_mem`: random traffic against
  shadow arrays, including R0/R1 and reset.
* `tb_instr_fetch`:
  * The worked examples: BEQ at 6 going to 10 or 8, and `JMP 3` going to 6.
  * A negative branch offset.
  * Random Branch, Zero and Jump inputs.
* `rtl/instr_fetch.sv` also asserts that the PC stays even after reset.
* `tb_cpu`: runs random programs in lock step with an instruction-level
  reference model (`tb/hw_iss_pkg.sv`). Before every edge it checks both read
  ports, the ALU result and the overflow flag. After every edge it checks the
  PC. It also requires that taken and untaken branches, jumps, loads, stores,
  overflows and writes to R0/R1 all occur.
* `tb_hw_computer`: runs the full machine at its default sizes, loading every
  program through the load path. It runs these programs:
  * A summing loop closed by JMP.
  * SW followed by LW.
  * A skipped instruction.
  * A write to R0.
  * An undefined opcode.
  * A doubling loop closed by a backward BEQ, which overflows.
  * The address-6 BEQ example, with both outcomes, checked as a PC trace.

To simulate with Verilator, for example the top-level test:

    verilator --binary --timing --assert -Irtl -Itb \
      rtl/hw_pkg.sv tb/hw_iss_pkg.sv tb/tb_hw_computer.sv \
      --top-module tb_hw_computer -y rtl -y tb +libext+.sv
    ./obj_dir/Vtb_hw_computer

Unit testbenches that do not use the reference model need only
`rtl/hw_pkg.sv` and their own file, with `-y rtl`. To run your own program,
copy `tb_hw_computer` and replace the `prog` list. `enc(op, s, t, d)` and
`enc_jmp(n)` in `hw_iss_pkg` assemble instruction words.
