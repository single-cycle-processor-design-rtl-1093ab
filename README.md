# Single-cycle MIPS-subset processor

This is a 32-bit processor that runs a 16-instruction subset of the MIPS
integer instruction set. Each instruction takes exactly one clock cycle. All
work for an instruction happens in one pass through combinational logic
between two rising clock edges:

1. fetch the instruction;
2. read two registers;
3. compute in the ALU;
4. read or write data memory;
5. form the next PC.

The next rising edge then updates three state elements at once: the PC, the
destination register and (for a store) the data memory. The design is a
teaching-style datapath. The same few components (register file, ALU,
extender, memories, multiplexers) serve every instruction. Three small
combinational controllers steer them.

The datapath and control follow the single-cycle processor of the course
material "Single Cycle Processor Design" (COE 301, Computer Organization).
Where that material leaves a detail open, this RTL makes its own choice. The
section "Choices and deviations" lists those choices.

Supported instructions:

| class    | instructions                    | encoding                                                       |
|----------|---------------------------------|----------------------------------------------------------------|
| R-type   | add, sub, and, or, xor, slt     | op = 0, funct = 0x20, 0x22, 0x24, 0x25, 0x26, 0x2a             |
| I-type   | addi, slti, andi, ori, xori     | op = 0x08, 0x0a, 0x0c, 0x0d, 0x0e                              |
| memory   | lw, sw (word only)              | op = 0x23, 0x2b; address = Reg(rs) + sign_ext(imm16)           |
| branch   | beq, bne                        | op = 0x04, 0x05; target = PC + 4 + 4 x sign_ext(offset16)      |
| jump     | j                               | op = 0x02; target = PC[31:28] &#124;&#124; address26 &#124;&#124; 00 |

andi, ori and xori zero-extend their immediate. addi, slti, lw, sw, beq and
bne sign-extend theirs. There are no shift, multiply, byte-access or
exception instructions.

## Datapath

```
            +--------------------- branch target (next PC + imm) ----------+
            |  +------------------ jump target {PC[31:28], imm26} ------+  |
            v  v                                                        |  |
 PCSrc -> [mux3] -> PC -> instruction memory -> rs, rt, rd, imm16, imm26 -+--+
            ^       |                               |
            +- +1 <-+   (PC holds word address PC[31:2]; PC[1:0] = 00)
                                                    v
   RegDst [rt | rd] -> RW     register file  RA = rs -> BusA ---------> ALU A
                                             RB = rt -> BusB --+-> [ALUSrc] -> ALU B
   ExtOp -> extender(imm16) ---------------------------------+-+   |
                                                                   +-> data memory Data_in
   ALU result -> data memory Address;  WBdata [ALU result | Data_out] -> BusW
```

The multiplexers, with input 0 listed first:

| mux    | input 0        | input 1              | input 2       |
|--------|----------------|----------------------|---------------|
| RegDst | rt             | rd                   |               |
| ALUSrc | BusB           | extended immediate   |               |
| WBdata | ALU result     | memory data out      |               |
| PCSrc  | PC + 4         | jump target          | branch target |

The PC keeps only its upper 30 bits, because instructions are word aligned.
Incrementing is therefore "+1" on 30 bits. The branch adder adds the low 30
bits of the sign-extended offset to that incremented value, which gives
PC + 4 + 4 x offset. The upper four bits of the jump target come from the
current PC, not from PC + 4. The two differ only when a jump is the last
word of a 256 MB region.

## Control

Control is split into three pure-combinational units.

**Main control** (`main_control`) decodes the opcode into one line per
instruction class. Each control signal is then a short OR of those lines:

| signal  | equation                    | meaning when 1                      |
|---------|-----------------------------|-------------------------------------|
| RegDst  | R-type                      | destination is rd (else rt)         |
| RegWr   | not (SW + BEQ + BNE + J)    | write BusW into the destination     |
| ExtOp   | not (ANDI + ORI + XORI)     | sign-extend imm16 (else zero)       |
| ALUSrc  | not (R-type + BEQ + BNE)    | ALU B is the immediate (else BusB)  |
| MemRd   | LW                          | data memory drives Data_out         |
| MemWr   | SW                          | write Data_in at the clock edge     |
| WBdata  | LW                          | BusW is memory data (else ALU)      |

Table entries that do not matter for an instruction (RegDst for sw, for
example) take whatever the equations give. An opcode outside the subset
raises no decoder line. This design then also blocks its register write, so
an unknown instruction behaves as a no-op that advances the PC.

**ALU control** (`alu_control`) forms the 4-bit ALU code:

| code | operation | used by                     |
|------|-----------|-----------------------------|
| 1000 | ADD       | add, addi, lw, sw (and j)   |
| 1010 | SUB       | sub, beq, bne               |
| 0110 | SLT       | slt, slti                   |
| 1100 | AND       | and, andi                   |
| 1101 | OR        | or, ori                     |
| 1110 | XOR       | xor, xori                   |

The low two bits of each code equal the low two bits of the instruction's
funct (R-type) or opcode (I-type). An R-type funct outside the subset is
given ADD.

**PC control** (`pc_control`):

- Branch = BEQ·Zero + BNE·not Zero
- PCSrc = 2 when Branch = 1.
- Otherwise PCSrc = 1 when the instruction is J.
- Otherwise PCSrc = 0.

Zero is the ALU's all-zero flag. beq and bne make the ALU subtract, so Zero
means "equal".

## The ALU and its shifter

The ALU (`alu`) computes four results in parallel. The upper two bits of the
code pick one of them:

| code[3:2] | unit    | code[1:0]                                           |
|-----------|---------|-----------------------------------------------------|
| 00        | shifter | shift op (see below)                                |
| 01        | SLT     | — (the adder subtracts)                             |
| 10        | adder   | bit 1: 0 = add, 1 = subtract                        |
| 11        | logic   | AND = 00, OR = 01, XOR = 10, NOR = 11               |

- Subtraction inverts B and feeds a carry-in of 1.
- SLT subtracts and returns `sign XOR overflow` in bit 0. That result stays
  correct when A − B overflows.
- `overflow` is the signed overflow of the adder. `zero` is 1 when all result
  bits are 0.

The shifter (`shifter`) is the least obvious part. It turns every shift and
rotate into a *right* shift of a 63-bit word:

| operation | 63-bit word               | what fills the top after shifting |
|-----------|---------------------------|-----------------------------------|
| SRL       | 0^31 &#124;&#124; data          | zeros                             |
| SRA       | data[31]^31 &#124;&#124; data   | copies of the sign                |
| ROR       | data[30:0] &#124;&#124; data    | the low bits of data (a rotation) |
| SLL       | data &#124;&#124; 0^31          | see below                         |

Five multiplexer stages then shift right by 16, 8, 4, 2 and 1 bit, controlled
by the bits of the shift amount. Each stage drops the top bits that the later
stages can no longer reach, so the word narrows from 63 to 47, 39, 35, 33 and
finally 32 bits.

For SLL, the data sits in the top 32 bits with 31 zeros below it. A right
shift by 31 − n then equals a left shift by n. 31 − n is the 1's complement
of n, so SLL just inverts the 5-bit amount. A rotate-left by n is a
rotate-right by 32 − n; that conversion is left to software.

The shift op codes are SLL/SRL = 00, SRA = 01 and ROR = 11. SLL and SRL share
a code, so a separate `sll` input tells them apart. It both inverts the
amount and selects the left-shift extension. Code 10 acts like 00. In the
ALU, the shifter's data input is B and its amount is A[4:0].

The instruction subset has no shift instruction. Inside the processor the
ALU control therefore never selects the shifter, and `sll` is tied to 0. The
shifter is complete and tested on its own, ready for the shift instructions
to be added to the decoders.

## Register file

`register_file` holds R1–R31, 32 bits each. R0 has no storage: it always
reads 0, and writes to it are dropped.

- **Write port.** A decoder on RW, gated by RegWrite, enables one register,
  which loads BusW at the rising edge.
- **Read ports.** Each read port is a bus shared by one tri-state buffer per
  register (`tristate_buffer`), plus one buffer that drives 0 for address 0.
  A decoder on RA (or RB) enables exactly one buffer. Reads are
  combinational.

The clock is used only for writing. A register can be read and written in
the same cycle: the read sees the old value, and the new value appears
after the edge.

Synthesis tools see the two read buses as nets with several drivers. That is
the intended tri-state bus. An assertion checks that the read decoders stay
one-hot. A target without internal tri-states converts such a bus into a
multiplexer.

## Memories and timing

- **Instruction memory** (`instruction_memory`): 256 words, read-only,
  combinational read, indexed by PC[9:2]. It is loaded from the hex file
  named by the top-level parameter `IMEM_INIT`, or in simulation by writing
  `u_imem.mem` directly.
- **Data memory** (`data_memory`): 256 words, indexed by address[9:2].
  - Combinational read: `data_out` is the addressed word while MemRd = 1
    and 0 otherwise.
  - Synchronous write on the rising edge while MemWr = 1.
- Address bits above bit 9 are ignored. Byte offsets are ignored: only word
  accesses exist.
- Neither memory, nor the register file, is reset. A synchronous,
  active-high `rst` loads the PC with 0.

Every state element uses the same rising edge, so the clock period must
cover the longest path:

T_cycle ≥ T_clk-q + T_max_comb + T_setup + T_skew

Here T_clk-q is the register's clock-to-output delay, T_max_comb the longest
combinational delay, T_setup the setup time and T_skew the clock skew. That
longest path is the lw path: PC, instruction memory, register file,
extender and ALUSrc mux, ALU, data memory, WBdata mux, then the register
file setup.

## Choices and deviations to be aware of

- **Logic-unit order.** The logic unit orders its operations AND, OR, XOR,
  NOR (codes 00–11). This matches the ALU control codes and the MIPS funct
  bits. The course's ALU drawing orders the same four operations AND, OR,
  NOR, XOR, while its ALU control table gives xor the code 1110. This RTL
  follows the table, because with the drawing's order xor would compute NOR.
  If you change one, change `alu` and `alu_control` together.
- **Shift op codes** are as listed above. The separate `sll` line is this
  design's way of telling SLL from SRL.
- **Chosen sizes and behaviour.** The following are this design's choices:
  - the memory sizes (256 words each) and the address bits used;
  - the reset behaviour;
  - `data_out` = 0 when MemRd = 0;
  - the handling of unknown opcodes and functs;
  - the PCSrc = 3 code, which gives the incremented PC.
- **Overflow is not acted on.** The overflow flag appears on the port
  `alu_overflow` and nothing in the processor uses it. add, sub and addi
  wrap around silently.
- **The instruction memory needs a program.** With `IMEM_INIT` empty, it has
  no contents. A synthesis run then removes it and much of the datapath with
  it.

## Files

- `rtl/mips_pkg.sv`: opcodes, funct codes, ALU codes, and the control
  structs `main_ctrl_t` and `op_dec_t`.
- `rtl/single_cycle_cpu.sv`: the top level. Ports: `clk`, `rst`, `pc`,
  `instr` and `alu_overflow`. Parameters: `IMEM_WORDS`, `DMEM_WORDS` and
  `IMEM_INIT`.
- Datapath:
  - `pc_register` (built on `register`)
  - `next_pc_logic` (with `mux3`)
  - `instruction_memory`
  - `register_file` (with `tristate_buffer`)
  - `extender`
  - `mux2`
  - `alu` (with `shifter`)
  - `data_memory`
- Control: `main_control`, `alu_control`, `pc_control`.
- `tb/tb_<module>.sv`: one self-checking testbench per module. Each ends by
  printing `TB_RESULT checks=N failures=M`.
- `tb/tb_imem_init.sv` with `tb/imem_init_test.hex`: loads the instruction
  memory from a file. Word i of the file is 0x9E3779B9 x (i + 1), mod 2^32.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/mips_pkg.sv \
    tb/tb_single_cycle_cpu.sv --top-module tb_single_cycle_cpu
./obj_dir/Vtb_single_cycle_cpu
```

Replace the testbench name to run any other unit test. The processor
testbench runs at the default sizes.

1. It assembles a 44-instruction program in SystemVerilog and writes it
   into `u_imem.mem`.
2. The program does the following:
   - stores a 10-element sequence with a bne loop;
   - sums the sequence back with lw, add, beq and j;
   - executes each remaining instruction;
   - overflows the adder in a doubling loop;
   - writes to R0;
   - halts in a self-jump.
3. An independent instruction-level model runs in step with the processor.
   After every clock edge the testbench compares the PC and all 31
   registers with the model. At the end it compares all of data memory.
4. It checks that exactly one instruction retires per cycle (230
   instructions in 230 cycles).
5. It checks that every instruction, both outcomes of beq and of bne,
   overflow and an R0 write each happened at least once.

To run your own program, write one 32-bit hex word per line and pass the
file name as `IMEM_INIT`.
