# Two teaching implementations of a MIPS subset

This RTL builds a small 32-bit MIPS-like processor twice, from the same
parts, to show how a CPU is put together from registers, multiplexers,
decoders, an ALU and a control unit:

* **`sc_cpu`, single-cycle.** One clock executes one whole instruction.
  Instruction fetch and data access happen in the same cycle, so the machine
  needs a two-port memory. The instruction after a branch or jump always
  executes (a *delayed branch*).
* **`mc_cpu`, multi-cycle.** Every instruction takes exactly four clocks.
  Extra registers hold intermediate values between the steps. One memory
  port is enough, and there is no delayed branch.

Two small classroom circuits stand beside them: a register set of two 4-bit
registers (`two_reg_set`) and a 4-bit ALU built from one-bit slices
(`alu_slice`, `alu_bit`). The top level, `lecture_top`, holds all four
designs side by side. They share only the clock and the reset.

All state in every design changes on the **falling edge** of `clk`. The
asynchronous, active-low `rst_n` sets PC, IR and all registers to 0.

## Instruction subset

| class | instructions |
|---|---|
| R-type | add addu sub subu and or xor nor slt sltu sll srl sra sllv srlv srav |
| immediate | addi addiu slti sltiu andi ori xori lui |
| memory | lw sw (words only) |
| control | beq bne j jal |

All arithmetic is signed. The "u" forms behave like the signed ones, and
overflow does not trap. The design leaves out hi/lo, multiply and divide,
coprocessors, exceptions, byte and halfword access, and `jr`. An unknown
opcode only advances the PC.

## The shared datapath parts

* **`ld_register`.** Each bit is a flip-flop with a 2:1 multiplexer in front
  of it. With `load` = 0 the multiplexer feeds the flip-flop its own output,
  so the register is clocked every cycle but changes only when loaded. The IR,
  the PC and all the general registers are built from it.
* **`register_set`.** Holds $1..$31 as 31 `ld_register`s. $0 has no storage
  and always reads 0. The write port has a shared data input. A
  `decoder_1of32` turns the destination number into the load enables, and the
  single `we` bit of the control word is the decoder's overall enable.
  Three `reg_read_port` outputs give register[rs] and register[rt] to the ALU
  and register[rt] again as store data. Each read port has one 32-input
  multiplexer per bit, and input 0 of each multiplexer is the constant 0.
* **`alu`.** Computes all of its functions in parallel and selects one. The
  3-bit ALU field of the control word selects add, and, or, xor, slt, B<<16
  (lui) or "pass A" (jal). Its eighth value hands the choice to the
  instruction's funct field, which adds sub, nor and the six shifts.
* **`pc_unit`.** A 1-of-4 multiplexer in front of a 30-bit register. PC bits
  1..0 are wired to 0 because the PC is always a multiple of 4. The
  multiplexer chooses among:
  * PC + 4;
  * PC + 4 × (sign-extended 16-bit constant), for a taken branch;
  * {PC[31:28], 26-bit jump field, 00}, for a jump.

  The fourth input is unused.

## The control word

`control_decoder` decodes the IR, plus the rs == rt comparison, into a
14-bit word (`ctrl_word_t` in `mips_pkg`):

| field | bits | values |
|---|---|---|
| `pc_src` | 2 | PC+4, branch, jump (one code unused) |
| `mem_read`, `mem_write` | 2 | data memory access |
| `alu_a_src` | 1 | register[rs] or PC |
| `alu_b_src` | 2 | register[rt], zero-extended immediate, sign-extended immediate (one code unused) |
| `alu_op` | 3 | see `alu` |
| `reg_write` | 1 | load a general register |
| `wb_src` | 1 | ALU result or memory word |
| `reg_dst` | 2 | rd, rt or $31 |

The list of fields and their widths follows the source description. The
numeric codes and the per-instruction table are this design's own.

## Single-cycle timing and the delayed branch

This is the least obvious behaviour in the design. The IR and the PC are
both loaded on every clock:

```
IR <- M[PC],  PC <- next PC,  plus whatever the instruction in IR does
```

So while an instruction executes, the PC already holds the address of the
word after it. Three things follow:

* A branch target is computed as PC + 4·imm from that already-advanced PC.
  This gives the usual MIPS target, and `pc_unit` needs no extra adder.
* On the edge where the branch loads the PC with the target, the IR loads
  the word after the branch. That word executes next, and only then does
  execution continue at the target. Example: the two-word loop
  `b . ; addi $1,$1,1` increments $1 once every two cycles.
* `jal` copies the PC into $31. The value copied is the jal's address + 4,
  which is the delay-slot instruction. That instruction therefore runs again
  after the return. This follows the source description; real MIPS saves
  address + 8.

After reset, IR = 0, which is a no-op (`sll $0,$0,0`). The first clock only
fetches the word at address 0. An N-instruction straight-line program has
finished after N + 1 clocks.

## Multi-cycle steps

`mc_control` is a two-bit step counter combined with the same
`control_decoder`:

| step | transfers |
|---|---|
| 1 fetch | IR <- M[PC], PC <- PC + 4 |
| 2 decode | ALUInputA <- register[rs] (PC for jal), ALUInputB <- register[rt] or immediate; taken branch or jump: PC <- target |
| 3 execute | ALUOutput <- ALUInputA op ALUInputB |
| 4 finish | register <- ALUOutput, or register[rt] <- M[ALUOutput], or M[ALUOutput] <- register[rt] |

The PC reaches its target in step 2, before the next fetch, so the
delayed-branch effect disappears. For the same reason `jal` saves the true
return address.

The single memory port takes its address from the PC in step 1 and from
ALUOutput in step 4. Every instruction takes four clocks, even a branch that
has nothing left to do after step 2. An N-instruction program has finished
after 4N clocks.

## Classroom circuits

* **`two_reg_set`.** Two 4-bit registers share one data input. A 1-of-2
  decoder drives their load enables: `sel_load` chooses A (0) or B (1), and
  `load_en` enables the load. A row of 2:1 multiplexers, controlled by
  `sel_out`, shows A or B.
* **`alu_bit` / `alu_slice`.** One bit has a full adder (carry in from the
  bit below, carry out to the bit above), gate functions, and an output
  multiplexer. Operation codes: 000 and, 001 or, 010 xor, 011 nor, 111 add.
  Codes 100–110 give 0. `alu_slice` chains WIDTH slices with carry-in 0.

## Memories

`mem_dual` (single-cycle) and `mem_single` (multi-cycle) store 32-bit words
at byte addresses, word-aligned. Reads are combinational and writes happen on
the falling edge. Each holds `MEM_WORDS` = 4096 words (16 KiB); addresses
beyond that wrap around. The memories have no load port: a testbench writes
the program into the `mem` array before it releases reset.

## Where this departs from, or goes beyond, the source description

* The ALU op encoding, the control-word codes, the decode table and the
  multi-cycle step controls are this design's. The source gives the fields
  and the register transfers, not the encodings.
* The source gives the register-transfer steps of only one instruction for
  the multi-cycle machine. The other instruction classes follow the general
  four-step outline. Data memory is accessed in step 4, which is where that
  outline puts it. One remark in the source places the access in cycle 3.
* The set of shift instructions and `nor` is inferred. The source's list of
  ALU operations mentions ten functions "with variations for the shifts".
* There is no `jr`. The source says one PC-source code is unused.
* Resets, memory size, combinational memory reads and word-only addressing
  are this design's choices.
* The 32-bit ALU and the PC adders are written at word level. The
  bit-by-bit construction (one multiplexer and gate network per bit, ripple
  carry) is modelled only by the 4-bit classroom ALU.
* The clock and any IO system are outside the RTL.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` at the end. Example
with plain Verilator:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/mips_pkg.sv tb/mips_asm_pkg.sv tb/tb_lecture_top.sv --top-module tb_lecture_top
./obj_dir/Vtb_lecture_top
```

`tb/mips_asm_pkg.sv` has instruction encoders, a random program generator,
and `mips_iss`, an instruction-level reference model with a delayed-branch
mode and an immediate-branch mode.

* `tb_sc_cpu`, `tb_mc_cpu` and `tb_lecture_top` run:
  * the demonstration programs, with exact cycle counts;
  * 10–20 random programs of about 150–200 instructions each, compared
    register by register and word by word with the model.
* `tb_lecture_top` runs the whole top at its default sizes. It also checks
  that each mechanism occurred at least once: delay slot, taken and untaken
  branch, jump, jal, load, store, ignored write to $0, multi-cycle step
  sequence, and both demo registers.
* Each smaller block has its own `tb_<block>.sv`.

Demonstration programs covered:

| program | machine | result |
|---|---|---|
| `add $4,$5,$6` (0x00a62020) | single-cycle | $4 = 3 one cycle after the add is fetched |
| `lw $2,1000($0); addi $2,$2,1; sw $2,1000($0)` | single-cycle | word at 1000 incremented after 4 clocks |
| `b . ; addi $1,$1,1` | both | $1 counts on the single-cycle machine, stays 0 on the multi-cycle one |
| `sub $4,$5,$6` (0x00a62022) | multi-cycle | result after exactly 4 clocks |
| `8c021000 20420001 ac021000` | multi-cycle | word at 0x1000 incremented after 12 clocks |

To change a size, use the parameters: `WIDTH`/`ADDR_BITS` of
`register_set`, `WIDTH` of `alu_slice` and `two_reg_set`, and `MEM_WORDS` of
`lecture_top`.
