// mips_asm_pkg: testbench helpers for the MIPS-subset CPUs.
//
// Instruction encoders (standard MIPS R, I and J formats) and an
// instruction-level reference model, mips_iss, that executes a program
// one instruction at a time. The model has two modes: with delayed = 1 it
// reproduces the single-cycle machine's visible behaviour (the word after
// a branch or jump always executes, JAL saves the address after itself,
// which is the delay slot), with delayed = 0 the multi-cycle machine's
// (branches take effect at once, JAL saves its address + 4). The model is
// written from the instruction definitions, not from the RTL.
package mips_asm_pkg;
  import mips_pkg::*;

  function automatic logic [31:0] enc_r(logic [5:0] funct, int rd, int rs, int rt, int shamt = 0);
    return {OP_RTYPE, 5'(rs), 5'(rt), 5'(rd), 5'(shamt), funct};
  endfunction

  function automatic logic [31:0] enc_i(logic [5:0] op, int rt, int rs, int imm);
    return {op, 5'(rs), 5'(rt), 16'(imm)};
  endfunction

  function automatic logic [31:0] enc_j(logic [5:0] op, logic [31:0] target_addr);
    return {op, target_addr[27:2]};
  endfunction


  localparam int DUMP_BASE = 32'h1100;
  // data words compared after a program: 0x1000 .. 0x117c
  localparam int CMP_FIRST = 32'h1000 / 4;
  localparam int CMP_LAST  = 32'h117c / 4;

  // Random program of about n instructions for both CPUs. Registers are
  // seeded first; loads and stores use $0 plus an offset in the data area
  // 0x1000..0x10fc; branches and jumps go forward only and are always
  // followed by a non-branch instruction; the program ends with a
  // store of all 32 registers to DUMP_BASE, a branch-to-self and a no-op.
  function automatic void gen_random_program(int n, ref logic [31:0] prog[$]);
    logic [5:0] rfuncts [16] = '{F_SLL, F_SRL, F_SRA, F_SLLV, F_SRLV, F_SRAV,
      F_ADD, F_ADDU, F_SUB, F_SUBU, F_AND, F_OR, F_XOR, F_NOR, F_SLT, F_SLTU};
    logic [5:0] iops [8] = '{OP_ADDI, OP_ADDIU, OP_SLTI, OP_SLTIU, OP_ANDI, OP_ORI, OP_XORI, OP_LUI};
    int kind;
    prog.delete();
    for (int r = 1; r < 32; r++) begin
      prog.push_back(enc_i(OP_LUI, r, 0, $urandom()));
      prog.push_back(enc_i(OP_ORI, r, r, $urandom()));
    end
    while (prog.size() < n) begin
      kind = $urandom() % 20;
      if (kind < 7)
        prog.push_back(enc_r(rfuncts[$urandom() % 16], $urandom() % 32, $urandom() % 32, $urandom() % 32, $urandom() % 32));
      else if (kind < 11)
        prog.push_back(enc_i(iops[$urandom() % 8], $urandom() % 32, $urandom() % 32, $urandom()));
      else if (kind < 13)
        prog.push_back(enc_i(OP_LW, $urandom() % 32, 0, 32'h1000 + 4 * ($urandom() % 64)));
      else if (kind < 15)
        prog.push_back(enc_i(OP_SW, $urandom() % 32, 0, 32'h1000 + 4 * ($urandom() % 64)));
      else begin
        int off = 1 + $urandom() % 3;
        if (kind < 17) begin  // beq/bne on equal, unequal or possibly equal registers
          int ra = $urandom() % 32, rb = $urandom() % 32;
          case ($urandom() % 3)
            0: rb = ra;
            1: rb = 0;
            default: ;
          endcase
          prog.push_back(enc_i(($urandom() % 2 == 1) ? OP_BEQ : OP_BNE, ra, rb, off));
        end
        else if (kind < 19)
          prog.push_back(enc_j(OP_J, 32'(4 * (prog.size() + 1 + off))));
        else
          prog.push_back(enc_j(OP_JAL, 32'(4 * (prog.size() + 1 + off))));
        prog.push_back(enc_i(OP_ADDI, 1 + $urandom() % 31, $urandom() % 32, $urandom()));  // slot
        for (int k = 0; k < off; k++)
          prog.push_back(enc_i(OP_ADDIU, 1 + $urandom() % 31, $urandom() % 32, $urandom()));
      end
    end
    for (int r = 0; r < 32; r++)               // dump every register to 0x1100 + 4r
      prog.push_back(enc_i(OP_SW, r, 0, DUMP_BASE + 4 * r));
    prog.push_back(enc_i(OP_BEQ, 0, 0, -1));   // b .
    prog.push_back(32'h0000_0000);             // nop
  endfunction

  localparam int MODEL_WORDS = 4096;

  class mips_iss;
    logic [31:0] regs [32];
    logic [31:0] mem  [MODEL_WORDS];
    logic [31:0] pc;        // address of the instruction to execute next
    logic [31:0] pending;   // delayed mode: target taking effect after the slot
    bit          have_pending;
    bit          delayed;
    // counts of what happened
    int n_instr, n_taken, n_not_taken, n_jump, n_jal, n_load, n_store, n_slot, n_r0_write;

    function new(bit delayed_mode);
      delayed = delayed_mode;
      foreach (regs[r]) regs[r] = '0;
      foreach (mem[a])  mem[a]  = '0;
      pc = '0; have_pending = 0;
      n_instr = 0; n_taken = 0; n_not_taken = 0; n_jump = 0; n_jal = 0;
      n_load = 0; n_store = 0; n_slot = 0; n_r0_write = 0;
    endfunction

    function automatic logic [31:0] rd_mem(logic [31:0] addr);
      return mem[addr[13:2]];
    endfunction

    function void wr_reg(int r, logic [31:0] v);
      if (r == 0) n_r0_write++;
      else regs[r] = v;
    endfunction

    // execute the instruction at pc
    function void step();
      logic [31:0] ins, a, b, res, next, zx, sx, target, link;
      logic signed [31:0] sa, sb;
      logic [5:0] op, f;
      int rs, rt, rd;
      bit redirect;
      ins = rd_mem(pc);
      op = ins[31:26]; f = ins[5:0];
      rs = int'(ins[25:21]); rt = int'(ins[20:16]); rd = int'(ins[15:11]);
      a = regs[rs]; b = regs[rt]; sa = a; sb = b;
      zx = {16'h0, ins[15:0]}; sx = {{16{ins[15]}}, ins[15:0]};
      redirect = 0; target = '0;
      link = pc + 4;               // delayed: the slot address; else the return address
      n_instr++;
      if (have_pending) n_slot++;
      case (op)
        OP_RTYPE: begin
          case (f)
            F_SLL:  res = b << ins[10:6];
            F_SRL:  res = b >> ins[10:6];
            F_SRA:  res = sb >>> ins[10:6];
            F_SLLV: res = b << a[4:0];
            F_SRLV: res = b >> a[4:0];
            F_SRAV: res = sb >>> a[4:0];
            F_SUB, F_SUBU: res = a - b;
            F_AND:  res = a & b;
            F_OR:   res = a | b;
            F_XOR:  res = a ^ b;
            F_NOR:  res = ~(a | b);
            F_SLT, F_SLTU: res = (sa < sb) ? 1 : 0;
            default: res = a + b;
          endcase
          wr_reg(rd, res);
        end
        OP_ADDI, OP_ADDIU: wr_reg(rt, a + sx);
        OP_SLTI, OP_SLTIU: wr_reg(rt, (sa < $signed(sx)) ? 1 : 0);
        OP_ANDI: wr_reg(rt, a & zx);
        OP_ORI:  wr_reg(rt, a | zx);
        OP_XORI: wr_reg(rt, a ^ zx);
        OP_LUI:  wr_reg(rt, {ins[15:0], 16'h0});
        OP_LW: begin n_load++; wr_reg(rt, rd_mem(a + sx)); end
        OP_SW: begin n_store++; mem[(a + sx) >> 2 & (MODEL_WORDS - 1)] = b; end
        OP_BEQ, OP_BNE: begin
          if ((a == b) == (op == OP_BEQ)) begin
            n_taken++; redirect = 1; target = pc + 4 + {sx[29:0], 2'b00};
          end else n_not_taken++;
        end
        OP_J:   begin n_jump++; redirect = 1; target = {link[31:28], ins[25:0], 2'b00}; end
        OP_JAL: begin
          n_jal++; redirect = 1; target = {link[31:28], ins[25:0], 2'b00};
          wr_reg(31, link);
        end
        default: ;
      endcase
      next = pc + 4;
      if (delayed) begin
        if (have_pending) begin next = pending; have_pending = 0; end
        if (redirect) begin pending = target; have_pending = 1; end
      end else if (redirect) next = target;
      pc = next;
    endfunction
  endclass

endpackage
