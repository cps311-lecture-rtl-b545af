// control_decoder: control unit of the single-cycle CPU.
//
// Combinational decode of the instruction register, plus the rs == rt
// comparison for conditional branches, into the 14-bit control word of
// mips_pkg: PC source, memory read/write, ALU left and right sources, ALU
// operation, register load, register data source and destination. The
// multi-cycle control unit reuses it for the instruction-dependent part.
//
// The instructions decoded are those the datapath can carry out: R-type
// arithmetic, logic and shifts; addi/addiu/slti/sltiu/andi/ori/xori/lui;
// lw/sw; beq/bne; j/jal. Any other opcode leaves every state element
// alone except the PC, which advances by 4. Which control values each
// instruction uses follows from the datapath; the table itself is this
// design's.
module control_decoder
  import mips_pkg::*;
(
  input  logic [31:0] ir,
  input  logic        equal,
  output ctrl_word_t  cw
);

  logic [5:0] opcode;
  assign opcode = ir[31:26];

  always_comb begin
    // default: no state change apart from PC + 4
    cw = '{pc_src: PC_PLUS4, mem_read: 1'b0, mem_write: 1'b0,
           alu_a_src: A_REG, alu_b_src: B_REG, alu_op: ALU_ADD,
           reg_write: 1'b0, wb_src: WB_ALU, reg_dst: DST_RD};
    case (opcode)
      OP_RTYPE: begin
        cw.alu_op    = ALU_FUNCT;
        cw.reg_write = 1'b1;
      end
      OP_ADDI, OP_ADDIU: begin
        cw.alu_b_src = B_IMM_SX; cw.alu_op = ALU_ADD;
        cw.reg_write = 1'b1;     cw.reg_dst = DST_RT;
      end
      OP_SLTI, OP_SLTIU: begin
        cw.alu_b_src = B_IMM_SX; cw.alu_op = ALU_SLT;
        cw.reg_write = 1'b1;     cw.reg_dst = DST_RT;
      end
      OP_ANDI: begin
        cw.alu_b_src = B_IMM_ZX; cw.alu_op = ALU_AND;
        cw.reg_write = 1'b1;     cw.reg_dst = DST_RT;
      end
      OP_ORI: begin
        cw.alu_b_src = B_IMM_ZX; cw.alu_op = ALU_OR;
        cw.reg_write = 1'b1;     cw.reg_dst = DST_RT;
      end
      OP_XORI: begin
        cw.alu_b_src = B_IMM_ZX; cw.alu_op = ALU_XOR;
        cw.reg_write = 1'b1;     cw.reg_dst = DST_RT;
      end
      OP_LUI: begin
        cw.alu_b_src = B_IMM_ZX; cw.alu_op = ALU_LUI;
        cw.reg_write = 1'b1;     cw.reg_dst = DST_RT;
      end
      OP_LW: begin
        cw.alu_b_src = B_IMM_SX; cw.alu_op = ALU_ADD;
        cw.mem_read  = 1'b1;
        cw.reg_write = 1'b1;     cw.wb_src = WB_MEM; cw.reg_dst = DST_RT;
      end
      OP_SW: begin
        cw.alu_b_src = B_IMM_SX; cw.alu_op = ALU_ADD;
        cw.mem_write = 1'b1;
      end
      OP_BEQ: if (equal)  cw.pc_src = PC_BRANCH;
      OP_BNE: if (!equal) cw.pc_src = PC_BRANCH;
      OP_J:   cw.pc_src = PC_JUMP;
      OP_JAL: begin
        cw.pc_src    = PC_JUMP;
        cw.alu_a_src = A_PC;     cw.alu_op = ALU_PASS_A;
        cw.reg_write = 1'b1;     cw.reg_dst = DST_R31;
      end
      default: ;
    endcase
  end

endmodule
