// tb_control_decoder: checks the control word for each instruction class
// against a table worked out from what each instruction must do, with
// the branch comparison both true and false.
module tb_control_decoder;
  import mips_pkg::*;
  import mips_asm_pkg::*;
  logic [31:0] ir;
  logic        equal;
  ctrl_word_t  cw;
  int checks = 0, failures = 0;

  control_decoder dut (.ir(ir), .equal(equal), .cw(cw));

  task automatic expect_cw(string name, logic [31:0] ins, logic eq, ctrl_word_t exp);
    ir = ins; equal = eq;
    #1;
    checks++;
    if (cw !== exp) begin failures++; $display("%s eq=%0d: cw=%b expected %b", name, eq, cw, exp); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    //                            pc_src     rd    wr    A      B         op          regwr wb      dst
    for (int e = 0; e < 2; e++) begin
      expect_cw("add",  enc_r(F_ADD, 4, 5, 6),      e[0], '{PC_PLUS4, 1'b0, 1'b0, A_REG, B_REG,    ALU_FUNCT,  1'b1, WB_ALU, DST_RD});
      expect_cw("sll",  enc_r(F_SLL, 4, 0, 6, 3),   e[0], '{PC_PLUS4, 1'b0, 1'b0, A_REG, B_REG,    ALU_FUNCT,  1'b1, WB_ALU, DST_RD});
      expect_cw("addi", enc_i(OP_ADDI, 2, 2, 1),    e[0], '{PC_PLUS4, 1'b0, 1'b0, A_REG, B_IMM_SX, ALU_ADD,    1'b1, WB_ALU, DST_RT});
      expect_cw("slti", enc_i(OP_SLTI, 2, 2, 1),    e[0], '{PC_PLUS4, 1'b0, 1'b0, A_REG, B_IMM_SX, ALU_SLT,    1'b1, WB_ALU, DST_RT});
      expect_cw("andi", enc_i(OP_ANDI, 2, 2, 1),    e[0], '{PC_PLUS4, 1'b0, 1'b0, A_REG, B_IMM_ZX, ALU_AND,    1'b1, WB_ALU, DST_RT});
      expect_cw("ori",  enc_i(OP_ORI, 2, 2, 1),     e[0], '{PC_PLUS4, 1'b0, 1'b0, A_REG, B_IMM_ZX, ALU_OR,     1'b1, WB_ALU, DST_RT});
      expect_cw("xori", enc_i(OP_XORI, 2, 2, 1),    e[0], '{PC_PLUS4, 1'b0, 1'b0, A_REG, B_IMM_ZX, ALU_XOR,    1'b1, WB_ALU, DST_RT});
      expect_cw("lui",  enc_i(OP_LUI, 2, 0, 1),     e[0], '{PC_PLUS4, 1'b0, 1'b0, A_REG, B_IMM_ZX, ALU_LUI,    1'b1, WB_ALU, DST_RT});
      expect_cw("lw",   32'h8c02_1000,              e[0], '{PC_PLUS4, 1'b1, 1'b0, A_REG, B_IMM_SX, ALU_ADD,    1'b1, WB_MEM, DST_RT});
      expect_cw("sw",   32'hac02_1000,              e[0], '{PC_PLUS4, 1'b0, 1'b1, A_REG, B_IMM_SX, ALU_ADD,    1'b0, WB_ALU, DST_RD});
      expect_cw("beq",  enc_i(OP_BEQ, 0, 0, -1),    e[0], '{e[0] ? PC_BRANCH : PC_PLUS4, 1'b0, 1'b0, A_REG, B_REG, ALU_ADD, 1'b0, WB_ALU, DST_RD});
      expect_cw("bne",  enc_i(OP_BNE, 1, 2, 3),     e[0], '{e[0] ? PC_PLUS4 : PC_BRANCH, 1'b0, 1'b0, A_REG, B_REG, ALU_ADD, 1'b0, WB_ALU, DST_RD});
      expect_cw("j",    enc_j(OP_J, 32'h40),        e[0], '{PC_JUMP,  1'b0, 1'b0, A_REG, B_REG,    ALU_ADD,    1'b0, WB_ALU, DST_RD});
      expect_cw("jal",  enc_j(OP_JAL, 32'h40),      e[0], '{PC_JUMP,  1'b0, 1'b0, A_PC,  B_REG,    ALU_PASS_A, 1'b1, WB_ALU, DST_R31});
      expect_cw("undef",{6'h3f, 26'h0},             e[0], '{PC_PLUS4, 1'b0, 1'b0, A_REG, B_REG,    ALU_ADD,    1'b0, WB_ALU, DST_RD});
    end
    checks++;
    if ($bits(ctrl_word_t) != 14) begin failures++; $display("control word is %0d bits", $bits(ctrl_word_t)); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
