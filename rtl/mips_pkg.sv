// mips_pkg: shared encodings for the MIPS-subset datapaths.
//
// Holds the opcode and funct numbers of the instructions the two CPUs
// execute (standard MIPS values), and the 14-bit control word that the
// control unit sends to the datapath. The control word has exactly the
// fields of the lecture's list: 2 bits PC source, 2 bits memory read/write,
// 1 bit ALU left source, 2 bits ALU right source, 3 bits ALU operation,
// 1 bit register load, 1 bit register data source, 2 bits register
// destination. The numeric value of each field is this design's choice.
package mips_pkg;

  // Opcodes (instruction bits 31..26)
  localparam logic [5:0] OP_RTYPE = 6'h00;
  localparam logic [5:0] OP_J     = 6'h02;
  localparam logic [5:0] OP_JAL   = 6'h03;
  localparam logic [5:0] OP_BEQ   = 6'h04;
  localparam logic [5:0] OP_BNE   = 6'h05;
  localparam logic [5:0] OP_ADDI  = 6'h08;
  localparam logic [5:0] OP_ADDIU = 6'h09;
  localparam logic [5:0] OP_SLTI  = 6'h0a;
  localparam logic [5:0] OP_SLTIU = 6'h0b;
  localparam logic [5:0] OP_ANDI  = 6'h0c;
  localparam logic [5:0] OP_ORI   = 6'h0d;
  localparam logic [5:0] OP_XORI  = 6'h0e;
  localparam logic [5:0] OP_LUI   = 6'h0f;
  localparam logic [5:0] OP_LW    = 6'h23;
  localparam logic [5:0] OP_SW    = 6'h2b;

  // R-type funct codes (instruction bits 5..0)
  localparam logic [5:0] F_SLL  = 6'h00;
  localparam logic [5:0] F_SRL  = 6'h02;
  localparam logic [5:0] F_SRA  = 6'h03;
  localparam logic [5:0] F_SLLV = 6'h04;
  localparam logic [5:0] F_SRLV = 6'h06;
  localparam logic [5:0] F_SRAV = 6'h07;
  localparam logic [5:0] F_ADD  = 6'h20;
  localparam logic [5:0] F_ADDU = 6'h21;
  localparam logic [5:0] F_SUB  = 6'h22;
  localparam logic [5:0] F_SUBU = 6'h23;
  localparam logic [5:0] F_AND  = 6'h24;
  localparam logic [5:0] F_OR   = 6'h25;
  localparam logic [5:0] F_XOR  = 6'h26;
  localparam logic [5:0] F_NOR  = 6'h27;
  localparam logic [5:0] F_SLT  = 6'h2a;
  localparam logic [5:0] F_SLTU = 6'h2b;

  // PC source: PC + 4, branch target, jump target; code 3 is unused.
  typedef enum logic [1:0] {
    PC_PLUS4  = 2'd0,
    PC_BRANCH = 2'd1,
    PC_JUMP   = 2'd2
  } pc_src_e;

  // ALU left input: register[rs] or the PC (JAL only).
  typedef enum logic {
    A_REG = 1'b0,
    A_PC  = 1'b1
  } alu_a_src_e;

  // ALU right input: register[rt], zero-extended or sign-extended
  // immediate; code 3 is unused.
  typedef enum logic [1:0] {
    B_REG    = 2'd0,
    B_IMM_ZX = 2'd1,
    B_IMM_SX = 2'd2
  } alu_b_src_e;

  // ALU operation from the control word; ALU_FUNCT hands the choice to
  // the funct field of the instruction (R-type).
  typedef enum logic [2:0] {
    ALU_ADD    = 3'd0,
    ALU_AND    = 3'd1,
    ALU_OR     = 3'd2,
    ALU_XOR    = 3'd3,
    ALU_SLT    = 3'd4,
    ALU_LUI    = 3'd5,
    ALU_PASS_A = 3'd6,
    ALU_FUNCT  = 3'd7
  } alu_op_e;

  // Source of the value loaded into the register set.
  typedef enum logic {
    WB_ALU = 1'b0,
    WB_MEM = 1'b1
  } wb_src_e;

  // Register loaded: rd, rt or $31 (JAL); code 3 is unused.
  typedef enum logic [1:0] {
    DST_RD  = 2'd0,
    DST_RT  = 2'd1,
    DST_R31 = 2'd2
  } reg_dst_e;

  // The 14-bit control word.
  typedef struct packed {
    pc_src_e    pc_src;     // 2
    logic       mem_read;   // 1
    logic       mem_write;  // 1
    alu_a_src_e alu_a_src;  // 1
    alu_b_src_e alu_b_src;  // 2
    alu_op_e    alu_op;     // 3
    logic       reg_write;  // 1
    wb_src_e    wb_src;     // 1
    reg_dst_e   reg_dst;    // 2
  } ctrl_word_t;

  // Steps of the multi-cycle implementation.
  typedef enum logic [1:0] {
    S_FETCH   = 2'd0,
    S_DECODE  = 2'd1,
    S_EXECUTE = 2'd2,
    S_FINISH  = 2'd3
  } mc_step_e;

  // Per-step controls of the multi-cycle datapath.
  typedef struct packed {
    logic       ir_load;    // step 1
    logic       pc_load;    // step 1, and step 2 for a taken branch/jump
    pc_src_e    pc_src;
    logic       ab_load;    // step 2: ALUInputA / ALUInputB
    logic       out_load;   // step 3: ALUOutput
    logic       addr_alu;   // memory address: 0 = PC, 1 = ALUOutput
    logic       mem_read;
    logic       mem_write;
    logic       reg_write;  // step 4
    alu_a_src_e alu_a_src;
    alu_b_src_e alu_b_src;
    alu_op_e    alu_op;
    wb_src_e    wb_src;
    reg_dst_e   reg_dst;
  } mc_ctrl_t;

endpackage
