// mc_cpu: multi-cycle CPU for the same MIPS subset, four cycles per
// instruction.
//
// The work of an instruction is split into four steps (see mc_control),
// with non-architectural registers holding the results between them:
// the IR, ALUInputA and ALUInputB (loaded in step 2), and ALUOutput
// (loaded in step 3). Steps:
//   1  IR <- M[PC], PC <- PC + 4
//   2  ALUInputA <- register[rs] (PC for JAL),
//      ALUInputB <- register[rt] or immediate;
//      branch taken / jump: PC <- target
//   3  ALUOutput <- ALUInputA op ALUInputB
//   4  register[rd / rt / 31] <- ALUOutput, or register[rt] <- M[ALUOutput],
//      or M[ALUOutput] <- register[rt]
// The PC reaches its target in step 2, before the next fetch, so there is
// no delayed branch; JAL saves the address after itself. Instruction
// fetch (step 1) and data access (step 4) never coincide, so a single
// memory port is used, its address chosen between the PC and ALUOutput.
//
// Interface: one memory port mem_* with combinational read. Timing: all
// state changes on the falling edge of clk; reset gives PC = 0, step 1.
// PC bits 1..0 are constant 0, as the PC always holds a multiple of 4.
module mc_cpu
  import mips_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  output logic [31:0] mem_addr,
  output logic [31:0] mem_wdata,
  output logic        mem_read,
  output logic        mem_write,
  input  logic [31:0] mem_rdata,
  output logic [31:0] pc,
  output logic [31:0] ir,
  output mc_step_e    step
);

  mc_ctrl_t    ctl;
  logic [31:0] rs_data, rt_data, mem_data;
  logic [31:0] a_next, b_next, alu_in_a, alu_in_b, alu_y, alu_out, wr_data;
  logic [4:0]  wr_addr;
  logic        equal;

  mc_control u_ctl (
    .clk(clk), .rst_n(rst_n), .ir(ir), .equal(equal), .step(step), .ctl(ctl)
  );

  ld_register #(.WIDTH(32)) u_ir (
    .clk(clk), .rst_n(rst_n), .load(ctl.ir_load), .d(mem_rdata), .q(ir)
  );

  pc_unit u_pc (
    .clk(clk), .rst_n(rst_n), .load(ctl.pc_load), .pc_src(ctl.pc_src),
    .imm(ir[15:0]), .jfield(ir[25:0]), .pc(pc)
  );

  register_set u_regs (
    .clk(clk), .rst_n(rst_n),
    .rs_addr(ir[25:21]), .rt_addr(ir[20:16]), .mem_addr(ir[20:16]),
    .rs_data(rs_data), .rt_data(rt_data), .mem_data(mem_data),
    .we(ctl.reg_write), .wr_addr(wr_addr), .wr_data(wr_data)
  );

  ld_register #(.WIDTH(32)) u_alu_in_a (
    .clk(clk), .rst_n(rst_n), .load(ctl.ab_load), .d(a_next), .q(alu_in_a)
  );
  ld_register #(.WIDTH(32)) u_alu_in_b (
    .clk(clk), .rst_n(rst_n), .load(ctl.ab_load), .d(b_next), .q(alu_in_b)
  );

  alu u_alu (
    .a(alu_in_a), .b(alu_in_b), .op(ctl.alu_op), .funct(ir[5:0]),
    .shamt(ir[10:6]), .y(alu_y)
  );

  ld_register #(.WIDTH(32)) u_alu_out (
    .clk(clk), .rst_n(rst_n), .load(ctl.out_load), .d(alu_y), .q(alu_out)
  );

  always_comb begin
    equal  = (rs_data == rt_data);
    a_next = (ctl.alu_a_src == A_PC) ? pc : rs_data;
    case (ctl.alu_b_src)
      B_IMM_ZX: b_next = {16'h0000, ir[15:0]};
      B_IMM_SX: b_next = {{16{ir[15]}}, ir[15:0]};
      default:  b_next = rt_data;
    endcase
    case (ctl.reg_dst)
      DST_RT:  wr_addr = ir[20:16];
      DST_R31: wr_addr = 5'd31;
      default: wr_addr = ir[15:11];
    endcase
    wr_data = (ctl.wb_src == WB_MEM) ? mem_rdata : alu_out;
  end

  assign mem_addr  = ctl.addr_alu ? alu_out : pc;
  assign mem_wdata = mem_data;
  assign mem_read  = ctl.mem_read;
  assign mem_write = ctl.mem_write;

endmodule
