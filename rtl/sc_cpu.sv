// sc_cpu: single-cycle CPU for a subset of the MIPS instruction set.
//
// Every clock cycle carries out the whole instruction held in the IR: the
// register set supplies register[rs] and register[rt], the ALU computes
// on them (or on the PC and an immediate), the data memory is read or
// written at the ALU result, and the register set loads the ALU result or
// the memory word. On the same clock edge the IR loads M[PC] and the PC
// loads its next value, so the IR and PC advance together. Consequently
// the PC already points past the executing instruction, a branch target
// is PC + 4*imm from there, and the instruction following a branch or a
// jump is always executed before the target (delayed branch). JAL copies
// the PC, which then holds the JAL's address + 4, into $31.
//
// The datapath multiplexers: register data (ALU or memory), register
// number (rd, rt or 31), ALU left input (register[rs] or PC), ALU right
// input (register[rt], zero-extended or sign-extended immediate). The
// control_decoder turns the IR and the rs == rt comparison into the
// 14-bit control word that drives them.
//
// Interface: instruction port imem_* and data port dmem_* to a two-port
// memory with combinational reads. Timing: all state changes on the
// falling edge of clk. After reset PC = 0 and IR = 0 (a no-op), so the
// first cycle only fetches the word at address 0. PC (and imem_addr) bits
// 1..0 are constant 0, as the PC always holds a multiple of 4.
module sc_cpu
  import mips_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  output logic [31:0] imem_addr,
  input  logic [31:0] imem_rdata,
  output logic [31:0] dmem_addr,
  output logic [31:0] dmem_wdata,
  output logic        dmem_read,
  output logic        dmem_write,
  input  logic [31:0] dmem_rdata,
  output logic [31:0] pc,
  output logic [31:0] ir
);

  ctrl_word_t  cw;
  logic [31:0] rs_data, rt_data, mem_data;
  logic [31:0] alu_a, alu_b, alu_y, wr_data;
  logic [31:0] imm_zx, imm_sx;
  logic [4:0]  wr_addr;
  logic        equal;

  // instruction register: loaded every cycle
  ld_register #(.WIDTH(32)) u_ir (
    .clk(clk), .rst_n(rst_n), .load(1'b1), .d(imem_rdata), .q(ir)
  );

  // program counter: loaded every cycle
  pc_unit u_pc (
    .clk(clk), .rst_n(rst_n), .load(1'b1), .pc_src(cw.pc_src),
    .imm(ir[15:0]), .jfield(ir[25:0]), .pc(pc)
  );

  control_decoder u_ctl (.ir(ir), .equal(equal), .cw(cw));

  register_set u_regs (
    .clk(clk), .rst_n(rst_n),
    .rs_addr(ir[25:21]), .rt_addr(ir[20:16]), .mem_addr(ir[20:16]),
    .rs_data(rs_data), .rt_data(rt_data), .mem_data(mem_data),
    .we(cw.reg_write), .wr_addr(wr_addr), .wr_data(wr_data)
  );

  alu u_alu (
    .a(alu_a), .b(alu_b), .op(cw.alu_op), .funct(ir[5:0]),
    .shamt(ir[10:6]), .y(alu_y)
  );

  always_comb begin
    equal  = (rs_data == rt_data);
    imm_zx = {16'h0000, ir[15:0]};
    imm_sx = {{16{ir[15]}}, ir[15:0]};
    alu_a  = (cw.alu_a_src == A_PC) ? pc : rs_data;
    case (cw.alu_b_src)
      B_IMM_ZX: alu_b = imm_zx;
      B_IMM_SX: alu_b = imm_sx;
      default:  alu_b = rt_data;
    endcase
    case (cw.reg_dst)
      DST_RT:  wr_addr = ir[20:16];
      DST_R31: wr_addr = 5'd31;
      default: wr_addr = ir[15:11];
    endcase
    wr_data = (cw.wb_src == WB_MEM) ? dmem_rdata : alu_y;
  end

  assign imem_addr  = pc;
  assign dmem_addr  = alu_y;
  assign dmem_wdata = mem_data;
  assign dmem_read  = cw.mem_read;
  assign dmem_write = cw.mem_write;

endmodule
