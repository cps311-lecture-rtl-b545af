// mc_control: control unit of the multi-cycle CPU.
//
// A two-bit step counter walks through the four steps every instruction
// takes, and control_decoder supplies the instruction-dependent choices:
//   S_FETCH   : IR <- M[PC], PC <- PC + 4
//   S_DECODE  : ALUInputA <- register[rs] or PC, ALUInputB <- register[rt]
//               or the immediate; a taken branch or a jump loads the PC
//               with its target
//   S_EXECUTE : ALUOutput <- ALUInputA op ALUInputB
//   S_FINISH  : register <- ALUOutput, or register[rt] <- M[ALUOutput],
//               or M[ALUOutput] <- register[rt]
// The counter always wraps after S_FINISH, so every instruction takes
// exactly four cycles. ir must hold the instruction being executed (it is
// only read in steps 2 to 4).
//
// Timing: the step advances on the falling edge of clk; rst_n returns it
// to S_FETCH. Outputs are combinational in step and ir.
module mc_control
  import mips_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] ir,
  input  logic        equal,
  output mc_step_e    step,
  output mc_ctrl_t    ctl
);

  ctrl_word_t cw;

  control_decoder u_dec (.ir(ir), .equal(equal), .cw(cw));

  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n) step <= S_FETCH;
    else        step <= mc_step_e'(step + 2'd1);
  end

  always_comb begin
    ctl           = '0;
    ctl.pc_src    = PC_PLUS4;
    ctl.alu_a_src = cw.alu_a_src;
    ctl.alu_b_src = cw.alu_b_src;
    ctl.alu_op    = cw.alu_op;
    ctl.wb_src    = cw.wb_src;
    ctl.reg_dst   = cw.reg_dst;
    unique case (step)
      S_FETCH: begin
        ctl.ir_load  = 1'b1;
        ctl.pc_load  = 1'b1;
        ctl.mem_read = 1'b1;
      end
      S_DECODE: begin
        ctl.ab_load = 1'b1;
        ctl.pc_src  = cw.pc_src;
        ctl.pc_load = (cw.pc_src != PC_PLUS4);
      end
      S_EXECUTE: ctl.out_load = 1'b1;
      S_FINISH: begin
        ctl.addr_alu  = 1'b1;
        ctl.mem_read  = cw.mem_read;
        ctl.mem_write = cw.mem_write;
        ctl.reg_write = cw.reg_write;
      end
      default: ;
    endcase
  end

endmodule
