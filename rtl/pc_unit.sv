// pc_unit: the program counter and its next-address logic.
//
// Three candidate next values feed a 1-of-4 multiplexer in front of a
// load-enabled register:
//   PC_PLUS4  : PC + 4 (an adder whose second input is 1 at bit 2 only)
//   PC_BRANCH : PC + 4 * sign-extended I constant (the constant enters the
//               adder shifted two places, bits 1..0 receive 0)
//   PC_JUMP   : PC[31:28] followed by the 26-bit J constant and 00
// The fourth multiplexer input is unused and repeats PC + 4. Because the
// PC is always a multiple of 4, only bits 31..2 are stored; bits 1..0 are
// wired to 0. The single-cycle CPU ties load to 1 (loaded every cycle);
// the multi-cycle CPU loads it in steps 1 and 2.
//
// Timing: updates on the falling edge of clk; rst_n clears it to 0.
module pc_unit
  import mips_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        load,
  input  pc_src_e     pc_src,
  input  logic [15:0] imm,
  input  logic [25:0] jfield,
  output logic [31:0] pc
);

  logic [29:0] pc_hi, next_hi;   // PC bits 31..2
  logic [29:0] plus4_hi, branch_hi, jump_hi;

  always_comb begin
    plus4_hi  = pc_hi + 30'd1;                                 // PC + 4
    branch_hi = pc_hi + {{14{imm[15]}}, imm};                  // PC + 4*imm
    jump_hi   = {pc_hi[29:26], jfield};                        // {PC[31:28], J, 00}
    case (pc_src)
      PC_PLUS4:  next_hi = plus4_hi;
      PC_BRANCH: next_hi = branch_hi;
      PC_JUMP:   next_hi = jump_hi;
      default:   next_hi = plus4_hi;
    endcase
  end

  ld_register #(.WIDTH(30)) u_pc (
    .clk(clk), .rst_n(rst_n), .load(load), .d(next_hi), .q(pc_hi)
  );

  assign pc = {pc_hi, 2'b00};

endmodule
