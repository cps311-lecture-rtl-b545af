// alu: the 32-bit ALU of the MIPS-subset CPUs.
//
// Every function is computed side by side and a multiplexer picks one,
// like the lecture's bit of the ALU (a MUX in front of an adder and gate
// networks), here written at word level. Functions: A + B, A - B, A & B,
// A | B, A ^ B, ~(A | B), set-on-less-than (signed), B << 16 (lui), A
// (B ignored, used by JAL) and the shifts of B, by shamt or by A[4:0].
//
// op is the 3-bit ALU field of the control word. op = ALU_FUNCT (R-type)
// lets the instruction's funct field choose, as the lecture describes;
// the other op codes choose directly. All arithmetic is signed and there
// is no overflow detection; the op encoding is this design's choice.
// Purely combinational.
module alu
  import mips_pkg::*;
#(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  alu_op_e          op,
  input  logic [5:0]       funct,
  input  logic [4:0]       shamt,
  output logic [WIDTH-1:0] y
);

  logic [WIDTH-1:0] sum, diff, slt, lui;
  logic [4:0]       sh_var;

  always_comb begin
    sum    = a + b;
    diff   = a - b;
    slt    = WIDTH'($signed(a) < $signed(b));
    lui    = b << 16;
    sh_var = a[4:0];
  end

  always_comb begin
    unique case (op)
      ALU_ADD:    y = sum;
      ALU_AND:    y = a & b;
      ALU_OR:     y = a | b;
      ALU_XOR:    y = a ^ b;
      ALU_SLT:    y = slt;
      ALU_LUI:    y = lui;
      ALU_PASS_A: y = a;
      ALU_FUNCT: begin
        case (funct)
          F_SLL:          y = b << shamt;
          F_SRL:          y = b >> shamt;
          F_SRA:          y = WIDTH'($signed(b) >>> shamt);
          F_SLLV:         y = b << sh_var;
          F_SRLV:         y = b >> sh_var;
          F_SRAV:         y = WIDTH'($signed(b) >>> sh_var);
          F_ADD, F_ADDU:  y = sum;
          F_SUB, F_SUBU:  y = diff;
          F_AND:          y = a & b;
          F_OR:           y = a | b;
          F_XOR:          y = a ^ b;
          F_NOR:          y = ~(a | b);
          F_SLT, F_SLTU:  y = slt;
          default:        y = sum;
        endcase
      end
      default:    y = sum;
    endcase
  end

endmodule
