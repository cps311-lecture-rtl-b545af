// tb_alu: self-checking test of the 32-bit ALU.
// Random operands through every control-word operation and every R-type
// funct code, plus corner operands; expected values are computed here
// from the MIPS definitions of the instructions.
module tb_alu;
  import mips_pkg::*;
  logic [31:0] a, b, y, exp_y;
  alu_op_e     op;
  logic [5:0]  funct;
  logic [4:0]  shamt;
  int checks = 0, failures = 0;

  alu dut (.a(a), .b(b), .op(op), .funct(funct), .shamt(shamt), .y(y));

  localparam logic [5:0] FUNCTS [16] = '{F_SLL, F_SRL, F_SRA, F_SLLV, F_SRLV, F_SRAV,
    F_ADD, F_ADDU, F_SUB, F_SUBU, F_AND, F_OR, F_XOR, F_NOR, F_SLT, F_SLTU};

  function automatic logic [31:0] model(logic [31:0] ia, logic [31:0] ib, alu_op_e iop,
                                        logic [5:0] f, logic [4:0] sh);
    logic signed [31:0] sa, sb;
    sa = ia; sb = ib;
    case (iop)
      ALU_ADD:    return ia + ib;
      ALU_AND:    return ia & ib;
      ALU_OR:     return ia | ib;
      ALU_XOR:    return ia ^ ib;
      ALU_SLT:    return (sa < sb) ? 32'd1 : 32'd0;
      ALU_LUI:    return {ib[15:0], 16'h0000};
      ALU_PASS_A: return ia;
      default: case (f)
        F_SLL:  return ib << sh;
        F_SRL:  return ib >> sh;
        F_SRA:  return sb >>> sh;
        F_SLLV: return ib << ia[4:0];
        F_SRLV: return ib >> ia[4:0];
        F_SRAV: return sb >>> ia[4:0];
        F_ADD, F_ADDU: return ia + ib;
        F_SUB, F_SUBU: return ia - ib;
        F_AND:  return ia & ib;
        F_OR:   return ia | ib;
        F_XOR:  return ia ^ ib;
        F_NOR:  return ~(ia | ib);
        F_SLT, F_SLTU: return (sa < sb) ? 32'd1 : 32'd0;
        default: return ia + ib;
      endcase
    endcase
  endfunction

  task automatic try(logic [31:0] ia, logic [31:0] ib, alu_op_e iop, logic [5:0] f, logic [4:0] sh);
    a = ia; b = ib; op = iop; funct = f; shamt = sh;
    #1;
    exp_y = model(ia, ib, iop, f, sh);
    checks++;
    if (y !== exp_y) begin
      failures++; $display("op=%0d funct=%h a=%h b=%h sh=%0d y=%h exp %h", iop, f, ia, ib, sh, y, exp_y);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fixed cases worked by hand
    try(32'd1, 32'd2, ALU_FUNCT, F_ADD, 5'd0);
    checks++; if (y !== 32'd3) failures++;
    try(32'd1, 32'd2, ALU_FUNCT, F_SUB, 5'd0);
    checks++; if (y !== 32'hffff_ffff) failures++;
    try(32'hffff_ffff, 32'd1, ALU_SLT, F_ADD, 5'd0);
    checks++; if (y !== 32'd1) failures++;
    try(32'd0, 32'h0000_1234, ALU_LUI, 6'h00, 5'd0);
    checks++; if (y !== 32'h1234_0000) failures++;
    try(32'h8000_0000, 32'h8000_0000, ALU_FUNCT, F_SRA, 5'd4);
    checks++; if (y !== 32'hf800_0000) failures++;
    for (int i = 0; i < 2000; i++) begin
      alu_op_e o;
      o = alu_op_e'(3'($urandom()));
      try($urandom(), $urandom(), o, FUNCTS[$urandom() % 16], 5'($urandom()));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
