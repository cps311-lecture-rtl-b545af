// tb_pc_unit: self-checking test of the program counter.
// Drives random source selections, I and J constants and load enables
// and compares with a reference PC: PC + 4, PC + 4 * sign-extended I,
// {PC[31:28], J, 00}, and no change when load = 0. Checks the two low
// bits stay 0 and the reset value is 0.
module tb_pc_unit;
  import mips_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1, load = 1'b0;
  pc_src_e     pc_src = PC_PLUS4;
  logic [15:0] imm = '0;
  logic [25:0] jfield = '0;
  logic [31:0] pc, ref_pc;
  int checks = 0, failures = 0;
  int n_src [4] = '{0, 0, 0, 0};

  pc_unit dut (.clk(clk), .rst_n(rst_n), .load(load), .pc_src(pc_src), .imm(imm), .jfield(jfield), .pc(pc));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 1'b0;
    #11;
    checks++; if (pc !== 32'd0) failures++;
    rst_n = 1'b1;
    ref_pc = 0;
    for (int i = 0; i < 600; i++) begin
      @(posedge clk);
      pc_src = pc_src_e'(2'($urandom()));
      imm    = 16'($urandom());
      jfield = 26'($urandom());
      load   = ($urandom() % 4) != 0;
      @(negedge clk);
      if (load) begin
        n_src[pc_src]++;
        case (pc_src)
          PC_BRANCH: ref_pc = ref_pc + {{14{imm[15]}}, imm, 2'b00};
          PC_JUMP:   ref_pc = {ref_pc[31:28], jfield, 2'b00};
          default:   ref_pc = ref_pc + 32'd4;
        endcase
      end
      #1;
      checks++;
      if (pc !== ref_pc) begin failures++; $display("cycle %0d src=%0d pc=%h exp %h", i, pc_src, pc, ref_pc); end
    end
    for (int s = 0; s < 4; s++) begin
      checks++; if (n_src[s] == 0) begin failures++; $display("source %0d never used", s); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
