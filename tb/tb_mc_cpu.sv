// tb_mc_cpu: self-checking test of the multi-cycle CPU.
// The CPU runs with a mem_single memory. Checks:
//  1. addi $5,$0,1; addi $6,$0,2; sub $4,$5,$6 (0x00a62022); sw $4: the
//     steps cycle 1,2,3,4 and the store of -1 lands exactly at the end of
//     cycle 16 (four cycles per instruction).
//  2. lw $2,0x1000($0); addi $2,$2,1; sw $2,0x1000($0) (8c021000 20420001
//     ac021000): the memory word goes from 41 to 42 at the end of cycle 12.
//  3. branch-to-self followed by addi $1,$1,1: the addi is never
//     fetched, and a loop storing $1 keeps storing 0 (no delayed branch).
//  4. random programs, each ending by storing all registers, compared
//     word by word with the reference model in immediate-branch mode.
// Results are observed only through the memory and the CPU's outputs.
module tb_mc_cpu;
  import mips_pkg::*;
  import mips_asm_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1;
  logic [31:0] addr, wdata, rdata, pc, ir;
  logic        re, we;
  mc_step_e    step;
  int checks = 0, failures = 0;

  mc_cpu dut (
    .clk(clk), .rst_n(rst_n), .mem_addr(addr), .mem_wdata(wdata), .mem_read(re),
    .mem_write(we), .mem_rdata(rdata), .pc(pc), .ir(ir), .step(step)
  );
  mem_single #(.WORDS(4096)) u_mem (
    .clk(clk), .addr(addr), .re(re), .we(we), .wdata(wdata), .rdata(rdata)
  );

  always #5 clk = ~clk;

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("%s: got %h expected %h", what, got, exp); end
  endtask

  task automatic load_and_reset(logic [31:0] prog[$]);
    rst_n = 1'b1;
    #1 rst_n = 1'b0;
    for (int a = 0; a < 4096; a++) u_mem.mem[a] = (a < prog.size()) ? prog[a] : 32'h0;
    @(posedge clk); #1 rst_n = 1'b1;
  endtask

  initial begin
    #8000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] prog[$];
    mips_iss m;
    // 1. sub $4,$5,$6
    check("encoding of sub $4,$5,$6", enc_r(F_SUB, 4, 5, 6), 32'h00a6_2022);
    prog = '{enc_i(OP_ADDI, 5, 0, 1), enc_i(OP_ADDI, 6, 0, 2), 32'h00a6_2022,
             enc_i(OP_SW, 4, 0, 32'h1000), enc_i(OP_BEQ, 0, 0, -1)};
    load_and_reset(prog);
    for (int c = 1; c <= 15; c++) begin
      check($sformatf("step before cycle %0d", c), 32'(step), 32'((c - 1) % 4));
      @(negedge clk); #1;
    end
    check("M[0x1000] after 15 cycles", u_mem.mem[32'h1000 / 4], 32'd0);
    @(negedge clk);
    #1 check("M[0x1000] after 16 cycles", u_mem.mem[32'h1000 / 4], 32'hffff_ffff);
    check("step after 16 cycles", 32'(step), 32'(S_FETCH));
    check("PC after 16 cycles", pc, 32'd16);

    // 2. add 1 to memory word 0x1000
    prog = '{32'h8c02_1000, 32'h2042_0001, 32'hac02_1000, enc_i(OP_BEQ, 0, 0, -1)};
    load_and_reset(prog);
    u_mem.mem[32'h1000 >> 2] = 32'd41;
    repeat (11) @(negedge clk);
    #1 check("M[0x1000] after 11 cycles", u_mem.mem[32'h1000 >> 2], 32'd41);
    @(negedge clk);
    #1 check("M[0x1000] after 12 cycles", u_mem.mem[32'h1000 >> 2], 32'd42);

    // 3. no delayed branch: the addi after the branch is never fetched
    prog = '{enc_i(OP_BEQ, 0, 0, -1), enc_i(OP_ADDI, 1, 1, 1)};
    load_and_reset(prog);
    for (int c = 0; c < 40; c++) begin
      @(negedge clk); #1;
      check($sformatf("IR in loop cycle %0d", c), ir, prog[0]);
    end
    prog = '{enc_i(OP_SW, 1, 0, 32'h1000), enc_i(OP_BEQ, 0, 0, -2), enc_i(OP_ADDI, 1, 1, 1)};
    load_and_reset(prog);
    u_mem.mem[32'h1000 >> 2] = 32'd77;
    repeat (80) @(negedge clk);
    #1 check("stored value after looping", u_mem.mem[32'h1000 >> 2], 32'd0);

    // 4. random programs
    for (int t = 0; t < 20; t++) begin
      gen_random_program(150, prog);
      m = new(0);
      foreach (prog[i]) m.mem[i] = prog[i];
      while (m.pc != 32'(4 * (prog.size() - 2))) m.step();
      load_and_reset(prog);
      repeat (4 * m.n_instr + 8) @(negedge clk);
      #1;
      for (int w = CMP_FIRST; w <= CMP_LAST; w++)
        check($sformatf("prog %0d M[%h]", t, 4 * w), u_mem.mem[w], m.mem[w]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
