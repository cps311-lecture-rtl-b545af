// tb_sc_cpu: self-checking test of the single-cycle CPU.
// The CPU runs with a mem_dual memory; results are observed only through
// the memory and the PC / IR outputs.
//  1. addi $5,$0,1; addi $6,$0,2; add $4,$5,$6 (0x00a62020); sw $4:
//     one cycle to fetch after reset, then one instruction per cycle, so
//     the store of 3 lands at the end of cycle 5, not before.
//  2. The branch-to-self loop followed by addi $1,$1,1: the IR holds the
//     addi every second cycle (the delay slot is executed).
//  3. loop: sw $1; b loop; addi $1,$1,1: the stored count rises once per
//     pass because the delay-slot addi runs every time.
//  4. Random programs, each ending by storing all registers, compared
//     word by word with the reference model in delayed-branch mode.
module tb_sc_cpu;
  import mips_pkg::*;
  import mips_asm_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1;
  logic [31:0] iaddr, idata, daddr, dwdata, drdata, pc, ir;
  logic        dre, dwe;
  int checks = 0, failures = 0;

  sc_cpu dut (
    .clk(clk), .rst_n(rst_n), .imem_addr(iaddr), .imem_rdata(idata),
    .dmem_addr(daddr), .dmem_wdata(dwdata), .dmem_read(dre), .dmem_write(dwe),
    .dmem_rdata(drdata), .pc(pc), .ir(ir)
  );
  mem_dual #(.WORDS(4096)) u_mem (
    .clk(clk), .iaddr(iaddr), .irdata(idata), .daddr(daddr), .dre(dre),
    .dwe(dwe), .dwdata(dwdata), .drdata(drdata)
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
    #3000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] prog[$];
    mips_iss m;
    // 1. add $4,$5,$6
    check("encoding of add $4,$5,$6", enc_r(F_ADD, 4, 5, 6), 32'h00a6_2020);
    prog = '{enc_i(OP_ADDI, 5, 0, 1), enc_i(OP_ADDI, 6, 0, 2), 32'h00a6_2020,
             enc_i(OP_SW, 4, 0, 32'h1000), enc_i(OP_BEQ, 0, 0, -1), 32'h0};
    load_and_reset(prog);
    @(negedge clk); #1;                          // cycle 1: fetch only
    check("IR after one cycle", ir, prog[0]);
    check("PC after one cycle", pc, 32'd4);
    repeat (3) @(negedge clk);                   // cycles 2-4: addi, addi, add
    #1 check("IR holds the store after 4 cycles", ir, prog[3]);
    check("M[0x1000] before the store", u_mem.mem[32'h1000 / 4], 32'd0);
    @(negedge clk); #1;                          // cycle 5: sw
    check("M[0x1000] after 5 cycles", u_mem.mem[32'h1000 / 4], 32'd3);

    // 2. the lecture's delayed-branch program
    prog = '{enc_i(OP_BEQ, 0, 0, -1), enc_i(OP_ADDI, 1, 1, 1)};
    load_and_reset(prog);
    @(negedge clk);
    for (int c = 0; c < 8; c++) begin
      @(negedge clk); #1;
      check($sformatf("IR in loop cycle %0d", c), ir, prog[(c + 1) % 2]);
    end

    // 3. counting delay slot
    prog = '{enc_i(OP_SW, 1, 0, 32'h1000), enc_i(OP_BEQ, 0, 0, -2), enc_i(OP_ADDI, 1, 1, 1)};
    load_and_reset(prog);
    repeat (1 + 3 * 10) @(negedge clk);
    #1 check("count stored after 10 passes", u_mem.mem[32'h1000 / 4], 32'd9);

    // 4. random programs
    for (int t = 0; t < 20; t++) begin
      gen_random_program(150, prog);
      m = new(1);
      foreach (prog[i]) m.mem[i] = prog[i];
      while (m.pc != 32'(4 * (prog.size() - 2))) m.step();
      load_and_reset(prog);
      repeat (m.n_instr + 4) @(negedge clk);
      #1;
      for (int w = CMP_FIRST; w <= CMP_LAST; w++)
        check($sformatf("prog %0d M[%h]", t, 4 * w), u_mem.mem[w], m.mem[w]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
