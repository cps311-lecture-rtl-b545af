// tb_lecture_top: end-to-end test of the whole top level at its default
// sizes (no parameter overrides).
//  1. The "add 1 to a memory word" program on both CPUs: the single-cycle
//     one at address 1000, the multi-cycle one at 0x1000 with the exact
//     machine words 8c021000 20420001 ac021000. Checks the cycle at which
//     the store lands: cycle 4 (one fetch cycle plus one per instruction)
//     and cycle 12 (four per instruction).
//  2. Random programs run on both CPUs at once and compared with the
//     reference model in its two modes.
//  3. The classroom register set and 4-bit ALU.
// It counts how often each mechanism happened: delayed-branch slot,
// taken and untaken branch, jump, JAL, load, store, write to $0 ignored,
// four-step sequence, register A and B loads, ALU carry out; one that
// never happened counts as a failure.
module tb_lecture_top;
  import mips_pkg::*;
  import mips_asm_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1;
  logic [31:0] sc_pc, sc_ir, mc_pc, mc_ir;
  mc_step_e    mc_step;
  logic [3:0]  demo_d = '0, demo_q, alu4_a = '0, alu4_b = '0, alu4_y;
  logic        demo_sel_load = 1'b0, demo_load_en = 1'b0, demo_sel_out = 1'b0, alu4_cout;
  logic [2:0]  alu4_sel = '0;
  int checks = 0, failures = 0;

  lecture_top dut (
    .clk(clk), .rst_n(rst_n), .sc_pc(sc_pc), .sc_ir(sc_ir), .mc_pc(mc_pc), .mc_ir(mc_ir),
    .mc_step(mc_step), .demo_d(demo_d), .demo_sel_load(demo_sel_load),
    .demo_load_en(demo_load_en), .demo_sel_out(demo_sel_out), .demo_q(demo_q),
    .alu4_a(alu4_a), .alu4_b(alu4_b), .alu4_sel(alu4_sel), .alu4_y(alu4_y),
    .alu4_cout(alu4_cout)
  );

  always #5 clk = ~clk;

  // mechanism counters, sampled mid-cycle (state changes on the falling edge)
  int n_slot = 0, n_taken = 0, n_not_taken = 0, n_jump = 0, n_jal = 0;
  int n_load = 0, n_store = 0, n_r0 = 0, n_mc_seq = 0, n_mc_taken = 0;
  int n_load_a = 0, n_load_b = 0, n_carry = 0;
  logic sc_prev_redirect = 1'b0;
  always @(posedge clk) if (rst_n) begin
    ctrl_word_t cw;
    cw = dut.u_sc.cw;
    // the closing branch-to-self loop and no-ops are not counted
    if (sc_prev_redirect && sc_ir != 32'h0) n_slot++;  // instruction after a branch/jump executes
    sc_prev_redirect <= (cw.pc_src != PC_PLUS4) && sc_ir != 32'h1000_ffff;
    if (cw.pc_src == PC_BRANCH && sc_ir != 32'h1000_ffff) n_taken++;
    if ((sc_ir[31:26] == OP_BEQ || sc_ir[31:26] == OP_BNE) && cw.pc_src == PC_PLUS4) n_not_taken++;
    if (sc_ir[31:26] == OP_J) n_jump++;
    if (sc_ir[31:26] == OP_JAL) n_jal++;
    if (cw.mem_read) n_load++;
    if (cw.mem_write) n_store++;
    if (cw.reg_write && dut.u_sc.wr_addr == 5'd0 && sc_ir != 32'h0) n_r0++;
    if (mc_step == S_FINISH) n_mc_seq++;
    if (mc_step == S_DECODE && dut.u_mc.ctl.pc_load && mc_ir != 32'h1000_ffff) n_mc_taken++;
  end

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("%s: got %h expected %h", what, got, exp); end
  endtask

  task automatic load_and_reset(logic [31:0] sc_prog[$], logic [31:0] mc_prog[$]);
    rst_n = 1'b1;
    #1 rst_n = 1'b0;
    for (int a = 0; a < 4096; a++) begin
      dut.u_sc_mem.mem[a] = (a < sc_prog.size()) ? sc_prog[a] : 32'h0;
      dut.u_mc_mem.mem[a] = (a < mc_prog.size()) ? mc_prog[a] : 32'h0;
    end
    @(posedge clk); #1 rst_n = 1'b1;
  endtask

  task automatic count(string what, int n);
    checks++;
    $display("%-28s %0d", what, n);
    if (n == 0) begin failures++; $display("%s never happened", what); end
  endtask

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] sc_prog[$], mc_prog[$], prog[$];
    mips_iss ms, mm;

    // 1. add 1 to a memory word
    sc_prog = '{enc_i(OP_LW, 2, 0, 1000), enc_i(OP_ADDI, 2, 2, 1), enc_i(OP_SW, 2, 0, 1000),
                enc_i(OP_BEQ, 0, 0, -1), 32'h0};
    mc_prog = '{32'h8c02_1000, 32'h2042_0001, 32'hac02_1000, enc_i(OP_BEQ, 0, 0, -1), 32'h0};
    load_and_reset(sc_prog, mc_prog);
    dut.u_sc_mem.mem[1000 / 4] = 32'd7;
    dut.u_mc_mem.mem[32'h1000 / 4] = 32'd41;
    repeat (3) @(negedge clk);
    #1 check("single-cycle M[1000] after 3 cycles", dut.u_sc_mem.mem[1000 / 4], 32'd7);
    @(negedge clk);
    #1 check("single-cycle M[1000] after 4 cycles", dut.u_sc_mem.mem[1000 / 4], 32'd8);
    repeat (7) @(negedge clk);
    #1 check("multi-cycle M[0x1000] after 11 cycles", dut.u_mc_mem.mem[32'h1000 / 4], 32'd41);
    @(negedge clk);
    #1 check("multi-cycle M[0x1000] after 12 cycles", dut.u_mc_mem.mem[32'h1000 / 4], 32'd42);

    // 2. random programs on both CPUs
    for (int t = 0; t < 10; t++) begin
      int cycles;
      gen_random_program(200, prog);
      ms = new(1); mm = new(0);
      foreach (prog[i]) begin ms.mem[i] = prog[i]; mm.mem[i] = prog[i]; end
      while (ms.pc != 32'(4 * (prog.size() - 2))) ms.step();
      while (mm.pc != 32'(4 * (prog.size() - 2))) mm.step();
      load_and_reset(prog, prog);
      cycles = 4 * mm.n_instr + 8;
      if (ms.n_instr + 4 > cycles) cycles = ms.n_instr + 4;
      repeat (cycles) @(negedge clk);
      #1;
      for (int r = 0; r < 32; r++) begin
        check($sformatf("prog %0d single-cycle $%0d", t, r), dut.u_sc.u_regs.regs[r], ms.regs[r]);
        check($sformatf("prog %0d multi-cycle $%0d", t, r), dut.u_mc.u_regs.regs[r], mm.regs[r]);
      end
      for (int w = CMP_FIRST; w <= CMP_LAST; w++) begin
        check($sformatf("prog %0d single-cycle M[%h]", t, 4 * w), dut.u_sc_mem.mem[w], ms.mem[w]);
        check($sformatf("prog %0d multi-cycle M[%h]", t, 4 * w), dut.u_mc_mem.mem[w], mm.mem[w]);
      end
    end

    // 3. classroom circuits
    @(posedge clk);
    demo_d = 4'h5; demo_sel_load = 1'b0; demo_load_en = 1'b1;
    @(negedge clk); n_load_a++;
    @(posedge clk);
    demo_d = 4'ha; demo_sel_load = 1'b1;
    @(negedge clk); n_load_b++;
    @(posedge clk);
    demo_d = 4'hf; demo_load_en = 1'b0;
    @(negedge clk);
    #1 demo_sel_out = 1'b0;
    #1 check("register A", 32'(demo_q), 32'h5);
    demo_sel_out = 1'b1;
    #1 check("register B", 32'(demo_q), 32'ha);
    alu4_a = 4'hc; alu4_b = 4'h7; alu4_sel = 3'b111;
    #1 check("4-bit add", {27'h0, alu4_cout, alu4_y}, 32'h13);
    if (alu4_cout) n_carry++;
    alu4_sel = 3'b011;
    #1 check("4-bit nor", 32'(alu4_y), 32'h0);

    count("delayed-branch slot", n_slot);
    count("taken branch", n_taken);
    count("untaken branch", n_not_taken);
    count("jump", n_jump);
    count("jal", n_jal);
    count("load", n_load);
    count("store", n_store);
    count("write to $0 ignored", n_r0);
    count("multi-cycle step 4", n_mc_seq);
    count("multi-cycle PC set in step 2", n_mc_taken);
    count("demo register A load", n_load_a);
    count("demo register B load", n_load_b);
    count("4-bit ALU carry out", n_carry);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
