// tb_mc_control: checks the step sequence and the per-step controls of
// the multi-cycle control unit for an R-type, a load, a store, a taken
// and an untaken branch and a jump.
module tb_mc_control;
  import mips_pkg::*;
  import mips_asm_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1;
  logic [31:0] ir;
  logic        equal;
  mc_step_e    step;
  mc_ctrl_t    ctl;
  int checks = 0, failures = 0;

  mc_control dut (.clk(clk), .rst_n(rst_n), .ir(ir), .equal(equal), .step(step), .ctl(ctl));

  always #5 clk = ~clk;

  task automatic chk(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin failures++; $display("%s step %0d: got %0d expected %0d", what, step, got, exp); end
  endtask

  // runs one instruction through its four steps and checks each
  task automatic run(string name, logic [31:0] ins, logic eq, logic regwr, logic mrd, logic mwr, logic pc2);
    ir = ins; equal = eq;
    for (int s = 0; s < 4; s++) begin
      #1;
      checks++;
      if (step !== mc_step_e'(s)) begin failures++; $display("%s: step %0d expected %0d", name, step, s); end
      chk({name, " ir_load"},  ctl.ir_load,  s == 0);
      chk({name, " pc_load"},  ctl.pc_load,  s == 0 || (s == 1 && pc2));
      chk({name, " ab_load"},  ctl.ab_load,  s == 1);
      chk({name, " out_load"}, ctl.out_load, s == 2);
      chk({name, " addr_alu"}, ctl.addr_alu, s == 3);
      chk({name, " mem_read"}, ctl.mem_read, s == 0 || (s == 3 && mrd));
      chk({name, " mem_write"},ctl.mem_write, s == 3 && mwr);
      chk({name, " reg_write"},ctl.reg_write, s == 3 && regwr);
      checks++;
      if (s == 0 && ctl.pc_src !== PC_PLUS4) begin failures++; $display("%s: fetch pc_src", name); end
      @(negedge clk);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ir = '0; equal = 1'b0;
    #1 rst_n = 1'b0;
    #11 rst_n = 1'b1;
    @(posedge clk);
    run("sub",       32'h00a6_2022,         1'b0, 1'b1, 1'b0, 1'b0, 1'b0);
    run("lw",        32'h8c02_1000,         1'b0, 1'b1, 1'b1, 1'b0, 1'b0);
    run("sw",        32'hac02_1000,         1'b0, 1'b0, 1'b0, 1'b1, 1'b0);
    run("beq taken", enc_i(OP_BEQ, 0, 0, 4), 1'b1, 1'b0, 1'b0, 1'b0, 1'b1);
    run("beq not",   enc_i(OP_BEQ, 1, 2, 4), 1'b0, 1'b0, 1'b0, 1'b0, 1'b0);
    run("j",         enc_j(OP_J, 32'h100),  1'b0, 1'b0, 1'b0, 1'b0, 1'b1);
    run("jal",       enc_j(OP_JAL, 32'h100), 1'b0, 1'b1, 1'b0, 1'b0, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
