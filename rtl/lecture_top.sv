// lecture_top: the designs of the lecture, side by side.
//
//  * Single-cycle MIPS-subset CPU (sc_cpu) with its two-port memory
//    (mem_dual): one instruction per clock, delayed branch.
//  * Multi-cycle MIPS-subset CPU (mc_cpu) with its one-port memory
//    (mem_single): four clocks per instruction.
//  * The classroom register set of two 4-bit registers (two_reg_set).
//  * The classroom 4-bit bit-sliced ALU (alu_slice).
// They share clk and rst_n and are otherwise independent. Programs are
// placed in the memories before reset is released (the memories have no
// load port; a testbench writes their arrays directly). The PC and IR of
// each CPU are brought out for observation; PC bits 1..0 are always 0.
//
// Timing: every register changes on the falling edge of clk; rst_n is
// asynchronous and active low.
module lecture_top
  import mips_pkg::*;
#(
  parameter int unsigned MEM_WORDS = 4096
) (
  input  logic        clk,
  input  logic        rst_n,
  output logic [31:0] sc_pc,
  output logic [31:0] sc_ir,
  output logic [31:0] mc_pc,
  output logic [31:0] mc_ir,
  output mc_step_e    mc_step,
  input  logic [3:0]  demo_d,
  input  logic        demo_sel_load,
  input  logic        demo_load_en,
  input  logic        demo_sel_out,
  output logic [3:0]  demo_q,
  input  logic [3:0]  alu4_a,
  input  logic [3:0]  alu4_b,
  input  logic [2:0]  alu4_sel,
  output logic [3:0]  alu4_y,
  output logic        alu4_cout
);

  // single-cycle system
  logic [31:0] sc_iaddr, sc_idata, sc_daddr, sc_dwdata, sc_drdata;
  logic        sc_dre, sc_dwe;

  sc_cpu u_sc (
    .clk(clk), .rst_n(rst_n),
    .imem_addr(sc_iaddr), .imem_rdata(sc_idata),
    .dmem_addr(sc_daddr), .dmem_wdata(sc_dwdata), .dmem_read(sc_dre),
    .dmem_write(sc_dwe), .dmem_rdata(sc_drdata),
    .pc(sc_pc), .ir(sc_ir)
  );

  mem_dual #(.WORDS(MEM_WORDS)) u_sc_mem (
    .clk(clk), .iaddr(sc_iaddr), .irdata(sc_idata),
    .daddr(sc_daddr), .dre(sc_dre), .dwe(sc_dwe), .dwdata(sc_dwdata),
    .drdata(sc_drdata)
  );

  // multi-cycle system
  logic [31:0] mc_addr, mc_wdata, mc_rdata;
  logic        mc_re, mc_we;

  mc_cpu u_mc (
    .clk(clk), .rst_n(rst_n),
    .mem_addr(mc_addr), .mem_wdata(mc_wdata), .mem_read(mc_re),
    .mem_write(mc_we), .mem_rdata(mc_rdata),
    .pc(mc_pc), .ir(mc_ir), .step(mc_step)
  );

  mem_single #(.WORDS(MEM_WORDS)) u_mc_mem (
    .clk(clk), .addr(mc_addr), .re(mc_re), .we(mc_we), .wdata(mc_wdata),
    .rdata(mc_rdata)
  );

  // classroom circuits
  two_reg_set #(.WIDTH(4)) u_demo_regs (
    .clk(clk), .rst_n(rst_n), .d(demo_d), .sel_load(demo_sel_load),
    .load_en(demo_load_en), .sel_out(demo_sel_out), .q(demo_q)
  );

  alu_slice #(.WIDTH(4)) u_alu4 (
    .a(alu4_a), .b(alu4_b), .sel(alu4_sel), .y(alu4_y), .cout(alu4_cout)
  );

endmodule
