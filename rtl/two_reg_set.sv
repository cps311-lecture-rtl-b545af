// two_reg_set: a register set of two WIDTH-bit registers, A and B.
//
// The classroom model of the register set in miniature. Both registers
// take the same data input d. A 1-of-2 decoder driven by sel_load
// (0 = A, 1 = B) with load_en as its overall enable produces the two load
// enables; a row of 2-input multiplexers driven by sel_out (0 = A, 1 = B)
// picks the register shown on q.
//
// Timing: loads on the falling edge of clk; q is combinational in the
// register contents and sel_out. rst_n (asynchronous, active low) clears
// both registers; the reset is this design's addition.
module two_reg_set #(
  parameter int unsigned WIDTH = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] d,
  input  logic             sel_load,
  input  logic             load_en,
  input  logic             sel_out,
  output logic [WIDTH-1:0] q
);

  logic [1:0]       load;
  logic [WIDTH-1:0] reg_a, reg_b;

  decoder_1of32 #(.N(1)) u_dec (.sel(sel_load), .en(load_en), .y(load));

  ld_register #(.WIDTH(WIDTH)) u_a (
    .clk(clk), .rst_n(rst_n), .load(load[0]), .d(d), .q(reg_a)
  );
  ld_register #(.WIDTH(WIDTH)) u_b (
    .clk(clk), .rst_n(rst_n), .load(load[1]), .d(d), .q(reg_b)
  );

  always_comb q = sel_out ? reg_b : reg_a;

endmodule
