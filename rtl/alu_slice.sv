// alu_slice: a WIDTH-bit ALU made of alu_bit copies.
//
// Bit i receives the carry out of bit i-1 (ripple carry); bit 0 receives
// carry 0, so operation 111 is A + B and cout is the carry out of the top
// bit. All bits share the 3-bit operation code (000 and, 001 or, 010 xor,
// 011 nor, 111 add). WIDTH = 4 is the classroom 4-bit ALU. Purely
// combinational.
module alu_slice #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic [2:0]       sel,
  output logic [WIDTH-1:0] y,
  output logic             cout
);

  logic [WIDTH:0] carry;
  assign carry[0] = 1'b0;

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    alu_bit u_bit (
      .a(a[i]), .b(b[i]), .cin(carry[i]), .sel(sel),
      .y(y[i]), .cout(carry[i+1])
    );
  end

  assign cout = carry[WIDTH];

endmodule
