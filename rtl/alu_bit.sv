// alu_bit: one bit of a bit-sliced ALU.
//
// A full adder takes the carry from the previous bit and passes its carry
// to the next; next to it, gate networks form the logic functions of the
// two input bits, and a multiplexer chooses the output. Operation codes
// follow the classroom 4-bit ALU: 000 and, 001 or, 010 xor, 011 nor,
// 111 add. Codes 100 to 110 are undefined there and give 0 here. cout is
// the adder's carry whatever the code. Purely combinational.
module alu_bit (
  input  logic       a,
  input  logic       b,
  input  logic       cin,
  input  logic [2:0] sel,
  output logic       y,
  output logic       cout
);

  logic sum;

  always_comb begin
    sum  = a ^ b ^ cin;
    cout = (a & b) | (cin & (a ^ b));
    case (sel)
      3'b000:  y = a & b;
      3'b001:  y = a | b;
      3'b010:  y = a ^ b;
      3'b011:  y = ~(a | b);
      3'b111:  y = sum;
      default: y = 1'b0;
    endcase
  end

endmodule
