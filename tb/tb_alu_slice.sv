// tb_alu_slice: exhaustive test of the 4-bit bit-sliced ALU: every pair
// of 4-bit inputs under and, or, xor, nor and add (with carry out).
module tb_alu_slice;
  logic [3:0] a, b, y, exp_y;
  logic [2:0] sel;
  logic       cout;
  logic [4:0] sum;
  int checks = 0, failures = 0;
  int n_carry = 0;

  alu_slice #(.WIDTH(4)) dut (.a(a), .b(b), .sel(sel), .y(y), .cout(cout));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2:0] ops [5] = '{3'b000, 3'b001, 3'b010, 3'b011, 3'b111};
    foreach (ops[k])
      for (int i = 0; i < 256; i++) begin
        a = 4'(i >> 4); b = 4'(i); sel = ops[k];
        sum = {1'b0, a} + {1'b0, b};
        case (ops[k])
          3'b000: exp_y = a & b;
          3'b001: exp_y = a | b;
          3'b010: exp_y = a ^ b;
          3'b011: exp_y = ~(a | b);
          default: exp_y = sum[3:0];
        endcase
        #1;
        checks += 2;
        if (y !== exp_y) begin failures++; $display("sel=%b a=%h b=%h y=%h exp %h", sel, a, b, y, exp_y); end
        if (cout !== sum[4]) begin failures++; $display("carry a=%h b=%h", a, b); end
        if (cout) n_carry++;
      end
    checks++;
    if (n_carry == 0) begin failures++; $display("no carry out seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
