// tb_alu_bit: exhaustive test of one ALU bit: all operation codes and
// input bits, against the truth tables of and, or, xor, nor and a full
// adder (sum and carry).
module tb_alu_bit;
  logic a, b, cin, y, cout;
  logic [2:0] sel;
  logic exp_y;
  int checks = 0, failures = 0;

  alu_bit dut (.a(a), .b(b), .cin(cin), .sel(sel), .y(y), .cout(cout));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 8; s++)
      for (int v = 0; v < 8; v++) begin
        int total;
        sel = 3'(s); a = v[2]; b = v[1]; cin = v[0];
        total = v[2] + v[1] + v[0];
        case (s)
          0: exp_y = v[2] & v[1];
          1: exp_y = v[2] | v[1];
          2: exp_y = v[2] ^ v[1];
          3: exp_y = !(v[2] | v[1]);
          7: exp_y = total[0];
          default: exp_y = 1'b0;
        endcase
        #1;
        checks += 2;
        if (y !== exp_y) begin failures++; $display("sel=%0d a=%0d b=%0d cin=%0d y=%0d", s, a, b, cin, y); end
        if (cout !== total[1]) begin failures++; $display("carry a=%0d b=%0d cin=%0d", a, b, cin); end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
