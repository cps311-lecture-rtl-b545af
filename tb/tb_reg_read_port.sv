// tb_reg_read_port: test of one register-set read output.
// Fills 32 registers with random words (register 0 included, which must
// never appear) and checks that every select value returns its register,
// and 0 for select 0, over several random fillings.
module tb_reg_read_port;
  logic [31:0][31:0] regs;
  logic [4:0]        sel;
  logic [31:0]       y;
  int checks = 0, failures = 0;

  reg_read_port #(.WIDTH(32), .ADDR_BITS(5)) dut (.regs(regs), .sel(sel), .y(y));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 8; t++) begin
      for (int r = 0; r < 32; r++) regs[r] = $urandom();
      for (int s = 0; s < 32; s++) begin
        sel = 5'(s);
        #1;
        checks++;
        if (y !== (s == 0 ? 32'd0 : regs[s])) begin
          failures++; $display("sel=%0d y=%h reg=%h", s, y, regs[s]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
