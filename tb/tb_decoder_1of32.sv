// tb_decoder_1of32: exhaustive test of the 1-of-32 decoder with enable.
// For every select value and both enable values, the output must be the
// one-hot word 1 << sel when enabled, all zeros otherwise.
module tb_decoder_1of32;
  logic [4:0]  sel;
  logic        en;
  logic [31:0] y;
  int checks = 0, failures = 0;

  decoder_1of32 #(.N(5)) dut (.sel(sel), .en(en), .y(y));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 2; e++)
      for (int s = 0; s < 32; s++) begin
        sel = 5'(s); en = e[0];
        #1;
        checks++;
        if (y !== (e == 1 ? (32'd1 << s) : 32'd0)) begin
          failures++; $display("sel=%0d en=%0d y=%h", s, e, y);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
