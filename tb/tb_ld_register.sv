// tb_ld_register: self-checking test of ld_register.
// Applies random data with random load enables and compares the register
// with a reference value updated on each falling clock edge: load = 1
// takes the data, load = 0 keeps the old value. Also checks reset.
module tb_ld_register;
  localparam int W = 32;
  logic clk = 1'b0, rst_n = 1'b1, load = 1'b0;
  logic [W-1:0] d = '0, q, ref_q;
  int checks = 0, failures = 0;

  ld_register #(.WIDTH(W)) dut (.clk(clk), .rst_n(rst_n), .load(load), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    #20000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 1'b0;
    #11;
    checks++; if (q !== '0) begin failures++; $display("reset value %h", q); end
    rst_n = 1'b1;
    ref_q = '0;
    for (int i = 0; i < 400; i++) begin
      @(posedge clk);
      d    = $urandom();
      load = ($urandom() % 2) == 1;
      @(negedge clk);
      if (load) ref_q = d;
      #1;
      checks++;
      if (q !== ref_q) begin failures++; $display("cycle %0d: q=%h expected %h", i, q, ref_q); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
