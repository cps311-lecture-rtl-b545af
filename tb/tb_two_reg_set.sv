// tb_two_reg_set: test of the two-register set. Random data, load
// select, load enable and output select each cycle, compared with two
// reference registers updated on the falling edge.
module tb_two_reg_set;
  logic clk = 1'b0, rst_n = 1'b1;
  logic [3:0] d = '0, q, ra, rb;
  logic sel_load = 1'b0, load_en = 1'b0, sel_out = 1'b0;
  int checks = 0, failures = 0;
  int n_load_a = 0, n_load_b = 0;

  two_reg_set #(.WIDTH(4)) dut (
    .clk(clk), .rst_n(rst_n), .d(d), .sel_load(sel_load), .load_en(load_en),
    .sel_out(sel_out), .q(q)
  );

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 1'b0;
    #11 rst_n = 1'b1;
    ra = '0; rb = '0;
    for (int i = 0; i < 500; i++) begin
      @(posedge clk);
      d = 4'($urandom()); sel_load = 1'($urandom()); load_en = 1'($urandom()); sel_out = 1'($urandom());
      @(negedge clk);
      if (load_en && !sel_load) begin ra = d; n_load_a++; end
      if (load_en &&  sel_load) begin rb = d; n_load_b++; end
      #1;
      checks++;
      if (q !== (sel_out ? rb : ra)) begin failures++; $display("cycle %0d q=%h A=%h B=%h sel_out=%0d", i, q, ra, rb, sel_out); end
    end
    checks++;
    if (n_load_a == 0 || n_load_b == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
