// tb_register_set: self-checking test of the 32-register set.
// Random writes (with random write enable) and random reads on all three
// outputs, compared with a reference array in which $0 always stays 0.
// Writes become visible after the falling clock edge.
module tb_register_set;
  logic clk = 1'b0, rst_n = 1'b1;
  logic [4:0]  rs_addr, rt_addr, mem_addr, wr_addr;
  logic [31:0] rs_data, rt_data, mem_data, wr_data;
  logic        we;
  logic [31:0] model [32];
  int checks = 0, failures = 0;

  register_set dut (
    .clk(clk), .rst_n(rst_n), .rs_addr(rs_addr), .rt_addr(rt_addr), .mem_addr(mem_addr),
    .rs_data(rs_data), .rt_data(rt_data), .mem_data(mem_data),
    .we(we), .wr_addr(wr_addr), .wr_data(wr_data)
  );

  always #5 clk = ~clk;

  task automatic check_reads();
    for (int k = 0; k < 4; k++) begin
      rs_addr = 5'($urandom()); rt_addr = 5'($urandom()); mem_addr = 5'($urandom());
      #1;
      checks += 3;
      if (rs_data !== model[rs_addr])   begin failures++; $display("rs $%0d=%h exp %h", rs_addr, rs_data, model[rs_addr]); end
      if (rt_data !== model[rt_addr])   begin failures++; $display("rt $%0d=%h exp %h", rt_addr, rt_data, model[rt_addr]); end
      if (mem_data !== model[mem_addr]) begin failures++; $display("mem $%0d=%h exp %h", mem_addr, mem_data, model[mem_addr]); end
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 1'b0; wr_addr = '0; wr_data = '0; rs_addr = '0; rt_addr = '0; mem_addr = '0;
    for (int r = 0; r < 32; r++) model[r] = '0;
    #1 rst_n = 1'b0;
    #11 rst_n = 1'b1;
    check_reads();
    // write every register once, including $0
    for (int r = 0; r < 32; r++) begin
      @(posedge clk);
      we = 1'b1; wr_addr = 5'(r); wr_data = $urandom();
      @(negedge clk);
      if (r != 0) model[r] = wr_data;
      #1 check_reads();
    end
    for (int i = 0; i < 300; i++) begin
      @(posedge clk);
      we = ($urandom() % 3) != 0; wr_addr = 5'($urandom()); wr_data = $urandom();
      @(negedge clk);
      if (we && wr_addr != 0) model[wr_addr] = wr_data;
      #1 check_reads();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
