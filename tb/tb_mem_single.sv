// tb_mem_single: test of the one-port memory.
// Random reads and writes compared with a reference array; a write shows
// only after the falling clock edge, rdata is 0 when not reading.
module tb_mem_single;
  localparam int WORDS = 256;
  logic clk = 1'b0;
  logic [31:0] addr = '0, wdata = '0, rdata;
  logic        re = 1'b0, we = 1'b0;
  logic [31:0] model [WORDS];
  int checks = 0, failures = 0;

  mem_single #(.WORDS(WORDS)) dut (
    .clk(clk), .addr(addr), .re(re), .we(we), .wdata(wdata), .rdata(rdata)
  );

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < WORDS; a++) begin
      @(posedge clk);
      addr = 32'(4 * a); wdata = $urandom(); we = 1'b1;
      @(negedge clk);
      model[a] = wdata;
    end
    for (int i = 0; i < 1000; i++) begin
      @(posedge clk);
      addr  = 32'(4 * ($urandom() % WORDS));
      wdata = $urandom();
      we    = ($urandom() % 2) == 1;
      re    = ($urandom() % 2) == 1;
      #1;
      checks++;
      if (rdata !== (re ? model[addr[9:2]] : 32'h0)) begin failures++; $display("read %h: %h", addr, rdata); end
      @(negedge clk);
      if (we) model[addr[9:2]] = wdata;
      #1;
      checks++;
      if (re && rdata !== model[addr[9:2]]) begin failures++; $display("after write %h: %h", addr, rdata); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
