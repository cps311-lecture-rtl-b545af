// tb_mem_dual: test of the two-port memory.
// Random writes through the data port with random read enables, checked
// against a reference array through both the instruction port and the
// data port; a write shows only after the falling clock edge, and
// drdata is 0 when not reading.
module tb_mem_dual;
  localparam int WORDS = 256;
  logic clk = 1'b0;
  logic [31:0] iaddr = '0, daddr = '0, dwdata = '0, irdata, drdata;
  logic        dre = 1'b0, dwe = 1'b0;
  logic [31:0] model [WORDS];
  int checks = 0, failures = 0;

  mem_dual #(.WORDS(WORDS)) dut (
    .clk(clk), .iaddr(iaddr), .irdata(irdata), .daddr(daddr), .dre(dre),
    .dwe(dwe), .dwdata(dwdata), .drdata(drdata)
  );

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill every word through the data port
    for (int a = 0; a < WORDS; a++) begin
      @(posedge clk);
      daddr = 32'(4 * a); dwdata = $urandom(); dwe = 1'b1;
      @(negedge clk);
      model[a] = dwdata;
    end
    for (int i = 0; i < 1000; i++) begin
      @(posedge clk);
      iaddr  = 32'(4 * ($urandom() % WORDS));
      daddr  = 32'(4 * ($urandom() % WORDS));
      dwdata = $urandom();
      dwe    = ($urandom() % 2) == 1;
      dre    = ($urandom() % 2) == 1;
      #1;
      checks += 2;
      if (irdata !== model[iaddr[9:2]]) begin failures++; $display("iport %h: %h exp %h", iaddr, irdata, model[iaddr[9:2]]); end
      if (drdata !== (dre ? model[daddr[9:2]] : 32'h0)) begin failures++; $display("dport %h: %h", daddr, drdata); end
      @(negedge clk);
      if (dwe) model[daddr[9:2]] = dwdata;
      #1;
      checks++;
      if (irdata !== model[iaddr[9:2]]) begin failures++; $display("after write iport %h: %h exp %h", iaddr, irdata, model[iaddr[9:2]]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
