// reg_read_port: one read output of the register set.
//
// For every output bit k a 2**ADDR_BITS-input multiplexer picks bit k of
// the register numbered by sel. Input 0 of every multiplexer is the
// constant 0, so reading $0 gives 0 whatever regs[0] holds. Purely
// combinational.
module reg_read_port #(
  parameter int unsigned WIDTH     = 32,
  parameter int unsigned ADDR_BITS = 5
) (
  input  logic [2**ADDR_BITS-1:0][WIDTH-1:0] regs,
  input  logic [ADDR_BITS-1:0]               sel,
  output logic [WIDTH-1:0]                   y
);

  for (genvar k = 0; k < WIDTH; k++) begin : g_bit
    logic [2**ADDR_BITS-1:0] column;  // bit k of every register
    always_comb begin
      column = '0;
      for (int r = 1; r < 2**ADDR_BITS; r++) column[r] = regs[r][k];
    end
    assign y[k] = column[sel];
  end

endmodule
