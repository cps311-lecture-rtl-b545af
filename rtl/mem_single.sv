// mem_single: one-port memory for the multi-cycle CPU.
//
// The multi-cycle CPU reads instructions in its first step and reads or
// writes data in its last, so one port is enough. Storage is WORDS 32-bit
// words addressed by byte address bits above bit 1 (wrapping beyond the
// size, which is this design's choice).
//
// Timing: combinational read (rdata is 0 when re is 0); a write (we = 1)
// takes effect on the falling edge of clk. Contents are not reset.
module mem_single #(
  parameter int unsigned WORDS = 4096
) (
  input  logic        clk,
  input  logic [31:0] addr,
  input  logic        re,
  input  logic        we,
  input  logic [31:0] wdata,
  output logic [31:0] rdata
);

  localparam int unsigned AW = $clog2(WORDS);

  logic [31:0] mem [WORDS];

  always_comb rdata = re ? mem[addr[AW+1:2]] : '0;

  always_ff @(negedge clk) begin
    if (we) mem[addr[AW+1:2]] <= wdata;
  end

endmodule
