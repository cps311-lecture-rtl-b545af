// mem_dual: two-port memory for the single-cycle CPU.
//
// The single-cycle CPU fetches an instruction and may read or write data
// in the same cycle, so the memory has an instruction port (address from
// the PC, data to the IR) and a data port (address from the ALU, read
// data to the register set, write data from the register set). Storage is
// WORDS 32-bit words, addressed by byte address bits above bit 1;
// addresses beyond the size wrap around. The size is this design's choice.
//
// Timing: both reads are combinational, so an access completes within the
// cycle; a write (dwe = 1) takes effect on the falling edge of clk.
// drdata is 0 when dre is 0. Contents are not reset.
module mem_dual #(
  parameter int unsigned WORDS = 4096
) (
  input  logic        clk,
  input  logic [31:0] iaddr,
  output logic [31:0] irdata,
  input  logic [31:0] daddr,
  input  logic        dre,
  input  logic        dwe,
  input  logic [31:0] dwdata,
  output logic [31:0] drdata
);

  localparam int unsigned AW = $clog2(WORDS);

  logic [31:0] mem [WORDS];

  always_comb begin
    irdata = mem[iaddr[AW+1:2]];
    drdata = dre ? mem[daddr[AW+1:2]] : '0;
  end

  always_ff @(negedge clk) begin
    if (dwe) mem[daddr[AW+1:2]] <= dwdata;
  end

endmodule
