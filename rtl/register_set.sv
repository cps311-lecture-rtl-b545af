// register_set: the 32 general registers of the MIPS subset.
//
// Registers $1..$31 are ld_register instances whose data inputs all share
// wr_data; their load enables come from a 1-of-32 decoder driven by
// wr_addr with we as the overall enable (decoder output 0 is unused, $0 is
// not stored and always reads 0). Three reg_read_port multiplexers give
// the three outputs: rs_data and rt_data go to the ALU, mem_data to the
// memory as store data (the CPUs select it with the rt field as well).
//
// Timing: reads are combinational; a write takes effect on the falling
// edge of clk. Clearing all registers on rst_n is this design's choice.
module register_set #(
  parameter int unsigned WIDTH     = 32,
  parameter int unsigned ADDR_BITS = 5
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [ADDR_BITS-1:0] rs_addr,
  input  logic [ADDR_BITS-1:0] rt_addr,
  input  logic [ADDR_BITS-1:0] mem_addr,
  output logic [WIDTH-1:0]     rs_data,
  output logic [WIDTH-1:0]     rt_data,
  output logic [WIDTH-1:0]     mem_data,
  input  logic                 we,
  input  logic [ADDR_BITS-1:0] wr_addr,
  input  logic [WIDTH-1:0]     wr_data
);

  localparam int unsigned NREGS = 2**ADDR_BITS;

  logic [NREGS-1:0]            load_en;
  logic [NREGS-1:0][WIDTH-1:0] regs;

  decoder_1of32 #(.N(ADDR_BITS)) u_dec (
    .sel(wr_addr), .en(we), .y(load_en)
  );

  assign regs[0] = '0;  // $0 has no flip-flops

  for (genvar r = 1; r < NREGS; r++) begin : g_reg
    ld_register #(.WIDTH(WIDTH)) u_r (
      .clk(clk), .rst_n(rst_n), .load(load_en[r]), .d(wr_data), .q(regs[r])
    );
  end

  reg_read_port #(.WIDTH(WIDTH), .ADDR_BITS(ADDR_BITS)) u_rs (
    .regs(regs), .sel(rs_addr), .y(rs_data)
  );
  reg_read_port #(.WIDTH(WIDTH), .ADDR_BITS(ADDR_BITS)) u_rt (
    .regs(regs), .sel(rt_addr), .y(rt_data)
  );
  reg_read_port #(.WIDTH(WIDTH), .ADDR_BITS(ADDR_BITS)) u_mem (
    .regs(regs), .sel(mem_addr), .y(mem_data)
  );

endmodule
