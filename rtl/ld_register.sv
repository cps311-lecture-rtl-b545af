// ld_register: register with a load enable.
//
// Each bit is a flip-flop with a 2-way multiplexer in front of it. The
// multiplexer feeds the flip-flop either the incoming data (load = 1) or
// its own output (load = 0), so every flip-flop is clocked on every cycle
// but only changes when loaded. This is the register bit of the lecture,
// replicated WIDTH times.
//
// Timing: state changes on the falling edge of clk, as the lecture
// assumes for all its examples. rst_n (asynchronous, active low) sets the
// register to RESET_VALUE; the reset is this design's addition.
module ld_register #(
  parameter int unsigned     WIDTH       = 32,
  parameter logic [WIDTH-1:0] RESET_VALUE = '0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  logic [WIDTH-1:0] mux_out;

  // input multiplexer: new data or recirculated value
  always_comb mux_out = load ? d : q;

  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n) q <= RESET_VALUE;
    else        q <= mux_out;
  end

endmodule
