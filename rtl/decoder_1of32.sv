// decoder_1of32: one-out-of-2**N decoder with an overall enable.
//
// Drives the load enables of the register set: when en is 1, output
// y[sel] is 1 and all others are 0; when en is 0 all outputs are 0. In the
// register set output 0 is left unconnected because $0 is never loaded.
// Purely combinational. N = 5 gives the 1-of-32 decoder of the lecture;
// the two-register demonstration uses N = 1.
module decoder_1of32 #(
  parameter int unsigned N = 5
) (
  input  logic [N-1:0]    sel,
  input  logic            en,
  output logic [2**N-1:0] y
);

  always_comb begin
    y = '0;
    for (int i = 0; i < 2**N; i++)
      y[i] = en && (sel == N'(i));
  end

endmodule
