// dmc_sym_adder: the "decimal integer addition" of two data symbols.
//
// Each symbol is read as an unsigned integer and the two are added without
// loss, giving a result one bit wider than a symbol (for 4-bit symbols:
// 0..30 in 5 bits). Four of these form the horizontal redundant bits of the
// DMC encoder. Purely combinational, no clock.
module dmc_sym_adder #(
  parameter int unsigned SYM_W = 4  // symbol width in bits
) (
  input  logic [SYM_W-1:0] a,
  input  logic [SYM_W-1:0] b,
  output logic [SYM_W:0]   sum
);

  always_comb sum = {1'b0, a} + {1'b0, b};

endmodule
