// dmc_encoder: decimal matrix code encoder for one 32-bit word.
//
// Horizontal redundant bits: per row, symbols at even and odd column
// positions are paired and added as integers,
//   f4..f0   = i3..i0   + i11..i8    (symbols 0 + 2)
//   f9..f5   = i7..i4   + i15..i12   (symbols 1 + 3)
//   f14..f10 = i19..i16 + i27..i24   (symbols 4 + 6)
//   f19..f15 = i23..i20 + i31..i28   (symbols 5 + 7)
// Vertical redundant bits: v_j = i_j xor i_(j+16), j = 0..15, the parity of
// each column of the 2-row matrix. The data bits are passed on unchanged as
// x31..x0. The first two sums and v0, v1 are stated by the code; the rows of
// symbols 4..7 follow the same pattern. Purely combinational: the encoder is
// also reused by the decoder to recompute the redundant bits of a word read
// back from memory (see dmc_ert_codec).
module dmc_encoder
  import dmc_pkg::*;
(
  input  data_t i_data,  // i31..i0
  output data_t x,       // x31..x0, copy of the data bits
  output hred_t f,       // f19..f0
  output vred_t v        // v15..v0
);

  // One adder per horizontal group g: row r = g/2, pair p = g%2 adds the
  // symbols at column positions p and p+2 of that row.
  for (genvar g = 0; g < NGRP; g++) begin : g_hadd
    localparam int unsigned R  = g / 2;
    localparam int unsigned P  = g % 2;
    localparam int unsigned LO = R * ROW_W + P * SYM_W;        // first symbol
    localparam int unsigned HI = R * ROW_W + (P + 2) * SYM_W;  // second symbol
    dmc_sym_adder #(.SYM_W(SYM_W)) u_add (
      .a  (i_data[LO +: SYM_W]),
      .b  (i_data[HI +: SYM_W]),
      .sum(f[g*GRP_W +: GRP_W])
    );
  end

  always_comb begin
    x = i_data;
    v = i_data[ROW_W-1:0] ^ i_data[DATA_W-1:ROW_W];
  end

endmodule
