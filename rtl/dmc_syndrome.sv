// dmc_syndrome: syndrome calculator of the DMC decoder.
//
// Horizontal syndromes: for each of the four 5-bit groups,
//   delta_f = f' - f   (integer subtraction, kept modulo 32),
// where f' is recomputed from the received data and f is the stored value.
// Both operands lie in 0..30, so delta_f is zero modulo 32 exactly when the
// two sums are equal. Vertical syndromes: S_j = v'_j xor v_j. A group with a
// non-zero delta_f marks its two symbols as suspect; S gives the bit
// positions within a column of symbols. Purely combinational.
module dmc_syndrome
  import dmc_pkg::*;
(
  input  hred_t f_calc,  // f' recomputed from the received data
  input  vred_t v_calc,  // v' recomputed from the received data
  input  hred_t f_rx,    // f as stored
  input  vred_t v_rx,    // v as stored
  output hred_t dfh,     // four 5-bit horizontal syndromes
  output vred_t s        // vertical syndromes S15..S0
);

  always_comb begin
    for (int g = 0; g < NGRP; g++)
      dfh[g*GRP_W +: GRP_W] = f_calc[g*GRP_W +: GRP_W] - f_rx[g*GRP_W +: GRP_W];
    s = v_calc ^ v_rx;
  end

endmodule
