// dmc_error_locator: error locator of the DMC decoder.
//
// Symbol k sits in row r = k/4 at column position p = k%4, and belongs to
// horizontal group 2r + (p % 2). Its four bits are declared in error where
// the vertical syndrome of their column is 1, but only when the horizontal
// syndrome of its group is non-zero: a non-zero delta_f selects the row,
// S selects the bits. This generalises the code's rule for symbol 0
// (delta_f4..f0 and S3..S0 both non-zero: flip by S3..S0) to all eight
// symbols. Errors in the same column of both rows, and two errors in one
// group whose integer changes cancel, are outside what the rule corrects.
// err_detected (any syndrome non-zero) is this design's own status output.
// Purely combinational.
module dmc_error_locator
  import dmc_pkg::*;
(
  input  hred_t dfh,           // horizontal syndromes
  input  vred_t s,             // vertical syndromes
  output data_t err_mask,      // 1 = data bit to flip
  output logic  err_detected   // some syndrome is non-zero
);

  logic [NGRP-1:0] grp_err;

  always_comb begin
    for (int g = 0; g < NGRP; g++)
      grp_err[g] = |dfh[g*GRP_W +: GRP_W];
    for (int k = 0; k < NSYM; k++)
      err_mask[k*SYM_W +: SYM_W] =
        grp_err[2*(k/COLS) + (k%2)] ? s[(k%COLS)*SYM_W +: SYM_W] : '0;
    err_detected = (|grp_err) | (|s);
  end

endmodule
