// dmc_error_corrector: error corrector of the DMC decoder.
//
// Flips every received data bit that the locator marked:
// i_c = I xor mask, the code's correction rule i_c = i xor S applied bit by
// bit through the locator's mask. err_corrected (mask non-zero) is this
// design's own status output. Purely combinational.
module dmc_error_corrector
  import dmc_pkg::*;
(
  input  data_t rx_data,        // received data bits I31..I0
  input  data_t err_mask,       // bits to flip
  output data_t corr_data,      // corrected word i_c
  output logic  err_corrected   // at least one bit was flipped
);

  always_comb begin
    corr_data     = rx_data ^ err_mask;
    err_corrected = |err_mask;
  end

endmodule
