// dmc_ert_codec: DMC encoder and decoder sharing one encoder (encoder-reuse
// technique, ERT).
//
// A single dmc_encoder serves both directions. The enable en (E_n) selects
// its input:
//   en = 1 (write): the encoder encodes wdata; enc_x/enc_f/enc_v are the
//                   data and redundant bits to store.
//   en = 0 (read):  the encoder recomputes f', v' from the received data
//                   rx_data; the syndrome calculator compares them with the
//                   received rx_f, rx_v, the error locator turns the
//                   syndromes into a bit mask and the error corrector
//                   flips those bits, giving corr_data.
// The decoder outputs are meaningful only while en = 0. The E_n table and
// the chain encoder -> syndrome -> locator -> corrector follow the code's
// decoder; the 2:1 input multiplexer that realises the reuse is this
// design's own reading. Purely combinational.
module dmc_ert_codec
  import dmc_pkg::*;
(
  input  logic  en,             // E_n: 1 = encode, 0 = compute syndromes
  input  data_t wdata,          // word to encode
  input  data_t rx_data,        // received data bits
  input  hred_t rx_f,           // received horizontal redundant bits
  input  vred_t rx_v,           // received vertical redundant bits
  output data_t enc_x,          // encoder data bits (valid when en = 1)
  output hred_t enc_f,          // encoder horizontal bits
  output vred_t enc_v,          // encoder vertical bits
  output data_t corr_data,      // corrected word (valid when en = 0)
  output logic  err_detected,   // some syndrome non-zero (en = 0)
  output logic  err_corrected   // some data bit flipped (en = 0)
);

  data_t enc_in;
  hred_t dfh;
  vred_t s;
  data_t err_mask;

  always_comb enc_in = en ? wdata : rx_data;

  dmc_encoder u_enc (
    .i_data(enc_in),
    .x     (enc_x),
    .f     (enc_f),
    .v     (enc_v)
  );

  dmc_syndrome u_syn (
    .f_calc(enc_f),
    .v_calc(enc_v),
    .f_rx  (rx_f),
    .v_rx  (rx_v),
    .dfh   (dfh),
    .s     (s)
  );

  dmc_error_locator u_loc (
    .dfh         (dfh),
    .s           (s),
    .err_mask    (err_mask),
    .err_detected(err_detected)
  );

  dmc_error_corrector u_cor (
    .rx_data      (rx_data),
    .err_mask     (err_mask),
    .corr_data    (corr_data),
    .err_corrected(err_corrected)
  );

endmodule
