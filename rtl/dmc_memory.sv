// dmc_memory: fault-tolerant memory protected by the decimal matrix code.
//
// Every 32-bit word is stored with 36 redundant bits: 20 horizontal bits
// (integer sums of symbol pairs) in a separate redundancy array and 16
// vertical parity bits beside them. The word itself goes to the information
// array. On a read the stored data is passed through the same encoder that
// encoded it (encoder reuse, E_n = write flag), the syndromes are formed
// against the stored redundant bits and the located bits are flipped, so
// multiple-cell upsets confined to the symbols of one row are corrected.
//
// Interface (this design's own): one request per cycle on req/we/addr/wdata.
// A write is stored at the clock edge of its request. A read is decoded
// in its request cycle from the combinationally read arrays and the result
// is registered: rvalid, rdata, err_detected and err_corrected are valid in
// the cycle after the read request. rst_n is a synchronous active-low reset
// of the output registers only; array contents are not reset.
module dmc_memory
  import dmc_pkg::*;
#(
  parameter int unsigned DEPTH = 256   // words in each array
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     req,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] addr,
  input  data_t                    wdata,
  output logic                     rvalid,
  output data_t                    rdata,
  output logic                     err_detected,
  output logic                     err_corrected
);

  logic    en;          // E_n: encode on a write, compute syndromes otherwise
  logic    wr;
  data_t   info_rd;     // stored data bits of addr
  redund_t red_rd;      // stored redundant bits of addr
  data_t   enc_x;
  hred_t   enc_f;
  vred_t   enc_v;
  redund_t red_wr;
  data_t   corr_data;
  logic    det, cor;

  always_comb begin
    en     = we;
    wr     = req & we;
    red_wr = '{f: enc_f, v: enc_v};
  end

  dmc_sram #(.WIDTH(DATA_W), .DEPTH(DEPTH)) u_info_sram (
    .clk  (clk),
    .we   (wr),
    .addr (addr),
    .wdata(enc_x),
    .rdata(info_rd)
  );

  dmc_sram #(.WIDTH(RED_W), .DEPTH(DEPTH)) u_red_sram (
    .clk  (clk),
    .we   (wr),
    .addr (addr),
    .wdata(red_wr),
    .rdata(red_rd)
  );

  dmc_ert_codec u_codec (
    .en           (en),
    .wdata        (wdata),
    .rx_data      (info_rd),
    .rx_f         (red_rd.f),
    .rx_v         (red_rd.v),
    .enc_x        (enc_x),
    .enc_f        (enc_f),
    .enc_v        (enc_v),
    .corr_data    (corr_data),
    .err_detected (det),
    .err_corrected(cor)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rvalid        <= 1'b0;
      rdata         <= '0;
      err_detected  <= 1'b0;
      err_corrected <= 1'b0;
    end else begin
      rvalid <= req & ~we;
      if (req && !we) begin
        rdata         <= corr_data;
        err_detected  <= det;
        err_corrected <= cor;
      end
    end
  end

endmodule
