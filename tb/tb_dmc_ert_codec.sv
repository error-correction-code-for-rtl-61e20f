// tb_dmc_ert_codec: end-to-end check of the encoder-reuse codec.
//
// Each test word is encoded with en = 1, the stored codeword is then hit by
// a multiple-cell upset and decoded with en = 0. Upsets are bursts of 1 to
// 8 adjacent cells in one row of the logical matrix:
//   row 0: i15..i0 f9..f0, row 1: i31..i16 f19..f10, row 2: v15..v0.
// Every such burst must be corrected (decoded word == written word). Also
// checked: error-free words decode unchanged with no flags; a burst that
// touches data bits raises err_corrected; a burst only in redundant bits is
// detected and leaves the data alone; the worked example (symbol 0 upset
// 1100 -> 1111 and symbol 2 0110 -> 0111 in word 0xF5AFF6AC) is corrected;
// an upset of the same bit in both rows, which the code does not correct,
// is at least detected.
module tb_dmc_ert_codec;
  import dmc_pkg::*;
  logic  en;
  data_t wdata, rx_data, enc_x, corr_data;
  hred_t rx_f, enc_f;
  vred_t rx_v, enc_v;
  logic  err_detected, err_corrected;
  int checks = 0, failures = 0;
  int n_data_bursts = 0, n_red_bursts = 0;

  dmc_ert_codec dut (
    .en(en), .wdata(wdata), .rx_data(rx_data), .rx_f(rx_f), .rx_v(rx_v),
    .enc_x(enc_x), .enc_f(enc_f), .enc_v(enc_v), .corr_data(corr_data),
    .err_detected(err_detected), .err_corrected(err_corrected));

  // Flip cells pos..pos+len-1 of logical row `row` of a codeword.
  task automatic burst(inout data_t d, inout hred_t f, inout vred_t v,
                       input int row, input int pos, input int len, output bit hit_data);
    hit_data = 0;
    for (int p = pos; p < pos + len; p++) begin
      if (row == 2) v[p] = ~v[p];
      else if (p < 10) f[row*10 + p] = ~f[row*10 + p];
      else begin
        d[row*16 + p - 10] = ~d[row*16 + p - 10];
        hit_data = 1;
      end
    end
  endtask

  // Encode d, return its stored codeword.
  task automatic encode(input data_t d, output data_t x, output hred_t f, output vred_t v);
    en = 1; wdata = d;
    rx_data = $urandom; rx_f = 20'($urandom); rx_v = 16'($urandom);
    #1;
    x = enc_x; f = enc_f; v = enc_v;
  endtask

  task automatic decode(input data_t x, input hred_t f, input vred_t v);
    en = 0; wdata = $urandom;
    rx_data = x; rx_f = f; rx_v = v;
    #1;
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    data_t d, x;
    hred_t f;
    vred_t v;
    bit hit;

    // worked example
    encode(32'hF5AF_F6AC, x, f, v);
    checks++;
    if (x !== 32'hF5AF_F6AC || f !== 20'b11001_10100_11001_10010 || v !== 16'h0303) begin
      failures++; $display("FAIL example encode");
    end
    x[3:0] = 4'b1111; x[11:8] = 4'b0111;
    decode(x, f, v);
    checks++;
    if (corr_data !== 32'hF5AF_F6AC || !err_corrected) begin
      failures++; $display("FAIL example decode %h", corr_data);
    end

    for (int n = 0; n < 3000; n++) begin
      int row, len, pos;
      d = $urandom;
      encode(d, x, f, v);
      checks++;
      if (x !== d) begin failures++; $display("FAIL x copy"); end
      // clean read
      decode(x, f, v);
      checks++;
      if (corr_data !== d || err_detected || err_corrected) begin
        failures++; $display("FAIL clean %h -> %h", d, corr_data);
      end
      // burst of 1..8 cells in one logical row
      row = $urandom % 3;
      len = 1 + $urandom % 8;
      pos = $urandom % ((row == 2 ? 16 : 26) - len + 1);
      burst(x, f, v, row, pos, len, hit);
      decode(x, f, v);
      checks++;
      if (corr_data !== d || !err_detected || (err_corrected !== hit)) begin
        failures++;
        $display("FAIL burst row %0d pos %0d len %0d: %h -> %h det %b cor %b",
                 row, pos, len, d, corr_data, err_detected, err_corrected);
      end
      if (hit) n_data_bursts++; else n_red_bursts++;
    end

    // same bit upset in both rows: not correctable, must be detected
    d = $urandom;
    encode(d, x, f, v);
    x[5] = ~x[5]; x[21] = ~x[21];
    decode(x, f, v);
    checks++;
    if (!err_detected) begin failures++; $display("FAIL double column not detected"); end

    checks++;
    if (n_data_bursts == 0 || n_red_bursts == 0) begin
      failures++; $display("FAIL burst kinds not both exercised");
    end
    $display("bursts in data: %0d, only in redundant bits: %0d", n_data_bursts, n_red_bursts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
