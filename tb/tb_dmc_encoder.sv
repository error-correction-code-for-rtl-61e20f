// tb_dmc_encoder: checks the DMC encoder against a bit-level reference.
//
// The reference writes each horizontal group out by its symbol bits
// (f4..f0 = i3..i0 + i11..i8 and so on) and each vertical bit as
// i_j ^ i_(j+16). Applies the worked example word 0xF5AFF6AC, whose
// redundant bits are f = 11001 10100 11001 10010 and v = 0x0303, then
// 2000 random words plus all-zero and all-one words.
module tb_dmc_encoder;
  import dmc_pkg::*;
  data_t i_data, x;
  hred_t f;
  vred_t v;
  int checks = 0, failures = 0;

  dmc_encoder dut (.i_data(i_data), .x(x), .f(f), .v(v));

  function automatic hred_t ref_f(data_t d);
    int unsigned s0, s1, s2, s3;
    s0 = d[3:0]   + d[11:8];
    s1 = d[7:4]   + d[15:12];
    s2 = d[19:16] + d[27:24];
    s3 = d[23:20] + d[31:28];
    return {s3[4:0], s2[4:0], s1[4:0], s0[4:0]};
  endfunction

  function automatic vred_t ref_v(data_t d);
    vred_t r;
    for (int j = 0; j < 16; j++) r[j] = d[j] ^ d[j+16];
    return r;
  endfunction

  task automatic check(data_t d);
    i_data = d;
    #1;
    checks++;
    if (x !== d || f !== ref_f(d) || v !== ref_v(d)) begin
      failures++;
      $display("FAIL d=%h x=%h f=%h(exp %h) v=%h(exp %h)", d, x, f, ref_f(d), v, ref_v(d));
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // worked example: rows 1111 0110 1010 1100 / 1111 0101 1010 1111
    i_data = 32'hF5AF_F6AC;
    #1;
    checks++;
    if (f !== 20'b11001_10100_11001_10010 || v !== 16'h0303) begin
      failures++;
      $display("FAIL example f=%b v=%h", f, v);
    end
    check('0);
    check('1);
    for (int n = 0; n < 2000; n++) check($urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
