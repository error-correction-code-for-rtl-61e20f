// tb_dmc_syndrome: checks the syndrome calculator. For random operands each
// 5-bit horizontal syndrome must equal (f' - f) mod 32 and the vertical
// syndrome v' ^ v. Includes the worked example 10110 - 10010 = 00100.
module tb_dmc_syndrome;
  import dmc_pkg::*;
  hred_t f_calc, f_rx, dfh;
  vred_t v_calc, v_rx, s;
  int checks = 0, failures = 0;

  dmc_syndrome dut (.f_calc(f_calc), .v_calc(v_calc), .f_rx(f_rx), .v_rx(v_rx),
                    .dfh(dfh), .s(s));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    f_calc = {15'd0, 5'b10110}; f_rx = {15'd0, 5'b10010};
    v_calc = 16'h0200;          v_rx = 16'h0303;
    #1;
    checks++;
    if (dfh !== {15'd0, 5'b00100} || s !== 16'h0103) begin
      failures++;
      $display("FAIL example dfh=%b s=%h", dfh, s);
    end
    for (int n = 0; n < 2000; n++) begin
      f_calc = 20'($urandom); f_rx = 20'($urandom);
      v_calc = 16'($urandom); v_rx = 16'($urandom);
      #1;
      for (int g = 0; g < 4; g++) begin
        int d;
        d = (int'(f_calc[g*5 +: 5]) - int'(f_rx[g*5 +: 5]) + 32) % 32;
        checks++;
        if (int'(dfh[g*5 +: 5]) != d) begin
          failures++;
          $display("FAIL group %0d: %0d - %0d gave %0d", g, f_calc[g*5 +: 5], f_rx[g*5 +: 5], dfh[g*5 +: 5]);
        end
      end
      checks++;
      if (s !== (v_calc ^ v_rx)) begin failures++; $display("FAIL s"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
