// tb_dmc_error_locator: checks the error locator against a table-driven
// reference. Symbol k (bits 4k+3..4k) uses horizontal group GRP[k] and
// vertical syndrome nibble COLN[k]; its mask is that nibble when the group
// syndrome is non-zero. Directed cases (each group alone, the worked
// example) are followed by random syndromes, about half of the groups zero.
module tb_dmc_error_locator;
  import dmc_pkg::*;
  hred_t dfh;
  vred_t s;
  data_t err_mask;
  logic  err_detected;
  int checks = 0, failures = 0;

  // symbol -> group and column nibble, written out for symbols 0..7
  localparam int GRP [8]  = '{0, 1, 0, 1, 2, 3, 2, 3};
  localparam int COLN [8] = '{0, 1, 2, 3, 0, 1, 2, 3};

  dmc_error_locator dut (.dfh(dfh), .s(s), .err_mask(err_mask), .err_detected(err_detected));

  function automatic data_t ref_mask(hred_t d, vred_t sv);
    data_t m = '0;
    for (int k = 0; k < 8; k++)
      if (d[GRP[k]*5 +: 5] != 5'd0) m[k*4 +: 4] = sv[COLN[k]*4 +: 4];
    return m;
  endfunction

  task automatic check(hred_t d, vred_t sv);
    dfh = d; s = sv;
    #1;
    checks++;
    if (err_mask !== ref_mask(d, sv) || err_detected !== ((d != '0) || (sv != '0))) begin
      failures++;
      $display("FAIL dfh=%h s=%h mask=%h exp %h det=%b", d, sv, err_mask, ref_mask(d, sv), err_detected);
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
    // worked example: delta_f4..f0 = 00100, S = 0x0103 -> flip bits 0,1 and 8
    dfh = {15'd0, 5'b00100}; s = 16'h0103;
    #1;
    checks++;
    if (err_mask !== 32'h0000_0103) begin failures++; $display("FAIL example %h", err_mask); end
    check('0, '0);
    check('0, 16'hFFFF);
    for (int g = 0; g < 4; g++) check(hred_t'(20'd1 << (g*5)), 16'hFFFF);
    for (int n = 0; n < 4000; n++) begin
      hred_t d;
      d = 20'($urandom);
      for (int g = 0; g < 4; g++) if ($urandom % 2) d[g*5 +: 5] = '0;
      check(d, 16'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
