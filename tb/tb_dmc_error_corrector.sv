// tb_dmc_error_corrector: checks that the corrector flips exactly the
// masked bits and flags a non-zero mask, on random words and masks.
module tb_dmc_error_corrector;
  import dmc_pkg::*;
  data_t rx_data, err_mask, corr_data;
  logic  err_corrected;
  int checks = 0, failures = 0;

  dmc_error_corrector dut (.rx_data(rx_data), .err_mask(err_mask),
                           .corr_data(corr_data), .err_corrected(err_corrected));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      data_t good, m;
      good = $urandom;
      m = (n % 4 == 0) ? '0 : data_t'($urandom);
      rx_data = good ^ m;   // received word with the errors in m
      err_mask = m;
      #1;
      checks++;
      if (corr_data !== good || err_corrected !== (m != '0)) begin
        failures++;
        $display("FAIL rx=%h m=%h got %h", rx_data, m, corr_data);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
