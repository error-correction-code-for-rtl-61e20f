// tb_dmc_sym_adder: exhaustive check of the symbol adder. All 256 pairs of
// 4-bit symbols are applied and the 5-bit sum compared with the integer sum
// computed here. Also checks the worked example 1100 + 0110 = 10010.
module tb_dmc_sym_adder;
  logic [3:0] a, b;
  logic [4:0] sum;
  int checks = 0, failures = 0;

  dmc_sym_adder #(.SYM_W(4)) dut (.a(a), .b(b), .sum(sum));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 16; x++)
      for (int y = 0; y < 16; y++) begin
        a = 4'(x); b = 4'(y);
        #1;
        checks++;
        if (int'(sum) != x + y) begin
          failures++;
          $display("FAIL %0d + %0d gave %0d", x, y, sum);
        end
      end
    a = 4'b1100; b = 4'b0110; #1;
    checks++;
    if (sum !== 5'b10010) begin failures++; $display("FAIL example"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
