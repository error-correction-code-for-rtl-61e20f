// tb_dmc_sram: writes every word of a 32 x 36 array with random data, then
// reads them back in random order and compares with a shadow copy; also
// checks that a cycle with we = 0 leaves the word unchanged.
module tb_dmc_sram;
  localparam int W = 36, D = 32;
  logic clk = 0;
  logic we;
  logic [$clog2(D)-1:0] addr;
  logic [W-1:0] wdata, rdata;
  logic [W-1:0] shadow [D];
  int checks = 0, failures = 0;

  dmc_sram #(.WIDTH(W), .DEPTH(D)) dut (.clk(clk), .we(we), .addr(addr), .wdata(wdata), .rdata(rdata));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; addr = '0; wdata = '0;
    for (int a = 0; a < D; a++) begin
      @(negedge clk);
      we = 1; addr = 5'(a); wdata = {4'($urandom), 32'($urandom)};
      shadow[a] = wdata;
    end
    @(negedge clk);
    we = 0; wdata = '1;
    for (int n = 0; n < 200; n++) begin
      addr = 5'($urandom);
      @(negedge clk);   // a clock edge passes with we = 0
      checks++;
      if (rdata !== shadow[addr]) begin
        failures++;
        $display("FAIL addr %0d got %h exp %h", addr, rdata, shadow[addr]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
