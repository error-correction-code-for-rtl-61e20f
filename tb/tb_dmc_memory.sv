// tb_dmc_memory: end-to-end test of the DMC-protected memory at its default
// size (256 words).
//
// 1. Every word is written with random data (encoding path, E_n = 1).
// 2. Every word is read back clean: data unchanged, no flags.
// 3. Multiple-cell upsets are injected straight into the stored cells of
//    both arrays (as radiation would) and the words read again:
//    - bursts of 1..8 adjacent cells in one row of the logical matrix
//      (row 0: i15..i0 f9..f0, row 1: i31..i16 f19..f10, row 2: v15..v0)
//      must come back corrected;
//    - bursts that touch only redundant bits must be flagged as detected
//      without touching the data;
//    - the worked example (symbols 0 and 2 of 0xF5AFF6AC upset to 1111 and
//      0111) must be corrected;
//    - the same bit upset in both rows (not correctable) must be detected.
// Each read result must appear exactly one cycle after its request. The
// number of times each mechanism occurred is counted; one that never
// occurred counts as a failure.
module tb_dmc_memory;
  import dmc_pkg::*;
  localparam int DEPTH = 256;
  localparam int AW = $clog2(DEPTH);

  logic clk = 0, rst_n = 0;
  logic req = 0, we = 0;
  logic [AW-1:0] addr = '0;
  data_t wdata = '0;
  logic  rvalid, err_detected, err_corrected;
  data_t rdata;
  data_t golden [DEPTH];
  int checks = 0, failures = 0;
  int n_write = 0, n_clean = 0, n_corr = 0, n_red_only = 0, n_uncorr_det = 0, n_example = 0;

  dmc_memory dut (
    .clk(clk), .rst_n(rst_n), .req(req), .we(we), .addr(addr), .wdata(wdata),
    .rvalid(rvalid), .rdata(rdata), .err_detected(err_detected), .err_corrected(err_corrected));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write_word(int a, data_t d);
    @(negedge clk);
    req = 1; we = 1; addr = AW'(a); wdata = d;
    @(negedge clk);
    req = 0; we = 0; wdata = $urandom;
    golden[a] = d;
    n_write++;
  endtask

  // Issue a read, expect the result one cycle later.
  task automatic read_word(int a, output data_t d, output logic det, output logic cor);
    @(negedge clk);
    req = 1; we = 0; addr = AW'(a); wdata = $urandom;
    @(negedge clk);
    req = 0;
    checks++;
    if (!rvalid) begin failures++; $display("FAIL rvalid missing one cycle after read %0d", a); end
    d = rdata; det = err_detected; cor = err_corrected;
    @(negedge clk);
    checks++;
    if (rvalid) begin failures++; $display("FAIL rvalid held without a request"); end
  endtask

  // Flip cells pos..pos+len-1 of logical row `row` of stored word a.
  task automatic upset(int a, int row, int pos, int len, output bit hit_data);
    data_t   d;
    redund_t r;
    d = dut.u_info_sram.mem[a];
    r = dut.u_red_sram.mem[a];
    hit_data = 0;
    for (int p = pos; p < pos + len; p++) begin
      if (row == 2) r.v[p] = ~r.v[p];
      else if (p < 10) r.f[row*10 + p] = ~r.f[row*10 + p];
      else begin
        d[row*16 + p - 10] = ~d[row*16 + p - 10];
        hit_data = 1;
      end
    end
    dut.u_info_sram.mem[a] = d;
    dut.u_red_sram.mem[a] = r;
  endtask

  initial begin
    data_t d;
    logic det, cor;
    bit hit;

    repeat (3) @(negedge clk);
    checks++;
    if (rvalid) begin failures++; $display("FAIL rvalid during reset"); end
    rst_n = 1;

    for (int a = 0; a < DEPTH; a++) write_word(a, $urandom);
    for (int a = 0; a < DEPTH; a++) begin
      read_word(a, d, det, cor);
      checks++;
      if (d !== golden[a] || det || cor) begin
        failures++; $display("FAIL clean read %0d: %h exp %h", a, d, golden[a]);
      end else n_clean++;
    end

    for (int n = 0; n < 1500; n++) begin
      int a, row, len, pos;
      a = $urandom % DEPTH;
      row = $urandom % 3;
      len = 1 + $urandom % 8;
      pos = $urandom % ((row == 2 ? 16 : 26) - len + 1);
      upset(a, row, pos, len, hit);
      read_word(a, d, det, cor);
      checks++;
      if (d !== golden[a] || !det || cor !== hit) begin
        failures++;
        $display("FAIL upset word %0d row %0d pos %0d len %0d: %h exp %h det %b cor %b",
                 a, row, pos, len, d, golden[a], det, cor);
      end else if (hit) n_corr++;
      else n_red_only++;
      write_word(a, $urandom);   // scrub with a new value
    end

    // worked example
    write_word(7, 32'hF5AF_F6AC);
    begin
      data_t x;
      x = dut.u_info_sram.mem[7];
      x[3:0] = 4'b1111; x[11:8] = 4'b0111;
      dut.u_info_sram.mem[7] = x;
    end
    read_word(7, d, det, cor);
    checks++;
    if (d !== 32'hF5AF_F6AC || !cor) begin failures++; $display("FAIL worked example %h", d); end
    else n_example++;

    // same bit in both rows: detected, not correctable
    begin
      data_t x;
      x = dut.u_info_sram.mem[9];
      x[2] = ~x[2]; x[18] = ~x[18];
      dut.u_info_sram.mem[9] = x;
    end
    read_word(9, d, det, cor);
    checks++;
    if (!det) begin failures++; $display("FAIL double-column upset not detected"); end
    else n_uncorr_det++;

    $display("writes %0d, clean reads %0d, corrected upsets %0d, redundancy-only upsets %0d, example %0d, detected-uncorrectable %0d",
             n_write, n_clean, n_corr, n_red_only, n_example, n_uncorr_det);
    checks++;
    if (n_write == 0 || n_clean == 0 || n_corr == 0 || n_red_only == 0 || n_example == 0 || n_uncorr_det == 0) begin
      failures++; $display("FAIL some mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
