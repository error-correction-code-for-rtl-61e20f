// dmc_sram: word-organised storage array.
//
// DEPTH words of WIDTH bits with one synchronous write port and a
// combinational read of the addressed word (LUT-RAM style). The DMC memory
// uses two of these: a 32-bit wide array for the information bits and a
// 36-bit wide array for the redundant bits. Depth and timing are this
// design's own choice; a real SRAM macro would take its place. Contents are
// not reset.
module dmc_sram #(
  parameter int unsigned WIDTH = 32,   // bits per word
  parameter int unsigned DEPTH = 256   // words
) (
  input  logic                     clk,
  input  logic                     we,     // write wdata to addr at the clock edge
  input  logic [$clog2(DEPTH)-1:0] addr,
  input  logic [WIDTH-1:0]         wdata,
  output logic [WIDTH-1:0]         rdata   // mem[addr], combinational
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk)
    if (we) mem[addr] <= wdata;

  always_comb rdata = mem[addr];

endmodule
