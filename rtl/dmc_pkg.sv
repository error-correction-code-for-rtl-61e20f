// dmc_pkg: shared sizes and types of the decimal matrix code (DMC) for
// 32-bit data words.
//
// The 32-bit word is cut into eight 4-bit symbols arranged, logically, in a
// 2 x 4 matrix: row 0 holds symbols 3..0 (bits 15..0), row 1 holds symbols
// 7..4 (bits 31..16). Each row carries two 5-bit horizontal check groups,
// the integer sums of the symbol pairs (0,2) and (1,3) of that row, and each
// of the 16 columns carries one vertical parity bit. That gives 20 horizontal
// and 16 vertical redundant bits, 36 in all, per 32-bit word. These numbers
// follow the code; the type names are this design's own.
package dmc_pkg;

  localparam int unsigned DATA_W   = 32;              // data bits per word
  localparam int unsigned SYM_W    = 4;               // bits per symbol
  localparam int unsigned ROWS     = 2;               // rows of the symbol matrix
  localparam int unsigned COLS     = 4;               // symbols per row
  localparam int unsigned NSYM     = ROWS * COLS;     // 8 symbols
  localparam int unsigned ROW_W    = COLS * SYM_W;    // 16 data bits per row
  localparam int unsigned GRP_W    = SYM_W + 1;       // 5-bit sum of two symbols
  localparam int unsigned NGRP     = ROWS * COLS / 2; // 4 horizontal groups
  localparam int unsigned HRED_W   = NGRP * GRP_W;    // 20 horizontal bits f19..f0
  localparam int unsigned VRED_W   = ROW_W;           // 16 vertical bits v15..v0
  localparam int unsigned RED_W    = HRED_W + VRED_W; // 36 redundant bits

  typedef logic [DATA_W-1:0] data_t;
  typedef logic [HRED_W-1:0] hred_t;
  typedef logic [VRED_W-1:0] vred_t;

  // Redundant bits of one word as held in the redundancy array.
  typedef struct packed {
    hred_t f;   // horizontal redundant bits f19..f0
    vred_t v;   // vertical redundant bits v15..v0
  } redund_t;

endpackage
