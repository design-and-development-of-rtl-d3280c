// dmc_pkg: shared sizes of the decimal matrix code (DMC).
//
// A DATA_W-bit word is cut into K = ROWS*COLS symbols of SYM_W bits and the
// symbols are laid out, logically, as a ROWS x COLS matrix: symbol i holds
// bits D[SYM_W*i +: SYM_W], row r holds symbols r*COLS .. r*COLS+COLS-1.
// Within a row, symbol c is paired with symbol c+COLS/2 and the pair's
// integer sum is one (SYM_W+1)-bit horizontal check group. Each of the
// COLS*SYM_W bit columns gets one vertical check bit, the XOR of the column.
// The defaults (32-bit word, 2 x 4 symbols of 4 bits, H19-H0, V15-V0) are the
// configuration the design is built around; the memory depth of 16 words
// (4 address bits) is this design's choice.
package dmc_pkg;

  parameter int unsigned DATA_W = 32;  // information bits per word
  parameter int unsigned SYM_W  = 4;   // m: bits per symbol
  parameter int unsigned ROWS   = 2;   // k1: rows of the logical matrix
  parameter int unsigned COLS   = 4;   // k2: symbols per row
  parameter int unsigned ADDR_W = 4;   // memory words = 2**ADDR_W

  // Derived sizes (with the defaults the codeword is 32 + 36 = 68 bits).
  parameter int unsigned NSYM    = ROWS * COLS;               // 8 symbols
  parameter int unsigned NGRP    = ROWS * (COLS / 2);         // 4 horizontal groups
  parameter int unsigned HGRP_W  = SYM_W + 1;                 // 5 bits per group
  parameter int unsigned H_W     = NGRP * HGRP_W;             // 20 (H19-H0)
  parameter int unsigned V_W     = COLS * SYM_W;              // 16 (V15-V0)
  parameter int unsigned RED_W   = H_W + V_W;                 // 36 redundant bits

  // Layout of a stored redundancy word: {H, V}.
  typedef struct packed {
    logic [H_W-1:0] h;
    logic [V_W-1:0] v;
  } redundancy_t;

endpackage
