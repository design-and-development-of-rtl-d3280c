// dmc_locator: DMC error locator.
//
// Symbol i sits in row r = i / COLS and column c = i % COLS of the logical
// matrix. Its horizontal check group is r*COLS/2 + (c % COLS/2), and its
// vertical syndrome bits are s[c*SYM_W +: SYM_W]. The symbol is declared in
// error (err_loc[i] = 1) when both its group's horizontal syndrome and its
// column's vertical syndrome are nonzero: the horizontal syndrome picks the
// symbol pair, the vertical one picks the column, and only one symbol of the
// pair lies in that column. An error confined to redundant bits leaves one
// of the two syndromes zero and flags nothing. The rule "both nonzero means
// the error is located in the symbol" follows the DMC decoding description;
// the gate-level form (OR-reduce and AND) is this design's.
//
// Interface: purely combinational.
module dmc_locator #(
  parameter int unsigned SYM_W = dmc_pkg::SYM_W,
  parameter int unsigned ROWS  = dmc_pkg::ROWS,
  parameter int unsigned COLS  = dmc_pkg::COLS,
  localparam int unsigned NSYM = ROWS * COLS,
  localparam int unsigned NGRP = ROWS * (COLS / 2),
  localparam int unsigned GW   = SYM_W + 1
) (
  input  logic [NGRP*GW-1:0]     dh,       // horizontal syndrome
  input  logic [COLS*SYM_W-1:0]  s,        // vertical syndrome
  output logic [NSYM-1:0]        err_loc   // one flag per symbol
);

  localparam int unsigned HALF = COLS / 2;

  for (genvar i = 0; i < NSYM; i++) begin : g_sym
    localparam int unsigned R = i / COLS;
    localparam int unsigned C = i % COLS;
    localparam int unsigned G = R * HALF + (C % HALF);
    assign err_loc[i] = (|dh[G*GW +: GW]) & (|s[C*SYM_W +: SYM_W]);
  end

endmodule
