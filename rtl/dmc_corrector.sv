// dmc_corrector: DMC error corrector.
//
// For every symbol flagged by the locator, the bits named by its column's
// vertical syndrome are inverted: D_correct = D' ^ S for that symbol, as in
// the DMC correction equation. Symbols not flagged pass unchanged.
//
// Interface: purely combinational; d_rd is the information word as read,
// d_cor the corrected word.
module dmc_corrector #(
  parameter int unsigned SYM_W = dmc_pkg::SYM_W,
  parameter int unsigned ROWS  = dmc_pkg::ROWS,
  parameter int unsigned COLS  = dmc_pkg::COLS,
  localparam int unsigned NSYM   = ROWS * COLS,
  localparam int unsigned DATA_W = NSYM * SYM_W
) (
  input  logic [DATA_W-1:0]     d_rd,
  input  logic [COLS*SYM_W-1:0] s,
  input  logic [NSYM-1:0]       err_loc,
  output logic [DATA_W-1:0]     d_cor
);

  for (genvar i = 0; i < NSYM; i++) begin : g_sym
    localparam int unsigned C = i % COLS;
    assign d_cor[i*SYM_W +: SYM_W] =
        d_rd[i*SYM_W +: SYM_W] ^ (s[C*SYM_W +: SYM_W] & {SYM_W{err_loc[i]}});
  end

endmodule
