// dmc_encoder: DMC encoder, horizontal and vertical redundant bits of a word.
//
// Purely combinational. The word d is read as a ROWS x COLS matrix of
// SYM_W-bit symbols (symbol i = d[SYM_W*i +: SYM_W], row r = symbols
// r*COLS .. r*COLS+COLS-1). Horizontal bits: in each row, symbol c
// (c < COLS/2) and symbol c+COLS/2 are added as unsigned integers and the
// (SYM_W+1)-bit sum is group r*COLS/2+c of h. With the defaults this gives
// H4-H0 = D3-D0 + D11-D8, H9-H5 = D7-D4 + D15-D12, H14-H10 = D19-D16 +
// D27-D24 and H19-H15 = D23-D20 + D31-D28. Vertical bits: v[j] is the XOR of
// bit j of every row, so V0 = D0 ^ D16, V1 = D1 ^ D17, and so on. u is the
// information word passed through unchanged. The adders-plus-XOR structure
// and the bit assignments follow the DMC definition; the parameterisation
// beyond the 32-bit case is this design's own generalisation.
//
// Interface: d in, h/v/u out, no clock; the delay is one adder plus a
// ROWS-input XOR.
module dmc_encoder #(
  parameter int unsigned SYM_W = dmc_pkg::SYM_W,
  parameter int unsigned ROWS  = dmc_pkg::ROWS,
  parameter int unsigned COLS  = dmc_pkg::COLS,
  localparam int unsigned DATA_W = ROWS * COLS * SYM_W,
  localparam int unsigned H_W    = ROWS * (COLS / 2) * (SYM_W + 1),
  localparam int unsigned V_W    = COLS * SYM_W
) (
  input  logic [DATA_W-1:0] d,
  output logic [H_W-1:0]    h,
  output logic [V_W-1:0]    v,
  output logic [DATA_W-1:0] u
);

  localparam int unsigned HALF = COLS / 2;
  localparam int unsigned GW   = SYM_W + 1;
  localparam int unsigned ROW_W = COLS * SYM_W;

  // Horizontal: one multi-bit adder per symbol pair.
  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < HALF; c++) begin : g_pair
      localparam int unsigned SA = r * COLS + c;
      localparam int unsigned SB = r * COLS + c + HALF;
      assign h[(r*HALF + c)*GW +: GW] =
          GW'(d[SA*SYM_W +: SYM_W]) + GW'(d[SB*SYM_W +: SYM_W]);
    end
  end

  // Vertical: XOR down each bit column.
  always_comb begin
    v = '0;
    for (int r = 0; r < ROWS; r++) v ^= d[r*ROW_W +: ROW_W];
  end

  assign u = d;

endmodule
