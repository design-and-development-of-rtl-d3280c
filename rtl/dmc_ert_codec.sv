// dmc_ert_codec: DMC codec built with the encoder-reuse technique (ERT).
//
// A single dmc_encoder serves both directions. The enable En selects what
// it encodes:
//   En = 0 (write): the encoder sees the write data d_wr; h, v, u are the
//                   codeword to store.
//   En = 1 (read):  the encoder sees the information word read from memory
//                   d_rd and its outputs are the recomputed bits H', V' that
//                   the decoder compares with the stored h_st, v_st.
// Reusing the encoder instead of giving the decoder its own saves one set of
// adders and XOR gates. The En truth table follows the ERT description;
// realising En as a 2:1 multiplexer in front of the encoder is this
// design's choice. d_cor, dh, s and err_loc are meaningful only with En = 1.
//
// Interface: purely combinational.
module dmc_ert_codec #(
  parameter int unsigned SYM_W = dmc_pkg::SYM_W,
  parameter int unsigned ROWS  = dmc_pkg::ROWS,
  parameter int unsigned COLS  = dmc_pkg::COLS,
  localparam int unsigned NSYM   = ROWS * COLS,
  localparam int unsigned DATA_W = NSYM * SYM_W,
  localparam int unsigned H_W    = ROWS * (COLS / 2) * (SYM_W + 1),
  localparam int unsigned V_W    = COLS * SYM_W
) (
  input  logic              en,      // 0: encode write data, 1: decode read data
  input  logic [DATA_W-1:0] d_wr,    // D: data to be written
  input  logic [DATA_W-1:0] d_rd,    // D': information bits read from memory
  input  logic [H_W-1:0]    h_st,    // H read from memory
  input  logic [V_W-1:0]    v_st,    // V read from memory
  output logic [H_W-1:0]    h,       // encoder output H (or H' when en = 1)
  output logic [V_W-1:0]    v,       // encoder output V (or V' when en = 1)
  output logic [DATA_W-1:0] u,       // encoder output U
  output logic [DATA_W-1:0] d_cor,   // corrected read word
  output logic [H_W-1:0]    dh,      // horizontal syndrome
  output logic [V_W-1:0]    s,       // vertical syndrome
  output logic [NSYM-1:0]   err_loc  // symbols found in error
);

  logic [DATA_W-1:0] enc_in;

  assign enc_in = en ? d_rd : d_wr;

  dmc_encoder #(.SYM_W(SYM_W), .ROWS(ROWS), .COLS(COLS)) u_enc (
    .d(enc_in), .h(h), .v(v), .u(u)
  );

  dmc_decoder #(.SYM_W(SYM_W), .ROWS(ROWS), .COLS(COLS)) u_dec (
    .d_rd(d_rd), .h_st(h_st), .v_st(v_st), .h_rc(h), .v_rc(v),
    .d_cor(d_cor), .dh(dh), .s(s), .err_loc(err_loc)
  );

endmodule
