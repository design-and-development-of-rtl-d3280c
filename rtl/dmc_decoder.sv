// dmc_decoder: DMC decoder (syndrome calculator, error locator, corrector).
//
// The decoder does not contain an encoder of its own: the redundant bits
// H' and V' of the read information word D' are recomputed by the shared
// DMC encoder (encoder-reuse technique) and arrive on h_rc / v_rc. The
// syndrome calculator forms dH = H' - H and S = V' ^ V, the locator flags
// every symbol whose horizontal group and column both show a nonzero
// syndrome, and the corrector inverts the flagged bits. The chain follows
// the DMC decoder structure; exposing dh, s and err_loc as outputs is this
// design's choice, for observation.
//
// Interface: purely combinational.
module dmc_decoder #(
  parameter int unsigned SYM_W = dmc_pkg::SYM_W,
  parameter int unsigned ROWS  = dmc_pkg::ROWS,
  parameter int unsigned COLS  = dmc_pkg::COLS,
  localparam int unsigned NSYM   = ROWS * COLS,
  localparam int unsigned DATA_W = NSYM * SYM_W,
  localparam int unsigned NGRP   = ROWS * (COLS / 2),
  localparam int unsigned GW     = SYM_W + 1,
  localparam int unsigned H_W    = NGRP * GW,
  localparam int unsigned V_W    = COLS * SYM_W
) (
  input  logic [DATA_W-1:0] d_rd,    // D': information bits as read
  input  logic [H_W-1:0]    h_st,    // H: stored horizontal bits
  input  logic [V_W-1:0]    v_st,    // V: stored vertical bits
  input  logic [H_W-1:0]    h_rc,    // H': recomputed from D' by the encoder
  input  logic [V_W-1:0]    v_rc,    // V': recomputed from D' by the encoder
  output logic [DATA_W-1:0] d_cor,   // D_correct
  output logic [H_W-1:0]    dh,      // horizontal syndrome
  output logic [V_W-1:0]    s,       // vertical syndrome
  output logic [NSYM-1:0]   err_loc  // symbols found in error
);

  dmc_syndrome #(.NGRP(NGRP), .HGRP_W(GW), .V_W(V_W)) u_syn (
    .h_rc(h_rc), .h_st(h_st), .v_rc(v_rc), .v_st(v_st), .dh(dh), .s(s)
  );

  dmc_locator #(.SYM_W(SYM_W), .ROWS(ROWS), .COLS(COLS)) u_loc (
    .dh(dh), .s(s), .err_loc(err_loc)
  );

  dmc_corrector #(.SYM_W(SYM_W), .ROWS(ROWS), .COLS(COLS)) u_cor (
    .d_rd(d_rd), .s(s), .err_loc(err_loc), .d_cor(d_cor)
  );

endmodule
