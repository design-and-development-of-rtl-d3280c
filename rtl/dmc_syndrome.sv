// dmc_syndrome: DMC syndrome calculator.
//
// Compares the redundant bits recomputed from the read information bits
// (h_rc = H', v_rc = V') with the stored ones (h_st = H, v_st = V).
// Horizontal syndrome: for every (SYM_W+1)-bit group, dh = H' - H as an
// integer subtraction modulo 2**(SYM_W+1). Because a group sum never exceeds
// 2*(2**SYM_W - 1), the difference is zero exactly when the two integers are
// equal, so the width of the check group suffices. Vertical syndrome:
// s = V' ^ V. Both follow the DMC decoding equations; keeping dh at the
// group width is this design's choice.
//
// Interface: purely combinational, one subtracter per group plus XOR gates.
module dmc_syndrome #(
  parameter int unsigned NGRP   = dmc_pkg::NGRP,
  parameter int unsigned HGRP_W = dmc_pkg::HGRP_W,
  parameter int unsigned V_W    = dmc_pkg::V_W
) (
  input  logic [NGRP*HGRP_W-1:0] h_rc,  // H' from the read data
  input  logic [NGRP*HGRP_W-1:0] h_st,  // H as stored
  input  logic [V_W-1:0]         v_rc,  // V' from the read data
  input  logic [V_W-1:0]         v_st,  // V as stored
  output logic [NGRP*HGRP_W-1:0] dh,    // horizontal syndrome, per group
  output logic [V_W-1:0]         s      // vertical syndrome
);

  for (genvar g = 0; g < NGRP; g++) begin : g_sub
    assign dh[g*HGRP_W +: HGRP_W] = h_rc[g*HGRP_W +: HGRP_W] - h_st[g*HGRP_W +: HGRP_W];
  end

  assign s = v_rc ^ v_st;

endmodule
