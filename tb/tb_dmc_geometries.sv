// tb_dmc_geometries: runs the encoder-reuse codec in the three symbol
// geometries compared for a 32-bit word: 2 x 4 symbols of 4 bits (the
// default), 2 x 2 symbols of 8 bits and 4 x 4 symbols of 2 bits. Each is
// checked by tb_dmc_geom_check against a generic model of the code. The
// redundant-bit counts of the three are printed: 36, 34 and 32.
module tb_dmc_geometries;
  int c0, f0, c1, f1, c2, f2;
  logic d0, d1, d2;
  int checks = 0, failures = 0;

  tb_dmc_geom_check #(.SYM_W(4), .ROWS(2), .COLS(4)) g_2x4 (.checks(c0), .failures(f0), .done(d0));
  tb_dmc_geom_check #(.SYM_W(8), .ROWS(2), .COLS(2)) g_2x2 (.checks(c1), .failures(f1), .done(d1));
  tb_dmc_geom_check #(.SYM_W(2), .ROWS(4), .COLS(4)) g_4x4 (.checks(c2), .failures(f2), .done(d2));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (d0 && d1 && d2);
    checks = c0 + c1 + c2;
    failures += f0 + f1 + f2;
    $display("redundant bits: 2x4 m=4 %0d, 2x2 m=8 %0d, 4x4 m=2 %0d",
             $bits(g_2x4.h) + $bits(g_2x4.v), $bits(g_2x2.h) + $bits(g_2x2.v),
             $bits(g_4x4.h) + $bits(g_4x4.v));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
