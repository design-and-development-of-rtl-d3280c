// tb_dmc_locator: self-checking test of the error locator. The expected
// flag of every symbol is derived from a table of (group, column) pairs
// taken from the 2 x 4 symbol matrix: symbols 0..3 use groups 0,1,0,1 and
// symbols 4..7 use groups 2,3,2,3; symbol i uses column i mod 4.
module tb_dmc_locator;
  logic [19:0] dh;
  logic [15:0] s;
  logic [7:0]  err_loc;
  int checks = 0, failures = 0;
  int grp_of[8] = '{0, 1, 0, 1, 2, 3, 2, 3};

  dmc_locator dut (.dh(dh), .s(s), .err_loc(err_loc));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4000; i++) begin
      // sparse syndromes so that every combination of zero / nonzero occurs
      for (int g = 0; g < 4; g++) dh[g*5 +: 5] = ($urandom % 2) ? 5'($urandom) : 5'd0;
      for (int c = 0; c < 4; c++) s[c*4 +: 4]  = ($urandom % 2) ? 4'($urandom) : 4'd0;
      #1;
      for (int k = 0; k < 8; k++) begin
        logic exp;
        exp = (dh[grp_of[k]*5 +: 5] != 0) && (s[(k % 4)*4 +: 4] != 0);
        checks++;
        if (err_loc[k] !== exp) begin
          failures++;
          $display("FAIL symbol %0d dh=%h s=%h flag=%b", k, dh, s, err_loc[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
