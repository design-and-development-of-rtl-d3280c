// tb_dmc_syndrome: self-checking test of the syndrome calculator. The
// horizontal syndrome of each 5-bit group is checked against an integer
// difference taken modulo 32, and also for the property that it is zero
// exactly when the recomputed and stored group sums are equal.
module tb_dmc_syndrome;
  logic [19:0] h_rc, h_st, dh;
  logic [15:0] v_rc, v_st, s;
  int checks = 0, failures = 0;

  dmc_syndrome dut (.h_rc(h_rc), .h_st(h_st), .v_rc(v_rc), .v_st(v_st), .dh(dh), .s(s));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      h_rc = $urandom; h_st = (i % 3 == 0) ? h_rc : 20'($urandom);
      v_rc = $urandom; v_st = (i % 5 == 0) ? v_rc : 16'($urandom);
      #1;
      for (int g = 0; g < 4; g++) begin
        int a, b, diff;
        a = int'(h_rc[g*5 +: 5]);
        b = int'(h_st[g*5 +: 5]);
        diff = (a - b + 32) % 32;
        checks++;
        if (int'(dh[g*5 +: 5]) != diff || ((dh[g*5 +: 5] == 0) != (a == b))) begin
          failures++;
          $display("FAIL group %0d: %0d - %0d gave %0d", g, a, b, dh[g*5 +: 5]);
        end
      end
      for (int j = 0; j < 16; j++) begin
        checks++;
        if (s[j] != (v_rc[j] != v_st[j])) begin
          failures++;
          $display("FAIL s[%0d]", j);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
