// tb_dmc_corrector: self-checking test of the error corrector: each flagged
// symbol must come out as the read symbol XOR its column's vertical
// syndrome, every other symbol unchanged.
module tb_dmc_corrector;
  logic [31:0] d_rd, d_cor;
  logic [15:0] s;
  logic [7:0]  err_loc;
  int checks = 0, failures = 0;

  dmc_corrector dut (.d_rd(d_rd), .s(s), .err_loc(err_loc), .d_cor(d_cor));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      d_rd = $urandom; s = $urandom; err_loc = $urandom;
      #1;
      for (int k = 0; k < 8; k++) begin
        logic [3:0] exp;
        exp = d_rd[k*4 +: 4];
        if (err_loc[k]) exp = exp ^ s[(k % 4)*4 +: 4];
        checks++;
        if (d_cor[k*4 +: 4] !== exp) begin
          failures++;
          $display("FAIL symbol %0d", k);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
