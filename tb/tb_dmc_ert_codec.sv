// tb_dmc_ert_codec: self-checking test of the encoder-reuse codec. With
// En = 0 the outputs h, v, u must be the codeword of the write data (checked
// against the encoding equations written out here) whatever the read inputs
// hold. With En = 1 the same encoder must work on the read word, so a stored
// codeword with a single-symbol upset is corrected and the symbol flagged,
// and h, v show the check bits of the read word.
module tb_dmc_ert_codec;
  logic        en;
  logic [31:0] d_wr, d_rd, u, d_cor;
  logic [19:0] h_st, h, dh;
  logic [15:0] v_st, v, s;
  logic [7:0]  err_loc;
  int checks = 0, failures = 0;
  int n_enc = 0, n_dec = 0;

  dmc_ert_codec dut (.*);

  function automatic logic [19:0] ref_h(input logic [31:0] x);
    int g0, g1, g2, g3;
    g0 = int'(x[3:0])   + int'(x[11:8]);
    g1 = int'(x[7:4])   + int'(x[15:12]);
    g2 = int'(x[19:16]) + int'(x[27:24]);
    g3 = int'(x[23:20]) + int'(x[31:28]);
    return {g3[4:0], g2[4:0], g1[4:0], g0[4:0]};
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      logic [31:0] x, y, e;
      int k;
      // write direction
      en = 0; d_wr = $urandom; d_rd = $urandom; h_st = $urandom; v_st = $urandom;
      #1;
      checks++; n_enc++;
      if (h !== ref_h(d_wr) || v !== (d_wr[15:0] ^ d_wr[31:16]) || u !== d_wr) begin
        failures++;
        $display("FAIL encode d=%h h=%h v=%h", d_wr, h, v);
      end
      // read direction: stored codeword of x, one symbol upset
      x = $urandom; k = $urandom % 8;
      e = 0;
      while (e == 0) e = 32'($urandom % 16) << (4*k);
      y = x ^ e;
      en = 1; d_wr = $urandom; d_rd = y; h_st = ref_h(x); v_st = x[15:0] ^ x[31:16];
      #1;
      checks++; n_dec++;
      if (d_cor !== x || err_loc !== (8'(1) << k) ||
          h !== ref_h(y) || v !== (y[15:0] ^ y[31:16])) begin
        failures++;
        $display("FAIL decode x=%h y=%h got %h flags %b", x, y, d_cor, err_loc);
      end
    end
    if (n_enc == 0 || n_dec == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
