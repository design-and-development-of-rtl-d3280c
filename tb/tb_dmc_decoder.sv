// tb_dmc_decoder: self-checking test of the DMC decoder at its 32-bit
// defaults. A behavioural encoder in this file produces the stored H, V of
// a random word and the recomputed H', V' of the corrupted word (the role the
// shared encoder plays in the memory). Error classes checked:
//   - no error: output equals the word, nothing flagged;
//   - any nonzero error inside one symbol: fully corrected;
//   - a burst over two neighbouring symbols of one row: fully corrected;
//   - upsets confined to H, or confined to V: data untouched, nothing
//     flagged (upsets in both can be mistaken for data errors; those are
//     only compared with the model);
//   - the four-symbol upset of the symbol-matrix example (3 bits of
//     symbol 0, 3 of symbol 2, all of symbols 5 and 7) on an all-zero word;
//   - arbitrary upsets: output compared with a behavioural model of the
//     decoding rule, and fully corrected whenever the upset is correctable
//     by that rule (no two bad symbols in one column, no bad symbol whose
//     group difference cancels to zero, no clean symbol whose group and
//     column both see errors).
module tb_dmc_decoder;
  logic [31:0] d_rd, d_cor;
  logic [19:0] h_st, h_rc, dh;
  logic [15:0] v_st, v_rc, s;
  logic [7:0]  err_loc;
  int checks = 0, failures = 0;
  int grp_of[8] = '{0, 1, 0, 1, 2, 3, 2, 3};

  dmc_decoder dut (.d_rd(d_rd), .h_st(h_st), .v_st(v_st), .h_rc(h_rc), .v_rc(v_rc),
                   .d_cor(d_cor), .dh(dh), .s(s), .err_loc(err_loc));

  function automatic int sym(input logic [31:0] x, input int k);
    return int'(x[k*4 +: 4]);
  endfunction

  function automatic logic [19:0] enc_h(input logic [31:0] x);
    logic [19:0] r;
    for (int g = 0; g < 4; g++) begin
      int a, b, row, col;
      row = g / 2; col = g % 2;
      a = sym(x, row*4 + col);
      b = sym(x, row*4 + col + 2);
      r[g*5 +: 5] = 5'(a + b);
    end
    return r;
  endfunction

  function automatic logic [15:0] enc_v(input logic [31:0] x);
    return x[15:0] ^ x[31:16];
  endfunction

  // Behavioural model of the decoding rule.
  function automatic logic [31:0] model(input logic [31:0] x, input logic [19:0] hs,
                                       input logic [15:0] vs, output logic [7:0] flags);
    logic [19:0] hr;
    logic [15:0] sv;
    logic [31:0] y;
    hr = enc_h(x);
    sv = enc_v(x) ^ vs;
    y  = x;
    for (int k = 0; k < 8; k++) begin
      int g, c;
      g = grp_of[k]; c = k % 4;
      flags[k] = (hr[g*5 +: 5] != hs[g*5 +: 5]) && (sv[c*4 +: 4] != 0);
      if (flags[k]) y[k*4 +: 4] = y[k*4 +: 4] ^ sv[c*4 +: 4];
    end
    return y;
  endfunction

  // Is a data-only upset e on word x correctable by the rule?
  function automatic bit correctable(input logic [31:0] x, input logic [31:0] e);
    bit bad[8];
    int gdiff[4];
    logic [31:0] y;
    y = x ^ e;
    for (int g = 0; g < 4; g++) gdiff[g] = 0;
    for (int k = 0; k < 8; k++) begin
      bad[k] = e[k*4 +: 4] != 0;
      gdiff[grp_of[k]] += sym(y, k) - sym(x, k);
    end
    for (int k = 0; k < 8; k++) begin
      if (bad[k] && bad[(k + 4) % 8]) return 0;           // shared column
      if (bad[k] && gdiff[grp_of[k]] == 0) return 0;      // decimal cancellation
      if (!bad[k] && gdiff[grp_of[k]] != 0 && bad[(k + 4) % 8]) return 0;
    end
    return 1;
  endfunction

  int n_corrected = 0;

  task automatic apply(input logic [31:0] x, input logic [31:0] ed,
                       input logic [19:0] eh, input logic [15:0] ev,
                       input bit must_fix, input logic [7:0] exp_flags, input bit chk_flags);
    logic [7:0] mflags;
    logic [31:0] mexp;
    d_rd = x ^ ed;
    h_st = enc_h(x) ^ eh;
    v_st = enc_v(x) ^ ev;
    h_rc = enc_h(d_rd);
    v_rc = enc_v(d_rd);
    #1;
    mexp = model(d_rd, h_st, v_st, mflags);
    checks++;
    if (d_cor !== mexp || err_loc !== mflags) begin
      failures++;
      $display("FAIL model: x=%h ed=%h eh=%h ev=%h got %h/%b exp %h/%b",
               x, ed, eh, ev, d_cor, err_loc, mexp, mflags);
    end
    if (must_fix) begin
      checks++;
      if (d_cor !== x) begin
        failures++;
        $display("FAIL not corrected: x=%h ed=%h got %h", x, ed, d_cor);
      end else if (ed != 0) n_corrected++;
    end
    if (chk_flags) begin
      checks++;
      if (err_loc !== exp_flags) begin
        failures++;
        $display("FAIL flags: ed=%h got %b exp %b", ed, err_loc, exp_flags);
      end
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] x, e;
    // no error
    for (int i = 0; i < 200; i++) apply($urandom, 0, 0, 0, 1, 8'h00, 1);
    // every nonzero pattern in every single symbol
    for (int k = 0; k < 8; k++)
      for (int p = 1; p < 16; p++)
        for (int i = 0; i < 10; i++)
          apply($urandom, 32'(p) << (4*k), 0, 0, 1, 8'(1) << k, 1);
    // bursts over two neighbouring symbols of one row
    for (int i = 0; i < 2000; i++) begin
      int k;
      k = ($urandom % 2) * 4 + ($urandom % 3);
      e = 0;
      while (e[k*4 +: 4] == 0 || e[(k+1)*4 +: 4] == 0) begin
        e = 0;
        e[k*4 +: 8] = 8'($urandom);
      end
      apply($urandom, e, 0, 0, 1, 8'b11 << k, 1);
    end
    // upsets confined to H or confined to V leave the data alone
    for (int i = 0; i < 500; i++) apply($urandom, 0, 20'($urandom), 0, 1, 8'h00, 1);
    for (int i = 0; i < 500; i++) apply($urandom, 0, 0, 16'($urandom), 1, 8'h00, 1);
    // upsets in both H and V: compared with the model only
    for (int i = 0; i < 500; i++) apply($urandom, 0, 20'($urandom), 16'($urandom), 0, 0, 0);
    // the symbol-matrix example: D1-D3, D9-D11, D20-D23, D28-D31
    apply(32'h0, 32'hF0F0_0E0E, 0, 0, 1, 8'b1010_0101, 1);
    // arbitrary data upsets
    for (int i = 0; i < 5000; i++) begin
      x = $urandom;
      e = $urandom & $urandom;
      apply(x, e, 0, 0, correctable(x, e), 0, 0);
    end
    if (n_corrected == 0) begin failures++; $display("FAIL nothing corrected"); end
    $display("corrected upsets: %0d", n_corrected);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
