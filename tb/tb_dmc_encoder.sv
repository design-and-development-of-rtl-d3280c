// tb_dmc_encoder: self-checking test of the DMC encoder at its 32-bit
// defaults. Reference values are written out per check group from the
// encoding equations (H4-H0 = D3-D0 + D11-D8, H9-H5 = D7-D4 + D15-D12,
// H14-H10 = D19-D16 + D27-D24, H19-H15 = D23-D20 + D31-D28, Vj = Dj ^ Dj+16).
// Directed words (all zeros, all ones, walking ones) are followed by random
// ones.
module tb_dmc_encoder;
  logic [31:0] d, u;
  logic [19:0] h;
  logic [15:0] v;
  int checks = 0, failures = 0;

  dmc_encoder dut (.d(d), .h(h), .v(v), .u(u));

  function automatic logic [19:0] ref_h(input logic [31:0] x);
    int g0, g1, g2, g3;
    g0 = int'(x[3:0])   + int'(x[11:8]);
    g1 = int'(x[7:4])   + int'(x[15:12]);
    g2 = int'(x[19:16]) + int'(x[27:24]);
    g3 = int'(x[23:20]) + int'(x[31:28]);
    return {g3[4:0], g2[4:0], g1[4:0], g0[4:0]};
  endfunction

  function automatic logic [15:0] ref_v(input logic [31:0] x);
    logic [15:0] r;
    for (int j = 0; j < 16; j++) r[j] = x[j] ^ x[j+16];
    return r;
  endfunction

  task automatic check(input logic [31:0] x);
    d = x;
    #1;
    checks++;
    if (h !== ref_h(x) || v !== ref_v(x) || u !== x) begin
      failures++;
      $display("FAIL d=%h h=%h (exp %h) v=%h (exp %h) u=%h", x, h, ref_h(x), v, ref_v(x), u);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(32'h0);
    check(32'hFFFF_FFFF);
    // all symbols 15: every group sum is 30
    if (1) begin
      d = '1; #1; checks++;
      if (h !== {4{5'd30}}) begin failures++; $display("FAIL max sum h=%h", h); end
    end
    for (int i = 0; i < 32; i++) check(32'h1 << i);
    for (int i = 0; i < 2000; i++) check($urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
