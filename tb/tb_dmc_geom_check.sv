// tb_dmc_geom_check: checker used by tb_dmc_geometries. It drives one
// dmc_ert_codec of the given geometry and compares it with a generic
// behavioural model of the code written here with loops:
//   - en = 0: h and v of random words (pair sums per row, column XOR);
//   - en = 1: a random nonzero upset inside one random symbol of a stored
//     codeword is corrected and exactly that symbol is flagged.
// It raises done when finished and reports its counts on checks/failures.
module tb_dmc_geom_check #(
  parameter int unsigned SYM_W = 4,
  parameter int unsigned ROWS  = 2,
  parameter int unsigned COLS  = 4,
  parameter int unsigned TRIALS = 1000
) (
  output int   checks,
  output int   failures,
  output logic done
);
  localparam int unsigned NSYM = ROWS * COLS;
  localparam int unsigned DW   = NSYM * SYM_W;
  localparam int unsigned HALF = COLS / 2;
  localparam int unsigned GW   = SYM_W + 1;
  localparam int unsigned HW   = ROWS * HALF * GW;
  localparam int unsigned VW   = COLS * SYM_W;

  logic          en;
  logic [DW-1:0] d_wr, d_rd, u, d_cor;
  logic [HW-1:0] h_st, h, dh;
  logic [VW-1:0] v_st, v, s;
  logic [NSYM-1:0] err_loc;

  dmc_ert_codec #(.SYM_W(SYM_W), .ROWS(ROWS), .COLS(COLS)) dut (.*);

  function automatic logic [DW-1:0] rand_word();
    logic [DW-1:0] w;
    for (int b = 0; b < DW; b += 32) w = (w << 32) | DW'($urandom);
    return w;
  endfunction

  function automatic logic [HW-1:0] model_h(input logic [DW-1:0] x);
    logic [HW-1:0] r;
    r = '0;
    for (int row = 0; row < ROWS; row++)
      for (int c = 0; c < HALF; c++) begin
        int a, b;
        a = 0; b = 0;
        for (int k = 0; k < SYM_W; k++) begin
          a += int'(x[(row*COLS + c)*SYM_W + k]) << k;
          b += int'(x[(row*COLS + c + HALF)*SYM_W + k]) << k;
        end
        for (int k = 0; k < GW; k++) r[(row*HALF + c)*GW + k] = ((a + b) >> k) & 1;
      end
    return r;
  endfunction

  function automatic logic [VW-1:0] model_v(input logic [DW-1:0] x);
    logic [VW-1:0] r;
    for (int j = 0; j < VW; j++) begin
      r[j] = 1'b0;
      for (int row = 0; row < ROWS; row++) r[j] ^= x[row*VW + j];
    end
    return r;
  endfunction

  initial begin
    checks = 0; failures = 0; done = 0;
    for (int i = 0; i < TRIALS; i++) begin
      logic [DW-1:0] x, e;
      int k;
      en = 0; d_wr = rand_word(); d_rd = rand_word(); h_st = '0; v_st = '0;
      #1;
      checks++;
      if (h !== model_h(d_wr) || v !== model_v(d_wr) || u !== d_wr) begin
        failures++;
        $display("FAIL %0dx%0d m=%0d encode", ROWS, COLS, SYM_W);
      end
      x = rand_word();
      k = $urandom % NSYM;
      e = '0;
      while (e == 0) for (int b = 0; b < SYM_W; b++) e[k*SYM_W + b] = 1'($urandom);
      en = 1; d_rd = x ^ e; h_st = model_h(x); v_st = model_v(x);
      #1;
      checks++;
      if (d_cor !== x || err_loc !== (NSYM'(1) << k)) begin
        failures++;
        $display("FAIL %0dx%0d m=%0d symbol %0d not corrected", ROWS, COLS, SYM_W, k);
      end
    end
    done = 1;
  end
endmodule
