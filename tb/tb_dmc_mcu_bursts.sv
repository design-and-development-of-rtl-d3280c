// tb_dmc_mcu_bursts: multiple-cell-upset sweep through the whole memory.
//
// The 68 cells of a codeword are placed in three physical rows, as in the
// DMC symbol-matrix layout:
//   row 0: D15 .. D0,  H9 .. H0     (26 cells)
//   row 1: D31 .. D16, H19 .. H10   (26 cells)
//   row 2: V15 .. V0                (16 cells)
// For every row, every burst length 1..5 and every start position, a random
// word is written, all cells of the burst are flipped, and the word is read
// back: it must come out exactly as written (the 5-bit correction claim for
// the 2 x 4, m = 4 configuration). Vertical two-cell upsets (Dj with Dj+16)
// are also injected and the number corrected is reported for information
// only: both cells sit in the same vertical parity column, so the rule
// used by the locator cannot correct them.
module tb_dmc_mcu_bursts;
  logic        clk = 0, rst_n = 0, wr = 0, rd = 0, error = 0;
  logic [3:0]  addr = '0;
  logic [31:0] din = '0, err_mask_d = '0, dout;
  logic [35:0] err_mask_r = '0;
  logic        wr_ready, rvalid;
  logic [7:0]  err_loc;
  logic [19:0] dh;
  logic [15:0] s;
  int checks = 0, failures = 0, n_bursts = 0, n_fixed = 0, n_vert = 0, n_vert_fixed = 0;

  dmc_memory dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Cell c (0 = leftmost) of physical row r as a 68-bit mask {data, H, V}.
  function automatic logic [67:0] cell_mask(input int r, input int c);
    logic [67:0] m;
    m = '0;
    if (r < 2) begin
      if (c < 16) m[36 + r*16 + (15 - c)] = 1'b1;      // D(r*16 + 15 - c)
      else        m[16 + r*10 + (25 - c)] = 1'b1;      // H(r*10 + 25 - c)
    end else begin
      m[15 - c] = 1'b1;                                // V(15 - c)
    end
    return m;
  endfunction

  // Write x at a, flip the cells of m, read back; returns the word read.
  task automatic trial(input logic [3:0] a, input logic [31:0] x,
                       input logic [67:0] m, output logic [31:0] y);
    @(negedge clk);
    while (!wr_ready) @(negedge clk);
    wr = 1; addr = a; din = x;
    @(negedge clk);
    wr = 0; error = 1; err_mask_d = m[67:36]; err_mask_r = m[35:0];
    @(negedge clk);
    error = 0; rd = 1;
    @(negedge clk);
    rd = 0;
    checks++;
    if (!rvalid) begin failures++; $display("FAIL rvalid low one cycle after rd"); end
    y = dout;
  endtask

  initial begin
    logic [31:0] x, y;
    logic [67:0] m;
    int width;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int rep = 0; rep < 4; rep++)
      for (int r = 0; r < 3; r++) begin
        width = (r < 2) ? 26 : 16;
        for (int len = 1; len <= 5; len++)
          for (int p = 0; p + len <= width; p++) begin
            m = '0;
            for (int c = p; c < p + len; c++) m |= cell_mask(r, c);
            x = $urandom;
            trial(4'(n_bursts), x, m, y);
            n_bursts++;
            checks++;
            if (y !== x) begin
              failures++;
              $display("FAIL row %0d len %0d start %0d: wrote %h read %h", r, len, p, x, y);
            end else n_fixed++;
          end
      end
    // vertical pairs, reported only
    for (int j = 0; j < 16; j++) begin
      x = $urandom;
      m = '0;
      m[36 + j] = 1'b1;
      m[36 + j + 16] = 1'b1;
      trial(4'(j), x, m, y);
      n_vert++;
      if (y === x) n_vert_fixed++;
    end
    $display("horizontal bursts of 1..5 cells: %0d injected, %0d corrected", n_bursts, n_fixed);
    $display("vertical two-cell upsets: %0d injected, %0d corrected", n_vert, n_vert_fixed);
    if (n_bursts == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
