// tb_dmc_memory: end-to-end test of the DMC-protected memory at its default
// size (32-bit words, 16 words). Every address is written with a random
// word; then, round after round, upsets are injected into stored words and
// the words are read back. Checked:
//   - read latency: rvalid is high exactly in the cycle after rd, and only
//     then;
//   - no upset, upsets inside one symbol, bursts across two neighbouring
//     symbols of a row, the four-symbol example upset (D1-D3, D9-D11,
//     D20-D23, D28-D31), upsets in H only or V only: dout equals the word
//     written, and err_loc names exactly the symbols hit;
//   - a write requested right after a read waits for wr_ready (the encoder
//     is busy recomputing check bits) and then lands correctly.
// Each mechanism is counted (encode, decode, correction, horizontal-only and
// vertical-only redundancy upsets, write stall, back-to-back reads) and a
// mechanism that never occurred counts as a failure.
module tb_dmc_memory;
  logic        clk = 0, rst_n = 0, wr = 0, rd = 0, error = 0;
  logic [3:0]  addr = '0;
  logic [31:0] din = '0, err_mask_d = '0, dout;
  logic [35:0] err_mask_r = '0;
  logic        wr_ready, rvalid;
  logic [7:0]  err_loc;
  logic [19:0] dh;
  logic [15:0] s;

  logic [31:0] golden [16];
  int checks = 0, failures = 0, cycle = 0;
  int n_encode = 0, n_decode = 0, n_correct = 0, n_red_h = 0, n_red_v = 0;
  int n_stall = 0, n_b2b = 0;

  dmc_memory dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // rvalid must follow rd by exactly one cycle
  logic rd_q = 0;
  always @(posedge clk) begin
    if (rst_n) begin
      checks++;
      if (rvalid !== rd_q) begin
        failures++;
        $display("FAIL cycle %0d: rvalid=%b, rd one cycle earlier=%b", cycle, rvalid, rd_q);
      end
      if (rvalid) n_decode++;
    end
    rd_q <= rd && rst_n;
  end

  // Called at a falling edge; drives wr from this cycle on.
  task automatic do_write(input logic [3:0] a, input logic [31:0] x);
    rd = 0; error = 0;
    if (!wr_ready) begin
      n_stall++;
      while (!wr_ready) @(negedge clk);
    end
    wr = 1; addr = a; din = x;
    golden[a] = x;
    n_encode++;
    @(negedge clk);
    wr = 0;
  endtask

  task automatic inject(input logic [3:0] a, input logic [31:0] md, input logic [35:0] mr);
    @(negedge clk);
    wr = 0; rd = 0;
    error = 1; addr = a; err_mask_d = md; err_mask_r = mr;
    @(negedge clk);
    error = 0;
  endtask

  // Issue a read at the next edge, check the result in the cycle after.
  // keep_rd issues another read in the checking cycle (back to back).
  task automatic do_read(input logic [3:0] a, input logic [7:0] exp_loc,
                         input logic [3:0] next_a, input bit keep_rd);
    @(negedge clk);
    wr = 0; error = 0; rd = 1; addr = a;
    @(negedge clk);
    rd = keep_rd; addr = next_a;
    if (keep_rd) n_b2b++;
    checks++;
    if (!rvalid || dout !== golden[a] || err_loc !== exp_loc) begin
      failures++;
      $display("FAIL read addr %0d: rvalid=%b dout=%h exp %h err_loc=%b exp %b",
               a, rvalid, dout, golden[a], err_loc, exp_loc);
    end
    if (err_loc != 0) n_correct++;
    if (err_loc == 0 && dh != 0 && s == 0) n_red_h++;
    if (err_loc == 0 && dh == 0 && s != 0) n_red_v++;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int a = 0; a < 16; a++) do_write(4'(a), $urandom);
    for (int round = 0; round < 400; round++) begin
      logic [3:0] a;
      logic [31:0] md;
      logic [35:0] mr;
      logic [7:0] loc;
      int kind, k;
      a = 4'($urandom);
      md = 0; mr = 0; loc = 0;
      kind = round % 6;
      case (kind)
        0: ;                                             // clean read
        1: begin                                         // one symbol
             k = $urandom % 8;
             while (md == 0) md = 32'($urandom % 16) << (4*k);
             loc = 8'(1) << k;
           end
        2: begin                                         // burst over two symbols of a row
             k = ($urandom % 2) * 4 + ($urandom % 3);
             while (md[k*4 +: 4] == 0 || md[(k+1)*4 +: 4] == 0) begin
               md = 0;
               md[k*4 +: 8] = 8'($urandom);
             end
             loc = 8'b11 << k;
           end
        3: begin                                         // example four-symbol upset
             do_write(a, $urandom & 32'h0F0F_F1F1);      // those cells hold 0
             md = 32'hF0F0_0E0E;
             loc = 8'b1010_0101;
           end
        4: mr = {20'($urandom | 1), 16'h0};              // H only
        default: mr = {20'h0, 16'($urandom | 1)};        // V only
      endcase
      inject(a, md, mr);
      do_read(a, loc, a, (round % 4) == 1);
      if ((round % 4) == 1) begin
        // back-to-back read of the same (already corrupted) word
        @(negedge clk);
        rd = 0;
        checks++;
        if (!rvalid || dout !== golden[a] || err_loc !== loc) begin
          failures++;
          $display("FAIL back-to-back read addr %0d: dout=%h exp %h", a, dout, golden[a]);
        end
      end
      // scrub the word: a write right after a read has to wait for the encoder
      do_write(a, $urandom);
      // and read it back once clean
      do_read(a, 8'h00, a, 0);
    end
    @(negedge clk);
    rd = 0;
    @(negedge clk);
    $display("encode=%0d decode=%0d correct=%0d red_h=%0d red_v=%0d stall=%0d b2b=%0d",
             n_encode, n_decode, n_correct, n_red_h, n_red_v, n_stall, n_b2b);
    if (n_encode == 0) begin failures++; $display("FAIL no encode"); end
    if (n_decode == 0) begin failures++; $display("FAIL no decode"); end
    if (n_correct == 0) begin failures++; $display("FAIL no correction"); end
    if (n_red_h == 0) begin failures++; $display("FAIL no H-only upset"); end
    if (n_red_v == 0) begin failures++; $display("FAIL no V-only upset"); end
    if (n_stall == 0) begin failures++; $display("FAIL no write stall"); end
    if (n_b2b == 0) begin failures++; $display("FAIL no back-to-back read"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
