// tb_dmc_sram: self-checking test of the memory array at 36 bits x 16
// words. A shadow array in the testbench tracks writes and injected upsets;
// reads are checked one cycle after they are issued, and rdata must hold
// its value in cycles without a read.
module tb_dmc_sram;
  localparam int W = 36, AW = 4;
  logic clk = 0, we = 0, re = 0, upset = 0;
  logic [AW-1:0] addr = '0;
  logic [W-1:0]  wdata = '0, rdata, upset_mask = '0;
  logic [W-1:0]  shadow [2**AW];
  int checks = 0, failures = 0;

  dmc_sram #(.WIDTH(W), .ADDR_W(AW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] exp, held;
    // fill
    for (int a = 0; a < 2**AW; a++) begin
      @(negedge clk); we = 1; addr = AW'(a); wdata = {$urandom, $urandom}; shadow[a] = wdata;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 3000; i++) begin
      int op;
      op = $urandom % 3;
      @(negedge clk);
      we = 0; re = 0; upset = 0;
      addr = AW'($urandom);
      if (op == 0) begin
        we = 1; wdata = {$urandom, $urandom}; shadow[addr] = wdata;
      end else if (op == 1) begin
        upset = 1; upset_mask = {$urandom, $urandom}; shadow[addr] ^= upset_mask;
      end else begin
        re = 1; exp = shadow[addr];
        @(negedge clk); re = 0;
        checks++;
        if (rdata !== exp) begin
          failures++;
          $display("FAIL read addr %0d got %h exp %h", addr, rdata, exp);
        end
        held = rdata;
        @(negedge clk);
        checks++;
        if (rdata !== held) begin failures++; $display("FAIL rdata not held"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
