// dmc_sram: single-port memory array used for both the information and the
// redundancy part of the DMC-protected memory.
//
// 2**ADDR_W words of WIDTH bits, written on the rising clock edge when we is
// high, read synchronously: when re is high, rdata shows mem[addr] from the
// next cycle on and holds it until the next read. The upset port models a
// multiple-cell upset: in a cycle with upset high and we low, the stored
// word at addr is XORed with upset_mask, flipping the marked cells. The
// memory is only named in the DMC architecture; its depth, single read/write
// port, synchronous read and the upset port are this design's choices.
module dmc_sram #(
  parameter int unsigned WIDTH  = dmc_pkg::DATA_W,
  parameter int unsigned ADDR_W = dmc_pkg::ADDR_W
) (
  input  logic              clk,
  input  logic              we,
  input  logic              re,
  input  logic [ADDR_W-1:0] addr,
  input  logic [WIDTH-1:0]  wdata,
  output logic [WIDTH-1:0]  rdata,
  input  logic              upset,
  input  logic [WIDTH-1:0]  upset_mask
);

  logic [WIDTH-1:0] mem [2**ADDR_W];

  always_ff @(posedge clk) begin
    if (we)
      mem[addr] <= wdata;
    else if (upset)
      mem[addr] <= mem[addr] ^ upset_mask;
    if (re)
      rdata <= mem[addr];
  end

endmodule
