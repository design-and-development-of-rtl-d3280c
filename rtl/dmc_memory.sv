// dmc_memory: fault-tolerant memory protected by the decimal matrix code.
//
// Write: din is encoded by the shared DMC encoder (En = 0); the 32
// information bits U go to the information SRAM and the 36 redundant bits
// {H, V} to the redundancy SRAM, both at addr, on the clock edge that
// accepts wr. Read: rd at cycle t reads both SRAMs; in cycle t+1 En is high,
// the encoder recomputes H', V' from the word read, the decoder corrects it,
// and dout / err_loc / dh / s are valid while rvalid is high. Reads can be
// issued back to back. A write needs the encoder, so it is not accepted in a
// cycle in which a read is being decoded: wr_ready is low then and the
// caller raises wr only while wr_ready is high. rd and wr must not be high
// in the same cycle.
// error with err_mask_d / err_mask_r flips stored cells of the word at addr
// (a multiple-cell upset) and must not coincide with wr.
//
// The encoder, SRAMs and ERT decoder and their connection follow the DMC
// fault-tolerant memory architecture. The 16-word depth, the one-cycle
// read latency, the wr_ready stall and the upset-injection port are this
// design's choices.
module dmc_memory
  import dmc_pkg::*;
#(
  parameter int unsigned AW = dmc_pkg::ADDR_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              wr,          // write request
  input  logic              rd,          // read request
  input  logic [AW-1:0]     addr,
  input  logic [DATA_W-1:0] din,
  input  logic              error,       // inject an upset at addr
  input  logic [DATA_W-1:0] err_mask_d,  // cells to flip, information part
  input  logic [RED_W-1:0]  err_mask_r,  // cells to flip, redundancy part {H, V}
  output logic              wr_ready,    // a write is accepted this cycle
  output logic              rvalid,      // dout and the syndromes are valid
  output logic [DATA_W-1:0] dout,        // corrected read data
  output logic [NSYM-1:0]   err_loc,     // symbols corrected
  output logic [H_W-1:0]    dh,          // horizontal syndrome
  output logic [V_W-1:0]    s            // vertical syndrome
);

  logic              en;       // ERT enable: a read is being decoded
  logic              we;
  logic [DATA_W-1:0] info_rd;
  redundancy_t       red_rd, red_wr;
  logic [H_W-1:0]    enc_h;
  logic [V_W-1:0]    enc_v;
  logic [DATA_W-1:0] enc_u;

  always_ff @(posedge clk) begin
    if (!rst_n) en <= 1'b0;
    else        en <= rd;
  end

  assign wr_ready = !en;
  assign we       = wr && !en;
  assign rvalid   = en;

  dmc_ert_codec #(.SYM_W(SYM_W), .ROWS(ROWS), .COLS(COLS)) u_codec (
    .en(en), .d_wr(din), .d_rd(info_rd), .h_st(red_rd.h), .v_st(red_rd.v),
    .h(enc_h), .v(enc_v), .u(enc_u),
    .d_cor(dout), .dh(dh), .s(s), .err_loc(err_loc)
  );

  assign red_wr = '{h: enc_h, v: enc_v};

  dmc_sram #(.WIDTH(DATA_W), .ADDR_W(AW)) u_info_sram (
    .clk(clk), .we(we), .re(rd), .addr(addr), .wdata(enc_u), .rdata(info_rd),
    .upset(error), .upset_mask(err_mask_d)
  );

  dmc_sram #(.WIDTH(RED_W), .ADDR_W(AW)) u_red_sram (
    .clk(clk), .we(we), .re(rd), .addr(addr), .wdata(red_wr), .rdata(red_rd),
    .upset(error), .upset_mask(err_mask_r)
  );

  // Handshake rules.
  a_no_rd_wr: assert property (@(posedge clk) disable iff (!rst_n) !(rd && wr))
    else $error("rd and wr in the same cycle");
  a_wr_ready: assert property (@(posedge clk) disable iff (!rst_n) wr |-> wr_ready)
    else $error("wr while a read is being decoded");
  a_err_wr: assert property (@(posedge clk) disable iff (!rst_n) !(error && wr))
    else $error("upset injection during a write");

endmodule
