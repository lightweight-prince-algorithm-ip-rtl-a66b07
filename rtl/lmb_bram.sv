// lmb_bram: the processor's local memory, one block RAM shared by an
// instruction port and a data port, each with its own LMB controller.
//
// The memory is an array of MEM_BYTES/4 32-bit words with two ports, A for
// the instruction bus and B for the data bus; both can read or write in the
// same cycle. An access is started by LMB_AddrStrobe with LMB_ReadStrobe or
// LMB_WriteStrobe; Sl_Ready answers in the next cycle, with the read word on
// Sl_DBus for reads. Writes honour the four byte enables (big-endian lanes:
// be[3] is bits 31:24). Addresses outside [C_BASEADDR, C_BASEADDR+MEM_BYTES)
// are ignored (no Sl_Ready), leaving room for other memories on the bus. When
// both ports write the same word in the same cycle, port B (data) wins.
//
// Follows the reference design: one BRAM shared by instruction and data LMBs.
// Own choices: size, timing and the write-conflict rule.
module lmb_bram
  import lmb_pkg::*;
#(
  parameter logic [31:0] C_BASEADDR = 32'h0000_0000,
  parameter int unsigned MEM_BYTES  = 8192
) (
  input  logic     clk,
  input  logic     rst,
  input  lmb_req_t ilmb_i,
  output lmb_rsp_t ilmb_o,
  input  lmb_req_t dlmb_i,
  output lmb_rsp_t dlmb_o
);

  localparam int unsigned WORDS = MEM_BYTES / 4;
  localparam int unsigned AW    = $clog2(WORDS);

  logic [31:0] mem [WORDS];

  logic          a_hit, b_hit, a_wr, b_wr, a_rd, b_rd;
  logic [AW-1:0] a_addr, b_addr;
  logic [31:0]   a_q, b_q;
  logic          a_rdy, b_rdy;

  assign a_hit  = ilmb_i.abus >= C_BASEADDR && ilmb_i.abus - C_BASEADDR < MEM_BYTES;
  assign b_hit  = dlmb_i.abus >= C_BASEADDR && dlmb_i.abus - C_BASEADDR < MEM_BYTES;
  assign a_addr = AW'((ilmb_i.abus - C_BASEADDR) >> 2);
  assign b_addr = AW'((dlmb_i.abus - C_BASEADDR) >> 2);
  assign a_wr   = ilmb_i.addrstrobe && ilmb_i.writestrobe && a_hit;
  assign b_wr   = dlmb_i.addrstrobe && dlmb_i.writestrobe && b_hit;
  assign a_rd   = ilmb_i.addrstrobe && ilmb_i.readstrobe  && a_hit;
  assign b_rd   = dlmb_i.addrstrobe && dlmb_i.readstrobe  && b_hit;

  // memory array: both ports in one process so the B-over-A rule is explicit
  always_ff @(posedge clk) begin
    for (int b = 0; b < 4; b++) begin
      if (a_wr && ilmb_i.be[3-b]) mem[a_addr][31-8*b -: 8] <= ilmb_i.wrdbus[31-8*b -: 8];
      if (b_wr && dlmb_i.be[3-b]) mem[b_addr][31-8*b -: 8] <= dlmb_i.wrdbus[31-8*b -: 8];
    end
    if (a_rd) a_q <= mem[a_addr];
    if (b_rd) b_q <= mem[b_addr];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      a_rdy <= 1'b0;
      b_rdy <= 1'b0;
    end else begin
      a_rdy <= a_wr || a_rd;
      b_rdy <= b_wr || b_rd;
    end
  end

  assign ilmb_o.ready = a_rdy;
  assign ilmb_o.dbus  = a_q;
  assign dlmb_o.ready = b_rdy;
  assign dlmb_o.dbus  = b_q;

endmodule
