// prince_soc: the secure-messaging system on one FPGA: two PRINCE IP cores
// (one encrypting, one decrypting), the RS-232 UART that talks to the GSM
// modem, the PLB that joins them, and the processor's local block RAM.
//
// The processor itself is not part of this RTL. Its four bus ports are the
// ports of this module: the data and instruction PLB master ports (dplb_*,
// iplb_*), which reach the peripherals through plb_bus, and the data and
// instruction LMB ports (dlmb_*, ilmb_*), which reach lmb_bram.
//
// Memory map on the PLB (32-bit byte addresses):
//   0x8441_8000 - 0x8441_80FF  PRINCE encryption IP core (prince_ip)
//   0x8441_4000 - 0x8441_40FF  PRINCE decryption IP core (prince_ip)
//   0x8400_0000 - 0x8400_00FF  UART (uartlite): RX 0x0, TX 0x4, STATUS 0x8
// Local memory on the LMBs: MEM_BYTES of block RAM from address 0.
//
// A message is secured by writing its 64-bit block and the 128-bit key into
// the encryption core, reading back the ciphertext one clock later and
// pushing its bytes to the UART; received bytes are read from the UART and
// run through the decryption core the same way. All logic runs on one clock,
// clk, with a synchronous active-high reset, rst.
//
// Follows the reference design: the peripherals, buses and base addresses. Own
// choices: the 256-byte windows, memory size and the clock default.
module prince_soc
  import plb_pkg::*;
  import lmb_pkg::*;
#(
  parameter logic [31:0] ENC_BASEADDR  = 32'h8441_8000,
  parameter logic [31:0] DEC_BASEADDR  = 32'h8441_4000,
  parameter logic [31:0] UART_BASEADDR = 32'h8400_0000,
  parameter int unsigned CLK_HZ        = 31_760_000,
  parameter int unsigned BAUD          = 9600,
  parameter int unsigned MEM_BYTES     = 8192
) (
  input  logic      clk,
  input  logic      rst,
  // processor PLB master ports
  input  plb_mreq_t dplb_req_i,
  output plb_mrsp_t dplb_rsp_o,
  input  plb_mreq_t iplb_req_i,
  output plb_mrsp_t iplb_rsp_o,
  // processor LMB ports
  input  lmb_req_t  ilmb_req_i,
  output lmb_rsp_t  ilmb_rsp_o,
  input  lmb_req_t  dlmb_req_i,
  output lmb_rsp_t  dlmb_rsp_o,
  // serial line to the GSM modem
  input  logic      uart_rx,
  output logic      uart_tx
);

  plb_mreq_t m_req [2];
  plb_mrsp_t m_rsp [2];
  plb_req_t  s_req;
  plb_rsp_t  s_rsp [3];

  assign m_req[0]   = dplb_req_i;
  assign m_req[1]   = iplb_req_i;
  assign dplb_rsp_o = m_rsp[0];
  assign iplb_rsp_o = m_rsp[1];

  plb_bus #(.NUM_MASTERS(2), .NUM_SLAVES(3)) u_plb (
    .clk, .rst, .m_req_i(m_req), .m_rsp_o(m_rsp), .s_req_o(s_req), .s_rsp_i(s_rsp));

  prince_ip #(.DECRYPT(1'b0), .C_BASEADDR(ENC_BASEADDR),
              .C_HIGHADDR(ENC_BASEADDR + 32'hFF)) u_enc_ip (
    .SPLB_Clk(clk), .SPLB_Rst(rst), .plb_i(s_req), .sl_o(s_rsp[0]));

  prince_ip #(.DECRYPT(1'b1), .C_BASEADDR(DEC_BASEADDR),
              .C_HIGHADDR(DEC_BASEADDR + 32'hFF)) u_dec_ip (
    .SPLB_Clk(clk), .SPLB_Rst(rst), .plb_i(s_req), .sl_o(s_rsp[1]));

  uartlite #(.C_BASEADDR(UART_BASEADDR), .C_HIGHADDR(UART_BASEADDR + 32'hFF),
             .CLK_HZ(CLK_HZ), .BAUD(BAUD)) u_uart (
    .SPLB_Clk(clk), .SPLB_Rst(rst), .plb_i(s_req), .sl_o(s_rsp[2]),
    .rx(uart_rx), .tx(uart_tx));

  lmb_bram #(.C_BASEADDR(32'h0), .MEM_BYTES(MEM_BYTES)) u_bram (
    .clk, .rst, .ilmb_i(ilmb_req_i), .ilmb_o(ilmb_rsp_o),
    .dlmb_i(dlmb_req_i), .dlmb_o(dlmb_rsp_o));

endmodule
