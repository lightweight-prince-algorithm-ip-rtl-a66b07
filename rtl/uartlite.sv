// uartlite: the RS-232 UART peripheral on the PLB, which links the system to
// the GSM modem (9600 baud, 8-N-1).
//
// It holds a transmitter, a receiver, a shared baud rate generator and a
// 16-entry FIFO in each direction. Register map (byte offsets from C_BASEADDR):
//   0x0  RX FIFO   R  oldest received byte in bits 7:0; reading removes it
//   0x4  TX FIFO   W  byte to send in bits 7:0 (ignored when the FIFO is full)
//   0x8  STATUS    R  bit 0 rx data valid, 1 rx FIFO full, 2 tx FIFO empty,
//                     3 tx FIFO full, 5 overrun, 6 frame error;
//                     reading STATUS clears bits 5 and 6
//   0xC  CONTROL   W  bit 0 clears the tx FIFO, bit 1 clears the rx FIFO
// A byte that arrives while the rx FIFO is full is dropped and sets overrun.
// Reading the RX FIFO while it is empty returns zero.
//
// Follows the reference design: RX/TX/STATUS offsets and 9600 8-N-1. Own
// choices: FIFO depth, status bit layout, CONTROL register.
module uartlite
  import plb_pkg::*;
#(
  parameter logic [31:0]  C_BASEADDR = 32'h8400_0000,
  parameter logic [31:0]  C_HIGHADDR = 32'h8400_00FF,
  parameter int unsigned  CLK_HZ     = 31_760_000,
  parameter int unsigned  BAUD       = 9600,
  parameter int unsigned  FIFO_DEPTH = 16
) (
  input  logic     SPLB_Clk,
  input  logic     SPLB_Rst,
  input  plb_req_t plb_i,
  output plb_rsp_t sl_o,
  input  logic     rx,
  output logic     tx
);

  localparam int unsigned CW = $clog2(FIFO_DEPTH) + 1;

  logic        wr, rd;
  logic [7:0]  addr;
  logic [3:0]  be;
  logic [31:0] wdata, rdata;

  logic        tick16;
  logic        tx_ready, tx_rd, tx_empty, tx_full;
  logic [7:0]  tx_byte;
  logic        rx_valid, rx_ferr, rx_rd, rx_empty, rx_full;
  logic [7:0]  rx_byte, rx_head;
  logic        tx_clear, rx_clear;
  logic        overrun, frame_err;
  logic [CW-1:0] tx_count, rx_count;

  plb_slave_if #(.C_BASEADDR(C_BASEADDR), .C_HIGHADDR(C_HIGHADDR)) u_if (
    .clk(SPLB_Clk), .rst(SPLB_Rst), .plb_i, .sl_o,
    .wr_o(wr), .rd_o(rd), .addr_o(addr), .be_o(be), .wdata_o(wdata), .rdata_i(rdata));

  uart_baud_gen #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) u_baud (
    .clk(SPLB_Clk), .rst(SPLB_Rst), .tick16_o(tick16));

  assign tx_clear = wr && addr[3:2] == 2'd3 && be[0] && wdata[0];
  assign rx_clear = wr && addr[3:2] == 2'd3 && be[0] && wdata[1];

  sync_fifo #(.WIDTH(8), .DEPTH(FIFO_DEPTH)) u_txf (
    .clk(SPLB_Clk), .rst(SPLB_Rst), .clear_i(tx_clear),
    .wr_i(wr && addr[3:2] == 2'd1 && be[0]), .wdata_i(wdata[7:0]),
    .rd_i(tx_rd), .rdata_o(tx_byte), .empty_o(tx_empty), .full_o(tx_full),
    .count_o(tx_count));

  assign tx_rd = tx_ready && !tx_empty;

  uart_tx u_tx (
    .clk(SPLB_Clk), .rst(SPLB_Rst), .tick16_i(tick16),
    .valid_i(tx_rd), .data_i(tx_byte), .ready_o(tx_ready), .txd_o(tx));

  uart_rx u_rx (
    .clk(SPLB_Clk), .rst(SPLB_Rst), .tick16_i(tick16), .rxd_i(rx),
    .valid_o(rx_valid), .data_o(rx_byte), .frame_err_o(rx_ferr));

  assign rx_rd = rd && addr[3:2] == 2'd0;

  sync_fifo #(.WIDTH(8), .DEPTH(FIFO_DEPTH)) u_rxf (
    .clk(SPLB_Clk), .rst(SPLB_Rst), .clear_i(rx_clear),
    .wr_i(rx_valid), .wdata_i(rx_byte),
    .rd_i(rx_rd), .rdata_o(rx_head), .empty_o(rx_empty), .full_o(rx_full),
    .count_o(rx_count));

  always_ff @(posedge SPLB_Clk) begin
    if (SPLB_Rst) begin
      overrun   <= 1'b0;
      frame_err <= 1'b0;
    end else begin
      if (rd && addr[3:2] == 2'd2) begin
        overrun   <= 1'b0;
        frame_err <= 1'b0;
      end
      if (rx_valid && rx_full) overrun   <= 1'b1;
      if (rx_valid && rx_ferr) frame_err <= 1'b1;
    end
  end

  always_comb begin
    rdata = '0;
    unique case (addr[3:2])
      2'd0: rdata[7:0] = rx_empty ? 8'h00 : rx_head;
      2'd2: rdata[6:0] = {frame_err, overrun, 1'b0, tx_full, tx_empty, rx_full, !rx_empty};
      default: rdata = '0;
    endcase
  end

endmodule
