// uart_baud_gen: baud rate generator of the UART, a plain frequency divider.
//
// It emits a one-cycle tick 16 times per bit period (16x oversampling), so
// the divide ratio is round(CLK_HZ / (16 * BAUD)). Transmitter and receiver
// share the same tick, which keeps both sides at one baud rate. The default
// 9600 baud matches the 8-N-1 serial set-up of the system; CLK_HZ defaults to
// 31.76 MHz, the clock the cipher core is reported to reach.
//
// Follows the reference design: a plain divider shared by both directions, 9600
// baud. Own choices: 16x oversampling and the default clock.
module uart_baud_gen #(
  parameter int unsigned CLK_HZ = 31_760_000,
  parameter int unsigned BAUD   = 9600
) (
  input  logic clk,
  input  logic rst,
  output logic tick16_o
);

  localparam int unsigned DIV = (CLK_HZ + 8 * BAUD) / (16 * BAUD);
  localparam int unsigned W   = (DIV > 1) ? $clog2(DIV) : 1;

  initial assert (DIV >= 1) else $error("CLK_HZ too low for BAUD");

  logic [W-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt      <= '0;
      tick16_o <= 1'b0;
    end else if (cnt == W'(DIV - 1)) begin
      cnt      <= '0;
      tick16_o <= 1'b1;
    end else begin
      cnt      <= cnt + 1'b1;
      tick16_o <= 1'b0;
    end
  end

endmodule
