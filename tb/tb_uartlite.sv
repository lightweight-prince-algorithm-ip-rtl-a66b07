// tb_uartlite: checks the PLB UART with its serial output looped back to its
// input.
//
// The clock and baud rate are scaled (1 MHz, 62500 baud: one tick per cycle,
// 16 cycles per bit) to keep the run short. Checked through PLB reads and
// writes: STATUS after reset (tx empty, rx empty); bytes written to TX FIFO
// come back in order from RX FIFO; the bit time on the line is 16 cycles;
// the rx-valid and rx-full status bits; overrun when a byte arrives with the
// RX FIFO full, and that reading STATUS clears it; the CONTROL register's
// FIFO clear.
module tb_uartlite;
  import plb_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  plb_req_t req;
  plb_rsp_t rsp;
  logic line;
  int checks = 0, failures = 0;
  localparam logic [31:0] BASE = 32'h8400_0000;

  always #5 clk = ~clk;

  uartlite #(.C_BASEADDR(BASE), .C_HIGHADDR(BASE + 32'hFF), .CLK_HZ(1_000_000), .BAUD(62_500),
             .FIFO_DEPTH(16)) dut (
    .SPLB_Clk(clk), .SPLB_Rst(rst), .plb_i(req), .sl_o(rsp), .rx(line), .tx(line));

  task automatic check(input string what, input int got, exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  task automatic plb_write(input logic [31:0] a, input logic [31:0] d);
    req.pavalid <= 1'b1; req.rnw <= 1'b0; req.abus <= a;
    req.be <= '1; req.wrdbus <= {4{d}};
    do @(posedge clk); while (!rsp.addrack);
    req.pavalid <= 1'b0;
    @(posedge clk);
  endtask

  task automatic plb_read(input logic [31:0] a, output logic [31:0] d);
    req.pavalid <= 1'b1; req.rnw <= 1'b1; req.abus <= a; req.be <= '1;
    do @(posedge clk); while (!rsp.addrack);
    d = rsp.rddbus[127 - 32*a[3:2] -: 32];
    req.pavalid <= 1'b0;
    @(posedge clk);
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // measure the bit time of the first frame's start bit
  int bit_len = 0;
  initial begin
    int t0;
    @(negedge rst);
    @(negedge line); t0 = $time;
    @(posedge line); bit_len = ($time - t0) / 10;
  end

  initial begin
    logic [31:0] st, d;
    string msg = "AT+CMGS";
    req = '0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    repeat (2) @(posedge clk);
    plb_read(BASE + 8, st);
    check("status after reset", st[6:0], 7'b000_0100);
    // send a string and read it back
    for (int i = 0; i < msg.len(); i++) plb_write(BASE + 4, {24'h0, msg[i]});
    plb_read(BASE + 8, st);
    check("tx not empty while sending", st[2], 0);
    repeat (16 * 10 * msg.len() + 100) @(posedge clk);
    check("start bit length (A = 0x41, LSB 1 after start)", bit_len, 16);
    for (int i = 0; i < msg.len(); i++) begin
      plb_read(BASE + 8, st);
      check("rx valid", st[0], 1);
      plb_read(BASE + 0, d);
      check("echoed byte", d, msg[i]);
    end
    plb_read(BASE + 8, st);
    check("rx empty, tx empty", st[6:0], 7'b000_0100);
    plb_read(BASE + 0, d);
    check("empty rx reads zero", d, 0);
    // overrun: 17 bytes into a 16-entry RX FIFO
    for (int i = 0; i < 17; i++) begin
      plb_write(BASE + 4, 32'h30 + i);
      if (i == 15) repeat (16 * 10 * 15) @(posedge clk);   // let the TX FIFO drain
    end
    repeat (16 * 10 * 4) @(posedge clk);
    plb_read(BASE + 8, st);
    check("rx full", st[1], 1);
    check("overrun", st[5], 1);
    check("no frame error", st[6], 0);
    plb_read(BASE + 8, st);
    check("overrun cleared by status read", st[5], 0);
    plb_read(BASE + 0, d);
    check("oldest byte kept", d, 32'h30);
    // clear RX FIFO through CONTROL
    plb_write(BASE + 12, 32'h2);
    plb_read(BASE + 8, st);
    check("rx cleared", st[1:0], 2'b00);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
