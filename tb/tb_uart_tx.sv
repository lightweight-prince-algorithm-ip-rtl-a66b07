// tb_uart_tx: checks the UART transmitter's framing and bit timing.
//
// The bench supplies a tick every 4 cycles (one bit = 64 cycles), sends
// random bytes back to back and decodes the line itself: a falling edge
// starts a frame, each bit is sampled in the middle of its 64-cycle slot.
// Checked: start bit low, eight data bits LSB first, stop bit high, frame
// length of ten bits, ready low while busy.
module tb_uart_tx;
  logic clk = 1'b0, rst = 1'b1;
  logic tick = 1'b0, valid = 1'b0, ready, txd;
  logic [7:0] data = '0;
  int checks = 0, failures = 0;
  int tdiv = 0;
  logic [7:0] sent [$];

  always #5 clk = ~clk;
  always @(posedge clk) begin
    tdiv <= (tdiv + 1) % 4;
    tick <= (tdiv == 3);
  end

  uart_tx dut (.clk, .rst, .tick16_i(tick), .valid_i(valid), .data_i(data), .ready_o(ready), .txd_o(txd));

  task automatic check(input string what, input int got, exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // line decoder
  int frames = 0;
  initial begin
    logic [7:0] b;
    forever begin
      @(negedge txd);
      repeat (32) @(posedge clk);
      check("start bit", txd, 0);
      for (int i = 0; i < 8; i++) begin
        repeat (64) @(posedge clk);
        b[i] = txd;
      end
      repeat (64) @(posedge clk);
      check("stop bit", txd, 1);
      if (sent.size() > 0) check("byte", b, sent.pop_front());
      else check("unexpected frame", 1, 0);
      frames++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    repeat (5) @(posedge clk);
    check("idle line high", txd, 1);
    for (int n = 0; n < 12; n++) begin
      while (!ready) @(posedge clk);
      data  <= (n == 0) ? 8'h55 : (n == 1) ? 8'h80 : 8'($urandom);
      valid <= 1'b1;
      @(posedge clk);
      sent.push_back(data);
      valid <= 1'b0;
      @(posedge clk); #1;
      check("busy after accept", ready, 0);
    end
    while (!ready) @(posedge clk);
    repeat (80) @(posedge clk);
    check("all frames decoded", frames, 12);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
