// tb_uart_rx: checks the UART receiver.
//
// The bench drives frames on the line with a bit time of 64 cycles and gives
// the receiver a tick every 4 cycles. Checked: random bytes are received
// intact; a frame with a low stop bit is flagged with frame_err_o; a short
// low glitch (shorter than half a bit) is not taken as a start bit.
module tb_uart_rx;
  logic clk = 1'b0, rst = 1'b1;
  logic tick = 1'b0, rxd = 1'b1, valid, ferr;
  logic [7:0] data;
  int checks = 0, failures = 0;
  int tdiv = 0, nrx = 0;
  logic [7:0] got_q [$];
  logic       ferr_q [$];

  always #5 clk = ~clk;
  always @(posedge clk) begin
    tdiv <= (tdiv + 1) % 4;
    tick <= (tdiv == 3);
  end

  uart_rx dut (.clk, .rst, .tick16_i(tick), .rxd_i(rxd), .valid_o(valid), .data_o(data), .frame_err_o(ferr));

  always @(posedge clk) if (valid && !rst) begin
    got_q.push_back(data);
    ferr_q.push_back(ferr);
    nrx++;
  end

  task automatic check(input string what, input int got, exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  task automatic send(input logic [7:0] b, input logic stop = 1'b1);
    rxd <= 1'b0; repeat (64) @(posedge clk);
    for (int i = 0; i < 8; i++) begin rxd <= b[i]; repeat (64) @(posedge clk); end
    rxd <= stop; repeat (64) @(posedge clk);
    rxd <= 1'b1; repeat (64) @(posedge clk);
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] b;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    repeat (10) @(posedge clk);
    for (int n = 0; n < 10; n++) begin
      b = (n == 0) ? 8'h41 : 8'($urandom);
      send(b);
      check("one byte per frame", got_q.size(), 1);
      if (got_q.size() > 0) begin
        check("byte", got_q.pop_front(), b);
        check("no frame error", ferr_q.pop_front(), 0);
      end
    end
    send(8'h3C, 1'b0);
    check("frame error frame received", got_q.size(), 1);
    if (got_q.size() > 0) begin
      void'(got_q.pop_front());
      check("frame error flagged", ferr_q.pop_front(), 1);
    end
    // glitch of 12 cycles (less than half of the 64-cycle bit)
    rxd <= 1'b0; repeat (12) @(posedge clk); rxd <= 1'b1;
    repeat (800) @(posedge clk);
    check("glitch ignored", got_q.size(), 0);
    send(8'hA7);
    check("byte after glitch", got_q.size() > 0 ? got_q.pop_front() : 0, 8'hA7);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
