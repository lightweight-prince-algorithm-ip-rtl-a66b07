// tb_uart_baud_gen: checks the tick spacing of the baud rate generator.
//
// With the default 31.76 MHz clock and 9600 baud the 16x tick must come every
// round(31.76e6 / 153600) = 207 cycles; a second instance with 1 MHz and
// 9600 baud must tick every 7 cycles (6.51 rounded).
module tb_uart_baud_gen;
  logic clk = 1'b0, rst = 1'b1;
  logic t_def, t_small;
  int checks = 0, failures = 0;
  int last_def = -1, last_small = -1, cyc = 0, n_def = 0, n_small = 0;

  always #5 clk = ~clk;

  uart_baud_gen u_def (.clk, .rst, .tick16_o(t_def));
  uart_baud_gen #(.CLK_HZ(1_000_000), .BAUD(9600)) u_small (.clk, .rst, .tick16_o(t_small));

  task automatic check(input string what, input int got, exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (!rst) begin
    cyc++;
    if (t_def) begin
      if (last_def >= 0) check("default tick spacing", cyc - last_def, 207);
      last_def = cyc; n_def++;
    end
    if (t_small) begin
      if (last_small >= 0) check("small tick spacing", cyc - last_small, 7);
      last_small = cyc; n_small++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    repeat (207 * 20 + 5) @(posedge clk);
    check("default ticks seen", n_def, 20);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
