// tb_prince_shift_rows: checks the SR and SR^-1 nibble permutations against
// values from an independent software model, and SR^-1(SR(x)) = x.
module tb_prince_shift_rows;
  logic [63:0] x, y, yi, z;
  prince_shift_rows #(.INVERSE(1'b0)) u_sr  (.state_i(x), .state_o(y));
  prince_shift_rows #(.INVERSE(1'b1)) u_sri (.state_i(x), .state_o(yi));
  prince_shift_rows #(.INVERSE(1'b1)) u_rt  (.state_i(y), .state_o(z));
int checks = 0, failures = 0;

  task automatic check(input string what, input logic [63:0] got, exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    x = 64'h0123456789abcdef; #1;
    check("SR", y, 64'h05af49e38d27c16b); check("SR^-1", yi, 64'h0da741eb852fc963);
    x = 64'h8000000000000001; #1;
    check("SR 2", y, 64'h8001000000000000); check("SR^-1 2", yi, 64'h8000000000010000);
    x = 64'hfedcba9876543210; #1;
    check("SR 3", y, 64'hfa50b61c72d83e94); check("SR^-1 3", yi, 64'hf258be147ad0369c);
    for (int i = 0; i < 100; i++) begin
      x = {$urandom, $urandom}; #1;
      check("SR^-1(SR(x))", z, x);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
