// tb_prince_middle: checks the middle involution S^-1(M'(S(x))) against a
// software model and that applying it twice gives back x.
module tb_prince_middle;
  logic [63:0] x, y, z;
  prince_middle u_m  (.state_i(x), .state_o(y));
  prince_middle u_m2 (.state_i(y), .state_o(z));
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
    x = 64'h0123456789abcdef; #1; check("mid 1", y, 64'h088c1f82136ec9e8);
    x = 64'h8000000000000001; #1; check("mid 2", y, 64'hc389000000001101);
    x = 64'hfedcba9876543210; #1; check("mid 3", y, 64'h8195ae90897c8cc2);
    x = 64'hea7b5bf55eb561a4; #1; check("mid 4", y, 64'h57feabb57ad7ace1);
    for (int i = 0; i < 100; i++) begin
      x = {$urandom, $urandom}; #1;
      check("involution", z, x);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
