// tb_prince_mprime_layer: checks the linear layer M'.
//
// Known answers come from an independent software model of the PRINCE matrix.
// Every single-bit input must give an output of weight 3 (each column of M'
// has three ones), M' must be linear, and M'(M'(x)) = x (an involution).
module tb_prince_mprime_layer;
  logic [63:0] x, y, z, a, b, ya, yb;
  prince_mprime_layer u_m  (.state_i(x), .state_o(y));
  prince_mprime_layer u_m2 (.state_i(y), .state_o(z));
  prince_mprime_layer u_a  (.state_i(a), .state_o(ya));
  prince_mprime_layer u_b  (.state_i(b), .state_o(yb));
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
    x = 64'h0123456789abcdef; #1; check("M' 1", y, 64'h3012456789abfcde);
    x = 64'h8000000000000001; #1; check("M' 2", y, 64'h0888000000000111);
    x = 64'hfedcba9876543210; #1; check("M' 3", y, 64'hcfedba9876540321);
    x = 64'h97b750923ceb3ffd; #1; check("M' 4", y, 64'hd1f1b6de205d9513);
    x = 64'hea7b5bf55eb561a4; #1; check("M' 5", y, 64'h37a6399729c2bd69);
    for (int i = 0; i < 64; i++) begin
      x = 64'd1 << i; #1;
      check("column weight 3", 64'($countones(y)), 64'd3);
    end
    for (int i = 0; i < 100; i++) begin
      x = {$urandom, $urandom}; a = {$urandom, $urandom}; b = x ^ a; #1;
      check("involution", z, x);
      check("linearity", ya ^ yb, y);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
