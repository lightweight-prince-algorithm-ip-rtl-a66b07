// tb_prince_key_schedule: checks k0' = (k0 >>> 1) ^ (k0 >> 63) on fixed
// values from a software model and on random values against the formula.
module tb_prince_key_schedule;
  logic [63:0] k0, k0p;
  prince_key_schedule u_ks (.k0_i(k0), .k0p_o(k0p));
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
    k0 = 64'h0; #1;                 check("zero", k0p, 64'h0);
    k0 = 64'hffffffffffffffff; #1;  check("ones", k0p, 64'hfffffffffffffffe);
    k0 = 64'h0123456789abcdef; #1;  check("v1", k0p, 64'h8091a2b3c4d5e6f7);
    k0 = 64'h8000000000000001; #1;  check("v2", k0p, 64'hc000000000000001);
    k0 = 64'hfedcba9876543210; #1;  check("v3", k0p, 64'h7f6e5d4c3b2a1909);
    for (int i = 0; i < 100; i++) begin
      k0 = {$urandom, $urandom}; #1;
      check("formula", k0p, {k0[0], k0[63:1]} ^ {63'b0, k0[63]});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
