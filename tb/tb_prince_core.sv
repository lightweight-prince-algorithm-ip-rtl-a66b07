// tb_prince_core: checks PRINCE-core on its own.
//
// Fixed answers come from a software model. The published cipher test
// vectors are checked by adding the whitening around the core in the bench
// (k0 before, k0' after). Finally the reflection property that decryption
// relies on: core with k1 ^ alpha inverts core with k1.
module tb_prince_core;
  logic [63:0] x, k, y, kd, z;
  logic [63:0] k0, k0p;
  localparam logic [63:0] ALPHA_TB = 64'hc0ac29b7c97c50dd;
  prince_core u_c  (.state_i(x), .k1_i(k),  .state_o(y));
  prince_core u_cd (.state_i(y), .k1_i(kd), .state_o(z));
  assign kd  = k ^ ALPHA_TB;
  assign k0p = {k0[0], k0[63:1]} ^ {63'b0, k0[63]};
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
  task automatic kat(input logic [63:0] p, key0, key1, c);
    k0 = key0; x = p ^ key0; k = key1; #1;
    check("published vector", y ^ k0p, c);
  endtask
  initial begin
    k = 64'h0f1e2d3c4b5a6978;
    x = 64'h0123456789abcdef; #1; check("core 1", y, 64'h2520310fe6d70301);
    x = 64'h8000000000000001; #1; check("core 2", y, 64'hc67b0ac53650eb49);
    x = 64'h97b750923ceb3ffd; #1; check("core 3", y, 64'hc17acd01cdd24ba8);
    kat(64'h0, 64'h0, 64'h0, 64'h818665aa0d02dfda);
    kat(64'hffffffffffffffff, 64'h0, 64'h0, 64'h604ae6ca03c20ada);
    kat(64'h0, 64'hffffffffffffffff, 64'h0, 64'h9fb51935fc3df524);
    kat(64'h0, 64'h0, 64'hffffffffffffffff, 64'h78a54cbe737bb7ef);
    kat(64'h0123456789abcdef, 64'h0, 64'hfedcba9876543210, 64'hae25ad3ca8fa9ccf);
    for (int i = 0; i < 100; i++) begin
      x = {$urandom, $urandom}; k = {$urandom, $urandom}; #1;
      check("alpha reflection", z, x);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
