// tb_prince_round: checks a forward round (R3) and an inverse round (R7^-1)
// against a software model, and that R_i^-1 undoes R_i for every round
// constant index with random states and keys.
module tb_prince_round;
  logic [63:0] x, k, yf, yi;
  logic [63:0] rt [1:10];
  logic [63:0] fw [1:10];
  prince_round #(.INVERSE(1'b0), .RC_INDEX(3)) u_f (.state_i(x), .k1_i(k), .state_o(yf));
  prince_round #(.INVERSE(1'b1), .RC_INDEX(7)) u_i (.state_i(x), .k1_i(k), .state_o(yi));
  for (genvar g = 1; g <= 10; g++) begin : g_rt
    prince_round #(.INVERSE(1'b0), .RC_INDEX(g)) u_f (.state_i(x), .k1_i(k), .state_o(fw[g]));
    prince_round #(.INVERSE(1'b1), .RC_INDEX(g)) u_i (.state_i(fw[g]), .k1_i(k), .state_o(rt[g]));
  end
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
    k = 64'h0f1e2d3c4b5a6978;
    x = 64'h0123456789abcdef; #1; check("R3 1", yf, 64'hb3a6257a5077e39c); check("R7^-1 1", yi, 64'h50785f0b50f8e49f);
    x = 64'h8000000000000001; #1; check("R3 2", yf, 64'hec8f6c13187ff74a); check("R7^-1 2", yi, 64'h02ffbee2d1968c84);
    x = 64'h216363698b529b4a; #1; check("R3 3", yf, 64'h3ec4b4587ed87199); check("R7^-1 3", yi, 64'h1d4dd1436a9f40b3);
    for (int i = 0; i < 50; i++) begin
      x = {$urandom, $urandom}; k = {$urandom, $urandom}; #1;
      for (int r = 1; r <= 10; r++) check("R^-1(R(x))", rt[r], x);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
