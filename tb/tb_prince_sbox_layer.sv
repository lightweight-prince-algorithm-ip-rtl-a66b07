// tb_prince_sbox_layer: checks the S-box layer and its inverse.
//
// For every 4-bit value v the state made of sixteen copies of v must map to
// sixteen copies of S(v) (resp. S^-1(v)), using the S-box table typed in
// below. Mixed states from a software model check that each nibble position
// has its own S-box, and S^-1(S(x)) = x is checked on random states.
module tb_prince_sbox_layer;
  logic [63:0] x, y, yi, z;
  localparam logic [3:0] ST [16] = '{4'hB,4'hF,4'h3,4'h2,4'hA,4'hC,4'h9,4'h1,
                                     4'h6,4'h7,4'h8,4'h0,4'hE,4'h5,4'hD,4'h4};
  prince_sbox_layer #(.INVERSE(1'b0)) u_s  (.state_i(x), .state_o(y));
  prince_sbox_layer #(.INVERSE(1'b1)) u_si (.state_i(x), .state_o(yi));
  prince_sbox_layer #(.INVERSE(1'b1)) u_rt (.state_i(y), .state_o(z));
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
    for (int v = 0; v < 16; v++) begin
      x = {16{4'(v)}}; #1;
      check("S all nibbles", y, {16{ST[v]}});
      x = {16{ST[v]}}; #1;
      check("S^-1 all nibbles", yi, {16{4'(v)}});
    end
    x = 64'h0123456789abcdef; #1;
    check("S mixed", y, 64'hbf32ac916780e5d4); check("S^-1 mixed", yi, 64'hb732fd89a6405ec1);
    x = 64'h8000000000000001; #1;
    check("S mixed 2", y, 64'h6bbbbbbbbbbbbbbf); check("S^-1 mixed 2", yi, 64'habbbbbbbbbbbbbb7);
    x = 64'h97b750923ceb3ffd; #1;
    check("S mixed 3", y, 64'h7101cb732ed02445); check("S^-1 mixed 3", yi, 64'h6909db6325c0211e);
    for (int i = 0; i < 100; i++) begin
      x = {$urandom, $urandom}; #1;
      check("S^-1(S(x))", z, x);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
