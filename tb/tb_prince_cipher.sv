// tb_prince_cipher: checks the PRINCE encryption and decryption units.
//
// Known-answer vectors: the five published PRINCE test vectors (all-zero and
// all-one plaintexts, all-one k0, all-one k1, and 0123456789abcdef under
// k1 = fedcba9876543210) plus eight random vectors computed with an
// independent software model. The encryption unit must produce the
// ciphertext and the decryption unit must return the plaintext, each exactly
// one clock after the operands are taken. A back-to-back stream checks that
// a new block is accepted every cycle, and the output must hold while
// valid_i is low.
module tb_prince_cipher;
  import prince_pkg::*;

  typedef struct packed { block_t p; key_t k; block_t c; } vec_t;
  localparam int NV = 13;
  localparam vec_t V [NV] = '{
    '{64'h0000000000000000, 128'h00000000000000000000000000000000, 64'h818665aa0d02dfda},
    '{64'hffffffffffffffff, 128'h00000000000000000000000000000000, 64'h604ae6ca03c20ada},
    '{64'h0000000000000000, 128'hffffffffffffffff0000000000000000, 64'h9fb51935fc3df524},
    '{64'h0000000000000000, 128'h0000000000000000ffffffffffffffff, 64'h78a54cbe737bb7ef},
    '{64'h0123456789abcdef, 128'h0000000000000000fedcba9876543210, 64'hae25ad3ca8fa9ccf},
    '{64'hf2a74de452e6b438, 128'h0c5c7fd0a6a3a4506513270e269e0d37, 64'h6d8b4bf4bbaf7022},
    '{64'hd23f0824128b2f33, 128'h9531985d5d9dc9f81818e811892f902b, 64'h383a70b624df36b3},
    '{64'he8e25d940ed90475, 128'h1600a35a099950d836f675cc81e74ef5, 64'hba54aa591405c8aa},
    '{64'h6b0d549b6f03675a, 128'h8d116ece1738f7d93d9c172411e20b8f, 64'h49755e2c54f5d257},
    '{64'h0f21ddb66cad4a26, 128'hf28c105d1fb17c2390c192cfd3ac94af, 64'h3607b67660fc22af},
    '{64'ha170b33839263059, 128'h0fd630f1f29d0da9953f48f1a09f76b5, 64'hf526729b7df26f40},
    '{64'h95e60af593bd04cf, 128'h3898d190f9ebdacc0cb1e29c658cda14, 64'h3227824add5c1995},
    '{64'h8e81973e0becd7b0, 128'h6b4cb2424a23d5962217beaddbc496cb, 64'hca4730ba8bf7d0a8}
  };

  logic clk = 1'b0, rst = 1'b1;
  logic   ev_i = 1'b0, dv_i = 1'b0, ev_o, dv_o;
  block_t ed_i = '0, dd_i = '0, ed_o, dd_o;
  key_t   ek = '0, dk = '0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  prince_cipher #(.DECRYPT(1'b0)) u_enc (.clk, .rst, .valid_i(ev_i), .data_i(ed_i),
    .key_i(ek), .valid_o(ev_o), .data_o(ed_o));
  prince_cipher #(.DECRYPT(1'b1)) u_dec (.clk, .rst, .valid_i(dv_i), .data_i(dd_i),
    .key_i(dk), .valid_o(dv_o), .data_o(dd_o));

  task automatic check(input string what, input logic [63:0] got, exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // constant property the decryption relies on
    for (int i = 0; i < 12; i++) check("RC symmetry", RC[i] ^ RC[11-i], ALPHA);

    repeat (2) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    check("valid after reset", {63'b0, ev_o | dv_o}, 64'd0);

    // single operations with latency check
    for (int i = 0; i < NV; i++) begin
      ev_i <= 1'b1; ed_i <= V[i].p; ek <= V[i].k;
      dv_i <= 1'b1; dd_i <= V[i].c; dk <= V[i].k;
      @(posedge clk);                 // operands taken here
      ev_i <= 1'b0; dv_i <= 1'b0;
      #1;
      check("enc valid after 1 cycle", {63'b0, ev_o}, 64'd1);
      check("dec valid after 1 cycle", {63'b0, dv_o}, 64'd1);
      check($sformatf("enc vec %0d", i), ed_o, V[i].c);
      check($sformatf("dec vec %0d", i), dd_o, V[i].p);
      @(posedge clk); #1;
      check("enc valid drops", {63'b0, ev_o}, 64'd0);
      check($sformatf("enc hold %0d", i), ed_o, V[i].c);
    end

    // back-to-back: one block per clock
    for (int i = 0; i < NV + 1; i++) begin
      if (i < NV) begin
        ev_i <= 1'b1; ed_i <= V[i].p; ek <= V[i].k;
        dv_i <= 1'b1; dd_i <= V[i].c; dk <= V[i].k;
      end else begin
        ev_i <= 1'b0; dv_i <= 1'b0;
      end
      @(posedge clk); #1;
      if (i < NV) begin
        check("stream enc", ed_o, V[i].c);
        check("stream dec", dd_o, V[i].p);
      end
    end

    // round trip on random data with random keys: dec(enc(x)) == x
    for (int i = 0; i < 50; i++) begin
      block_t p; key_t k;
      p = {$urandom, $urandom};
      k = {$urandom, $urandom, $urandom, $urandom};
      ev_i <= 1'b1; ed_i <= p; ek <= k;
      @(posedge clk); #1;
      ev_i <= 1'b0;
      dv_i <= 1'b1; dd_i <= ed_o; dk <= k;
      @(posedge clk); #1;
      dv_i <= 1'b0;
      check("round trip", dd_o, p);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
