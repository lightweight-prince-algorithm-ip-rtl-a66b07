// tb_prince_ip: runs the PRINCE IP cores (one encrypting, one decrypting)
// through their PLB register interface, as the processor's software does:
// write the data block and the key into six registers, read the result from
// two registers. Checks published and model vectors, register read-back,
// byte-enable writes, and that the result is valid one clock after the last
// operand write.
module tb_prince_ip;
  import plb_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  plb_req_t req;
  plb_rsp_t rsp_e, rsp_d, rsp;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  prince_ip #(.DECRYPT(1'b0), .C_BASEADDR(32'h8441_8000), .C_HIGHADDR(32'h8441_80FF)) u_enc (
    .SPLB_Clk(clk), .SPLB_Rst(rst), .plb_i(req), .sl_o(rsp_e));
  prince_ip #(.DECRYPT(1'b1), .C_BASEADDR(32'h8441_4000), .C_HIGHADDR(32'h8441_40FF)) u_dec (
    .SPLB_Clk(clk), .SPLB_Rst(rst), .plb_i(req), .sl_o(rsp_d));
  assign rsp = rsp_e | rsp_d;

  task automatic check(input string what, input logic [63:0] got, exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic plb_write(input logic [31:0] a, input logic [31:0] d, input logic [3:0] be = 4'hF);
    req.pavalid <= 1'b1; req.rnw <= 1'b0; req.abus <= a;
    req.be <= {4{be}}; req.wrdbus <= {4{d}};
    do @(posedge clk); while (!rsp.addrack);
    req.pavalid <= 1'b0;
    @(posedge clk);
  endtask

  task automatic plb_read(input logic [31:0] a, output logic [31:0] d);
    req.pavalid <= 1'b1; req.rnw <= 1'b1; req.abus <= a; req.be <= '1;
    do @(posedge clk); while (!rsp.addrack);
    d = rsp.rddbus[127 - 32*a[3:2] -: 32];
    req.pavalid <= 1'b0;
    @(posedge clk);
  endtask

  task automatic run(input logic [31:0] base, input logic [63:0] din, input logic [127:0] key,
                     output logic [63:0] dout);
    logic [31:0] hi, lo;
    plb_write(base + 32'h00, din[63:32]);
    plb_write(base + 32'h04, din[31:0]);
    plb_write(base + 32'h08, key[127:96]);
    plb_write(base + 32'h0C, key[95:64]);
    plb_write(base + 32'h10, key[63:32]);
    plb_write(base + 32'h14, key[31:0]);
    plb_read(base + 32'h18, hi);
    plb_read(base + 32'h1C, lo);
    dout = {hi, lo};
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] r;
    logic [31:0] w;
    req = '0;
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    // the exchange shown on the terminal: all-zero block and key
    run(32'h8441_8000, 64'h0, 128'h0, r);                  check("enc zero", r, 64'h818665aa0d02dfda);
    run(32'h8441_4000, 64'h818665aa0d02dfda, 128'h0, r);   check("dec zero", r, 64'h0);
    run(32'h8441_8000, 64'h0123456789abcdef, 128'h0000000000000000fedcba9876543210, r);
    check("enc vector", r, 64'hae25ad3ca8fa9ccf);
    run(32'h8441_4000, 64'hae25ad3ca8fa9ccf, 128'h0000000000000000fedcba9876543210, r);
    check("dec vector", r, 64'h0123456789abcdef);
    run(32'h8441_8000, 64'hffffffffffffffff, 128'h0, r);   check("enc ones", r, 64'h604ae6ca03c20ada);
    run(32'h8441_8000, 64'hf2a74de452e6b438, 128'h0c5c7fd0a6a3a4506513270e269e0d37, r);
    check("enc random key", r, 64'h6d8b4bf4bbaf7022);
    run(32'h8441_4000, 64'h6d8b4bf4bbaf7022, 128'h0c5c7fd0a6a3a4506513270e269e0d37, r);
    check("dec random key", r, 64'hf2a74de452e6b438);
    // read back an operand register
    plb_read(32'h8441_8008, w); check("key word read-back", w, 32'h0c5c7fd0);
    // byte-enable write: only the top byte of the data high word
    plb_write(32'h8441_8000, 32'h12ffffff, 4'b1000);
    plb_read(32'h8441_8000, w); check("byte enable", w, 32'h12a74de4);
    // the result register is already up to date when the write transfer ends
    plb_write(32'h8441_8000, 32'hf2a74de4);
    check("result one clock after write", u_enc.result, 64'h6d8b4bf4bbaf7022);
    // unmapped offset reads zero
    plb_read(32'h8441_8040, w); check("unmapped offset", w, 32'h0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
