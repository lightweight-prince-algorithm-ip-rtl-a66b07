// tb_plb_slave_if: checks the PLB slave attachment.
//
// A bench master issues single-beat writes and reads. Checked: the write
// strobe, offset, byte enables and lane selection in the request cycle;
// Sl_addrAck with Sl_wrDAck/Sl_wrComp or Sl_rdDAck/Sl_rdComp exactly one
// cycle after PLB_PAValid; read data copied to all four lanes; Sl_MBusy on
// the requesting master's bit; no response outside the address window; a
// request held through the ack cycle is taken only once.
module tb_plb_slave_if;
  import plb_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  plb_req_t req;
  plb_rsp_t rsp;
  logic wr, rd;
  logic [7:0] addr;
  logic [3:0] be;
  logic [31:0] wdata, rdata;
  int checks = 0, failures = 0;
  int nwr = 0, nrd = 0;

  always #5 clk = ~clk;

  plb_slave_if #(.C_BASEADDR(32'h8441_8000), .C_HIGHADDR(32'h8441_80FF)) dut (
    .clk, .rst, .plb_i(req), .sl_o(rsp), .wr_o(wr), .rd_o(rd), .addr_o(addr),
    .be_o(be), .wdata_o(wdata), .rdata_i(rdata));

  assign rdata = {24'hA5A5A5, addr};    // bench register file: offset in low byte

  always @(posedge clk) begin
    if (wr) nwr++;
    if (rd) nrd++;
  end

  task automatic check(input string what, input logic [127:0] got, exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    req = '0;
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    // write to offset 0x14 (lane 1) with two byte enables
    req.pavalid <= 1'b1; req.rnw <= 1'b0; req.abus <= 32'h8441_8014;
    req.masterid <= 3'd1;
    req.be <= 16'h0_6_0_0; req.wrdbus <= {32'h11111111, 32'hCAFEBABE, 32'h22222222, 32'h33333333};
    #1 check("write strobe", wr, 1); check("offset", addr, 8'h14);
    check("lane data", wdata, 32'hCAFEBABE); check("lane be", be, 4'h6);
    check("no ack in request cycle", rsp.addrack, 0);
    @(posedge clk); #1;
    check("addrAck +1", rsp.addrack, 1); check("wrDAck", rsp.wrdack, 1);
    check("wrComp", rsp.wrcomp, 1); check("no rdDAck", rsp.rddack, 0);
    check("MBusy bit", rsp.mbusy, 8'b0000_0010);
    check("held request ignored", wr, 0);
    req.pavalid <= 1'b0;
    @(posedge clk); #1;
    check("ack is a pulse", rsp.addrack, 0);
    check("one write", nwr, 1);
    // read from offset 0x08
    req.pavalid <= 1'b1; req.rnw <= 1'b1; req.abus <= 32'h8441_8008; req.masterid <= 3'd0;
    #1 check("read strobe", rd, 1);
    @(posedge clk); #1;
    check("rd addrAck", rsp.addrack, 1); check("rdDAck", rsp.rddack, 1); check("rdComp", rsp.rdcomp, 1);
    check("read data on all lanes", rsp.rddbus, {4{32'hA5A5A508}});
    req.pavalid <= 1'b0;
    @(posedge clk); #1;
    check("rd bus idle", rsp.rddbus, 0);
    // outside the window
    req.pavalid <= 1'b1; req.rnw <= 1'b1; req.abus <= 32'h8441_4000;
    repeat (3) begin @(posedge clk); #1 check("no answer outside window", rsp.addrack, 0); end
    req.pavalid <= 1'b0; req.abus <= 32'h8441_8100;
    req.pavalid <= 1'b1;
    @(posedge clk); #1 check("no answer above window", rsp.addrack, 0);
    req.pavalid <= 1'b0;
    check("reads counted", nrd, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
