// tb_lmb_bram: checks the dual-port local memory through its two LMB ports.
//
// Checked: a word written through the data port reads back through both
// ports; Sl_Ready comes exactly one cycle after the address strobe; byte
// enables write only the selected bytes; both ports can access in the same
// cycle; addresses beyond MEM_BYTES get no Sl_Ready. A random write/read run
// compares against a bench copy of the memory.
module tb_lmb_bram;
  import lmb_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  lmb_req_t ireq, dreq;
  lmb_rsp_t irsp, drsp;
  int checks = 0, failures = 0;
  logic [31:0] model [256];
  localparam int unsigned BYTES = 1024;

  always #5 clk = ~clk;

  lmb_bram #(.C_BASEADDR(32'h0), .MEM_BYTES(BYTES)) dut (
    .clk, .rst, .ilmb_i(ireq), .ilmb_o(irsp), .dlmb_i(dreq), .dlmb_o(drsp));

  task automatic check(input string what, input logic [31:0] got, exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic dwrite(input logic [31:0] a, d, input logic [3:0] be);
    dreq <= '{abus: a, wrdbus: d, be: be, addrstrobe: 1'b1, readstrobe: 1'b0, writestrobe: 1'b1};
    @(posedge clk);
    dreq <= '0;
    #1 check("write ready after one cycle", drsp.ready, 1);
    @(posedge clk);
  endtask

  task automatic read2(input logic [31:0] ai, ad, output logic [31:0] di, dd);
    ireq <= '{abus: ai, wrdbus: '0, be: 4'hF, addrstrobe: 1'b1, readstrobe: 1'b1, writestrobe: 1'b0};
    dreq <= '{abus: ad, wrdbus: '0, be: 4'hF, addrstrobe: 1'b1, readstrobe: 1'b1, writestrobe: 1'b0};
    @(posedge clk);
    ireq <= '0; dreq <= '0;
    #1 check("i ready", irsp.ready, 1); check("d ready", drsp.ready, 1);
    di = irsp.dbus; dd = drsp.dbus;
    @(posedge clk);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] di, dd, a, d;
    logic [3:0] be;
    ireq = '0; dreq = '0;
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    #1 check("idle no ready", {30'b0, irsp.ready, drsp.ready}, 0);
    dwrite(32'h10, 32'h1234_5678, 4'hF);
    read2(32'h10, 32'h10, di, dd);
    check("instruction port reads data write", di, 32'h1234_5678);
    check("data port reads back", dd, 32'h1234_5678);
    dwrite(32'h10, 32'hAABB_CCDD, 4'b0101);
    read2(32'h10, 32'h14, di, dd);
    check("byte enables", di, 32'h12BB_56DD);
    // instruction-port write
    ireq <= '{abus: 32'h20, wrdbus: 32'h0BAD_F00D, be: 4'hF, addrstrobe: 1'b1, readstrobe: 1'b0, writestrobe: 1'b1};
    @(posedge clk); ireq <= '0; @(posedge clk);
    read2(32'h10, 32'h20, di, dd);
    check("write via port A", dd, 32'h0BAD_F00D);
    // out of range
    dreq <= '{abus: BYTES, wrdbus: '0, be: 4'hF, addrstrobe: 1'b1, readstrobe: 1'b1, writestrobe: 1'b0};
    @(posedge clk); dreq <= '0;
    #1 check("no ready out of range", drsp.ready, 0);
    // random run
    for (int i = 0; i < 256; i++) begin
      model[i] = {$urandom};
      dwrite(32'(i * 4), model[i], 4'hF);
    end
    for (int i = 0; i < 200; i++) begin
      a = 32'($urandom_range(0, 255)); d = $urandom; be = 4'($urandom);
      dwrite(a * 4, d, be);
      for (int b = 0; b < 4; b++) if (be[3-b]) model[a][31-8*b -: 8] = d[31-8*b -: 8];
      a = 32'($urandom_range(0, 255));
      read2(a * 4, ((a + 1) % 256) * 4, di, dd);
      check("random i", di, model[a]);
      check("random d", dd, model[(a + 1) % 256]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
