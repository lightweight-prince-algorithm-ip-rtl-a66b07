// tb_plb_bus: checks the PLB arbiter and response routing.
//
// Three bench slaves answer one cycle after PLB_PAValid, each in its own
// address window, returning a word that encodes the slave and the offset.
// Checked: a single master reads and writes through the bus; when both
// masters request in the same cycle the data master (index 0) goes first
// and the other follows; the response reaches only the granted master;
// PLB_masterID names the granted master; an address that no slave decodes
// ends with addr_ack and err after the timeout.
module tb_plb_bus;
  import plb_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  plb_mreq_t mreq [2];
  plb_mrsp_t mrsp [2];
  plb_req_t  sreq;
  plb_rsp_t  srsp [3];
  int checks = 0, failures = 0;
  int grants0 = 0, grants1 = 0, timeouts = 0;
  logic [31:0] last_wr [3];

  always #5 clk = ~clk;

  plb_bus #(.NUM_MASTERS(2), .NUM_SLAVES(3), .TIMEOUT(16)) dut (
    .clk, .rst, .m_req_i(mreq), .m_rsp_o(mrsp), .s_req_o(sreq), .s_rsp_i(srsp));

  // bench slaves at 0x1000_0000, 0x2000_0000, 0x3000_0000 (256 bytes each)
  for (genvar s = 0; s < 3; s++) begin : g_sl
    logic ack, rnw;
    logic [31:0] rdw;
    always_ff @(posedge clk) begin
      if (rst) begin
        ack <= 1'b0; rnw <= 1'b0; rdw <= '0;
      end else begin
        ack <= 1'b0;
        if (sreq.pavalid && !ack && sreq.abus[31:8] == {4'(s + 1), 20'h0}) begin
          ack <= 1'b1;
          rnw <= sreq.rnw;
          rdw <= {8'(s + 1), 16'h0, sreq.abus[7:0]};
          if (!sreq.rnw) last_wr[s] <= sreq.wrdbus[127 - 32*sreq.abus[3:2] -: 32];
        end
      end
    end
    always_comb begin
      srsp[s] = '0;
      srsp[s].addrack = ack;
      srsp[s].rddack  = ack && rnw;
      srsp[s].wrdack  = ack && !rnw;
      srsp[s].rddbus  = (ack && rnw) ? {4{rdw}} : '0;
    end
  end

  always @(posedge clk) if (!rst) begin
    if (sreq.pavalid && sreq.masterid == 3'd0) grants0++;
    if (sreq.pavalid && sreq.masterid == 3'd1) grants1++;
    if (mrsp[0].err || mrsp[1].err) timeouts++;
  end

  task automatic check(input string what, input logic [31:0] got, exp);
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

  // wait for addr_ack of master m; return data, error flag and cycles taken
  task automatic wait_ack(input int m, output logic [31:0] d, output logic e, output int cyc);
    cyc = 0;
    do begin @(posedge clk); #1; cyc++; end while (!mrsp[m].addr_ack);
    d = mrsp[m].rd_dbus;
    e = mrsp[m].err;
    @(posedge clk);
    mreq[m].request <= 1'b0;
  endtask

  initial begin
    logic [31:0] d0, d1;
    logic e0, e1;
    int c0, c1;
    mreq[0] = '0; mreq[1] = '0;
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    // single read by master 1 from slave 2
    mreq[1] <= '{request: 1'b1, rnw: 1'b1, abus: 32'h2000_0014, be: 4'hF, wrdbus: '0};
    wait_ack(1, d1, e1, c1);
    check("read via bus", d1, 32'h0200_0014);
    check("no error", {31'b0, e1}, 0);
    // write by master 0 to slave 3, lane 2
    mreq[0] <= '{request: 1'b1, rnw: 1'b0, abus: 32'h3000_0008, be: 4'hF, wrdbus: 32'hDEAD_BEEF};
    wait_ack(0, d0, e0, c0);
    check("write reached slave", last_wr[2], 32'hDEAD_BEEF);
    // both masters at once: master 0 wins, master 1 follows
    @(posedge clk);
    mreq[0] <= '{request: 1'b1, rnw: 1'b1, abus: 32'h1000_0004, be: 4'hF, wrdbus: '0};
    mreq[1] <= '{request: 1'b1, rnw: 1'b1, abus: 32'h3000_000C, be: 4'hF, wrdbus: '0};
    fork
      wait_ack(0, d0, e0, c0);
      wait_ack(1, d1, e1, c1);
    join
    check("master 0 data", d0, 32'h0100_0004);
    check("master 1 data", d1, 32'h0300_000C);
    check("master 0 first", {31'b0, c0 < c1}, 1);
    // unmapped address: timeout
    mreq[0] <= '{request: 1'b1, rnw: 1'b1, abus: 32'h5000_0000, be: 4'hF, wrdbus: '0};
    wait_ack(0, d0, e0, c0);
    check("timeout error", {31'b0, e0}, 1);
    check("timeout cycles", c0, 17);   // grant cycle + TIMEOUT
    @(posedge clk);
    check("grants to master 0", grants0 > 0, 1);
    check("grants to master 1", grants1 > 0, 1);
    check("one timeout", timeouts, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
