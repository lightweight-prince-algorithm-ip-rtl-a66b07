// tb_prince_soc: end-to-end test of the secure-messaging system at its
// default parameters (31.76 MHz clock, 9600 baud, 8 KB local memory).
//
// The bench takes the place of the processor and of the GSM modem. The
// modem is modelled as an echo: the UART's serial output is wired back to its
// input, so what the system sends to the modem comes back as a received
// message. The processor side performs the flow of the system's software:
//   1. store the key and an 8-character text block in local memory (DLMB)
//      and fetch them back over both LMB ports,
//   2. encrypt the block in the encryption IP core over the data PLB,
//   3. send the AT commands "AT+CMGF=1" (text mode) and
//      AT+CMGS="0107806368" (send message) and then the 8 ciphertext bytes
//      through the UART, byte by byte, polling STATUS for tx FIFO space;
//      the 32 command characters overfill the 16-entry TX FIFO, so the
//      software must wait on the tx-full bit,
//   4. collect the echoed bytes from the RX FIFO, draining it while sending
//      so that it never overflows,
//   5. decrypt the received ciphertext in the decryption IP core, this time
//      over the instruction-side PLB port, and compare with the text.
// Along the way it makes both PLB masters request in the same cycle and
// touches an address no peripheral decodes (bus timeout).
// Every mechanism is counted; one that never happened counts as a failure.
module tb_prince_soc;
  import plb_pkg::*;
  import lmb_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  plb_mreq_t dreq, ireq;
  plb_mrsp_t drsp, irsp;
  lmb_req_t  ilmb, dlmb;
  lmb_rsp_t  ilmb_r, dlmb_r;
  logic      line;

  int checks = 0, failures = 0;
  int n_enc = 0, n_dec = 0, n_tx = 0, n_rx = 0, n_both_req = 0, n_timeout = 0;
  int n_ilmb = 0, n_dlmb = 0, n_txfull = 0;

  localparam logic [31:0] ENC = 32'h8441_8000, DEC = 32'h8441_4000, UART = 32'h8400_0000;

  always #15.745 clk = ~clk;    // 31.76 MHz

  prince_soc dut (
    .clk, .rst,
    .dplb_req_i(dreq), .dplb_rsp_o(drsp), .iplb_req_i(ireq), .iplb_rsp_o(irsp),
    .ilmb_req_i(ilmb), .ilmb_rsp_o(ilmb_r), .dlmb_req_i(dlmb), .dlmb_rsp_o(dlmb_r),
    .uart_rx(line), .uart_tx(line));

  task automatic check(input string what, input logic [63:0] got, exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // count mechanisms from the design's own signals
  always @(posedge clk) if (!rst) begin
    if (dut.u_enc_ip.load) n_enc++;
    if (dut.u_dec_ip.load) n_dec++;
    if (dut.u_uart.tx_rd) n_tx++;
    if (dut.u_uart.rx_valid) n_rx++;
    if (dreq.request && ireq.request && !dut.u_plb.busy) n_both_req++;
    if (drsp.err || irsp.err) n_timeout++;
    if (ilmb_r.ready) n_ilmb++;
    if (dlmb_r.ready) n_dlmb++;
  end

  // PLB master transfers, on the data (m = 0) or instruction (m = 1) port
  task automatic plb_xfer(input int m, input logic rnw, input logic [31:0] a, input logic [31:0] wd,
                          output logic [31:0] rd, output logic err);
    plb_mreq_t r;
    r = '{request: 1'b1, rnw: rnw, abus: a, be: 4'hF, wrdbus: wd};
    if (m == 0) dreq <= r; else ireq <= r;
    forever begin
      @(posedge clk);
      if ((m == 0 && drsp.addr_ack) || (m == 1 && irsp.addr_ack)) break;
    end
    rd  = (m == 0) ? drsp.rd_dbus : irsp.rd_dbus;
    err = (m == 0) ? drsp.err : irsp.err;
    if (m == 0) dreq <= '0; else ireq <= '0;
    @(posedge clk);
  endtask

  task automatic wr(input int m, input logic [31:0] a, d);
    logic [31:0] x; logic e;
    plb_xfer(m, 1'b0, a, d, x, e);
  endtask

  task automatic rd(input int m, input logic [31:0] a, output logic [31:0] d);
    logic e;
    plb_xfer(m, 1'b1, a, '0, d, e);
  endtask

  task automatic cipher(input int m, input logic [31:0] base, input logic [63:0] din,
                        input logic [127:0] key, output logic [63:0] dout);
    logic [31:0] hi, lo;
    wr(m, base + 32'h00, din[63:32]);  wr(m, base + 32'h04, din[31:0]);
    wr(m, base + 32'h08, key[127:96]); wr(m, base + 32'h0C, key[95:64]);
    wr(m, base + 32'h10, key[63:32]);  wr(m, base + 32'h14, key[31:0]);
    rd(m, base + 32'h18, hi);          rd(m, base + 32'h1C, lo);
    dout = {hi, lo};
  endtask

  // received bytes, drained from the RX FIFO whenever STATUS shows data
  logic [7:0] rxq [$];

  task automatic uart_poll(output logic [31:0] st);
    logic [31:0] d;
    rd(0, UART + 8, st);
    if (st[0]) begin
      rd(0, UART + 0, d);
      rxq.push_back(d[7:0]);
    end
  endtask

  task automatic uart_send(input logic [7:0] b);
    logic [31:0] st;
    uart_poll(st);
    while (st[3]) begin                        // tx FIFO full: wait
      n_txfull++;
      uart_poll(st);
    end
    wr(0, UART + 4, {24'h0, b});
  endtask

  task automatic uart_recv(output logic [7:0] b);
    logic [31:0] st;
    while (rxq.size() == 0) uart_poll(st);
    b = rxq.pop_front();
  endtask

  task automatic lmb_access(input bit ibus, input logic wr_en, input logic [31:0] a, d,
                            output logic [31:0] q);
    lmb_req_t r;
    r = '{abus: a, wrdbus: d, be: 4'hF, addrstrobe: 1'b1, readstrobe: !wr_en, writestrobe: wr_en};
    if (ibus) ilmb <= r; else dlmb <= r;
    @(posedge clk);
    if (ibus) ilmb <= '0; else dlmb <= '0;
    @(posedge clk);
    q = ibus ? ilmb_r.dbus : dlmb_r.dbus;
  endtask

  initial begin
    repeat (4_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    localparam logic [63:0]  TEXT = "OPEN 07!";
    localparam logic [127:0] KEY  = 128'h0123456789abcdef_fedcba9876543210;
    localparam logic [63:0]  EXP  = 64'h689a0d1c67486998;    // software model
    string at = {"AT+CMGF=1\r", "AT+CMGS=\"0107806368\"\r"};
    logic [63:0]  ct, pt, rx_ct, text_m;
    logic [127:0] key_m;
    logic [31:0]  q, q2;
    logic [7:0]   b;
    logic         e, e2;

    dreq = '0; ireq = '0; ilmb = '0; dlmb = '0;
    repeat (4) @(posedge clk);
    rst <= 1'b0;
    repeat (4) @(posedge clk);

    // 1. message and key in local memory: write on DLMB, read on ILMB and DLMB
    for (int i = 0; i < 4; i++) lmb_access(1'b0, 1'b1, 32'h100 + 4*i, KEY[127 - 32*i -: 32], q);
    for (int i = 0; i < 2; i++) lmb_access(1'b0, 1'b1, 32'h110 + 4*i, TEXT[63 - 32*i -: 32], q);
    for (int i = 0; i < 4; i++) begin
      lmb_access(1'b1, 1'b0, 32'h100 + 4*i, '0, q);
      key_m[127 - 32*i -: 32] = q;
    end
    for (int i = 0; i < 2; i++) begin
      lmb_access(1'b0, 1'b0, 32'h110 + 4*i, '0, q);
      text_m[63 - 32*i -: 32] = q;
    end
    check("key from local memory", key_m[127:64], KEY[127:64]);
    check("key from local memory", key_m[63:0], KEY[63:0]);
    check("text from local memory", text_m, TEXT);

    // 2. encrypt over the data PLB
    cipher(0, ENC, text_m, key_m, ct);
    check("ciphertext", ct, EXP);
    // published vector as on the terminal screen
    cipher(0, ENC, 64'h0, 128'h0, pt);
    check("published vector", pt, 64'h818665aa0d02dfda);

    // both PLB masters at once: the data master is served first
    fork
      plb_xfer(0, 1'b1, ENC + 32'h18, '0, q, e);
      plb_xfer(1, 1'b1, DEC + 32'h08, '0, q2, e2);
    join
    check("concurrent read, data master", q, 32'h818665aa);
    check("concurrent read, instruction master", q2, 32'h0);

    // unmapped address: the bus times out with an error
    plb_xfer(0, 1'b1, 32'h8450_0000, '0, q, e);
    check("timeout error flag", e, 1);

    // 3. AT command, then the ciphertext bytes
    for (int i = 0; i < at.len(); i++) uart_send(at[i]);
    for (int i = 0; i < 8; i++) uart_send(ct[63 - 8*i -: 8]);

    // 4. the modem echo brings everything back
    for (int i = 0; i < at.len(); i++) begin
      uart_recv(b);
      check("echoed AT command", b, at[i]);
    end
    for (int i = 0; i < 8; i++) begin
      uart_recv(b);
      rx_ct[63 - 8*i -: 8] = b;
    end
    check("received ciphertext", rx_ct, ct);

    // 5. decrypt over the instruction-side PLB port
    cipher(1, DEC, rx_ct, key_m, pt);
    check("decrypted text", pt, TEXT);

    // mechanism counts
    check("encryptions happened", n_enc > 0, 1);
    check("decryptions happened", n_dec > 0, 1);
    check("bytes sent", n_tx, at.len() + 8);
    check("tx FIFO full waits happened", n_txfull > 0, 1);
    check("no rx overrun", dut.u_uart.overrun, 0);
    check("bytes received", n_rx, at.len() + 8);
    check("arbitration conflict happened", n_both_req > 0, 1);
    check("bus timeout happened", n_timeout, 1);
    check("ILMB accesses", n_ilmb, 4);
    check("DLMB accesses", n_dlmb, 8);
    $display("encryptions(loads)=%0d decryptions(loads)=%0d tx=%0d rx=%0d conflicts=%0d timeouts=%0d ilmb=%0d dlmb=%0d txfull=%0d",
             n_enc, n_dec, n_tx, n_rx, n_both_req, n_timeout, n_ilmb, n_dlmb, n_txfull);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
