// plb_bus: the Processor Local Bus joining the processor's two PLB masters
// (data side DPLB and instruction side IPLB) to the peripheral slaves.
//
// Arbitration: when no transfer is in flight, the requesting master with the
// lowest index wins (index 0 = data side, so data accesses go first). The
// winner's address phase is broadcast to every slave as one plb_req_t with
// PLB_PAValid high and PLB_masterID set to the master's index, and stays
// until a slave answers with Sl_addrAck. The slaves' outputs are ORed
// together, as on the real bus, since only the addressed slave drives them.
// The answer is routed back to the granted master and the bus is free again
// from the next cycle.
//
// Timeout: if no slave acknowledges within TIMEOUT cycles (an address that no
// peripheral decodes), the bus ends the transfer itself with addr_ack and err
// to that master, so a stray access cannot hang the processor.
//
// The reference design shows two masters and three slaves on one PLB; the
// arbitration and the timeout are this design's own choices.
module plb_bus
  import plb_pkg::*;
#(
  parameter int unsigned NUM_MASTERS = 2,
  parameter int unsigned NUM_SLAVES  = 3,
  parameter int unsigned TIMEOUT     = 16
) (
  input  logic      clk,
  input  logic      rst,
  input  plb_mreq_t m_req_i [NUM_MASTERS],
  output plb_mrsp_t m_rsp_o [NUM_MASTERS],
  output plb_req_t  s_req_o,
  input  plb_rsp_t  s_rsp_i [NUM_SLAVES]
);

  localparam int unsigned MW = (NUM_MASTERS > 1) ? $clog2(NUM_MASTERS) : 1;

  logic          busy;
  logic [MW-1:0] gnt;
  logic [$clog2(TIMEOUT+1)-1:0] tcnt;
  plb_rsp_t      rsp;
  logic          any_req, timeout;
  logic [MW-1:0] winner;

  // OR of all slave responses
  always_comb begin
    rsp = PLB_RSP_IDLE;
    for (int s = 0; s < NUM_SLAVES; s++) rsp = rsp | s_rsp_i[s];
  end

  // fixed priority: lowest index first
  always_comb begin
    any_req = 1'b0;
    winner  = '0;
    for (int m = NUM_MASTERS - 1; m >= 0; m--) begin
      if (m_req_i[m].request) begin
        any_req = 1'b1;
        winner  = MW'(m);
      end
    end
  end

  assign timeout = busy && (tcnt == ($bits(tcnt))'(TIMEOUT)) && !rsp.addrack;

  always_ff @(posedge clk) begin
    if (rst) begin
      busy <= 1'b0;
      gnt  <= '0;
      tcnt <= '0;
    end else if (!busy) begin
      tcnt <= '0;
      if (any_req) begin
        busy <= 1'b1;
        gnt  <= winner;
      end
    end else if (rsp.addrack || timeout) begin
      busy <= 1'b0;
    end else begin
      tcnt <= tcnt + 1'b1;
    end
  end

  // address phase towards the slaves
  always_comb begin
    s_req_o           = '0;
    s_req_o.pavalid   = busy && m_req_i[gnt].request && !timeout;
    s_req_o.rnw       = m_req_i[gnt].rnw;
    s_req_o.abus      = m_req_i[gnt].abus;
    s_req_o.masterid  = 3'(gnt);
    s_req_o.size      = 4'b0000;          // single word
    s_req_o.msize     = 2'b00;            // 32-bit master
    s_req_o.be        = {4{m_req_i[gnt].be}};
    s_req_o.wrdbus    = {4{m_req_i[gnt].wrdbus}};
    s_req_o.wrprim    = 1'b0;
    s_req_o.rdprim    = 1'b0;
  end

  // responses back to the masters
  always_comb begin
    for (int m = 0; m < NUM_MASTERS; m++) begin
      m_rsp_o[m] = '0;
      if (busy && gnt == MW'(m)) begin
        m_rsp_o[m].addr_ack = rsp.addrack || timeout;
        m_rsp_o[m].rd_dack  = rsp.rddack;
        m_rsp_o[m].wr_dack  = rsp.wrdack;
        m_rsp_o[m].err      = timeout;
        // word lane of the 128-bit bus chosen by address bits 3:2
        m_rsp_o[m].rd_dbus  = rsp.rddbus[127 - 32*m_req_i[m].abus[3:2] -: 32];
      end
    end
  end

  // a granted master must hold its request until the transfer ends
  a_hold_request: assert property (@(posedge clk) disable iff (rst)
    busy && !rsp.addrack && !timeout |-> m_req_i[gnt].request);

endmodule
