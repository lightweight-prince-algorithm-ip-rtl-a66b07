// plb_slave_if: the single-beat PLB slave attachment shared by the peripherals
// (the PRINCE IP cores and the UART).
//
// It decodes the address window [C_BASEADDR, C_HIGHADDR] and turns one PLB
// transfer into a one-cycle register access for the peripheral behind it:
//   cycle t   : PLB_PAValid high with an address in the window
//               -> wr_o / rd_o pulse for cycle t (registers update at the end
//                  of cycle t), addr_o, be_o and wdata_o are valid
//   cycle t+1 : Sl_addrAck together with Sl_wrDAck + Sl_wrComp (write) or
//               Sl_rdDAck + Sl_rdComp with the data on Sl_rdDBus (read)
// The request must stay valid until Sl_addrAck; a request seen in the ack
// cycle is ignored, so one transfer is never taken twice. Bursts are not
// supported: the slave handles one 32-bit word per transfer. Write data is
// taken from the byte lane picked by address bits 3:2; read data is copied
// onto all four lanes. All outputs not needed for single transfers
// (Sl_wait, Sl_rearbitrate, error and interrupt lines) stay low.
//
// The handshake timing is this design's own choice; the reference design only
// says the cores are PLB slaves.
module plb_slave_if
  import plb_pkg::*;
#(
  parameter logic [31:0] C_BASEADDR = 32'h8441_8000,
  parameter logic [31:0] C_HIGHADDR = 32'h8441_80FF
) (
  input  logic        clk,
  input  logic        rst,
  input  plb_req_t    plb_i,
  output plb_rsp_t    sl_o,
  // register side
  output logic        wr_o,
  output logic        rd_o,
  output logic [7:0]  addr_o,    // byte offset inside the window
  output logic [3:0]  be_o,
  output logic [31:0] wdata_o,
  input  logic [31:0] rdata_i    // sampled in the cycle rd_o is high
);

  logic        hit, start, ack_q, rnw_q;
  logic [2:0]  mid_q;
  logic [31:0] rdata_q;
  logic [1:0]  lane;

  assign hit   = plb_i.abus >= C_BASEADDR && plb_i.abus <= C_HIGHADDR;
  assign start = plb_i.pavalid && hit && !ack_q && !rst;
  assign lane  = plb_i.abus[3:2];

  assign wr_o    = start && !plb_i.rnw;
  assign rd_o    = start &&  plb_i.rnw;
  assign addr_o  = 8'(plb_i.abus - C_BASEADDR);
  assign be_o    = plb_i.be[15 - 4*lane -: 4];
  assign wdata_o = plb_i.wrdbus[127 - 32*lane -: 32];

  always_ff @(posedge clk) begin
    if (rst) begin
      ack_q   <= 1'b0;
      rnw_q   <= 1'b0;
      mid_q   <= '0;
      rdata_q <= '0;
    end else begin
      ack_q <= start;
      if (start) begin
        rnw_q <= plb_i.rnw;
        mid_q <= plb_i.masterid;
        if (plb_i.rnw) rdata_q <= rdata_i;
      end
    end
  end

  always_comb begin
    sl_o         = PLB_RSP_IDLE;
    sl_o.addrack = ack_q;
    sl_o.wrdack  = ack_q && !rnw_q;
    sl_o.wrcomp  = ack_q && !rnw_q;
    sl_o.rddack  = ack_q &&  rnw_q;
    sl_o.rdcomp  = ack_q &&  rnw_q;
    sl_o.rddbus  = (ack_q && rnw_q) ? {4{rdata_q}} : '0;
    if (ack_q) sl_o.mbusy[mid_q] = 1'b1;
  end

endmodule
