// plb_pkg: signal bundles of the Processor Local Bus (PLB) used to connect the
// processor to its peripherals.
//
// plb_req_t carries the bus-to-slave signals and plb_rsp_t the slave-to-bus
// signals, with the names and widths of a PLB v4.6 slave port (128-bit data
// buses, 16 byte enables). PLB numbers bits big-endian, bit 0 being the most
// significant; here every vector is [N-1:0] with the same bit order, so PLB
// bit 0 of PLB_ABus is abus[31] here. Byte lane 0, PLB_wrDBus(0:31), is
// wrdbus[127:96].
//
// The master side (plb_mreq_t / plb_mrsp_t) is a reduced set of the signals a
// PLB master drives and receives for single-beat transfers.
//
// Follows the reference design: the slave port names and widths. Own choice: the
// reduced master-side bundle.
package plb_pkg;

  typedef struct packed {
    logic [31:0]  abus;        // PLB_ABus
    logic [31:0]  uabus;       // PLB_UABus (upper address, unused: 32-bit space)
    logic [15:0]  be;          // PLB_BE
    logic [2:0]   masterid;    // PLB_masterID
    logic [1:0]   msize;       // PLB_MSize
    logic [1:0]   rdpendpri;   // PLB_rdPendPri
    logic [1:0]   reqpri;      // PLB_reqPri
    logic [3:0]   size;        // PLB_size
    logic [15:0]  tattribute;  // PLB_TAttribute
    logic [2:0]   ptype;       // PLB_type
    logic [127:0] wrdbus;      // PLB_wrDBus
    logic [1:0]   wrpendpri;   // PLB_wrPendPri
    logic         pabort;      // PLB_abort
    logic         buslock;     // PLB_busLock
    logic         lockerr;     // PLB_lockErr
    logic         pavalid;     // PLB_PAValid
    logic         rdburst;     // PLB_rdBurst
    logic         rdpendreq;   // PLB_rdPendReq
    logic         rdprim;      // PLB_rdPrim
    logic         rnw;         // PLB_RNW
    logic         savalid;     // PLB_SAValid
    logic         wrburst;     // PLB_wrBurst
    logic         wrpendreq;   // PLB_wrPendReq
    logic         wrprim;      // PLB_wrPrim
  } plb_req_t;

  typedef struct packed {
    logic [7:0]   mbusy;       // Sl_MBusy
    logic [7:0]   mirq;        // Sl_MIRQ
    logic [7:0]   mrderr;      // Sl_MRdErr
    logic [7:0]   mwrerr;      // Sl_MWrErr
    logic [127:0] rddbus;      // Sl_rdDBus
    logic [3:0]   rdwdaddr;    // Sl_rdWdAddr
    logic [1:0]   ssize;       // Sl_SSize
    logic         addrack;     // Sl_addrAck
    logic         rdbterm;     // Sl_rdBTerm
    logic         rdcomp;      // Sl_rdComp
    logic         rddack;      // Sl_rdDAck
    logic         rearbitrate; // Sl_rearbitrate
    logic         wait_;       // Sl_wait
    logic         wbterm;      // Sl_wrBTerm
    logic         wrcomp;      // Sl_wrComp
    logic         wrdack;      // Sl_wrDAck
  } plb_rsp_t;

  // master side, single-beat transfers of one 32-bit word
  typedef struct packed {
    logic         request;     // M_request: hold until addr_ack
    logic         rnw;         // 1 = read
    logic [31:0]  abus;        // word address
    logic [3:0]   be;          // byte enables of the 32-bit word
    logic [31:0]  wrdbus;      // write data
  } plb_mreq_t;

  typedef struct packed {
    logic         addr_ack;    // transfer finished (one-cycle pulse)
    logic         rd_dack;     // read data valid on rd_dbus
    logic         wr_dack;     // write data taken
    logic         err;         // no slave answered: bus timeout
    logic [31:0]  rd_dbus;
  } plb_mrsp_t;

  localparam plb_rsp_t PLB_RSP_IDLE = '0;

endpackage
