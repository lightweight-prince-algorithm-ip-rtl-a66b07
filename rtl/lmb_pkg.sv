// lmb_pkg: signal bundles of the Local Memory Bus (LMB), the private link
// between the processor and its block RAM, one bus for instructions (ILMB)
// and one for data (DLMB).
//
// Own choice: the LMB signal set (the reference design only names the two buses).
package lmb_pkg;

  typedef struct packed {
    logic [31:0] abus;         // LMB_ABus, byte address
    logic [31:0] wrdbus;       // LMB_WriteDBus
    logic [3:0]  be;           // LMB_BE, bit 3 = byte at the lowest address
    logic        addrstrobe;   // LMB_AddrStrobe
    logic        readstrobe;   // LMB_ReadStrobe
    logic        writestrobe;  // LMB_WriteStrobe
  } lmb_req_t;

  typedef struct packed {
    logic [31:0] dbus;         // Sl_DBus
    logic        ready;        // Sl_Ready
  } lmb_rsp_t;

endpackage
