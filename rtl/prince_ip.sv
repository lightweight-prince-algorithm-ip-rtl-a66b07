// prince_ip: PRINCE IP core, a PLB slave wrapping one prince_cipher.
//
// The processor writes the 64-bit input block and the 128-bit key into six
// 32-bit registers and reads the 64-bit result from two more. DECRYPT picks
// an encryption core (0) or a decryption core (1); the system has one of
// each, at different base addresses.
//
// Register map (byte offsets from C_BASEADDR):
//   0x00  data in, bits 63:32    R/W
//   0x04  data in, bits 31:0     R/W
//   0x08  key, bits 127:96 (k0)  R/W
//   0x0C  key, bits  95:64 (k0)  R/W
//   0x10  key, bits  63:32 (k1)  R/W
//   0x14  key, bits  31:0  (k1)  R/W
//   0x18  result, bits 63:32     R
//   0x1C  result, bits 31:0      R
// Other offsets in the window read as zero and ignore writes.
//
// Timing: a register write ends in cycle t; the cipher takes the new operands
// at the end of cycle t+1 and the result registers hold the answer from cycle
// t+2 on, one clock after the operands, which is before any following PLB
// read can sample them. So software writes its operands and reads the result
// with no polling. Byte enables are honoured on the writable registers.
//
// Follows the reference design: six operand and two result registers, the base
// address. Own choices: word order, byte enables, no start/done bits.
module prince_ip
  import prince_pkg::*;
  import plb_pkg::*;
#(
  parameter bit          DECRYPT    = 1'b0,
  parameter logic [31:0] C_BASEADDR = 32'h8441_8000,
  parameter logic [31:0] C_HIGHADDR = 32'h8441_80FF
) (
  input  logic     SPLB_Clk,
  input  logic     SPLB_Rst,
  input  plb_req_t plb_i,
  output plb_rsp_t sl_o
);

  logic        wr, rd, load;
  logic [7:0]  addr;
  logic [3:0]  be;
  logic [31:0] wdata, rdata;
  logic [31:0] regs [6];          // data hi/lo, key words 0..3
  block_t      result;
  logic        res_valid;

  plb_slave_if #(.C_BASEADDR(C_BASEADDR), .C_HIGHADDR(C_HIGHADDR)) u_if (
    .clk(SPLB_Clk), .rst(SPLB_Rst), .plb_i, .sl_o,
    .wr_o(wr), .rd_o(rd), .addr_o(addr), .be_o(be), .wdata_o(wdata), .rdata_i(rdata));

  always_ff @(posedge SPLB_Clk) begin
    if (SPLB_Rst) begin
      for (int i = 0; i < 6; i++) regs[i] <= '0;
      load <= 1'b0;
    end else begin
      load <= 1'b0;
      if (wr && addr[7:2] < 6'd6) begin
        for (int b = 0; b < 4; b++)
          if (be[3-b]) regs[addr[4:2]][31-8*b -: 8] <= wdata[31-8*b -: 8];
        load <= 1'b1;
      end
    end
  end

  prince_cipher #(.DECRYPT(DECRYPT)) u_cipher (
    .clk(SPLB_Clk), .rst(SPLB_Rst), .valid_i(load),
    .data_i({regs[0], regs[1]}),
    .key_i({regs[2], regs[3], regs[4], regs[5]}),
    .valid_o(res_valid), .data_o(result));

  always_comb begin
    unique case (addr[7:2])
      6'd0, 6'd1, 6'd2, 6'd3, 6'd4, 6'd5: rdata = regs[addr[4:2]];
      6'd6:    rdata = result[63:32];
      6'd7:    rdata = result[31:0];
      default: rdata = '0;
    endcase
  end

  // rd is only used through the interface; the result register is never read
  // while it is being loaded (see timing note above).
  property p_no_read_during_load;
    @(posedge SPLB_Clk) disable iff (SPLB_Rst) rd |-> !load || addr[7:3] != 5'd3;
  endproperty
  a_no_read_during_load: assert property (p_no_read_during_load);

endmodule
