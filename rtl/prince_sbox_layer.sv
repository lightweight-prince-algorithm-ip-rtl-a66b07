// prince_sbox_layer: the PRINCE S-box layer S, or its inverse S^-1.
//
// Sixteen identical 4-bit look-up tables act in parallel, one per nibble of
// the 64-bit state. The tables are the ones the PRINCE definition gives; with
// INVERSE = 1 the inverse table is used instead. Purely combinational: in an
// FPGA each nibble maps onto four 4-input LUTs, no block RAM is involved.
//
// Interface: state_i (64 bits) -> state_o (64 bits), no clock.
//
// Follows the reference design: the tables and the LUT-only build.
module prince_sbox_layer
  import prince_pkg::*;
#(
  parameter bit INVERSE = 1'b0
) (
  input  block_t state_i,
  output block_t state_o
);

  always_comb begin
    for (int n = 0; n < 16; n++) begin
      if (INVERSE) state_o[nib_hi(n) -: 4] = SBOX_INV[state_i[nib_hi(n) -: 4]];
      else         state_o[nib_hi(n) -: 4] = SBOX[state_i[nib_hi(n) -: 4]];
    end
  end

endmodule
