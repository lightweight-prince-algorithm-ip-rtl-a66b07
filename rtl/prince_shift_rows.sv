// prince_shift_rows: the PRINCE nibble permutation SR, or its inverse SR^-1.
//
// The state is seen as a 4x4 array of nibbles, filled column by column, and
// row r is rotated left by r positions, as in the AES ShiftRows step. Output
// nibble i takes input nibble SR_PERM[i] (SR) or the reverse mapping (SR^-1).
// It is wiring only: no logic cells are needed.
//
// Interface: state_i (64 bits) -> state_o (64 bits), no clock.
//
// The permutation is the PRINCE definition's; the reference design only names it.
module prince_shift_rows
  import prince_pkg::*;
#(
  parameter bit INVERSE = 1'b0
) (
  input  block_t state_i,
  output block_t state_o
);

  always_comb begin
    for (int i = 0; i < 16; i++) begin
      if (INVERSE) state_o[nib_hi(SR_PERM[i]) -: 4] = state_i[nib_hi(i) -: 4];
      else         state_o[nib_hi(i) -: 4]          = state_i[nib_hi(SR_PERM[i]) -: 4];
    end
  end

endmodule
