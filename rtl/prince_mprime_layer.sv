// prince_mprime_layer: the PRINCE linear diffusion M'.
//
// M' is a block-diagonal 64x64 binary matrix diag(M0^, M1^, M1^, M0^) that
// acts on the four 16-bit slices of the state (slice 0 = bits 63:48). Each
// 16x16 block is a 4x4 arrangement of the 4x4 matrices M0..M3, where Mk is the
// identity with diagonal entry k cleared; M0^ has block (br,bc) = M((br+bc)%4)
// and M1^ has M((br+bc+1)%4). So every output bit is the XOR of exactly three
// input bits: output bit r of nibble br in a slice is the XOR of bit r of the
// other nibbles bc, leaving out the one with (br+bc+s)%4 == r (s = 0 for M0^,
// 1 for M1^). M' is an involution, so the same module serves in both halves
// of the cipher. Bit r counts from the most significant bit of its nibble.
//
// Interface: state_i (64 bits) -> state_o (64 bits), combinational.
//
// The reference design describes the layer (three input bits per output bit);
// the matrix itself is the PRINCE definition's.
module prince_mprime_layer
  import prince_pkg::*;
(
  input  block_t state_i,
  output block_t state_o
);

  always_comb begin
    state_o = '0;
    for (int sl = 0; sl < 4; sl++) begin
      for (int br = 0; br < 4; br++) begin
        for (int r = 0; r < 4; r++) begin
          for (int bc = 0; bc < 4; bc++) begin
            // slices 0 and 3 use M0^, slices 1 and 2 use M1^
            if (((br + bc + ((sl == 1 || sl == 2) ? 1 : 0)) % 4) != r)
              state_o[63 - 16*sl - 4*br - r] ^= state_i[63 - 16*sl - 4*bc - r];
          end
        end
      end
    end
  end

endmodule
