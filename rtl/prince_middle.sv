// prince_middle: the middle involution of PRINCE, joining the forward and
// inverse halves of the cipher.
//
// out = S^-1(M'(S(in))). M' is an involution and the outer S / S^-1 pair
// mirror each other, so the whole layer is its own inverse; this symmetry is
// what lets one circuit decrypt when the round key is changed to k1 ^ alpha.
// Combinational.
//
// Interface: state_i (64 bits) -> state_o (64 bits).
//
// Follows the PRINCE definition; the reference block diagram draws this layer as
// SR^-1, M', SR, which only regroups the same steps.
module prince_middle
  import prince_pkg::*;
(
  input  block_t state_i,
  output block_t state_o
);

  block_t s_out, mp_out;

  prince_sbox_layer   #(.INVERSE(1'b0)) u_s    (.state_i(state_i), .state_o(s_out));
  prince_mprime_layer                   u_mp   (.state_i(s_out),   .state_o(mp_out));
  prince_sbox_layer   #(.INVERSE(1'b1)) u_sinv (.state_i(mp_out),  .state_o(state_o));

endmodule
