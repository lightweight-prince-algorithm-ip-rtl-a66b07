// prince_key_schedule: derives the post-whitening key k0' from k0.
//
// k0' = (k0 >>> 1) ^ (k0 >> 63): a rotation right by one bit, with the old
// most significant bit (shifted down to bit 0 by k0 >> 63) folded into the
// least significant position. Instead of a 63-step shifter it is built as
// fixed wiring plus a single XOR gate on bit 0, so it costs almost no area.
//
// Interface: k0_i (64 bits) -> k0p_o (64 bits), combinational.
//
// Follows the reference design: the formula and its wiring-only build.
module prince_key_schedule
  import prince_pkg::*;
(
  input  block_t k0_i,
  output block_t k0p_o
);

  always_comb begin
    k0p_o[63]   = k0_i[0];
    k0p_o[62:1] = k0_i[63:2];
    k0p_o[0]    = k0_i[1] ^ k0_i[63];
  end

endmodule
