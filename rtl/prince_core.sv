// prince_core: PRINCE-core, the 12-round keyed permutation between the two
// whitening steps, fully unrolled into one combinational path.
//
//   x = in ^ k1 ^ RC0                  (round 0: key and constant addition)
//   x = R1 .. R5 (x)                   (forward rounds, prince_round)
//   x = S^-1(M'(S(x)))                 (middle involution, prince_middle)
//   x = R6^-1 .. R10^-1 (x)            (inverse rounds)
//   out = x ^ k1 ^ RC11                (round 11)
//
// Because RC_i ^ RC_(11-i) = alpha for every i, running the same core with
// k1 ^ alpha computes the inverse permutation; prince_cipher uses this for
// decryption. There are no registers here: an encryption takes one pass
// through the logic, and the enclosing unit registers the result.
//
// Interface: state_i, k1_i (64 bits) -> state_o (64 bits).
//
// Follows the reference design: twelve rounds, unrolled into one clock cycle.
module prince_core
  import prince_pkg::*;
(
  input  block_t state_i,
  input  block_t k1_i,
  output block_t state_o
);

  block_t st [0:11];

  assign st[0] = state_i ^ k1_i ^ RC[0];

  for (genvar i = 1; i <= 5; i++) begin : g_fwd
    prince_round #(.INVERSE(1'b0), .RC_INDEX(i)) u_r (
      .state_i(st[i-1]), .k1_i(k1_i), .state_o(st[i]));
  end

  prince_middle u_mid (.state_i(st[5]), .state_o(st[6]));

  for (genvar i = 6; i <= 10; i++) begin : g_inv
    prince_round #(.INVERSE(1'b1), .RC_INDEX(i)) u_r (
      .state_i(st[i]), .k1_i(k1_i), .state_o(st[i+1]));
  end

  assign state_o = st[11] ^ k1_i ^ RC[11];

endmodule
