// prince_round: one PRINCE round, forward R_i or inverse R_i^-1.
//
// Forward (INVERSE = 0), used for rounds 1..5:
//   out = SR(M'(S(in))) ^ RC_i ^ k1
// Inverse (INVERSE = 1), used for rounds 6..10:
//   out = S^-1(M'(SR^-1(in ^ RC_i ^ k1)))
// M = SR o M' is the linear layer; the inverse round undoes each step of a
// forward round in the opposite order. RC_INDEX selects the round constant
// from prince_pkg. Combinational; the whole cipher is unrolled.
//
// Interface: state_i, k1_i (64 bits each) -> state_o (64 bits).
//
// Round order follows the PRINCE definition, which the published test vectors
// confirm; the reference block diagram draws the steps in another order.
module prince_round
  import prince_pkg::*;
#(
  parameter bit INVERSE  = 1'b0,
  parameter int RC_INDEX = 1
) (
  input  block_t state_i,
  input  block_t k1_i,
  output block_t state_o
);

  block_t s_in, s_out, mp_in, mp_out, sr_in, sr_out;

  prince_sbox_layer   #(.INVERSE(INVERSE)) u_sbox (.state_i(s_in),  .state_o(s_out));
  prince_mprime_layer                      u_mp   (.state_i(mp_in), .state_o(mp_out));
  prince_shift_rows   #(.INVERSE(INVERSE)) u_sr   (.state_i(sr_in), .state_o(sr_out));

  if (!INVERSE) begin : g_fwd
    assign s_in    = state_i;
    assign mp_in   = s_out;
    assign sr_in   = mp_out;
    assign state_o = sr_out ^ RC[RC_INDEX] ^ k1_i;
  end else begin : g_inv
    assign sr_in   = state_i ^ RC[RC_INDEX] ^ k1_i;
    assign mp_in   = sr_out;
    assign s_in    = mp_out;
    assign state_o = s_out;
  end

endmodule
