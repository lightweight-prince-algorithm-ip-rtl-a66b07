// prince_cipher: a complete PRINCE encryption unit (DECRYPT = 0) or
// decryption unit (DECRYPT = 1), with a one-clock-cycle latency.
//
// The 128-bit key is {k0, k1}. Encryption is
//   c = PRINCE-core_k1(p ^ k0) ^ k0'
// with k0' from prince_key_schedule. Decryption reuses the same core and
// only changes the keys: the input is whitened with k0', the core gets
// k1 ^ alpha, and the output is whitened with k0.
//
// Timing: data_i and key_i are taken at the rising clock edge where valid_i
// is high and the result appears on data_o, with valid_o high, for the cycle
// that follows; a new block can be accepted on every edge. data_o holds its
// value while valid_i is low, so the output register is only clocked when
// there is work. Reset (synchronous, active high) clears data_o and valid_o.
//
// Follows the reference design: separate encryption and decryption units and the
// one-cycle latency. Own choices: the valid handshake and the reset.
module prince_cipher
  import prince_pkg::*;
#(
  parameter bit DECRYPT = 1'b0
) (
  input  logic   clk,
  input  logic   rst,
  input  logic   valid_i,
  input  block_t data_i,
  input  key_t   key_i,
  output logic   valid_o,
  output block_t data_o
);

  block_t k0, k1, k0p, pre_key, post_key, core_key, core_out;

  assign k0 = key_i[127:64];
  assign k1 = key_i[63:0];

  prince_key_schedule u_ks (.k0_i(k0), .k0p_o(k0p));

  assign pre_key  = DECRYPT ? k0p        : k0;
  assign core_key = DECRYPT ? k1 ^ ALPHA : k1;
  assign post_key = DECRYPT ? k0         : k0p;

  prince_core u_core (.state_i(data_i ^ pre_key), .k1_i(core_key), .state_o(core_out));

  always_ff @(posedge clk) begin
    if (rst) begin
      valid_o <= 1'b0;
      data_o  <= '0;
    end else begin
      valid_o <= valid_i;
      if (valid_i) data_o <= core_out ^ post_key;
    end
  end

endmodule
