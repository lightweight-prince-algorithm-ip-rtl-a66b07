// prince_pkg: types, constants and bit-level helpers shared by the PRINCE
// datapath modules.
//
// The cipher state is 64 bits wide and is held as logic [63:0] with bit 63 as
// the most significant bit. It is read as sixteen 4-bit nibbles, nibble 0
// being bits 63:60 (the leftmost hex digit); this is the order the hex test
// vectors are written in. The 128-bit key is {k0, k1}, k0 in bits 127:64.
//
// The S-box tables and the value alpha are those of the PRINCE definition.
// The round constants RC1..RC10 are the published PRINCE constants (digits of
// pi); they satisfy RC_i ^ RC_(11-i) = alpha, which the testbenches check.
//
// Follows the reference design: S-box tables, alpha, key order. From the PRINCE
// definition, not the reference design: RC1..RC10 and the ShiftRows order.
package prince_pkg;

  typedef logic [63:0]  block_t;
  typedef logic [127:0] key_t;
  typedef logic [3:0]   nibble_t;

  localparam block_t ALPHA = 64'hc0ac29b7c97c50dd;

  localparam block_t RC [12] = '{
    64'h0000000000000000, 64'h13198a2e03707344, 64'ha4093822299f31d0,
    64'h082efa98ec4e6c89, 64'h452821e638d01377, 64'hbe5466cf34e90c6c,
    64'h7ef84f78fd955cb1, 64'h85840851f1ac43aa, 64'hc882d32f25323c54,
    64'h64a51195e0e3610d, 64'hd3b5a399ca0c2399, 64'hc0ac29b7c97c50dd
  };

  // S(x) and S^-1(x), indexed by x
  localparam nibble_t SBOX [16] = '{
    4'hB, 4'hF, 4'h3, 4'h2, 4'hA, 4'hC, 4'h9, 4'h1,
    4'h6, 4'h7, 4'h8, 4'h0, 4'hE, 4'h5, 4'hD, 4'h4
  };
  localparam nibble_t SBOX_INV [16] = '{
    4'hB, 4'h7, 4'h3, 4'h2, 4'hF, 4'hD, 4'h8, 4'h9,
    4'hA, 4'h6, 4'h4, 4'h0, 4'h5, 4'hE, 4'hC, 4'h1
  };

  // ShiftRows: output nibble i takes input nibble SR_PERM[i]
  localparam int SR_PERM [16] = '{0, 5, 10, 15, 4, 9, 14, 3, 8, 13, 2, 7, 12, 1, 6, 11};

  // Position of nibble n (0 = leftmost) inside a 64-bit word: bits [hi -: 4]
  function automatic int nib_hi(input int n);
    return 63 - 4 * n;
  endfunction

endpackage
