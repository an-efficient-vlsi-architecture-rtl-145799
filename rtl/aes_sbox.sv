// aes_sbox: the AES byte substitution (S-box), one byte in, one byte out.
//
// The 256-entry table is the package constant aes_pkg::SBOX, computed at
// elaboration from its definition: multiplicative inverse in GF(2^8), with
// 00 mapped to 00, followed by the affine transformation with constant 63.
// The module itself is a combinational read of that table, the look-up
// table form the substitution stage is described in. Purely combinational,
// no clock.
// The two-step construction follows the architecture; the field polynomial
// and the affine constant are those of the AES standard (FIPS-197).

module aes_sbox
  import aes_pkg::*;
(
  input  byte_t in_byte,
  output byte_t out_byte
);

  always_comb out_byte = SBOX[in_byte];

endmodule
