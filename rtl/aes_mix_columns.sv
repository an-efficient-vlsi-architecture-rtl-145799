// aes_mix_columns: MixColumns transformation of a 128-bit AES state.
//
// Every column (s0,s1,s2,s3) is treated on its own and multiplied by the
// fixed circulant GF(2^8) matrix
//     | 02 03 01 01 |
//     | 01 02 03 01 |
//     | 01 01 02 03 |
//     | 03 01 01 02 |
// so each output byte is the GF(2^8) sum (XOR) of the products of one
// matrix row with the column. Multiplication by 02 is xtime, by 03 is
// xtime XOR the byte itself. Combinational.
// The architecture only calls this the 'standard GF matrix'; the matrix
// itself is taken from the AES standard (FIPS-197).

module aes_mix_columns
  import aes_pkg::*;
(
  input  block_t in_state,
  output block_t out_state
);

  always_comb begin
    for (int c = 0; c < 4; c++) begin
      byte_t s0, s1, s2, s3;
      s0 = in_state[127 - 32 * c      -: 8];
      s1 = in_state[127 - 32 * c - 8  -: 8];
      s2 = in_state[127 - 32 * c - 16 -: 8];
      s3 = in_state[127 - 32 * c - 24 -: 8];
      out_state[127 - 32 * c      -: 8] = xtime(s0) ^ (xtime(s1) ^ s1) ^ s2 ^ s3;
      out_state[127 - 32 * c - 8  -: 8] = s0 ^ xtime(s1) ^ (xtime(s2) ^ s2) ^ s3;
      out_state[127 - 32 * c - 16 -: 8] = s0 ^ s1 ^ xtime(s2) ^ (xtime(s3) ^ s3);
      out_state[127 - 32 * c - 24 -: 8] = (xtime(s0) ^ s0) ^ s1 ^ s2 ^ xtime(s3);
    end
  end

endmodule
