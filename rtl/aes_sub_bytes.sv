// aes_sub_bytes: SubBytes transformation of a full 128-bit AES state.
//
// Each of the sixteen state bytes is replaced independently through its own
// S-box instance (aes_sbox), so all bytes are substituted in parallel in a
// single combinational step. Byte order follows FIPS-197; since the
// substitution is per byte, the order does not matter here.
// Purely combinational; the register that follows it lives in aes_round.
// Sixteen parallel S-boxes follow the architecture's description of the
// stage.

module aes_sub_bytes
  import aes_pkg::*;
(
  input  block_t in_state,
  output block_t out_state
);

  for (genvar n = 0; n < 16; n++) begin : g_byte
    aes_sbox u_sbox (
      .in_byte (in_state [8*n +: 8]),
      .out_byte(out_state[8*n +: 8])
    );
  end

endmodule
