// aes_add_round_key: AddRoundKey transformation.
//
// The 128 state bits are XORed bit by bit with the 128 bits of the round
// key. Seen column-wise, state column c is combined with key word w[l+c],
// l = round * Nb. The same unit performs the initial key addition in front
// of round 1. Combinational.
// The column-wise XOR follows the architecture's description.

module aes_add_round_key
  import aes_pkg::*;
(
  input  block_t in_state,
  input  block_t round_key,
  output block_t out_state
);

  always_comb begin
    for (int c = 0; c < NB; c++)
      out_state[127 - 32 * c -: 32] = in_state[127 - 32 * c -: 32] ^ round_key[127 - 32 * c -: 32];
  end

endmodule
