// aes_key_step: one step of the AES-128 key expansion.
//
// From the four words w0..w3 of round key i-1 it forms the four words
// w4..w7 of round key i:
//     w4 = w0 ^ g(w3),  w5 = w1 ^ w4,  w6 = w2 ^ w5,  w7 = w3 ^ w6
// where g rotates the word left by one byte (RotWord), passes each byte
// through the S-box (SubWord) and XORs the round constant Rcon[i] = x^(i-1)
// into the top byte. The round number arrives as an input so a single
// module serves all ten steps. Combinational.
// The g-plus-XOR-chain structure follows the architecture's key expansion
// figure; the contents of g (RotWord, SubWord, Rcon) are the AES standard's.

module aes_key_step
  import aes_pkg::*;
(
  input  block_t     prev_key,   // w0..w3, w0 in bits 127:96
  input  logic [3:0] round,      // i, 1..10
  output block_t     next_key    // w4..w7
);

  word_t w0, w1, w2, w3, rot, sub, g, w4, w5, w6, w7;
  byte_t rc;

  always_comb begin
    {w0, w1, w2, w3} = prev_key;
    rot = {w3[23:0], w3[31:24]};
  end

  for (genvar b = 0; b < 4; b++) begin : g_subword
    aes_sbox u_sbox (.in_byte(rot[8*b +: 8]), .out_byte(sub[8*b +: 8]));
  end

  always_comb begin
    rc = 8'h01;
    for (int unsigned i = 2; i <= NR; i++)
      if (int'(round) >= i) rc = xtime(rc);
    g  = sub ^ {rc, 24'h0};
    w4 = w0 ^ g;
    w5 = w1 ^ w4;
    w6 = w2 ^ w5;
    w7 = w3 ^ w6;
    next_key = {w4, w5, w6, w7};
  end

endmodule
