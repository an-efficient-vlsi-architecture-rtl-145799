// aes_pkg: types, constants and GF(2^8) helpers shared by the AES-128
// encryptor modules.
//
// The 128-bit state and round keys use the FIPS-197 byte order: byte n of a
// block sits in bits [127-8n -: 8] and maps to state row n%4, column n/4,
// so a 32-bit column (word) c occupies bits [127-32c -: 32].
//
// The S-box is built at elaboration time exactly as the substitution stage
// is defined: multiplicative inverse in GF(2^8) (with 00 mapped to itself)
// followed by the affine transformation over GF(2). The inverse is formed
// as x^254 by square-and-multiply. The resulting 256-entry constant is then
// used as a plain look-up table, so no inversion logic is built.
//
// Pipeline timing constants describe the sub-pipelined round: a register
// after SubBytes, ShiftRows, MixColumns and AddRoundKey in rounds 1..9,
// and after SubBytes, ShiftRows and AddRoundKey in round 10.
package aes_pkg;

  typedef logic [127:0] block_t;   // 128-bit state or round key
  typedef logic [31:0]  word_t;    // one state column / key word
  typedef logic [7:0]   byte_t;

  localparam int unsigned NR           = 10; // rounds of AES-128
  localparam int unsigned NB           = 4;  // state columns
  localparam int unsigned ROUND_STAGES = 4;  // registers in rounds 1..9
  localparam int unsigned FINAL_STAGES = 3;  // registers in round 10

  // Cycle, counted from the cycle the input registers hold a block, in
  // which AddRoundKey of round r reads its round key.
  function automatic int unsigned key_use_cycle(int unsigned r);
    if (r == 0)       return 0;
    else if (r < NR)  return ROUND_STAGES * r;
    else              return ROUND_STAGES * (NR - 1) + FINAL_STAGES;
  endfunction

  // Cycles from a block at the plaintext/key ports to its ciphertext at the
  // output register: input register, initial AddRoundKey register, rounds.
  localparam int unsigned LATENCY = 2 + ROUND_STAGES * (NR - 1) + FINAL_STAGES;

  // Multiplication by x ({02}) modulo x^8+x^4+x^3+x+1.
  function automatic byte_t xtime(byte_t a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  // General GF(2^8) product by shift-and-add.
  function automatic byte_t gf_mul(byte_t a, byte_t b);
    byte_t p = 8'h00;
    byte_t x = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= x;
      x = xtime(x);
    end
    return p;
  endfunction

  // Multiplicative inverse as a^254; 0 maps to 0.
  function automatic byte_t gf_inv(byte_t a);
    byte_t r = 8'h01;
    byte_t s = a;
    // 254 = 1111_1110b
    for (int i = 0; i < 8; i++) begin
      if (i != 0) r = gf_mul(r, s);
      s = gf_mul(s, s);
    end
    return r;
  endfunction

  // Affine transformation: b'_i = b_i ^ b_(i+4) ^ b_(i+5) ^ b_(i+6) ^ b_(i+7) ^ c_i,
  // indices mod 8, c = 63.
  function automatic byte_t affine(byte_t b);
    byte_t o;
    for (int i = 0; i < 8; i++)
      o[i] = b[i] ^ b[(i + 4) % 8] ^ b[(i + 5) % 8] ^ b[(i + 6) % 8] ^ b[(i + 7) % 8];
    return o ^ 8'h63;
  endfunction

  typedef logic [255:0][7:0] sbox_table_t;

  function automatic sbox_table_t build_sbox();
    sbox_table_t t;
    for (int i = 0; i < 256; i++) t[i] = affine(gf_inv(byte_t'(i)));
    return t;
  endfunction

  localparam sbox_table_t SBOX = build_sbox();

  // Round constants Rcon[r] = x^(r-1), r = 1..10, in the top byte of a word.
  function automatic byte_t rcon(int unsigned r);
    byte_t c = 8'h01;
    for (int unsigned i = 1; i < r; i++) c = xtime(c);
    return c;
  endfunction

  // Byte n (FIPS order) of a 128-bit block.
  function automatic byte_t get_byte(block_t b, int unsigned n);
    return b[127 - 8 * n -: 8];
  endfunction

endpackage
