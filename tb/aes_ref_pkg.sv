// aes_ref_pkg: behavioural AES-128 reference model for the testbenches.
//
// Written independently of the RTL: the S-box is found by searching for
// the multiplicative inverse (y with x*y = 1) and applying the affine map in
// its rotate form b ^ rotl1 ^ rotl2 ^ rotl3 ^ rotl4 ^ 63; the cipher works on
// a 4x4 byte array indexed [row][column]. Used only in simulation.
package aes_ref_pkg;

  typedef logic [7:0] u8;
  typedef u8 st_t [4][4];

  function automatic u8 ref_mul(u8 a, u8 b);
    u8 p = 0;
    u8 aa = a;
    u8 bb = b;
    while (bb != 0) begin
      if (bb[0]) p = p ^ aa;
      aa = (aa << 1) ^ ((aa & 8'h80) != 0 ? 8'h1b : 8'h00);
      bb = bb >> 1;
    end
    return p;
  endfunction

  function automatic u8 rotl8(u8 b, int n);
    return u8'((b << n) | (b >> (8 - n)));
  endfunction

  function automatic u8 ref_sbox(u8 x);
    u8 inv = 0;
    for (int y = 1; y < 256; y++)
      if (ref_mul(x, u8'(y)) == 8'h01) inv = u8'(y);
    return inv ^ rotl8(inv, 1) ^ rotl8(inv, 2) ^ rotl8(inv, 3) ^ rotl8(inv, 4) ^ 8'h63;
  endfunction

  // Table filled once by ref_init(), the search is slow.
  u8  sbox_tab [256];
  bit tab_ready = 0;

  function automatic void ref_init();
    if (!tab_ready) begin
      for (int i = 0; i < 256; i++) sbox_tab[i] = ref_sbox(u8'(i));
      tab_ready = 1;
    end
  endfunction

  function automatic st_t to_st(logic [127:0] b);
    st_t s;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        s[r][c] = b[127 - 8 * (4 * c + r) -: 8];
    return s;
  endfunction

  function automatic logic [127:0] from_st(st_t s);
    logic [127:0] b;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        b[127 - 8 * (4 * c + r) -: 8] = s[r][c];
    return b;
  endfunction

  function automatic logic [127:0] ref_sub_bytes(logic [127:0] b);
    st_t s = to_st(b);
    ref_init();
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++) s[r][c] = sbox_tab[s[r][c]];
    return from_st(s);
  endfunction

  function automatic logic [127:0] ref_shift_rows(logic [127:0] b);
    st_t s = to_st(b);
    st_t o;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++) o[r][c] = s[r][(c + r) % 4];
    return from_st(o);
  endfunction

  function automatic logic [127:0] ref_mix_columns(logic [127:0] b);
    st_t s = to_st(b);
    st_t o;
    u8 m [4][4] = '{'{2, 3, 1, 1}, '{1, 2, 3, 1}, '{1, 1, 2, 3}, '{3, 1, 1, 2}};
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++) begin
        o[r][c] = 0;
        for (int k = 0; k < 4; k++) o[r][c] = o[r][c] ^ ref_mul(m[r][k], s[k][c]);
      end
    return from_st(o);
  endfunction

  // All 44 key words as 11 round keys.
  typedef logic [127:0] keys_t [11];

  function automatic keys_t ref_expand(logic [127:0] key);
    logic [31:0] w [44];
    logic [31:0] t;
    u8 rc = 8'h01;
    keys_t k;
    ref_init();
    for (int i = 0; i < 4; i++) w[i] = key[127 - 32 * i -: 32];
    for (int i = 4; i < 44; i++) begin
      t = w[i-1];
      if (i % 4 == 0) begin
        t = {t[23:0], t[31:24]};
        t = {sbox_tab[t[31:24]], sbox_tab[t[23:16]], sbox_tab[t[15:8]], sbox_tab[t[7:0]]};
        t[31:24] = t[31:24] ^ rc;
        rc = ref_mul(rc, 8'h02);
      end
      w[i] = w[i-4] ^ t;
    end
    for (int r = 0; r < 11; r++) k[r] = {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]};
    return k;
  endfunction

  function automatic logic [127:0] ref_encrypt(logic [127:0] pt, logic [127:0] key);
    keys_t k = ref_expand(key);
    logic [127:0] s = pt ^ k[0];
    for (int r = 1; r <= 10; r++) begin
      s = ref_shift_rows(ref_sub_bytes(s));
      if (r != 10) s = ref_mix_columns(s);
      s = s ^ k[r];
    end
    return s;
  endfunction

  function automatic logic [127:0] rand128();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

endpackage
