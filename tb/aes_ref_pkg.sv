// aes_ref_pkg: a software-style reference model of AES-128 for the testbenches.
//
// It is written independently of the RTL: the S-box is found by searching for
// each byte's multiplicative inverse (trying all 255 candidates) and applying
// the affine transform bit by bit, b'_i = b_i ^ b_(i+4) ^ b_(i+5) ^ b_(i+6) ^
// b_(i+7) ^ c_i with c = 0x63; the inverse S-box is the inverse of that table.
// The state is handled as a 4x4 byte array s[row][col]; a 128-bit block maps to
// it as in the standard, byte i = s[i%4][i/4], byte 0 in bits [127:120].
// Known-answer vectors of FIPS-197 are collected here too.
package aes_ref_pkg;

  typedef logic [7:0]   u8;
  typedef logic [127:0] u128;
  typedef u8            st_t [4][4];

  localparam u128 FIPS_B_KEY = 128'h2b7e151628aed2a6abf7158809cf4f3c;
  localparam u128 FIPS_B_PT  = 128'h3243f6a8885a308d313198a2e0370734;
  localparam u128 FIPS_B_CT  = 128'h3925841d02dc09fbdc118597196a0b32;
  localparam u128 FIPS_C_KEY = 128'h000102030405060708090a0b0c0d0e0f;
  localparam u128 FIPS_C_PT  = 128'h00112233445566778899aabbccddeeff;
  localparam u128 FIPS_C_CT  = 128'h69c4e0d86a7b0430d8cdb78070b4c55a;
  // Example block of the ECB test set that uses the FIPS_B key.
  localparam u128 ECB_PT     = 128'h6bc1bee22e409f96e93d7e117393172a;
  localparam u128 ECB_CT     = 128'h3ad77bb40d7a3660a89ecaf32466ef97;

  u8  sbox_tab [256];
  u8  inv_tab  [256];
  bit tab_ready = 1'b0;

  function automatic u8 mul(u8 a, u8 b);
    int unsigned x = a, y = b, r = 0;
    while (y != 0) begin
      if (y & 1) r ^= x;
      x <<= 1;
      if (x & 32'h100) x ^= 32'h11b;
      y >>= 1;
    end
    return u8'(r);
  endfunction

  function automatic void build_tables();
    for (int v = 0; v < 256; v++) begin
      u8 inv = 8'h00;
      u8 s;
      for (int y = 1; y < 256; y++) if (mul(u8'(v), u8'(y)) == 8'h01) inv = u8'(y);
      for (int i = 0; i < 8; i++)
        s[i] = inv[i] ^ inv[(i+4)%8] ^ inv[(i+5)%8] ^ inv[(i+6)%8] ^ inv[(i+7)%8]
               ^ ((8'h63 >> i) & 1);
      sbox_tab[v] = s;
    end
    for (int v = 0; v < 256; v++) inv_tab[sbox_tab[v]] = u8'(v);
    tab_ready = 1'b1;
  endfunction

  function automatic u8 sbox(u8 v);
    if (!tab_ready) build_tables();
    return sbox_tab[v];
  endfunction

  function automatic u8 inv_sbox(u8 v);
    if (!tab_ready) build_tables();
    return inv_tab[v];
  endfunction

  function automatic st_t to_st(u128 b);
    st_t s;
    for (int i = 0; i < 16; i++) s[i%4][i/4] = b[127-8*i -: 8];
    return s;
  endfunction

  function automatic u128 from_st(st_t s);
    u128 b;
    for (int i = 0; i < 16; i++) b[127-8*i -: 8] = s[i%4][i/4];
    return b;
  endfunction

  function automatic u128 sub_bytes(u128 b);
    st_t s = to_st(b);
    foreach (s[r, c]) s[r][c] = sbox(s[r][c]);
    return from_st(s);
  endfunction

  function automatic u128 inv_sub_bytes(u128 b);
    st_t s = to_st(b);
    foreach (s[r, c]) s[r][c] = inv_sbox(s[r][c]);
    return from_st(s);
  endfunction

  function automatic u128 shift_rows(u128 b);
    st_t s = to_st(b), t;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++) t[r][c] = s[r][(c + r) % 4];
    return from_st(t);
  endfunction

  function automatic u128 inv_shift_rows(u128 b);
    st_t s = to_st(b), t;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++) t[r][(c + r) % 4] = s[r][c];
    return from_st(t);
  endfunction

  // Matrix product column by column with a circulant first row m0..m3.
  function automatic u128 mat_columns(u128 b, u8 m0, u8 m1, u8 m2, u8 m3);
    st_t s = to_st(b), t;
    u8 m [4] = '{m0, m1, m2, m3};
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++) begin
        t[r][c] = 8'h00;
        for (int k = 0; k < 4; k++) t[r][c] ^= mul(m[(k - r + 4) % 4], s[k][c]);
      end
    return from_st(t);
  endfunction

  function automatic u128 mix_columns(u128 b);
    return mat_columns(b, 8'h02, 8'h03, 8'h01, 8'h01);
  endfunction

  function automatic u128 inv_mix_columns(u128 b);
    return mat_columns(b, 8'h0e, 8'h0b, 8'h0d, 8'h09);
  endfunction

  // Round key r (0..10) of the AES-128 key schedule.
  function automatic u128 round_key(u128 key, int r);
    logic [31:0] w [44];
    u8 rc = 8'h01;
    for (int i = 0; i < 4; i++) w[i] = key[127-32*i -: 32];
    for (int i = 4; i < 44; i++) begin
      logic [31:0] t = w[i-1];
      if (i % 4 == 0) begin
        t = {t[23:0], t[31:24]};
        t = {sbox(t[31:24]), sbox(t[23:16]), sbox(t[15:8]), sbox(t[7:0])};
        t[31:24] ^= rc;
        rc = mul(rc, 8'h02);
      end
      w[i] = w[i-4] ^ t;
    end
    return {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]};
  endfunction

  function automatic u128 encrypt(u128 key, u128 pt);
    u128 s = pt ^ round_key(key, 0);
    for (int r = 1; r <= 10; r++) begin
      s = shift_rows(sub_bytes(s));
      if (r < 10) s = mix_columns(s);
      s ^= round_key(key, r);
    end
    return s;
  endfunction

  function automatic u128 decrypt(u128 key, u128 ct);
    u128 s = ct ^ round_key(key, 10);
    for (int r = 9; r >= 0; r--) begin
      s = inv_sub_bytes(inv_shift_rows(s));
      s ^= round_key(key, r);
      if (r > 0) s = inv_mix_columns(s);
    end
    return s;
  endfunction

  function automatic u128 rand128();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

endpackage
