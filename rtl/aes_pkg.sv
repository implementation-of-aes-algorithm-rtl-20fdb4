// aes_pkg: types, constants and GF(2^8) arithmetic shared by the AES-128 blocks.
//
// A 128-bit block is held as one packed vector in the byte order of the
// standard: byte 0 is bits [127:120] and byte i of the block is state element
// s[r][c] with i = r + 4*c, so each 32-bit slice is one column of the 4x4
// state. The S-box and its inverse are not stored as typed-in tables: they are
// built at elaboration time from their definition, the multiplicative inverse
// in GF(2^8) modulo m(x) = x^8 + x^4 + x^3 + x + 1 followed by the affine
// transform, and then used as read-only lookup tables (ROMs).
//
// The number of rounds (10) and the 128-bit key follow the AES-128
// configuration that the design implements; the byte order and the way the
// tables are produced are this design's choices.
package aes_pkg;

  localparam int unsigned NR        = 10;   // rounds for a 128-bit key
  localparam int unsigned BLOCK_W   = 128;
  localparam int unsigned RK_IDX_W  = 4;    // index of a round key, 0..NR

  typedef logic [7:0]           byte_t;
  typedef logic [31:0]          word_t;
  typedef logic [BLOCK_W-1:0]   block_t;
  typedef logic [RK_IDX_W-1:0]  rk_idx_t;
  typedef byte_t                sbox_t [256];

  typedef enum logic {
    MODE_ENCRYPT = 1'b0,
    MODE_DECRYPT = 1'b1
  } mode_t;

  // Byte i (i = r + 4*c) of a block.
  function automatic byte_t get_byte(block_t b, int unsigned i);
    return b[BLOCK_W-1-8*i -: 8];
  endfunction

  // Multiplication by x ({02}) modulo m(x).
  function automatic byte_t xtime(byte_t a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  // General multiplication in GF(2^8) modulo m(x), shift-and-add.
  function automatic byte_t gf_mul(byte_t a, byte_t b);
    byte_t acc = '0;
    byte_t p   = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) acc ^= p;
      p = xtime(p);
    end
    return acc;
  endfunction

  // Multiplicative inverse as a^254 (a^-1 = a^(2^8-2)); maps 0 to 0.
  function automatic byte_t gf_inv(byte_t a);
    byte_t r = 8'h01;
    byte_t p = a;
    for (int i = 1; i < 8; i++) begin
      p = gf_mul(p, p);        // a^(2^i)
      r = gf_mul(r, p);
    end
    return r;
  endfunction

  // Affine transform of the S-box: b ^ rotl1 ^ rotl2 ^ rotl3 ^ rotl4 ^ 0x63.
  function automatic byte_t affine(byte_t b);
    byte_t r = b ^ 8'h63;
    for (int k = 1; k <= 4; k++) r ^= byte_t'((b << k) | (b >> (8 - k)));
    return r;
  endfunction

  function automatic sbox_t gen_sbox();
    sbox_t t;
    for (int x = 0; x < 256; x++) t[x] = affine(gf_inv(byte_t'(x)));
    return t;
  endfunction

  function automatic sbox_t gen_inv_sbox();
    sbox_t t;
    for (int x = 0; x < 256; x++) t[affine(gf_inv(byte_t'(x)))] = byte_t'(x);
    return t;
  endfunction

  localparam sbox_t SBOX     = gen_sbox();
  localparam sbox_t INV_SBOX = gen_inv_sbox();

endpackage
