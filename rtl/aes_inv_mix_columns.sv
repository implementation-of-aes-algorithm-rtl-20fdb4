// aes_inv_mix_columns: the InvMixColumns transformation of AES decryption.
//
// Each state column (a0, a1, a2, a3) is multiplied over GF(2^8) by the inverse
// of the MixColumns matrix:
//   b0 = 0e*a0 ^ 0b*a1 ^ 0d*a2 ^ 09*a3
//   b1 = 09*a0 ^ 0e*a1 ^ 0b*a2 ^ 0d*a3
//   b2 = 0d*a0 ^ 09*a1 ^ 0e*a2 ^ 0b*a3
//   b3 = 0b*a0 ^ 0d*a1 ^ 09*a2 ^ 0e*a3
// The constant multiplications are built from the powers x, x^2 and x^3 of
// each byte (repeated xtime): 09 = x^3+1, 0b = x^3+x+1, 0d = x^3+x^2+1,
// 0e = x^3+x^2+x.
//
// Interface: state_i in, state_o out, combinational.
module aes_inv_mix_columns
  import aes_pkg::*;
(
  input  block_t state_i,
  output block_t state_o
);

  for (genvar c = 0; c < 4; c++) begin : g_col
    byte_t a [4];
    byte_t m09 [4], m0b [4], m0d [4], m0e [4];

    for (genvar k = 0; k < 4; k++) begin : g_mul
      byte_t x1, x2, x3;
      assign a[k]   = state_i[BLOCK_W-1-32*c-8*k -: 8];
      assign x1     = xtime(a[k]);
      assign x2     = xtime(x1);
      assign x3     = xtime(x2);
      assign m09[k] = x3 ^ a[k];
      assign m0b[k] = x3 ^ x1 ^ a[k];
      assign m0d[k] = x3 ^ x2 ^ a[k];
      assign m0e[k] = x3 ^ x2 ^ x1;
    end

    assign state_o[BLOCK_W-1-32*c -: 32] = {
      m0e[0] ^ m0b[1] ^ m0d[2] ^ m09[3],
      m09[0] ^ m0e[1] ^ m0b[2] ^ m0d[3],
      m0d[0] ^ m09[1] ^ m0e[2] ^ m0b[3],
      m0b[0] ^ m0d[1] ^ m09[2] ^ m0e[3]
    };
  end

endmodule
