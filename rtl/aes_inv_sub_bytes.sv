// aes_inv_sub_bytes: the InvSubBytes transformation of AES decryption.
//
// Each of the 16 state bytes is replaced by its inverse S-box value, so that
// aes_inv_sub_bytes undoes aes_sub_bytes. Sixteen parallel lookups into the
// read-only table INV_SBOX, which aes_pkg builds at elaboration time by
// inverting the forward S-box permutation.
//
// Interface: state_i in, state_o out, block byte order of aes_pkg. Purely
// combinational.
module aes_inv_sub_bytes
  import aes_pkg::*;
(
  input  block_t state_i,
  output block_t state_o
);

  for (genvar i = 0; i < 16; i++) begin : g_byte
    assign state_o[BLOCK_W-1-8*i -: 8] = INV_SBOX[state_i[BLOCK_W-1-8*i -: 8]];
  end

endmodule
