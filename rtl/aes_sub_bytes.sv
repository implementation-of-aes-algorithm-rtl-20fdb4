// aes_sub_bytes: the SubBytes transformation of AES.
//
// Each of the 16 bytes of the 128-bit state is replaced by its S-box value,
// the multiplicative inverse in GF(2^8) followed by the affine transform. The
// block is purely combinational: sixteen parallel lookups into the read-only
// table SBOX that aes_pkg builds from that definition at elaboration time.
//
// Interface: state_i is the state in, state_o the substituted state, in the
// block byte order of aes_pkg (byte 0 in bits [127:120]). No clock; the result
// is valid in the same cycle.
module aes_sub_bytes
  import aes_pkg::*;
(
  input  block_t state_i,
  output block_t state_o
);

  for (genvar i = 0; i < 16; i++) begin : g_byte
    assign state_o[BLOCK_W-1-8*i -: 8] = SBOX[state_i[BLOCK_W-1-8*i -: 8]];
  end

endmodule
