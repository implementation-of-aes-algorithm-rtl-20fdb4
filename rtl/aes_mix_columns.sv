// aes_mix_columns: the MixColumns transformation of AES.
//
// Each column (a0, a1, a2, a3) of the state is taken as a polynomial over
// GF(2^8) and multiplied by the fixed circulant matrix
//   b0 = 2*a0 ^ 3*a1 ^   a2 ^   a3
//   b1 =   a0 ^ 2*a1 ^ 3*a2 ^   a3
//   b2 =   a0 ^   a1 ^ 2*a2 ^ 3*a3
//   b3 = 3*a0 ^   a1 ^   a2 ^ 2*a3
// where ^ is XOR and * is multiplication modulo x^8 + x^4 + x^3 + x + 1.
// Multiplication by 2 is xtime (shift and conditional XOR with 0x1b) and by 3
// is xtime(a) ^ a, so the four columns are four small XOR networks.
//
// Interface: state_i in, state_o out, combinational. Column c of the state is
// bits [127-32c -: 32] of the block, a0 in the top byte.
module aes_mix_columns
  import aes_pkg::*;
(
  input  block_t state_i,
  output block_t state_o
);

  for (genvar c = 0; c < 4; c++) begin : g_col
    byte_t a0, a1, a2, a3;
    assign {a0, a1, a2, a3} = state_i[BLOCK_W-1-32*c -: 32];
    assign state_o[BLOCK_W-1-32*c -: 32] = {
      xtime(a0) ^ (xtime(a1) ^ a1) ^ a2 ^ a3,
      a0 ^ xtime(a1) ^ (xtime(a2) ^ a2) ^ a3,
      a0 ^ a1 ^ xtime(a2) ^ (xtime(a3) ^ a3),
      (xtime(a0) ^ a0) ^ a1 ^ a2 ^ xtime(a3)
    };
  end

endmodule
