// aes_add_round_key: the AddRoundKey transformation of AES.
//
// The 128-bit round key is added to the state in GF(2), that is bitwise XOR.
// The same block serves encryption and decryption (XOR is its own inverse).
//
// Interface: state_i and round_key_i in, state_o out, combinational.
module aes_add_round_key
  import aes_pkg::*;
(
  input  block_t state_i,
  input  block_t round_key_i,
  output block_t state_o
);

  assign state_o = state_i ^ round_key_i;

endmodule
