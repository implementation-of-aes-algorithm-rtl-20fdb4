// aes_inv_shift_rows: the InvShiftRows transformation of AES decryption.
//
// Undoes aes_shift_rows: row 0 stays, rows 1, 2 and 3 of the 4x4 state are
// rotated right by 1, 2 and 3 byte positions: s'[r][c] = s[r][(c - r) mod 4].
// Wiring only.
//
// Interface: state_i in, state_o out, combinational.
module aes_inv_shift_rows
  import aes_pkg::*;
(
  input  block_t state_i,
  output block_t state_o
);

  for (genvar c = 0; c < 4; c++) begin : g_col
    for (genvar r = 0; r < 4; r++) begin : g_row
      assign state_o[BLOCK_W-1-8*(r+4*c) -: 8] =
             state_i[BLOCK_W-1-8*(r+4*((c+4-r)%4)) -: 8];
    end
  end

endmodule
