// aes_shift_rows: the ShiftRows transformation of AES.
//
// The state is a 4x4 array of bytes, s[r][c] = byte r + 4*c of the block.
// Row 0 is left as it is and rows 1, 2 and 3 are rotated left by 1, 2 and 3
// byte positions: s'[r][c] = s[r][(c + r) mod 4]. This is only wiring.
//
// Interface: state_i in, state_o out, combinational.
module aes_shift_rows
  import aes_pkg::*;
(
  input  block_t state_i,
  output block_t state_o
);

  for (genvar c = 0; c < 4; c++) begin : g_col
    for (genvar r = 0; r < 4; r++) begin : g_row
      assign state_o[BLOCK_W-1-8*(r+4*c) -: 8] =
             state_i[BLOCK_W-1-8*(r+4*((c+r)%4)) -: 8];
    end
  end

endmodule
