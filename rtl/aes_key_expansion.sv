// aes_key_expansion: AES-128 KeyExpansion with a round-key store.
//
// From the 128-bit cipher key w0..w3 it derives the NR = 10 further round
// keys of the standard schedule: for each round i the first word is
//   w[4i] = w[4i-4] ^ SubWord(RotWord(w[4i-1])) ^ Rcon[i]
// and each following word is the XOR of the word before it with the word four
// positions back. RotWord rotates a word left by one byte, SubWord applies the
// S-box to its four bytes, and Rcon[i] = {x^(i-1), 00, 00, 00} in GF(2^8).
//
// The unit is iterative: one whole round key per clock, so a start pulse is
// followed by NR busy cycles, after which keys_valid_o rises and all 11 round
// keys (index 0 = cipher key, index NR = last) sit in a register file. The file
// has one combinational read port (rd_idx_i -> rd_key_o), which lets the
// encryption core read the keys forwards and the decryption core backwards.
// A start while busy restarts the expansion with the new key.
//
// Interface: start_i (one-cycle pulse, key_i sampled with it), busy_o,
// keys_valid_o (high from the end of an expansion until the next start),
// rd_idx_i / rd_key_o. Synchronous active-low reset rst_ni clears the control
// state; the key registers are not reset.
//
// The schedule is the standard one; computing all keys ahead into a store, one
// per cycle, and the handshake are this design's choices.
module aes_key_expansion
  import aes_pkg::*;
(
  input  logic    clk_i,
  input  logic    rst_ni,
  input  logic    start_i,
  input  block_t  key_i,
  output logic    busy_o,
  output logic    keys_valid_o,
  input  rk_idx_t rd_idx_i,
  output block_t  rd_key_o
);

  block_t  rk_q [NR+1];
  block_t  last_q;           // most recent round key
  byte_t   rcon_q;
  rk_idx_t round_q;          // index of the key being produced
  logic    busy_q, valid_q;

  // One step of the schedule, from the previous round key.
  word_t  w0, w1, w2, w3, rot, sub, n0, n1, n2, n3;
  block_t next_key;

  assign {w0, w1, w2, w3} = last_q;
  assign rot = {w3[23:0], w3[31:24]};
  assign sub = {SBOX[rot[31:24]], SBOX[rot[23:16]], SBOX[rot[15:8]], SBOX[rot[7:0]]};
  assign n0  = w0 ^ sub ^ {rcon_q, 24'h0};
  assign n1  = w1 ^ n0;
  assign n2  = w2 ^ n1;
  assign n3  = w3 ^ n2;
  assign next_key = {n0, n1, n2, n3};

  always_ff @(posedge clk_i) begin
    if (!rst_ni) begin
      busy_q  <= 1'b0;
      valid_q <= 1'b0;
      round_q <= '0;
      rcon_q  <= 8'h01;
    end else if (start_i) begin
      rk_q[0] <= key_i;
      last_q  <= key_i;
      rcon_q  <= 8'h01;
      round_q <= rk_idx_t'(1);
      busy_q  <= 1'b1;
      valid_q <= 1'b0;
    end else if (busy_q) begin
      rk_q[round_q] <= next_key;
      last_q        <= next_key;
      rcon_q        <= xtime(rcon_q);
      if (round_q == rk_idx_t'(NR)) begin
        busy_q  <= 1'b0;
        valid_q <= 1'b1;
      end else begin
        round_q <= round_q + rk_idx_t'(1);
      end
    end
  end

  assign busy_o       = busy_q;
  assign keys_valid_o = valid_q;
  assign rd_key_o     = (rd_idx_i <= rk_idx_t'(NR)) ? rk_q[rd_idx_i] : '0;

  // The write index stays inside the store while expanding.
  a_round_in_range: assert property (@(posedge clk_i) disable iff (!rst_ni)
    busy_q |-> (round_q >= rk_idx_t'(1) && round_q <= rk_idx_t'(NR)));

endmodule
