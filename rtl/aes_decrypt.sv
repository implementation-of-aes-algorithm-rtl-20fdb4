// aes_decrypt: iterative AES-128 decryption core (inverse cipher), one round
// per clock.
//
// In the cycle of start_i the state register takes data_i XOR round key NR.
// Each of the next NR = 10 cycles applies InvShiftRows, InvSubBytes,
// AddRoundKey with round key NR - r and, in all but the last of them,
// InvMixColumns. After the last one ready_o rises and data_o holds the
// plaintext until the next start. As in the encryption core, one AddRoundKey
// instance serves both the first key addition and the rounds.
//
// The core reads its round keys backwards: rk_idx_o is NR while idle and
// NR - r in round r; round_key_i must carry that key in the same cycle.
//
// Timing: start_i sampled at a rising edge, ready_o high after the 10th rising
// edge that follows it (11 cycles per block including the start cycle);
// start_i ignored while busy_o. Synchronous active-low reset rst_ni.
//
// The order of the inverse transformations is the inverse cipher of AES; the
// per-cycle schedule and the handshake are this design's choices.
module aes_decrypt
  import aes_pkg::*;
(
  input  logic    clk_i,
  input  logic    rst_ni,
  input  logic    start_i,
  input  block_t  data_i,
  output rk_idx_t rk_idx_o,
  input  block_t  round_key_i,
  output block_t  data_o,
  output logic    busy_o,
  output logic    ready_o
);

  block_t  state_q;
  rk_idx_t round_q;
  logic    busy_q, ready_q;

  block_t isr, isb, ark_in, ark_out, imc, next_state;

  aes_inv_shift_rows  u_ishift (.state_i(state_q), .state_o(isr));
  aes_inv_sub_bytes   u_isub   (.state_i(isr),     .state_o(isb));
  aes_add_round_key   u_ark    (.state_i(ark_in),  .round_key_i(round_key_i), .state_o(ark_out));
  aes_inv_mix_columns u_imix   (.state_i(ark_out), .state_o(imc));

  assign ark_in     = busy_q ? isb : data_i;
  assign next_state = (round_q == rk_idx_t'(NR)) ? ark_out : imc;  // last round: no InvMixColumns
  assign rk_idx_o   = busy_q ? rk_idx_t'(NR) - round_q : rk_idx_t'(NR);

  always_ff @(posedge clk_i) begin
    if (!rst_ni) begin
      state_q <= '0;
      round_q <= '0;
      busy_q  <= 1'b0;
      ready_q <= 1'b0;
    end else if (!busy_q) begin
      if (start_i) begin
        state_q <= ark_out;
        round_q <= rk_idx_t'(1);
        busy_q  <= 1'b1;
        ready_q <= 1'b0;
      end
    end else begin
      state_q <= next_state;
      if (round_q == rk_idx_t'(NR)) begin
        busy_q  <= 1'b0;
        ready_q <= 1'b1;
      end else begin
        round_q <= round_q + rk_idx_t'(1);
      end
    end
  end

  assign data_o  = state_q;
  assign busy_o  = busy_q;
  assign ready_o = ready_q;

  a_not_busy_and_ready: assert property (@(posedge clk_i) disable iff (!rst_ni)
    !(busy_q && ready_q));
  a_round_in_range: assert property (@(posedge clk_i) disable iff (!rst_ni)
    busy_q |-> (round_q >= rk_idx_t'(1) && round_q <= rk_idx_t'(NR)));

endmodule
