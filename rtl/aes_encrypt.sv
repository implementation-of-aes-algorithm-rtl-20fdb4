// aes_encrypt: iterative AES-128 encryption core, one round per clock.
//
// The 128-bit state register is loaded with data_i XOR round key 0 (the
// initial AddRoundKey) in the cycle of start_i. Each of the following NR = 10
// cycles applies one round, SubBytes, ShiftRows, MixColumns and AddRoundKey
// with round key r; the last round leaves out MixColumns. After the tenth
// round ready_o goes high and data_o holds the ciphertext until the next
// start. A single AddRoundKey instance serves the initial key addition and
// the rounds: its input is data_i while idle and the round result otherwise.
//
// Round keys come from outside (aes_key_expansion): the core drives rk_idx_o
// (0 while idle, r in round r) and expects round_key_i for that index in the
// same cycle.
//
// Timing: start_i is sampled at a rising edge; ready_o is high after the
// NR-th (10th) rising edge that follows it, so a block takes 11 cycles
// including the start cycle, and a new start can be given in the first cycle
// in which ready_o is seen high. start_i is ignored while busy_o is high.
// Synchronous active-low reset rst_ni.
//
// The sequence of transformations follows the AES cipher; one round per
// cycle, the single shared key adder and the start/ready handshake are this
// design's choices.
module aes_encrypt
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

  block_t sb, sr, mc, ark_in, ark_out;

  aes_sub_bytes     u_sub   (.state_i(state_q), .state_o(sb));
  aes_shift_rows    u_shift (.state_i(sb),      .state_o(sr));
  aes_mix_columns   u_mix   (.state_i(sr),      .state_o(mc));
  aes_add_round_key u_ark   (.state_i(ark_in),  .round_key_i(round_key_i), .state_o(ark_out));

  always_comb begin
    if (!busy_q)                         ark_in = data_i;
    else if (round_q == rk_idx_t'(NR))   ark_in = sr;      // final round: no MixColumns
    else                                 ark_in = mc;
  end

  assign rk_idx_o = busy_q ? round_q : rk_idx_t'(0);

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
      state_q <= ark_out;
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
