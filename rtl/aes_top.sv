// aes_top: AES-128 encryption and decryption unit.
//
// One request encrypts or decrypts one 128-bit block with a 128-bit key. The
// unit holds the key expansion with its round-key store, an iterative
// encryption core and an iterative decryption core. mode_i selects which core
// runs; the key store's single read port is steered to that core.
//
// Sequence of a request (start_i pulse, with key_i, data_i and mode_i sampled
// in the same cycle):
//   EXPAND  the 11 round keys are generated, one per cycle (10 cycles);
//   RUN     the selected core is started and runs its initial key addition
//           and 10 rounds (11 cycles);
//   then ready_o rises and data_o holds the ciphertext (encryption) or the
//   plaintext (decryption) until the next start.
// With a start at edge 0, ready_o is high after edge 22. busy_o is high from
// the edge after start until the result is there; start_i is ignored while
// busy. Synchronous active-low reset rst_ni.
//
// The split into key expansion, encryption and decryption follows the
// structure of the AES algorithm; expanding the key anew for every request,
// the sharing of one key store by both cores, and the start/ready handshake
// are this design's own choices.
module aes_top
  import aes_pkg::*;
(
  input  logic   clk_i,
  input  logic   rst_ni,
  input  logic   start_i,
  input  mode_t  mode_i,
  input  block_t key_i,
  input  block_t data_i,
  output block_t data_o,
  output logic   busy_o,
  output logic   ready_o
);

  typedef enum logic [1:0] {
    S_IDLE,
    S_EXPAND,
    S_RUN
  } state_e;

  state_e  state_q;
  mode_t   mode_q;
  block_t  data_q;
  logic    ready_q;

  logic    kx_start, kx_busy, kx_valid;
  rk_idx_t rd_idx, enc_idx, dec_idx;
  block_t  rd_key;

  logic    core_start, enc_start, dec_start;
  logic    enc_busy, enc_ready, dec_busy, dec_ready;
  block_t  enc_out, dec_out;

  assign kx_start   = (state_q == S_IDLE) && start_i;
  assign core_start = (state_q == S_EXPAND) && kx_valid && !kx_busy;
  assign enc_start  = core_start && (mode_q == MODE_ENCRYPT);
  assign dec_start  = core_start && (mode_q == MODE_DECRYPT);
  assign rd_idx     = (mode_q == MODE_DECRYPT) ? dec_idx : enc_idx;

  aes_key_expansion u_kx (
    .clk_i, .rst_ni,
    .start_i      (kx_start),
    .key_i        (key_i),
    .busy_o       (kx_busy),
    .keys_valid_o (kx_valid),
    .rd_idx_i     (rd_idx),
    .rd_key_o     (rd_key)
  );

  aes_encrypt u_enc (
    .clk_i, .rst_ni,
    .start_i     (enc_start),
    .data_i      (data_q),
    .rk_idx_o    (enc_idx),
    .round_key_i (rd_key),
    .data_o      (enc_out),
    .busy_o      (enc_busy),
    .ready_o     (enc_ready)
  );

  aes_decrypt u_dec (
    .clk_i, .rst_ni,
    .start_i     (dec_start),
    .data_i      (data_q),
    .rk_idx_o    (dec_idx),
    .round_key_i (rd_key),
    .data_o      (dec_out),
    .busy_o      (dec_busy),
    .ready_o     (dec_ready)
  );

  logic core_done;
  assign core_done = (mode_q == MODE_DECRYPT) ? (dec_ready && !dec_busy)
                                              : (enc_ready && !enc_busy);

  always_ff @(posedge clk_i) begin
    if (!rst_ni) begin
      state_q <= S_IDLE;
      mode_q  <= MODE_ENCRYPT;
      data_q  <= '0;
      ready_q <= 1'b0;
    end else begin
      unique case (state_q)
        S_IDLE: if (start_i) begin
          mode_q  <= mode_i;
          data_q  <= data_i;
          ready_q <= 1'b0;
          state_q <= S_EXPAND;
        end
        S_EXPAND: if (core_start) state_q <= S_RUN;
        S_RUN: if (core_done) begin
          ready_q <= 1'b1;
          state_q <= S_IDLE;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  assign data_o  = (mode_q == MODE_DECRYPT) ? dec_out : enc_out;
  assign busy_o  = (state_q != S_IDLE);
  assign ready_o = ready_q;

  // Only one core runs at a time, and never while the keys are being made.
  a_one_core: assert property (@(posedge clk_i) disable iff (!rst_ni)
    !(enc_busy && dec_busy));
  a_no_core_during_expand: assert property (@(posedge clk_i) disable iff (!rst_ni)
    kx_busy |-> !(enc_busy || dec_busy));

endmodule
