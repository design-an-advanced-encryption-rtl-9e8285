// aes_round: one registered pipeline stage for rounds 1..9, encryption or
// decryption, with its round key computed on the fly.
//
// The same module is instantiated for rounds 1 to 9; round 10 has its own
// module (aes_last_round) because it has no MixColumns. Every block travels
// with its own mode bit and round key, so blocks of both directions and of
// different keys can follow each other through the pipeline.
//   Encryption (ROUND = r):   key_out = k[r] = forward step of key_in = k[r-1];
//     state_out = MixColumns(SubBytes(ShiftRows(state_in))) ^ k[r].
//   Decryption (stage r undoes cipher round 10-r and uses k[10-r]):
//     key_out = k[10-r] = reverse step of key_in = k[11-r];
//     state_out = InvMixColumns(InvSubBytes(InvShiftRows(state_in)) ^ k[10-r]).
// (Inv)ShiftRows and (Inv)SubBytes commute, so both directions share one
// ShiftRows -> SubBytes -> MixColumns path; only where the key is added moves.
//
// Ports: clk, rst_n (asynchronous, clears valid only); in_valid, in_decrypt,
//   in_state, in_key (the previous stage's round key); out_* likewise.
// Timing: one clock from input to registered output, a new block every clock.
module aes_round
  import aes_pkg::*;
#(
  parameter int unsigned ROUND = 1   // 1..9
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  logic   in_decrypt,
  input  block_t in_state,
  input  block_t in_key,
  output logic   out_valid,
  output logic   out_decrypt,
  output block_t out_state,
  output block_t out_key
);

  block_t round_key, shifted, substituted, keyed_pre, mixed, keyed_post;
  byte_t  step_rcon;

  assign step_rcon = in_decrypt ? round_const(NR + 1 - ROUND) : round_const(ROUND);

  aes_key_step u_key (
    .key_in  (in_key),
    .rcon    (step_rcon),
    .reverse (in_decrypt),
    .key_out (round_key)
  );

  aes_shift_rows u_sr (
    .din  (in_state),
    .inv  (in_decrypt),
    .dout (shifted)
  );

  aes_sub_bytes u_sb (
    .din  (shifted),
    .inv  (in_decrypt),
    .dout (substituted)
  );

  // Decryption adds the key before InvMixColumns.
  aes_add_round_key u_ark_pre (
    .din  (substituted),
    .key  (round_key),
    .dout (keyed_pre)
  );

  aes_mix_columns u_mc (
    .din  (in_decrypt ? keyed_pre : substituted),
    .inv  (in_decrypt),
    .dout (mixed)
  );

  // Encryption adds the key after MixColumns.
  aes_add_round_key u_ark_post (
    .din  (mixed),
    .key  (round_key),
    .dout (keyed_post)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

  always_ff @(posedge clk) begin
    out_decrypt <= in_decrypt;
    out_state   <= in_decrypt ? mixed : keyed_post;
    out_key     <= round_key;
  end

endmodule
