// aes_last_round: registered pipeline stage for round 10, which has no
// (Inv)MixColumns.
//
//   Encryption: key_out = k[10] (forward step of key_in = k[9], rcon 0x36);
//     state_out = SubBytes(ShiftRows(state_in)) ^ k[10] = ciphertext.
//   Decryption: key_out = k[0] (reverse step of key_in = k[1], rcon 0x01);
//     state_out = InvSubBytes(InvShiftRows(state_in)) ^ k[0] = plaintext.
//
// Ports: as aes_round; out_key is brought out for checking only.
// Timing: one clock from input to registered output, a new block every clock.
module aes_last_round
  import aes_pkg::*;
(
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

  block_t round_key, shifted, substituted, keyed;

  aes_key_step u_key (
    .key_in  (in_key),
    .rcon    (in_decrypt ? round_const(1) : round_const(NR)),
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

  aes_add_round_key u_ark (
    .din  (substituted),
    .key  (round_key),
    .dout (keyed)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

  always_ff @(posedge clk) begin
    out_decrypt <= in_decrypt;
    out_state   <= keyed;
    out_key     <= round_key;
  end

endmodule
