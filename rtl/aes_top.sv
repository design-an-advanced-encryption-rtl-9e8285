// aes_top: fully pipelined AES-128 core for encryption and decryption.
//
// Structure: an input stage that adds the first round key (k[0] to encrypt,
// k[10] to decrypt), nine aes_round stages (rounds 1..9) and one
// aes_last_round stage (round 10), each ending in a register. Each block
// carries its own direction bit and current round key down the pipeline; every
// stage derives its round key from the previous one with a forward (encrypt) or
// reverse (decrypt) key-schedule step, so round keys are made in real time and
// no key table is stored. aes_key_setup holds the cipher key and, after a key
// load, runs the forward schedule for 10 cycles to find k[10], the starting
// key of decryption. Blocks already in the pipeline keep the key they entered
// with, so a new key may be loaded while earlier blocks are still in flight.
//
// Ports:
//   clk, rst_n        clock, asynchronous active-low reset
//   key_load, key_in  1-cycle strobe and 128-bit cipher key
//   in_ready          high when a key is loaded and expanded; a block may be
//                     presented only then (asserted below)
//   in_valid, in_decrypt, in_block
//                     one 128-bit block per clock; in_decrypt = 1 decrypts
//   out_valid, out_decrypt, out_block
//                     result, with the direction it was computed in
// Timing: latency NR + 1 = 11 clocks from the edge that samples in_valid to
//   the edge after which out_valid is high; throughput one block per clock.
//   in_ready goes low the cycle after key_load and returns 10 cycles later.
// Byte order is FIPS-197's: the first byte of a block is bits [127:120].
module aes_top
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   key_load,
  input  block_t key_in,
  output logic   in_ready,
  input  logic   in_valid,
  input  logic   in_decrypt,
  input  block_t in_block,
  output logic   out_valid,
  output logic   out_decrypt,
  output block_t out_block
);

  block_t enc_key, dec_key, first_key, first_state;

  aes_key_setup u_key_setup (
    .clk       (clk),
    .rst_n     (rst_n),
    .key_load  (key_load),
    .key_in    (key_in),
    .enc_key   (enc_key),
    .dec_key   (dec_key),
    .key_ready (in_ready)
  );

  // Stage 0: initial AddRoundKey.
  assign first_key = in_decrypt ? dec_key : enc_key;

  aes_add_round_key u_ark0 (
    .din  (in_block),
    .key  (first_key),
    .dout (first_state)
  );

  // Pipeline registers between stages; index r is the output of stage r.
  logic   valid   [NR+1];
  logic   decrypt [NR+1];
  block_t state   [NR+1];
  block_t rkey    [NR+1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) valid[0] <= 1'b0;
    else        valid[0] <= in_valid && in_ready;
  end

  always_ff @(posedge clk) begin
    decrypt[0] <= in_decrypt;
    state[0]   <= first_state;
    rkey[0]    <= first_key;
  end

  for (genvar r = 1; r < NR; r++) begin : g_round
    aes_round #(.ROUND(r)) u_round (
      .clk         (clk),
      .rst_n       (rst_n),
      .in_valid    (valid[r-1]),
      .in_decrypt  (decrypt[r-1]),
      .in_state    (state[r-1]),
      .in_key      (rkey[r-1]),
      .out_valid   (valid[r]),
      .out_decrypt (decrypt[r]),
      .out_state   (state[r]),
      .out_key     (rkey[r])
    );
  end

  aes_last_round u_last (
    .clk         (clk),
    .rst_n       (rst_n),
    .in_valid    (valid[NR-1]),
    .in_decrypt  (decrypt[NR-1]),
    .in_state    (state[NR-1]),
    .in_key      (rkey[NR-1]),
    .out_valid   (valid[NR]),
    .out_decrypt (decrypt[NR]),
    .out_state   (state[NR]),
    .out_key     (rkey[NR])
  );

  assign out_valid   = valid[NR];
  assign out_decrypt = decrypt[NR];
  assign out_block   = state[NR];

  // The host may present a block only while the key is ready.
  a_valid_needs_key : assert property (@(posedge clk) disable iff (!rst_n)
    in_valid |-> in_ready)
    else $error("aes_top: in_valid while in_ready is low");

endmodule
