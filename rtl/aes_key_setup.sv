// aes_key_setup: holds the cipher key and derives the last round key.
//
// Encryption starts from round key 0 (the cipher key itself); decryption uses
// the expanded key backwards, so it starts from round key 10. When key_load is
// pulsed, the key is captured and one shared aes_key_step runs the forward
// schedule one step per clock, rounds 1..10. After NR = 10 steps the result is
// stored as dec_key and key_ready rises. The rest of the schedule is produced on
// the fly inside the round pipeline, so only these two keys are stored.
// A key_load while a setup is running restarts it with the new key.
//
// Ports: clk, rst_n (asynchronous, active low), key_load (1-cycle strobe),
//   key_in (cipher key), enc_key (round key 0), dec_key (round key 10),
//   key_ready (both outputs valid for the loaded key).
// Timing: key_ready is low from the cycle after key_load for 10 cycles and is
//   high again 11 clock edges after the edge that sampled key_load.
//   Out of reset no key is loaded and key_ready is low.
module aes_key_setup
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   key_load,
  input  block_t key_in,
  output block_t enc_key,
  output block_t dec_key,
  output logic   key_ready
);

  typedef enum logic [1:0] {S_EMPTY, S_EXPAND, S_READY} state_e;

  state_e      state;
  logic [3:0]  step;       // schedule step being computed, 1..10
  block_t      work;       // round key step-1
  block_t      next_key;

  aes_key_step u_step (
    .key_in  (work),
    .rcon    (round_const(32'(step))),
    .reverse (1'b0),
    .key_out (next_key)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_EMPTY;
      step    <= '0;
      work    <= '0;
      enc_key <= '0;
      dec_key <= '0;
    end else if (key_load) begin
      state   <= S_EXPAND;
      step    <= 4'd1;
      work    <= key_in;
      enc_key <= key_in;
    end else if (state == S_EXPAND) begin
      work <= next_key;
      step <= step + 4'd1;
      if (step == 4'(NR)) begin
        dec_key <= next_key;
        state   <= S_READY;
      end
    end
  end

  assign key_ready = (state == S_READY);

endmodule
