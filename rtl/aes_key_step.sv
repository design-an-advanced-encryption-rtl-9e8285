// aes_key_step: one step of the AES-128 key schedule, forward or reverse.
//
// With round key k[i-1] = (w0,w1,w2,w3) and g(w) = SubWord(RotWord(w)) ^
// (rcon,0,0,0), the forward step gives k[i]:
//   n0 = w0 ^ g(w3), n1 = n0 ^ w1, n2 = n1 ^ w2, n3 = n2 ^ w3.
// The reverse step undoes it, turning k[i] = (w0..w3) into k[i-1]:
//   p3 = w3 ^ w2, p2 = w2 ^ w1, p1 = w1 ^ w0, p0 = w0 ^ g(p3).
// Both directions feed the same four S-boxes through a mux on g's input, so
// the forward and reverse schedules share hardware. rcon is the constant of
// step i (from aes_pkg::round_const(i)), in both directions.
// Ports: key_in, rcon, reverse (0 = forward, 1 = reverse), key_out.
// Timing: combinational.
module aes_key_step
  import aes_pkg::*;
(
  input  block_t key_in,
  input  byte_t  rcon,
  input  logic   reverse,
  output block_t key_out
);

  word_t w0, w1, w2, w3, g_in, g_rot, g_sub, g;

  assign w0 = key_in[127:96];
  assign w1 = key_in[95:64];
  assign w2 = key_in[63:32];
  assign w3 = key_in[31:0];

  assign g_in  = reverse ? (w3 ^ w2) : w3;
  assign g_rot = {g_in[23:0], g_in[31:24]};

  for (genvar i = 0; i < 4; i++) begin : g_sbox
    aes_sbox u_sbox (
      .din  (g_rot[31-8*i -: 8]),
      .inv  (1'b0),
      .dout (g_sub[31-8*i -: 8])
    );
  end

  assign g = g_sub ^ {rcon, 24'h0};

  always_comb begin
    if (reverse) begin
      key_out[31:0]   = w3 ^ w2;
      key_out[63:32]  = w2 ^ w1;
      key_out[95:64]  = w1 ^ w0;
      key_out[127:96] = w0 ^ g;
    end else begin
      key_out[127:96] = w0 ^ g;
      key_out[95:64]  = w0 ^ g ^ w1;
      key_out[63:32]  = w0 ^ g ^ w1 ^ w2;
      key_out[31:0]   = w0 ^ g ^ w1 ^ w2 ^ w3;
    end
  end

endmodule
