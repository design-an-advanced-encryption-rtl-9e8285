// aes_add_round_key: AddRoundKey, the bitwise XOR of a 128-bit round key into
// the state. It is the same for encryption and decryption.
// Ports: din (state), key (round key), dout. Combinational.
module aes_add_round_key
  import aes_pkg::*;
(
  input  block_t din,
  input  block_t key,
  output block_t dout
);

  assign dout = din ^ key;

endmodule
