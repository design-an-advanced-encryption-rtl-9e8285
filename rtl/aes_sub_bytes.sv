// aes_sub_bytes: SubBytes / InvSubBytes over the whole 128-bit state.
//
// Sixteen aes_sbox instances, one per byte; the same instances serve both
// directions, selected by inv. Byte order follows aes_pkg.
// Ports: din, inv (0 = SubBytes, 1 = InvSubBytes), dout. Combinational.
module aes_sub_bytes
  import aes_pkg::*;
(
  input  block_t din,
  input  logic   inv,
  output block_t dout
);

  for (genvar k = 0; k < 16; k++) begin : g_byte
    aes_sbox u_sbox (
      .din  (din[127-8*k -: 8]),
      .inv  (inv),
      .dout (dout[127-8*k -: 8])
    );
  end

endmodule
