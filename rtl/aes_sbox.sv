// aes_sbox: the AES S-box and inverse S-box sharing one GF(2^8) inverter.
//
// Forward:  out = A(x^-1)      with A the AES affine map (constant 0x63).
// Inverse:  out = (A^-1(x))^-1 with A^-1 the inverse affine map (constant 0x05).
// The multiplicative inverse is computed as x^254 (0 maps to 0) with a chain of
// squarings and multiplies; the affine maps are muxed around it, so encryption
// and decryption use the same inverter, as the design calls for. Building the
// S-box from the inverse rather than from a 256-entry table, and the x^254
// addition chain, are this implementation's choices.
//
// Ports: din (byte in), inv (0 = SubBytes, 1 = InvSubBytes), dout (byte out).
// Timing: purely combinational.
module aes_sbox
  import aes_pkg::*;
(
  input  byte_t din,
  input  logic  inv,
  output byte_t dout
);

  // Affine map: b ^ rotl(b,1) ^ rotl(b,2) ^ rotl(b,3) ^ rotl(b,4) ^ 0x63.
  function automatic byte_t rotl8(byte_t b, int unsigned n);
    return byte_t'((b << n) | (b >> (8 - n)));
  endfunction

  function automatic byte_t affine(byte_t b);
    return b ^ rotl8(b, 1) ^ rotl8(b, 2) ^ rotl8(b, 3) ^ rotl8(b, 4) ^ 8'h63;
  endfunction

  function automatic byte_t inv_affine(byte_t b);
    return rotl8(b, 1) ^ rotl8(b, 3) ^ rotl8(b, 6) ^ 8'h05;
  endfunction

  // x^254 = x^-1 in GF(2^8): x^2, x^3, x^12, x^15, x^240, x^254.
  function automatic byte_t ginv(byte_t x);
    byte_t x2, x3, x12, x15, x240;
    x2   = gmul(x, x);
    x3   = gmul(x2, x);
    x12  = gmul(gmul(x3, x3), gmul(x3, x3));
    x15  = gmul(x12, x3);
    x240 = gmul(x15, x15);          // x^30
    x240 = gmul(x240, x240);        // x^60
    x240 = gmul(x240, x240);        // x^120
    x240 = gmul(x240, x240);        // x^240
    return gmul(gmul(x240, x12), x2);
  endfunction

  byte_t pre, inverse;

  always_comb begin
    pre     = inv ? inv_affine(din) : din;
    inverse = ginv(pre);
    dout    = inv ? inverse : affine(inverse);
  end

endmodule
