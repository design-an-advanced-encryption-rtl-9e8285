// aes_pkg: types, constants and GF(2^8) helpers shared by the AES-128 core.
//
// The 128-bit state and round keys are plain vectors in FIPS-197 byte order:
// byte 0 (the first input byte) sits in bits [127:120], byte 15 in [7:0].
// Byte k of the state is row k%4, column k/4 of the 4x4 state array, so a
// 32-bit column (word) c is bits [127-32c -: 32].
// Field arithmetic is in GF(2^8) modulo x^8+x^4+x^3+x+1 (0x11B), the AES
// field. Everything here is combinational and synthesizable.
package aes_pkg;

  localparam int unsigned NR       = 10;   // rounds for a 128-bit key

  typedef logic [7:0]   byte_t;
  typedef logic [31:0]  word_t;
  typedef logic [127:0] block_t;

  // Byte k (0..15) of a block, FIPS-197 order.
  function automatic byte_t get_byte(block_t b, int unsigned k);
    return b[127-8*k -: 8];
  endfunction

  // Multiply by x (0x02) in GF(2^8).
  function automatic byte_t xtime(byte_t a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  // General GF(2^8) multiply, shift-and-add.
  function automatic byte_t gmul(byte_t a, byte_t b);
    byte_t p;
    byte_t t;
    p = '0;
    t = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= t;
      t = xtime(t);
    end
    return p;
  endfunction

  // Round constant of key-schedule step r (1..10): x^(r-1) in GF(2^8).
  function automatic byte_t round_const(int unsigned r);
    byte_t c;
    c = 8'h01;
    for (int i = 1; i < 10; i++)
      if (i < r) c = xtime(c);
    return c;
  endfunction

endpackage
