// aes_mix_columns: MixColumns / InvMixColumns on all four columns.
//
// Forward, each column a0..a3 is multiplied by the circulant matrix
// (02 03 01 01). The inverse matrix (0E 0B 0D 09) is reached through the same
// forward multiplier: InvMixColumns(a) = MixColumns(a'), with
// u = 04*(a0^a2), v = 04*(a1^a3) and a' = (a0^u, a1^v, a2^u, a3^v).
// Sharing the forward matrix this way keeps the decrypt path small; it is this
// implementation's choice, the result is the standard transform.
// Ports: din, inv (0 = MixColumns, 1 = InvMixColumns), dout. Combinational.
module aes_mix_columns
  import aes_pkg::*;
(
  input  block_t din,
  input  logic   inv,
  output block_t dout
);

  always_comb begin
    for (int c = 0; c < 4; c++) begin
      byte_t a0, a1, a2, a3, u, v;
      a0 = din[127-32*c      -: 8];
      a1 = din[127-32*c-8    -: 8];
      a2 = din[127-32*c-16   -: 8];
      a3 = din[127-32*c-24   -: 8];
      // Inverse pre-conditioning.
      u = inv ? xtime(xtime(a0 ^ a2)) : 8'h00;
      v = inv ? xtime(xtime(a1 ^ a3)) : 8'h00;
      a0 ^= u; a2 ^= u;
      a1 ^= v; a3 ^= v;
      // Forward matrix: b_i = 2*a_i ^ 3*a_(i+1) ^ a_(i+2) ^ a_(i+3).
      dout[127-32*c    -: 8] = xtime(a0) ^ xtime(a1) ^ a1 ^ a2 ^ a3;
      dout[127-32*c-8  -: 8] = xtime(a1) ^ xtime(a2) ^ a2 ^ a3 ^ a0;
      dout[127-32*c-16 -: 8] = xtime(a2) ^ xtime(a3) ^ a3 ^ a0 ^ a1;
      dout[127-32*c-24 -: 8] = xtime(a3) ^ xtime(a0) ^ a0 ^ a1 ^ a2;
    end
  end

endmodule
