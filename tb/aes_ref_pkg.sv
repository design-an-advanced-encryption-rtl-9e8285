// aes_ref_pkg: software reference model of AES-128 for the testbenches.
//
// Written independently of the RTL: the S-box is built once by searching,
// for every byte, the partner whose product is 1 (brute force rather than an
// exponent chain), then applying the affine map bit by bit as in FIPS-197
// (b'_i = b_i ^ b_(i+4) ^ b_(i+5) ^ b_(i+6) ^ b_(i+7) ^ c_i). The cipher works
// on a 4x4 byte matrix indexed [row][column], and decryption runs the
// straightforward inverse cipher with its own inverse-matrix multiply.
// Call ref_init() once before using anything else.
package aes_ref_pkg;

  typedef logic [7:0] u8;

  u8 sbox_t [256];
  u8 isbox_t[256];
  bit ready = 0;

  function automatic u8 mul(u8 a, u8 b);
    logic [15:0] p;
    p = '0;
    for (int i = 0; i < 8; i++) if (b[i]) p ^= 16'(a) << i;
    for (int i = 15; i >= 8; i--) if (p[i]) p ^= 16'h11b << (i - 8);
    return p[7:0];
  endfunction

  function automatic void ref_init();
    for (int x = 0; x < 256; x++) begin
      u8 inv, s;
      inv = 0;
      for (int y = 1; y < 256; y++) if (mul(u8'(x), u8'(y)) == 8'h01) inv = u8'(y);
      for (int i = 0; i < 8; i++)
        s[i] = inv[i] ^ inv[(i+4)%8] ^ inv[(i+5)%8] ^ inv[(i+6)%8] ^ inv[(i+7)%8]
               ^ ((8'h63 >> i) & 1);
      sbox_t[x] = s;
    end
    for (int x = 0; x < 256; x++) isbox_t[sbox_t[x]] = u8'(x);
    ready = 1;
  endfunction

  typedef u8 mat_t [4][4];

  function automatic mat_t to_mat(logic [127:0] b);
    mat_t m;
    for (int i = 0; i < 16; i++) m[i%4][i/4] = b[127-8*i -: 8];
    return m;
  endfunction

  function automatic logic [127:0] from_mat(mat_t m);
    logic [127:0] b;
    for (int i = 0; i < 16; i++) b[127-8*i -: 8] = m[i%4][i/4];
    return b;
  endfunction

  function automatic logic [127:0] sub(logic [127:0] b, bit inv);
    for (int i = 0; i < 16; i++)
      b[8*i +: 8] = inv ? isbox_t[b[8*i +: 8]] : sbox_t[b[8*i +: 8]];
    return b;
  endfunction

  function automatic logic [127:0] shift(logic [127:0] b, bit inv);
    mat_t m, o;
    m = to_mat(b);
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        if (inv) o[r][(c+r)%4] = m[r][c];
        else     o[r][c]       = m[r][(c+r)%4];
    return from_mat(o);
  endfunction

  function automatic logic [127:0] mix(logic [127:0] b, bit inv);
    u8 fwd[4] = '{8'h02, 8'h03, 8'h01, 8'h01};
    u8 bwd[4] = '{8'h0e, 8'h0b, 8'h0d, 8'h09};
    mat_t m, o;
    m = to_mat(b);
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++) begin
        o[r][c] = 0;
        for (int k = 0; k < 4; k++)
          o[r][c] ^= mul(inv ? bwd[(k-r+4)%4] : fwd[(k-r+4)%4], m[k][c]);
      end
    return from_mat(o);
  endfunction

  // All 11 round keys as 44 words.
  function automatic void expand(logic [127:0] key, output logic [127:0] rk[11]);
    logic [31:0] w[44];
    u8 rc;
    rc = 8'h01;
    for (int i = 0; i < 4; i++) w[i] = key[127-32*i -: 32];
    for (int i = 4; i < 44; i++) begin
      logic [31:0] t;
      t = w[i-1];
      if (i % 4 == 0) begin
        t = {t[23:0], t[31:24]};
        t = {sbox_t[t[31:24]], sbox_t[t[23:16]], sbox_t[t[15:8]], sbox_t[t[7:0]]};
        t[31:24] ^= rc;
        rc = mul(rc, 8'h02);
      end
      w[i] = w[i-4] ^ t;
    end
    for (int r = 0; r < 11; r++) rk[r] = {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]};
  endfunction

  function automatic logic [127:0] round_key(logic [127:0] key, int r);
    logic [127:0] rk[11];
    expand(key, rk);
    return rk[r];
  endfunction

  function automatic logic [127:0] encrypt(logic [127:0] pt, logic [127:0] key);
    logic [127:0] rk[11], s;
    expand(key, rk);
    s = pt ^ rk[0];
    for (int r = 1; r <= 10; r++) begin
      s = shift(sub(s, 0), 0);
      if (r != 10) s = mix(s, 0);
      s ^= rk[r];
    end
    return s;
  endfunction

  function automatic logic [127:0] decrypt(logic [127:0] ct, logic [127:0] key);
    logic [127:0] rk[11], s;
    expand(key, rk);
    s = ct ^ rk[10];
    for (int r = 9; r >= 0; r--) begin
      s = sub(shift(s, 1), 1);
      s ^= rk[r];
      if (r != 0) s = mix(s, 1);
    end
    return s;
  endfunction

  function automatic logic [127:0] rand128();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

endpackage
