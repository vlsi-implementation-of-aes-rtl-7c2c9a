// aes_ref_pkg: software reference model of AES-128 for the testbenches.
//
// Written independently of the RTL: field multiplication is the bit-serial
// shift-and-add method, the S-box is found by searching for the
// multiplicative inverse and applying the affine transform bit by bit, and
// MixColumns multiplies by the matrix coefficients directly. Byte i of a
// 128-bit block is bits [127-8i -: 8] (FIPS-197 order).
package aes_ref_pkg;

  function automatic logic [7:0] ref_gmul(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] p, x;
    p = 0; x = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= x;
      x = x[7] ? ((x << 1) ^ 8'h1B) : (x << 1);
    end
    return p;
  endfunction

  function automatic logic [7:0] ref_inv(input logic [7:0] a);
    if (a == 0) return 0;
    for (int y = 1; y < 256; y++) if (ref_gmul(a, 8'(y)) == 8'h01) return 8'(y);
    return 0;
  endfunction

  function automatic logic [7:0] ref_sbox(input logic [7:0] a);
    logic [7:0] b, s;
    logic [7:0] c;
    c = 8'h63;
    b = ref_inv(a);
    for (int i = 0; i < 8; i++)
      s[i] = b[i] ^ b[(i+4)%8] ^ b[(i+5)%8] ^ b[(i+6)%8] ^ b[(i+7)%8] ^ c[i];
    return s;
  endfunction

  // inverse affine transform (b_i = s_(i+2) ^ s_(i+5) ^ s_(i+7) ^ 05_i),
  // then the field inverse
  function automatic logic [7:0] ref_inv_sbox(input logic [7:0] a);
    logic [7:0] b, d;
    d = 8'h05;
    for (int i = 0; i < 8; i++) b[i] = a[(i+2)%8] ^ a[(i+5)%8] ^ a[(i+7)%8] ^ d[i];
    return ref_inv(b);
  endfunction

  function automatic logic [7:0] gb(input logic [127:0] s, input int i);
    return s[127-8*i -: 8];
  endfunction

  function automatic logic [127:0] ref_sub_bytes(input logic [127:0] s, input bit inv);
    logic [127:0] o;
    for (int i = 0; i < 16; i++) o[127-8*i -: 8] = inv ? ref_inv_sbox(gb(s, i)) : ref_sbox(gb(s, i));
    return o;
  endfunction

  function automatic logic [127:0] ref_shift_rows(input logic [127:0] s, input bit inv);
    logic [7:0] m [4][4];  // m[row][col]
    logic [127:0] o;
    for (int c = 0; c < 4; c++) for (int r = 0; r < 4; r++) m[r][c] = gb(s, 4*c + r);
    for (int c = 0; c < 4; c++) for (int r = 0; r < 4; r++)
      o[127-8*(4*c+r) -: 8] = inv ? m[r][(c + 4 - r) % 4] : m[r][(c + r) % 4];
    return o;
  endfunction

  function automatic logic [31:0] ref_mix_col(input logic [31:0] c, input bit inv);
    logic [7:0] a [4];
    logic [7:0] k [4];
    logic [31:0] o;
    for (int i = 0; i < 4; i++) a[i] = c[31-8*i -: 8];
    if (inv) k = '{8'h0E, 8'h0B, 8'h0D, 8'h09}; else k = '{8'h02, 8'h03, 8'h01, 8'h01};
    for (int r = 0; r < 4; r++) begin
      o[31-8*r -: 8] = 0;
      for (int j = 0; j < 4; j++) o[31-8*r -: 8] ^= ref_gmul(k[(j - r + 4) % 4], a[j]);
    end
    return o;
  endfunction

  function automatic logic [127:0] ref_mix_columns(input logic [127:0] s, input bit inv);
    logic [127:0] o;
    for (int c = 0; c < 4; c++) o[127-32*c -: 32] = ref_mix_col(s[127-32*c -: 32], inv);
    return o;
  endfunction

  typedef logic [127:0] rk_t [11];

  function automatic rk_t ref_key_expand(input logic [127:0] key);
    logic [31:0] w [44];
    logic [31:0] t;
    logic [7:0]  rc;
    rk_t rk;
    rc = 8'h01;
    for (int i = 0; i < 4; i++) w[i] = key[127-32*i -: 32];
    for (int i = 4; i < 44; i++) begin
      t = w[i-1];
      if (i % 4 == 0) begin
        t = {t[23:0], t[31:24]};
        t = {ref_sbox(t[31:24]), ref_sbox(t[23:16]), ref_sbox(t[15:8]), ref_sbox(t[7:0])};
        t ^= {rc, 24'h0};
        rc = ref_gmul(rc, 8'h02);
      end
      w[i] = w[i-4] ^ t;
    end
    for (int r = 0; r < 11; r++) rk[r] = {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]};
    return rk;
  endfunction

  function automatic logic [127:0] ref_encrypt(input logic [127:0] key, input logic [127:0] pt);
    rk_t rk;
    logic [127:0] s;
    rk = ref_key_expand(key);
    s = pt ^ rk[0];
    for (int r = 1; r <= 10; r++) begin
      s = ref_shift_rows(ref_sub_bytes(s, 0), 0);
      if (r != 10) s = ref_mix_columns(s, 0);
      s ^= rk[r];
    end
    return s;
  endfunction

  function automatic logic [127:0] ref_decrypt(input logic [127:0] key, input logic [127:0] ct);
    rk_t rk;
    logic [127:0] s;
    rk = ref_key_expand(key);
    s = ct ^ rk[10];
    for (int r = 9; r >= 0; r--) begin
      s = ref_sub_bytes(ref_shift_rows(s, 1), 1);
      s ^= rk[r];
      if (r != 0) s = ref_mix_columns(s, 1);
    end
    return s;
  endfunction

  function automatic logic [127:0] rand128();
    return {$urandom(), $urandom(), $urandom(), $urandom()};
  endfunction

endpackage
