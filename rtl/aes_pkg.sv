// aes_pkg: types and elaboration-time table generators shared by the AES-128
// engine.
//
// The engine works in GF(2^8) with the AES polynomial x^8+x^4+x^3+x+1 (0x11B).
// Multiplication in MixColumns uses a logarithm table (LTable) and an
// antilogarithm table (ETable) with generator 03, and the byte substitution
// uses the S-box and its inverse. None of the 256-entry tables is typed in:
// each is computed by a constant function below from its mathematical
// definition, which a ROM module evaluates into a localparam and indexes.
//   ETable[i] = 03^i                      (i = 0..255, ETable[255] = 01)
//   LTable[x] = i with 03^i = x           (LTable[0] = 0, never used)
//   S[x]      = affine(x^-1), affine(b) = b ^ rotl(b,1) ^ rotl(b,2)
//               ^ rotl(b,3) ^ rotl(b,4) ^ 0x63, with 0^-1 taken as 0
//   InvS      = inverse permutation of S
// The byte order of a 128-bit state follows FIPS-197: byte i (column i/4,
// row i%4) sits in bits [127-8i -: 8].
package aes_pkg;

  typedef logic [127:0]       state_t;
  typedef logic [31:0]        word_t;
  typedef logic [255:0][7:0]  byte_table_t;

  // multiply by x (02) with reduction by 0x11B
  function automatic logic [7:0] xtime(input logic [7:0] b);
    return {b[6:0], 1'b0} ^ (b[7] ? 8'h1B : 8'h00);
  endfunction

  function automatic byte_table_t gen_etable();
    byte_table_t t;
    logic [7:0] v;
    v = 8'h01;
    for (int i = 0; i < 256; i++) begin
      t[i] = v;
      v    = xtime(v) ^ v;  // v * 03
    end
    return t;
  endfunction

  function automatic byte_table_t gen_ltable();
    byte_table_t e, t;
    e = gen_etable();
    t = '0;
    for (int i = 0; i < 255; i++) t[e[i]] = 8'(i);
    return t;
  endfunction

  function automatic logic [7:0] rotl8(input logic [7:0] b, input int n);
    return (b << n) | (b >> (8 - n));
  endfunction

  function automatic byte_table_t gen_sbox();
    byte_table_t e, l, t;
    logic [7:0] inv;
    e = gen_etable();
    l = gen_ltable();
    for (int x = 0; x < 256; x++) begin
      inv  = (x == 0) ? 8'h00 : e[(255 - int'(l[x])) % 255];
      t[x] = inv ^ rotl8(inv, 1) ^ rotl8(inv, 2) ^ rotl8(inv, 3) ^ rotl8(inv, 4) ^ 8'h63;
    end
    return t;
  endfunction

  function automatic byte_table_t gen_inv_sbox();
    byte_table_t s, t;
    s = gen_sbox();
    for (int x = 0; x < 256; x++) t[s[x]] = 8'(x);
    return t;
  endfunction

endpackage
