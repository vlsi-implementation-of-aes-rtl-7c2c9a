// gf_reduce: reduces a polynomial over GF(2) of up to W bits modulo the AES
// polynomial 0x11B (x^8+x^4+x^3+x+1), giving an 8-bit field element.
//
// Works from the top bit down: whenever bit k (k >= 8) of the running value
// is set, 0x11B shifted left by k-8 is XORed in, which clears bit k. A 9-bit
// value is XORed with 0x11B, a 10-bit one with 0x11B<<1, and so on up to
// 0x11B<<4 for 13 bits (the default width W = 13). Purely combinational.
// In this engine it doubles the key-schedule round constant (Rcon).
module gf_reduce #(
  parameter int unsigned W = 13
) (
  input  logic [W-1:0] x,
  output logic [7:0]   y
);
  logic [W-1:0] v;
  always_comb begin
    v = x;
    for (int k = W - 1; k >= 8; k--)
      if (v[k]) v = v ^ (W'(9'h11B) << (k - 8));
    y = v[7:0];
  end
endmodule
