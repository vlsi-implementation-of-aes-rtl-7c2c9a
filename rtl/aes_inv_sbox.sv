// aes_inv_sbox: AES inverse S-box, y = InvS(a), used by decryption.
//
// Combinational 256 x 8 ROM holding the inverse permutation of the forward
// S-box, computed at elaboration by aes_pkg::gen_inv_sbox (first row 52 09 6a
// d5 30 36 a5 38 ...). InvS(S(a)) = a for every byte.
module aes_inv_sbox (
  input  logic [7:0] a,
  output logic [7:0] y
);
  localparam aes_pkg::byte_table_t INV_SBOX = aes_pkg::gen_inv_sbox();
  always_comb y = INV_SBOX[a];
endmodule
