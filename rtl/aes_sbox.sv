// aes_sbox: AES forward S-box, y = S(a).
//
// Combinational 256 x 8 ROM. S(a) is the multiplicative inverse of a in
// GF(2^8) (0 maps to 0) passed through the AES affine transform; the table is
// computed at elaboration by aes_pkg::gen_sbox rather than typed in. Row = high
// nibble, column = low nibble, so for example S(FD) = 54 and S(BC) = 65.
// The lookup-table form follows the source article's description of SubBytes;
// generating the contents from the definition is this design's choice.
module aes_sbox (
  input  logic [7:0] a,
  output logic [7:0] y
);
  localparam aes_pkg::byte_table_t SBOX = aes_pkg::gen_sbox();
  always_comb y = SBOX[a];
endmodule
