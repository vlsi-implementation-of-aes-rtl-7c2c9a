// gf_ltable: logarithm ROM of GF(2^8), log = i such that 03^i = x.
//
// Combinational 256 x 8 lookup, the inverse of gf_etable, computed at
// elaboration by aes_pkg::gen_ltable (-- 00 19 01 32 02 1A C6 4B ...). The
// logarithm of 0 does not exist; entry 0 holds 00 and the multiplier detects
// zero operands itself. Values run from 0 to 254.
module gf_ltable (
  input  logic [7:0] x,
  output logic [7:0] log
);
  localparam aes_pkg::byte_table_t LTABLE = aes_pkg::gen_ltable();
  always_comb log = LTABLE[x];
endmodule
