// gf_etable: antilogarithm ROM of GF(2^8), val = 03^idx.
//
// Combinational 256 x 8 lookup. Its contents are the successive powers of the
// generator 03 under the AES polynomial 0x11B, computed at elaboration by
// aes_pkg::gen_etable (01 03 05 0F 11 33 55 FF 1A 2E ...). Together with
// gf_ltable it forms the table-based multiplier used by MixColumns; the table
// itself follows the source article, building it from a constant function is this
// design's choice.
module gf_etable (
  input  logic [7:0] idx,
  output logic [7:0] val
);
  localparam aes_pkg::byte_table_t ETABLE = aes_pkg::gen_etable();
  always_comb val = ETABLE[idx];
endmodule
