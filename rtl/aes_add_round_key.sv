// aes_add_round_key: AddRoundKey, the bytewise XOR of the state with the
// 128-bit round key. Identical for encryption and decryption. Combinational.
module aes_add_round_key
  import aes_pkg::*;
(
  input  state_t state_in,
  input  state_t round_key,
  output state_t state_out
);
  assign state_out = state_in ^ round_key;
endmodule
