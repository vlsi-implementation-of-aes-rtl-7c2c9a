// aes_round: one combinational AES round, used once per clock by the engine.
//
// Encryption: SubBytes -> ShiftRows -> MixColumns -> AddRoundKey.
// Decryption: InvShiftRows -> InvSubBytes -> AddRoundKey -> InvMixColumns
// (the FIPS-197 inverse cipher; the round keys are applied in reverse order
// by the caller). With last = 1 the (Inv)MixColumns step is bypassed, as in
// the final round of either direction. The four steps and their inverses
// follow the source article; the decryption step order and the bypass multiplexer
// are this design's reading of "the stages remain the same but inverse".
// Both chains are built and the mode selects the output.
module aes_round
  import aes_pkg::*;
(
  input  state_t state_in,
  input  state_t round_key,
  input  logic   decrypt,
  input  logic   last,
  output state_t state_out
);
  state_t e_sb, e_sr, e_mc, e_ark;  // encryption path
  state_t d_sr, d_sb, d_ark, d_mc;  // decryption path

  // Two separate chains with the mode tied off in each: sharing one set of
  // units between the two step orders would form a combinational loop, and
  // the constant mode lets synthesis drop the unused half of every unit.
  aes_sub_bytes     u_e_sb  (.state_in(state_in), .decrypt(1'b0), .state_out(e_sb));
  aes_shift_rows    u_e_sr  (.state_in(e_sb),     .decrypt(1'b0), .state_out(e_sr));
  aes_mix_columns   u_e_mc  (.state_in(e_sr),     .decrypt(1'b0), .state_out(e_mc));
  aes_add_round_key u_e_ark (.state_in(last ? e_sr : e_mc), .round_key(round_key), .state_out(e_ark));

  aes_shift_rows    u_d_sr  (.state_in(state_in), .decrypt(1'b1), .state_out(d_sr));
  aes_sub_bytes     u_d_sb  (.state_in(d_sr),     .decrypt(1'b1), .state_out(d_sb));
  aes_add_round_key u_d_ark (.state_in(d_sb),     .round_key(round_key), .state_out(d_ark));
  aes_mix_columns   u_d_mc  (.state_in(d_ark),    .decrypt(1'b1), .state_out(d_mc));

  assign state_out = decrypt ? (last ? d_ark : d_mc) : e_ark;
endmodule
