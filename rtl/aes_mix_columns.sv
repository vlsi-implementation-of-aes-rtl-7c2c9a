// aes_mix_columns: MixColumns / InvMixColumns over the whole state.
//
// Four aes_mix_column units, one per state column (32-bit slices of the
// 128-bit state, column 0 in the top bits). Purely combinational.
module aes_mix_columns
  import aes_pkg::*;
(
  input  state_t state_in,
  input  logic   decrypt,
  output state_t state_out
);
  for (genvar c = 0; c < 4; c++) begin : g_col
    aes_mix_column u_col (
      .col_in (state_in[127-32*c -: 32]),
      .decrypt(decrypt),
      .col_out(state_out[127-32*c -: 32])
    );
  end
endmodule
