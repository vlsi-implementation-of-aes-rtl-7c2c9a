// aes_sub_bytes: SubBytes / InvSubBytes over the whole 128-bit state.
//
// Each of the 16 bytes goes through its own forward S-box and inverse S-box;
// decrypt selects the inverse. Purely combinational. Per-byte S-boxes follow
// the source article; giving every byte both boxes (rather than sharing) is this
// design's choice.
module aes_sub_bytes
  import aes_pkg::*;
(
  input  state_t state_in,
  input  logic   decrypt,
  output state_t state_out
);
  for (genvar i = 0; i < 16; i++) begin : g_byte
    logic [7:0] fwd, inv;
    aes_sbox     u_s  (.a(state_in[127-8*i -: 8]), .y(fwd));
    aes_inv_sbox u_is (.a(state_in[127-8*i -: 8]), .y(inv));
    assign state_out[127-8*i -: 8] = decrypt ? inv : fwd;
  end
endmodule
