// aes_shift_rows: ShiftRows / InvShiftRows.
//
// The state is a 4x4 byte matrix stored column by column (byte i is row i%4 of
// column i/4). Row r is rotated left by r positions for encryption and right
// by r positions for decryption; row 0 stays. Pure wiring plus a 2:1 mux:
// rows 0 and 2 move the same way in both directions, so half of the output
// bits are plain wires from the input. The row offsets follow the source article.
module aes_shift_rows
  import aes_pkg::*;
(
  input  state_t state_in,
  input  logic   decrypt,
  output state_t state_out
);
  always_comb begin
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++) begin
        // encryption: out[r][c] = in[r][(c+r)%4]; decryption: in[r][(c-r)%4]
        if (decrypt)
          state_out[127-8*(4*c+r) -: 8] = state_in[127-8*(4*((c+4-r)%4)+r) -: 8];
        else
          state_out[127-8*(4*c+r) -: 8] = state_in[127-8*(4*((c+r)%4)+r) -: 8];
      end
  end
endmodule
