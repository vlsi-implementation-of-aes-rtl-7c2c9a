// aes_mix_column: MixColumns / InvMixColumns for one 4-byte column.
//
// out[r] = XOR over k of M[r][k] * in[k], where M is the circulant matrix with
// first row {02 03 01 01} for encryption and {0E 0B 0D 09} for decryption.
// Every product is formed by a gf_mul_log (log/antilog table) multiplier, the
// technique proposed for this unit in place of a shift-and-XOR datapath; the
// coefficients come from a mode multiplexer. Sixteen multipliers, purely
// combinational. col_in[31:24] is row 0.
module aes_mix_column (
  input  logic [31:0] col_in,
  input  logic        decrypt,
  output logic [31:0] col_out
);
  logic [3:0][7:0] coef;    // first matrix row, coef[3] = leftmost
  logic [7:0] prod [4][4];  // prod[r][k] = M[r][k] * in[k]

  assign coef = decrypt ? {8'h0E, 8'h0B, 8'h0D, 8'h09} : {8'h02, 8'h03, 8'h01, 8'h01};

  for (genvar r = 0; r < 4; r++) begin : g_row
    for (genvar k = 0; k < 4; k++) begin : g_col
      // circulant: M[r][k] = first_row[(k - r) mod 4]
      gf_mul_log u_mul (
        .a(coef[3 - ((k + 4 - r) % 4)]),
        .b(col_in[31-8*k -: 8]),
        .p(prod[r][k])
      );
    end
    assign col_out[31-8*r -: 8] = prod[r][0] ^ prod[r][1] ^ prod[r][2] ^ prod[r][3];
  end
endmodule
