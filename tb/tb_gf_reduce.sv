// tb_gf_reduce: checks the 0x11B reduction: every carry-less product of
// a byte and a 5-bit coefficient (up to 13 bits) must reduce to the field
// product, plus random 13-bit values against bit-serial long division.
`include "tb_util.svh"
module tb_gf_reduce;
  import aes_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    `TB_FINISH
  end
  logic [12:0] x;
  logic [7:0]  y;
  gf_reduce #(.W(13)) dut (.x(x), .y(y));

  function automatic logic [12:0] clmul(input logic [7:0] a, input logic [4:0] b);
    logic [12:0] r = 0;
    for (int i = 0; i < 5; i++) if (b[i]) r ^= 13'(a) << i;
    return r;
  endfunction
  function automatic logic [7:0] longdiv(input logic [12:0] v);
    logic [7:0] r = 0;   // Horner: r = r*x + bit
    for (int i = 12; i >= 0; i--) r = ref_gmul(r, 8'h02) ^ 8'(v[i]);
    return r;
  endfunction

  initial begin
    x = 13'h100; #1 `TB_CHECK(y == 8'h1B, "x^8 != 1B")
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 32; j++) begin
        x = clmul(8'(i), 5'(j));
        #1 `TB_CHECK(y == ref_gmul(8'(i), 8'(j)), $sformatf("%02x*%02x -> %02x", i, j, y))
      end
    repeat (2000) begin
      x = 13'($urandom());
      #1 `TB_CHECK(y == longdiv(x), $sformatf("%04x -> %02x", x, y))
    end
    `TB_FINISH
  end
endmodule
