// tb_aes_inv_sbox: exhaustive check of the inverse S-box against the
// reference model and of InvS(S(x)) = x, plus a few entries of the printed
// inverse table (row 00: 52 09 6a d5; InvS(54) = FD, InvS(65) = BC).
`include "tb_util.svh"
module tb_aes_inv_sbox;
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
  logic [7:0] a, y;
  aes_inv_sbox dut (.a(a), .y(y));
  initial begin
    a = 8'h00; #1 `TB_CHECK(y == 8'h52, "InvS(00) != 52")
    a = 8'h03; #1 `TB_CHECK(y == 8'hD5, "InvS(03) != d5")
    a = 8'h54; #1 `TB_CHECK(y == 8'hFD, "InvS(54) != fd")
    a = 8'h65; #1 `TB_CHECK(y == 8'hBC, "InvS(65) != bc")
    for (int i = 0; i < 256; i++) begin
      a = ref_sbox(8'(i));
      #1 `TB_CHECK(y == 8'(i), $sformatf("InvS(S(%02x)) = %02x", i, y))
    end
    `TB_FINISH
  end
endmodule
