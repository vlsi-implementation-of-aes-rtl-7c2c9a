// tb_aes_sbox: exhaustive check of the forward S-box against the reference
// model (inverse by search plus bitwise affine transform), plus the two
// worked examples S(FD) = 54 and S(BC) = 65 and a bijectivity check.
`include "tb_util.svh"
module tb_aes_sbox;
  import aes_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  logic [7:0] a, y;
  bit seen [256];

  aes_sbox dut (.a(a), .y(y));

  always #5 clk = ~clk;
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    `TB_FINISH
  end

  initial begin
    a = 8'hFD; #1 `TB_CHECK(y == 8'h54, "S(FD) != 54")
    a = 8'hBC; #1 `TB_CHECK(y == 8'h65, "S(BC) != 65")
    for (int i = 0; i < 256; i++) begin
      a = 8'(i);
      #1;
      `TB_CHECK(y == ref_sbox(8'(i)), $sformatf("S(%02x) = %02x", i, y))
      `TB_CHECK(!seen[y], $sformatf("S(%02x) = %02x repeats", i, y))
      seen[y] = 1;
    end
    `TB_FINISH
  end
endmodule
