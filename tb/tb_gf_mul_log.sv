// tb_gf_mul_log: exhaustive check of the log/antilog multiplier: all
// 65536 operand pairs against shift-and-add multiplication, zeros included.
`include "tb_util.svh"
module tb_gf_mul_log;
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
  logic [7:0] a, b, p;
  gf_mul_log dut (.a(a), .b(b), .p(p));
  initial begin
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) begin
        a = 8'(i); b = 8'(j);
        #1 `TB_CHECK(p == ref_gmul(a, b), $sformatf("%02x*%02x = %02x", i, j, p))
      end
    `TB_FINISH
  end
endmodule
