// tb_gf_ltable: checks every logarithm entry: for x != 0, 03 raised to L[x]
// (by repeated shift-and-add multiplication) must give x back and L[x] must
// be below 255; also the start of the printed table (L[2] = 19, L[3] = 01).
`include "tb_util.svh"
module tb_gf_ltable;
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
  logic [7:0] x, lg, p;
  gf_ltable dut (.x(x), .log(lg));
  initial begin
    x = 8'h02; #1 `TB_CHECK(lg == 8'h19, "L[02] != 19")
    x = 8'h03; #1 `TB_CHECK(lg == 8'h01, "L[03] != 01")
    x = 8'h05; #1 `TB_CHECK(lg == 8'h02, "L[05] != 02")
    for (int i = 1; i < 256; i++) begin
      x = 8'(i);
      #1;
      p = 8'h01;
      for (int k = 0; k < int'(lg); k++) p = ref_gmul(p, 8'h03);
      `TB_CHECK(lg != 8'hFF && p == 8'(i), $sformatf("L[%02x] = %02x", i, lg))
    end
    `TB_FINISH
  end
endmodule
