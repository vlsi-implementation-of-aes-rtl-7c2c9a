// tb_gf_etable: checks every antilogarithm entry: E[i] must equal 03^i computed
// by repeated shift-and-add multiplication, and the first row printed for
// the table (01 03 05 0F 11 33 55 FF ...).
`include "tb_util.svh"
module tb_gf_etable;
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
  logic [7:0] idx, val, p;
  logic [7:0] row0 [8] = '{8'h01, 8'h03, 8'h05, 8'h0F, 8'h11, 8'h33, 8'h55, 8'hFF};
  gf_etable dut (.idx(idx), .val(val));
  initial begin
    for (int i = 0; i < 8; i++) begin
      idx = 8'(i); #1 `TB_CHECK(val == row0[i], $sformatf("E[%0d] = %02x", i, val))
    end
    p = 8'h01;
    for (int i = 0; i < 256; i++) begin
      idx = 8'(i);
      #1 `TB_CHECK(val == p, $sformatf("E[%02x] = %02x, expected %02x", i, val, p))
      p = ref_gmul(p, 8'h03);
    end
    `TB_FINISH
  end
endmodule
