// tb_aes_sub_bytes: random states through SubBytes and InvSubBytes
// against the reference model.
`include "tb_util.svh"
module tb_aes_sub_bytes;
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
  logic [127:0] si, so;
  logic dec;
  aes_sub_bytes dut (.state_in(si), .decrypt(dec), .state_out(so));
  initial begin
    for (int n = 0; n < 200; n++) begin
      si = rand128(); dec = n[0];
      #1 `TB_CHECK(so == ref_sub_bytes(si, dec), $sformatf("dec=%0d in=%032x out=%032x", dec, si, so))
    end
    `TB_FINISH
  end
endmodule
