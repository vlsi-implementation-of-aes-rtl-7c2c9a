// tb_aes_mix_columns: whole-state MixColumns and InvMixColumns on random
// states against the reference model, and the first-round FIPS-197 example
// state d4bf5d30e0b452aeb84111f11e2798e5 -> 046681e5e0cb199a48f8d37a2806264c.
`include "tb_util.svh"
module tb_aes_mix_columns;
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
  aes_mix_columns dut (.state_in(si), .decrypt(dec), .state_out(so));
  initial begin
    si = 128'hd4bf5d30e0b452aeb84111f11e2798e5; dec = 0;
    #1 `TB_CHECK(so == 128'h046681e5e0cb199a48f8d37a2806264c, "FIPS-197 round 1")
    for (int n = 0; n < 500; n++) begin
      si = rand128(); dec = n[0];
      #1 `TB_CHECK(so == ref_mix_columns(si, dec), $sformatf("dec=%0d %032x", dec, si))
    end
    `TB_FINISH
  end
endmodule
