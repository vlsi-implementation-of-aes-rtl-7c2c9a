// tb_aes_shift_rows: ShiftRows and InvShiftRows on a numbered state
// (byte i = i, expected permutation written out) and on random states
// against the reference model, plus inverse(forward(s)) = s.
`include "tb_util.svh"
module tb_aes_shift_rows;
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
  logic [127:0] si, so, so2;
  logic dec;
  aes_shift_rows dut  (.state_in(si), .decrypt(dec),  .state_out(so));
  aes_shift_rows dut2 (.state_in(so), .decrypt(1'b1), .state_out(so2));
  initial begin
    si = 128'h000102030405060708090a0b0c0d0e0f; dec = 0;
    #1 `TB_CHECK(so == 128'h00050a0f04090e03080d02070c01060b, "forward numbered")
    dec = 1;
    #1 `TB_CHECK(so == 128'h000d0a0704010e0b0805020f0c090603, "inverse numbered")
    for (int n = 0; n < 200; n++) begin
      si = rand128(); dec = n[0];
      #1 `TB_CHECK(so == ref_shift_rows(si, dec), $sformatf("dec=%0d %032x", dec, si))
      if (!dec) `TB_CHECK(so2 == si, "inverse of forward")
    end
    `TB_FINISH
  end
endmodule
