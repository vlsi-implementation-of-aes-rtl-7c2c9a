// tb_aes_add_round_key: random states and keys; the output must be their
// XOR, and adding the same key twice must restore the state.
`include "tb_util.svh"
module tb_aes_add_round_key;
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
  logic [127:0] si, k, so, so2;
  aes_add_round_key dut  (.state_in(si), .round_key(k), .state_out(so));
  aes_add_round_key dut2 (.state_in(so), .round_key(k), .state_out(so2));
  initial begin
    si = 128'h3243f6a8885a308d313198a2e0370734; k = 128'h2b7e151628aed2a6abf7158809cf4f3c;
    #1 `TB_CHECK(so == 128'h193de3bea0f4e22b9ac68d2ae9f84808, "FIPS-197 initial round")
    for (int n = 0; n < 500; n++) begin
      si = rand128(); k = rand128();
      #1 `TB_CHECK(so == (si ^ k), "xor")
      `TB_CHECK(so2 == si, "twice")
    end
    `TB_FINISH
  end
endmodule
