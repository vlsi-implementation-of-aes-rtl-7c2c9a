// tb_aes_mix_column: one column through MixColumns and InvMixColumns: the
// FIPS-197 example column db 13 53 45 -> 8e 4d a1 bc and back, random
// columns against the reference model, and inverse(forward(c)) = c.
`include "tb_util.svh"
module tb_aes_mix_column;
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
  logic [31:0] ci, co, co2;
  logic dec;
  aes_mix_column dut  (.col_in(ci), .decrypt(dec),  .col_out(co));
  aes_mix_column dut2 (.col_in(co), .decrypt(1'b1), .col_out(co2));
  initial begin
    ci = 32'hdb135345; dec = 0;
    #1 `TB_CHECK(co == 32'h8e4da1bc, "db135345 -> 8e4da1bc")
    ci = 32'h8e4da1bc; dec = 1;
    #1 `TB_CHECK(co == 32'hdb135345, "8e4da1bc -> db135345")
    ci = 32'hf20a225c; dec = 0;
    #1 `TB_CHECK(co == 32'h9fdc589d, "f20a225c -> 9fdc589d")
    for (int n = 0; n < 2000; n++) begin
      ci = $urandom(); dec = n[0];
      #1 `TB_CHECK(co == ref_mix_col(ci, dec), $sformatf("dec=%0d %08x -> %08x", dec, ci, co))
      if (!dec) `TB_CHECK(co2 == ci, "inverse of forward")
    end
    `TB_FINISH
  end
endmodule
