// tb_aes_round: one full round in each mode, middle and last, against
// the reference steps, plus the FIPS-197 round-1 example.
`include "tb_util.svh"
module tb_aes_round;
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
  logic [127:0] si, k, so, exp;
  logic dec, last;
  aes_round dut (.state_in(si), .round_key(k), .decrypt(dec), .last(last), .state_out(so));
  initial begin
    si = 128'h193de3bea0f4e22b9ac68d2ae9f84808; k = 128'ha0fafe1788542cb123a339392a6c7605;
    dec = 0; last = 0;
    #1 `TB_CHECK(so == 128'ha49c7ff2689f352b6b5bea43026a5049, "FIPS-197 round 1")
    for (int n = 0; n < 400; n++) begin
      si = rand128(); k = rand128(); dec = n[0]; last = n[1];
      if (!dec) begin
        exp = ref_shift_rows(ref_sub_bytes(si, 0), 0);
        if (!last) exp = ref_mix_columns(exp, 0);
        exp ^= k;
      end else begin
        exp = ref_sub_bytes(ref_shift_rows(si, 1), 1) ^ k;
        if (!last) exp = ref_mix_columns(exp, 1);
      end
      #1 `TB_CHECK(so == exp, $sformatf("dec=%0d last=%0d %032x", dec, last, si))
    end
    `TB_FINISH
  end
endmodule
