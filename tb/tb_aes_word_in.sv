// tb_aes_word_in: feeds random 32-bit words with random gaps; after
// every fourth accepted word done must pulse once, one clock later, with the
// four words in order (first word in the top bits).
`include "tb_util.svh"
module tb_aes_word_in;
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
  logic rst_n = 0, valid = 0, done;
  logic [31:0] word;
  logic [127:0] block, exp;
  int dones = 0, ndone = 0;

  aes_word_in dut (.clk(clk), .rst_n(rst_n), .valid(valid), .word(word), .block(block), .done(done));

  always @(posedge clk) if (rst_n && done) ndone++;

  initial begin
    word = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int b = 0; b < 100; b++) begin
      exp = rand128();
      for (int w = 0; w < 4; w++) begin
        while ($urandom_range(0, 2) == 0) begin
          valid = 0; @(posedge clk); #1 `TB_CHECK(!done, "spurious done");
        end
        valid = 1; word = exp[127-32*w -: 32];
        @(posedge clk); #1;
        if (w < 3) `TB_CHECK(!done, "early done")
      end
      valid = 0;
      `TB_CHECK(done, "done missing after fourth word")
      `TB_CHECK(block == exp, $sformatf("block %032x expected %032x", block, exp))
      dones++;
    end
    @(posedge clk); #1;
    `TB_CHECK(ndone == dones, $sformatf("%0d done pulses for %0d blocks", ndone, dones))
    `TB_FINISH
  end
endmodule
