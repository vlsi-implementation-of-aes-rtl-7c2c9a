// tb_aes_word_out: loads random blocks, sometimes back to back and
// sometimes while a block is still going out; every load must be followed
// by exactly four valid words in order, starting the next clock.
`include "tb_util.svh"
module tb_aes_word_out;
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
  logic rst_n = 0, load = 0, valid;
  logic [127:0] block;
  logic [31:0] word;

  aes_word_out dut (.clk(clk), .rst_n(rst_n), .load(load), .block(block), .valid(valid), .word(word));

  initial begin
    block = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    `TB_CHECK(!valid, "valid after reset")
    for (int n = 0; n < 100; n++) begin
      block = rand128(); load = 1;
      @(posedge clk); #1 load = 0;
      for (int w = 0; w < 4; w++) begin
        `TB_CHECK(valid && word == block[127-32*w -: 32], $sformatf("block %0d word %0d = %08x", n, w, word))
        if (w == 2 && n % 10 == 5) break;  // interrupted: next load restarts
        @(posedge clk); #1;
      end
      if (n % 10 != 5) begin
        `TB_CHECK(!valid, "valid beyond four words")
        repeat ($urandom_range(0, 2)) @(posedge clk);
        #1;
      end
    end
    `TB_FINISH
  end
endmodule
