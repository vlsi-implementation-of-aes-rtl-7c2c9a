// tb_aes_key_expand: expands the FIPS-197 key and random keys; every
// stored round key must match the reference schedule, and ready must rise
// exactly NR+1 = 11 clocks after the start clock. Also restarts an
// expansion in the middle with a new key.
`include "tb_util.svh"
module tb_aes_key_expand;
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
  logic rst_n = 0, start = 0, ready;
  logic [127:0] key, rd_key;
  logic [3:0] rd_idx;
  rk_t exp;
  int lat;

  aes_key_expand #(.NR(10)) dut (.clk(clk), .rst_n(rst_n), .start(start), .key(key),
                                 .ready(ready), .rd_idx(rd_idx), .rd_key(rd_key));

  task automatic expand(input logic [127:0] k, input bit check_latency);
    key = k; start = 1;
    @(posedge clk); #1 start = 0;
    lat = 1;
    while (!ready && lat < 50) begin @(posedge clk); #1 lat++; end
    if (check_latency) `TB_CHECK(lat == 11, $sformatf("ready after %0d clocks", lat))
    exp = ref_key_expand(k);
    for (int r = 0; r <= 10; r++) begin
      rd_idx = 4'(r);
      #1 `TB_CHECK(rd_key == exp[r], $sformatf("round key %0d = %032x", r, rd_key))
    end
  endtask

  initial begin
    rd_idx = 0; key = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    `TB_CHECK(!ready, "ready after reset")
    expand(128'h2b7e151628aed2a6abf7158809cf4f3c, 1);
    rd_idx = 10;
    #1 `TB_CHECK(rd_key == 128'hd014f9a8c9ee2589e13f0cc8b6630ca6, "FIPS-197 round key 10")
    // restart in the middle of an expansion
    key = rand128(); start = 1; @(posedge clk); #1 start = 0;
    repeat (4) @(posedge clk);
    #1 `TB_CHECK(!ready, "ready during expansion")
    for (int n = 0; n < 20; n++) expand(rand128(), 1);
    `TB_FINISH
  end
endmodule
