// tb_aes_top: end-to-end test of the AES-128 engine at its only size.
//
// Loads the FIPS-197 keys and random keys through the 32-bit key port,
// encrypts and decrypts the FIPS-197 example blocks and random blocks, and
// decrypts every ciphertext it produced to get the plaintext back. A
// scoreboard compares each four-word result with the software reference
// model. Checked timing: key_ready 12 clocks after the fourth key word, the
// first result word 12 clocks after the fourth data word, back-to-back
// blocks 15 clocks apart. The driver holds
// in_valid while in_ready is low (input stall) and sends the next block while
// the previous result is still going out (overlap). Counted mechanisms, each
// of which must occur: encryption, decryption, key load, input stall,
// input/output overlap, last round with MixColumns bypassed.
`include "tb_util.svh"
module tb_aes_top;
  import aes_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    `TB_FINISH
  end

  logic        rst_n = 0;
  logic        key_valid = 0, key_ready, in_valid = 0, in_ready, decrypt = 0, out_valid;
  logic [31:0] key_word = 0, in_word = 0, out_word;

  aes_top dut (.*);

  // scoreboard
  logic [127:0] exp_q [$];
  int           t4_q  [$];   // clock of each block's fourth accepted word
  logic [127:0] got;
  int min_gap = 1000, last_t4 = -1000;
  int cyc = 0, in_cnt = 0, out_cnt = 0, key_cnt = 0, key_t4 = -1;
  int n_enc = 0, n_dec = 0, n_key = 0, n_stall = 0, n_overlap = 0, n_last = 0, n_blocks = 0;

  always @(posedge clk) begin
    cyc++;
    if (rst_n) begin
      if (in_valid && !in_ready) n_stall++;
      if (in_valid && in_ready) begin
        if (out_valid) n_overlap++;
        in_cnt++;
        if (in_cnt % 4 == 0) begin
          t4_q.push_back(cyc);
          if (cyc - last_t4 < min_gap) min_gap = cyc - last_t4;
          last_t4 = cyc;
        end
      end
      if (key_valid) begin
        key_cnt++;
        if (key_cnt % 4 == 0) begin key_t4 = cyc; n_key++; end
      end
      // the previous key's ready may still show in the clock after the
      // fourth key word; from the next clock on it must be low until the
      // new schedule is complete
      if (key_t4 >= 0 && cyc - key_t4 == 2) `TB_CHECK(!key_ready, "key_ready not dropped for a new key")
      if (key_t4 >= 0 && cyc - key_t4 >= 2 && key_ready) begin
        `TB_CHECK(cyc - key_t4 == 12, $sformatf("key_ready %0d clocks after fourth key word", cyc - key_t4))
        key_t4 = -1;
      end
      if (key_t4 >= 0 && cyc - key_t4 <= 1 && in_valid) `TB_CHECK(!in_ready, "data accepted while a key is loading")
      if (dut.fsm == dut.S_ROUND && dut.last) n_last++;
      if (out_valid) begin
        if (out_cnt % 4 == 0) begin
          int t4;
          t4 = t4_q.pop_front();
          `TB_CHECK(cyc - t4 == 12, $sformatf("result %0d clocks after fourth word", cyc - t4))
        end
        got = {got[95:0], out_word};
        out_cnt++;
        if (out_cnt % 4 == 0) begin
          logic [127:0] e;
          e = exp_q.pop_front();
          `TB_CHECK(got == e, $sformatf("result %032x expected %032x", got, e))
          n_blocks++;
        end
      end
    end
  end

  logic [127:0] cur_key;

  task automatic load_key(input logic [127:0] k);
    // a new key only once nothing is in flight
    while (exp_q.size() != 0 || out_valid) begin @(posedge clk); #1; end
    cur_key = k;
    in_valid = 1;  // offered during the key load: must not be taken
    in_word = 0;
    for (int w = 0; w < 4; w++) begin
      key_valid = 1; key_word = k[127-32*w -: 32];
      @(posedge clk); #1;
    end
    key_valid = 0;
    @(posedge clk); #1;
    in_valid = 0;
  endtask

  task automatic send_block(input logic [127:0] d, input bit dec);
    exp_q.push_back(dec ? ref_decrypt(cur_key, d) : ref_encrypt(cur_key, d));
    if (dec) n_dec++; else n_enc++;
    for (int w = 0; w < 4; w++) begin
      in_valid = 1; in_word = d[127-32*w -: 32]; decrypt = dec;
      @(posedge clk);
      while (!in_ready) @(posedge clk);  // in_ready sampled at this edge
      #1;
    end
    in_valid = 0;
  endtask

  task automatic wait_idle();
    while (exp_q.size() != 0) begin @(posedge clk); #1; end
  endtask

  logic [127:0] blocks [8];

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // FIPS-197 Appendix B and C.1
    load_key(128'h2b7e151628aed2a6abf7158809cf4f3c);
    while (!key_ready) begin @(posedge clk); #1; end
    `TB_CHECK(ref_encrypt(cur_key, 128'h3243f6a8885a308d313198a2e0370734) == 128'h3925841d02dc09fbdc118597196a0b32,
              "reference model vs FIPS-197 B")
    send_block(128'h3243f6a8885a308d313198a2e0370734, 0);
    send_block(128'h3925841d02dc09fbdc118597196a0b32, 1);
    wait_idle();
    load_key(128'h000102030405060708090a0b0c0d0e0f);
    while (!key_ready) begin @(posedge clk); #1; end
    send_block(128'h00112233445566778899aabbccddeeff, 0);
    send_block(128'h69c4e0d86a7b0430d8cdb78070b4c55a, 1);
    // random keys: encrypt a burst, then decrypt the ciphertexts
    for (int k = 0; k < 6; k++) begin
      load_key(rand128());
      while (!key_ready) begin @(posedge clk); #1; end
      for (int b = 0; b < 8; b++) begin
        blocks[b] = rand128();
        send_block(blocks[b], 0);
        if ($urandom_range(0, 3) == 0) repeat ($urandom_range(1, 20)) @(posedge clk);
        #1;
      end
      for (int b = 0; b < 8; b++) send_block(ref_encrypt(cur_key, blocks[b]), 1);
      for (int b = 0; b < 4; b++) send_block(rand128(), $urandom_range(0, 1));
    end
    wait_idle();
    repeat (20) @(posedge clk);
    `TB_CHECK(out_cnt % 4 == 0 && t4_q.size() == 0, "leftover words")
    $display("blocks=%0d enc=%0d dec=%0d key_loads=%0d stalls=%0d overlaps=%0d last_rounds=%0d",
             n_blocks, n_enc, n_dec, n_key, n_stall, n_overlap, n_last);
    `TB_CHECK(min_gap == 15, $sformatf("back-to-back blocks %0d clocks apart, expected 15", min_gap))
    `TB_CHECK(n_enc > 0,     "no encryption")
    `TB_CHECK(n_dec > 0,     "no decryption")
    `TB_CHECK(n_key > 1,     "no key reload")
    `TB_CHECK(n_stall > 0,   "no input stall")
    `TB_CHECK(n_overlap > 0, "no input/output overlap")
    `TB_CHECK(n_last == n_blocks && n_blocks == n_enc + n_dec, "last-round count")
    `TB_FINISH
  end
endmodule
