// aes_top: iterative AES-128 encryption/decryption engine with a 32-bit word
// interface.
//
// Key, plaintext/ciphertext and result all cross the interface as four
// consecutive 32-bit words, most significant word first. Loading a key (four
// key_valid words) starts aes_key_expand, which stores all eleven round keys;
// key_ready rises NR+1 = 11 clocks after the last key word. A data block is
// then taken as four words while in_ready is high; decrypt is sampled with
// every accepted word and the value given with the fourth word selects the
// direction. The controller applies the initial AddRoundKey (round key 0, or
// round key 10 for decryption) in the clock after the fourth word, then runs
// one aes_round per clock for ten clocks, reading the round keys upward for
// encryption and downward for decryption, with MixColumns skipped in the
// tenth. The result leaves through aes_word_out as four out_valid words.
//
// Timing, counting the clock of the fourth input word as 0: initial
// AddRoundKey in clock 1, rounds in clocks 2..11, result words in clocks
// 12..15. A new block can be loaded while the previous result is being sent.
// in_ready is low from the fourth word until the tenth round, while key words
// arrive, and whenever no expanded key is available. A new key may only be loaded while no block is
// being processed (checked by an assertion).
//
// The round steps, their inverses, the 32-bit framing and the table-based
// MixColumns multipliers follow the source article; the iterative one-round-per-
// clock architecture, the handshake and the stored key schedule are this
// design's choices.
module aes_top
  import aes_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  // key input
  input  logic  key_valid,
  input  word_t key_word,
  output logic  key_ready,
  // data input
  input  logic  in_valid,
  output logic  in_ready,
  input  word_t in_word,
  input  logic  decrypt,
  // result output
  output logic  out_valid,
  output word_t out_word
);
  localparam int unsigned NR = 10;  // rounds of AES-128

  typedef enum logic [0:0] {S_IDLE, S_ROUND} fsm_e;

  fsm_e       fsm;
  state_t     key_block, din_block, st, round_out, rk, init_ark;
  logic       key_done, din_done, dec_r, last;
  logic [3:0] rnd, rk_idx;
  logic       out_load;

  // key path
  aes_word_in u_key_in (
    .clk(clk), .rst_n(rst_n), .valid(key_valid), .word(key_word),
    .block(key_block), .done(key_done)
  );

  aes_key_expand #(.NR(NR)) u_key (
    .clk(clk), .rst_n(rst_n), .start(key_done), .key(key_block),
    .ready(key_ready), .rd_idx(rk_idx), .rd_key(rk)
  );

  // data path
  // no data while a block is in flight or a key is being loaded (key_ready of
  // the previous key still shows in the clock after the fourth key word)
  assign in_ready = (fsm == S_IDLE) && key_ready && !din_done && !key_valid && !key_done;

  aes_word_in u_din (
    .clk(clk), .rst_n(rst_n), .valid(in_valid && in_ready), .word(in_word),
    .block(din_block), .done(din_done)
  );

  // round key index: in S_IDLE the initial key, in S_ROUND round rnd
  always_comb begin
    if (fsm == S_IDLE) rk_idx = dec_r ? 4'(NR) : 4'd0;
    else               rk_idx = dec_r ? 4'(NR) - rnd : rnd;
    last = (rnd == 4'(NR));
  end

  // initial AddRoundKey on the assembled input block
  aes_add_round_key u_ark0 (.state_in(din_block), .round_key(rk), .state_out(init_ark));

  aes_round u_round (
    .state_in(st), .round_key(rk), .decrypt(dec_r), .last(last),
    .state_out(round_out)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      fsm   <= S_IDLE;
      rnd   <= '0;
      dec_r <= 1'b0;
      st    <= '0;
    end else begin
      if (in_valid && in_ready) dec_r <= decrypt;
      case (fsm)
        S_IDLE: if (din_done) begin
          st  <= init_ark;
          rnd <= 4'd1;
          fsm <= S_ROUND;
        end
        S_ROUND: begin
          st  <= round_out;
          rnd <= rnd + 4'd1;
          if (last) fsm <= S_IDLE;
        end
        default: fsm <= S_IDLE;
      endcase
    end
  end

  // the last round's result goes straight into the output serializer
  assign out_load = (fsm == S_ROUND) && last;

  aes_word_out u_out (
    .clk(clk), .rst_n(rst_n), .load(out_load), .block(round_out),
    .valid(out_valid), .word(out_word)
  );

  // a key may only be loaded while no block is in flight
  a_key_idle: assert property (@(posedge clk) disable iff (!rst_n)
                               key_valid |-> (fsm == S_IDLE && !din_done));
endmodule
