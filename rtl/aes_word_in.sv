// aes_word_in: assembles a 128-bit block from four consecutive 32-bit words.
//
// Each clock with valid high shifts word into the bottom of a 128-bit shift
// register, so the first word ends up in bits [127:96] (state bytes 0..3,
// column 0). After the fourth word done pulses for one clock, in the cycle
// following that word, with the complete block on block. The 32-bit framing
// follows the source article; word order and the done pulse are this design's.
module aes_word_in
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   valid,
  input  word_t  word,
  output state_t block,
  output logic   done
);
  logic [1:0] cnt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt   <= '0;
      done  <= 1'b0;
      block <= '0;
    end else begin
      done <= valid && (cnt == 2'd3);
      if (valid) begin
        block <= {block[95:0], word};
        cnt   <= cnt + 2'd1;
      end
    end
  end
endmodule
