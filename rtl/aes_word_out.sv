// aes_word_out: sends a 128-bit block as four consecutive 32-bit words.
//
// A clock with load high captures block; in the following four clocks valid
// is high and word carries bits [127:96], [95:64], [63:32] and [31:0] in turn.
// A load while words are still going out restarts with the new block. No back-pressure: the receiver must take
// one word per clock. The 32-bit framing follows the source article; the rest is
// this design's choice.
module aes_word_out
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   load,
  input  state_t block,
  output logic   valid,
  output word_t  word
);
  state_t     sreg;
  logic [2:0] left;  // words still to send

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sreg <= '0;
      left <= '0;
    end else if (load) begin
      sreg <= block;
      left <= 3'd4;
    end else if (left != 3'd0) begin
      sreg <= {sreg[95:0], 32'h0};
      left <= left - 3'd1;
    end
  end

  assign valid = (left != 3'd0);
  assign word  = sreg[127:96];
endmodule
