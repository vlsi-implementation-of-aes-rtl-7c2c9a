// gf_mul_log: GF(2^8) multiplier built from logarithm and antilogarithm tables.
//
// p = ETable[(LTable[a] + LTable[b]) mod 255], and p = 0 when a or b is 0.
// This is the table-based multiplication the MixColumns unit uses instead of
// shift-and-XOR arithmetic. The two logarithms (0..254) are added as 9-bit
// integers and folded back below 255 by subtracting 255 once; this integer
// addition is this design's reading of the "add" step (an XOR of the two
// logarithms would not give the product). Purely combinational: two LTable
// lookups, one adder, one ETable lookup.
module gf_mul_log (
  input  logic [7:0] a,
  input  logic [7:0] b,
  output logic [7:0] p
);
  logic [7:0] la, lb, e_idx, e_val;
  logic [8:0] lsum;

  gf_ltable u_la (.x(a), .log(la));
  gf_ltable u_lb (.x(b), .log(lb));

  always_comb begin
    lsum  = {1'b0, la} + {1'b0, lb};
    e_idx = (lsum >= 9'd255) ? 8'(lsum - 9'd255) : lsum[7:0];
  end

  gf_etable u_e (.idx(e_idx), .val(e_val));

  assign p = (a == 8'h00 || b == 8'h00) ? 8'h00 : e_val;
endmodule
