// aes_key_expand: AES-128 key schedule with round-key storage.
//
// A pulse on start loads the 128-bit cipher key as round key 0. In each of
// the next NR clocks one further round key is derived from the previous one
// (FIPS-197: w[i] = w[i-4] ^ SubWord(RotWord(w[i-1])) ^ Rcon for the first
// word, w[i] = w[i-4] ^ w[i-1] for the others) and written to a register
// file of NR+1 round keys; ready rises when round key NR has been written,
// NR+1 clocks after start. The round constant starts at 01 and is doubled
// every round through gf_reduce (x * 02 reduced by 0x11B). All keys are kept
// so that decryption can read them in reverse order through the asynchronous
// read port rd_idx/rd_key. The schedule is the standard Rijndael one the
// document refers to; one key per clock and full storage are this design's
// choices. start while busy restarts the expansion.
module aes_key_expand #(
  parameter int unsigned NR = 10
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  aes_pkg::state_t                   key,
  output logic                     ready,
  input  logic [$clog2(NR+1)-1:0]  rd_idx,
  output aes_pkg::state_t                   rd_key
);
  localparam int unsigned IW = $clog2(NR + 1);

  aes_pkg::state_t        rk [NR+1];
  aes_pkg::state_t        cur, nxt;
  logic [7:0]    rcon, rcon_next;
  logic [IW-1:0] cnt;      // index of the key being generated
  logic          busy;
  logic [31:0]   rot, sub;

  // SubWord(RotWord(last word of the current key))
  assign rot = {cur[23:0], cur[31:24]};
  for (genvar b = 0; b < 4; b++) begin : g_sub
    aes_sbox u_sbox (.a(rot[8*b +: 8]), .y(sub[8*b +: 8]));
  end

  always_comb begin
    nxt[127:96] = cur[127:96] ^ sub ^ {rcon, 24'h0};
    nxt[95:64]  = cur[95:64]  ^ nxt[127:96];
    nxt[63:32]  = cur[63:32]  ^ nxt[95:64];
    nxt[31:0]   = cur[31:0]   ^ nxt[63:32];
  end

  gf_reduce #(.W(9)) u_rcon (.x({rcon, 1'b0}), .y(rcon_next));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      ready <= 1'b0;
      cnt   <= '0;
      rcon  <= 8'h01;
      cur   <= '0;
    end else if (start) begin
      busy  <= 1'b1;
      ready <= 1'b0;
      cnt   <= IW'(1);
      rcon  <= 8'h01;
      cur   <= key;
      rk[0] <= key;
    end else if (busy) begin
      rk[cnt] <= nxt;
      cur     <= nxt;
      rcon    <= rcon_next;
      cnt     <= cnt + IW'(1);
      if (cnt == IW'(NR)) begin
        busy  <= 1'b0;
        ready <= 1'b1;
      end
    end
  end

  assign rd_key = rk[rd_idx];
endmodule
