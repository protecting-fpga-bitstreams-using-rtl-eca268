// aes_key_sched: on-the-fly AES-128 key expansion for the 32-bit AES core.
//
// A 128-bit round-key register holds the current round key (w0..w3, w0 in
// the top bits). load copies the cipher key into it (round key 0) and resets
// the round constant to {01}. step advances it to the next round key:
//   t   = SubWord(RotWord(w3)) ^ {rcon, 24'h0}
//   w0' = w0 ^ t, w1' = w1 ^ w0', w2' = w2 ^ w1', w3' = w3 ^ w2'
// and doubles rcon in GF(2^8). The key schedule owns no S-boxes: it sends
// RotWord(w3) out on rot_w3, the core passes that word through its four
// S-boxes in the cycle it asserts step, and the result comes back on subword.
// One word of the round key, chosen by sel, is given on rk_word for the
// 32-bit AddRoundKey.
// Timing: load and step take effect at the rising clock edge; rk_word and
// rot_w3 are combinational from the register.
module aes_key_sched
  import aes_pkg::*;
(
  input  logic        clk,
  input  logic        load,
  input  block_t      key,
  input  logic        step,
  input  word_t       subword,
  input  logic [1:0]  sel,
  output word_t       rk_word,
  output word_t       rot_w3
);

  block_t rk_q;
  byte_t  rcon_q;

  word_t  w [4];
  word_t  nw [4];
  word_t  t;

  always_comb begin
    for (int i = 0; i < 4; i++) w[i] = get_col(rk_q, 2'(i));
  end

  assign rot_w3  = {w[3][23:0], w[3][31:24]};
  assign rk_word = w[sel];

  always_comb begin
    t      = subword ^ {rcon_q, 24'h0};
    nw[0]  = w[0] ^ t;
    nw[1]  = w[1] ^ nw[0];
    nw[2]  = w[2] ^ nw[1];
    nw[3]  = w[3] ^ nw[2];
  end

  always_ff @(posedge clk) begin
    if (load) begin
      rk_q   <= key;
      rcon_q <= 8'h01;
    end else if (step) begin
      rk_q   <= {nw[0], nw[1], nw[2], nw[3]};
      rcon_q <= xtime(rcon_q);
    end
  end

endmodule
