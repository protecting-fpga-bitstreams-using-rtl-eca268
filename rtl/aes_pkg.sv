// aes_pkg: types and constant functions shared by the AES-128 blocks.
//
// The AES state is a 128-bit vector holding bytes b0..b15 with b0 in bits
// [127:120]. Column c of the state is the 32-bit word [127-32c -: 32], its
// row-0 byte in the top bits, exactly as in the FIPS-197 input ordering.
//
// The S-box table is computed at elaboration time by gen_sbox(), which walks
// the multiplicative group of GF(2^8) with generator 3: p runs over 3^k and
// q over 3^-k, so q is the inverse of p, and the affine transform of q gives
// S(p). The table is a ROM of constants, as the compact AES keeps its
// S-boxes in ROM rather than computing the field inverse in logic.
package aes_pkg;

  typedef logic [7:0]   byte_t;
  typedef logic [31:0]  word_t;
  typedef logic [127:0] block_t;
  typedef byte_t        sbox_table_t [256];

  // AES-128 has ten rounds.
  localparam int unsigned NR       = 10;

  // Multiply by x (i.e. by {02}) in GF(2^8) modulo x^8+x^4+x^3+x+1.
  function automatic byte_t xtime(input byte_t a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1B : 8'h00);
  endfunction

  function automatic byte_t rotl8(input byte_t a, input int unsigned n);
    return byte_t'((a << n) | (a >> (8 - n)));
  endfunction

  function automatic sbox_table_t gen_sbox();
    sbox_table_t t;
    byte_t p, q, x;
    p = 8'h01;
    q = 8'h01;
    for (int k = 0; k < 255; k++) begin
      // p <- p * 3
      p = p ^ {p[6:0], 1'b0} ^ (p[7] ? 8'h1B : 8'h00);
      // q <- q / 3
      q = q ^ {q[6:0], 1'b0};
      q = q ^ {q[5:0], 2'b00};
      q = q ^ {q[3:0], 4'h0};
      if (q[7]) q = q ^ 8'h09;
      x = q ^ rotl8(q, 1) ^ rotl8(q, 2) ^ rotl8(q, 3) ^ rotl8(q, 4);
      t[p] = x ^ 8'h63;
    end
    t[0] = 8'h63;
    return t;
  endfunction

  // Column c (0..3) of a state.
  function automatic word_t get_col(input block_t s, input logic [1:0] c);
    return s[127 - 32*c -: 32];
  endfunction

  // Column c of ShiftRows(s): row r comes from column (c + r) mod 4.
  function automatic word_t shifted_col(input block_t s, input logic [1:0] c);
    word_t w;
    for (int r = 0; r < 4; r++) begin
      logic [1:0] src;
      src = c + 2'(r);
      w[31 - 8*r -: 8] = s[127 - 32*src - 8*r -: 8];
    end
    return w;
  endfunction

endpackage
