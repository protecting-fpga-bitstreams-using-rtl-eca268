// ccm_pkg: CCM formatting constants (NIST SP 800-38C) used by the CCM blocks.
//
// The design uses a 12-byte nonce, hence a 3-byte message-length field
// (payloads below 16 MiB, enough for the bitstream of a large FPGA), a full
// 128-bit tag and no associated data. These are choices of this design; the
// CCM specification allows other splits.
//   B0     = flags_b0  | nonce | byte length of the payload (3 bytes)
//   CTR[i] = flags_ctr | nonce | i (3 bytes)
// flags_b0 = 64*Adata + 8*((t-2)/2) + (q-1) = 0 + 8*7 + 2 = 8'h3A
// flags_ctr = q-1 = 8'h02
package ccm_pkg;

  localparam int unsigned NONCE_BYTES = 12;
  localparam int unsigned Q_BYTES     = 16 - 1 - NONCE_BYTES;   // 3
  localparam int unsigned TAG_BYTES   = 16;
  localparam int unsigned NONCE_W     = 8 * NONCE_BYTES;        // 96
  localparam int unsigned Q_W         = 8 * Q_BYTES;            // 24
  // Whole 16-byte blocks only: the block count is the byte length / 16.
  localparam int unsigned NBLK_W      = Q_W - 4;                // 20

  localparam logic [7:0] FLAGS_B0  = 8'((((TAG_BYTES - 2) / 2) << 3) | (Q_BYTES - 1));
  localparam logic [7:0] FLAGS_CTR = 8'(Q_BYTES - 1);

  typedef logic [NONCE_W-1:0] nonce_t;
  typedef logic [NBLK_W-1:0]  nblk_t;

  function automatic logic [127:0] make_b0(input nonce_t n, input nblk_t nblk);
    return {FLAGS_B0, n, nblk, 4'h0};
  endfunction

  function automatic logic [127:0] make_ctr(input nonce_t n, input logic [Q_W-1:0] i);
    return {FLAGS_CTR, n, i};
  endfunction

endpackage
