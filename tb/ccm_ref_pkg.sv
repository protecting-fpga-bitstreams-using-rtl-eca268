// ccm_ref_pkg: reference models used by the testbenches.
//
// A plain byte-oriented AES-128 (full key expansion up front, whole-state
// rounds) and CCM (SP 800-38C formatting with a 12-byte nonce, 128-bit tag,
// no associated data, whole 16-byte blocks). The S-box is built differently
// from the RTL: the inverse of each byte is computed as x^254 by square and
// multiply in GF(2^8) and then the affine map is applied bit by bit.
package ccm_ref_pkg;

  typedef logic [127:0] blk_t;

  // The model lives in a class so that simulators call it as one routine
  // instead of expanding it at every call site.
  class ref_model;
    static byte unsigned sbox_tab [256];
    static bit           sbox_ready = 1'b0;

    static function automatic byte unsigned gmul(byte unsigned a, byte unsigned b);
      byte unsigned p = 0;
      for (int i = 0; i < 8; i++) begin
        if (b[0]) p ^= a;
        a = (a[7]) ? byte'((a << 1) ^ 8'h1B) : byte'(a << 1);
        b = b >> 1;
      end
      return p;
    endfunction

    static function automatic void build_sbox();
      for (int x = 0; x < 256; x++) begin
        byte unsigned inv = 0;
        byte unsigned s;
        logic [7:0] c63 = 8'h63;
        // x^254 = x^-1 (and 0 for x = 0): square-and-multiply over x^2..x^128
        byte unsigned sq = byte'(x);
        inv = 8'h01;
        for (int k = 1; k < 8; k++) begin
          sq  = gmul(sq, sq);
          inv = gmul(inv, sq);
        end
        if (x == 0) inv = 0;
        for (int i = 0; i < 8; i++)
          s[i] = inv[i] ^ inv[(i+4)%8] ^ inv[(i+5)%8] ^ inv[(i+6)%8] ^ inv[(i+7)%8] ^ c63[i];
        sbox_tab[x] = s;
      end
      sbox_ready = 1'b1;
    endfunction

    static function automatic byte unsigned sb(byte unsigned x);
      if (!sbox_ready) build_sbox();
      return sbox_tab[x];
    endfunction

    static function automatic blk_t aes128(blk_t key, blk_t pt);
      byte unsigned w [176];
      byte unsigned s [16];
      byte unsigned t [16];
      byte unsigned rcon = 8'h01;
      for (int i = 0; i < 16; i++) w[i] = key[127-8*i -: 8];
      for (int i = 16; i < 176; i += 4) begin
        byte unsigned tmp [4];
        for (int j = 0; j < 4; j++) tmp[j] = w[i-4+j];
        if (i % 16 == 0) begin
          byte unsigned r0 = tmp[0];
          tmp[0] = sb(tmp[1]) ^ rcon;
          tmp[1] = sb(tmp[2]);
          tmp[2] = sb(tmp[3]);
          tmp[3] = sb(r0);
          rcon = gmul(rcon, 2);
        end
        for (int j = 0; j < 4; j++) w[i+j] = w[i-16+j] ^ tmp[j];
      end
      for (int i = 0; i < 16; i++) s[i] = pt[127-8*i -: 8] ^ w[i];
      for (int r = 1; r <= 10; r++) begin
        // SubBytes + ShiftRows: byte (row rr, col c) = s[4c+rr]
        for (int c = 0; c < 4; c++)
          for (int rr = 0; rr < 4; rr++)
            t[4*c+rr] = sb(s[4*((c+rr)%4)+rr]);
        if (r != 10) begin
          for (int c = 0; c < 4; c++) begin
            byte unsigned a0 = t[4*c], a1 = t[4*c+1], a2 = t[4*c+2], a3 = t[4*c+3];
            s[4*c]   = gmul(a0,2) ^ gmul(a1,3) ^ a2 ^ a3;
            s[4*c+1] = a0 ^ gmul(a1,2) ^ gmul(a2,3) ^ a3;
            s[4*c+2] = a0 ^ a1 ^ gmul(a2,2) ^ gmul(a3,3);
            s[4*c+3] = gmul(a0,3) ^ a1 ^ a2 ^ gmul(a3,2);
          end
        end else begin
          s = t;
        end
        for (int i = 0; i < 16; i++) s[i] ^= w[16*r + i];
      end
      for (int i = 0; i < 16; i++) aes128[127-8*i -: 8] = s[i];
    endfunction
  endclass

  function automatic byte unsigned gmul(byte unsigned a, byte unsigned b);
    return ref_model::gmul(a, b);
  endfunction

  function automatic byte unsigned sb(byte unsigned x);
    return ref_model::sb(x);
  endfunction

  function automatic blk_t aes128(blk_t key, blk_t pt);
    return ref_model::aes128(key, pt);
  endfunction

  // CCM block B0 and counter blocks, written from SP 800-38C A.2.
  function automatic blk_t ref_b0(logic [95:0] nonce, int unsigned nblk);
    logic [7:0] flags;
    logic [23:0] q;
    flags = {1'b0, 1'b0, 3'((16-2)/2), 3'(3-1)};
    q = 24'(nblk * 16);
    return {flags, nonce, q};
  endfunction

  function automatic blk_t ref_ctr(logic [95:0] nonce, int unsigned i);
    return {8'(3-1), nonce, 24'(i)};
  endfunction

endpackage
