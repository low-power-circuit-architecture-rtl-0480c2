// tb_aes_ref_pkg: reference model of AES-128 for the testbenches.
//
// Written independently of the RTL: the S-box is found by searching for
// the multiplicative inverse and applying the affine map in its rotate
// form b = a ^ rotl(a,1) ^ rotl(a,2) ^ rotl(a,3) ^ rotl(a,4) ^ 63; the
// rounds are computed on whole 16-byte arrays. A block is an array of 16
// bytes in AES input order (byte i = row i%4, column i/4).
package tb_aes_ref_pkg;

  typedef logic [7:0] blk_t [16];

  function automatic logic [7:0] ref_mul(logic [7:0] a, logic [7:0] b);
    logic [15:0] p;
    p = '0;
    for (int i = 0; i < 8; i++) if (b[i]) p ^= 16'(a) << i;
    for (int i = 15; i >= 8; i--) if (p[i]) p ^= 16'h11B << (i - 8);
    return p[7:0];
  endfunction

  function automatic logic [7:0] rotl(logic [7:0] a, int n);
    return (a << n) | (a >> (8 - n));
  endfunction

  function automatic logic [7:0] ref_sbox(logic [7:0] a);
    logic [7:0] inv;
    inv = 8'h00;
    for (int c = 1; c < 256; c++)
      if (ref_mul(a, 8'(c)) == 8'h01) inv = 8'(c);
    return inv ^ rotl(inv, 1) ^ rotl(inv, 2) ^ rotl(inv, 3) ^ rotl(inv, 4) ^ 8'h63;
  endfunction

  // Next AES-128 round key from the current one.
  function automatic blk_t ref_next_key(blk_t k, logic [7:0] rcon);
    blk_t n;
    for (int r = 0; r < 4; r++)
      n[r] = k[r] ^ ref_sbox(k[12 + (r + 1) % 4]) ^ ((r == 0) ? rcon : 8'h00);
    for (int i = 4; i < 16; i++) n[i] = k[i] ^ n[i - 4];
    return n;
  endfunction

  function automatic logic [7:0] ref_rcon(int round);
    logic [7:0] r;
    r = 8'h01;
    for (int i = 1; i < round; i++) r = ref_mul(r, 8'h02);
    return r;
  endfunction

  // One AES round; last = 1 leaves out MixColumn.
  function automatic blk_t ref_round(blk_t s, blk_t k, bit last);
    blk_t t, m;
    for (int i = 0; i < 16; i++) begin
      int r, c;
      r = i % 4;
      c = i / 4;
      t[i] = ref_sbox(s[4 * ((c + r) % 4) + r]);
    end
    if (!last) begin
      for (int c = 0; c < 4; c++)
        for (int r = 0; r < 4; r++)
          m[4 * c + r] = ref_mul(t[4 * c + r], 8'h02) ^ ref_mul(t[4 * c + (r + 1) % 4], 8'h03)
                       ^ t[4 * c + (r + 2) % 4] ^ t[4 * c + (r + 3) % 4];
    end else m = t;
    for (int i = 0; i < 16; i++) m[i] ^= k[i];
    return m;
  endfunction

  function automatic blk_t ref_encrypt(blk_t pt, blk_t key);
    blk_t s, k;
    k = key;
    for (int i = 0; i < 16; i++) s[i] = pt[i] ^ k[i];
    for (int rnd = 1; rnd <= 10; rnd++) begin
      k = ref_next_key(k, ref_rcon(rnd));
      s = ref_round(s, k, rnd == 10);
    end
    return s;
  endfunction

  function automatic blk_t from_hex(logic [127:0] h);
    blk_t b;
    for (int i = 0; i < 16; i++) b[i] = h[127 - 8 * i -: 8];
    return b;
  endfunction

  function automatic logic [127:0] to_hex(blk_t b);
    logic [127:0] h;
    for (int i = 0; i < 16; i++) h[127 - 8 * i -: 8] = b[i];
    return h;
  endfunction

endpackage
