// aes_sbox: combinational AES S-box (SubByte of one byte), no look-up table.
//
// Encryption (decrypt = 0): multiplicative inverse in GF(2^8) followed by
// the AES affine transform. Decryption (decrypt = 1): inverse affine
// transform, then the same inverter, with the output affine transform
// bypassed. The two selectors around the shared inverter follow the
// functional block diagram of the architecture; the encryption-only data
// and key units tie decrypt to 0.
//
// The inverter computes a^254 (which is a^-1, with 0 mapping to 0) by an
// addition chain of multipliers and squarers (x^3, x^15, x^127, x^254)
// over GF(2^8) mod x^8 + x^4 + x^3 + x + 1. The choice of this chain, rather
// than a composite-field inverter, is this design's own. Purely
// combinational: the result settles in the same cycle.
module aes_sbox
  import aes_pkg::*;
(
  input  byte_t a,
  input  logic  decrypt,
  output byte_t y
);

  function automatic byte_t gf_mul(byte_t x, byte_t z);
    byte_t p, t;
    p = '0;
    t = x;
    for (int i = 0; i < 8; i++) begin
      if (z[i]) p = p ^ t;
      t = {t[6:0], 1'b0} ^ (t[7] ? 8'h1B : 8'h00);
    end
    return p;
  endfunction

  // a^254 = ((a^2 * a)^4 ... ): a^3, a^15, a^127, a^254
  function automatic byte_t gf_inv(byte_t x);
    byte_t x2, x3, x12, x15, x120, x127;
    x2   = gf_mul(x, x);
    x3   = gf_mul(x2, x);
    x12  = gf_mul(gf_mul(x3, x3), gf_mul(x3, x3));
    x15  = gf_mul(x12, x3);
    x120 = gf_mul(x15, x15);          // x^30
    x120 = gf_mul(x120, x120);        // x^60
    x120 = gf_mul(x120, x120);        // x^120
    x127 = gf_mul(gf_mul(x120, x3), gf_mul(x2, x2)); // x^120 * x^3 * x^4
    return gf_mul(x127, x127);        // x^254
  endfunction

  function automatic byte_t affine(byte_t x);
    byte_t r;
    for (int i = 0; i < 8; i++)
      r[i] = x[i] ^ x[(i + 4) % 8] ^ x[(i + 5) % 8] ^ x[(i + 6) % 8] ^ x[(i + 7) % 8];
    return r ^ 8'h63;
  endfunction

  function automatic byte_t inv_affine(byte_t x);
    byte_t r;
    for (int i = 0; i < 8; i++)
      r[i] = x[(i + 2) % 8] ^ x[(i + 5) % 8] ^ x[(i + 7) % 8];
    return r ^ 8'h05;
  endfunction

  byte_t inv_in, inv_out;

  always_comb begin
    inv_in  = decrypt ? inv_affine(a) : a;
    inv_out = gf_inv(inv_in);
    y       = decrypt ? inv_out : affine(inv_out);
  end

endmodule
