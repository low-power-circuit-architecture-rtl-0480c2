// aes_xtime: multiplication of a byte by x (that is, by 02) in GF(2^8)
// modulo the AES polynomial x^8 + x^4 + x^3 + x + 1.
//
// It is a wired left shift plus three XOR gates: when the top bit falls
// out, 0x1B is folded back into bits 4, 3 and 1 (bit 0 takes the carried
// bit directly). Purely combinational, no clock. This is the xtime block of
// the MixColumn basic module and of the round constant generator.
module aes_xtime
  import aes_pkg::*;
(
  input  byte_t a,
  output byte_t y
);
  always_comb begin
    y    = {a[6:0], 1'b0};
    y[4] = a[3] ^ a[7];
    y[3] = a[2] ^ a[7];
    y[1] = a[0] ^ a[7];
    y[0] = a[7];
  end
endmodule
