// aes_mc_basic: the MixColumn basic module, which produces one output byte
// of the AES MixColumn transformation.
//
// AES MixColumn maps a column (a0, a1, a2, a3) to b_i = 02*a_i ^ 03*a_(i+1)
// ^ a_(i+2) ^ a_(i+3). Written with s = a0 ^ a1 ^ a2 ^ a3 this becomes
//   b_i = xtime(a_i ^ a_(i+1)) ^ s ^ a_i,
// so one xtime block and three byte-wide XORs make any of the four output
// bytes; the caller presents a_i, a_(i+1) and the precomputed column sum s.
// Applying it four times with rotated inputs gives the whole column. The
// decomposition is the one the architecture is built on; the module is
// combinational.
module aes_mc_basic
  import aes_pkg::*;
(
  input  byte_t ai,      // a_i
  input  byte_t ai_next, // a_(i+1 mod 4)
  input  byte_t sum,     // a0 ^ a1 ^ a2 ^ a3
  output byte_t b        // b_i
);
  byte_t xt;

  aes_xtime u_xtime (.a(ai ^ ai_next), .y(xt));

  assign b = xt ^ sum ^ ai;
endmodule
