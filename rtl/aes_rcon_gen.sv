// aes_rcon_gen: AES round constant generator for the key schedule unit.
//
// An 8-bit register that starts at 01 and, on each advance, is shifted
// left one place with the AES reduction (xtime), giving the sequence
// 01 02 04 08 10 20 40 80 1B 36 for rounds 1 to 10. A plain rotate would
// wrap 80 back to 01, so the register folds 1B back in when its top bit
// shifts out. clear (synchronous) returns it to 01 before a new key; it
// has priority over advance. rst_n is an asynchronous active-low reset to
// 01. The register with an initial value follows the architecture; the
// clear/advance controls are this design's own.
module aes_rcon_gen
  import aes_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  clear,
  input  logic  advance,
  output byte_t rcon
);
  byte_t next;

  aes_xtime u_xtime (.a(rcon), .y(next));

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)       rcon <= 8'h01;
    else if (clear)   rcon <= 8'h01;
    else if (advance) rcon <= next;
endmodule
