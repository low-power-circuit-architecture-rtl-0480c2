// aes_key_unit: byte-serial AES-128 key schedule unit.
//
// The 16-byte key memory (aes_byte_mem) is loaded with the secret key and
// is then overwritten in place by each new round key, so it always holds
// the key of the round the data unit is working on. One round key takes
// 17 cycles after start, one key byte per cycle through an 8-bit pipeline
// register Kreg:
//
//   cycle 0      Kreg <= S(k13) ^ Rcon            (mux1 selects the Rcon path)
//   cycle 1..3   k(c-1) <= k(c-1) ^ Kreg,  Kreg <= S(k14), S(k15), S(k12)
//   cycle 4..15  k(c-1) <= k(c-1) ^ Kreg,  Kreg <= new k(c-4)  (mux2 selects memory)
//   cycle 16     k15 <= k15 ^ Kreg; Rcon advances
//
// which is the AES-128 recurrence w0' = w0 ^ SubWord(RotWord(w3)) ^ Rcon,
// w(j)' = w(j) ^ w(j-1)' applied byte by byte. Bytes 12..15 are still the
// old key when the S-box reads them. last is high in cycle 16. While idle,
// the host loads the key with host_we/host_addr/keyin (mux3 selects keyin).
// keyout = key[rk_addr] gives the data unit its round key byte.
// rcon_clear restarts the round constant at 01 for a new encryption.
//
// The parts (key memory, S-box, round constant generator, Kreg, the XOR
// and the three selectors) and the 17-cycle count follow the architecture;
// the cycle-by-cycle order is this design's reading of it. The S-box input
// is held at zero outside cycles 0..3 (operand isolation).
module aes_key_unit
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   host_we,
  input  baddr_t host_addr,
  input  byte_t  keyin,
  input  logic   rcon_clear,
  input  logic   start,
  output logic   busy,
  output logic   last,
  input  baddr_t rk_addr,
  output byte_t  keyout
);

  byte_t      q [NBYTES];
  logic       active;
  logic [4:0] cnt;
  byte_t      kreg;
  byte_t      rcon;

  logic   mem_we;
  baddr_t wa;
  byte_t  wd;

  logic   sbox_en;
  byte_t  sbox_in, sbox_out, mux1_out, mux2_out;

  aes_byte_mem u_mem (.clk(clk), .we(mem_we), .waddr(wa), .wdata(wd), .q(q));

  aes_sbox u_sbox (.a(sbox_in), .decrypt(1'b0), .y(sbox_out));

  aes_rcon_gen u_rcon (
    .clk(clk), .rst_n(rst_n), .clear(rcon_clear),
    .advance(last), .rcon(rcon)
  );

  assign keyout = q[rk_addr];
  assign busy   = active;
  assign last   = active && (cnt == 5'(KEY_CYCLES - 1));

  always_comb begin
    sbox_en  = active && (cnt < 5'd4);
    sbox_in  = sbox_en ? q[{2'b11, cnt[1:0] + 2'd1}] : '0;
    mux1_out = (cnt == 5'd0) ? (sbox_out ^ rcon) : sbox_out;
    mux2_out = (cnt < 5'd4) ? mux1_out : q[4'(cnt - 5'd4)];

    if (active) begin
      mem_we = (cnt != 5'd0);
      wa     = 4'(cnt - 5'd1);
      wd     = q[4'(cnt - 5'd1)] ^ kreg;
    end else begin
      mem_we = host_we;
      wa     = host_addr;
      wd     = keyin;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= 1'b0;
      cnt    <= '0;
    end else if (!active) begin
      cnt <= '0;
      if (start) active <= 1'b1;
    end else if (last) begin
      cnt    <= '0;
      active <= start;
    end else begin
      cnt <= cnt + 5'd1;
    end
  end

  always_ff @(posedge clk)
    if (active && cnt < 5'd16) kreg <= mux2_out;

  a_host_idle: assert property (@(posedge clk) disable iff (!rst_n)
    host_we |-> !active);
  a_start_ok: assert property (@(posedge clk) disable iff (!rst_n)
    start |-> (!active || last));

endmodule
