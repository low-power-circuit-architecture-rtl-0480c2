// aes_top: low-power byte-serial AES-128 encryption module.
//
// It joins the data encryption unit (aes_data_unit) and the key schedule
// unit (aes_key_unit) under a small round controller. The host, while the
// module is idle, writes the 16 plaintext bytes (data_we) and the 16 key
// bytes (key_we) at addr, byte i being AES input byte i, then pulses
// start. The controller runs the initial AddRoundKey (16 cycles) and
// rounds 1 to 10. At the start of each round it starts both units in the
// same cycle: the key unit needs 17 cycles to turn the key memory into
// this round's key, which is exactly the length of the SubByte/ShiftRow
// pass that precedes AddRoundKey, so the data unit never waits. Rounds 1-9
// take 65 cycles, round 10 (no MixColumn) 33, so an encryption takes
// 16 + 9*65 + 33 = 634 cycles from the edge that samples start to the
// done pulse. done is high for one cycle, in the cycle after the last
// byte is written; the ciphertext is then read at dout = state[rd_addr].
//
// The key memory is overwritten by the round keys, so the key must be
// written again before the next block. Reset (rst_n, asynchronous, active
// low) clears the controller and the unit sequencers; the memories are not
// reset. Splitting the module into the two units, computing each round
// key in parallel with the data round, and the 10 rounds for a 128-bit key
// follow the architecture; the host interface, the controller and the
// cycle counts are this design's own.
module aes_top
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  // host interface, used while busy = 0
  input  logic   data_we,
  input  logic   key_we,
  input  baddr_t addr,
  input  byte_t  din,
  input  byte_t  keyin,
  input  baddr_t rd_addr,
  output byte_t  dout,
  // control
  input  logic   start,
  output logic   busy,
  output logic   done,
  output logic [3:0] round  // round being computed, 0 = initial AddRoundKey
);

  typedef enum logic {T_IDLE, T_RUN} top_state_e;
  top_state_e state;

  logic      du_start_ark, du_start_round, du_final, du_busy, du_last;
  du_phase_e du_phase;
  baddr_t    rk_addr;
  byte_t     roundkey;
  logic      ku_start, ku_busy, ku_last, rcon_clear;

  logic go, next_round;

  assign go         = (state == T_IDLE) && start;
  assign next_round = (state == T_RUN) && du_last && (round != 4'(NR));

  assign du_start_ark   = go;
  assign rcon_clear     = go;
  assign du_start_round = next_round;
  assign du_final       = (round == 4'(NR - 1));
  assign ku_start       = next_round;
  assign busy           = (state != T_IDLE);

  aes_data_unit u_data (
    .clk(clk), .rst_n(rst_n),
    .host_we(data_we && !busy), .host_addr(addr), .din(din),
    .rd_addr(rd_addr), .dout(dout),
    .start_ark(du_start_ark), .start_round(du_start_round),
    .final_round(du_final), .busy(du_busy), .op_last(du_last),
    .phase(du_phase), .rk_addr(rk_addr), .roundkey(roundkey)
  );

  aes_key_unit u_key (
    .clk(clk), .rst_n(rst_n),
    .host_we(key_we && !busy), .host_addr(addr), .keyin(keyin),
    .rcon_clear(rcon_clear), .start(ku_start), .busy(ku_busy),
    .last(ku_last), .rk_addr(rk_addr), .keyout(roundkey)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= T_IDLE;
      round <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        T_IDLE:
          if (start) begin
            state <= T_RUN;
            round <= '0;
          end
        T_RUN:
          if (du_last) begin
            if (round == 4'(NR)) begin
              state <= T_IDLE;
              done  <= 1'b1;
            end else begin
              round <= round + 4'd1;
            end
          end
      endcase
    end
  end

  // The round key must be complete before AddRoundKey reads it, and the
  // key unit must be idle whenever the data unit is.
  a_key_ready: assert property (@(posedge clk) disable iff (!rst_n)
    (du_phase == DU_ARK) |-> !ku_busy);
  a_key_with_data: assert property (@(posedge clk) disable iff (!rst_n)
    ku_busy |-> du_busy);
  a_last_unused: assert property (@(posedge clk) disable iff (!rst_n)
    ku_last |-> du_phase == DU_SBSR);

endmodule
