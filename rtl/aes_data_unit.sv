// aes_data_unit: byte-serial data encryption unit of the AES-128 module.
//
// The 128-bit state lives in a 16-byte register memory (aes_byte_mem) and
// one AES round is computed a byte at a time with a single S-box, a single
// MixColumn basic module, two 8-bit registers (Reg1, Reg2) and selectors
// in front of them and in front of the memory write port. A round is
// three passes over the memory:
//
//   SBSR  SubByte + ShiftRow, 17 cycles. Bytes are read in SR_READ_ORDER;
//         Reg1 takes the S-box output of the byte just read, and in the
//         same cycle the previous Reg1 value is written to the ShiftRow
//         destination of the previous byte. Inside each rotation cycle of
//         a row this is the address being read, so the pass runs in place.
//   MC    MixColumn, 8 cycles per column (32). Cycles 0-3 accumulate
//         s = a0^a1^a2^a3 in Reg2 (Reg1 saves a0); cycles 4-7 write
//         b_i = xtime(a_i ^ a_(i+1)) ^ s ^ a_i back over a_i, taking a0
//         from Reg1 for b3. Skipped in the final round.
//   ARK   AddRoundKey, 16 cycles: byte i is replaced by byte i XOR round
//         key byte i, read from the key unit at rk_addr = i.
//
// A full round takes 65 cycles and the final round 33; start_ark runs the
// ARK pass alone (the initial AddRoundKey). op_last is high in the last
// cycle of an operation, so the next one may be started in that cycle and
// begin on the following edge. While idle the host writes the state with
// host_we/host_addr/din (the din selector of the memory input) and reads
// any byte combinationally on dout = state[rd_addr].
//
// The S-box and MC block inputs are forced to zero when their pass is not
// running (operand isolation), and the memory bytes load only when
// written (clock-gating enables). The datapath parts and their roles follow
// the architecture; the pass order, read order and cycle-by-cycle schedule
// are this design's own (the architecture quotes 86 cycles per round; this
// schedule needs 65).
module aes_data_unit
  import aes_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  // host access (idle only)
  input  logic      host_we,
  input  baddr_t    host_addr,
  input  byte_t     din,
  input  baddr_t    rd_addr,
  output byte_t     dout,
  // operation control
  input  logic      start_ark,    // initial AddRoundKey only
  input  logic      start_round,  // one round: SBSR, MC, ARK
  input  logic      final_round,  // with start_round: no MC pass
  output logic      busy,
  output logic      op_last,
  output du_phase_e phase,
  // round key from the key schedule unit
  output baddr_t    rk_addr,
  input  byte_t     roundkey
);

  byte_t      q [NBYTES];
  logic [4:0] cnt;
  logic       final_q;
  byte_t      reg1, reg2;

  // memory write port
  logic   mem_we;
  baddr_t wa;
  byte_t  wd;

  // shared datapath units
  byte_t  sbox_in, sbox_out;
  logic   sbox_en;
  baddr_t ra;
  byte_t  mc_ai, mc_anext, mc_sum, mc_out;
  logic   mc_en;

  logic [1:0] col;
  logic [2:0] k;
  assign col = cnt[4:3];
  assign k   = cnt[2:0];

  aes_byte_mem u_mem (.clk(clk), .we(mem_we), .waddr(wa), .wdata(wd), .q(q));

  aes_sbox u_sbox (.a(sbox_in), .decrypt(1'b0), .y(sbox_out));

  aes_mc_basic u_mc (.ai(mc_ai), .ai_next(mc_anext), .sum(mc_sum), .b(mc_out));

  assign dout    = q[rd_addr];
  assign busy    = (phase != DU_IDLE);
  assign rk_addr = cnt[3:0];

  always_comb begin
    ra       = SR_READ_ORDER[cnt[3:0]];
    sbox_en  = (phase == DU_SBSR) && (cnt < 5'd16);
    sbox_in  = sbox_en ? q[ra] : '0;

    mc_en    = (phase == DU_MC) && k[2];
    mc_ai    = mc_en ? q[{col, k[1:0]}] : '0;
    mc_anext = !mc_en        ? '0   :
               (k[1:0] == 2'd3) ? reg1 : q[{col, k[1:0] + 2'd1}];
    mc_sum   = mc_en ? reg2 : '0;

    mem_we = 1'b0;
    wa     = host_addr;
    wd     = din;
    unique case (phase)
      DU_IDLE: mem_we = host_we;
      DU_SBSR: begin
        mem_we = (cnt != 5'd0);
        wa     = sr_dest(SR_READ_ORDER[4'(cnt - 5'd1)]);
        wd     = reg1;
      end
      DU_MC: begin
        mem_we = k[2];
        wa     = {col, k[1:0]};
        wd     = mc_out;
      end
      DU_ARK: begin
        mem_we = 1'b1;
        wa     = cnt[3:0];
        wd     = q[cnt[3:0]] ^ roundkey;
      end
    endcase
  end

  assign op_last = (phase == DU_ARK) && (cnt == 5'(ARK_CYCLES - 1));

  // sequencer
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase   <= DU_IDLE;
      cnt     <= '0;
      final_q <= 1'b0;
    end else begin
      unique case (phase)
        DU_IDLE: begin
          cnt <= '0;
          if (start_round) begin
            phase   <= DU_SBSR;
            final_q <= final_round;
          end else if (start_ark) begin
            phase   <= DU_ARK;
          end
        end
        DU_SBSR:
          if (cnt == 5'(SBSR_CYCLES - 1)) begin
            cnt   <= '0;
            phase <= final_q ? DU_ARK : DU_MC;
          end else cnt <= cnt + 5'd1;
        DU_MC:
          if (cnt == 5'(MC_CYCLES - 1)) begin
            cnt   <= '0;
            phase <= DU_ARK;
          end else cnt <= cnt + 5'd1;
        DU_ARK:
          if (cnt == 5'(ARK_CYCLES - 1)) begin
            cnt <= '0;
            if (start_round) begin
              phase   <= DU_SBSR;
              final_q <= final_round;
            end else phase <= DU_IDLE;
          end else cnt <= cnt + 5'd1;
      endcase
    end
  end

  // Reg1 / Reg2
  always_ff @(posedge clk) begin
    if (sbox_en) reg1 <= sbox_out;
    if (phase == DU_MC && k == 3'd0) begin
      reg1 <= q[{col, 2'd0}];
      reg2 <= q[{col, 2'd0}];
    end else if (phase == DU_MC && !k[2]) begin
      reg2 <= reg2 ^ q[{col, k[1:0]}];
    end
  end

  // The host may touch the state only while the unit is idle, and a new
  // operation may only be requested when the current one ends.
  a_host_idle: assert property (@(posedge clk) disable iff (!rst_n)
    host_we |-> phase == DU_IDLE);
  a_start_ok: assert property (@(posedge clk) disable iff (!rst_n)
    (start_round || start_ark) |-> (phase == DU_IDLE || op_last));

endmodule
