// aes_pkg: types and constants shared by the byte-serial AES-128 crypto module.
//
// The state and the key are each held as 16 bytes, numbered the way AES
// numbers its input bytes: byte i sits in row (i % 4) and column (i / 4).
// The constant SR_READ_ORDER lists the order in which the data encryption
// unit reads the state during its combined SubByte/ShiftRow pass, and
// sr_dest() gives the address a byte moves to under ShiftRow. Both follow
// from the AES ShiftRow definition (row r is rotated left by r bytes); the
// read order itself is a choice of this design that lets the pass run in
// place with a single holding register.
package aes_pkg;

  typedef logic [7:0] byte_t;
  typedef logic [3:0] baddr_t;

  // AES-128: 16-byte block and key, 10 rounds.
  localparam int unsigned NBYTES = 16;
  localparam int unsigned NR     = 10;

  // Cycle counts of the byte-serial schedule (this design's own schedule).
  localparam int unsigned SBSR_CYCLES = 17;  // 16 reads + 1 trailing write
  localparam int unsigned MC_CYCLES   = 32;  // 4 columns x 8 cycles
  localparam int unsigned ARK_CYCLES  = 16;  // one byte per cycle
  localparam int unsigned KEY_CYCLES  = 17;  // one round key

  // Read order of the SubByte/ShiftRow pass: row 0 in place, then each
  // rotation cycle of rows 1, 2 and 3, so that every byte is read before
  // the byte moving onto its address is written.
  localparam baddr_t SR_READ_ORDER [NBYTES] = '{
    4'd0,  4'd4,  4'd8,  4'd12,
    4'd5,  4'd1,  4'd13, 4'd9,
    4'd2,  4'd10, 4'd6,  4'd14,
    4'd15, 4'd3,  4'd7,  4'd11
  };

  // Destination of byte a under ShiftRow: (r, c) -> (r, (c - r) mod 4).
  function automatic baddr_t sr_dest(baddr_t a);
    logic [1:0] r, c;
    r = a[1:0];
    c = a[3:2] - r;
    return {c, r};
  endfunction

  typedef enum logic [1:0] {
    DU_IDLE = 2'd0,
    DU_SBSR = 2'd1,   // SubByte + ShiftRow
    DU_MC   = 2'd2,   // MixColumn
    DU_ARK  = 2'd3    // AddRoundKey
  } du_phase_e;

endpackage
