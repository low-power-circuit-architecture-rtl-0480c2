// aes_byte_mem: 16-byte register-array memory used both as the state
// memory of the data encryption unit and as the key memory of the key
// schedule unit.
//
// All sixteen bytes are registers and are visible at once on q, so the
// units read any byte through their own selectors without a read cycle.
// One byte is written per clock: on the rising edge with we = 1, byte
// waddr takes wdata. Each byte register is loaded only through its own
// enable (we and the decoded address); a synthesis flow with clock gating
// turns these enables into one gated clock per byte, which is how the
// memory saves power while it holds. The memory has no reset: it is
// always written before it is read. The register-array structure and the
// use of clock gating follow the architecture; the single write port and
// the per-byte enable granularity are this design's choices.
module aes_byte_mem
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   we,
  input  baddr_t waddr,
  input  byte_t  wdata,
  output byte_t  q [NBYTES]
);
  byte_t mem [NBYTES];

  for (genvar i = 0; i < NBYTES; i++) begin : g_byte
    logic en;
    assign en = we && (waddr == baddr_t'(i));
    always_ff @(posedge clk)
      if (en) mem[i] <= wdata;
    assign q[i] = mem[i];
  end
endmodule
