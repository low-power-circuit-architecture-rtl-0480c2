// tb_aes_top: end-to-end test of the AES-128 module at its only size.
//
// Encrypts the FIPS-197 Appendix B and Appendix C.1 blocks (checked by
// their published ciphertexts) and 20 random blocks under random keys
// (checked against the reference model), writing plaintext and key over
// the host port, pulsing start, waiting for done and reading the
// ciphertext back. Each encryption must keep busy high for exactly
// 16 + 9*65 + 33 = 634 cycles. The test also counts the mechanisms of the
// design and fails if one never happened: the initial AddRoundKey pass,
// MixColumn passes, final rounds that go from SubByte/ShiftRow straight to
// AddRoundKey, cycles where the key unit builds a round key while the data
// unit runs SubByte/ShiftRow, key reloads between blocks, and host writes
// attempted while busy (which must be ignored: the block being encrypted
// and the ciphertext must not change).
module tb_aes_top;
  import aes_pkg::*;
  import tb_aes_ref_pkg::*;

  logic       clk = 0, rst_n, data_we, key_we, start, busy, done;
  baddr_t     addr, rd_addr;
  byte_t      din, keyin, dout;
  logic [3:0] round;
  int checks = 0, failures = 0;
  int n_ark0 = 0, n_mc = 0, n_final = 0, n_overlap = 0, n_reload = 0, n_ignored = 0;

  aes_top dut (
    .clk(clk), .rst_n(rst_n), .data_we(data_we), .key_we(key_we), .addr(addr),
    .din(din), .keyin(keyin), .rd_addr(rd_addr), .dout(dout),
    .start(start), .busy(busy), .done(done), .round(round)
  );

  always #5 clk = ~clk;

  // mechanism counters, from the units' phase signals
  du_phase_e prev_phase = DU_IDLE;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_data.phase == DU_ARK && prev_phase == DU_IDLE) n_ark0++;
    if (dut.u_data.phase == DU_MC && prev_phase == DU_SBSR) n_mc++;
    if (dut.u_data.phase == DU_ARK && prev_phase == DU_SBSR) n_final++;
    if (dut.u_key.busy && dut.u_data.phase == DU_SBSR) n_overlap++;
    prev_phase = dut.u_data.phase;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  task automatic write_block(blk_t pt, blk_t key);
    for (int i = 0; i < 16; i++) begin
      @(negedge clk);
      data_we = 1; key_we = 1; addr = baddr_t'(i); din = pt[i]; keyin = key[i];
    end
    @(negedge clk);
    data_we = 0; key_we = 0;
    n_reload++;
  endtask

  task automatic encrypt(blk_t pt, blk_t key, output blk_t ct);
    int n;
    write_block(pt, key);
    start = 1;
    @(negedge clk);
    start = 0;
    n = 0;
    while (busy) begin
      n++;
      // a stray host write in the middle of the run must have no effect
      if (n == 300) begin
        data_we = 1; key_we = 1; addr = baddr_t'($urandom); din = 8'($urandom); keyin = 8'($urandom);
        n_ignored++;
      end else begin
        data_we = 0; key_we = 0;
      end
      @(negedge clk);
      if (n == 1) check(round == 4'd0, "round 0 after start");
    end
    data_we = 0; key_we = 0;
    check(done, "done pulse after busy falls");
    check(n == 634, $sformatf("encryption took %0d cycles, exp 634", n));
    check(round == 4'(NR), "round counter at 10");
    @(negedge clk);
    check(!done, "done lasts one cycle");
    for (int i = 0; i < 16; i++) begin
      rd_addr = baddr_t'(i);
      #1;
      ct[i] = dout;
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    blk_t pt, key, ct;
    rst_n = 0; data_we = 0; key_we = 0; start = 0; addr = '0; din = '0; keyin = '0; rd_addr = '0;
    #22 rst_n = 1;

    pt  = from_hex(128'h3243f6a8885a308d313198a2e0370734);
    key = from_hex(128'h2b7e151628aed2a6abf7158809cf4f3c);
    encrypt(pt, key, ct);
    check(to_hex(ct) == 128'h3925841d02dc09fbdc118597196a0b32,
          $sformatf("FIPS-197 B: %032h", to_hex(ct)));

    pt  = from_hex(128'h00112233445566778899aabbccddeeff);
    key = from_hex(128'h000102030405060708090a0b0c0d0e0f);
    encrypt(pt, key, ct);
    check(to_hex(ct) == 128'h69c4e0d86a7b0430d8cdb78070b4c55a,
          $sformatf("FIPS-197 C.1: %032h", to_hex(ct)));

    for (int t = 0; t < 20; t++) begin
      for (int i = 0; i < 16; i++) begin
        pt[i]  = 8'($urandom);
        key[i] = 8'($urandom);
      end
      encrypt(pt, key, ct);
      check(to_hex(ct) == to_hex(ref_encrypt(pt, key)),
            $sformatf("random %0d: %032h exp %032h", t, to_hex(ct), to_hex(ref_encrypt(pt, key))));
    end

    $display("mechanisms: initial ARK %0d, MixColumn passes %0d, final rounds %0d, key/data overlap cycles %0d, key reloads %0d, ignored busy writes %0d",
             n_ark0, n_mc, n_final, n_overlap, n_reload, n_ignored);
    check(n_ark0 == 22, "initial AddRoundKey count");
    check(n_mc == 22 * 9, "MixColumn pass count");
    check(n_final == 22, "final round count");
    check(n_overlap == 22 * 10 * 17, "key generation overlapped with SubByte/ShiftRow");
    check(n_reload > 1, "key reloaded");
    check(n_ignored > 0, "busy write attempted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
