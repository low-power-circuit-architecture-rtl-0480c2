// tb_aes_data_unit: drives the data encryption unit through a complete
// AES-128 encryption with a behavioural key memory in the testbench (the
// round keys come from the reference key expansion). After the initial
// AddRoundKey and after every round the 16 state bytes are read back on
// dout and compared with the reference round function; each operation
// must take 16 (initial AddRoundKey), 65 (rounds 1-9) or 33 (round 10)
// cycles. The FIPS-197 Appendix B block is checked by its ciphertext
// value 3925841d02dc09fbdc118597196a0b32, then random blocks and keys.
module tb_aes_data_unit;
  import aes_pkg::*;
  import tb_aes_ref_pkg::*;

  logic      clk = 0, rst_n, host_we, start_ark, start_round, final_round, busy, op_last;
  baddr_t    host_addr, rd_addr, rk_addr;
  byte_t     din, dout, roundkey;
  du_phase_e phase;
  blk_t      rk;
  int checks = 0, failures = 0;

  aes_data_unit dut (
    .clk(clk), .rst_n(rst_n), .host_we(host_we), .host_addr(host_addr), .din(din),
    .rd_addr(rd_addr), .dout(dout), .start_ark(start_ark), .start_round(start_round),
    .final_round(final_round), .busy(busy), .op_last(op_last), .phase(phase),
    .rk_addr(rk_addr), .roundkey(roundkey)
  );

  assign roundkey = rk[rk_addr];

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  task automatic compare_state(blk_t e, string what);
    for (int i = 0; i < 16; i++) begin
      rd_addr = baddr_t'(i);
      #1;
      check(dout == e[i], $sformatf("%s byte %0d = %02h exp %02h", what, i, dout, e[i]));
    end
  endtask

  task automatic run_op(bit ark_only, bit fin, int exp_cycles, string what);
    int n;
    @(negedge clk);
    start_ark = ark_only;
    start_round = !ark_only;
    final_round = fin;
    @(negedge clk);
    start_ark = 0;
    start_round = 0;
    n = 0;
    while (busy) begin
      n++;
      @(negedge clk);
    end
    check(n == exp_cycles, $sformatf("%s took %0d cycles, exp %0d", what, n, exp_cycles));
  endtask

  task automatic encrypt_check(blk_t pt, blk_t key, string what);
    blk_t s, k;
    for (int i = 0; i < 16; i++) begin
      @(negedge clk);
      host_we = 1; host_addr = baddr_t'(i); din = pt[i];
    end
    @(negedge clk);
    host_we = 0;
    compare_state(pt, {what, " loaded"});
    k = key;
    rk = k;
    for (int i = 0; i < 16; i++) s[i] = pt[i] ^ k[i];
    run_op(1, 0, 16, {what, " initial ARK"});
    compare_state(s, {what, " initial ARK"});
    for (int r = 1; r <= 10; r++) begin
      k = ref_next_key(k, ref_rcon(r));
      rk = k;
      s = ref_round(s, k, r == 10);
      run_op(0, r == 10, (r == 10) ? 33 : 65, $sformatf("%s round %0d", what, r));
      compare_state(s, $sformatf("%s round %0d", what, r));
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    blk_t pt, key;
    rst_n = 0; host_we = 0; start_ark = 0; start_round = 0; final_round = 0;
    host_addr = '0; rd_addr = '0; din = '0;
    for (int i = 0; i < 16; i++) rk[i] = '0;
    #22 rst_n = 1;

    pt  = from_hex(128'h3243f6a8885a308d313198a2e0370734);
    key = from_hex(128'h2b7e151628aed2a6abf7158809cf4f3c);
    encrypt_check(pt, key, "FIPS B");
    compare_state(from_hex(128'h3925841d02dc09fbdc118597196a0b32), "FIPS B ciphertext");

    for (int t = 0; t < 4; t++) begin
      for (int i = 0; i < 16; i++) begin
        pt[i]  = 8'($urandom);
        key[i] = 8'($urandom);
      end
      encrypt_check(pt, key, $sformatf("random %0d", t));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
