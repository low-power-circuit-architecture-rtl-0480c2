// tb_aes_key_unit: loads a key, generates the ten AES-128 round keys one
// after the other and compares each with the reference key expansion. The
// FIPS-197 Appendix A.1 key is used first (its round 10 key is
// d014f9a8c9ee2589e13f0cc8b6630ca6), then random keys. Each round key
// must be complete exactly 17 cycles after the start edge, and the rounds
// are also run back to back (start in the last cycle of the previous one).
module tb_aes_key_unit;
  import aes_pkg::*;
  import tb_aes_ref_pkg::*;

  logic   clk = 0, rst_n, host_we, rcon_clear, start, busy, last;
  baddr_t host_addr, rk_addr;
  byte_t  keyin, keyout;
  int checks = 0, failures = 0;

  aes_key_unit dut (
    .clk(clk), .rst_n(rst_n), .host_we(host_we), .host_addr(host_addr), .keyin(keyin),
    .rcon_clear(rcon_clear), .start(start), .busy(busy), .last(last),
    .rk_addr(rk_addr), .keyout(keyout)
  );

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  task automatic load_key(blk_t k);
    for (int i = 0; i < 16; i++) begin
      @(negedge clk);
      host_we = 1; host_addr = baddr_t'(i); keyin = k[i];
    end
    @(negedge clk);
    host_we = 0;
    rcon_clear = 1;
    @(negedge clk);
    rcon_clear = 0;
  endtask

  task automatic compare_key(blk_t e, string what);
    for (int i = 0; i < 16; i++) begin
      rk_addr = baddr_t'(i);
      #1;
      check(keyout == e[i], $sformatf("%s byte %0d = %02h exp %02h", what, i, keyout, e[i]));
    end
  endtask

  // one round key, started from idle; counts the cycles to completion
  task automatic gen_one(blk_t e, string what);
    int n;
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    n = 0;
    while (busy) begin
      n++;
      @(negedge clk);
    end
    check(n == 17, $sformatf("%s took %0d cycles", what, n));
    compare_key(e, what);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    blk_t k, e;
    rst_n = 0; host_we = 0; rcon_clear = 0; start = 0; host_addr = '0; keyin = '0; rk_addr = '0;
    #22 rst_n = 1;

    // FIPS-197 A.1, one round key at a time
    k = from_hex(128'h2b7e151628aed2a6abf7158809cf4f3c);
    load_key(k);
    compare_key(k, "loaded key");
    e = k;
    for (int r = 1; r <= 10; r++) begin
      e = ref_next_key(e, ref_rcon(r));
      gen_one(e, $sformatf("FIPS round %0d", r));
    end
    check(to_hex(e) == 128'hd014f9a8c9ee2589e13f0cc8b6630ca6, "FIPS round 10 key value");

    // random keys, ten round keys back to back
    for (int t = 0; t < 5; t++) begin
      int n;
      for (int i = 0; i < 16; i++) k[i] = 8'($urandom);
      load_key(k);
      e = k;
      for (int r = 1; r <= 10; r++) e = ref_next_key(e, ref_rcon(r));
      @(negedge clk);
      start = 1;
      @(negedge clk);
      start = 0;
      n = 0;
      for (int r = 1; r <= 10; r++) begin
        while (!last) begin
          n++;
          @(negedge clk);
        end
        n++;
        start = (r < 10);
        @(negedge clk);
        start = 0;
      end
      check(!busy, "idle after ten round keys");
      check(n == 170, $sformatf("ten round keys took %0d cycles", n));
      compare_key(e, $sformatf("random key %0d round 10", t));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
