// tb_aes_rcon_gen: the round constant sequence for rounds 1..10 must be
// 01 02 04 08 10 20 40 80 1B 36 (FIPS-197), the register must hold when
// not advanced, and clear must bring it back to 01.
module tb_aes_rcon_gen;
  logic       clk = 0, rst_n, clear, advance;
  logic [7:0] rcon;
  int checks = 0, failures = 0;
  logic [7:0] expected [10] = '{8'h01, 8'h02, 8'h04, 8'h08, 8'h10,
                                8'h20, 8'h40, 8'h80, 8'h1B, 8'h36};

  aes_rcon_gen dut (.clk(clk), .rst_n(rst_n), .clear(clear), .advance(advance), .rcon(rcon));

  always #5 clk = ~clk;

  task automatic check(logic [7:0] e, string what);
    checks++;
    if (rcon != e) begin
      failures++;
      $display("FAIL %s: %02h exp %02h", what, rcon, e);
    end
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; clear = 0; advance = 0;
    #12 rst_n = 1;
    for (int pass = 0; pass < 2; pass++) begin
      for (int r = 0; r < 10; r++) begin
        check(expected[r], $sformatf("round %0d", r + 1));
        @(negedge clk); advance = 0;
        @(negedge clk);
        check(expected[r], "hold");
        advance = 1;
        @(negedge clk);
        advance = 0;
      end
      clear = 1;
      @(negedge clk);
      clear = 0;
      check(8'h01, "clear");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
