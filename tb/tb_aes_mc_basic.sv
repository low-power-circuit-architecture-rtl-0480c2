// tb_aes_mc_basic: the MixColumn basic module, applied four times with
// rotated inputs, must give the MixColumn matrix product of a column.
// Checked on the FIPS-197 example column db 13 53 45 -> 8e 4d a1 bc and on
// 2000 random columns against 02*a_i ^ 03*a_(i+1) ^ a_(i+2) ^ a_(i+3).
module tb_aes_mc_basic;
  import tb_aes_ref_pkg::*;

  logic [7:0] col [4];
  logic [7:0] b [4];
  int checks = 0, failures = 0;

  for (genvar i = 0; i < 4; i++) begin : g
    aes_mc_basic dut (
      .ai(col[i]), .ai_next(col[(i + 1) % 4]),
      .sum(col[0] ^ col[1] ^ col[2] ^ col[3]), .b(b[i])
    );
  end

  task automatic check_col();
    #1;
    for (int i = 0; i < 4; i++) begin
      logic [7:0] e;
      e = ref_mul(col[i], 8'h02) ^ ref_mul(col[(i + 1) % 4], 8'h03)
        ^ col[(i + 2) % 4] ^ col[(i + 3) % 4];
      checks++;
      if (b[i] != e) begin
        failures++;
        if (failures < 10) $display("FAIL b%0d=%02h exp %02h", i, b[i], e);
      end
    end
  endtask

  initial begin
    #100000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    col = '{8'hdb, 8'h13, 8'h53, 8'h45};
    #1;
    checks++;
    if ({b[0], b[1], b[2], b[3]} != 32'h8e4da1bc) begin
      failures++;
      $display("FAIL FIPS column: %02h %02h %02h %02h", b[0], b[1], b[2], b[3]);
    end
    for (int n = 0; n < 2000; n++) begin
      for (int i = 0; i < 4; i++) col[i] = 8'($urandom);
      check_col();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
