// tb_aes_sbox: exhaustive test of the combinational S-box. All 256 inputs
// are compared with the reference S-box, the decryption path is checked to
// invert the encryption path for every byte, and the FIPS-197 entries
// S(00)=63, S(53)=ED are checked by value.
module tb_aes_sbox;
  import tb_aes_ref_pkg::*;

  logic [7:0] a, y, yi;
  logic       dec;
  int checks = 0, failures = 0;

  aes_sbox dut_e (.a(a), .decrypt(1'b0), .y(y));
  aes_sbox dut_d (.a(y), .decrypt(1'b1), .y(yi));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
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
    dec = 1'b0;
    for (int i = 0; i < 256; i++) begin
      a = 8'(i);
      #1;
      check(y == ref_sbox(a), $sformatf("sbox(%02h)=%02h exp %02h", a, y, ref_sbox(a)));
      check(yi == a, $sformatf("inv sbox(%02h)=%02h exp %02h", y, yi, a));
    end
    a = 8'h00; #1 check(y == 8'h63, "S(00)");
    a = 8'h53; #1 check(y == 8'hED, "S(53)");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
