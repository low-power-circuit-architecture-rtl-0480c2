// tb_aes_xtime: exhaustive test of xtime against multiplication by 02 in
// GF(2^8) done by the reference polynomial multiplier.
module tb_aes_xtime;
  import tb_aes_ref_pkg::*;

  logic [7:0] a, y;
  int checks = 0, failures = 0;

  aes_xtime dut (.a(a), .y(y));

  initial begin
    #100000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      a = 8'(i);
      #1;
      checks++;
      if (y != ref_mul(a, 8'h02)) begin
        failures++;
        $display("FAIL xtime(%02h)=%02h", a, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
