// tb_aes_byte_mem: random writes to the 16-byte register memory, checked
// against a shadow array after every clock. Cycles with we = 0 must leave
// every byte unchanged, and a write must change only the addressed byte.
module tb_aes_byte_mem;
  import aes_pkg::*;

  logic   clk = 0;
  logic   we;
  baddr_t waddr;
  byte_t  wdata;
  byte_t  q [NBYTES];
  byte_t  shadow [NBYTES];
  int checks = 0, failures = 0, cycles = 0;

  aes_byte_mem dut (.clk(clk), .we(we), .waddr(waddr), .wdata(wdata), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 1'b1;
    for (int i = 0; i < NBYTES; i++) begin
      waddr = baddr_t'(i);
      wdata = byte_t'($urandom);
      shadow[i] = wdata;
      @(posedge clk); #1;
    end
    for (int n = 0; n < 3000; n++) begin
      we    = ($urandom % 3) != 0;
      waddr = baddr_t'($urandom);
      wdata = byte_t'($urandom);
      @(posedge clk);
      if (we) shadow[waddr] = wdata;
      #1;
      for (int i = 0; i < NBYTES; i++) begin
        checks++;
        if (q[i] != shadow[i]) begin
          failures++;
          if (failures < 10) $display("FAIL byte %0d = %02h exp %02h", i, q[i], shadow[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
