// tb_crc_lite: drives the 32->8 CRC with walking ones and random words and
// compares it with the XOR of the four bytes; also checks that every single
// bit flip changes the CRC and that the function is linear.
module tb_crc_lite;
  import tb_rv_pkg::*;
  logic [31:0] d, d2;
  logic [7:0]  c, c2;
  int checks = 0, failures = 0;

  crc_lite dut  (.data(d),  .crc(c));
  crc_lite dut2 (.data(d2), .crc(c2));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s d=%h crc=%h", what, d, c);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int b = 0; b < 32; b++) begin
      d = 32'h1 << b; d2 = '0; #1;
      check(c == crc_ref(d), "walking one");
      check(c != c2, "single flip changes crc");
    end
    for (int n = 0; n < 2000; n++) begin
      d = $urandom; d2 = $urandom; #1;
      check(c == crc_ref(d), "random");
      d2 = d ^ (32'h1 << ($urandom % 32)); #1;
      check(c != c2, "random single flip");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
