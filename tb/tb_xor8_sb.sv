// tb_xor8_sb: random test of the 8-bit dual-rail XOR against the binary XOR,
// plus the spacer.
module tb_xor8_sb;
  import aes_async_pkg::*;
  import aes_ref_pkg::*;
  dr_byte_t a, b, c;
  xor8_sb dut (.*);
  int checks = 0, failures = 0;
  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic check(input logic ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  initial begin
    logic ok; logic [7:0] x, y, r;
    for (int t = 0; t < 300; t++) begin
      x = 8'($urandom); y = 8'($urandom);
      a = dr8(x); b = dr8(y); #1;
      r = undr8(c, ok);
      check(ok && r == (x ^ y), $sformatf("%h^%h gave %h", x, y, r));
    end
    a = '0; #1; check(c == '0, "spacer");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
