// tb_xtime_dr: exhaustive test of the dual-rail xtime ({02} product) against
// a binary GF(2^8) multiplication, plus the spacer.
module tb_xtime_dr;
  import aes_async_pkg::*;
  import aes_ref_pkg::*;
  dr_byte_t a, y;
  xtime_dr dut (.*);
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
    logic ok; logic [7:0] r;
    for (int x = 0; x < 256; x++) begin
      a = dr8(8'(x)); #1;
      r = undr8(y, ok);
      check(ok && r == gmul(8'(x), 8'h02), $sformatf("xtime(%h) gave %h", x, r));
    end
    a = '0; #1; check(y == '0, "spacer");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
