// tb_dr_xor: exhaustive test of the dual-rail XOR gate: all four valid input
// pairs give the XOR in dual rail with one rail high, and a spacer on either
// input gives a spacer.
module tb_dr_xor;
  import aes_async_pkg::*;
  dr_t a, b, c;
  dr_xor dut (.*);
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
    for (int x = 0; x < 2; x++)
      for (int y = 0; y < 2; y++) begin
        a = x[0] ? 2'b10 : 2'b01; b = y[0] ? 2'b10 : 2'b01; #1;
        check(c == ((x[0] ^ y[0]) ? 2'b10 : 2'b01), $sformatf("%0d^%0d gave %b", x, y, c));
        a = 2'b00; #1; check(c == 2'b00, "spacer on a");
        a = x[0] ? 2'b10 : 2'b01; b = 2'b00; #1; check(c == 2'b00, "spacer on b");
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
