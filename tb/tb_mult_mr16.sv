// tb_mult_mr16: exhaustive test of the GF(2^4) product on 1-of-16 operands: all
// 256 operand pairs give exactly the wire of the product computed in binary;
// a spacer on either operand gives the spacer.
module tb_mult_mr16;
  import aes_async_pkg::*;
  import aes_ref_pkg::*;
  mr16_t a, b, y;
  mult_mr16 dut (.*);
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
    for (int x = 0; x < 16; x++)
      for (int z = 0; z < 16; z++) begin
        a = 16'(1) << x; b = 16'(1) << z; #1;
        check(y == 16'(1) << (g4mul(4'(x), 4'(z))), $sformatf("%0d,%0d gave %h", x, z, y));
      end
    a = '0; #1; check(y == '0, "spacer a");
    a = 16'h0004; b = '0; #1; check(y == '0, "spacer b");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
