// tb_affine_dr: exhaustive test of the S-box affine transform against the
// FIPS-197 formula, plus the spacer.
module tb_affine_dr;
  import aes_async_pkg::*;
  import aes_ref_pkg::*;
  dr_byte_t a, b;
  affine_dr dut (.*);
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
      r = undr8(b, ok);
      check(ok && r == affine(8'(x)), $sformatf("affine(%h) gave %h", x, r));
    end
    a = '0; #1; check(b == '0, "spacer");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
