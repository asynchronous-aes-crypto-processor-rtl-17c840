// tb_bytesub: exhaustive test of the dual-rail composite-field S-box against
// the reference S-box (GF(2^8) inverse by search, then affine), including
// the FIPS-197 example S(53) = ed. It also checks that every output is a
// complete code word and that the spacer gives the spacer.
module tb_bytesub;
  import aes_async_pkg::*;
  import aes_ref_pkg::*;
  dr_byte_t a, y;
  bytesub dut (.*);
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
      check(ok && r == sbox(8'(x)), $sformatf("S(%h) gave %h", x, r));
    end
    a = dr8(8'h53); #1; r = undr8(y, ok); check(r == 8'hed, "S(53) = ed");
    a = '0; #1; check(y == '0, "spacer");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
