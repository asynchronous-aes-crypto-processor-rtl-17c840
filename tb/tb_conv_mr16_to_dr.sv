// tb_conv_mr16_to_dr: exhaustive test of the 1-of-16 to dual-rail converter:
// wire v gives the dual-rail code of v; no wire gives the spacer.
module tb_conv_mr16_to_dr;
  import aes_async_pkg::*;
  import aes_ref_pkg::*;
  mr16_t   m;
  dr_nib_t d;
  conv_mr16_to_dr dut (.*);
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
    logic [15:0] full;
    for (int v = 0; v < 16; v++) begin
      m = 16'(1) << v; #1;
      full = dr8(8'(v));
      check(d == full[7:0], $sformatf("wire %0d gave %b", v, d));
    end
    m = '0; #1; check(d == '0, "spacer");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
