// tb_conv_dr_to_mr16: exhaustive test of the dual-rail to 1-of-16 converter:
// value v raises exactly wire v; the spacer raises none.
module tb_conv_dr_to_mr16;
  import aes_async_pkg::*;
  import aes_ref_pkg::*;
  dr_nib_t d;
  mr16_t   m;
  conv_dr_to_mr16 dut (.*);
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
      full = dr8(8'(v)); d = full[7:0]; #1;
      check(m == 16'(1) << v, $sformatf("value %0d gave %h", v, m));
    end
    d = '0; #1; check(m == '0, "spacer");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
