// tb_square_mr16: exhaustive test of square_mr16 on the 1-of-16 code: input
// wire v must reach output wire f(v), f being the square in GF(2^4) computed with
// the testbench's own field arithmetic; the spacer stays the spacer.
module tb_square_mr16;
  import aes_async_pkg::*;
  import aes_ref_pkg::*;
  mr16_t a, y;
  square_mr16 dut (.*);
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
  function automatic logic [3:0] inv4(input logic [3:0] x);
    for (int i = 0; i < 16; i++) if (g4mul(x, 4'(i)) == 4'h1) return 4'(i);
    return 4'h0;
  endfunction
  initial begin
    for (int v = 0; v < 16; v++) begin
      a = 16'(1) << v; #1;
      check(y == 16'(1) << g4mul(4'(v), 4'(v)), $sformatf("wire %0d gave %h", v, y));
    end
    a = '0; #1; check(y == '0, "spacer");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
