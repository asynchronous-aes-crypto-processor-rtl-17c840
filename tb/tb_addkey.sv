// tb_addkey: random test of the 32-bit dual-rail AddRoundKey against the
// binary XOR of column and key word, plus the spacer on each input.
module tb_addkey;
  import aes_async_pkg::*;
  import aes_ref_pkg::*;
  dr_word_t col, key, res;
  addkey dut (.*);
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
    logic ok0, ok1, ok2, ok3; logic [31:0] x, y, r;
    for (int t = 0; t < 300; t++) begin
      x = $urandom; y = $urandom;
      col = dr32(x); key = dr32(y); #1;
      r = {undr8(res[3], ok3), undr8(res[2], ok2), undr8(res[1], ok1), undr8(res[0], ok0)};
      check(ok0 && ok1 && ok2 && ok3 && r == (x ^ y), $sformatf("%h^%h gave %h", x, y, r));
    end
    key = '0; #1; check(res == '0, "spacer key");
    key = dr32(32'h1234); col = '0; #1; check(res == '0, "spacer column");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
