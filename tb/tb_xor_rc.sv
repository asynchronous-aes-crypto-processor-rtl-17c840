// tb_xor_rc: XOR_RC against RotWord followed by adding Rcon to the first
// byte, for random words and all ten AES-128 round constants.
module tb_xor_rc;
  import aes_async_pkg::*;
  import aes_ref_pkg::*;
  dr_word_t w, y;
  dr_byte_t rcon;
  xor_rc dut (.*);
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
    logic ok0, ok1, ok2, ok3; logic [7:0] rc, b[4], r[4];
    rc = 8'h01;
    for (int t = 0; t < 200; t++) begin
      for (int i = 0; i < 4; i++) b[i] = 8'($urandom);
      w = {dr8(b[3]), dr8(b[2]), dr8(b[1]), dr8(b[0])}; rcon = dr8(rc); #1;
      r[0] = undr8(y[0], ok0); r[1] = undr8(y[1], ok1); r[2] = undr8(y[2], ok2); r[3] = undr8(y[3], ok3);
      check(ok0 && ok1 && ok2 && ok3 && r[0] == (b[1] ^ rc) && r[1] == b[2] && r[2] == b[3] && r[3] == b[0],
            $sformatf("word %h%h%h%h rcon %h", b[0], b[1], b[2], b[3], rc));
      if (t % 20 == 19) rc = gmul(rc, 8'h02);
    end
    w = '0; #1; check(y == '0, "spacer");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
