// tb_mixcolumns_dr: MixColumns of one dual-rail column against the matrix
// product computed with binary GF(2^8) arithmetic, for the FIPS-197 example
// column (d4 bf 5d 30 -> 04 66 81 e5) and random columns, plus the spacer.
module tb_mixcolumns_dr;
  import aes_async_pkg::*;
  import aes_ref_pkg::*;
  dr_word_t col, res;
  mixcolumns_dr dut (.*);
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
  task automatic one(input logic [7:0] a, b, c, d);
    logic ok0, ok1, ok2, ok3; logic [7:0] m0, m1, m2, m3;
    col = {dr8(d), dr8(c), dr8(b), dr8(a)}; #1;
    m0 = undr8(res[0], ok0); m1 = undr8(res[1], ok1); m2 = undr8(res[2], ok2); m3 = undr8(res[3], ok3);
    check(ok0 && ok1 && ok2 && ok3 &&
          m0 == (gmul(a,2) ^ gmul(b,3) ^ c ^ d) && m1 == (a ^ gmul(b,2) ^ gmul(c,3) ^ d) &&
          m2 == (a ^ b ^ gmul(c,2) ^ gmul(d,3)) && m3 == (gmul(a,3) ^ b ^ c ^ gmul(d,2)),
          $sformatf("column %h %h %h %h", a, b, c, d));
  endtask
  initial begin
    logic ok; logic [7:0] r;
    one(8'hd4, 8'hbf, 8'h5d, 8'h30);
    r = undr8(res[0], ok); check(r == 8'h04, "FIPS column row 0");
    r = undr8(res[3], ok); check(r == 8'he5, "FIPS column row 3");
    for (int t = 0; t < 300; t++) one(8'($urandom), 8'($urandom), 8'($urandom), 8'($urandom));
    col = '0; #1; check(res == '0, "spacer");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
