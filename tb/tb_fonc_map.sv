// tb_fonc_map: checks the GF(2^8) -> GF((2^4)^2) map: it is one-to-one,
// maps 1 to 1, and turns AES products into composite-field products
// (x^2 = x + {e} over GF(2^4) mod x^4+x+1) for random operand pairs.
module tb_fonc_map;
  import aes_async_pkg::*;
  import aes_ref_pkg::*;
  dr_byte_t a;
  dr_nib_t  ah, al;
  fonc_map dut (.*);
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
  task automatic map_of(input logic [7:0] x, output logic [7:0] r);
    logic ok;
    a = dr8(x); #1;
    r = undr8({ah, al}, ok);
    if (!ok) failures++;
  endtask
  initial begin
    logic [7:0] img[256]; logic seen[256];
    for (int x = 0; x < 256; x++) seen[x] = 0;
    for (int x = 0; x < 256; x++) begin map_of(8'(x), img[x]); seen[img[x]] = 1; end
    for (int x = 0; x < 256; x++) check(seen[x], $sformatf("%h not reached", x));
    check(img[1] == 8'h01, "map(1) = 1");
    for (int t = 0; t < 300; t++) begin
      logic [7:0] p, q;
      p = 8'($urandom); q = 8'($urandom);
      check(img[gmul(p, q)] == cmul(img[p], img[q]), $sformatf("product %h*%h", p, q));
    end
    a = '0; #1; check({ah, al} == '0, "spacer");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
